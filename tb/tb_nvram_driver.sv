// tb_nvram_driver: self-checking test of the nvRAM memory driver.
//
// Three behavioural nvRAM models share the address and data lines and each
// has its own chip enable. Random reads and writes (with random byte enables)
// go to random chips and a small address window; every read is compared with
// a reference copy kept here. The test also checks the access latency in
// cycles (read = T_RD_EN + T_RD_WAIT + 1 + T_RD_END, write = T_WR_EN +
// T_WR_PULSE + T_WR_REC), that no write pulse was too short for the parts,
// that reads wait for the parts' access time and that the controller and a
// part never drive the bus together.
module tb_nvram_driver;
  import nvram_pkg::*;

  localparam int unsigned NUM_CHIPS = 3;
  localparam int unsigned AW        = 18;
  localparam int unsigned RD_LAT    = 1 + 6 + 1 + 1;
  localparam int unsigned WR_LAT    = 1 + 5 + 1;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;   // 100 MHz

  logic            req_valid, req_ready, req_write, done;
  logic [1:0]      req_chip, req_be;
  logic [AW-1:0]   req_addr, mem_addr;
  logic [15:0]     req_wdata, rdata, mem_dq_o, mem_dq_i;
  logic [NUM_CHIPS-1:0] mem_ce_n;
  logic            mem_oe_n, mem_we_n, mem_ub_n, mem_lb_n, mem_dq_oe;

  nvram_driver #(.NUM_CHIPS(NUM_CHIPS), .MEM_ADDR_W(AW)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_write, .req_chip, .req_addr,
    .req_wdata, .req_be, .done, .rdata,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n, .mem_addr,
    .mem_dq_o, .mem_dq_oe, .mem_dq_i
  );

  logic [15:0] chip_dq [NUM_CHIPS];
  logic        chip_oe [NUM_CHIPS];

  for (genvar c = 0; c < NUM_CHIPS; c++) begin : g_chip
    nvram_chip_model #(.ADDR_W(AW), .ACCESS_NS(60), .WP_NS(40)) u_chip (
      .ce_n(mem_ce_n[c]), .oe_n(mem_oe_n), .we_n(mem_we_n), .ub_n(mem_ub_n),
      .lb_n(mem_lb_n), .addr(mem_addr), .dq_i(mem_dq_o), .dq_o(chip_dq[c]),
      .dq_oe(chip_oe[c])
    );
  end

  always_comb begin
    mem_dq_i = 16'hFFFF;   // weak pull-up on an undriven bus
    for (int c = 0; c < NUM_CHIPS; c++) if (chip_oe[c]) mem_dq_i = chip_dq[c];
  end

  int checks = 0, failures = 0;
  int contention = 0;
  logic [15:0] ref_mem [NUM_CHIPS][64];

  always @(posedge clk) begin
    for (int c = 0; c < NUM_CHIPS; c++)
      if (chip_oe[c] && mem_dq_oe) contention++;
  end

  task automatic access(input logic wr, input int chip, input int a,
                        input logic [15:0] d, input logic [1:0] be,
                        output logic [15:0] q, output int lat);
    // drive on the falling edge so the rising edge sees stable inputs
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b1;
    req_write = wr;
    req_chip  = 2'(chip);
    req_addr  = AW'(a);
    req_wdata = d;
    req_be    = be;
    @(posedge clk);           // request taken on this edge
    @(negedge clk);
    req_valid = 1'b0;
    lat = 0;   // counts rising edges after the one that took the request
    while (!done) begin
      @(negedge clk);
      lat++;
    end
    q = rdata;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] q;
    int lat;
    rst_n     = 1'b0;
    req_valid = 1'b0;
    req_write = 1'b0;
    req_chip  = '0;
    req_addr  = '0;
    req_wdata = '0;
    req_be    = '0;
    for (int c = 0; c < NUM_CHIPS; c++)
      for (int a = 0; a < 64; a++) ref_mem[c][a] = 16'h0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // idle pins
    checks++;
    if (mem_ce_n !== '1 || !mem_oe_n || !mem_we_n || mem_dq_oe) begin
      failures++; $display("FAIL idle pins");
    end

    for (int i = 0; i < 300; i++) begin
      int chip, a;
      logic wr;
      logic [15:0] d;
      logic [1:0] be;
      chip = $urandom_range(0, NUM_CHIPS - 1);
      a    = $urandom_range(0, 63);
      wr   = ($urandom_range(0, 1) == 1);
      d    = 16'($urandom);
      be   = 2'($urandom_range(1, 3));
      access(wr, chip, a, d, be, q, lat);
      checks++;
      if (wr) begin
        if (be[0]) ref_mem[chip][a][7:0]  = d[7:0];
        if (be[1]) ref_mem[chip][a][15:8] = d[15:8];
        if (lat != WR_LAT) begin failures++; $display("FAIL write latency %0d", lat); end
      end else begin
        if (lat != RD_LAT) begin failures++; $display("FAIL read latency %0d", lat); end
        checks++;
        if (q !== ref_mem[chip][a]) begin
          failures++;
          $display("FAIL read chip %0d addr %0d: got %h want %h", chip, a, q, ref_mem[chip][a]);
        end
      end
    end
    // read back everything
    for (int c = 0; c < NUM_CHIPS; c++)
      for (int a = 0; a < 64; a++) begin
        access(1'b0, c, a, 16'h0, 2'b11, q, lat);
        checks++;
        if (q !== ref_mem[c][a]) begin
          failures++;
          $display("FAIL final chip %0d addr %0d: got %h want %h", c, a, q, ref_mem[c][a]);
        end
      end
    checks++;
    if (g_chip[0].u_chip.short_pulses + g_chip[1].u_chip.short_pulses +
        g_chip[2].u_chip.short_pulses != 0) begin
      failures++; $display("FAIL short write pulses");
    end
    checks++;
    if (contention != 0) begin failures++; $display("FAIL bus contention %0d", contention); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
