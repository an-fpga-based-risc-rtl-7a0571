// tb_nvram_ip: end-to-end test of the NVM memory controller (AXI converter
// plus memory driver) against three behavioural x16 nvRAM parts on a shared
// address/data bus. An AXI master sends single writes (full word and single
// halves), INCR write bursts and full-word and narrow read bursts, with random
// stalls, to all three parts; read data is compared with a byte-level
// reference memory. The test checks the latency of a single full-word write
// (address to write response: 2 x (write access + 2) cycles) and read
// (address to read data: 2 x (read access + 2) cycles), the number of nvRAM
// write and read strobes per beat (one per needed half), and that every state
// of the state machine was used.
module tb_nvram_ip;
  import nvram_pkg::*;

  localparam int unsigned AW = 18;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic      s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic      s_arvalid, s_arready, s_rvalid, s_rready;
  axi_ax_t   s_aw, s_ar;
  axi_w_t    s_w;
  axi_r_t    s_r;
  axi_resp_e s_bresp;
  logic          drv_req_valid, drv_req_ready, drv_req_write, drv_done;
  logic [1:0]    drv_req_chip, drv_req_be;
  logic [AW-1:0] drv_req_addr;
  logic [15:0]   drv_req_wdata, drv_rdata;
  axi_state_e    state;

  localparam int unsigned RD_LAT = 1 + 6 + 1 + 1;
  localparam int unsigned WR_LAT = 1 + 5 + 1;

  logic [2:0]    mem_ce_n;
  logic          mem_oe_n, mem_we_n, mem_ub_n, mem_lb_n, mem_dq_oe;
  logic [AW-1:0] mem_addr;
  logic [15:0]   mem_dq_o, mem_dq_i;

  nvram_ip #(.NUM_CHIPS(3), .MEM_ADDR_W(AW)) dut (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_aw, .s_wvalid, .s_wready, .s_w,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_ar,
    .s_rvalid, .s_rready, .s_r,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i, .state
  );

  logic [15:0] chip_dq [3];
  logic        chip_oe [3];
  for (genvar c = 0; c < 3; c++) begin : g_chip
    nvram_chip_model #(.ADDR_W(AW), .ACCESS_NS(60), .WP_NS(40)) u_chip (
      .ce_n(mem_ce_n[c]), .oe_n(mem_oe_n), .we_n(mem_we_n), .ub_n(mem_ub_n),
      .lb_n(mem_lb_n), .addr(mem_addr), .dq_i(mem_dq_o), .dq_o(chip_dq[c]),
      .dq_oe(chip_oe[c])
    );
  end
  always_comb begin
    mem_dq_i = 16'hFFFF;
    for (int c = 0; c < 3; c++) if (chip_oe[c]) mem_dq_i = chip_dq[c];
  end

  // nvRAM accesses, counted at the falling edge of the write or output enable
  int drv_accesses = 0;
  always @(negedge mem_we_n) drv_accesses++;
  always @(negedge mem_oe_n) drv_accesses++;

  // cycle counter
  int cyc = 0;
  always @(posedge clk) cyc++;

  // ---------------- handshakes seen at the rising edge ----------------
  logic aw_hs, w_hs, b_hs, ar_hs, r_hs;
  axi_r_t r_q;
  always @(posedge clk) begin
    aw_hs <= s_awvalid && s_awready;
    w_hs  <= s_wvalid && s_wready;
    b_hs  <= s_bvalid && s_bready;
    ar_hs <= s_arvalid && s_arready;
    r_hs  <= s_rvalid && s_rready;
    r_q   <= s_r;
  end

  // state usage
  int state_seen [9];
  always @(posedge clk) if (rst_n) state_seen[int'(state)]++;

  int checks = 0, failures = 0;
  int t_aw, t_ar, b_lat, r_lat;
  logic [7:0] ref_mem [int];

  function automatic logic [7:0] ref_byte(input int a);
    return ref_mem.exists(a) ? ref_mem[a] : 8'h00;
  endfunction

  // One write burst of n beats of 4 bytes from aligned address a.
  task automatic axi_write(input int a, input int n, input logic [31:0] data [],
                           input logic [3:0] strb [], input bit w_with_aw);
    int beat;
    @(negedge clk);
    s_awvalid  = 1'b1;
    s_aw.addr  = 32'(a);
    s_aw.len   = 8'(n - 1);
    s_aw.size  = 3'd2;
    s_aw.burst = BURST_INCR;
    if (w_with_aw) begin
      s_wvalid = 1'b1;
      s_w.data = data[0];
      s_w.strb = strb[0];
      s_w.last = (n == 1);
    end
    @(negedge clk);
    while (!aw_hs) @(negedge clk);
    t_aw = cyc;
    s_awvalid = 1'b0;
    beat = 0;
    if (w_with_aw) begin
      while (!w_hs) @(negedge clk);
      s_wvalid = 1'b0;
      beat = 1;
    end
    for (; beat < n; beat++) begin
      repeat ($urandom_range(0, 2)) @(negedge clk);
      s_wvalid = 1'b1;
      s_w.data = data[beat];
      s_w.strb = strb[beat];
      s_w.last = (beat == n - 1);
      @(negedge clk);
      while (!w_hs) @(negedge clk);
      s_wvalid = 1'b0;
    end
    for (int i = 0; i < n; i++)
      for (int b = 0; b < 4; b++)
        if (strb[i][b]) ref_mem[a + 4 * i + b] = data[i][8*b +: 8];
    while (!s_bvalid) @(negedge clk);
    b_lat = cyc - t_aw;
    s_bready = 1'b1;
    @(negedge clk);
    while (!b_hs) @(negedge clk);
    s_bready = 1'b0;
  endtask

  // One read burst of n beats of 2**size bytes from address a; checks data.
  task automatic axi_read(input int a, input int n, input int size);
    int got = 0;
    @(negedge clk);
    s_arvalid  = 1'b1;
    s_ar.addr  = 32'(a);
    s_ar.len   = 8'(n - 1);
    s_ar.size  = 3'(size);
    s_ar.burst = BURST_INCR;
    @(negedge clk);
    while (!ar_hs) @(negedge clk);
    t_ar = cyc;
    s_arvalid = 1'b0;
    while (!s_rvalid) @(negedge clk);
    r_lat = cyc - t_ar;
    while (got < n) begin
      s_rready = ($urandom_range(0, 2) != 0);
      @(negedge clk);
      if (r_hs) begin
        int ba;
        ba = a + got * (1 << size);
        checks++;
        for (int b = 0; b < (1 << size); b++) begin
          int lane;
          lane = (ba + b) % 4;
          if (r_q.data[8*lane +: 8] !== ref_byte(ba + b)) begin
            failures++;
            $display("FAIL read %h byte %0d: got %h want %h", ba, b,
                     r_q.data[8*lane +: 8], ref_byte(ba + b));
            break;
          end
        end
        checks++;
        if (r_q.last !== (got == n - 1)) begin failures++; $display("FAIL rlast"); end
        got++;
      end
    end
    s_rready = 1'b0;
  endtask

  task automatic expect_accesses(input int n0, input int want, input string what);
    checks++;
    if (drv_accesses - n0 != want) begin
      failures++;
      $display("FAIL %s: %0d driver accesses, want %0d", what, drv_accesses - n0, want);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d [];
    logic [3:0]  s [];
    int n0;
    rst_n = 1'b0;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_aw = '0; s_w = '0; s_ar = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // single full word, then its placement in the half-word array
    d = new[1]; s = new[1];
    d[0] = 32'h1122_3344; s[0] = 4'hF;
    n0 = drv_accesses;
    axi_write(32'h100, 1, d, s, 1'b1);
    expect_accesses(n0, 2, "full word write");
    checks++;
    if (g_chip[0].u_chip.mem[18'h80] !== 16'h3344 || g_chip[0].u_chip.mem[18'h81] !== 16'h1122) begin
      failures++; $display("FAIL half-word placement");
    end
    checks++;
    if (b_lat != 2 * (WR_LAT + 2)) begin
      failures++; $display("FAIL write latency %0d, want %0d", b_lat, 2 * (WR_LAT + 2));
    end
    // lower half only, upper half only
    d[0] = 32'hAAAA_5555; s[0] = 4'b0011;
    n0 = drv_accesses;
    axi_write(32'h104, 1, d, s, 1'b0);
    expect_accesses(n0, 1, "lower-half write");
    d[0] = 32'hBEEF_0000; s[0] = 4'b1100;
    n0 = drv_accesses;
    axi_write(32'h108, 1, d, s, 1'b1);
    expect_accesses(n0, 1, "upper-half write");
    // single byte
    d[0] = 32'h0000_7700; s[0] = 4'b0010;
    axi_write(32'h100, 1, d, s, 1'b0);

    axi_read(32'h100, 1, 2);
    checks++;
    if (r_lat != 2 * (RD_LAT + 2)) begin
      failures++; $display("FAIL read latency %0d, want %0d", r_lat, 2 * (RD_LAT + 2));
    end
    n0 = drv_accesses;
    axi_read(32'h100, 3, 2);
    expect_accesses(n0, 6, "3-beat word read burst");
    n0 = drv_accesses;
    axi_read(32'h102, 1, 1);
    expect_accesses(n0, 1, "upper 16-bit read");
    n0 = drv_accesses;
    axi_read(32'h104, 1, 1);
    expect_accesses(n0, 1, "lower 16-bit read");

    // random bursts on the three chips
    for (int t = 0; t < 30; t++) begin
      int n, a, chip;
      n    = $urandom_range(1, 8);
      chip = $urandom_range(0, 2);
      a    = (chip << (AW + 1)) + 4 * $urandom_range(0, 63);
      d = new[n]; s = new[n];
      for (int i = 0; i < n; i++) begin
        d[i] = $urandom;
        s[i] = 4'($urandom_range(0, 15));
        if (i % 3 == 0) s[i] = 4'hF;
      end
      axi_write(a, n, d, s, ($urandom_range(0, 1) == 1));
      axi_read(a, n, 2);
      if (t % 4 == 0) axi_read(a, 2 * n, 1);   // narrow burst over the same range
    end

    for (int i = 0; i < 9; i++) begin
      checks++;
      if (state_seen[i] == 0) begin
        failures++; $display("FAIL state %s never used", axi_state_e'(i));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
