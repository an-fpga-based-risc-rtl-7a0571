// tb_nvram_transfer: the 64-byte transfer workload on the NVM memory
// controller at its default parameters (100 MHz, x16 parts).
//
// For each of the three parts, 64 bytes are written and read back twice:
// once as one AXI burst of 16 words (one address), and once as 16 single-word
// transfers (an address for every word). The master never stalls, so the
// times measured are the controller's own. The test checks the data read
// back, the cycle count of a burst (per word, two 16-bit accesses of 9 or 7
// cycles with two cycles of handover each, plus one between beats), that no
// write pulse was too short for the part models, that every word costs two
// 16-bit accesses, and that a burst takes fewer cycles than the same data
// sent as single transfers. It prints the time per byte for
// each case. The part models are set to a 60 ns access and a 40 ns write
// pulse for the FRAM-type part and 45 ns / 30 ns for the two MRAM-type parts;
// those figures are this testbench's own.
module tb_nvram_transfer;
  import nvram_pkg::*;

  localparam int unsigned AW     = 18;
  localparam int unsigned NBYTES = 64;
  localparam int unsigned NWORDS = NBYTES / 4;
  localparam int unsigned RD_LAT = 1 + 6 + 1 + 1;   // driver read, default phases
  localparam int unsigned WR_LAT = 1 + 5 + 1;       // driver write, default phases

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic      s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic      s_arvalid, s_arready, s_rvalid, s_rready;
  axi_ax_t   s_aw, s_ar;
  axi_w_t    s_w;
  axi_r_t    s_r;
  axi_resp_e s_bresp;
  axi_state_e state;

  logic [2:0]    mem_ce_n;
  logic          mem_oe_n, mem_we_n, mem_ub_n, mem_lb_n, mem_dq_oe;
  logic [AW-1:0] mem_addr;
  logic [15:0]   mem_dq_o, mem_dq_i;

  nvram_ip dut (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_aw, .s_wvalid, .s_wready, .s_w,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_ar,
    .s_rvalid, .s_rready, .s_r,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i, .state
  );

  localparam int unsigned ACC [3] = '{60, 45, 45};
  localparam int unsigned WP  [3] = '{40, 30, 30};
  logic [15:0] chip_dq [3];
  logic        chip_oe [3];
  for (genvar c = 0; c < 3; c++) begin : g_chip
    nvram_chip_model #(.ADDR_W(AW), .ACCESS_NS(ACC[c]), .WP_NS(WP[c])) u_chip (
      .ce_n(mem_ce_n[c]), .oe_n(mem_oe_n), .we_n(mem_we_n), .ub_n(mem_ub_n),
      .lb_n(mem_lb_n), .addr(mem_addr), .dq_i(mem_dq_o), .dq_o(chip_dq[c]),
      .dq_oe(chip_oe[c])
    );
  end
  always_comb begin
    mem_dq_i = 16'hFFFF;
    for (int c = 0; c < 3; c++) if (chip_oe[c]) mem_dq_i = chip_dq[c];
  end

  int n_we = 0, n_oe = 0;
  always @(negedge mem_we_n) n_we++;
  always @(negedge mem_oe_n) n_oe++;

  int cyc = 0;
  always @(posedge clk) cyc++;

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

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Write n words from address a as one burst; returns cycles until B.
  task automatic wr(input int a, input int n, input logic [31:0] data [], output int cycles);
    int t0;
    @(negedge clk);
    t0 = cyc;
    s_awvalid = 1'b1;
    s_aw      = '{addr: 32'(a), len: 8'(n - 1), size: 3'd2, burst: BURST_INCR};
    s_bready  = 1'b1;
    for (int beat = 0; beat < n; beat++) begin
      s_wvalid = 1'b1;
      s_w      = '{data: data[beat], strb: 4'hF, last: (beat == n - 1)};
      @(negedge clk);
      if (aw_hs) s_awvalid = 1'b0;
      while (!w_hs) begin
        @(negedge clk);
        if (aw_hs) s_awvalid = 1'b0;
      end
    end
    s_wvalid = 1'b0;
    while (!b_hs) @(negedge clk);
    s_bready = 1'b0;
    cycles = cyc - t0;
  endtask

  // Read n words from address a as one burst; returns cycles until the last R.
  task automatic rd(input int a, input int n, output logic [31:0] data [], output int cycles);
    int t0, got;
    data = new[n];
    @(negedge clk);
    t0 = cyc;
    s_arvalid = 1'b1;
    s_ar      = '{addr: 32'(a), len: 8'(n - 1), size: 3'd2, burst: BURST_INCR};
    s_rready  = 1'b1;
    got = 0;
    while (got < n) begin
      @(negedge clk);
      if (ar_hs) s_arvalid = 1'b0;
      if (r_hs) begin
        data[got] = r_q.data;
        got++;
      end
    end
    s_rready = 1'b0;
    cycles = cyc - t0;
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d [], q [], one [];
    int c_wb, c_rb, c_ws, c_rs, c, we0, oe0;
    rst_n = 1'b0;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rready = 0;
    s_aw = '0; s_w = '0; s_ar = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    d = new[NWORDS];
    one = new[1];
    for (int chip = 0; chip < 3; chip++) begin
      int base;
      base = (chip << (AW + 1)) + 32'h400;
      // burst
      for (int i = 0; i < NWORDS; i++) d[i] = $urandom;
      we0 = n_we; oe0 = n_oe;
      wr(base, NWORDS, d, c_wb);
      rd(base, NWORDS, q, c_rb);
      check("two write pulses per word", n_we - we0 == 2 * NWORDS);
      check("two reads per word", n_oe - oe0 == 2 * NWORDS);
      for (int i = 0; i < NWORDS; i++) check("burst data", q[i] == d[i]);
      // single transfers
      for (int i = 0; i < NWORDS; i++) d[i] = $urandom;
      c_ws = 0; c_rs = 0;
      for (int i = 0; i < NWORDS; i++) begin
        one[0] = d[i];
        wr(base + 4 * i, 1, one, c);
        c_ws += c;
      end
      for (int i = 0; i < NWORDS; i++) begin
        rd(base + 4 * i, 1, q, c);
        c_rs += c;
        check("single data", q[0] == d[i]);
      end
      // per word: two driver accesses, each with two cycles of handover, plus
      // one cycle to move to the next beat; one more cycle to start the burst
      check("burst write cycles", c_wb <= NWORDS * (2 * (WR_LAT + 2) + 1) + 1);
      check("burst read cycles", c_rb <= NWORDS * (2 * (RD_LAT + 2) + 1) + 1);
      check("burst write faster than single writes", c_wb < c_ws);
      check("burst read faster than single reads", c_rb < c_rs);
      $display("part %0d, %0d bytes: write %0.1f ns/B burst, %0.1f ns/B single; read %0.1f ns/B burst, %0.1f ns/B single",
               chip, NBYTES, 10.0 * c_wb / NBYTES, 10.0 * c_ws / NBYTES,
               10.0 * c_rb / NBYTES, 10.0 * c_rs / NBYTES);
    end
    check("no short write pulses",
          g_chip[0].u_chip.short_pulses == 0 && g_chip[1].u_chip.short_pulses == 0 &&
          g_chip[2].u_chip.short_pulses == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
