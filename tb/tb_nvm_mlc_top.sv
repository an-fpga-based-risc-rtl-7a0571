// tb_nvm_mlc_top: end-to-end test of the whole design at its default sizes.
//
// Fast-store memory path: RISC-V load, store and fast-store instructions
// (encoded here) are fed with their register operands. Streams of fast
// double-word stores fill whole lines, which must be written back through
// the fast path (address MSB set); streams of ordinary stores and lines mixing
// both must go through the slow path, whose writes are held back 5 cycles
// each. Byte, half and word fast stores, loads of every size and sign,
// misaligned accesses and a final cache flush are exercised. Every load is
// compared with a byte-level reference, and after the flush the SRAM must
// hold the reference contents: after evicting every line, all
// three regions are read back from the SRAM.
// NVM controller: AXI single and burst writes (full and half words) and full
// and narrow reads go to three behavioural nvRAM parts and are checked
// against a reference.
// Each mechanism (hit, miss, fast and slow write-back, write delay, each fast
// store instruction, misaligned access, flush, each controller state) is
// counted and must have happened at least once.
module tb_nvm_mlc_top;
  import rv_fs_pkg::*;
  import nvram_pkg::*;

  localparam int unsigned AW = 18;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  // fast-store path
  logic            instr_valid, instr_ready, instr_is_mem, misaligned;
  logic [31:0]     instr;
  logic [XLEN-1:0] rs1_val, rs2_val, ld_data;
  logic            ld_valid, st_done, flush_req, flush_done;
  logic [4:0]      ld_rd;
  logic [I_NUM-1:0] instr_vec;
  logic            ev_hit, ev_miss, ev_wb_fast, ev_wb_slow;
  logic [31:0]     slow_clk_ticks, fast_clk_ticks;
  // controller
  logic      s_awvalid, s_awready, s_wvalid, s_wready, s_bvalid, s_bready;
  logic      s_arvalid, s_arready, s_rvalid, s_rready;
  axi_ax_t   s_aw, s_ar;
  axi_w_t    s_w;
  axi_r_t    s_r;
  axi_resp_e s_bresp;
  logic [2:0]    mem_ce_n;
  logic          mem_oe_n, mem_we_n, mem_ub_n, mem_lb_n, mem_dq_oe;
  logic [AW-1:0] mem_addr;
  logic [15:0]   mem_dq_o, mem_dq_i;
  axi_state_e    nvram_state;

  nvm_mlc_top dut (
    .clk, .rst_n,
    .instr_valid, .instr_ready, .instr, .rs1_val, .rs2_val, .instr_is_mem,
    .misaligned, .ld_valid, .ld_data, .ld_rd, .st_done, .flush_req, .flush_done,
    .instr_vec, .ev_hit, .ev_miss, .ev_wb_fast, .ev_wb_slow, .slow_clk_ticks, .fast_clk_ticks,
    .s_awvalid, .s_awready, .s_aw, .s_wvalid, .s_wready, .s_w,
    .s_bvalid, .s_bready, .s_bresp, .s_arvalid, .s_arready, .s_ar,
    .s_rvalid, .s_rready, .s_r,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i, .nvram_state
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
  always @(posedge clk) if (rst_n) state_seen[int'(nvram_state)]++;

  int checks = 0, failures = 0;
  int t_aw, t_ar, b_lat, r_lat;
  logic [7:0] nref_mem [int];

  function automatic logic [7:0] nref_byte(input int a);
    return nref_mem.exists(a) ? nref_mem[a] : 8'h00;
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
        if (strb[i][b]) nref_mem[a + 4 * i + b] = data[i][8*b +: 8];
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
          if (r_q.data[8*lane +: 8] !== nref_byte(ba + b)) begin
            failures++;
            $display("FAIL read %h byte %0d: got %h want %h", ba, b,
                     r_q.data[8*lane +: 8], nref_byte(ba + b));
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


  // ---------------- fast-store path ----------------
  function automatic logic [31:0] enc_s(input logic [2:0] f3, input logic [11:0] imm);
    return {imm[11:5], 5'd2, 5'd1, f3, imm[4:0], 7'b0100011};   // rs2 = x2, rs1 = x1
  endfunction
  function automatic logic [31:0] enc_l(input logic [2:0] f3, input logic [4:0] rd,
                                        input logic [11:0] imm);
    return {imm, 5'd1, f3, rd, 7'b0000011};
  endfunction

  // mechanism counters
  int n_hit = 0, n_miss = 0, n_wb_fast = 0, n_wb_slow = 0, n_mis = 0, n_flush = 0;
  int n_fs [4] = '{0, 0, 0, 0};
  int max_ticks = 0;
  int n_fast_wait = 0;   // cycles the fast path held a write back
  always @(posedge clk) if (rst_n) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
    if (ev_wb_fast) n_wb_fast++;
    if (ev_wb_slow) n_wb_slow++;
    if (flush_done) n_flush++;
    if (int'(slow_clk_ticks) > max_ticks) max_ticks = int'(slow_clk_ticks);
    if (fast_clk_ticks != 0) n_fast_wait++;
    if (instr_valid && instr_ready) begin
      if (instr_vec[I_SBF]) n_fs[0]++;
      if (instr_vec[I_SHF]) n_fs[1]++;
      if (instr_vec[I_SWF]) n_fs[2]++;
      if (instr_vec[I_SDF]) n_fs[3]++;
    end
  end

  logic [7:0] cref [int];
  function automatic logic [7:0] crb(input longint a);
    return cref.exists(int'(a)) ? cref[int'(a)] : 8'h00;
  endfunction

  // Execute one memory instruction; returns the load result.
  task automatic exec(input logic [31:0] ins, input logic [XLEN-1:0] r1,
                      input logic [XLEN-1:0] r2, output logic [XLEN-1:0] q);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr = ins; rs1_val = r1; rs2_val = r2; instr_valid = 1'b1;
    #1;
    if (misaligned) begin
      n_mis++;
      @(negedge clk);
      instr_valid = 1'b0;
      q = '0;
      return;
    end
    @(negedge clk);
    instr_valid = 1'b0;
    while (!(ld_valid || st_done)) @(negedge clk);
    q = ld_data;
  endtask

  task automatic store(input int f3, input longint a, input logic [XLEN-1:0] v);
    logic [XLEN-1:0] q;
    int bytes;
    bytes = 1 << (f3 % 4);
    exec(enc_s(3'(f3), 12'h0), XLEN'(a), v, q);
    if (a % bytes == 0)
      for (int b = 0; b < bytes; b++) cref[int'(a) + b] = v[8*b +: 8];
  endtask

  task automatic load_check(input int f3, input longint a);
    logic [XLEN-1:0] q, want;
    int bytes;
    bytes = 1 << (f3 % 4);
    exec(enc_l(3'(f3), 5'd7, 12'h0), XLEN'(a), '0, q);
    want = '0;
    for (int b = 0; b < bytes; b++) want[8*b +: 8] = crb(a + b);
    if (f3 < 4 && bytes < 8) for (int b = 8 * bytes; b < 64; b++) want[b] = want[8 * bytes - 1];
    checks++;
    if (q !== want) begin
      failures++; $display("FAIL load f3=%0d at %h: got %h want %h", f3, a, q, want);
    end
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d [];
    logic [3:0]  s [];
    logic [XLEN-1:0] q;
    rst_n = 1'b0;
    instr_valid = 1'b0; instr = '0; rs1_val = '0; rs2_val = '0; flush_req = 1'b0;
    s_awvalid = 0; s_wvalid = 0; s_bready = 0; s_arvalid = 0; s_rvalid = 0; s_rready = 0;
    s_aw = '0; s_w = '0; s_ar = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. fast double-word stream over 256 lines (8 KB, twice the cache)
    for (int i = 0; i < 1024; i++) store(7, 64'h4000 + 8 * i, {$urandom, $urandom});
    // 2. ordinary double-word stream over another 8 KB
    for (int i = 0; i < 1024; i++) store(3, 64'h8000 + 8 * i, {$urandom, $urandom});
    // 3. lines mixing fast and slow stores, and narrow fast stores, over a
    //    region first cleared with ordinary stores
    for (int i = 0; i < 1024; i++) store(3, 64'hC000 + 8 * i, 64'h0);
    for (int i = 0; i < 512; i++) begin
      int f3;
      f3 = $urandom_range(0, 7);
      store(f3, 64'hC000 + ((1 << (f3 % 4)) * $urandom_range(0, 2047 >> (f3 % 4))),
            {$urandom, $urandom});
    end
    // misaligned accesses
    store(7, 64'hC003, 64'h1);
    store(5, 64'hC001, 64'h1);
    // 4. loads of every kind over all three regions
    for (int i = 0; i < 1500; i++) begin
      int f3;
      longint a;
      f3 = $urandom_range(0, 6);
      a  = 64'h4000 + 64'h4000 * $urandom_range(0, 2) + 8 * $urandom_range(0, 1023);
      a  = a + (1 << (f3 % 4)) * $urandom_range(0, (8 >> (f3 % 4)) - 1);
      load_check(f3, a);
    end
    // 5. flush and compare the SRAM with the reference
    @(negedge clk);
    flush_req = 1'b1;
    @(negedge clk);
    flush_req = 1'b0;
    while (!flush_done) @(negedge clk);
    // evict every (now clean) line by loading another 4 KB region, then read
    // all three regions back: the data now comes from the SRAM
    for (int i = 0; i < 128; i++) exec(enc_l(3'd3, 5'd7, 12'h0), XLEN'(64'h1_0000 + 32 * i), '0, q);
    for (int r = 1; r <= 3; r++)
      for (int w = 0; w < 1024; w++) load_check(3, 64'h4000 * r + 8 * w);

    // ---------------- NVM controller ----------------
    d = new[1]; s = new[1];
    d[0] = 32'hCAFE_F00D; s[0] = 4'hF;
    axi_write(32'h40, 1, d, s, 1'b1);
    d[0] = 32'h0000_1234; s[0] = 4'b0011;
    axi_write(32'h44, 1, d, s, 1'b0);
    d[0] = 32'h5678_0000; s[0] = 4'b1100;
    axi_write(32'h48, 1, d, s, 1'b1);
    axi_read(32'h40, 3, 2);
    axi_read(32'h42, 1, 1);
    for (int t = 0; t < 12; t++) begin
      int n, a;
      n = $urandom_range(1, 6);
      a = ($urandom_range(0, 2) << (AW + 1)) + 4 * $urandom_range(0, 255);
      d = new[n]; s = new[n];
      for (int i = 0; i < n; i++) begin
        d[i] = $urandom;
        s[i] = (i % 2 == 0) ? 4'hF : 4'($urandom_range(0, 15));
      end
      axi_write(a, n, d, s, ($urandom_range(0, 1) == 1));
      axi_read(a, n, 2);
      axi_read(a, 2 * n, 1);
    end

    // ---------------- mechanisms ----------------
    checks++; if (n_hit == 0)     begin failures++; $display("FAIL no cache hit"); end
    checks++; if (n_miss == 0)    begin failures++; $display("FAIL no cache miss"); end
    checks++; if (n_wb_fast == 0) begin failures++; $display("FAIL no fast write-back"); end
    checks++; if (n_wb_slow == 0) begin failures++; $display("FAIL no slow write-back"); end
    checks++; if (max_ticks != 5) begin failures++; $display("FAIL slow write delay %0d", max_ticks); end
    checks++; if (n_fast_wait != 0) begin failures++; $display("FAIL fast path held writes for %0d cycles", n_fast_wait); end
    checks++; if (n_mis == 0)     begin failures++; $display("FAIL no misaligned access"); end
    checks++; if (n_flush != 1)   begin failures++; $display("FAIL flush count %0d", n_flush); end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_fs[i] == 0) begin failures++; $display("FAIL fast store kind %0d unused", i); end
    end
    for (int i = 0; i < 9; i++) begin
      checks++;
      if (state_seen[i] == 0) begin
        failures++; $display("FAIL controller state %s never used", axi_state_e'(i));
      end
    end
    $display("hits %0d misses %0d fast wb %0d slow wb %0d misaligned %0d sbf/shf/swf/sdf %0d/%0d/%0d/%0d",
             n_hit, n_miss, n_wb_fast, n_wb_slow, n_mis, n_fs[0], n_fs[1], n_fs[2], n_fs[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
