// tb_fs_dcache: self-checking test of the write-back cache with fast-store
// flags.
//
// A small cache (8 lines) sees random loads, stores and fast stores over 64
// lines' worth of addresses, so that lines are filled, hit, evicted dirty and
// clean. A memory model behind it answers with random ready stalls. The test
// checks: every load against a byte-level reference; that each write-back is
// a burst of four beats at incrementing addresses of one line; that the
// write-back address MSB is 1 exactly when all four double words of the line
// were last written by fast stores (flags worked out here, independently of
// the cache); that line fills use MSB 0; that a hit answers two cycles after
// the request is taken; and after a final flush, that memory holds exactly
// the reference contents. Fast and slow write-backs, hits and misses must all
// have happened.
module tb_fs_dcache;
  import rv_fs_pkg::*;

  localparam int unsigned LINES = 8;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            cpu_req_valid, cpu_req_ready, cpu_resp_valid;
  mem_req_t        cpu_req;
  logic [XLEN-1:0] cpu_resp_rdata;
  logic            flush_req, flush_done;
  logic            m_req_valid, m_req_ready, m_resp_valid;
  mbus_req_t       m_req;
  logic [XLEN-1:0] m_resp_rdata;
  logic            ev_hit, ev_miss, ev_wb_fast, ev_wb_slow;

  fs_dcache #(.LINES(LINES)) dut (
    .clk, .rst_n, .cpu_req_valid, .cpu_req_ready, .cpu_req, .cpu_resp_valid,
    .cpu_resp_rdata, .flush_req, .flush_done,
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata,
    .ev_hit, .ev_miss, .ev_wb_fast, .ev_wb_slow
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- memory model ----------------
  logic [XLEN-1:0] mem [int];          // by 64-bit word index, MSB stripped
  logic [3:0]      ref_fast [int];     // per line: last store to each DW was fast
  int wb_beat = 0, fill_beat = 0;
  logic [PADDR_W-1:0] burst_base;
  int n_wb_fast = 0, n_wb_slow = 0, n_hit = 0, n_miss = 0;

  always @(posedge clk) begin
    m_resp_valid <= 1'b0;
    if (!rst_n) begin
      m_req_ready <= 1'b0;
    end else begin
      m_req_ready <= ($urandom_range(0, 3) != 0);
      if (m_req_valid && m_req_ready) begin
        int w;
        int line;
        w    = int'(m_req.addr[PADDR_W-2:3]);
        line = w / 4;
        m_resp_valid <= 1'b1;
        if (m_req.write) begin
          if (wb_beat == 0) begin
            logic [3:0] fl;
            burst_base = m_req.addr;
            fl = ref_fast.exists(line) ? ref_fast[line] : 4'h0;
            check("write-back starts at DW 0", m_req.addr[4:3] == 2'd0);
            check("write-back MSB = all four DWs fast", m_req.addr[PADDR_W-1] == (&fl));
            if (m_req.addr[PADDR_W-1]) n_wb_fast++; else n_wb_slow++;
            ref_fast[line] = 4'h0;
          end else begin
            check("write-back beats increment",
                  m_req.addr == burst_base + PADDR_W'(8 * wb_beat));
          end
          check("write-back strobes", m_req.wstrb == 8'hFF);
          mem[w] = m_req.wdata;
          wb_beat = (wb_beat + 1) % 4;
        end else begin
          check("fill uses the slow address", !m_req.addr[PADDR_W-1]);
          check("fill beats increment", int'(m_req.addr[4:3]) == fill_beat);
          m_resp_rdata <= mem.exists(w) ? mem[w] : 64'h0;
          fill_beat = (fill_beat + 1) % 4;
        end
      end
    end
  end

  always @(posedge clk) begin
    if (ev_hit) n_hit++;
    if (ev_miss) n_miss++;
  end

  // ---------------- reference ----------------
  logic [7:0] ref_mem [int];
  function automatic logic [7:0] rb(input int a);
    return ref_mem.exists(a) ? ref_mem[a] : 8'h00;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  task automatic access(input logic st, input logic fast, input int a,
                        input logic [XLEN-1:0] wd, input logic [7:0] strb,
                        output logic [XLEN-1:0] rd, output int lat);
    int t0;
    @(negedge clk);
    while (!cpu_req_ready) @(negedge clk);
    cpu_req_valid  = 1'b1;
    cpu_req        = '0;
    cpu_req.addr   = PADDR_W'(a);
    cpu_req.store  = st;
    cpu_req.fast   = fast;
    cpu_req.wdata  = wd;
    cpu_req.wstrb  = strb;
    cpu_req.size   = SZ_D;
    t0 = cyc;
    @(negedge clk);
    cpu_req_valid = 1'b0;
    while (!cpu_resp_valid) @(negedge clk);
    lat = cyc - t0;
    rd  = cpu_resp_rdata;
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [XLEN-1:0] rd;
    int lat;
    int hit_lat_ok = 0;
    rst_n = 1'b0;
    cpu_req_valid = 1'b0;
    cpu_req = '0;
    flush_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 3000; it++) begin
      int line, dw, a;
      logic st, fast;
      logic [XLEN-1:0] wd;
      logic [7:0] strb;
      int m0;
      line = $urandom_range(0, 63);
      // a run of fast stores that fills whole lines, for fast write-backs
      if (it % 50 < 8) line = 100 + (it / 50) * 2 + (it % 50) / 4;
      dw   = $urandom_range(0, 3);
      if (it % 50 < 8) dw = (it % 50) % 4;
      a    = line * 32 + dw * 8;
      st   = ($urandom_range(0, 2) != 0) || (it % 50 < 8);
      fast = st && (($urandom_range(0, 1) == 1) || (it % 50 < 8));
      wd   = {$urandom, $urandom};
      strb = 8'($urandom_range(1, 255));
      m0   = n_miss;
      access(st, fast, a, wd, strb, rd, lat);
      if (n_miss == m0) begin
        checks++;
        if (lat == 2) hit_lat_ok++;
        else begin failures++; $display("FAIL hit latency %0d", lat); end
      end
      if (st) begin
        logic [3:0] fl;
        for (int b = 0; b < 8; b++) if (strb[b]) ref_mem[a + b] = wd[8*b +: 8];
        fl = ref_fast.exists(line) ? ref_fast[line] : 4'h0;
        fl[dw] = fast;
        ref_fast[line] = fl;
      end else begin
        logic [XLEN-1:0] want;
        for (int b = 0; b < 8; b++) want[8*b +: 8] = rb(a + b);
        check("load data", rd == want);
      end
    end

    // flush and compare memory with the reference
    @(negedge clk);
    flush_req = 1'b1;
    @(negedge clk);
    flush_req = 1'b0;
    while (!flush_done) @(negedge clk);
    repeat (2) @(negedge clk);
    for (int line = 0; line < 120; line++)
      for (int w = 0; w < 4; w++) begin
        logic [XLEN-1:0] want, got;
        for (int b = 0; b < 8; b++) want[8*b +: 8] = rb(line * 32 + w * 8 + b);
        got = mem.exists(line * 4 + w) ? mem[line * 4 + w] : 64'h0;
        check("memory after flush", got == want);
      end

    check("fast write-backs happened", n_wb_fast > 0);
    check("slow write-backs happened", n_wb_slow > 0);
    check("hits happened", n_hit > 0 && hit_lat_ok > 0);
    check("misses happened", n_miss > 0);
    $display("hits %0d misses %0d fast wb %0d slow wb %0d", n_hit, n_miss, n_wb_fast, n_wb_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
