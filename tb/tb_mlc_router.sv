// tb_mlc_router: self-checking test of the slow/fast address split. Random
// reads and writes with a random address MSB go through the router to two
// targets with different response delays (slow: 2..4 cycles, fast: 1 cycle)
// and random ready stalls. The test checks that a request reaches the slow
// target exactly when its MSB is 0 and the fast one when it is 1, unchanged,
// that responses return to the requester in request order with the right
// data, and that requests for the other target arrived while answers were due.
module tb_mlc_router;
  import rv_fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            s_req_valid, s_req_ready, s_resp_valid;
  mbus_req_t       s_req;
  logic [XLEN-1:0] s_resp_rdata;
  logic            m_req_valid [2], m_req_ready [2], m_resp_valid [2];
  mbus_req_t       m_req [2];
  logic [XLEN-1:0] m_resp_rdata [2];

  mlc_router dut (.clk, .rst_n, .s_req_valid, .s_req_ready, .s_req,
                  .s_resp_valid, .s_resp_rdata, .m_req_valid, .m_req_ready,
                  .m_req, .m_resp_valid, .m_resp_rdata);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  // two targets, each answering in order
  for (genvar t = 0; t < 2; t++) begin : g_tgt
    logic [XLEN-1:0] qd [$];
    int              qt [$];
    always @(posedge clk) begin
      m_resp_valid[t] <= 1'b0;
      if (!rst_n) m_req_ready[t] <= 1'b0;
      else begin
        m_req_ready[t] <= ($urandom_range(0, 3) != 0);
        if (m_req_valid[t] && m_req_ready[t]) begin
          checks++;
          if (m_req[t].addr[PADDR_W-1] !== 1'(t)) begin
            failures++; $display("FAIL request with MSB %0d at target %0d", m_req[t].addr[PADDR_W-1], t);
          end
          qd.push_back(m_req[t].wdata + 64'(t));
          qt.push_back(cyc + ((t == 0) ? $urandom_range(2, 4) : 1));
        end
        if (qt.size() > 0 && qt[0] <= cyc) begin
          m_resp_valid[t] <= 1'b1;
          m_resp_rdata[t] <= qd.pop_front();
          void'(qt.pop_front());
        end
      end
    end
  end

  logic [XLEN-1:0] exp_q [$];
  int sent = 0, got = 0, switches = 0;
  logic last_msb = 1'b0;

  always @(posedge clk) begin
    if (!rst_n) s_req_valid <= 1'b0;
    else begin
      if (s_req_valid && s_req_ready) begin
        exp_q.push_back(s_req.wdata + 64'(s_req.addr[PADDR_W-1]));
        last_msb = s_req.addr[PADDR_W-1];
        sent++;
        s_req_valid <= 1'b0;
      end
      if ((!s_req_valid || s_req_ready) && sent < 1000 && exp_q.size() < 6 &&
          $urandom_range(0, 3) != 0) begin
        s_req_valid <= 1'b1;
        s_req.write <= 1'($urandom);
        s_req.addr  <= {1'($urandom_range(0, 1)), 47'($urandom)};
        s_req.wdata <= {$urandom, $urandom};
        s_req.wstrb <= 8'hFF;
      end
    end
    // a request for the other target while answers are still due
    if (s_req_valid && exp_q.size() > 0 && s_req.addr[PADDR_W-1] != last_msb) switches++;
    if (rst_n && s_resp_valid) begin
      logic [XLEN-1:0] e;
      checks++;
      e = (exp_q.size() > 0) ? exp_q.pop_front() : '0;
      if (s_resp_rdata !== e) begin
        failures++; $display("FAIL response %h want %h at %0t", s_resp_rdata, e, $time);
      end
      got++;
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(sent == 1000 && got == 1000)) @(posedge clk);
    checks++;
    if (switches == 0) begin failures++; $display("FAIL no target switch with requests outstanding"); end
    $display("switches %0d", switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
