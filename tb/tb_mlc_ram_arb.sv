// tb_mlc_ram_arb: self-checking test of the RAM arbiter. Two requesters issue
// random reads and writes (each up to two outstanding) at the same time; the
// memory behind the arbiter stalls at random and answers in order after one
// to three cycles with data derived from the address and a requester tag
// carried in the write data. The test checks that every response reaches
// the requester that asked for it, with its own data, that no response is
// lost, and that both requesters were served while the other was waiting.
module tb_mlc_ram_arb;
  import rv_fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            s_req_valid [2], s_req_ready [2], s_resp_valid [2];
  mbus_req_t       s_req [2];
  logic [XLEN-1:0] s_resp_rdata [2];
  logic            m_req_valid, m_req_ready, m_resp_valid;
  mbus_req_t       m_req;
  logic [XLEN-1:0] m_resp_rdata;

  mlc_ram_arb dut (.clk, .rst_n, .s_req_valid, .s_req_ready, .s_req,
                   .s_resp_valid, .s_resp_rdata, .m_req_valid, .m_req_ready,
                   .m_req, .m_resp_valid, .m_resp_rdata);

  int checks = 0, failures = 0;

  // memory: in-order queue of answers, each after 1..3 cycles
  logic [XLEN-1:0] q_data [$];
  int              q_due  [$];
  int cyc = 0;
  always @(posedge clk) begin
    cyc++;
    m_resp_valid <= 1'b0;
    if (!rst_n) m_req_ready <= 1'b0;
    else begin
      m_req_ready <= ($urandom_range(0, 2) != 0);
      if (m_req_valid && m_req_ready) begin
        q_data.push_back(m_req.wdata ^ XLEN'(m_req.addr));
        q_due.push_back(cyc + $urandom_range(1, 3));
      end
      if (q_due.size() > 0 && q_due[0] <= cyc) begin
        m_resp_valid <= 1'b1;
        m_resp_rdata <= q_data.pop_front();
        void'(q_due.pop_front());
      end
    end
  end

  // requesters: expected answers in order
  logic [XLEN-1:0] exp_q [2][$];
  int sent [2], got [2];
  int both_waiting = 0;

  for (genvar i = 0; i < 2; i++) begin : g_req
    always @(posedge clk) begin
      if (!rst_n) begin
        s_req_valid[i] <= 1'b0;
        sent[i] <= 0;
      end else begin
        if (s_req_valid[i] && s_req_ready[i]) begin
          exp_q[i].push_back(s_req[i].wdata ^ XLEN'(s_req[i].addr));
          sent[i] <= sent[i] + 1;
          s_req_valid[i] <= 1'b0;
        end
        if ((!s_req_valid[i] || s_req_ready[i]) && exp_q[i].size() < 2 &&
            sent[i] < 400 && $urandom_range(0, 1) == 1) begin
          s_req_valid[i]      <= 1'b1;
          s_req[i].write      <= 1'($urandom);
          s_req[i].addr       <= PADDR_W'($urandom);
          s_req[i].wdata      <= {32'(i), $urandom};
          s_req[i].wstrb      <= 8'hFF;
        end
      end
      if (s_resp_valid[i]) begin
        checks++;
        if (exp_q[i].size() == 0) begin
          failures++; $display("FAIL requester %0d: unexpected response", i);
        end else if (s_resp_rdata[i] !== exp_q[i].pop_front()) begin
          failures++; $display("FAIL requester %0d: wrong response", i);
        end
        got[i]++;
      end
    end
  end

  always @(posedge clk)
    if (s_req_valid[0] && s_req_valid[1]) both_waiting++;

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    got[0] = 0; got[1] = 0;
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (!(sent[0] == 400 && sent[1] == 400 && got[0] == 400 && got[1] == 400))
      @(posedge clk);
    checks++;
    if (both_waiting == 0) begin failures++; $display("FAIL no contention seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
