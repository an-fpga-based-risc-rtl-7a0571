// tb_mlc_delay_periph: self-checking test of the write-mode peripherals.
//
// A slow peripheral (WRITE_DELAY = 5) and a fast one (WRITE_DELAY = 0) each
// get a stream of back-to-back writes and then of reads, in front of an
// always-ready memory that answers in the next cycle. The test checks that
// slow writes are taken every 6 cycles and fast writes every cycle, that
// clk_ticks counts 0..5 between slow writes, that reads are never held back,
// that the address MSB is cleared toward the memory while the rest of the
// request passes unchanged, and that responses come back to the requester.
module tb_mlc_delay_periph;
  import rv_fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  localparam int unsigned D [2] = '{5, 0};

  logic            s_req_valid [2], s_req_ready [2], s_resp_valid [2];
  mbus_req_t       s_req [2], m_req [2];
  logic [XLEN-1:0] s_resp_rdata [2], m_resp_rdata [2];
  logic            m_req_valid [2], m_resp_valid [2];
  logic [31:0]     clk_ticks [2];

  for (genvar i = 0; i < 2; i++) begin : g
    mlc_delay_periph #(.WRITE_DELAY(D[i])) dut (
      .clk, .rst_n,
      .s_req_valid(s_req_valid[i]), .s_req_ready(s_req_ready[i]), .s_req(s_req[i]),
      .s_resp_valid(s_resp_valid[i]), .s_resp_rdata(s_resp_rdata[i]),
      .m_req_valid(m_req_valid[i]), .m_req_ready(1'b1), .m_req(m_req[i]),
      .m_resp_valid(m_resp_valid[i]), .m_resp_rdata(m_resp_rdata[i]),
      .clk_ticks(clk_ticks[i])
    );
    // memory: answers every request in the next cycle with its address
    always @(posedge clk) begin
      m_resp_valid[i] <= rst_n && m_req_valid[i];
      m_resp_rdata[i] <= XLEN'(m_req[i].addr) ^ 64'hA5A5;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  // accepted requests, seen at the rising edge
  int acc_t [2][$];
  logic [31:0] max_ticks [2];
  always @(posedge clk) begin
    for (int i = 0; i < 2; i++) begin
      if (s_req_valid[i] && s_req_ready[i]) begin
        acc_t[i].push_back(cyc);
        if (m_req[i].addr[PADDR_W-1] !== 1'b0) begin failures++; $display("FAIL MSB not cleared"); end
        if (m_req[i].addr[PADDR_W-2:0] !== s_req[i].addr[PADDR_W-2:0] ||
            m_req[i].wdata !== s_req[i].wdata || m_req[i].write !== s_req[i].write) begin
          failures++; $display("FAIL request altered");
        end
        checks++;
      end
      if (clk_ticks[i] > max_ticks[i]) max_ticks[i] = clk_ticks[i];
    end
  end

  int resp_cnt [2];
  always @(posedge clk) for (int i = 0; i < 2; i++) if (s_resp_valid[i]) resp_cnt[i]++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic stream(input int i, input logic wr, input int n);
    int sent = 0;
    @(negedge clk);
    while (sent < n) begin
      s_req_valid[i]         = 1'b1;
      s_req[i].write         = wr;
      s_req[i].addr          = PADDR_W'(sent * 8);
      s_req[i].addr[PADDR_W-1] = 1'b1;
      s_req[i].wdata         = 64'(sent);
      s_req[i].wstrb         = 8'hFF;
      #1;
      if (s_req_ready[i]) sent++;
      @(negedge clk);
    end
    s_req_valid[i] = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < 2; i++) begin
      s_req_valid[i] = 1'b0;
      s_req[i] = '0;
      max_ticks[i] = 0;
      resp_cnt[i] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int i = 0; i < 2; i++) begin
      acc_t[i].delete();
      stream(i, 1'b1, 20);
      for (int k = 1; k < acc_t[i].size(); k++)
        check($sformatf("periph %0d write spacing %0d", i, acc_t[i][k] - acc_t[i][k-1]),
              acc_t[i][k] - acc_t[i][k-1] == D[i] + 1);
      acc_t[i].delete();
      stream(i, 1'b0, 20);
      for (int k = 1; k < acc_t[i].size(); k++)
        check("reads not delayed", acc_t[i][k] - acc_t[i][k-1] == 1);
      repeat (2) @(negedge clk);
      check("all answered", resp_cnt[i] == 40);
    end
    check("slow clk_ticks reached 5", max_ticks[0] == 5);
    check("fast clk_ticks stayed 0", max_ticks[1] == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
