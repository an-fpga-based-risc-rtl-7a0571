// mlc_ram_arb: lets the slow and the fast write-mode peripherals share the
// one RAM of the emulation platform.
//
// Fixed priority, slow peripheral (index 0) first. While responses are
// outstanding only their owner may issue, so each response goes back to the
// peripheral that asked for it. This arbiter is this design's own; the
// platform only shows both peripherals reaching the same RAM.
module mlc_ram_arb
  import rv_fs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_req_valid [2],
  output logic            s_req_ready [2],
  input  mbus_req_t       s_req       [2],
  output logic            s_resp_valid[2],
  output logic [XLEN-1:0] s_resp_rdata[2],
  output logic            m_req_valid,
  input  logic            m_req_ready,
  output mbus_req_t       m_req,
  input  logic            m_resp_valid,
  input  logic [XLEN-1:0] m_resp_rdata
);

  logic       owner_q;
  logic [3:0] out_q;
  logic       gnt;

  always_comb begin
    if (out_q != 0) gnt = owner_q;
    else            gnt = !s_req_valid[0];
    m_req_valid = s_req_valid[gnt];
    m_req       = s_req[gnt];
    for (int i = 0; i < 2; i++) begin
      s_req_ready[i]  = m_req_ready && (gnt == 1'(i));
      s_resp_valid[i] = m_resp_valid && (owner_q == 1'(i));
      s_resp_rdata[i] = m_resp_rdata;
    end
  end

  logic issue;
  assign issue = m_req_valid && m_req_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      owner_q <= 1'b0;
      out_q   <= '0;
    end else begin
      if (issue) owner_q <= gnt;
      out_q <= out_q + 4'(issue) - 4'(m_resp_valid);
    end
  end

  a_resp_owned: assert property (@(posedge clk) disable iff (!rst_n)
                                 m_resp_valid |-> out_q != 0);

endmodule
