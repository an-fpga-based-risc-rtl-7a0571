// mlc_router: the bus split between the slow and the fast write paths.
//
// Requests from the cache arrive on one mbus port and go to one of two
// peripherals by the physical address MSB: MSB = 0 to the slow-write
// peripheral, MSB = 1 to the fast-write peripheral. The cache sets the MSB
// when every double word of a line it writes back was stored with a fast
// store, so the two address ranges select the two write modes. This follows
// the extension; the request/response bus itself is this design's own.
//
// Responses come back in order. To keep them in order across the two
// targets, a request to the other target waits until every response of the
// current one has returned (a count of outstanding requests). Purely
// combinational apart from that count.
module mlc_router
  import rv_fs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  // from the cache
  input  logic            s_req_valid,
  output logic            s_req_ready,
  input  mbus_req_t       s_req,
  output logic            s_resp_valid,
  output logic [XLEN-1:0] s_resp_rdata,
  // to the slow peripheral (index 0) and the fast peripheral (index 1)
  output logic            m_req_valid [2],
  input  logic            m_req_ready [2],
  output mbus_req_t       m_req       [2],
  input  logic            m_resp_valid[2],
  input  logic [XLEN-1:0] m_resp_rdata[2]
);

  logic       sel;            // target of the request on the port
  logic       sel_q;          // target of the outstanding requests
  logic [3:0] out_q;          // outstanding requests
  logic       block;

  assign sel   = s_req.addr[PADDR_W-1];
  assign block = (out_q != 0) && (sel != sel_q);

  always_comb begin
    for (int i = 0; i < 2; i++) begin
      m_req[i]       = s_req;
      m_req_valid[i] = s_req_valid && !block && (sel == 1'(i));
    end
    s_req_ready  = !block && m_req_ready[sel];
    s_resp_valid = m_resp_valid[0] || m_resp_valid[1];
    s_resp_rdata = m_resp_valid[1] ? m_resp_rdata[1] : m_resp_rdata[0];
  end

  logic issue;
  assign issue = s_req_valid && s_req_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_q <= 1'b0;
      out_q <= '0;
    end else begin
      if (issue) sel_q <= sel;
      out_q <= out_q + 4'(issue) - 4'(s_resp_valid);
    end
  end

  a_one_resp: assert property (@(posedge clk) disable iff (!rst_n)
                               !(m_resp_valid[0] && m_resp_valid[1]));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  out_q != 4'hf);

endmodule
