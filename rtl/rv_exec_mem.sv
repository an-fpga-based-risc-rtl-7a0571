// rv_exec_mem: execute-stage address generation for loads and stores and the
// execute-to-cache register that carries the fast-store flag.
//
// A decoded memory instruction (from rv_store_decode) and its register
// operands come in; the effective address rs1 + sign-extended offset is
// computed, the store data is moved to its byte lanes of the 64-bit word with
// the matching byte strobes, and the result is registered as a mem_req_t
// package. As in the extension, the fast-store flag travels in that package
// from execute to the cache stage, next to the store flag and the size.
// For a load, the double word returned by the cache is shifted down, cut to
// the access size and sign- or zero-extended.
//
// Interface: in_valid/in_ready take one instruction; req_valid/req_ready hand
// the package to the cache; resp_valid returns the cache's answer (data for a
// load, an acknowledge for a store); ld_valid/ld_data/ld_rd give the load
// result in the cycle after resp_valid. One access is in flight at a time
// (this design's simplification of a pipelined core). Accesses are assumed
// naturally aligned; a misaligned one is flagged on misaligned and dropped.
module rv_exec_mem
  import rv_fs_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  output logic            in_ready,
  input  mem_dec_t        dec,
  input  logic [XLEN-1:0] rs1_val,
  input  logic [XLEN-1:0] rs2_val,
  output logic            misaligned,
  output logic            req_valid,
  input  logic            req_ready,
  output mem_req_t        req,
  input  logic            resp_valid,
  input  logic [XLEN-1:0] resp_rdata,
  output logic            ld_valid,
  output logic [XLEN-1:0] ld_data,
  output logic [4:0]      ld_rd,
  output logic            st_done
);

  logic               busy_q;     // a request is with the cache
  logic [4:0]         rd_q;
  logic [XLEN-1:0]    ea;
  logic [2:0]         ofs;
  logic               mis;

  assign ea  = rs1_val + {{(XLEN-12){dec.imm[11]}}, dec.imm};
  assign ofs = ea[2:0];

  always_comb begin
    unique case (dec.size)
      SZ_B: mis = 1'b0;
      SZ_H: mis = ofs[0];
      SZ_W: mis = |ofs[1:0];
      default: mis = |ofs;
    endcase
  end

  assign in_ready   = !busy_q;
  assign misaligned = in_valid && dec.mem && mis;

  function automatic logic [XLEN/8-1:0] strobes(input mem_size_e sz, input logic [2:0] o);
    logic [XLEN/8-1:0] m;
    unique case (sz)
      SZ_B: m = 8'h01;
      SZ_H: m = 8'h03;
      SZ_W: m = 8'h0f;
      default: m = 8'hff;
    endcase
    return m << o;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      req_valid <= 1'b0;
      req       <= '0;
      rd_q      <= '0;
    end else begin
      if (in_valid && in_ready && dec.mem && !mis) begin
        busy_q     <= 1'b1;
        req_valid  <= 1'b1;
        req.addr   <= ea[PADDR_W-1:0];
        req.wdata  <= rs2_val << {ofs, 3'b000};
        req.wstrb  <= dec.store ? strobes(dec.size, ofs) : '0;
        req.size   <= dec.size;
        req.store  <= dec.store;
        req.fast   <= dec.fast;
        req.unsign <= dec.unsign;
        rd_q       <= dec.rd;
      end
      if (req_valid && req_ready) req_valid <= 1'b0;
      if (resp_valid) busy_q <= 1'b0;
    end
  end

  // Load result: align, cut and extend.
  logic [XLEN-1:0] sh;
  assign sh = resp_rdata >> {req.addr[2:0], 3'b000};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ld_valid <= 1'b0;
      st_done  <= 1'b0;
      ld_data  <= '0;
      ld_rd    <= '0;
    end else begin
      ld_valid <= resp_valid && !req.store;
      st_done  <= resp_valid && req.store;
      ld_rd    <= rd_q;
      unique case (req.size)
        SZ_B: ld_data <= req.unsign ? {56'd0, sh[7:0]}  : {{56{sh[7]}},  sh[7:0]};
        SZ_H: ld_data <= req.unsign ? {48'd0, sh[15:0]} : {{48{sh[15]}}, sh[15:0]};
        SZ_W: ld_data <= req.unsign ? {32'd0, sh[31:0]} : {{32{sh[31]}}, sh[31:0]};
        default: ld_data <= sh;
      endcase
    end
  end

  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               req_valid && !req_ready |=> req_valid && $stable(req));

endmodule
