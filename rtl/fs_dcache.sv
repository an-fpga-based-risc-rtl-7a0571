// fs_dcache: write-back data cache with per-double-word fast-store flags.
//
// Each line holds four double words (32 bytes) and carries the usual valid
// and dirty flags plus four fast-store flags, one per double word. A store
// sets the flag of the double word it writes when it is a fast store and
// clears it when it is an ordinary store. When a dirty line is written back
// (on eviction or flush) its four double words go out as an incrementing
// burst of four 64-bit beats. If all four fast flags are set the burst goes
// to the fast write path by setting the physical address MSB to 1; otherwise
// the address is left unchanged and the line takes the slow write path. This
// behaviour, the line size and the burst strategy follow the extension.
//
// This design's own choices: the cache is direct mapped with LINES lines; it
// allocates on a write miss; the fast flags of a freshly filled line are
// clear (the data read from memory was not written by a fast store); a
// line fill reads through the slow (MSB = 0) address; the coherence "shared"
// flag of a multi-core cache is not kept, as there is one core.
//
// Interface: cpu_req_valid/cpu_req_ready take one mem_req_t; cpu_resp_valid
// returns the addressed double word (loads) or acknowledges the store.
// flush_req starts a write-back of every dirty line; flush_done pulses at its
// end. The memory side is the mbus request/response bus of rv_fs_pkg.
// Timing: a hit answers two cycles after the request is taken (IDLE, LOOKUP).
// A miss adds the write-back of a dirty victim (4 beats) and a fill (4 beats).
// ev_* are one-cycle event strobes for counting.
module fs_dcache
  import rv_fs_pkg::*;
#(
  parameter int unsigned LINES = 128
) (
  input  logic            clk,
  input  logic            rst_n,
  // core side
  input  logic            cpu_req_valid,
  output logic            cpu_req_ready,
  input  mem_req_t        cpu_req,
  output logic            cpu_resp_valid,
  output logic [XLEN-1:0] cpu_resp_rdata,
  input  logic            flush_req,
  output logic            flush_done,
  // memory side
  output logic            m_req_valid,
  input  logic            m_req_ready,
  output mbus_req_t       m_req,
  input  logic            m_resp_valid,
  input  logic [XLEN-1:0] m_resp_rdata,
  // events
  output logic            ev_hit,
  output logic            ev_miss,
  output logic            ev_wb_fast,
  output logic            ev_wb_slow
);

  localparam int unsigned WORDS = 4;                    // double words per line
  localparam int unsigned OFF_W = $clog2(WORDS * XLEN / 8);
  localparam int unsigned IDX_W = $clog2(LINES);
  localparam int unsigned TAG_W = PADDR_W - 1 - OFF_W - IDX_W;

  typedef enum logic [2:0] {
    C_IDLE, C_LOOKUP, C_WB, C_FILL, C_FLUSH, C_FLUSH_END
  } cstate_e;

  cstate_e state_q;

  logic [XLEN-1:0]  data_q  [LINES][WORDS];
  logic [TAG_W-1:0] tag_q   [LINES];
  logic             valid_q [LINES];
  logic             dirty_q [LINES];
  logic [WORDS-1:0] fast_q  [LINES];

  mem_req_t         req_q;
  logic [IDX_W-1:0] wb_idx_q;     // line being written back
  logic             wb_flush_q;   // write-back belongs to a flush
  logic [2:0]       iss_q;        // beats issued
  logic [1:0]       rsp_q;        // beats answered
  logic [IDX_W-1:0] fl_idx_q;     // flush scan position

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic [1:0]       word;
  logic             hit;

  assign idx  = req_q.addr[OFF_W +: IDX_W];
  assign tag  = req_q.addr[OFF_W + IDX_W +: TAG_W];
  assign word = req_q.addr[3 +: 2];
  assign hit  = valid_q[idx] && (tag_q[idx] == tag);

  logic wb_all_fast;
  assign wb_all_fast = &fast_q[wb_idx_q];

  assign cpu_req_ready = (state_q == C_IDLE) && !flush_req;

  // Memory requests: write-back beats or fill beats.
  always_comb begin
    m_req_valid = 1'b0;
    m_req       = '0;
    if (state_q == C_WB) begin
      m_req_valid = (iss_q < 3'(WORDS));
      m_req.write = 1'b1;
      m_req.addr  = {wb_all_fast, tag_q[wb_idx_q], wb_idx_q, iss_q[1:0], 3'b000};
      m_req.wdata = data_q[wb_idx_q][iss_q[1:0]];
      m_req.wstrb = '1;
    end else if (state_q == C_FILL) begin
      m_req_valid = (iss_q < 3'(WORDS));
      m_req.addr  = {1'b0, tag, idx, iss_q[1:0], 3'b000};
    end
  end

  assign ev_hit     = (state_q == C_LOOKUP) && hit;
  assign ev_miss    = (state_q == C_LOOKUP) && !hit;
  assign ev_wb_fast = (state_q == C_WB) && (iss_q == 3'd0) && m_req_valid && m_req_ready && wb_all_fast;
  assign ev_wb_slow = (state_q == C_WB) && (iss_q == 3'd0) && m_req_valid && m_req_ready && !wb_all_fast;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q        <= C_IDLE;
      req_q          <= '0;
      wb_idx_q       <= '0;
      wb_flush_q     <= 1'b0;
      iss_q          <= '0;
      rsp_q          <= '0;
      fl_idx_q       <= '0;
      cpu_resp_valid <= 1'b0;
      cpu_resp_rdata <= '0;
      flush_done     <= 1'b0;
      for (int i = 0; i < LINES; i++) begin
        valid_q[i] <= 1'b0;
        dirty_q[i] <= 1'b0;
        fast_q[i]  <= '0;
        tag_q[i]   <= '0;
      end
    end else begin
      cpu_resp_valid <= 1'b0;
      flush_done     <= 1'b0;
      if (m_req_valid && m_req_ready) iss_q <= iss_q + 3'd1;

      unique case (state_q)
        C_IDLE: begin
          if (flush_req) begin
            fl_idx_q <= '0;
            state_q  <= C_FLUSH;
          end else if (cpu_req_valid) begin
            req_q   <= cpu_req;
            state_q <= C_LOOKUP;
          end
        end

        C_LOOKUP: begin
          iss_q <= '0;
          rsp_q <= '0;
          if (hit) begin
            if (req_q.store) begin
              for (int b = 0; b < XLEN / 8; b++)
                if (req_q.wstrb[b]) data_q[idx][word][8*b +: 8] <= req_q.wdata[8*b +: 8];
              dirty_q[idx]      <= 1'b1;
              fast_q[idx][word] <= req_q.fast;
            end
            cpu_resp_rdata <= data_q[idx][word];
            cpu_resp_valid <= 1'b1;
            state_q        <= C_IDLE;
          end else if (valid_q[idx] && dirty_q[idx]) begin
            wb_idx_q   <= idx;
            wb_flush_q <= 1'b0;
            state_q    <= C_WB;
          end else begin
            state_q <= C_FILL;
          end
        end

        C_WB: begin
          if (m_resp_valid) begin
            rsp_q <= rsp_q + 2'd1;
            if (rsp_q == 2'(WORDS - 1)) begin
              dirty_q[wb_idx_q] <= 1'b0;
              fast_q[wb_idx_q]  <= '0;
              iss_q             <= '0;
              rsp_q             <= '0;
              state_q           <= wb_flush_q ? C_FLUSH : C_FILL;
              if (wb_flush_q) fl_idx_q <= fl_idx_q + 1'b1;
              if (wb_flush_q && fl_idx_q == IDX_W'(LINES - 1)) state_q <= C_FLUSH_END;
            end
          end
        end

        C_FILL: begin
          if (m_resp_valid) begin
            data_q[idx][rsp_q] <= m_resp_rdata;
            rsp_q <= rsp_q + 2'd1;
            if (rsp_q == 2'(WORDS - 1)) begin
              valid_q[idx] <= 1'b1;
              dirty_q[idx] <= 1'b0;
              fast_q[idx]  <= '0;
              tag_q[idx]   <= tag;
              state_q      <= C_LOOKUP;
            end
          end
        end

        C_FLUSH: begin
          iss_q <= '0;
          rsp_q <= '0;
          if (valid_q[fl_idx_q] && dirty_q[fl_idx_q]) begin
            wb_idx_q   <= fl_idx_q;
            wb_flush_q <= 1'b1;
            state_q    <= C_WB;
          end else begin
            fl_idx_q <= fl_idx_q + 1'b1;
            if (fl_idx_q == IDX_W'(LINES - 1)) state_q <= C_FLUSH_END;
          end
        end

        C_FLUSH_END: begin
          flush_done <= 1'b1;
          state_q    <= C_IDLE;
        end

        default: state_q <= C_IDLE;
      endcase
    end
  end

  // A memory response only arrives for a beat that was issued.
  a_resp_issued: assert property (@(posedge clk) disable iff (!rst_n)
                                  m_resp_valid |-> (state_q inside {C_WB, C_FILL}));

endmodule
