// nvram_axi_fsm: AXI converter of the NVM controller. An AXI4 memory-mapped
// slave with a 32-bit data bus in front of 16-bit non-volatile RAMs.
//
// Every 32-bit AXI word is split into its lower and upper 16-bit halves, which
// are handed one after the other to the memory driver (nvram_driver). The
// state machine uses the nine states of the controller's state diagram:
//   IDLE         takes a write address (with its first data beat, if that is
//                already valid) or a read address
//   WRITE_BURST  takes the next write data beat of a burst
//   WRITE_LOW    writes the lower half, WRITE_UP the upper half
//   WRITE_WAIT   returns the write response
//   READ_LOW     reads the lower half, READ_UP the upper half
//   READ_BURST   returns a read beat that is not the last one of the burst
//   READ_WAIT    returns the last read beat
// A half that is not needed is skipped: for writes, a half whose two byte
// strobes are both low; for reads, the half a 1- or 2-byte access does not
// touch. Bursts (INCR, and FIXED) send the address once and step it per beat
// (WRAP is treated as INCR, this design's simplification). Writes take
// priority when a write and a read address arrive together (this design's
// choice). Responses are always OKAY; AXI IDs are not used.
//
// Address map (this design's choice): byte address bits [MEM_ADDR_W:1] give
// the half-word address in a chip, the bits above select the chip.
// Timing: one 16-bit access costs one driver access (see nvram_driver) plus
// one cycle of this state machine per state.
module nvram_axi_fsm
  import nvram_pkg::*;
#(
  parameter int unsigned NUM_CHIPS  = 3,
  parameter int unsigned MEM_ADDR_W = 18,
  localparam int unsigned CHIP_W    = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4 write address
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  axi_ax_t               s_aw,
  // AXI4 write data
  input  logic                  s_wvalid,
  output logic                  s_wready,
  input  axi_w_t                s_w,
  // AXI4 write response
  output logic                  s_bvalid,
  input  logic                  s_bready,
  output axi_resp_e             s_bresp,
  // AXI4 read address
  input  logic                  s_arvalid,
  output logic                  s_arready,
  input  axi_ax_t               s_ar,
  // AXI4 read data
  output logic                  s_rvalid,
  input  logic                  s_rready,
  output axi_r_t                s_r,
  // memory driver
  output logic                  drv_req_valid,
  input  logic                  drv_req_ready,
  output logic                  drv_req_write,
  output logic [CHIP_W-1:0]     drv_req_chip,
  output logic [MEM_ADDR_W-1:0] drv_req_addr,
  output logic [MEM_DATA_W-1:0] drv_req_wdata,
  output logic [1:0]            drv_req_be,
  input  logic                  drv_done,
  input  logic [MEM_DATA_W-1:0] drv_rdata,
  // current state, for observation
  output axi_state_e            state
);

  axi_state_e state_q, state_d;
  logic [AXI_ADDR_W-1:0] addr_q;
  logic [7:0]            len_q;       // beats left after the current one
  logic [2:0]            size_q;
  axi_burst_e            burst_q;
  logic [AXI_DATA_W-1:0] data_q;      // write data, or read data being assembled
  logic [3:0]            strb_q;
  logic                  issued_q;    // driver request of this state accepted

  assign state = state_q;

  // Halves needed by the current read beat.
  function automatic logic need_lo_rd(input logic a1, input logic [2:0] sz);
    return (sz >= 3'd2) || !a1;
  endfunction
  function automatic logic need_up_rd(input logic a1, input logic [2:0] sz);
    return (sz >= 3'd2) || a1;
  endfunction

  // State after a write beat has been taken, from its strobes.
  function automatic axi_state_e wr_first(input logic [3:0] st, input logic last_beat);
    if (|st[1:0])      return ST_WRITE_LOW;
    else if (|st[3:2]) return ST_WRITE_UP;
    else               return last_beat ? ST_WRITE_WAIT : ST_WRITE_BURST;
  endfunction

  function automatic logic [AXI_ADDR_W-1:0] next_addr(input logic [AXI_ADDR_W-1:0] a,
                                                      input logic [2:0] sz,
                                                      input axi_burst_e b);
    logic [AXI_ADDR_W-1:0] step;
    step = AXI_ADDR_W'(1) << sz;
    if (b == BURST_FIXED) return a;
    // align to the beat size, then step
    return (a & ~(step - 1)) + step;
  endfunction

  logic [CHIP_W-1:0] chip;
  assign chip = CHIP_W'(addr_q >> (MEM_ADDR_W + 1));

  logic wr_last;
  assign wr_last = (len_q == 8'd0);

  logic [AXI_ADDR_W-1:0] addr_nxt;   // address of the next beat
  assign addr_nxt = next_addr(addr_q, size_q, burst_q);

  always_comb begin
    s_awready     = 1'b0;
    s_wready      = 1'b0;
    s_arready     = 1'b0;
    s_bvalid      = 1'b0;
    s_bresp       = RESP_OKAY;
    s_rvalid      = 1'b0;
    s_r.data      = data_q;
    s_r.resp      = RESP_OKAY;
    s_r.last      = 1'b0;
    drv_req_valid = 1'b0;
    drv_req_write = 1'b0;
    drv_req_chip  = chip;
    drv_req_addr  = '0;
    drv_req_wdata = '0;
    drv_req_be    = 2'b11;
    state_d       = state_q;

    unique case (state_q)
      ST_IDLE: begin
        s_awready = 1'b1;
        s_wready  = s_awvalid;           // first beat may come with its address
        s_arready = !s_awvalid;
        if (s_awvalid) begin
          if (s_wvalid) state_d = wr_first(s_w.strb, s_aw.len == 8'd0);
          else          state_d = ST_WRITE_BURST;
        end else if (s_arvalid) begin
          state_d = need_lo_rd(s_ar.addr[1], s_ar.size) ? ST_READ_LOW : ST_READ_UP;
        end
      end
      ST_WRITE_BURST: begin
        s_wready = 1'b1;
        if (s_wvalid) state_d = wr_first(s_w.strb, wr_last);
      end
      ST_WRITE_LOW, ST_WRITE_UP: begin
        drv_req_valid = !issued_q;
        drv_req_write = 1'b1;
        drv_req_addr  = {addr_q[MEM_ADDR_W:2], (state_q == ST_WRITE_UP)};
        drv_req_wdata = (state_q == ST_WRITE_UP) ? data_q[31:16] : data_q[15:0];
        drv_req_be    = (state_q == ST_WRITE_UP) ? strb_q[3:2] : strb_q[1:0];
        if (drv_done) begin
          if (state_q == ST_WRITE_LOW && |strb_q[3:2]) state_d = ST_WRITE_UP;
          else state_d = wr_last ? ST_WRITE_WAIT : ST_WRITE_BURST;
        end
      end
      ST_WRITE_WAIT: begin
        s_bvalid = 1'b1;
        if (s_bready) state_d = ST_IDLE;
      end
      ST_READ_LOW, ST_READ_UP: begin
        drv_req_valid = !issued_q;
        drv_req_addr  = {addr_q[MEM_ADDR_W:2], (state_q == ST_READ_UP)};
        if (drv_done) begin
          if (state_q == ST_READ_LOW && need_up_rd(addr_q[1], size_q)) state_d = ST_READ_UP;
          else state_d = wr_last ? ST_READ_WAIT : ST_READ_BURST;
        end
      end
      ST_READ_BURST: begin
        s_rvalid = 1'b1;
        if (s_rready) begin
          state_d = need_lo_rd(addr_nxt[1], size_q) ? ST_READ_LOW : ST_READ_UP;
        end
      end
      ST_READ_WAIT: begin
        s_rvalid = 1'b1;
        s_r.last = 1'b1;
        if (s_rready) state_d = ST_IDLE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= ST_IDLE;
      addr_q   <= '0;
      len_q    <= '0;
      size_q   <= '0;
      burst_q  <= BURST_INCR;
      data_q   <= '0;
      strb_q   <= '0;
      issued_q <= 1'b0;
    end else begin
      state_q <= state_d;
      if (state_d != state_q) issued_q <= 1'b0;
      else if (drv_req_valid && drv_req_ready) issued_q <= 1'b1;

      unique case (state_q)
        ST_IDLE: begin
          if (s_awvalid) begin
            addr_q  <= s_aw.addr;
            len_q   <= s_aw.len;
            size_q  <= s_aw.size;
            burst_q <= s_aw.burst;
            if (s_wvalid) begin
              data_q <= s_w.data;
              strb_q <= s_w.strb;
            end
          end else if (s_arvalid) begin
            addr_q  <= s_ar.addr;
            len_q   <= s_ar.len;
            size_q  <= s_ar.size;
            burst_q <= s_ar.burst;
            data_q  <= '0;
          end
        end
        ST_WRITE_BURST: begin
          if (s_wvalid) begin
            data_q <= s_w.data;
            strb_q <= s_w.strb;
          end
        end
        ST_WRITE_LOW, ST_WRITE_UP: begin
          // step to the next beat when this one is complete
          if (state_d == ST_WRITE_BURST) begin
            addr_q <= next_addr(addr_q, size_q, burst_q);
            len_q  <= len_q - 8'd1;
          end
        end
        ST_READ_LOW:  if (drv_done) data_q[15:0]  <= drv_rdata;
        ST_READ_UP:   if (drv_done) data_q[31:16] <= drv_rdata;
        ST_READ_BURST: begin
          if (s_rready) begin
            addr_q <= next_addr(addr_q, size_q, burst_q);
            len_q  <= len_q - 8'd1;
            data_q <= '0;
          end
        end
        default: ;
      endcase
      // a write beat with no strobes at all completes at once
      if ((state_q == ST_WRITE_BURST && s_wvalid) ||
          (state_q == ST_IDLE && s_awvalid && s_wvalid)) begin
        if (state_d == ST_WRITE_BURST) begin
          addr_q <= next_addr((state_q == ST_IDLE) ? s_aw.addr : addr_q,
                              (state_q == ST_IDLE) ? s_aw.size : size_q,
                              (state_q == ST_IDLE) ? s_aw.burst : burst_q);
          len_q  <= ((state_q == ST_IDLE) ? s_aw.len : len_q) - 8'd1;
        end
      end
    end
  end

  // AXI: a valid response is held until it is taken.
  a_b_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_bvalid && !s_bready |=> s_bvalid);
  a_r_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             s_rvalid && !s_rready |=> s_rvalid && $stable(s_r));
  // The last write beat arrives on the last counted beat.
  a_wlast:  assert property (@(posedge clk) disable iff (!rst_n)
                             s_wvalid && s_wready && state_q == ST_WRITE_BURST
                             |-> s_w.last == wr_last);

endmodule
