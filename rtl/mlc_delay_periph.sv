// mlc_delay_periph: a write-mode peripheral in front of the RAM that emulates
// a multi-level-cell write mode by its latency.
//
// The platform has no MLC memory with selectable write modes, so main memory
// is an SRAM and each write mode is a peripheral that holds back writes: a
// write is only taken after WRITE_DELAY extra cycles, counted by clk_ticks;
// then the write request ready and the write response are released. The slow
// peripheral uses a delay of 5 cycles and the fast peripheral none, as on the
// emulation platform; the delay is a parameter so it can be matched to other
// memories. Reads are not delayed. The peripheral clears the address MSB, so
// both peripherals reach the same RAM locations. The counter that restarts
// at every taken write follows the platform's waveforms; the mbus protocol
// is this design's own.
//
// Timing: with WRITE_DELAY = D, back-to-back writes are taken every D + 1
// cycles; reads pass straight through.
module mlc_delay_periph
  import rv_fs_pkg::*;
#(
  parameter int unsigned WRITE_DELAY = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            s_req_valid,
  output logic            s_req_ready,
  input  mbus_req_t       s_req,
  output logic            s_resp_valid,
  output logic [XLEN-1:0] s_resp_rdata,
  output logic            m_req_valid,
  input  logic            m_req_ready,
  output mbus_req_t       m_req,
  input  logic            m_resp_valid,
  input  logic [XLEN-1:0] m_resp_rdata,
  output logic [31:0]     clk_ticks
);

  logic release_wr;
  assign release_wr = (clk_ticks >= WRITE_DELAY);

  always_comb begin
    m_req                 = s_req;
    m_req.addr[PADDR_W-1] = 1'b0;
    m_req_valid           = s_req_valid && (!s_req.write || release_wr);
    s_req_ready           = m_req_ready && (!s_req.write || release_wr);
    s_resp_valid          = m_resp_valid;
    s_resp_rdata          = m_resp_rdata;
  end

  // Count the cycles a write has waited; restart when it is taken.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clk_ticks <= '0;
    end else if (s_req_valid && s_req.write) begin
      if (s_req_ready) clk_ticks <= '0;
      else             clk_ticks <= clk_ticks + 32'd1;
    end
  end

endmodule
