// nvram_driver: memory driver of the NVM controller. It performs one 16-bit
// access at a time on the pins of x16 parallel non-volatile RAMs (STT-MRAM,
// FRAM) that share address and data lines and have their own chip select.
//
// Each access is a sequence of timed phases, one clock (10 ns at 100 MHz) per
// step, as the design description gives them:
//   read : ENABLE (chip and output enable low, address driven) -> WAIT (data
//          settling) -> READ (sample the data bus) -> END (strobes released)
//   write: ENABLE (chip enable low, address driven) -> WRITE (write enable low,
//          data on the bus) -> RECOVERY (strobes released, bus held, memory
//          settles)
// The number of cycles in each phase is a parameter; the defaults are this
// design's choice (the description gives no numbers) and are sized for
// 55-70 ns asynchronous parts. The byte-lane strobes (UB/LB) are this
// design's addition so that 8-bit AXI writes do not disturb the other byte.
//
// Interface: a request (req_valid/req_ready) carries write, chip, half-word
// address, data and byte enables; done pulses for one cycle when the access
// has finished, with rdata valid in that cycle for a read.
// Latency from the accepted request to done:
//   read  = T_RD_EN + T_RD_WAIT + 1 + T_RD_END cycles
//   write = T_WR_EN + T_WR_PULSE + T_WR_REC cycles
// The data bus is split into dq_o / dq_oe / dq_i; the tristate pad sits
// outside this module.
module nvram_driver
  import nvram_pkg::*;
#(
  parameter int unsigned NUM_CHIPS  = 3,   // parallel parts on the board
  parameter int unsigned MEM_ADDR_W = 18,  // half-word address bits (4 Mb x16)
  parameter int unsigned T_RD_EN    = 1,
  parameter int unsigned T_RD_WAIT  = 6,
  parameter int unsigned T_RD_END   = 1,
  parameter int unsigned T_WR_EN    = 1,
  parameter int unsigned T_WR_PULSE = 5,
  parameter int unsigned T_WR_REC   = 1,
  localparam int unsigned CHIP_W    = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // access request
  input  logic                  req_valid,
  output logic                  req_ready,
  input  logic                  req_write,
  input  logic [CHIP_W-1:0]     req_chip,
  input  logic [MEM_ADDR_W-1:0] req_addr,
  input  logic [MEM_DATA_W-1:0] req_wdata,
  input  logic [1:0]            req_be,     // [1] upper byte, [0] lower byte
  output logic                  done,
  output logic [MEM_DATA_W-1:0] rdata,
  // nvRAM pins (active-low strobes)
  output logic [NUM_CHIPS-1:0]  mem_ce_n,
  output logic                  mem_oe_n,
  output logic                  mem_we_n,
  output logic                  mem_ub_n,
  output logic                  mem_lb_n,
  output logic [MEM_ADDR_W-1:0] mem_addr,
  output logic [MEM_DATA_W-1:0] mem_dq_o,
  output logic                  mem_dq_oe,
  input  logic [MEM_DATA_W-1:0] mem_dq_i
);

  drv_phase_e phase_q;
  logic [7:0] cnt_q;           // cycles left in the current phase, minus one
  logic [CHIP_W-1:0] chip_q;
  logic [1:0] be_q;
  logic [MEM_DATA_W-1:0] wdata_q;

  assign req_ready = (phase_q == PH_IDLE);

  // The chip enable stays low in every phase except idle, the read END phase
  // and the write RECOVERY phase.
  logic ce_on;
  always_comb begin
    ce_on = phase_q inside {PH_RD_ENABLE, PH_RD_WAIT, PH_RD_READ,
                            PH_WR_ENABLE, PH_WR_WRITE};
    for (int i = 0; i < NUM_CHIPS; i++)
      mem_ce_n[i] = !(ce_on && (chip_q == CHIP_W'(i)));
    mem_oe_n  = !(phase_q inside {PH_RD_ENABLE, PH_RD_WAIT, PH_RD_READ});
    mem_we_n  = (phase_q != PH_WR_WRITE);
    mem_dq_oe = phase_q inside {PH_WR_WRITE, PH_WR_RECOVERY};
    mem_dq_o  = wdata_q;
    mem_ub_n  = !(ce_on && be_q[1]);
    mem_lb_n  = !(ce_on && be_q[0]);
  end

  // Cycle count of a phase, minus one (a phase lasts at least one cycle).
  function automatic logic [7:0] len(input int unsigned t);
    return (t == 0) ? 8'd0 : 8'(t - 1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase_q  <= PH_IDLE;
      cnt_q    <= '0;
      chip_q   <= '0;
      be_q     <= '0;
      wdata_q  <= '0;
      mem_addr <= '0;
      rdata    <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (phase_q == PH_IDLE) begin
        if (req_valid) begin
          chip_q   <= req_chip;
          mem_addr <= req_addr;
          wdata_q  <= req_wdata;
          be_q     <= req_write ? req_be : 2'b11;
          phase_q  <= req_write ? PH_WR_ENABLE : PH_RD_ENABLE;
          cnt_q    <= req_write ? len(T_WR_EN) : len(T_RD_EN);
        end
      end else if (cnt_q != 0) begin
        cnt_q <= cnt_q - 8'd1;
      end else begin
        unique case (phase_q)
          PH_RD_ENABLE: begin phase_q <= PH_RD_WAIT;  cnt_q <= len(T_RD_WAIT); end
          PH_RD_WAIT:   begin phase_q <= PH_RD_READ;  cnt_q <= 8'd0; end
          PH_RD_READ: begin
            rdata   <= mem_dq_i;
            phase_q <= PH_RD_END;
            cnt_q   <= len(T_RD_END);
          end
          PH_RD_END:    begin phase_q <= PH_IDLE; done <= 1'b1; end
          PH_WR_ENABLE: begin phase_q <= PH_WR_WRITE;    cnt_q <= len(T_WR_PULSE); end
          PH_WR_WRITE:  begin phase_q <= PH_WR_RECOVERY; cnt_q <= len(T_WR_REC); end
          PH_WR_RECOVERY: begin phase_q <= PH_IDLE; done <= 1'b1; end
          default:      phase_q <= PH_IDLE;
        endcase
      end
    end
  end

  // Never more than one chip selected, never write and output enable together.
  a_one_chip: assert property (@(posedge clk) disable iff (!rst_n)
                               $onehot0(~mem_ce_n));
  a_no_oe_we: assert property (@(posedge clk) disable iff (!rst_n)
                               !((!mem_oe_n) && (!mem_we_n)));

endmodule
