// nvram_ip: the NVM memory controller. It joins the AXI converter
// (nvram_axi_fsm, the AXI slave and its state machine) to the memory driver
// (nvram_driver, the pins of the parallel nvRAMs), as in the controller's
// block diagram: AXI interface -> AXI converter -> memory driver -> memory
// interface.
//
// Interface: a 32-bit AXI4 slave (payloads as nvram_pkg structs) and the
// nvRAM pins: one active-low chip enable per part, shared output enable,
// write enable, byte strobes, address and a split 16-bit data bus.
// Timing: a full 32-bit word takes two driver accesses; see nvram_driver for
// the cycles of each and nvram_axi_fsm for the state sequence.
module nvram_ip
  import nvram_pkg::*;
#(
  parameter int unsigned NUM_CHIPS  = 3,
  parameter int unsigned MEM_ADDR_W = 18,
  parameter int unsigned T_RD_EN    = 1,
  parameter int unsigned T_RD_WAIT  = 6,
  parameter int unsigned T_RD_END   = 1,
  parameter int unsigned T_WR_EN    = 1,
  parameter int unsigned T_WR_PULSE = 5,
  parameter int unsigned T_WR_REC   = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  s_awvalid,
  output logic                  s_awready,
  input  axi_ax_t               s_aw,
  input  logic                  s_wvalid,
  output logic                  s_wready,
  input  axi_w_t                s_w,
  output logic                  s_bvalid,
  input  logic                  s_bready,
  output axi_resp_e             s_bresp,
  input  logic                  s_arvalid,
  output logic                  s_arready,
  input  axi_ax_t               s_ar,
  output logic                  s_rvalid,
  input  logic                  s_rready,
  output axi_r_t                s_r,
  output logic [NUM_CHIPS-1:0]  mem_ce_n,
  output logic                  mem_oe_n,
  output logic                  mem_we_n,
  output logic                  mem_ub_n,
  output logic                  mem_lb_n,
  output logic [MEM_ADDR_W-1:0] mem_addr,
  output logic [MEM_DATA_W-1:0] mem_dq_o,
  output logic                  mem_dq_oe,
  input  logic [MEM_DATA_W-1:0] mem_dq_i,
  output axi_state_e            state
);

  localparam int unsigned CHIP_W = (NUM_CHIPS > 1) ? $clog2(NUM_CHIPS) : 1;

  logic                  drv_req_valid, drv_req_ready, drv_req_write, drv_done;
  logic [CHIP_W-1:0]     drv_req_chip;
  logic [MEM_ADDR_W-1:0] drv_req_addr;
  logic [MEM_DATA_W-1:0] drv_req_wdata, drv_rdata;
  logic [1:0]            drv_req_be;

  nvram_axi_fsm #(
    .NUM_CHIPS (NUM_CHIPS),
    .MEM_ADDR_W(MEM_ADDR_W)
  ) u_axi (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_aw,
    .s_wvalid, .s_wready, .s_w,
    .s_bvalid, .s_bready, .s_bresp,
    .s_arvalid, .s_arready, .s_ar,
    .s_rvalid, .s_rready, .s_r,
    .drv_req_valid, .drv_req_ready, .drv_req_write, .drv_req_chip,
    .drv_req_addr, .drv_req_wdata, .drv_req_be, .drv_done, .drv_rdata,
    .state
  );

  nvram_driver #(
    .NUM_CHIPS (NUM_CHIPS),
    .MEM_ADDR_W(MEM_ADDR_W),
    .T_RD_EN   (T_RD_EN),
    .T_RD_WAIT (T_RD_WAIT),
    .T_RD_END  (T_RD_END),
    .T_WR_EN   (T_WR_EN),
    .T_WR_PULSE(T_WR_PULSE),
    .T_WR_REC  (T_WR_REC)
  ) u_drv (
    .clk, .rst_n,
    .req_valid(drv_req_valid), .req_ready(drv_req_ready),
    .req_write(drv_req_write), .req_chip(drv_req_chip),
    .req_addr(drv_req_addr), .req_wdata(drv_req_wdata), .req_be(drv_req_be),
    .done(drv_done), .rdata(drv_rdata),
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i
  );

endmodule
