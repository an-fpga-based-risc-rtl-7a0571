// nvm_mlc_top: the two hardware parts of the MLC NVM platform, side by side.
//
// 1. Fast-store memory path. A RISC-V memory instruction (loads, stores and
//    the fast stores sbf/shf/swf/sdf) is decoded (rv_store_decode), its
//    address is formed and the fast flag carried to the cache stage
//    (rv_exec_mem), and it is served by the write-back cache (fs_dcache). A
//    dirty line whose four double words were all written by fast stores is
//    written back with the address MSB set; mlc_router sends it to the fast
//    write-mode peripheral, every other write-back to the slow one
//    (mlc_delay_periph, 5 extra cycles per write by default). Both reach the
//    same SRAM (mlc_sram) through mlc_ram_arb. The rest of the core (fetch,
//    register file, ALU) is outside this design: the instruction comes in
//    with its two register operands.
// 2. NVM memory controller (nvram_ip): a 32-bit AXI4 slave that drives x16
//    parallel MRAM/FRAM parts through timed read and write phases.
// The two parts share only the clock and reset: the fast-store path emulates
// MLC write modes in SRAM, because the NVM parts offer no such modes.
//
// Interface: instruction port (instr_valid/instr_ready, instr, rs1/rs2
// values), load/store completion, a cache flush request, the AXI4 slave and
// nvRAM pins of the controller, and, for observation, event strobes and
// the write-delay counters (clk_ticks) of the slow and fast peripherals.
module nvm_mlc_top
  import rv_fs_pkg::*;
  import nvram_pkg::*;
#(
  parameter int unsigned CACHE_LINES = 128,
  parameter int unsigned SRAM_WORDS  = 16384,
  parameter int unsigned SLOW_DELAY  = 5,
  parameter int unsigned FAST_DELAY  = 0,
  parameter int unsigned NUM_CHIPS   = 3,
  parameter int unsigned MEM_ADDR_W  = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- fast-store memory path ----
  input  logic                  instr_valid,
  output logic                  instr_ready,
  input  logic [31:0]           instr,
  input  logic [XLEN-1:0]       rs1_val,
  input  logic [XLEN-1:0]       rs2_val,
  output logic                  instr_is_mem,
  output logic                  misaligned,
  output logic                  ld_valid,
  output logic [XLEN-1:0]       ld_data,
  output logic [4:0]            ld_rd,
  output logic                  st_done,
  input  logic                  flush_req,
  output logic                  flush_done,
  output logic [I_NUM-1:0]      instr_vec,
  output logic                  ev_hit,
  output logic                  ev_miss,
  output logic                  ev_wb_fast,
  output logic                  ev_wb_slow,
  output logic [31:0]           slow_clk_ticks,
  output logic [31:0]           fast_clk_ticks,
  // ---- NVM controller ----
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
  output axi_state_e            nvram_state
);

  // ---------------- fast-store memory path ----------------
  mem_dec_t dec;

  rv_store_decode u_dec (
    .instr, .instr_vec, .dec
  );
  assign instr_is_mem = dec.mem;

  logic            c_req_valid, c_req_ready, c_resp_valid;
  mem_req_t        c_req;
  logic [XLEN-1:0] c_resp_rdata;

  rv_exec_mem u_ex (
    .clk, .rst_n,
    .in_valid(instr_valid), .in_ready(instr_ready), .dec,
    .rs1_val, .rs2_val, .misaligned,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req(c_req),
    .resp_valid(c_resp_valid), .resp_rdata(c_resp_rdata),
    .ld_valid, .ld_data, .ld_rd, .st_done
  );

  logic            b_req_valid, b_req_ready, b_resp_valid;
  mbus_req_t       b_req;
  logic [XLEN-1:0] b_resp_rdata;

  fs_dcache #(.LINES(CACHE_LINES)) u_cache (
    .clk, .rst_n,
    .cpu_req_valid(c_req_valid), .cpu_req_ready(c_req_ready), .cpu_req(c_req),
    .cpu_resp_valid(c_resp_valid), .cpu_resp_rdata(c_resp_rdata),
    .flush_req, .flush_done,
    .m_req_valid(b_req_valid), .m_req_ready(b_req_ready), .m_req(b_req),
    .m_resp_valid(b_resp_valid), .m_resp_rdata(b_resp_rdata),
    .ev_hit, .ev_miss, .ev_wb_fast, .ev_wb_slow
  );

  logic            p_req_valid [2], p_req_ready [2], p_resp_valid [2];
  mbus_req_t       p_req       [2];
  logic [XLEN-1:0] p_resp_rdata[2];

  mlc_router u_router (
    .clk, .rst_n,
    .s_req_valid(b_req_valid), .s_req_ready(b_req_ready), .s_req(b_req),
    .s_resp_valid(b_resp_valid), .s_resp_rdata(b_resp_rdata),
    .m_req_valid(p_req_valid), .m_req_ready(p_req_ready), .m_req(p_req),
    .m_resp_valid(p_resp_valid), .m_resp_rdata(p_resp_rdata)
  );

  logic            r_req_valid [2], r_req_ready [2], r_resp_valid [2];
  mbus_req_t       r_req       [2];
  logic [XLEN-1:0] r_resp_rdata[2];

  mlc_delay_periph #(.WRITE_DELAY(SLOW_DELAY)) u_slow (
    .clk, .rst_n,
    .s_req_valid(p_req_valid[0]), .s_req_ready(p_req_ready[0]), .s_req(p_req[0]),
    .s_resp_valid(p_resp_valid[0]), .s_resp_rdata(p_resp_rdata[0]),
    .m_req_valid(r_req_valid[0]), .m_req_ready(r_req_ready[0]), .m_req(r_req[0]),
    .m_resp_valid(r_resp_valid[0]), .m_resp_rdata(r_resp_rdata[0]),
    .clk_ticks(slow_clk_ticks)
  );

  mlc_delay_periph #(.WRITE_DELAY(FAST_DELAY)) u_fast (
    .clk, .rst_n,
    .s_req_valid(p_req_valid[1]), .s_req_ready(p_req_ready[1]), .s_req(p_req[1]),
    .s_resp_valid(p_resp_valid[1]), .s_resp_rdata(p_resp_rdata[1]),
    .m_req_valid(r_req_valid[1]), .m_req_ready(r_req_ready[1]), .m_req(r_req[1]),
    .m_resp_valid(r_resp_valid[1]), .m_resp_rdata(r_resp_rdata[1]),
    .clk_ticks(fast_clk_ticks)
  );

  logic            m_req_valid, m_req_ready, m_resp_valid;
  mbus_req_t       m_req;
  logic [XLEN-1:0] m_resp_rdata;

  mlc_ram_arb u_arb (
    .clk, .rst_n,
    .s_req_valid(r_req_valid), .s_req_ready(r_req_ready), .s_req(r_req),
    .s_resp_valid(r_resp_valid), .s_resp_rdata(r_resp_rdata),
    .m_req_valid, .m_req_ready, .m_req, .m_resp_valid, .m_resp_rdata
  );

  mlc_sram #(.WORDS(SRAM_WORDS)) u_sram (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready), .req(m_req),
    .resp_valid(m_resp_valid), .resp_rdata(m_resp_rdata)
  );

  // ---------------- NVM memory controller ----------------
  nvram_ip #(
    .NUM_CHIPS (NUM_CHIPS),
    .MEM_ADDR_W(MEM_ADDR_W)
  ) u_nvram (
    .clk, .rst_n,
    .s_awvalid, .s_awready, .s_aw,
    .s_wvalid, .s_wready, .s_w,
    .s_bvalid, .s_bready, .s_bresp,
    .s_arvalid, .s_arready, .s_ar,
    .s_rvalid, .s_rready, .s_r,
    .mem_ce_n, .mem_oe_n, .mem_we_n, .mem_ub_n, .mem_lb_n,
    .mem_addr, .mem_dq_o, .mem_dq_oe, .mem_dq_i,
    .state(nvram_state)
  );

endmodule
