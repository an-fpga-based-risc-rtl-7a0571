// rv_fs_pkg: types and constants of the RISC-V fast-store memory path
// (rv_store_decode, rv_exec_mem, fs_dcache, mlc_router, mlc_delay_periph,
// mlc_ram_arb, mlc_sram).
//
// Fast stores reuse the S-type STORE major opcode with minor opcodes (funct3)
// 4..7 for byte, half, word and double word, as the extension defines. The
// cache line of four double words and the use of the physical address MSB to
// select the fast write path also follow the extension. The 48-bit physical
// address and 64-bit data follow the memory request bus of the emulation
// platform; the load/store encodings are the standard RV64I ones.
package rv_fs_pkg;

  localparam int unsigned XLEN    = 64;  // data width of the core and of memory
  localparam int unsigned PADDR_W = 48;  // physical address width, bit 47 = fast

  localparam logic [6:0] OPC_LOAD  = 7'b0000011;
  localparam logic [6:0] OPC_STORE = 7'b0100011;

  typedef enum logic [1:0] {
    SZ_B = 2'd0,
    SZ_H = 2'd1,
    SZ_W = 2'd2,
    SZ_D = 2'd3
  } mem_size_e;

  // Bit positions of the memory instructions in the decoded instruction vector.
  // The last four are the fast stores added by the extension.
  typedef enum int unsigned {
    I_LB, I_LH, I_LW, I_LD, I_LBU, I_LHU, I_LWU,
    I_SB, I_SH, I_SW, I_SD,
    I_SBF, I_SHF, I_SWF, I_SDF,
    I_NUM
  } mem_instr_e;

  typedef struct packed {
    logic        mem;        // a load or store (legal)
    logic        load;
    logic        store;
    logic        fast;       // fast store (low retention write mode)
    logic        unsign;     // zero-extending load
    mem_size_e   size;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic [11:0] imm;        // I-type (load) or S-type (store) offset
  } mem_dec_t;

  // Package carried from execute to the cache stage.
  typedef struct packed {
    logic [PADDR_W-1:0] addr;     // byte address
    logic [XLEN-1:0]    wdata;    // store data, aligned to its byte lanes
    logic [XLEN/8-1:0]  wstrb;
    mem_size_e          size;
    logic               store;    // 1 = store, 0 = load
    logic               fast;     // fast store flag
    logic               unsign;
  } mem_req_t;

  // One beat on the memory request bus between the cache, the write-mode
  // peripherals and the RAM. A request is taken when valid and ready are both
  // high; its response (rdata for a read, an acknowledge for a write) comes
  // with resp_valid, in order, one or more cycles later.
  typedef struct packed {
    logic               write;
    logic [PADDR_W-1:0] addr;    // byte address of a 64-bit word
    logic [XLEN-1:0]    wdata;
    logic [XLEN/8-1:0]  wstrb;
  } mbus_req_t;

endpackage
