// nvram_pkg: types and constants shared by the parallel-NVM memory controller
// (nvram_axi_fsm, nvram_driver, nvram_ip).
//
// The controller bridges a 32-bit AXI4 memory-mapped bus to x16 parallel
// non-volatile RAMs (STT-MRAM, FRAM) on a shared address/data bus. The state
// names follow the controller's state diagram; the 16/32-bit widths and the
// 100 MHz step of 10 ns per state follow the design description. The AXI
// payload structs and the burst encodings are standard AXI4.
package nvram_pkg;

  localparam int unsigned AXI_ADDR_W = 32;  // AXI address width
  localparam int unsigned AXI_DATA_W = 32;  // AXI data width (32-bit bus)
  localparam int unsigned MEM_DATA_W = 16;  // nvRAM data width (x16 parts)

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } axi_burst_e;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } axi_resp_e;

  // Address channel payload (AW and AR alike).
  typedef struct packed {
    logic [AXI_ADDR_W-1:0] addr;
    logic [7:0]            len;    // beats - 1
    logic [2:0]            size;   // log2(bytes per beat)
    axi_burst_e            burst;
  } axi_ax_t;

  typedef struct packed {
    logic [AXI_DATA_W-1:0]   data;
    logic [AXI_DATA_W/8-1:0] strb;
    logic                    last;
  } axi_w_t;

  typedef struct packed {
    logic [AXI_DATA_W-1:0] data;
    axi_resp_e             resp;
    logic                  last;
  } axi_r_t;

  // States of the AXI converter (names from the state diagram).
  typedef enum logic [3:0] {
    ST_IDLE,
    ST_WRITE_LOW,
    ST_WRITE_UP,
    ST_WRITE_BURST,
    ST_WRITE_WAIT,
    ST_READ_LOW,
    ST_READ_UP,
    ST_READ_BURST,
    ST_READ_WAIT
  } axi_state_e;

  // Phases of one 16-bit nvRAM access.
  typedef enum logic [2:0] {
    PH_IDLE,
    PH_RD_ENABLE,
    PH_RD_WAIT,
    PH_RD_READ,
    PH_RD_END,
    PH_WR_ENABLE,
    PH_WR_WRITE,
    PH_WR_RECOVERY
  } drv_phase_e;

endpackage
