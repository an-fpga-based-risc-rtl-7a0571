// mlc_sram: the SRAM that stands in for MLC main memory on the emulation
// platform. 64-bit words, byte write strobes, always ready.
//
// A request is taken every cycle; its response (read data, or the write
// acknowledge) is valid in the next cycle. Only the low address bits that
// index WORDS words are used; the address MSB (the write-mode bit) has been
// cleared by the peripherals in front. The size is this design's choice.
module mlc_sram
  import rv_fs_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req_valid,
  output logic            req_ready,
  input  mbus_req_t       req,
  output logic            resp_valid,
  output logic [XLEN-1:0] resp_rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];
  logic [AW-1:0]   a;

  assign a         = req.addr[3 +: AW];
  assign req_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (req_valid) begin
      if (req.write) begin
        for (int b = 0; b < XLEN / 8; b++)
          if (req.wstrb[b]) mem[a][8*b +: 8] <= req.wdata[8*b +: 8];
      end
      resp_rdata <= mem[a];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) resp_valid <= 1'b0;
    else        resp_valid <= req_valid;
  end

endmodule
