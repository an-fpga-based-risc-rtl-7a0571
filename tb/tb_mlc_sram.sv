// tb_mlc_sram: self-checking test of the emulation SRAM. Random writes with
// random byte strobes and random reads over a small window; every read is
// compared with a reference array, the response must come exactly one cycle
// after the request, and the address MSB (write-mode bit) must not matter.
module tb_mlc_sram;
  import rv_fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            req_valid, req_ready, resp_valid;
  mbus_req_t       req;
  logic [XLEN-1:0] resp_rdata;

  mlc_sram #(.WORDS(256)) dut (.clk, .rst_n, .req_valid, .req_ready, .req,
                               .resp_valid, .resp_rdata);

  int checks = 0, failures = 0;
  logic [XLEN-1:0] ref_mem [256];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    req_valid = 1'b0;
    req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // initialise through the port
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      req_valid = 1'b1;
      req.write = 1'b1;
      req.addr  = PADDR_W'(i * 8);
      req.wdata = {32'(i), 32'(~i)};
      req.wstrb = 8'hFF;
      ref_mem[i] = req.wdata;
    end
    for (int it = 0; it < 3000; it++) begin
      int w;
      logic wr;
      @(negedge clk);
      w  = $urandom_range(0, 255);
      wr = ($urandom_range(0, 1) == 1);
      req_valid = ($urandom_range(0, 4) != 0);
      req.write = wr;
      req.addr  = PADDR_W'(w * 8);
      req.addr[PADDR_W-1] = 1'($urandom);
      req.wdata = {$urandom, $urandom};
      req.wstrb = 8'($urandom);
      checks++;
      if (!req_ready) begin failures++; $display("FAIL not ready"); end
      @(negedge clk);
      checks++;
      if (resp_valid !== req_valid) begin failures++; $display("FAIL response timing"); end
      if (req_valid && !wr) begin
        checks++;
        if (resp_rdata !== ref_mem[w]) begin
          failures++; $display("FAIL read %0d: %h want %h", w, resp_rdata, ref_mem[w]);
        end
      end
      if (req_valid && wr)
        for (int b = 0; b < 8; b++) if (req.wstrb[b]) ref_mem[w][8*b +: 8] = req.wdata[8*b +: 8];
      req_valid = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
