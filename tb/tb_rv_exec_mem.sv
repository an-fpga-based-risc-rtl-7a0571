// tb_rv_exec_mem: self-checking test of the execute-to-cache stage.
//
// Random loads, stores and fast stores of every size, with random base
// registers and offsets, are handed to the stage; a stand-in cache accepts
// each request after a random wait and answers with a double word. The test
// checks the request package (effective address, data moved to its byte
// lanes, byte strobes, store and fast flags), the load result (shift, cut,
// sign or zero extension, destination register) and that misaligned
// accesses are flagged and not issued.
module tb_rv_exec_mem;
  import rv_fs_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  always #(5ns) clk = ~clk;

  logic            in_valid, in_ready, misaligned;
  mem_dec_t        dec;
  logic [XLEN-1:0] rs1_val, rs2_val;
  logic            req_valid, req_ready, resp_valid, ld_valid, st_done;
  mem_req_t        req;
  logic [XLEN-1:0] resp_rdata, ld_data;
  logic [4:0]      ld_rd;

  rv_exec_mem dut (
    .clk, .rst_n, .in_valid, .in_ready, .dec, .rs1_val, .rs2_val, .misaligned,
    .req_valid, .req_ready, .req, .resp_valid, .resp_rdata,
    .ld_valid, .ld_data, .ld_rd, .st_done
  );

  int checks = 0, failures = 0;
  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // stand-in cache: take the request after a random wait, answer next cycle
  mem_req_t        seen_req;
  logic            seen;
  logic [XLEN-1:0] answer;
  int              wait_cnt;
  always @(posedge clk) begin
    resp_valid <= 1'b0;
    seen       <= 1'b0;
    if (!rst_n) begin
      req_ready <= 1'b0;
      wait_cnt  <= 0;
    end else if (req_valid && req_ready) begin
      req_ready  <= 1'b0;
      seen_req   <= req;
      seen       <= 1'b1;
      resp_valid <= 1'b1;
      resp_rdata <= answer;
    end else if (req_valid) begin
      if (wait_cnt == 0) begin
        req_ready <= 1'b1;
        wait_cnt  <= $urandom_range(0, 3);
      end else wait_cnt <= wait_cnt - 1;
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_issued = 0, n_mis = 0;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    dec      = '0;
    rs1_val  = '0;
    rs2_val  = '0;
    answer   = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int it = 0; it < 600; it++) begin
      logic [XLEN-1:0] ea, want;
      int bytes, ofs;
      logic store, fast, uns;
      mem_size_e sz;
      logic [11:0] imm;
      sz    = mem_size_e'($urandom_range(0, 3));
      store = ($urandom_range(0, 1) == 1);
      fast  = store && ($urandom_range(0, 1) == 1);
      uns   = !store && (sz != SZ_D) && ($urandom_range(0, 1) == 1);
      bytes = 1 << sz;
      imm   = 12'($urandom);
      rs1_val = {$urandom, $urandom};
      rs1_val[63:47] = '0;
      if ($urandom_range(0, 9) != 0) begin
        // mostly aligned: fix the low bits of rs1 so that ea is aligned
        ea = rs1_val + {{52{imm[11]}}, imm};
        rs1_val = rs1_val - (ea % bytes);
      end
      ea  = rs1_val + {{52{imm[11]}}, imm};
      ofs = int'(ea[2:0]);
      rs2_val = {$urandom, $urandom};
      answer  = {$urandom, $urandom};

      @(negedge clk);
      while (!in_ready) @(negedge clk);
      dec        = '0;
      dec.mem    = 1'b1;
      dec.load   = !store;
      dec.store  = store;
      dec.fast   = fast;
      dec.unsign = uns;
      dec.size   = sz;
      dec.imm    = imm;
      dec.rd     = 5'(it);
      in_valid   = 1'b1;
      #1;
      if (ofs % bytes != 0) begin
        check("misaligned flagged", misaligned);
        @(negedge clk);
        in_valid = 1'b0;
        n_mis++;
        @(negedge clk);
        check("misaligned not issued", !req_valid && in_ready);
        continue;
      end
      check("aligned not flagged", !misaligned);
      @(negedge clk);
      in_valid = 1'b0;
      n_issued++;
      while (!seen) @(negedge clk);
      check("address", seen_req.addr == ea[PADDR_W-1:0]);
      check("store flag", seen_req.store == store);
      check("fast flag", seen_req.fast == fast);
      check("size", seen_req.size == sz);
      if (store) begin
        logic [7:0] strb;
        strb = 8'((1 << bytes) - 1) << ofs;
        check("strobes", seen_req.wstrb == strb);
        for (int b = 0; b < bytes; b++)
          check("store data lane", seen_req.wdata[8*(ofs+b) +: 8] == rs2_val[8*b +: 8]);
        @(negedge clk);
        check("store done", st_done && !ld_valid);
      end else begin
        check("load strobes", seen_req.wstrb == 8'h00);
        want = answer >> (8 * ofs);
        if (bytes < 8) begin
          for (int b = bytes * 8; b < 64; b++) want[b] = uns ? 1'b0 : want[bytes * 8 - 1];
        end
        @(negedge clk);
        check("load valid", ld_valid && !st_done);
        check("load data", ld_data == want);
        check("load rd", ld_rd == 5'(it));
      end
    end
    check("some misaligned seen", n_mis > 0);
    check("some issued", n_issued > 400);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
