// tb_rv_store_decode: self-checking test of the memory-instruction decoder.
//
// Builds S-type stores (funct3 0..7, where 4..7 are the fast stores sbf, shf,
// swf, sdf) and I-type loads (funct3 0..7, 7 being illegal) with random
// registers and offsets, plus random instructions of other major opcodes, and
// compares the decoder's one-hot instruction vector, store/load/fast flags,
// size, registers and offset with values worked out here from the encoding.
module tb_rv_store_decode;
  import rv_fs_pkg::*;

  logic [31:0]      instr;
  logic [I_NUM-1:0] instr_vec;
  mem_dec_t         dec;

  rv_store_decode dut (.instr, .instr_vec, .dec);

  int checks = 0, failures = 0;

  function automatic logic [31:0] enc_s(input logic [2:0] f3, input logic [4:0] rs1,
                                        input logic [4:0] rs2, input logic [11:0] imm);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction

  function automatic logic [31:0] enc_l(input logic [2:0] f3, input logic [4:0] rs1,
                                        input logic [4:0] rd, input logic [11:0] imm);
    return {imm, rs1, f3, rd, 7'b0000011};
  endfunction

  task automatic check(input string what, input logic cond);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (instr %h)", what, instr);
    end
  endtask

  // expected one-hot index for a store / load funct3
  localparam int ST_IDX [8] = '{I_SB, I_SH, I_SW, I_SD, I_SBF, I_SHF, I_SWF, I_SDF};
  localparam int LD_IDX [7] = '{I_LB, I_LH, I_LW, I_LD, I_LBU, I_LHU, I_LWU};

  initial begin : watchdog
    #(1ms);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int f = 0; f < 8; f++) begin
        logic [4:0] r1, r2;
        logic [11:0] imm;
        r1  = 5'($urandom);
        r2  = 5'($urandom);
        imm = 12'($urandom);
        // store / fast store
        instr = enc_s(3'(f), r1, r2, imm);
        #1;
        check("store vector", instr_vec == (I_NUM'(1) << ST_IDX[f]));
        check("store flags", dec.mem && dec.store && !dec.load);
        check("fast flag", dec.fast == (f >= 4));
        check("store size", dec.size == mem_size_e'(f % 4));
        check("store regs", dec.rs1 == r1 && dec.rs2 == r2);
        check("store imm", dec.imm == imm);
        // load
        instr = enc_l(3'(f), r1, r2, imm);
        #1;
        if (f < 7) begin
          check("load vector", instr_vec == (I_NUM'(1) << LD_IDX[f]));
          check("load flags", dec.mem && dec.load && !dec.store && !dec.fast);
          check("load size", dec.size == mem_size_e'(f % 4));
          check("load unsigned", dec.unsign == (f >= 4));
          check("load regs", dec.rs1 == r1 && dec.rd == r2);
          check("load imm", dec.imm == imm);
        end else begin
          check("illegal load", instr_vec == '0 && !dec.mem);
        end
      end
      // some other opcode
      instr = $urandom;
      if (instr[6:0] == 7'b0100011 || instr[6:0] == 7'b0000011) instr[6:0] = 7'b0110011;
      #1;
      check("non-memory", instr_vec == '0 && !dec.mem && !dec.fast);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
