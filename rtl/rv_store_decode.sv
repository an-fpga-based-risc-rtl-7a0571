// rv_store_decode: decode-stage logic for RISC-V memory instructions,
// including the four fast-store instructions of the MLC write-mode extension.
//
// The fast stores are S-type instructions under the standard STORE major
// opcode (0100011) with minor opcode (funct3) 4, 5, 6 and 7 for store byte,
// half, word and double word fast (sbf, shf, swf, sdf); funct3 0..3 remain
// the ordinary stores. As the extension describes, four one-hot bits for the
// fast stores are added to the decoded instruction vector, and once decoded a
// fast store sets the same store flag and memory size as an ordinary store,
// plus a fast flag. Loads (LOAD major opcode, RV64I funct3 0..6) are decoded
// as well so that the memory path can be exercised with loads.
//
// Interface: purely combinational. instr in; instr_vec (one bit per
// mem_instr_e entry, at most one set) and the decoded fields (mem_dec_t) out.
// dec.mem is low for anything that is not a legal load or store.
module rv_store_decode
  import rv_fs_pkg::*;
(
  input  logic [31:0]      instr,
  output logic [I_NUM-1:0] instr_vec,
  output mem_dec_t         dec
);

  logic [6:0] opcode;
  logic [2:0] funct3;
  assign opcode = instr[6:0];
  assign funct3 = instr[14:12];

  always_comb begin
    instr_vec = '0;
    if (opcode == OPC_LOAD) begin
      unique case (funct3)
        3'd0: instr_vec[I_LB]  = 1'b1;
        3'd1: instr_vec[I_LH]  = 1'b1;
        3'd2: instr_vec[I_LW]  = 1'b1;
        3'd3: instr_vec[I_LD]  = 1'b1;
        3'd4: instr_vec[I_LBU] = 1'b1;
        3'd5: instr_vec[I_LHU] = 1'b1;
        3'd6: instr_vec[I_LWU] = 1'b1;
        default: ;
      endcase
    end else if (opcode == OPC_STORE) begin
      unique case (funct3)
        3'd0: instr_vec[I_SB]  = 1'b1;
        3'd1: instr_vec[I_SH]  = 1'b1;
        3'd2: instr_vec[I_SW]  = 1'b1;
        3'd3: instr_vec[I_SD]  = 1'b1;
        3'd4: instr_vec[I_SBF] = 1'b1;   // store byte fast
        3'd5: instr_vec[I_SHF] = 1'b1;   // store half fast
        3'd6: instr_vec[I_SWF] = 1'b1;   // store word fast
        3'd7: instr_vec[I_SDF] = 1'b1;   // store double word fast
        default: ;
      endcase
    end
  end

  always_comb begin
    dec.load   = |instr_vec[I_LWU:I_LB];
    dec.fast   = |instr_vec[I_SDF:I_SBF];
    dec.store  = |instr_vec[I_SD:I_SB] || dec.fast;
    dec.mem    = dec.load || dec.store;
    dec.unsign = instr_vec[I_LBU] || instr_vec[I_LHU] || instr_vec[I_LWU];
    // funct3[1:0] is the size for every load, store and fast store
    dec.size   = mem_size_e'(funct3[1:0]);
    dec.rd     = dec.load ? instr[11:7] : 5'd0;
    dec.rs1    = instr[19:15];
    dec.rs2    = dec.store ? instr[24:20] : 5'd0;
    dec.imm    = dec.store ? {instr[31:25], instr[11:7]} : instr[31:20];
    a_onehot: assert ($onehot0(instr_vec));
  end

endmodule
