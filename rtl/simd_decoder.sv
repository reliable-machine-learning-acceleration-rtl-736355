// Instruction decoder for the SIMD extension of a SPARC V8 integer pipeline.
// SIMD instructions use SPARC format 3 (op = 2) with op3 = 0x2D, a code left
// unused by SPARC V8, so existing binaries are unaffected:
//   [31:30]=10 [29:25]=rd [24:19]=0x2D [18:14]=rs1 [13]=i
//   [12:9]=stage-1 opcode [8:6]=stage-2 opcode
//   i = 0: [4:0]=rs2             i = 1: [4:0]=immediate code
// The immediate code selects 2^k, 2^k-1 or 2^k+1 (k = 0..7), replicated to the
// four components (simd_pkg::simd_imm_value). A write to %scr is a WRASR
// (op3 = 0x30) with rd = 22. The source fixes only that each instruction holds
// one opcode per stage plus registers, that unused SPARC opcode space is used,
// and the immediate classes; the bit positions are this design's.
// Combinational. The register fields rd, rs1, rs2 and the i bit are plain
// slices of the instruction word, so those 16 output bits are wired straight
// from the input by design.
module simd_decoder
  import simd_pkg::*;
(
  input  logic [31:0] inst_i,
  output simd_dec_t   dec_o
);

  logic is_fmt3;

  always_comb begin
    is_fmt3         = inst_i[31:30] == SPARC_OP_ARITH;
    dec_o.is_simd   = is_fmt3 && inst_i[24:19] == OP3_SIMD;
    dec_o.is_wr_scr = is_fmt3 && inst_i[24:19] == OP3_WRASR && inst_i[29:25] == ASR_SCR;
    dec_o.rd        = inst_i[29:25];
    dec_o.rs1       = inst_i[18:14];
    dec_o.rs2       = inst_i[4:0];
    dec_o.use_imm   = inst_i[13];
    dec_o.op1       = dec_o.is_simd ? s1_op_e'(inst_i[12:9]) : S1_NOP;
    dec_o.op2       = dec_o.is_simd ? s2_op_e'(inst_i[8:6])  : S2_NOP;
    if (dec_o.is_simd)
      dec_o.imm = {4{simd_imm_value(inst_i[4:0])}};
    else
      dec_o.imm = {{19{inst_i[12]}}, inst_i[12:0]};
  end

endmodule
