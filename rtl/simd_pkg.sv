// Shared types and constants of the SWAR (SIMD-within-a-register) unit for a
// SPARC V8 integer pipeline. The unit operates on four 8-bit components held in
// one 32-bit integer register. Every instruction carries one opcode for each of
// the two pipeline stages; opcode 0 bypasses a stage. The opcode lists, the
// instruction encoding and the layout of the SIMD Control Register (%scr) are
// choices of this design: only the operation classes (8-bit integer and bitwise
// operations with and without saturation; max, min, sum and XOR reductions),
// the bypass-by-zero rule and the immediate classes are fixed by the source.
package simd_pkg;

  localparam int unsigned LANES  = 4;
  localparam int unsigned LANE_W = 8;
  localparam int unsigned WORD_W = LANES * LANE_W;

  // Stage-1 (per-lane) operations. Signed saturation clamps to [-128,127],
  // unsigned saturation to [0,255]. MAX/MIN compare signed components.
  typedef enum logic [3:0] {
    S1_NOP   = 4'd0,   // bypass: the swizzled A component passes unchanged
    S1_ADD   = 4'd1,
    S1_ADDS  = 4'd2,
    S1_ADDUS = 4'd3,
    S1_SUB   = 4'd4,
    S1_SUBS  = 4'd5,
    S1_SUBUS = 4'd6,
    S1_MUL   = 4'd7,   // low 8 bits of the product
    S1_MULS  = 4'd8,
    S1_MULUS = 4'd9,
    S1_MAX   = 4'd10,
    S1_MIN   = 4'd11,
    S1_AND   = 4'd12,
    S1_OR    = 4'd13,
    S1_XOR   = 4'd14,
    S1_XNOR  = 4'd15
  } s1_op_e;

  // Stage-2 (reduction) operations over the four components. Codes 6 and 7
  // are unused and behave as bypass.
  typedef enum logic [2:0] {
    S2_NOP  = 3'd0,
    S2_SUM  = 3'd1,    // wrapping 8-bit sum
    S2_SUMS = 3'd2,    // signed saturating sum, saturating at every tree node
    S2_MAX  = 3'd3,
    S2_MIN  = 3'd4,
    S2_XOR  = 3'd5
  } s2_op_e;

  // Per-lane swizzle selector: pick component 'sel' of the operand, or zero it.
  typedef struct packed {
    logic       zero;
    logic [1:0] sel;
  } swz_t;

  // SIMD Control Register, 32 bits. mask[i] = 1 writes lane i's result,
  // mask[i] = 0 keeps component i of the unswizzled rs1 operand.
  typedef struct packed {
    logic [3:0]        rsvd;
    swz_t [LANES-1:0]  swz_b;   // bits 27:16
    swz_t [LANES-1:0]  swz_a;   // bits 15:4
    logic [LANES-1:0]  mask;    // bits 3:0
  } scr_t;

  // Identity swizzle, all lanes written.
  localparam scr_t SCR_RESET = '{rsvd: 4'h0,
                                 swz_b: {3'b0_11, 3'b0_10, 3'b0_01, 3'b0_00},
                                 swz_a: {3'b0_11, 3'b0_10, 3'b0_01, 3'b0_00},
                                 mask: 4'hF};

  // SPARC V8 format-3 fields (op = 2) used by the extension.
  localparam logic [1:0] SPARC_OP_ARITH = 2'b10;
  localparam logic [5:0] OP3_SIMD       = 6'h2D;   // unused in SPARC V8
  localparam logic [5:0] OP3_WRASR      = 6'h30;   // WRY / WRASR
  localparam logic [4:0] ASR_SCR        = 5'd22;   // %scr as ancillary state register 22

  // Decoded instruction.
  typedef struct packed {
    logic        is_simd;     // SIMD operation
    logic        is_wr_scr;   // write to %scr
    s1_op_e      op1;
    s2_op_e      op2;
    logic [4:0]  rd;
    logic [4:0]  rs1;
    logic [4:0]  rs2;
    logic        use_imm;     // operand B is the encoded immediate
    logic [31:0] imm;         // SIMD: replicated 8-bit constant; WR: sign-extended simm13
  } simd_dec_t;

  // Immediate code of a SIMD instruction (instruction bits 4:0):
  // kind = code[4:3], k = code[2:0]
  //   kind 0: 2^k, kind 1: 2^k - 1, kind 2: 2^k + 1, kind 3: 0
  function automatic logic [7:0] simd_imm_value(input logic [4:0] code);
    logic [7:0] p;
    p = 8'd1 << code[2:0];
    unique case (code[4:3])
      2'd0:    return p[7:0];
      2'd1:    return p[7:0] - 8'd1;
      2'd2:    return p[7:0] + 8'd1;
      default: return 8'd0;
    endcase
  endfunction

endpackage
