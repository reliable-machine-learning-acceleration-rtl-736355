// One 8-bit lane ALU of the SIMD unit's first stage (four of them work in
// parallel). It performs the 8-bit integer and bitwise operations listed in
// simd_pkg::s1_op_e: add, subtract and multiply in wrapping, signed-saturating
// and unsigned-saturating forms, signed maximum and minimum, and AND, OR, XOR,
// XNOR. Opcode 0 passes operand A (stage bypass). Combinational. The source
// names the operation classes and the saturation option; the exact opcode set
// is this design's choice.
module simd_lane_alu
  import simd_pkg::*;
(
  input  s1_op_e             op_i,
  input  logic [LANE_W-1:0]  a_i,
  input  logic [LANE_W-1:0]  b_i,
  output logic [LANE_W-1:0]  y_o
);

  // Clamp a 17-bit signed value to the signed or the unsigned 8-bit range.
  function automatic logic [7:0] sat_s(input logic signed [16:0] v);
    if (v > 17'sd127)       return 8'h7F;
    else if (v < -17'sd128) return 8'h80;
    else                    return v[7:0];
  endfunction

  function automatic logic [7:0] sat_u(input logic signed [16:0] v);
    if (v > 17'sd255)    return 8'hFF;
    else if (v < 17'sd0) return 8'h00;
    else                 return v[7:0];
  endfunction

  logic signed [16:0] as, bs, au, bu;   // sign- and zero-extended operands
  logic signed [16:0] sum_s, sum_u, dif_s, dif_u, mul_s, mul_u;

  always_comb begin
    as = 17'(signed'(a_i));
    bs = 17'(signed'(b_i));
    au = {9'd0, a_i};
    bu = {9'd0, b_i};
    sum_s = as + bs;
    sum_u = au + bu;
    dif_s = as - bs;
    dif_u = au - bu;
    mul_s = as * bs;
    mul_u = au * bu;
    unique case (op_i)
      S1_NOP:   y_o = a_i;
      S1_ADD:   y_o = a_i + b_i;
      S1_ADDS:  y_o = sat_s(sum_s);
      S1_ADDUS: y_o = sat_u(sum_u);
      S1_SUB:   y_o = a_i - b_i;
      S1_SUBS:  y_o = sat_s(dif_s);
      S1_SUBUS: y_o = sat_u(dif_u);
      S1_MUL:   y_o = mul_u[7:0];
      S1_MULS:  y_o = sat_s(mul_s);
      S1_MULUS: y_o = sat_u(mul_u);
      S1_MAX:   y_o = (as > bs) ? a_i : b_i;
      S1_MIN:   y_o = (as < bs) ? a_i : b_i;
      S1_AND:   y_o = a_i & b_i;
      S1_OR:    y_o = a_i | b_i;
      S1_XOR:   y_o = a_i ^ b_i;
      S1_XNOR:  y_o = ~(a_i ^ b_i);
      default:  y_o = a_i;
    endcase
  end

endmodule
