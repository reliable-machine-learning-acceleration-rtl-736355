// Second pipeline stage of the SIMD unit: reduction among the four 8-bit
// components. As drawn for this stage, two ALUs combine components (3,2) and
// (1,0) and a third combines their results; the operations are maximum,
// minimum, sum (wrapping, or signed-saturating at every node of the tree) and
// XOR. A row of per-lane multiplexers then delivers either the unchanged
// component (opcode 0, stage bypassed) or the reduction result; the result is
// broadcast to all four lanes, which is this design's reading of the output
// multiplexers. Combinational; the pipeline register sits in front of it in
// simd_unit.
module simd_reduce
  import simd_pkg::*;
(
  input  s2_op_e             op_i,
  input  logic [WORD_W-1:0]  a_i,
  output logic [WORD_W-1:0]  c_o,
  output logic [LANE_W-1:0]  red_o    // reduction result alone
);

  function automatic logic [7:0] node(input s2_op_e op, input logic [7:0] x, input logic [7:0] y);
    logic signed [8:0] s;
    s = 9'(signed'(x)) + 9'(signed'(y));
    unique case (op)
      S2_SUM:  return x + y;
      S2_SUMS: return (s > 9'sd127) ? 8'h7F : (s < -9'sd128) ? 8'h80 : s[7:0];
      S2_MAX:  return ($signed(x) > $signed(y)) ? x : y;
      S2_MIN:  return ($signed(x) < $signed(y)) ? x : y;
      S2_XOR:  return x ^ y;
      default: return x;
    endcase
  endfunction

  logic [LANE_W-1:0] hi, lo;
  logic              bypass;

  always_comb begin
    hi     = node(op_i, a_i[31:24], a_i[23:16]);
    lo     = node(op_i, a_i[15:8],  a_i[7:0]);
    red_o  = node(op_i, hi, lo);
    bypass = !(op_i inside {S2_SUM, S2_SUMS, S2_MAX, S2_MIN, S2_XOR});
    for (int i = 0; i < LANES; i++)
      c_o[i*LANE_W +: LANE_W] = bypass ? a_i[i*LANE_W +: LANE_W] : red_o;
  end

endmodule
