// Swizzling network of the SIMD unit (first pipeline stage, in front of the lane
// ALUs). For each of the two source operands and each output lane, a 3-bit
// selector picks one of the four 8-bit components of the operand, or forces the
// lane to zero. This gives reordering, duplication (broadcast) and masking of
// components, which is what the source requires of the network; the selector
// encoding is this design's own. Purely combinational: a row of 4:1
// multiplexers per operand.
module simd_swizzle
  import simd_pkg::*;
(
  input  logic [WORD_W-1:0]  a_i,
  input  logic [WORD_W-1:0]  b_i,
  input  swz_t [LANES-1:0]   swz_a_i,
  input  swz_t [LANES-1:0]   swz_b_i,
  output logic [WORD_W-1:0]  a_o,
  output logic [WORD_W-1:0]  b_o
);

  always_comb begin
    for (int i = 0; i < LANES; i++) begin
      a_o[i*LANE_W +: LANE_W] = swz_a_i[i].zero ? '0 : a_i[swz_a_i[i].sel*LANE_W +: LANE_W];
      b_o[i*LANE_W +: LANE_W] = swz_b_i[i].zero ? '0 : b_i[swz_b_i[i].sel*LANE_W +: LANE_W];
    end
  end

endmodule
