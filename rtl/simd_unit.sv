// Two-stage SWAR datapath of the SIMD unit.
// Stage 1 (beside the integer ALU in the execute stage): the swizzling network
// reorders both operands, four 8-bit lane ALUs compute, and per-lane predicate
// multiplexers (mask bits P3..P0 of %scr) choose the lane ALU result (1) or the
// component of the unswizzled operand A (0). With rs1 = rd this leaves masked
// components of the destination unchanged. The stage-1 value is registered
// (C' -> A'), together with the stage-2 opcode and destination register.
// Stage 2 (next cycle): reduction tree with bypass (simd_reduce).
// Timing: c_o, rd_o and valid_o appear one cycle after valid_i. When the
// stage-2 opcode is 0 the final result is already on s1_result_o in the cycle
// of valid_i (s1_final_o = 1), so the integer pipeline can forward it with no
// penalty. hold_i freezes the pipeline register (integer pipeline stall).
// The structure follows the source's outline of the unit; the mask polarity,
// the forwarding output and the hold input are this design's choices.
module simd_unit
  import simd_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               valid_i,
  input  logic               hold_i,
  input  s1_op_e             op1_i,
  input  s2_op_e             op2_i,
  input  logic [4:0]         rd_i,
  input  logic [WORD_W-1:0]  a_i,
  input  logic [WORD_W-1:0]  b_i,
  input  scr_t               scr_i,
  output logic [WORD_W-1:0]  s1_result_o,
  output logic               s1_final_o,
  output logic               valid_o,
  output logic [4:0]         rd_o,
  output logic [WORD_W-1:0]  c_o
);

  logic [WORD_W-1:0] a_sw, b_sw, alu_y;

  simd_swizzle u_swizzle (
    .a_i     (a_i),
    .b_i     (b_i),
    .swz_a_i (scr_i.swz_a),
    .swz_b_i (scr_i.swz_b),
    .a_o     (a_sw),
    .b_o     (b_sw)
  );

  for (genvar i = 0; i < LANES; i++) begin : g_lane
    simd_lane_alu u_alu (
      .op_i (op1_i),
      .a_i  (a_sw[i*LANE_W +: LANE_W]),
      .b_i  (b_sw[i*LANE_W +: LANE_W]),
      .y_o  (alu_y[i*LANE_W +: LANE_W])
    );
    // predicate multiplexer
    assign s1_result_o[i*LANE_W +: LANE_W] = scr_i.mask[i] ? alu_y[i*LANE_W +: LANE_W]
                                                           : a_i[i*LANE_W +: LANE_W];
  end

  assign s1_final_o = !(op2_i inside {S2_SUM, S2_SUMS, S2_MAX, S2_MIN, S2_XOR});

  // pipeline register between the stages
  logic [WORD_W-1:0] a2_q;
  s2_op_e            op2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      rd_o    <= '0;
      a2_q    <= '0;
      op2_q   <= S2_NOP;
    end else if (!hold_i) begin
      valid_o <= valid_i;
      if (valid_i) begin
        rd_o  <= rd_i;
        a2_q  <= s1_result_o;
        op2_q <= op2_i;
      end
    end
  end

  simd_reduce u_reduce (
    .op_i  (op2_q),
    .a_i   (a2_q),
    .c_o   (c_o),
    .red_o ()
  );

endmodule
