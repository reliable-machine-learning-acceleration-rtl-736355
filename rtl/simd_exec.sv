// SIMD extension of the execute and memory stages of a SPARC V8 integer
// pipeline. In the execute stage it decodes the instruction, selects operand B
// (rs2 value or encoded immediate) and runs the first SIMD stage in parallel
// with the integer ALU; the processor takes the SIMD result instead of the ALU
// result when ex_is_simd_o is set. A WRASR to %scr updates the SIMD Control
// Register with rs1 XOR operand2, as SPARC WR instructions do.
// Interface to the host pipeline: ex_valid_i/ex_inst_i/ex_rs1_val_i/
// ex_rs2_val_i in the execute stage; hold_i stalls it. Results:
//  * ex_fwd_valid_o/ex_result_o: the result is final already in the execute
//    stage (stage-2 opcode 0), ready for forwarding;
//  * wb_valid_o/wb_rd_o/wb_data_o: the final result one cycle later (memory
//    stage), for write-back.
// ex_dep_stall_o asks the host to stall one cycle when the execute-stage
// instruction reads a register that a SIMD reduction in the memory stage is
// still producing (that value is not ready for forwarding from the execute
// stage). The source says only that the first stage works beside the integer
// ALU and that the second stage costs nothing when bypassed; the hazard rule
// and the interface are this design's.
module simd_exec
  import simd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold_i,
  input  logic         ex_valid_i,
  input  logic [31:0]  ex_inst_i,
  input  logic [31:0]  ex_rs1_val_i,
  input  logic [31:0]  ex_rs2_val_i,
  output logic         ex_is_simd_o,
  output logic         ex_fwd_valid_o,
  output logic [31:0]  ex_result_o,
  output logic         ex_dep_stall_o,
  output logic         wb_valid_o,
  output logic [4:0]   wb_rd_o,
  output logic [31:0]  wb_data_o,
  output scr_t         scr_o
);

  simd_dec_t   dec;
  logic [31:0] opb;
  logic        s1_final;
  logic        simd_go;

  simd_decoder u_dec (
    .inst_i (ex_inst_i),
    .dec_o  (dec)
  );

  assign opb     = dec.use_imm ? dec.imm : ex_rs2_val_i;
  assign simd_go = ex_valid_i && dec.is_simd && !ex_dep_stall_o;

  simd_scr u_scr (
    .clk       (clk),
    .rst_n     (rst_n),
    .wr_en_i   (ex_valid_i && dec.is_wr_scr && !hold_i && !ex_dep_stall_o),
    .wr_data_i (ex_rs1_val_i ^ opb),
    .scr_o     (scr_o)
  );

  simd_unit u_unit (
    .clk         (clk),
    .rst_n       (rst_n),
    .valid_i     (simd_go),
    .hold_i      (hold_i),
    .op1_i       (dec.op1),
    .op2_i       (dec.op2),
    .rd_i        (dec.rd),
    .a_i         (ex_rs1_val_i),
    .b_i         (opb),
    .scr_i       (scr_o),
    .s1_result_o (ex_result_o),
    .s1_final_o  (s1_final),
    .valid_o     (wb_valid_o),
    .rd_o        (wb_rd_o),
    .c_o         (wb_data_o)
  );

  // memory-stage instruction still reducing: its result was not forwardable
  logic m_reducing;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       m_reducing <= 1'b0;
    else if (!hold_i) m_reducing <= simd_go && !s1_final;
  end

  always_comb begin
    ex_is_simd_o   = ex_valid_i && dec.is_simd;
    ex_fwd_valid_o = simd_go && s1_final;
    ex_dep_stall_o = ex_valid_i && m_reducing && wb_valid_o && (wb_rd_o != 5'd0) &&
                     ((dec.rs1 == wb_rd_o) || (!dec.use_imm && dec.rs2 == wb_rd_o));
  end

endmodule
