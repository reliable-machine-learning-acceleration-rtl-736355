// Machine learning acceleration for a space processor system, in two parts
// that stand side by side, each with its own clock and reset:
//  * simd_*: a SWAR (SIMD within a register) extension of a SPARC V8 integer
//    pipeline. Its ports are the execute-stage instruction and operand values
//    that the host pipeline supplies and the results it writes back.
//  * bnn_*: a binary neural network accelerator for an FPGA, whose ports take
//    the place of the bus interface that connects it to the host processor.
// The host processor itself is outside this design. Parameters default to the
// accelerator's 512x512 fully connected layer.
module ml_accel_top
  import simd_pkg::*;
#(
  parameter int unsigned BNN_NUM_LAYERS = 1,
  parameter int unsigned BNN_LAYER_N [BNN_NUM_LAYERS+1] = '{512, 512},
  parameter int unsigned BNN_W          = 8,
  parameter int unsigned BNN_BUS_W      = 64,
  parameter int unsigned BNN_FIFO_DEPTH = 16,
  parameter int unsigned BNN_WT_ADDR_W  = 16,
  parameter int unsigned BNN_LSEL_W     = (BNN_NUM_LAYERS > 1) ? $clog2(BNN_NUM_LAYERS) : 1
) (
  // SIMD extension (host integer pipeline side)
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     simd_hold,
  input  logic                     simd_ex_valid,
  input  logic [31:0]              simd_ex_inst,
  input  logic [31:0]              simd_ex_rs1_val,
  input  logic [31:0]              simd_ex_rs2_val,
  output logic                     simd_ex_is_simd,
  output logic                     simd_ex_fwd_valid,
  output logic [31:0]              simd_ex_result,
  output logic                     simd_ex_dep_stall,
  output logic                     simd_wb_valid,
  output logic [4:0]               simd_wb_rd,
  output logic [31:0]              simd_wb_data,
  output scr_t                     simd_scr,
  // BNN accelerator (host bus interface side)
  input  logic                     clock_accelerator,
  input  logic                     reset_accelerator,
  input  logic                     start_accelerator,
  input  logic [BNN_BUS_W-1:0]     data_in,
  input  logic                     data_in_valid,
  output logic                     buf_full,
  input  logic                     wt_we,
  input  logic [BNN_LSEL_W-1:0]    wt_layer,
  input  logic [BNN_WT_ADDR_W-1:0] wt_addr,
  input  logic [BNN_W-1:0]         wt_data,
  output logic [BNN_BUS_W-1:0]     data_out,
  output logic                     op_ready,
  output logic                     finish_accelerator,
  output logic                     bnn_busy
);

  simd_exec u_simd (
    .clk            (clk),
    .rst_n          (rst_n),
    .hold_i         (simd_hold),
    .ex_valid_i     (simd_ex_valid),
    .ex_inst_i      (simd_ex_inst),
    .ex_rs1_val_i   (simd_ex_rs1_val),
    .ex_rs2_val_i   (simd_ex_rs2_val),
    .ex_is_simd_o   (simd_ex_is_simd),
    .ex_fwd_valid_o (simd_ex_fwd_valid),
    .ex_result_o    (simd_ex_result),
    .ex_dep_stall_o (simd_ex_dep_stall),
    .wb_valid_o     (simd_wb_valid),
    .wb_rd_o        (simd_wb_rd),
    .wb_data_o      (simd_wb_data),
    .scr_o          (simd_scr)
  );

  bnn_accelerator #(
    .NUM_LAYERS (BNN_NUM_LAYERS),
    .LAYER_N    (BNN_LAYER_N),
    .W          (BNN_W),
    .BUS_W      (BNN_BUS_W),
    .FIFO_DEPTH (BNN_FIFO_DEPTH),
    .WT_ADDR_W  (BNN_WT_ADDR_W),
    .LSEL_W     (BNN_LSEL_W)
  ) u_bnn (
    .clock_accelerator  (clock_accelerator),
    .reset_accelerator  (reset_accelerator),
    .start_accelerator  (start_accelerator),
    .data_in            (data_in),
    .data_in_valid      (data_in_valid),
    .buf_full           (buf_full),
    .wt_we              (wt_we),
    .wt_layer           (wt_layer),
    .wt_addr            (wt_addr),
    .wt_data            (wt_data),
    .data_out           (data_out),
    .op_ready           (op_ready),
    .finish_accelerator (finish_accelerator),
    .busy               (bnn_busy)
  );

endmodule
