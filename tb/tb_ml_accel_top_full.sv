// Full-size test of the whole design with every parameter at its default:
// the accelerator's single 512x512 fully connected layer with 8-bit weight
// words. All 32768 weight words are loaded, then four inferences run, each
// checked bit by bit against the reference model and for its cycle count
// (1 + 8 input words + 2*512*64 + 2 + 1 + 8 output words = 65556 cycles).
// Meanwhile the SIMD extension runs the directed program and a short random
// program.
module tb_ml_accel_top_full;
  import simd_pkg::*;

  localparam int unsigned LN [2] = '{512, 512};

  logic clk = 0, rst_n, hold, ex_valid;
  logic [31:0] inst, rs1v, rs2v;
  logic is_simd, fwd_valid, dep_stall, wb_valid, s_done;
  logic [31:0] ex_result, wb_data;
  logic [4:0]  wb_rd;
  scr_t scr;
  int s_checks, s_failures;
  logic aclk = 0, rst, start, din_v, wt_we, full, op_ready, finish, busy, b_done;
  logic [63:0] din, dout;
  logic [0:0] wt_layer;
  logic [15:0] wt_addr;
  logic [7:0] wt_data;
  int b_checks, b_failures, n_wait, n_full, n_infer;

  ml_accel_top dut (
    .clk(clk), .rst_n(rst_n), .simd_hold(hold), .simd_ex_valid(ex_valid), .simd_ex_inst(inst),
    .simd_ex_rs1_val(rs1v), .simd_ex_rs2_val(rs2v), .simd_ex_is_simd(is_simd),
    .simd_ex_fwd_valid(fwd_valid), .simd_ex_result(ex_result), .simd_ex_dep_stall(dep_stall),
    .simd_wb_valid(wb_valid), .simd_wb_rd(wb_rd), .simd_wb_data(wb_data), .simd_scr(scr),
    .clock_accelerator(aclk), .reset_accelerator(rst), .start_accelerator(start),
    .data_in(din), .data_in_valid(din_v), .buf_full(full),
    .wt_we(wt_we), .wt_layer(wt_layer), .wt_addr(wt_addr), .wt_data(wt_data),
    .data_out(dout), .op_ready(op_ready), .finish_accelerator(finish), .bnn_busy(busy));

  tb_simd_host #(.N_RANDOM(500)) simd_host (
    .clk(clk), .rst_n(rst_n), .hold(hold), .ex_valid(ex_valid), .inst(inst), .rs1v(rs1v), .rs2v(rs2v),
    .is_simd(is_simd), .fwd_valid(fwd_valid), .ex_result(ex_result), .dep_stall(dep_stall),
    .wb_valid(wb_valid), .wb_rd(wb_rd), .wb_data(wb_data), .scr(scr),
    .done(s_done), .checks(s_checks), .failures(s_failures));

  tb_bnn_host #(.L(1), .LN(LN), .W(8), .BUS(64), .FIFO_DEPTH(16), .WT_ADDR_W(16), .ROUNDS(1)) bnn_host (
    .clk(aclk), .rst(rst), .start(start), .din(din), .din_v(din_v), .full(full),
    .wt_we(wt_we), .wt_layer(wt_layer), .wt_addr(wt_addr), .wt_data(wt_data),
    .dout(dout), .op_ready(op_ready), .finish(finish), .busy(busy), .done(b_done),
    .checks(b_checks), .failures(b_failures), .n_wait(n_wait), .n_full(n_full), .n_infer(n_infer));

  always #5 clk = ~clk;
  always #4 aclk = ~aclk;

  initial begin
    repeat (400000) @(posedge aclk);
    $display("TB_RESULT checks=%0d failures=%0d", s_checks + b_checks, s_failures + b_failures + 1);
    $finish;
  end

  initial begin
    int f;
    #1;
    wait (s_done === 1'b1 && b_done === 1'b1);
    f = s_failures + b_failures;
    if (n_infer != 4) begin f++; $display("FAIL %0d inferences instead of 4", n_infer); end
    $display("TB_RESULT checks=%0d failures=%0d", s_checks + b_checks + 1, f);
    $finish;
  end
endmodule
