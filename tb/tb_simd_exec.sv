// Self-checking test of the SIMD extension in its pipeline setting: the host
// pipeline model tb_simd_host runs directed sequences (saturating vector add,
// dot product with a dependent instruction, predicate masking, swizzle,
// immediates) and a random program with pipeline holds against a
// program-order model of the instruction set.
module tb_simd_exec;
  import simd_pkg::*;

  logic clk = 0, rst_n, hold, ex_valid;
  logic [31:0] inst, rs1v, rs2v;
  logic is_simd, fwd_valid, dep_stall, wb_valid, done;
  logic [31:0] ex_result, wb_data;
  logic [4:0]  wb_rd;
  scr_t scr;
  int checks, failures;

  simd_exec dut (
    .clk(clk), .rst_n(rst_n), .hold_i(hold), .ex_valid_i(ex_valid), .ex_inst_i(inst),
    .ex_rs1_val_i(rs1v), .ex_rs2_val_i(rs2v), .ex_is_simd_o(is_simd),
    .ex_fwd_valid_o(fwd_valid), .ex_result_o(ex_result), .ex_dep_stall_o(dep_stall),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data), .scr_o(scr));

  tb_simd_host #(.N_RANDOM(3000)) host (
    .clk(clk), .rst_n(rst_n), .hold(hold), .ex_valid(ex_valid), .inst(inst), .rs1v(rs1v), .rs2v(rs2v),
    .is_simd(is_simd), .fwd_valid(fwd_valid), .ex_result(ex_result), .dep_stall(dep_stall),
    .wb_valid(wb_valid), .wb_rd(wb_rd), .wb_data(wb_data), .scr(scr),
    .done(done), .checks(checks), .failures(failures));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
