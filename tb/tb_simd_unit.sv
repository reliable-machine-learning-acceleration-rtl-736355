// Self-checking test of the two-stage SIMD datapath. Random operations,
// operands and control-register values are issued back to back. The stage-1
// value (with swizzle and predicate mask) is checked in the issue cycle, the
// final value exactly one cycle later; s1_final must be set exactly when the
// reduction stage is bypassed, and hold must freeze the pipeline register.
module tb_simd_unit;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic clk = 0, rst_n = 0, valid = 0, hold = 0;
  logic [3:0] op1;
  logic [2:0] op2;
  logic [4:0] rd;
  logic [31:0] a, b, scr, s1, c;
  logic s1_final, vo;
  logic [4:0] rdo;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_reduce = 0;

  simd_unit dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid), .hold_i(hold),
    .op1_i(s1_op_e'(op1)), .op2_i(s2_op_e'(op2)), .rd_i(rd), .a_i(a), .b_i(b),
    .scr_i(scr_t'(scr)), .s1_result_o(s1), .s1_final_o(s1_final),
    .valid_o(vo), .rd_o(rdo), .c_o(c));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_c;
    logic [4:0]  exp_rd;
    logic        exp_v;
    op1 = 0; op2 = 0; rd = 0; a = 0; b = 0; scr = SCR_IDENT;
    exp_v = 0; exp_c = 0; exp_rd = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // outputs of the previous issue
      if (!hold) begin
        check(vo, exp_v, "valid latency");
        if (exp_v) begin
          check(c, exp_c, "stage-2 result");
          check(rdo, exp_rd, "rd");
        end
      end
      hold  = (n % 17 == 5);
      valid = ($urandom % 4) != 0;
      op1 = 4'($urandom); op2 = 3'($urandom % 6); rd = 5'($urandom);
      a = $urandom; b = $urandom;
      scr = (n < 1000) ? SCR_IDENT : {4'h0, 28'($urandom)};
      #1;
      check(s1, s1_ref(op1, a, b, scr), "stage-1 result");
      check(s1_final, op2 == 0, "s1_final");
      if (!hold) begin
        exp_v  = valid;
        if (valid) begin
          exp_c  = simd_ref(op1, op2, a, b, scr);
          exp_rd = rd;
          if (op2 == 0) n_bypass++; else n_reduce++;
        end
      end else begin
        // held: the registered outputs must not change over the edge
        @(negedge clk);
        check(vo, exp_v, "hold valid");
        if (exp_v) check(c, exp_c, "hold result");
        hold = 0; valid = 0;
        exp_v = 0;
      end
    end
    checks++;
    if (n_bypass == 0 || n_reduce == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
