// Self-checking test of the reduction stage: bypass, each reduction with
// directed values (including saturation inside the tree) and random values.
module tb_simd_reduce;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic [2:0]  op;
  logic [31:0] a, c;
  logic [7:0]  r;
  int checks = 0, failures = 0;

  simd_reduce dut (.op_i(s2_op_e'(op)), .a_i(a), .c_o(c), .red_o(r));

  task automatic check(input logic [31:0] exp);
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h: got %h expected %h", op, a, c, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h04030201;
    op = 3'd0; #1 check(32'h04030201);                 // bypass
    op = 3'd1; #1 check(32'h0A0A0A0A);                 // sum 1+2+3+4
    op = 3'd3; #1 check(32'h04040404);                 // max
    op = 3'd4; #1 check(32'h01010101);                 // min
    op = 3'd5; #1 check(32'h04040404);                 // 1^2^3^4 = 4
    a = 32'h7F01FB00;                                  // 127, 1, -5, 0
    op = 3'd2; #1 check(32'h7A7A7A7A);                 // (127+1 -> 127) + (-5) = 122
    op = 3'd1; #1 check(32'h7B7B7B7B);                 // wrapping: 128 - 5 = 123
    a = 32'h80FF0102;
    op = 3'd4; #1 check(32'h80808080);                 // signed min = -128
    op = 3'd3; #1 check(32'h02020202);                 // signed max = 2
    for (int n = 0; n < 5000; n++) begin
      op = 3'(n % 8); a = $urandom;
      #1 check(reduce_ref(int'(op), a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
