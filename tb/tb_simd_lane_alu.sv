// Self-checking test of one 8-bit lane ALU: saturation corners for every
// operation, then random operands for all sixteen opcodes.
module tb_simd_lane_alu;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic [3:0] op;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  simd_lane_alu dut (.op_i(s1_op_e'(op)), .a_i(a), .b_i(b), .y_o(y));

  task automatic check(input logic [7:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL op=%0d a=%h b=%h: got %h expected %h", op, a, b, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed corner cases
    op = 4'd2; a = 8'd100; b = 8'd100; #1 check(8'h7F);     // signed add saturates high
    op = 4'd2; a = 8'h80;  b = 8'hFF;  #1 check(8'h80);     // -128 + -1 saturates low
    op = 4'd1; a = 8'd200; b = 8'd100; #1 check(8'd44);     // wrapping add
    op = 4'd3; a = 8'd200; b = 8'd100; #1 check(8'hFF);     // unsigned add saturates
    op = 4'd6; a = 8'd10;  b = 8'd20;  #1 check(8'h00);     // unsigned sub floors at 0
    op = 4'd5; a = 8'h80;  b = 8'd1;   #1 check(8'h80);     // signed sub saturates
    op = 4'd8; a = 8'd16;  b = 8'd16;  #1 check(8'h7F);     // signed mul saturates
    op = 4'd8; a = 8'hF0;  b = 8'd16;  #1 check(8'h80);     // -16*16 = -256 -> -128
    op = 4'd9; a = 8'd20;  b = 8'd20;  #1 check(8'hFF);     // unsigned mul saturates
    op = 4'd7; a = 8'd20;  b = 8'd20;  #1 check(8'h90);     // 400 mod 256
    op = 4'd10; a = 8'hFF; b = 8'd1;   #1 check(8'd1);      // signed max
    op = 4'd11; a = 8'hFF; b = 8'd1;   #1 check(8'hFF);     // signed min
    op = 4'd15; a = 8'hF0; b = 8'hCC;  #1 check(8'hC3);     // xnor
    for (int n = 0; n < 20000; n++) begin
      op = 4'(n % 16); a = 8'($urandom); b = 8'($urandom);
      #1 check(lane_ref(int'(op), a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
