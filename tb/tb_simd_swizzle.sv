// Self-checking test of the swizzling network: identity, broadcast, zeroing
// and random selectors on both operands, against the reference model.
module tb_simd_swizzle;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic [31:0] a, b, ao, bo;
  swz_t [3:0] sa, sb;
  int checks = 0, failures = 0;

  simd_swizzle dut (.a_i(a), .b_i(b), .swz_a_i(sa), .swz_b_i(sb), .a_o(ao), .b_o(bo));

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 32'h44332211; b = 32'hDDCCBBAA;
    sa = 12'b011_010_001_000; sb = 12'b011_010_001_000;
    #1 check(ao, a, "identity A"); check(bo, b, "identity B");
    sa = 12'b000_000_000_000; sb = 12'b011_011_011_011;
    #1 check(ao, 32'h11111111, "broadcast A0"); check(bo, 32'hDDDDDDDD, "broadcast B3");
    sa = 12'b000_001_010_011; sb = 12'b100_010_100_000;
    #1 check(ao, 32'h11223344, "reverse A"); check(bo, 32'h00CC00AA, "zero lanes B");
    for (int n = 0; n < 2000; n++) begin
      a = $urandom; b = $urandom; sa = 12'($urandom); sb = 12'($urandom);
      #1 check(ao, swz_ref(a, sa), "random A");
      check(bo, swz_ref(b, sb), "random B");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
