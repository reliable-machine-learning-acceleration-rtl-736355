// Self-checking test of the SIMD Control Register: reset value, writes,
// and that the register holds its value while not written.
module tb_simd_scr;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic clk = 0, rst_n = 0, we = 0;
  logic [31:0] wd;
  scr_t q;
  int checks = 0, failures = 0;

  simd_scr dut (.clk(clk), .rst_n(rst_n), .wr_en_i(we), .wr_data_i(wd), .scr_o(q));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] exp, input string what);
    checks++;
    if (32'(q) !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, 32'(q), exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wd = 32'h0;
    #12 check(SCR_IDENT, "reset value");
    rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      logic [31:0] v, prev;
      prev = 32'(q);
      v = $urandom;
      @(negedge clk); we = n[0]; wd = v;
      @(negedge clk); we = 0;
      check(n[0] ? v : prev, n[0] ? "write" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
