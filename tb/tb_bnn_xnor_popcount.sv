// Self-checking test of the XNOR/bit-count unit at two word widths: directed
// all-match and no-match words, partial-word masks, random words, and that
// the registered result holds while en is low.
module tb_bnn_xnor_popcount;
  logic clk = 0, en = 0;
  logic [7:0]  d8, w8, m8;
  logic [3:0]  r8;
  logic [12:0] d13, w13, m13;
  logic [3:0]  r13;
  int checks = 0, failures = 0;

  bnn_xnor_popcount #(.W(8))  dut8  (.clk_xn(clk), .en(en), .d_in(d8),  .wei(w8),  .vmask(m8),  .res(r8));
  bnn_xnor_popcount #(.W(13)) dut13 (.clk_xn(clk), .en(en), .d_in(d13), .wei(w13), .vmask(m13), .res(r13));

  always #5 clk = ~clk;

  function automatic int ref_count(input logic [12:0] d, input logic [12:0] w, input logic [12:0] m, input int wd);
    int c;
    c = 0;
    for (int i = 0; i < wd; i++) if (m[i] && (d[i] == w[i])) c++;
    return c;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    en = 1; d8 = 8'hA5; w8 = 8'hA5; m8 = 8'hFF; d13 = '1; w13 = '0; m13 = '1;
    @(negedge clk); check(int'(r8), 8, "all match"); check(int'(r13), 0, "no match");
    d8 = 8'hFF; w8 = 8'hFF; m8 = 8'h07;
    @(negedge clk); check(int'(r8), 3, "masked");
    for (int n = 0; n < 3000; n++) begin
      int e8, e13;
      en = 1;
      d8 = 8'($urandom); w8 = 8'($urandom); m8 = (n % 4 == 0) ? 8'($urandom) : 8'hFF;
      d13 = 13'($urandom); w13 = 13'($urandom); m13 = (n % 4 == 1) ? 13'($urandom) : 13'h1FFF;
      e8 = ref_count({5'b0, d8}, {5'b0, w8}, {5'b0, m8}, 8);
      e13 = ref_count(d13, w13, m13, 13);
      @(negedge clk);
      check(int'(r8), e8, "count W=8"); check(int'(r13), e13, "count W=13");
      en = 0; d8 = ~d8; d13 = ~d13;
      @(negedge clk);
      check(int'(r8), e8, "hold W=8"); check(int'(r13), e13, "hold W=13");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
