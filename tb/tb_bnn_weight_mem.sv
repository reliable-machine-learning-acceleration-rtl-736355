// Self-checking test of the weight block RAM: fills it with random words,
// reads every address back with one cycle of read latency, and checks that a
// write returns the old word in the same cycle (read-first).
module tb_bnn_weight_mem;
  localparam int DW = 8, DEPTH = 200, AW = 8;

  logic clk = 0, we = 0;
  logic [AW-1:0] addr;
  logic [DW-1:0] din, dout;
  logic [DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  bnn_weight_mem #(.DATA_W(DW), .DEPTH(DEPTH), .ADDR_W(AW)) dut (
    .clka(clk), .wea(we), .addra(addr), .dina(din), .douta(dout));

  always #5 clk = ~clk;

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0; din = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; addr = AW'(i); din = DW'($urandom); model[i] = din;
    end
    @(negedge clk) we = 0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      addr = AW'(i);
      @(negedge clk);
      check(dout, model[i], "read");
    end
    for (int n = 0; n < 300; n++) begin
      int i;
      i = $urandom % DEPTH;
      addr = AW'(i); we = 1; din = DW'($urandom);
      @(negedge clk);
      check(dout, model[i], "read-first");
      model[i] = din;
      we = 0;
      @(negedge clk);
      check(dout, model[i], "new word");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
