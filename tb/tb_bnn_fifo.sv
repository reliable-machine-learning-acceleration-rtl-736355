// Self-checking test of the input FIFO: random pushes and pops against a
// queue model, checking data order and the empty, full, almost-empty and
// almost-full flags, and the synchronous reset. Writes are never issued
// while the FIFO is full (the block asserts this rule).
module tb_bnn_fifo;
  localparam int WIDTH = 12, DEPTH = 5, AE = 1, AF = 4;

  logic clk = 0, rst = 1, we = 0, re = 0;
  logic [WIDTH-1:0] wd, rd;
  logic empty, full, ae, af;
  logic [WIDTH-1:0] model [$];
  int checks = 0, failures = 0, n_full = 0, n_empty_rd = 0;

  bnn_fifo #(.WIDTH(WIDTH), .DEPTH(DEPTH), .AE_LEVEL(AE), .AF_LEVEL(AF)) dut (
    .i_clk(clk), .i_rst_sync(rst), .i_wr_en(we), .i_wr_data(wd), .i_rd_en(re),
    .o_rd_data(rd), .o_empty(empty), .o_full(full), .o_ae(ae), .o_af(af));

  always #5 clk = ~clk;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wd = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      // flags and head of the FIFO
      check(empty, model.size() == 0, "empty");
      check(full, model.size() == DEPTH, "full");
      check(ae, model.size() <= AE, "almost empty");
      check(af, model.size() >= AF, "almost full");
      if (model.size() > 0) check(rd, model[0], "read data");
      if (full) n_full++;
      // phases biased towards filling and towards draining
      we = !full && ($urandom % 100) < ((n / 500) % 2 ? 30 : 70);
      re = ($urandom % 100) < ((n / 500) % 2 ? 70 : 30);
      if (re && empty) n_empty_rd++;
      wd = WIDTH'($urandom);
      if (n == 3000) begin
        rst = 1; we = 0; re = 0;
      end
      @(posedge clk);
      if (rst) model.delete();
      else begin
        if (re && model.size() > 0) void'(model.pop_front());
        if (we) model.push_back(wd);
      end
      #1 rst = 0;
    end
    checks++;
    if (n_full == 0 || n_empty_rd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
