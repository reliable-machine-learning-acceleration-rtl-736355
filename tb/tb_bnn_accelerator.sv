// Self-checking test of the BNN accelerator with a three-layer network
// (100 inputs, layers of 24, 16 and 3 neurons, 8-bit weight words, 64-bit
// bus, 2-word input FIFO), driven by the host model tb_bnn_host: weight
// loading, inferences with the input before and after start and with a full
// FIFO, result words and cycle counts against the reference model.
module tb_bnn_accelerator;
  localparam int L = 3;
  localparam int unsigned LN [L+1] = '{100, 24, 16, 3};
  localparam int W = 8, BUS = 64;

  logic clk = 0, rst, start, din_v, wt_we, full, op_ready, finish, busy, done;
  logic [BUS-1:0] din, dout;
  logic [1:0] wt_layer;
  logic [15:0] wt_addr;
  logic [W-1:0] wt_data;
  int checks, failures, n_wait, n_full, n_infer;

  bnn_accelerator #(.NUM_LAYERS(L), .LAYER_N(LN), .W(W), .BUS_W(BUS), .FIFO_DEPTH(2), .WT_ADDR_W(16)) dut (
    .clock_accelerator(clk), .reset_accelerator(rst), .start_accelerator(start),
    .data_in(din), .data_in_valid(din_v), .buf_full(full),
    .wt_we(wt_we), .wt_layer(wt_layer), .wt_addr(wt_addr), .wt_data(wt_data),
    .data_out(dout), .op_ready(op_ready), .finish_accelerator(finish), .busy(busy));

  tb_bnn_host #(.L(L), .LN(LN), .W(W), .BUS(BUS), .FIFO_DEPTH(2), .WT_ADDR_W(16), .ROUNDS(2)) host (
    .clk(clk), .rst(rst), .start(start), .din(din), .din_v(din_v), .full(full),
    .wt_we(wt_we), .wt_layer(wt_layer), .wt_addr(wt_addr), .wt_data(wt_data),
    .dout(dout), .op_ready(op_ready), .finish(finish), .busy(busy), .done(done),
    .checks(checks), .failures(failures), .n_wait(n_wait), .n_full(n_full), .n_infer(n_infer));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int f;
    #1;
    wait (done === 1'b1);
    f = failures;
    if (n_wait == 0) begin f++; $display("FAIL loader never waited"); end
    if (n_full == 0) begin f++; $display("FAIL FIFO never full"); end
    if (n_infer != 8) begin f++; $display("FAIL %0d inferences instead of 8", n_infer); end
    $display("TB_RESULT checks=%0d failures=%0d", checks + 3, f);
    $finish;
  end
endmodule
