// Workload test of the BNN accelerator at the shapes of two classification
// networks, each on its own accelerator instance driven by the host model
// tb_bnn_host (random weights and inputs; every result word and the cycle
// count of every inference are checked against the reference layer chain):
//  * Iris-shaped: 4 features, each coded as an 8-bit thermometer code, give
//    32 input bits; one hidden layer of 16 neurons and 3 output neurons, one
//    per class: LAYER_N = '{32, 16, 3}.
//  * MNIST-shaped: a 28x28 image binarised to 784 input bits, a hidden layer
//    of 256 neurons and 10 output neurons: LAYER_N = '{784, 256, 10}. The
//    first layer has ceil(784/8) = 98 weight words per neuron.
// The input coding and the hidden layer sizes are this design's choices; the
// input and class counts are those of the two data sets. Both instances keep
// the default 8-bit weight words, 64-bit bus and 16-word input FIFO.
// Four inferences run on each; both must complete all four.
module tb_bnn_workloads;
  localparam int L = 2;
  localparam int unsigned LN_IRIS  [L+1] = '{32, 16, 3};
  localparam int unsigned LN_MNIST [L+1] = '{784, 256, 10};
  localparam int W = 8, BUS = 64, FD = 16;

  logic clk = 0;
  logic i_rst, i_start, i_din_v, i_wt_we, i_full, i_op_ready, i_finish, i_busy, i_done;
  logic m_rst, m_start, m_din_v, m_wt_we, m_full, m_op_ready, m_finish, m_busy, m_done;
  logic [BUS-1:0] i_din, i_dout, m_din, m_dout;
  logic [0:0] i_wt_layer, m_wt_layer;
  logic [15:0] i_wt_addr, m_wt_addr;
  logic [W-1:0] i_wt_data, m_wt_data;
  int i_checks, i_failures, i_n_wait, i_n_full, i_n_infer;
  int m_checks, m_failures, m_n_wait, m_n_full, m_n_infer;

  bnn_accelerator #(.NUM_LAYERS(L), .LAYER_N(LN_IRIS), .W(W), .BUS_W(BUS), .FIFO_DEPTH(FD), .WT_ADDR_W(16)) iris (
    .clock_accelerator(clk), .reset_accelerator(i_rst), .start_accelerator(i_start),
    .data_in(i_din), .data_in_valid(i_din_v), .buf_full(i_full),
    .wt_we(i_wt_we), .wt_layer(i_wt_layer), .wt_addr(i_wt_addr), .wt_data(i_wt_data),
    .data_out(i_dout), .op_ready(i_op_ready), .finish_accelerator(i_finish), .busy(i_busy));

  tb_bnn_host #(.L(L), .LN(LN_IRIS), .W(W), .BUS(BUS), .FIFO_DEPTH(FD), .WT_ADDR_W(16), .ROUNDS(1)) iris_host (
    .clk(clk), .rst(i_rst), .start(i_start), .din(i_din), .din_v(i_din_v), .full(i_full),
    .wt_we(i_wt_we), .wt_layer(i_wt_layer), .wt_addr(i_wt_addr), .wt_data(i_wt_data),
    .dout(i_dout), .op_ready(i_op_ready), .finish(i_finish), .busy(i_busy), .done(i_done),
    .checks(i_checks), .failures(i_failures), .n_wait(i_n_wait), .n_full(i_n_full), .n_infer(i_n_infer));

  bnn_accelerator #(.NUM_LAYERS(L), .LAYER_N(LN_MNIST), .W(W), .BUS_W(BUS), .FIFO_DEPTH(FD), .WT_ADDR_W(16)) mnist (
    .clock_accelerator(clk), .reset_accelerator(m_rst), .start_accelerator(m_start),
    .data_in(m_din), .data_in_valid(m_din_v), .buf_full(m_full),
    .wt_we(m_wt_we), .wt_layer(m_wt_layer), .wt_addr(m_wt_addr), .wt_data(m_wt_data),
    .data_out(m_dout), .op_ready(m_op_ready), .finish_accelerator(m_finish), .busy(m_busy));

  tb_bnn_host #(.L(L), .LN(LN_MNIST), .W(W), .BUS(BUS), .FIFO_DEPTH(FD), .WT_ADDR_W(16), .ROUNDS(1)) mnist_host (
    .clk(clk), .rst(m_rst), .start(m_start), .din(m_din), .din_v(m_din_v), .full(m_full),
    .wt_we(m_wt_we), .wt_layer(m_wt_layer), .wt_addr(m_wt_addr), .wt_data(m_wt_data),
    .dout(m_dout), .op_ready(m_op_ready), .finish(m_finish), .busy(m_busy), .done(m_done),
    .checks(m_checks), .failures(m_failures), .n_wait(m_n_wait), .n_full(m_n_full), .n_infer(m_n_infer));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", i_checks + m_checks, i_failures + m_failures + 1);
    $finish;
  end

  initial begin
    int f;
    #1;
    wait (i_done === 1'b1 && m_done === 1'b1);
    f = i_failures + m_failures;
    if (i_n_infer != 4) begin f++; $display("FAIL Iris-shaped: %0d inferences instead of 4", i_n_infer); end
    if (m_n_infer != 4) begin f++; $display("FAIL MNIST-shaped: %0d inferences instead of 4", m_n_infer); end
    $display("Iris-shaped: %0d checks, MNIST-shaped: %0d checks", i_checks, m_checks);
    $display("TB_RESULT checks=%0d failures=%0d", i_checks + m_checks + 2, f);
    $finish;
  end
endmodule
