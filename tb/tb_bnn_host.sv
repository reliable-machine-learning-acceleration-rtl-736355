// Testbench model of the host side of the BNN accelerator. It loads random
// weights into every layer, then runs four inferences per round: input
// written before start, start before the input (the loader must wait on the
// empty FIFO), input written and FIFO fullness checked, and once more input
// first. Each result word is compared with a chain of reference layers, and
// the cycle count from start to finish is checked against
// 1 + input words + sum(2 * neurons * words + 2) + 1 + output words.
// It reports its checks, failures and mechanism counts and raises done.
module tb_bnn_host
  import tb_bnn_ref_pkg::*;
#(
  parameter int L = 3,
  parameter int unsigned LN [L+1] = '{100, 24, 16, 3},
  parameter int W = 8,
  parameter int BUS = 64,
  parameter int FIFO_DEPTH = 2,
  parameter int WT_ADDR_W = 16,
  parameter int LSEL_W = (L > 1) ? $clog2(L) : 1,
  parameter int ROUNDS = 2
) (
  input  logic                 clk,
  output logic                 rst,
  output logic                 start,
  output logic [BUS-1:0]       din,
  output logic                 din_v,
  input  logic                 full,
  output logic                 wt_we,
  output logic [LSEL_W-1:0]    wt_layer,
  output logic [WT_ADDR_W-1:0] wt_addr,
  output logic [W-1:0]         wt_data,
  input  logic [BUS-1:0]       dout,
  input  logic                 op_ready,
  input  logic                 finish,
  input  logic                 busy,
  output logic                 done,
  output int                   checks,
  output int                   failures,
  output int                   n_wait,
  output int                   n_full,
  output int                   n_infer
);

  localparam int IN_WORDS  = (LN[0] + BUS - 1) / BUS;
  localparam int OUT_WORDS = (LN[L] + BUS - 1) / BUS;


  task automatic check(input longint got, input longint exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  bitvec_t wts [L];
  int expected_cycles;

  task automatic push_word(input logic [BUS-1:0] v);
    @(negedge clk);
    check(full, 0, "room in FIFO");
    din = v; din_v = 1;
    @(negedge clk);
    din_v = 0;
  endtask

  // mode 0: input first; mode 1: start first, input later; mode 2: input, check full
  task automatic infer(input int mode);
    bitvec_t x, y;
    logic [IN_WORDS*BUS-1:0] xv;
    int cyc, got_words;
    x = random_bits(LN[0]);
    xv = '0;
    foreach (x[i]) xv[i] = x[i];
    y = x;
    for (int l = 0; l < L; l++) y = layer_ref(y, wts[l], LN[l], LN[l+1]);
    if (mode != 1) begin
      for (int k = 0; k < IN_WORDS; k++) push_word(xv[k*BUS +: BUS]);
      if (full) n_full++;
      if (mode == 2) check(full, IN_WORDS >= FIFO_DEPTH, "FIFO full after the input words");
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    if (mode == 1) begin
      repeat (5) begin
        @(negedge clk);
        cyc++;
        check(busy, 1, "waiting for input");
        n_wait++;
      end
      for (int k = 0; k < IN_WORDS; k++) push_word(xv[k*BUS +: BUS]);
    end
    got_words = 0;
    while (!finish && cyc < expected_cycles + 100) begin
      if (op_ready) begin
        logic [BUS-1:0] e;
        e = '0;
        for (int b = 0; b < BUS; b++)
          if (got_words * BUS + b < int'(LN[L])) e[b] = y[got_words * BUS + b];
        check(dout, e, "result word");
        got_words++;
      end
      @(negedge clk);
      cyc++;
    end
    check(got_words, OUT_WORDS, "number of result words");
    if (mode != 1) check(cyc, expected_cycles, "cycles from start to finish");
    @(negedge clk);
    check(busy, 0, "idle after finish");
    n_infer++;
  endtask

  initial begin
    checks = 0; failures = 0; n_wait = 0; n_full = 0; n_infer = 0; done = 0;
    rst = 1; start = 0; din_v = 0; wt_we = 0;
    din = 0; wt_layer = 0; wt_addr = 0; wt_data = 0;
    expected_cycles = 1 + IN_WORDS + 1 + OUT_WORDS;
    for (int l = 0; l < L; l++) expected_cycles += 2 * LN[l+1] * ((LN[l] + W - 1) / W) + 2;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int round = 0; round < ROUNDS; round++) begin
      for (int l = 0; l < L; l++) begin
        int wd;
        wts[l] = random_bits(LN[l] * LN[l+1]);
        wd = (LN[l] + W - 1) / W;
        for (int j = 0; j < int'(LN[l+1]); j++)
          for (int k = 0; k < wd; k++) begin
            @(negedge clk);
            wt_we = 1; wt_layer = LSEL_W'(l); wt_addr = WT_ADDR_W'(j * wd + k);
            wt_data = W'(weight_word(wts[l], LN[l], j, k, W));
          end
      end
      @(negedge clk) wt_we = 0;
      infer(0);
      infer(1);
      infer(2);
      infer(0);
    end
    $display("BNN: inferences=%0d loader_waits=%0d fifo_full=%0d", n_infer, n_wait, n_full);
    done = 1;
  end
endmodule
