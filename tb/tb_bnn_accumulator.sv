// Self-checking test of the accumulator and sign function: per-neuron match
// counts arrive as word counts; the activation must be 1 exactly when
// 2*p - n >= 0 (the tie 2*p = n included) and land at the neuron's bit.
module tb_bnn_accumulator;
  localparam int N_IN = 20, N_OUT = 7, W = 8, WORDS = 3, CW = 4, NW = 3;

  logic clk = 0, rst_n = 0, add = 0, first = 0, last = 0;
  logic [NW-1:0] nidx;
  logic [CW-1:0] cnt;
  logic [N_OUT-1:0] c;
  logic avalid;
  logic [N_OUT-1:0] exp_c;
  int checks = 0, failures = 0, n_tie = 0;

  bnn_accumulator #(.N_IN(N_IN), .N_OUT(N_OUT), .CW(CW), .NW(NW)) dut (
    .clk(clk), .rst_n(rst_n), .add_en(add), .first(first), .last(last),
    .neuron_i(nidx), .w1(cnt), .c(c), .act_valid(avalid));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    nidx = 0; cnt = 0; exp_c = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(int'(c), 0, "reset");
    for (int inf = 0; inf < 300; inf++) begin
      for (int j = 0; j < N_OUT; j++) begin
        int p;
        p = 0;
        for (int k = 0; k < WORDS; k++) begin
          int lim, v;
          lim = (k == WORDS - 1) ? N_IN - W * (WORDS - 1) : W;
          v = (inf % 5 == 0 && j == 0) ? ((k == 0) ? 8 : (k == 1) ? 2 : 0) : $urandom % (lim + 1);
          p += v;
          add = 1; first = (k == 0); last = (k == WORDS - 1); nidx = NW'(j); cnt = CW'(v);
          @(negedge clk);
          add = 0;
          if (k == WORDS - 1) begin
            check(int'(avalid), 1, "act_valid");
            exp_c[j] = (2 * p >= N_IN);
            if (2 * p == N_IN) n_tie++;
            check(int'(c[j]), int'(exp_c[j]), "activation");
          end else check(int'(avalid), 0, "no act_valid mid-neuron");
          // random idle cycle between words
          if ($urandom % 3 == 0) begin
            @(negedge clk);
            check(int'(avalid), 0, "act_valid is a pulse");
          end
        end
      end
      check(int'(c), int'(exp_c), "activation vector");
    end
    checks++;
    if (n_tie == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
