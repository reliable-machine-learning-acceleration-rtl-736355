// Self-checking test of the fully connected binary layer in two shapes: a
// 20-input, 6-neuron layer with 8-bit weight words (the last word partial) and
// a 3-input, 3-neuron layer with 3-bit words as in the single-cell schematic.
// Random weights are loaded through the load port, random feature vectors are
// classified, and every activation and the cycle count from start to done
// (2 * neurons * words + 2) are compared with the reference model.
module tb_bnn_fc_layer;
  import tb_bnn_ref_pkg::*;

  localparam int NI_A = 20, NO_A = 6, W_A = 8, WD_A = 3;
  localparam int NI_B = 3,  NO_B = 3, W_B = 3, WD_B = 1;

  logic clk = 0, rst_n = 0;
  logic start_a = 0, start_b = 0, we_a = 0, we_b = 0;
  logic [NI_A-1:0] feat_a;
  logic [NI_B-1:0] feat_b;
  logic [4:0] addr_a;
  logic [1:0] addr_b;
  logic [W_A-1:0] wd_a;
  logic [W_B-1:0] wd_b;
  logic [NO_A-1:0] act_a;
  logic [NO_B-1:0] act_b;
  logic done_a, done_b, busy_a, busy_b;
  int checks = 0, failures = 0;

  bnn_fc_layer #(.N_IN(NI_A), .N_OUT(NO_A), .W(W_A)) dut_a (
    .clk_fc(clk), .rst_n(rst_n), .start_i(start_a), .data_in(feat_a), .wt_we_i(we_a),
    .wt_addr_i(addr_a), .wt_data_i(wd_a), .activation(act_a), .finish_fc(done_a), .busy_o(busy_a));
  bnn_fc_layer #(.N_IN(NI_B), .N_OUT(NO_B), .W(W_B)) dut_b (
    .clk_fc(clk), .rst_n(rst_n), .start_i(start_b), .data_in(feat_b), .wt_we_i(we_b),
    .wt_addr_i(addr_b), .wt_data_i(wd_b), .activation(act_b), .finish_fc(done_b), .busy_o(busy_b));

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bitvec_t wa, wb, xa, xb, ya, yb;

  initial begin
    feat_a = 0; feat_b = 0; addr_a = 0; addr_b = 0; wd_a = 0; wd_b = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      int cyc;
      // new weights every fifth round
      if (round % 5 == 0) begin
        wa = random_bits(NI_A * NO_A);
        wb = random_bits(NI_B * NO_B);
        for (int j = 0; j < NO_A; j++)
          for (int k = 0; k < WD_A; k++) begin
            @(negedge clk);
            we_a = 1; addr_a = 5'(j * WD_A + k); wd_a = W_A'(weight_word(wa, NI_A, j, k, W_A));
          end
        for (int j = 0; j < NO_B; j++) begin
          @(negedge clk);
          we_a = 0; we_b = 1; addr_b = 2'(j); wd_b = W_B'(weight_word(wb, NI_B, j, 0, W_B));
        end
        @(negedge clk) we_b = 0;
      end
      xa = random_bits(NI_A);
      xb = random_bits(NI_B);
      foreach (xa[i]) feat_a[i] = xa[i];
      foreach (xb[i]) feat_b[i] = xb[i];
      ya = layer_ref(xa, wa, NI_A, NO_A);
      yb = layer_ref(xb, wb, NI_B, NO_B);
      start_a = 1; start_b = 1;
      @(negedge clk);
      start_a = 0; start_b = 0;
      feat_a = ~feat_a;      // the layer must have captured its input
      cyc = 1;
      while (!done_a) begin
        @(negedge clk);
        cyc++;
        if (cyc == 2 * NO_B * WD_B + 2) begin
          check(int'(done_b), 1, "small layer done on time");
          foreach (yb[j]) check(int'(act_b[j]), int'(yb[j]), "small layer activation");
        end
        if (cyc > 1000) break;
      end
      check(cyc, 2 * NO_A * WD_A + 2, "cycles from start to done");
      foreach (ya[j]) check(int'(act_a[j]), int'(ya[j]), "activation");
      @(negedge clk);
      check(int'(busy_a), 0, "idle the cycle after done");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
