// Workload test: signed 8-bit matrix multiplication C = A x B on the SIMD
// extension, for the square sizes 4, 8, 16 and 32.
//
// How it works: the testbench plays the host processor without pipelining.
// It keeps a 32-entry register file and issues one instruction at a time to
// simd_exec with an idle cycle in between, so neither forwarding nor the
// dependency stall comes into play. A loaded row chunk of A goes into r1 and a
// column chunk of B into r2, as the host's loads would leave them. For every
// element of C:
//   r4 = XOR  r4, r4              (clear the accumulator, single stage)
//   per chunk of four k:
//     r3 = MULS+SUMS r1, r2       (four saturated products, saturated sum tree)
//     r4 = ADDS r4, r3            (saturating accumulate; the sum is broadcast)
// The expected value is worked out here with plain integer arithmetic and the
// same saturation points: each product, each of the three tree nodes
// ((3+2) + (1+0)) and each accumulation are clamped to [-128, 127]. Entries
// of A and B lie in [-8, 7], so some elements saturate and most do not; the
// counts of both are reported and each must be non-zero.
//
// Timing checked: a single-stage instruction's result is final in the
// execute cycle (forwarding flag set); a two-stage one is not, and arrives
// one cycle later at the memory stage.
module tb_simd_matmul;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic clk = 0, rst_n, hold, ex_valid;
  logic [31:0] inst, rs1v, rs2v;
  logic is_simd, fwd_valid, dep_stall, wb_valid;
  logic [31:0] ex_result, wb_data;
  logic [4:0]  wb_rd;
  scr_t scr;
  int checks = 0, failures = 0;
  int n_sat = 0, n_plain = 0, n_instr = 0;

  logic [31:0] rf [32];

  simd_exec dut (
    .clk(clk), .rst_n(rst_n), .hold_i(hold), .ex_valid_i(ex_valid), .ex_inst_i(inst),
    .ex_rs1_val_i(rs1v), .ex_rs2_val_i(rs2v), .ex_is_simd_o(is_simd),
    .ex_fwd_valid_o(fwd_valid), .ex_result_o(ex_result), .ex_dep_stall_o(dep_stall),
    .wb_valid_o(wb_valid), .wb_rd_o(wb_rd), .wb_data_o(wb_data), .scr_o(scr));

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  function automatic int sat8(input int v);
    return (v > 127) ? 127 : (v < -128) ? -128 : v;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  // issue one instruction and retire it into the register file
  task automatic issue(input int op1, input int op2, input int rd, input int rs1, input int rs2);
    logic [31:0] res;
    @(negedge clk);
    inst = enc_simd(op1, op2, rd, rs1, 1'b0, rs2);
    rs1v = rf[rs1];
    rs2v = rf[rs2];
    ex_valid = 1'b1;
    #1;
    check(is_simd && !dep_stall, "instruction not taken as SIMD");
    check(fwd_valid == (op2 == 0), "forwarding flag does not match stage use");
    res = ex_result;
    @(negedge clk);
    ex_valid = 1'b0;
    check(wb_valid && wb_rd == 5'(rd), "no memory-stage result");
    if (op2 != 0) res = wb_data;
    else check(wb_data == res, "memory-stage copy differs from forwarded result");
    rf[rd] = res;
    n_instr++;
  endtask

  task automatic run_size(input int n);
    logic signed [7:0] a [32][32];
    logic signed [7:0] b [32][32];
    int exp_v, prod, hi, lo, part;
    bit sat;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        a[i][j] = 8'(int'($urandom_range(0, 15)) - 8);
        b[i][j] = 8'(int'($urandom_range(0, 15)) - 8);
      end
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        issue(S1_XOR, S2_NOP, 4, 4, 4);
        exp_v = 0;
        sat = 0;
        for (int k = 0; k < n; k += 4) begin
          int p [4];
          for (int l = 0; l < 4; l++) begin
            rf[1][8*l +: 8] = a[i][k+l];
            rf[2][8*l +: 8] = b[k+l][j];
            prod = int'(a[i][k+l]) * int'(b[k+l][j]);
            p[l] = sat8(prod);
            if (p[l] != prod) sat = 1;
          end
          hi = sat8(p[3] + p[2]);
          lo = sat8(p[1] + p[0]);
          part = sat8(hi + lo);
          if (hi != p[3] + p[2] || lo != p[1] + p[0] || part != hi + lo) sat = 1;
          issue(S1_MULS, S2_SUMS, 3, 1, 2);
          issue(S1_ADDS, S2_NOP, 4, 4, 3);
          if (sat8(exp_v + part) != exp_v + part) sat = 1;
          exp_v = sat8(exp_v + part);
        end
        for (int l = 0; l < 4; l++)
          check($signed(rf[4][8*l +: 8]) == exp_v,
                $sformatf("n=%0d C[%0d][%0d] lane %0d = %0d, expected %0d",
                          n, i, j, l, $signed(rf[4][8*l +: 8]), exp_v));
        if (sat) n_sat++; else n_plain++;
      end
  endtask

  initial begin
    rst_n = 1'b0;
    hold = 1'b0;
    ex_valid = 1'b0;
    inst = '0;
    rs1v = '0;
    rs2v = '0;
    for (int r = 0; r < 32; r++) rf[r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 4; n <= 32; n *= 2) begin
      int before_n;
      before_n = n_instr;
      run_size(n);
      $display("matmul %0dx%0d: %0d SIMD instructions", n, n, n_instr - before_n);
      check(n_instr - before_n == n * n * (1 + 2 * (n / 4)), "instruction count");
    end
    check(n_sat > 0, "no element saturated");
    check(n_plain > 0, "every element saturated");
    $display("elements with saturation %0d, without %0d", n_sat, n_plain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
