// Testbench model of the host integer pipeline around the SIMD extension: it holds the register file,
// issues one instruction per cycle into the execute stage, forwards results
// that are final in the execute stage, writes back the memory-stage result
// and re-issues an instruction when the unit asks for a dependency stall.
// A program-order model of the instruction set computes every expected result.
// Directed sequences (saturating vector add, dot product with a dependent
// instruction, predicate masking, swizzle, immediates) are followed by a long
// random program of N_RANDOM instructions with random pipeline holds.
// It counts its checks and failures and how often each mechanism occurred
// (dependency stall, execute-stage forward, reduction, hold, %scr write,
// masked lane, swizzle, saturation, immediate operand), and raises done.
module tb_simd_host
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;
#(
  parameter int N_RANDOM = 3000
) (
  input  logic        clk,
  output logic        rst_n,
  output logic        hold,
  output logic        ex_valid,
  output logic [31:0] inst,
  output logic [31:0] rs1v,
  output logic [31:0] rs2v,
  input  logic        is_simd,
  input  logic        fwd_valid,
  input  logic [31:0] ex_result,
  input  logic        dep_stall,
  input  logic        wb_valid,
  input  logic [4:0]  wb_rd,
  input  logic [31:0] wb_data,
  input  scr_t        scr,
  output logic        done,
  output int          checks,
  output int          failures
);

  int n_mask = 0, n_swz = 0, n_sat = 0, n_imm = 0;
  int n_stall = 0, n_fwd = 0, n_reduce = 0, n_hold = 0, n_scr = 0;
  logic [31:0] pregs [32];    // register file seen by the pipeline
  logic [31:0] aregs [32];    // program-order model
  logic [31:0] ascr;
  logic [32:0] exp_q [$];      // {forwarded, value}
  int          seq_q [$];      // issue number of each queued result
  int          last_writer [32];
  int          seq = 0;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (t=%0t inst %h)", what, got, exp, $time, inst);
    end
  endtask

  // program-order semantics of one instruction
  function automatic logic [31:0] model(input logic [31:0] w, output bit writes, output bit simd);
    logic [31:0] a, b;
    int op1, op2;
    a = aregs[w[18:14]];
    writes = 0; simd = 0;
    if (w[31:30] == 2'b10 && w[24:19] == 6'h2D) begin
      b = w[13] ? {4{imm_ref(int'(w[4:0]))}} : aregs[w[4:0]];
      op1 = int'(w[12:9]); op2 = int'(w[8:6]);
      writes = 1; simd = 1;
      return simd_ref(op1, op2, a, b, ascr);
    end
    if (w[31:30] == 2'b10 && w[24:19] == 6'h30 && w[29:25] == 5'd22) begin
      b = w[13] ? {{19{w[12]}}, w[12:0]} : aregs[w[4:0]];
      ascr = a ^ b;
      return 0;
    end
    return 0;
  endfunction

  // run one instruction through the pipeline; returns when accepted
  task automatic issue(input logic [31:0] w);
    bit writes, simd;
    logic [31:0] exp;
    forever begin
      @(negedge clk);
      hold = 1'b0;
      if (($urandom % 8) == 0 && checks > 100) begin
        hold = 1'b1;
        n_hold++;
      end
      ex_valid = 1'b1;
      inst = w;
      rs1v = pregs[w[18:14]];
      rs2v = pregs[w[4:0]];
      #1;
      if (!dep_stall && !hold) break;
      if (dep_stall) n_stall++;
    end
    if (w[31:30] == 2'b10 && w[24:19] == 6'h2D) begin
      if (ascr[3:0] != 4'hF) n_mask++;
      if (ascr[27:4] != SCR_IDENT[27:4]) n_swz++;
      if (w[13]) n_imm++;
      if (w[12:9] inside {4'd2, 4'd3, 4'd5, 4'd6, 4'd8, 4'd9} || w[8:6] == 3'd2) n_sat++;
    end
    exp = model(w, writes, simd);
    check(is_simd, simd, "is_simd");
    if (simd) begin
      exp_q.push_back({fwd_valid, exp});
      seq++;
      seq_q.push_back(seq);
      last_writer[w[29:25]] = seq;
      aregs[w[29:25]] = (w[29:25] == 0) ? 32'h0 : exp;
      check(fwd_valid, w[8:6] == 0 || w[8:6] > 5, "forward flag");
      if (fwd_valid) begin
        check(ex_result, exp, "execute-stage result");
        n_fwd++;
        if (w[29:25] != 0) pregs[w[29:25]] = ex_result;
      end else n_reduce++;
    end else if (w[24:19] == 6'h30) n_scr++;
  endtask

  // write-back from the memory stage
  always @(posedge clk) begin
    if (rst_n && wb_valid && !hold) begin
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected write-back");
      end else begin
        logic [32:0] e;
        int          sq;
        e  = exp_q.pop_front();
        sq = seq_q.pop_front();
        check(wb_data, e[31:0], "write-back result");
        // forwarded results reached the register file at issue; a younger
        // instruction may already have overwritten the register
        if (wb_rd != 0 && !e[32] && last_writer[wb_rd] == sq) pregs[wb_rd] <= wb_data;
      end
    end
  end

  task automatic setreg(input int r, input logic [31:0] v);
    pregs[r] = v; aregs[r] = v;
  endtask

  initial begin
    checks = 0; failures = 0; done = 0; rst_n = 0; hold = 0; ex_valid = 0;
    for (int r = 0; r < 32; r++) begin setreg(r, 0); last_writer[r] = 0; end
    ascr = SCR_IDENT;
    inst = 0; rs1v = 0; rs2v = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(32'(scr), SCR_IDENT, "reset scr");
    // vector addition with unsigned saturation: %g6 = %g4 + %g5
    setreg(4, 32'h10_F0_80_01); setreg(5, 32'h20_20_90_01);
    issue(enc_simd(3, 0, 6, 4, 0, 5));
    // dot product: multiply per component and sum, then use the result at once
    setreg(7, 32'h01_02_03_04); setreg(8, 32'h05_06_07_08);
    issue(enc_simd(7, 1, 9, 7, 0, 8));
    issue(enc_simd(1, 0, 10, 9, 1, 5'b00_001));     // %l2 = %g9 + 2 per component
    // predicate mask 0101, identity swizzle: write %scr = %g0 ^ simm13
    issue(enc_wrscr(0, 1, 13'(SCR_IDENT & 32'hFFFFFFF5)));
    issue(enc_simd(1, 0, 11, 7, 0, 8));
    // broadcast component 3 of B into every lane, all lanes written
    setreg(12, {4'h0, 12'b011_011_011_011, 12'b011_010_001_000, 4'hF});
    issue(enc_wrscr(12, 0, 0));
    issue(enc_simd(8, 0, 13, 7, 0, 8));
    issue(enc_simd(0, 3, 14, 8, 0, 0));             // max over components
    issue(enc_wrscr(0, 1, 0));                      // %scr = 0: all lanes masked
    issue(enc_simd(1, 0, 15, 7, 0, 8));
    setreg(16, SCR_IDENT); issue(enc_wrscr(16, 0, 0));
    issue(enc_add(3, 1, 2));                        // plain SPARC add: not claimed
    // random program
    for (int n = 0; n < N_RANDOM; n++) begin
      int k;
      k = $urandom % 10;
      if (k == 0) begin
        setreg(17, {4'h0, 28'($urandom)} | 32'h1);
        issue(enc_wrscr(17, 0, 0));
      end else if (k == 1) issue(enc_add($urandom % 32, $urandom % 32, $urandom % 32));
      else issue(enc_simd($urandom % 16, $urandom % 8, 1 + $urandom % 7, $urandom % 8,
                          ($urandom % 3) == 0, $urandom % 8));
    end
    @(negedge clk);
    ex_valid = 0; hold = 0;
    repeat (3) @(negedge clk);
    for (int r = 1; r < 32; r++) check(pregs[r], aregs[r], "final register file");
    check(exp_q.size(), 0, "all results written back");
    check(32'(scr), ascr, "final scr");
    // each mechanism must have occurred
    checks++; if (n_stall == 0)  begin failures++; $display("FAIL no dependency stall"); end
    checks++; if (n_fwd == 0)    begin failures++; $display("FAIL no execute-stage forward"); end
    checks++; if (n_reduce == 0) begin failures++; $display("FAIL no reduction"); end
    checks++; if (n_hold == 0)   begin failures++; $display("FAIL no hold"); end
    checks++; if (n_scr == 0)    begin failures++; $display("FAIL no scr write"); end
    checks++; if (n_mask == 0)   begin failures++; $display("FAIL no masked lane"); end
    checks++; if (n_swz == 0)    begin failures++; $display("FAIL no swizzle"); end
    checks++; if (n_sat == 0)    begin failures++; $display("FAIL no saturating operation"); end
    checks++; if (n_imm == 0)    begin failures++; $display("FAIL no immediate operand"); end
    $display("SIMD: stalls=%0d forwards=%0d reductions=%0d holds=%0d scr_writes=%0d masked=%0d swizzled=%0d saturating=%0d immediates=%0d",
             n_stall, n_fwd, n_reduce, n_hold, n_scr, n_mask, n_swz, n_sat, n_imm);
    done = 1;
  end
endmodule
