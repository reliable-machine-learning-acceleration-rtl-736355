// Self-checking test of the SIMD instruction decoder: register and immediate
// forms with all immediate codes, writes to %scr, and ordinary SPARC
// instructions that must not be claimed.
module tb_simd_decoder;
  import simd_pkg::*;
  import tb_simd_ref_pkg::*;

  logic [31:0] inst;
  simd_dec_t   d;
  int checks = 0, failures = 0;

  simd_decoder dut (.inst_i(inst), .dec_o(d));

  task automatic check(input logic [63:0] got, input logic [63:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (inst %h): got %h expected %h", what, inst, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      int op1, op2, rd, rs1, rs2;
      op1 = $urandom % 16; op2 = $urandom % 8; rd = $urandom % 32; rs1 = $urandom % 32; rs2 = $urandom % 32;
      inst = enc_simd(op1, op2, rd, rs1, 0, rs2);
      #1;
      check(d.is_simd, 1, "is_simd"); check(d.is_wr_scr, 0, "not wr");
      check(d.op1, op1, "op1"); check(d.op2, op2, "op2");
      check(d.rd, rd, "rd"); check(d.rs1, rs1, "rs1"); check(d.rs2, rs2, "rs2");
      check(d.use_imm, 0, "reg form");
      inst = enc_simd(op1, op2, rd, rs1, 1, n % 32);
      #1;
      check(d.use_imm, 1, "imm form");
      check(d.imm, {4{imm_ref(n % 32)}}, "imm value");
    end
    // powers of two and neighbours, spot values
    inst = enc_simd(1, 0, 1, 2, 1, 5'b00_111); #1 check(d.imm, 32'h80808080, "2^7");
    inst = enc_simd(1, 0, 1, 2, 1, 5'b01_011); #1 check(d.imm, 32'h07070707, "2^3-1");
    inst = enc_simd(1, 0, 1, 2, 1, 5'b10_100); #1 check(d.imm, 32'h11111111, "2^4+1");
    // write to %scr
    inst = enc_wrscr(7, 1, -2); #1;
    check(d.is_wr_scr, 1, "wr scr"); check(d.is_simd, 0, "wr not simd");
    check(d.imm, 32'hFFFFFFFE, "simm13"); check(d.rs1, 7, "wr rs1");
    // other ASR and plain instructions are not claimed
    inst = {2'b10, 5'd17, 6'h30, 5'd1, 1'b0, 8'h0, 5'd2}; #1;
    check(d.is_wr_scr, 0, "wr asr17"); check(d.is_simd, 0, "wr asr17 simd");
    for (int n = 0; n < 300; n++) begin
      inst = $urandom;
      #1;
      check(d.is_simd, (inst[31:30] == 2'b10 && inst[24:19] == 6'h2D), "random simd");
      check(d.is_wr_scr, (inst[31:30] == 2'b10 && inst[24:19] == 6'h30 && inst[29:25] == 5'd22), "random wr");
      if (!d.is_simd) begin
        check(d.op1, 0, "op1 zero"); check(d.op2, 0, "op2 zero");
      end
    end
    inst = enc_add(3, 1, 2); #1 check({d.is_simd, d.is_wr_scr}, 0, "add");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
