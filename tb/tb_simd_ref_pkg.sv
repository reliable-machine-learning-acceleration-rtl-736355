// Reference model of the SIMD unit for the testbenches, written with plain
// integers and independently of the RTL: lane operations, swizzle, masking,
// the reduction tree, the immediate table and instruction encoders.
package tb_simd_ref_pkg;

  function automatic int sx8(input logic [7:0] v);
    return (v >= 128) ? int'(v) - 256 : int'(v);
  endfunction

  function automatic logic [7:0] clamp(input int v, input int lo, input int hi);
    int r;
    r = (v < lo) ? lo : (v > hi) ? hi : v;
    return r[7:0];
  endfunction

  // stage-1 lane operation, opcode numbering as documented for the unit
  function automatic logic [7:0] lane_ref(input int op, input logic [7:0] a, input logic [7:0] b);
    int sa, sb, ua, ub;
    sa = sx8(a); sb = sx8(b); ua = int'(a); ub = int'(b);
    case (op)
      0:  return a;
      1:  return 8'(ua + ub);
      2:  return clamp(sa + sb, -128, 127);
      3:  return clamp(ua + ub, 0, 255);
      4:  return 8'(ua - ub);
      5:  return clamp(sa - sb, -128, 127);
      6:  return clamp(ua - ub, 0, 255);
      7:  return 8'(ua * ub);
      8:  return clamp(sa * sb, -128, 127);
      9:  return clamp(ua * ub, 0, 255);
      10: return (sa >= sb) ? a : b;
      11: return (sa <= sb) ? a : b;
      12: return a & b;
      13: return a | b;
      14: return a ^ b;
      default: return ~(a ^ b);
    endcase
  endfunction

  function automatic logic [7:0] comp(input logic [31:0] v, input int i);
    return v[8*i +: 8];
  endfunction

  // swizzle: 3 bits per lane {zero, sel[1:0]}, lane 0 in bits 2:0
  function automatic logic [31:0] swz_ref(input logic [31:0] v, input logic [11:0] s);
    logic [31:0] r;
    for (int i = 0; i < 4; i++) begin
      int sel;
      sel = int'(s[3*i +: 2]);
      r[8*i +: 8] = s[3*i+2] ? 8'h00 : comp(v, sel);
    end
    return r;
  endfunction

  function automatic logic [7:0] node_ref(input int op, input logic [7:0] x, input logic [7:0] y);
    case (op)
      1: return 8'(int'(x) + int'(y));
      2: return clamp(sx8(x) + sx8(y), -128, 127);
      3: return (sx8(x) >= sx8(y)) ? x : y;
      4: return (sx8(x) <= sx8(y)) ? x : y;
      5: return x ^ y;
      default: return x;
    endcase
  endfunction

  function automatic logic [31:0] reduce_ref(input int op, input logic [31:0] v);
    logic [7:0] r;
    if (op < 1 || op > 5) return v;
    r = node_ref(op, node_ref(op, comp(v, 3), comp(v, 2)), node_ref(op, comp(v, 1), comp(v, 0)));
    return {4{r}};
  endfunction

  // %scr: [3:0] mask, [15:4] swizzle A, [27:16] swizzle B
  function automatic logic [31:0] s1_ref(input int op1, input logic [31:0] a, input logic [31:0] b,
                                         input logic [31:0] scr);
    logic [31:0] sa, sb, r;
    sa = swz_ref(a, scr[15:4]);
    sb = swz_ref(b, scr[27:16]);
    for (int i = 0; i < 4; i++)
      r[8*i +: 8] = scr[i] ? lane_ref(op1, comp(sa, i), comp(sb, i)) : comp(a, i);
    return r;
  endfunction

  function automatic logic [31:0] simd_ref(input int op1, input int op2, input logic [31:0] a,
                                           input logic [31:0] b, input logic [31:0] scr);
    return reduce_ref(op2, s1_ref(op1, a, b, scr));
  endfunction

  // immediate code: kind = code[4:3], k = code[2:0]
  function automatic logic [7:0] imm_ref(input int code);
    int k, p;
    k = code % 8;
    p = 1;
    for (int i = 0; i < k; i++) p = p * 2;
    case ((code / 8) % 4)
      0: return 8'(p);
      1: return 8'(p - 1);
      2: return 8'(p + 1);
      default: return 8'h00;
    endcase
  endfunction

  localparam logic [31:0] SCR_IDENT = {4'h0, 12'b011_010_001_000, 12'b011_010_001_000, 4'hF};

  function automatic logic [31:0] enc_simd(input int op1, input int op2, input int rd, input int rs1,
                                           input bit imm, input int rs2_or_code);
    return {2'b10, 5'(rd), 6'h2D, 5'(rs1), imm, 4'(op1), 3'(op2), 1'b0, 5'(rs2_or_code)};
  endfunction

  function automatic logic [31:0] enc_wrscr(input int rs1, input bit imm, input int rs2_or_simm);
    if (imm) return {2'b10, 5'd22, 6'h30, 5'(rs1), 1'b1, 13'(rs2_or_simm)};
    else     return {2'b10, 5'd22, 6'h30, 5'(rs1), 1'b0, 8'h00, 5'(rs2_or_simm)};
  endfunction

  // a plain SPARC add (op3 = 0) for contrast
  function automatic logic [31:0] enc_add(input int rd, input int rs1, input int rs2);
    return {2'b10, 5'(rd), 6'h00, 5'(rs1), 1'b0, 8'h00, 5'(rs2)};
  endfunction

endpackage
