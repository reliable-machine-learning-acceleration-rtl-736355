// SIMD Control Register (%scr). Holds the predicate mask and the two swizzle
// vectors used by every SIMD instruction (layout in simd_pkg::scr_t). It is
// written by the SPARC write-ancillary-state-register instruction addressed to
// %scr; the written value is rs1 XOR operand2, computed by the decoder side.
// The write takes effect at the clock edge, so the next instruction sees the
// new value. Reset gives the identity swizzle with all lanes enabled (this
// design's choice; the source gives no reset value).
module simd_scr
  import simd_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en_i,
  input  logic [31:0] wr_data_i,
  output scr_t        scr_o
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       scr_o <= SCR_RESET;
    else if (wr_en_i) scr_o <= scr_t'(wr_data_i);
  end

endmodule
