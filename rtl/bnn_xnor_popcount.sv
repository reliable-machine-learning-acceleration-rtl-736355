// XNOR and bit count of the fully connected cell. In the cycle en is high it
// compares W feature bits d_in with W weight bits wei; res, registered, gives
// on the next edge the number of positions where they agree (XNOR = 1) among
// the positions whose bit in vmask is set (vmask clears the padding of a last,
// partial word). This is the binary replacement of W multiply-accumulates.
// XNOR plus count is the source's; the registered output and vmask are this
// design's.
module bnn_xnor_popcount #(
  parameter int unsigned W  = 8,
  parameter int unsigned CW = $clog2(W + 1)
) (
  input  logic          clk_xn,
  input  logic          en,
  input  logic [W-1:0]  d_in,
  input  logic [W-1:0]  wei,
  input  logic [W-1:0]  vmask,
  output logic [CW-1:0] res
);

  logic [W-1:0]  match;
  logic [CW-1:0] cnt;

  always_comb begin
    match = ~(d_in ^ wei) & vmask;
    cnt   = '0;
    for (int i = 0; i < W; i++) cnt += CW'(match[i]);
  end

  always_ff @(posedge clk_xn) begin
    if (en) res <= cnt;
  end

endmodule
