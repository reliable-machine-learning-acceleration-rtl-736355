// Block RAM holding the binary weights of one fully connected layer, one
// DATA_W-bit word per address. Single port, synchronous: douta shows the word
// at the address sampled on the previous rising edge of clka (read-first when
// written). The write port (wea/dina) loads trained weights before inference.
// Written as an array so that FPGA tools infer block RAM. The source gives
// the block's role and its clka/addra/douta ports; the loading port and
// read-first behaviour are this design's choices.
module bnn_weight_mem #(
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 32768,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clka,
  input  logic              wea,
  input  logic [ADDR_W-1:0] addra,
  input  logic [DATA_W-1:0] dina,
  output logic [DATA_W-1:0] douta
);

  logic [DATA_W-1:0] ram [DEPTH];

  always_ff @(posedge clka) begin
    douta <= ram[addra];
    if (wea) ram[addra] <= dina;
  end

endmodule
