// Accumulator and sign function of the fully connected layer. For one neuron
// it adds the match counts of successive weight words (add_en; first restarts
// the sum). On the word flagged last it forms p, the number of matching bits
// over the whole feature vector of length N_IN, and the neuron's activation
// 1 if 2*p - N_IN >= 0 and 0 otherwise. The activation is stored at bit
// neuron_i of the activation vector c, which the layer hands to the next
// layer; act_valid pulses for one cycle after each neuron. Summation and the
// sign rule are the source's; treating 2*p - N_IN = 0 as positive is this
// design's choice. Single-cycle accumulate, registered outputs.
module bnn_accumulator #(
  parameter int unsigned N_IN  = 512,
  parameter int unsigned N_OUT = 512,
  parameter int unsigned CW    = 4,
  parameter int unsigned NW    = (N_OUT > 1) ? $clog2(N_OUT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             add_en,
  input  logic             first,
  input  logic             last,
  input  logic [NW-1:0]    neuron_i,
  input  logic [CW-1:0]    w1,          // match count of the current word
  output logic [N_OUT-1:0] c,
  output logic             act_valid
);

  localparam int unsigned AW = $clog2(N_IN + 1) + 1;

  logic [AW-1:0] acc_q, p;

  assign p = (first ? '0 : acc_q) + AW'(w1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      c         <= '0;
      act_valid <= 1'b0;
    end else begin
      act_valid <= 1'b0;
      if (add_en) begin
        acc_q <= p;
        if (last) begin
          c[neuron_i] <= ({p, 1'b0} >= (AW + 1)'(N_IN));
          act_valid   <= 1'b1;
        end
      end
    end
  end

endmodule
