// Fully connected binary layer built from one fully connected cell.
// start_i captures the input feature vector data_in (N_IN bits) into the
// layer's feature buffer. An address counter then walks the weight memory
// neuron by neuron, one W-bit word at a time (address = neuron*WORDS + word,
// WORDS = ceil(N_IN/W)). Each word takes two cycles: one to present the
// address to the synchronous block RAM, one to XNOR the returned weights with
// the matching feature word and count the matches. The accumulator sums the
// counts of a neuron and applies the sign function, writing the neuron's bit
// of activation. finish_fc pulses once all N_OUT activations are valid; a
// layer takes 2*N_OUT*WORDS + 2 cycles from start_i to finish_fc.
// Weights are loaded through wt_we_i/wt_addr_i/wt_data_i while the layer is
// idle (busy_o low). The cell structure, the address counter and the two
// cycles per weight word follow the source; the word width W, the feature
// register and the handshake are this design's choices. The port names
// clk_fc, data_in, activation and finish_fc are those of the source's layer
// schematic.
module bnn_fc_layer
  import bnn_pkg::*;
#(
  parameter int unsigned N_IN   = 512,
  parameter int unsigned N_OUT  = 512,
  parameter int unsigned W      = 8,
  parameter int unsigned WORDS  = ceil_div(N_IN, W),
  parameter int unsigned DEPTH  = N_OUT * WORDS,
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk_fc,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [N_IN-1:0]   data_in,
  input  logic              wt_we_i,
  input  logic [ADDR_W-1:0] wt_addr_i,
  input  logic [W-1:0]      wt_data_i,
  output logic [N_OUT-1:0]  activation,
  output logic              finish_fc,
  output logic              busy_o
);

  localparam int unsigned CW = $clog2(W + 1);
  localparam int unsigned NW = (N_OUT > 1) ? $clog2(N_OUT) : 1;
  localparam int unsigned KW = (WORDS > 1) ? $clog2(WORDS) : 1;

  typedef enum logic [1:0] {IDLE, ADDR, DATA, DRAIN} state_e;

  state_e               state_q;
  logic [WORDS*W-1:0]   feat_q;        // feature map buffer, zero padded
  logic [ADDR_W-1:0]    addr_q;        // address counter
  logic [NW-1:0]        neuron_q;
  logic [KW-1:0]        word_q;
  logic                 word_first, word_last, neuron_last;

  // tags travelling with the popcount result
  logic                 pc_valid_q, pc_first_q, pc_last_q;
  logic [NW-1:0]        pc_neuron_q;

  logic [W-1:0]         douta, feat_word, vmask;
  logic [CW-1:0]        pc_res;
  logic                 act_valid;

  assign word_first  = word_q == '0;
  assign word_last   = word_q == KW'(WORDS - 1);
  assign neuron_last = neuron_q == NW'(N_OUT - 1);
  assign feat_word   = feat_q[word_q*W +: W];

  always_comb begin
    for (int i = 0; i < W; i++)
      vmask[i] = (int'(word_q) * W + i) < N_IN;
  end

  always_ff @(posedge clk_fc or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= IDLE;
      feat_q      <= '0;
      addr_q      <= '0;
      neuron_q    <= '0;
      word_q      <= '0;
      pc_valid_q  <= 1'b0;
      pc_first_q  <= 1'b0;
      pc_last_q   <= 1'b0;
      pc_neuron_q <= '0;
    end else begin
      pc_valid_q <= 1'b0;
      unique case (state_q)
        IDLE: if (start_i) begin
          feat_q   <= (WORDS*W)'(data_in);
          addr_q   <= '0;
          neuron_q <= '0;
          word_q   <= '0;
          state_q  <= ADDR;
        end
        ADDR: state_q <= DATA;
        DATA: begin
          pc_valid_q  <= 1'b1;
          pc_first_q  <= word_first;
          pc_last_q   <= word_last;
          pc_neuron_q <= neuron_q;
          addr_q      <= addr_q + 1'b1;
          if (word_last) begin
            word_q <= '0;
            if (neuron_last) state_q <= DRAIN;
            else begin
              neuron_q <= neuron_q + 1'b1;
              state_q  <= ADDR;
            end
          end else begin
            word_q  <= word_q + 1'b1;
            state_q <= ADDR;
          end
        end
        DRAIN: if (act_valid) state_q <= IDLE;
        default: state_q <= IDLE;
      endcase
    end
  end

  assign busy_o = state_q != IDLE;
  assign finish_fc = (state_q == DRAIN) && act_valid;

  bnn_weight_mem #(.DATA_W(W), .DEPTH(DEPTH), .ADDR_W(ADDR_W)) u_weights (
    .clka  (clk_fc),
    .wea   (wt_we_i && !busy_o),
    .addra (busy_o ? addr_q : wt_addr_i),
    .dina  (wt_data_i),
    .douta (douta)
  );

  bnn_xnor_popcount #(.W(W), .CW(CW)) u_xnor_pop (
    .clk_xn (clk_fc),
    .en     (state_q == DATA),
    .d_in   (feat_word),
    .wei    (douta),
    .vmask  (vmask),
    .res    (pc_res)
  );

  bnn_accumulator #(.N_IN(N_IN), .N_OUT(N_OUT), .CW(CW), .NW(NW)) u_acc (
    .clk       (clk_fc),
    .rst_n     (rst_n),
    .add_en    (pc_valid_q),
    .first     (pc_first_q),
    .last      (pc_last_q),
    .neuron_i  (pc_neuron_q),
    .w1        (pc_res),
    .c         (activation),
    .act_valid (act_valid)
  );

endmodule
