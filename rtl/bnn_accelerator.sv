// Binary neural network inference accelerator for an FPGA attached to a host
// processor. The host streams the binary input feature vector as BUS_W-bit
// words (data_in with data_in_valid) into the input FIFO; word k carries
// feature bits [k*BUS_W +: BUS_W]. start_accelerator starts an inference: a
// loader pops ceil(LAYER_N[0]/BUS_W) words from the FIFO (waiting while it is
// empty) into the first layer's input, then the NUM_LAYERS fully connected
// layers run one after the other, each layer's activation vector being the
// next one's input. The last layer's activations are returned as
// ceil(LAYER_N[NUM_LAYERS]/BUS_W) words on data_out, one per cycle while
// op_ready is high, followed by a one-cycle finish_accelerator pulse.
// Weights are loaded beforehand through wt_we/wt_layer/wt_addr/wt_data
// (layer l, address neuron*ceil(N_in/W) + word). buf_full mirrors the input
// FIFO's full flag. The FIFO, the chain of fully connected layers and the
// port names data_in, data_out, start/reset/clock/finish_accelerator and
// buf_full follow the source's schematic; data_in_valid, the weight port and
// the word ordering are this design's. The default is the single 512x512
// layer used in the source's performance comparison.
module bnn_accelerator
  import bnn_pkg::*;
#(
  parameter int unsigned NUM_LAYERS = 1,
  parameter int unsigned LAYER_N [NUM_LAYERS+1] = '{512, 512},
  parameter int unsigned W          = 8,
  parameter int unsigned BUS_W      = 64,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned WT_ADDR_W  = 16,
  parameter int unsigned LSEL_W     = (NUM_LAYERS > 1) ? $clog2(NUM_LAYERS) : 1
) (
  input  logic                 clock_accelerator,
  input  logic                 reset_accelerator,     // synchronous, active high
  input  logic                 start_accelerator,
  input  logic [BUS_W-1:0]     data_in,
  input  logic                 data_in_valid,
  output logic                 buf_full,
  input  logic                 wt_we,
  input  logic [LSEL_W-1:0]    wt_layer,
  input  logic [WT_ADDR_W-1:0] wt_addr,
  input  logic [W-1:0]         wt_data,
  output logic [BUS_W-1:0]     data_out,
  output logic                 op_ready,
  output logic                 finish_accelerator,
  output logic                 busy
);

  function automatic int unsigned max_n();
    int unsigned m;
    m = 1;
    for (int l = 0; l <= NUM_LAYERS; l++) if (LAYER_N[l] > m) m = LAYER_N[l];
    return m;
  endfunction

  localparam int unsigned MAXN      = max_n();
  localparam int unsigned N0        = LAYER_N[0];
  localparam int unsigned NL        = LAYER_N[NUM_LAYERS];
  localparam int unsigned IN_WORDS  = ceil_div(N0, BUS_W);
  localparam int unsigned OUT_WORDS = ceil_div(NL, BUS_W);
  localparam int unsigned IWW       = $clog2(IN_WORDS + 1);
  localparam int unsigned OWW       = $clog2(OUT_WORDS + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_RUN, S_SEND} state_e;

  logic                 rst_n;
  state_e               state_q;
  logic [IWW-1:0]       in_cnt_q;
  logic [OWW-1:0]       out_cnt_q;
  logic [IN_WORDS*BUS_W-1:0]  in_vec_q;
  logic [OUT_WORDS*BUS_W-1:0] out_vec;

  logic [BUS_W-1:0]     fifo_data;
  logic                 fifo_empty, fifo_rd;

  // per-layer activation buses, sized to the widest layer
  logic [MAXN-1:0]        act [NUM_LAYERS+1];
  logic [NUM_LAYERS:0]    layer_start;
  logic [NUM_LAYERS-1:0]  layer_done;

  assign rst_n = !reset_accelerator;

  bnn_fifo #(.WIDTH(BUS_W), .DEPTH(FIFO_DEPTH)) u_feature_buffer (
    .i_clk      (clock_accelerator),
    .i_rst_sync (reset_accelerator),
    .i_wr_en    (data_in_valid && !buf_full),
    .i_wr_data  (data_in),
    .i_rd_en    (fifo_rd),
    .o_rd_data  (fifo_data),
    .o_empty    (fifo_empty),
    .o_full     (buf_full),
    .o_ae       (),
    .o_af       ()
  );

  assign fifo_rd = (state_q == S_LOAD) && !fifo_empty && (in_cnt_q != IWW'(IN_WORDS));

  always_ff @(posedge clock_accelerator) begin
    if (reset_accelerator) begin
      state_q   <= S_IDLE;
      in_cnt_q  <= '0;
      out_cnt_q <= '0;
      in_vec_q  <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (start_accelerator) begin
          in_cnt_q <= '0;
          state_q  <= S_LOAD;
        end
        S_LOAD: begin
          if (fifo_rd) begin
            in_vec_q[in_cnt_q*BUS_W +: BUS_W] <= fifo_data;
            in_cnt_q <= in_cnt_q + 1'b1;
          end
          if (in_cnt_q == IWW'(IN_WORDS)) state_q <= S_RUN;
        end
        S_RUN: if (layer_done[NUM_LAYERS-1]) begin
          out_cnt_q <= '0;
          state_q   <= S_SEND;
        end
        S_SEND: begin
          out_cnt_q <= out_cnt_q + 1'b1;
          if (out_cnt_q == OWW'(OUT_WORDS)) state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // layer 0 starts when the loader moves to S_RUN
  assign layer_start[0] = (state_q == S_LOAD) && (in_cnt_q == IWW'(IN_WORDS));
  assign act[0]         = MAXN'(in_vec_q[N0-1:0]);

  for (genvar l = 0; l < NUM_LAYERS; l++) begin : g_layer
    localparam int unsigned NI = LAYER_N[l];
    localparam int unsigned NO = LAYER_N[l+1];
    localparam int unsigned WD = ceil_div(NI, W);
    localparam int unsigned DP = NO * WD;
    localparam int unsigned AW = (DP > 1) ? $clog2(DP) : 1;
    logic [NO-1:0] act_l;
    logic          busy_l;

    bnn_fc_layer #(.N_IN(NI), .N_OUT(NO), .W(W)) u_fc (
      .clk_fc    (clock_accelerator),
      .rst_n     (rst_n),
      .start_i   (layer_start[l]),
      .data_in   (act[l][NI-1:0]),
      .wt_we_i   (wt_we && (wt_layer == LSEL_W'(l)) && (state_q == S_IDLE)),
      .wt_addr_i (AW'(wt_addr)),
      .wt_data_i (wt_data),
      .activation(act_l),
      .finish_fc (layer_done[l]),
      .busy_o    (busy_l)
    );

    assign act[l+1]         = MAXN'(act_l);
    assign layer_start[l+1] = layer_done[l];
  end

  assign out_vec            = (OUT_WORDS*BUS_W)'(act[NUM_LAYERS][NL-1:0]);
  assign op_ready           = (state_q == S_SEND) && (out_cnt_q != OWW'(OUT_WORDS));
  assign data_out           = op_ready ? out_vec[out_cnt_q*BUS_W +: BUS_W] : '0;
  assign finish_accelerator = (state_q == S_SEND) && (out_cnt_q == OWW'(OUT_WORDS));
  assign busy               = state_q != S_IDLE;

endmodule
