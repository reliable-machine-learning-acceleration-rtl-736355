// Synchronous first-word-fall-through FIFO that buffers the input feature
// words streamed to the BNN accelerator (the accelerator's feature buffer).
// o_rd_data shows the oldest word whenever o_empty is low; i_rd_en pops it at
// the clock edge. A write and a read may happen in the same cycle. o_ae / o_af
// flag a fill level at or below AE_LEVEL / at or above AF_LEVEL. i_rst_sync
// empties the FIFO at the next edge. The port names follow the source's RTL
// schematic; depth, thresholds and read timing are this design's choices.
// The writer must not write when o_full is high (checked by an assertion).
module bnn_fifo #(
  parameter int unsigned WIDTH    = 64,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned AE_LEVEL = 1,
  parameter int unsigned AF_LEVEL = DEPTH - 1
) (
  input  logic             i_clk,
  input  logic             i_rst_sync,
  input  logic             i_wr_en,
  input  logic [WIDTH-1:0] i_wr_data,
  input  logic             i_rd_en,
  output logic [WIDTH-1:0] o_rd_data,
  output logic             o_empty,
  output logic             o_full,
  output logic             o_ae,
  output logic             o_af
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0]      mem [DEPTH];
  logic [PW-1:0]         wr_ptr, rd_ptr;
  localparam int unsigned CNTW = $clog2(DEPTH + 1);

  logic [CNTW-1:0]       count;
  logic                  do_wr, do_rd;

  assign do_wr = i_wr_en && !o_full;
  assign do_rd = i_rd_en && !o_empty;

  always_ff @(posedge i_clk) begin
    if (i_rst_sync) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_rd) rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + CNTW'(do_wr) - CNTW'(do_rd);
    end
  end

  always_ff @(posedge i_clk) begin
    if (do_wr) mem[wr_ptr] <= i_wr_data;
  end

  assign o_rd_data = mem[rd_ptr];
  assign o_empty   = count == 0;
  assign o_full    = count == CNTW'(DEPTH);
  assign o_ae      = count <= CNTW'(AE_LEVEL);
  assign o_af      = count >= CNTW'(AF_LEVEL);

  a_no_overflow: assert property (@(posedge i_clk) disable iff (i_rst_sync) i_wr_en |-> !o_full)
    else $error("bnn_fifo: write while full");

endmodule
