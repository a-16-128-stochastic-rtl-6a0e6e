// Input pipelining: skews an input vector across the array columns.
//
// An input vector presented on x_in at cycle s leaves on column j of x_out at
// cycle s+j: column 0 passes straight through and column j goes through j
// registers. A new vector may be presented every cycle, so up to NCOLS vectors
// are in flight, each one diagonal ahead of the next, which is the staggered
// input arrangement that lets every column of a dot-product row see its input
// exactly when the row's partial sum passes it. The arrangement follows the
// source design; building it as a triangle of registers in front of the input
// converters is this design's choice (the source arranges the data off-chip).
// No reset: the registers only carry data and are flushed by use.
module sb_input_skew
  import sb_pkg::*;
#(
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned W     = DATA_W
) (
  input  logic         clk,
  input  logic [W-1:0] x_in  [NCOLS],
  output logic [W-1:0] x_out [NCOLS]
);
  assign x_out[0] = x_in[0];

  for (genvar j = 1; j < NCOLS; j++) begin : g_col
    logic [W-1:0] stage [j];
    always_ff @(posedge clk) begin
      stage[0] <= x_in[j];
      for (int k = 1; k < j; k++) stage[k] <= stage[k-1];
    end
    assign x_out[j] = stage[j-1];
  end
endmodule
