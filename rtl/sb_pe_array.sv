// The 16 x 128 stochastic-binary PE array.
//
// ROWS dot-product rows side by side. Row r receives its own stochastic weight
// bit w_bits[r], broadcast along the row. Column j receives one stochastic
// input bit x_bits[j], shared by all rows, so all rows see the same input
// streams and differ only in their weights (or in the random numbers behind
// them). Each row delivers its own count y[r]; see sb_dp_row for the timing.
// Layout and sharing follow the source design.
module sb_pe_array
  import sb_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned W     = PSUM_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NROWS-1:0] w_bits,
  input  logic [NCOLS-1:0] x_bits,
  output logic [W-1:0]     y [NROWS]
);
  for (genvar r = 0; r < NROWS; r++) begin : g_row
    sb_dp_row #(.COLS(NCOLS), .W(W)) u_row (
      .clk   (clk),
      .rst_n (rst_n),
      .w_bit (w_bits[r]),
      .x_bits(x_bits),
      .y     (y[r])
    );
  end
endmodule
