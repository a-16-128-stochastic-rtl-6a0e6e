// Programmable adder: combines row results according to the bit-stream length.
//
// The NROWS row counts y[] that leave the array together are NROWS independent
// stochastic samples. For a bit-stream length N (1..NROWS) this block adds
// rows g*N .. g*N+N-1 into result lane g, for the floor(NROWS/N) lanes that fit
// whole, and marks those lanes in out_mask; the other lanes read zero and the
// rows left over when N does not divide NROWS are not used. N = 0 is read as 1
// and N > NROWS as NROWS. For every lane a row is included when it falls in the
// lane's window, so each lane is a masked sum of all rows. Results and
// out_valid are registered: one cycle from y/in_valid to sum/out_valid, one set
// of results per cycle. Grouping rows by N into NROWS/N outputs follows the
// source design; the lane layout, the handling of an N that does not divide 16,
// the register and the widths are this design's choices. Synchronous
// active-low reset clears the outputs.
module sb_prog_adder
  import sb_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned IN_W  = PSUM_W,
  parameter int unsigned OUT_W = PSUM_W + $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bslen_t           bslen,
  input  logic             in_valid,
  input  logic [IN_W-1:0]  y        [NROWS],
  output logic             out_valid,
  output logic [NROWS-1:0] out_mask,
  output logic [OUT_W-1:0] sum      [NROWS]
);
  int unsigned      n;
  logic [OUT_W-1:0] lane [NROWS];
  logic [NROWS-1:0] mask;

  always_comb begin
    if (bslen == '0)              n = 1;
    else if (int'(bslen) > NROWS) n = NROWS;
    else                          n = int'(bslen);
    for (int unsigned g = 0; g < NROWS; g++) begin
      mask[g] = ((g + 1) * n <= NROWS);
      lane[g] = '0;
      for (int unsigned r = 0; r < NROWS; r++) begin
        if (mask[g] && r >= g * n && r < (g + 1) * n) lane[g] = lane[g] + OUT_W'(y[r]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mask  <= '0;
      for (int i = 0; i < NROWS; i++) sum[i] <= '0;
    end else begin
      out_valid <= in_valid;
      out_mask  <= mask;
      for (int i = 0; i < NROWS; i++) sum[i] <= lane[i];
    end
  end
endmodule
