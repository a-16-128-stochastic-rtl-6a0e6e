// Stochastic-binary dot-product engine: 16 parallel 128-input dot-products.
//
// Data path, left to right:
//   x_in -> sb_input_skew -> 128 comparators (one shared input RNG) --x_bits-->
//   w_in -> 16 comparators (one RNG per row) -----------------------w_bits-->
//   sb_pe_array (16 rows x 128 SPEs) --y_row--> sb_prog_adder --y_out-->
// Operands are 8-bit unsigned codes; a code v stands for the bipolar value
// v/128 - 1 (approximately, see the comparator). Each cycle every converter
// emits one stochastic bit, every SPE multiplies with an XNOR and adds the
// product bit to the partial sum moving along its row.
//
// Timing. An input vector presented on x_in with x_valid at cycle s is skewed
// so that its element j reaches column j at cycle s+j. The weight stream of row
// r is presented on w_in[r] one value per cycle: the value on w_in[r] at cycle
// s+j is multiplied with element j of that vector. Row r's count of ones,
// 0..128, appears on y_row[r] with y_row_valid at cycle s+128; the programmable
// adder sums groups of N rows (N = bslen, 1..16, sampled at that cycle) and
// presents floor(16/N) results on y_out, lanes flagged in y_out_mask, at cycle
// s+129.
// For the dot-product of weight vector W and input vector X, stream W_j at
// cycle s+j. Because a weight is broadcast along its row, a vector started at
// s+1 meets the same stream one step later (W_{j+1} at column j); the engine
// accepts a vector every cycle and computes exactly that, and back-to-back
// vectors share a weight vector only when the host repeats the stream.
// With N rows carrying the same weight vector, the N row counts are N samples
// (independent in the weight bits; the rows share each column's input bit),
// and the result estimates
//   sum_j w_j x_j  ~=  (2*y_out[g] - 128*N) / N      (bipolar values).
//
// Follows the source design: array size, SPE contents, one RNG per row plus a
// single input RNG (17 in all), digital comparators, input pipelining, output
// grouping by N. This design's own choices: 8-bit operands and LFSRs and their
// seeds, the on-chip skew registers, the valid signals, and free-running RNGs
// that step every cycle after reset (synchronous, active low).
module sb_top
  import sb_pkg::*;
#(
  parameter int unsigned NROWS = ROWS,
  parameter int unsigned NCOLS = COLS,
  parameter int unsigned DW    = DATA_W,
  parameter int unsigned PW    = PSUM_W,
  parameter int unsigned OW    = PSUM_W + $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  bslen_t           bslen,
  input  logic             x_valid,
  input  logic [DW-1:0]    x_in        [NCOLS],
  input  logic [DW-1:0]    w_in        [NROWS],
  output logic             y_row_valid,
  output logic [PW-1:0]    y_row       [NROWS],
  output logic             y_out_valid,
  output logic [NROWS-1:0] y_out_mask,
  output logic [OW-1:0]    y_out       [NROWS]
);
  // ---- input path: skew, one shared RNG, one comparator per column ----
  logic [DW-1:0]    x_skew [NCOLS];
  logic [DW-1:0]    rnd_x;
  logic [NCOLS-1:0] x_bits;

  sb_input_skew #(.NCOLS(NCOLS), .W(DW)) u_skew (
    .clk  (clk),
    .x_in (x_in),
    .x_out(x_skew)
  );

  sb_lfsr #(.W(DW), .SEED(DW'(INPUT_SEED))) u_rng_x (
    .clk  (clk),
    .rst_n(rst_n),
    .en   (1'b1),
    .rnd  (rnd_x)
  );

  for (genvar j = 0; j < NCOLS; j++) begin : g_xcmp
    sb_b2s_cmp #(.W(DW)) u_cmp (
      .value(x_skew[j]),
      .rnd  (rnd_x),
      .bit_o(x_bits[j])
    );
  end

  // ---- weight path: one RNG and one comparator per row ----
  logic [NROWS-1:0] w_bits;

  for (genvar r = 0; r < NROWS; r++) begin : g_wb2s
    logic [DW-1:0] rnd_w;
    sb_lfsr #(.W(DW), .SEED(DW'(weight_seed(r)))) u_rng_w (
      .clk  (clk),
      .rst_n(rst_n),
      .en   (1'b1),
      .rnd  (rnd_w)
    );
    sb_b2s_cmp #(.W(DW)) u_cmp (
      .value(w_in[r]),
      .rnd  (rnd_w),
      .bit_o(w_bits[r])
    );
  end

  // ---- PE array ----
  sb_pe_array #(.NROWS(NROWS), .NCOLS(NCOLS), .W(PW)) u_array (
    .clk   (clk),
    .rst_n (rst_n),
    .w_bits(w_bits),
    .x_bits(x_bits),
    .y     (y_row)
  );

  // ---- valid: a vector leaves the last column NCOLS cycles after entry ----
  logic [NCOLS-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[NCOLS-2:0], x_valid};
  end
  assign y_row_valid = vpipe[NCOLS-1];

  // ---- programmable adder ----
  sb_prog_adder #(.NROWS(NROWS), .IN_W(PW), .OUT_W(OW)) u_padd (
    .clk      (clk),
    .rst_n    (rst_n),
    .bslen    (bslen),
    .in_valid (y_row_valid),
    .y        (y_row),
    .out_valid(y_out_valid),
    .out_mask (y_out_mask),
    .sum      (y_out)
  );
endmodule
