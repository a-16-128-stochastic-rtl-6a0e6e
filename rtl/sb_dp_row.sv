// One 128-input stochastic-binary dot-product unit (one row of the PE array).
//
// COLS processing elements in a chain. The row's weight bit 'w_bit' is
// broadcast to every element; element j takes the input bit x_bits[j] of its
// column. The partial sum enters element 0 as zero and moves one element to the
// right per clock, so element j works at cycle s+j on the dot-product that
// element 0 started at cycle s. A dot-product is therefore correct when its
// j-th input bit is on column j and its j-th weight bit is on the row at cycle
// s+j; its count of ones, 0..COLS, appears on 'y' after the clock edge ending
// cycle s+COLS-1, i.e. COLS cycles after s. A new dot-product may start every
// cycle; each one uses whatever weight bit the row carries while it passes a
// column. The chain and the weight broadcast follow the source design.
module sb_dp_row #(
  parameter int unsigned COLS = 128,
  parameter int unsigned W    = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            w_bit,
  input  logic [COLS-1:0] x_bits,
  output logic [W-1:0]    y
);
  logic [W-1:0] chain [COLS+1];

  assign chain[0] = '0;

  for (genvar j = 0; j < COLS; j++) begin : g_pe
    sb_spe #(.W(W)) u_pe (
      .clk     (clk),
      .rst_n   (rst_n),
      .w_bit   (w_bit),
      .x_bit   (x_bits[j]),
      .psum_in (chain[j]),
      .psum_out(chain[j+1])
    );
  end

  assign y = chain[COLS];
endmodule
