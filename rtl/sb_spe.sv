// Stochastic-binary processing element (SPE).
//
// One element of a dot-product row. The XNOR of the weight bit and the input
// bit is a bipolar stochastic product (1 = +1, 0 = -1). That product bit is added
// as 0 or 1 to the partial sum arriving from the element on the left, and the
// sum is registered and passed on to the right. The leftmost element of a row
// receives 0. Latency: one cycle from psum_in to psum_out. The XNOR multiplier,
// the 8-bit adder and the 8-bit register follow the source design; a
// synchronous active-low reset that clears the register is this design's
// choice. With 128 elements per row the largest sum is 128, so 8 bits never
// overflow; a narrower W wraps modulo 2^W.
module sb_spe #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         w_bit,
  input  logic         x_bit,
  input  logic [W-1:0] psum_in,
  output logic [W-1:0] psum_out
);
  logic prod;
  assign prod = ~(w_bit ^ x_bit);

  always_ff @(posedge clk) begin
    if (!rst_n) psum_out <= '0;
    else        psum_out <= psum_in + W'(prod);
  end
endmodule
