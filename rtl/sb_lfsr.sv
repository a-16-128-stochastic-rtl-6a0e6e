// Random number generator for the binary-to-stochastic converters.
//
// A Fibonacci linear-feedback shift register. With the default 8-bit width and
// taps 8,6,5,4 (x^8+x^6+x^5+x^4+1) it is maximal: it steps through all 255
// non-zero values before repeating. Each clock with 'en' high it shifts left by
// one and inserts the XOR of the tap bits at bit 0; 'rnd' is the current state,
// so a new number is available every cycle. Reset (synchronous, active low)
// loads SEED. An LFSR is the example RNG named for the design; its width, taps
// and seed are choices of this implementation. A seed of zero would lock the
// register, so the SEED default is non-zero and the reset value is forced to a
// non-zero constant if zero is passed.
module sb_lfsr #(
  parameter int unsigned     W    = 8,
  parameter logic [W-1:0]    TAPS = 8'hB8,   // bit i set: state bit i is a tap (8,6,5,4)
  parameter logic [W-1:0]    SEED = 8'h01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd
);
  localparam logic [W-1:0] START = (SEED == '0) ? W'(1) : SEED;

  logic fb;
  assign fb = ^(rnd & TAPS);

  always_ff @(posedge clk) begin
    if (!rst_n)  rnd <= START;
    else if (en) rnd <= {rnd[W-2:0], fb};
  end
endmodule
