// Shared constants and types of the stochastic-binary dot-product engine.
//
// The engine multiplies 8-bit operands as bipolar stochastic bits (one XNOR per
// product) and adds the product bits with ordinary binary adders. The array is
// ROWS dot-product rows of COLS processing elements each (16 x 128), fed by
// ROWS+1 random number generators: one per row for the weights and one shared by
// all input columns. The array geometry, the 8-bit PE adder/register and the RNG
// count follow the source design; the operand width, the RNG type and the seeds
// are this design's own choices.
package sb_pkg;

  localparam int unsigned ROWS   = 16;   // parallel dot-product rows (M)
  localparam int unsigned COLS   = 128;  // inputs per dot-product
  localparam int unsigned DATA_W = 8;    // binary operand width before conversion
  localparam int unsigned PSUM_W = 8;    // PE adder / partial-sum register width
  localparam int unsigned RNG_W  = 8;    // LFSR width, equal to DATA_W

  // Bit-stream length N: the number of rows added into one result, 1..ROWS.
  // Carried as the plain number N; 0 is read as 1 and values above ROWS as ROWS.
  typedef logic [4:0] bslen_t;

  // Seed of the weight RNG of row r. Distinct non-zero values so that the rows
  // start at different points of the LFSR sequence.
  function automatic logic [RNG_W-1:0] weight_seed(input int unsigned r);
    logic [RNG_W-1:0] s;
    s = RNG_W'((r * 37 + 11) % 255 + 1);
    return s;
  endfunction

  // Seed of the single RNG shared by all input converters.
  localparam logic [RNG_W-1:0] INPUT_SEED = 8'hB5;

endpackage
