// Workload testbench: 128-input dot-product error against bit-stream length.
//
// For each N from 1 to 16, runs 32 isolated dot-products on sb_top at its
// default size. Each wave streams one random 128-element weight vector into all
// 16 rows and presents one random input vector, so each of the floor(16/N)
// lanes of the programmable adder holds an estimate built from N rows. Each lane result is
// checked against the sum of its N row counts, read one cycle earlier; each
// estimate (2*sum - 128*N)/N is compared with the exact bipolar dot-product of
// the encoded values and the mean absolute error, relative to the full scale
// of 128, is printed per N. The error must fall from N=1 to N=16 and stay below
// 10% at N=1 and 6% at N=16.
module tb_sb_dp_error;
  import sb_pkg::*;
  localparam int NR = 16, NC = 128, WAVES = 32;

  logic        clk = 1'b0;
  logic        rst_n, x_valid;
  bslen_t      bslen;
  logic [7:0]  x_in  [NC];
  logic [7:0]  w_in  [NR];
  logic        y_row_valid, y_out_valid;
  logic [7:0]  y_row [NR];
  logic [15:0] y_out_mask;
  logic [11:0] y_out [NR];

  sb_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real mae [17];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bip(input logic [7:0] v);
    return 2.0 * ((v == 0) ? 0.0 : real'(int'(v) - 1) / 255.0) - 1.0;
  endfunction

  initial begin
    logic [7:0] wv [NC];
    logic [7:0] xv [NC];
    logic [7:0] rows_seen [NR];
    int  n, want, nres;
    real exact, est, err;

    rst_n = 1'b0; x_valid = 1'b0; bslen = 5'd1;
    foreach (x_in[j]) x_in[j] = '0;
    foreach (w_in[r]) w_in[r] = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;

    for (int m = 1; m <= 16; m++) begin
      bslen = 5'(m);
      n = m;
      err = 0.0; nres = 0;
      for (int k = 0; k < WAVES; k++) begin
        foreach (wv[j]) wv[j] = 8'($urandom);
        foreach (xv[j]) xv[j] = 8'($urandom);
        exact = 0.0;
        for (int j = 0; j < NC; j++) exact += bip(wv[j]) * bip(xv[j]);
        // stream the wave: vector at the first cycle, weight j at cycle j
        for (int j = 0; j < NC; j++) begin
          x_valid = (j == 0);
          if (j == 0) x_in = xv;
          foreach (w_in[r]) w_in[r] = wv[j];
          @(posedge clk); #1;
        end
        x_valid = 1'b0;
        // cycle 128: row counts are out
        checks++;
        if (y_row_valid !== 1'b1) begin failures++; $display("row counts not valid at cycle 128"); end
        rows_seen = y_row;
        @(posedge clk); #1;
        checks++;
        if (y_out_valid !== 1'b1) begin failures++; $display("results not valid at cycle 129"); end
        for (int g = 0; g < NR; g++) begin
          want = 0;
          if (g < NR / n) for (int q = 0; q < n; q++) want += rows_seen[g*n + q];
          checks++;
          if (y_out[g] !== 12'(want) || y_out_mask[g] !== (g < NR / n)) begin
            failures++;
            $display("N=%0d lane %0d: got %0d want %0d", n, g, y_out[g], want);
          end
          if (g < NR / n) begin
            est = (2.0 * real'(y_out[g]) - real'(NC * n)) / real'(n);
            err += ((est > exact) ? est - exact : exact - est) / NC;
            nres++;
          end
        end
      end
      mae[m] = err / nres;
      $display("N=%2d: %0d estimates, mean |error| = %.2f%% of full scale", n, nres, 100.0 * mae[m]);
    end
    checks++; if (!(mae[16] < mae[1])) begin failures++; $display("error does not fall with N"); end
    checks++; if (!(mae[1] < 0.10))   begin failures++; $display("N=1 error too large"); end
    checks++; if (!(mae[16] < 0.06))   begin failures++; $display("N=16 error too large"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
