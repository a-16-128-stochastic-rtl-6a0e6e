// Workload testbench: a 128-input, 10-output classification layer on sb_top.
//
// Synthetic data: ten random 8-bit prototype vectors serve as the weights of
// the ten output neurons; each test input is one prototype with a quarter of
// its elements replaced by random codes, labelled with that prototype's class.
// The layer is run twice on sb_top at its default size:
//   N = 1:  one wave per input; neuron k's weights stream into row k (rows 10-15
//           carry code 128, roughly zero), and lanes 0-9 give the ten scores.
//   N = 16: ten waves per input; each wave streams one neuron's weights into
//           all 16 rows and lane 0 gives its score.
// Every lane is checked against the sum of the row counts it covers, and the
// winning class (argmax of 2*S - 128*N) is compared with the winner of the
// exact bipolar scores. The agreement must be at least 80% at N=1 and at least
// 90% at N=16, and must not fall from N=1 to N=16. Cycles per input are
// reported for both settings.
module tb_sb_mlp_out;
  import sb_pkg::*;
  localparam int NR = 16, NC = 128, NCLS = 10, IMGS = 40;

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
  logic [7:0] proto [NCLS][NC];

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real bip(input logic [7:0] v);
    return 2.0 * ((v == 0) ? 0.0 : real'(int'(v) - 1) / 255.0) - 1.0;
  endfunction

  // Run one wave: vector xv, row r streams weights wsel[r] (index into proto,
  // or -1 for code 128). Returns the lane sums and checks them against rows.
  task automatic wave(input logic [7:0] xv [NC], input int wsel [NR], input int n,
                      output int lanes [NR]);
    logic [7:0] rows [NR];
    int want;
    bslen = 5'(n);
    for (int j = 0; j < NC; j++) begin
      x_valid = (j == 0);
      if (j == 0) x_in = xv;
      for (int r = 0; r < NR; r++) w_in[r] = (wsel[r] < 0) ? 8'd128 : proto[wsel[r]][j];
      @(posedge clk); #1;
    end
    x_valid = 1'b0;
    rows = y_row;
    checks++;
    if (y_row_valid !== 1'b1) begin failures++; $display("row counts late"); end
    @(posedge clk); #1;
    checks++;
    if (y_out_valid !== 1'b1) begin failures++; $display("results late"); end
    for (int g = 0; g < NR / n; g++) begin
      want = 0;
      for (int q = 0; q < n; q++) want += rows[g*n + q];
      checks++;
      if (y_out[g] !== 12'(want)) begin failures++; $display("lane %0d: got %0d want %0d", g, y_out[g], want); end
      lanes[g] = int'(y_out[g]);
    end
  endtask

  initial begin
    logic [7:0] xv [NC];
    int  wsel [NR];
    int  lanes [NR];
    int  label, best_exact, best1, best16, agree1 = 0, agree16 = 0, correct_exact = 0;
    int  c0, cyc1 = 0, cyc16 = 0;
    real exact [NCLS];
    real sc, bsc;

    rst_n = 1'b0; x_valid = 1'b0; bslen = 5'd1;
    foreach (x_in[j]) x_in[j] = '0;
    foreach (w_in[r]) w_in[r] = '0;
    for (int k = 0; k < NCLS; k++) foreach (proto[k][j]) proto[k][j] = 8'($urandom);
    @(posedge clk); #1;
    rst_n = 1'b1;

    for (int i = 0; i < IMGS; i++) begin
      label = i % NCLS;
      foreach (xv[j]) xv[j] = ($urandom_range(0, 3) == 0) ? 8'($urandom) : proto[label][j];
      best_exact = 0;
      for (int k = 0; k < NCLS; k++) begin
        exact[k] = 0.0;
        for (int j = 0; j < NC; j++) exact[k] += bip(proto[k][j]) * bip(xv[j]);
        if (exact[k] > exact[best_exact]) best_exact = k;
      end
      if (best_exact == label) correct_exact++;

      // N = 1: all ten neurons in one wave
      c0 = $time / 10;
      for (int r = 0; r < NR; r++) wsel[r] = (r < NCLS) ? r : -1;
      wave(xv, wsel, 1, lanes);
      cyc1 += $time / 10 - c0;
      best1 = 0;
      for (int k = 1; k < NCLS; k++) if (lanes[k] > lanes[best1]) best1 = k;
      if (best1 == best_exact) agree1++;

      // N = 16: one neuron per wave
      c0 = $time / 10;
      best16 = 0; bsc = -1.0e9;
      for (int k = 0; k < NCLS; k++) begin
        for (int r = 0; r < NR; r++) wsel[r] = k;
        wave(xv, wsel, 16, lanes);
        sc = (2.0 * real'(lanes[0]) - real'(NC * 16)) / 16.0;
        if (sc > bsc) begin bsc = sc; best16 = k; end
      end
      cyc16 += $time / 10 - c0;
      if (best16 == best_exact) agree16++;
    end

    $display("exact scores pick the planted class for %0d of %0d inputs", correct_exact, IMGS);
    $display("N=1 : argmax agrees with exact for %0d of %0d inputs, %0d cycles per input", agree1, IMGS, cyc1 / IMGS);
    $display("N=16: argmax agrees with exact for %0d of %0d inputs, %0d cycles per input", agree16, IMGS, cyc16 / IMGS);
    checks++; if (agree1 * 10 < IMGS * 8)  begin failures++; $display("N=1 agreement too low"); end
    checks++; if (agree16 * 10 < IMGS * 9) begin failures++; $display("N=16 agreement too low"); end
    checks++; if (agree16 < agree1)        begin failures++; $display("N=16 worse than N=1"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
