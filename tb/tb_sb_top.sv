// End-to-end testbench for sb_top at its default size (16 rows x 128 inputs).
//
// A reference model, written independently of the RTL, steps its own copies of
// the 17 LFSRs, keeps the history of every input vector, weight and random
// number, and predicts for every valid result the 16 row counts and the 16/N
// combined sums bit for bit, including the 128-cycle row latency and the extra
// cycle of the programmable adder.
//
// Phase 1 (pipelined): a new random input vector almost every cycle, random
//   weights every cycle and a random bit-stream length N (1..16) every cycle,
//   with some idle cycles. Exercises back-to-back vectors, idle gaps and all
//   sixteen N.
// Phase 2 (dot-products): waves of one input vector every 128 cycles, the same
//   random weight vector streamed into all 16 rows, bit-stream length 16. The
//   combined result is turned into a bipolar dot-product estimate and compared
//   with the exact dot-product of the encoded values; the mean absolute error
//   (relative to the full scale of 128) must be below 6% at N=16 and below the
//   error of the single-row (N=1) estimates.
module tb_sb_top;
  import sb_pkg::*;
  localparam int NR = 16, NC = 128, H = 512;

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
  // histories, indexed by cycle modulo H
  logic [7:0] hx  [H][NC];
  logic       hv  [H];
  logic [7:0] hw  [H][NR];
  logic [7:0] hrw [H][NR];
  logic [7:0] hrx [H];
  bslen_t     hb  [H];
  // model RNG states
  logic [7:0] mrw [NR];
  logic [7:0] mrx;
  // expected row counts of the vector started at each cycle
  int         exp_row [H][NR];
  // mechanism counters
  int n_back_to_back = 0, n_idle = 0, n_wave = 0;
  int n_mode [17];   // results per effective N; 0 unused
  real err1_sum = 0.0, err16_sum = 0.0;
  int  err1_n = 0, err16_n = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] lfsr_next(input logic [7:0] s);
    return {s[6:0], s[7] ^ s[5] ^ s[4] ^ s[3]};
  endfunction

  // bipolar value a code stands for: P(code > r), r uniform on 1..255
  function automatic real bip(input logic [7:0] v);
    real p;
    p = (v == 0) ? 0.0 : real'(int'(v) - 1) / 255.0;
    return 2.0 * p - 1.0;
  endfunction

  // Row counts of the vector started at cycle s (all of its cycles recorded).
  task automatic predict(input int s);
    int c, cnt;
    logic wb, xb;
    for (int r = 0; r < NR; r++) begin
      cnt = 0;
      for (int j = 0; j < NC; j++) begin
        c  = (s + j) % H;
        wb = hw[c][r] > hrw[c][r];
        xb = hx[s % H][j] > hrx[c];
        cnt += (wb == xb) ? 1 : 0;
      end
      exp_row[s % H][r] = cnt;
    end
  endtask

  int t = 0;   // cycle number since reset release

  // Record this cycle's inputs and RNG values, clock, check outputs.
  task automatic step();
    int s, n, want;
    hv[t % H] = x_valid;
    hx[t % H] = x_in;
    hw[t % H] = w_in;
    hrw[t % H] = mrw;
    hrx[t % H] = mrx;
    hb[t % H] = bslen;
    if (x_valid && t > 0 && hv[(t-1) % H]) n_back_to_back++;
    if (!x_valid) n_idle++;
    @(posedge clk); #1;
    foreach (mrw[r]) mrw[r] = lfsr_next(mrw[r]);
    mrx = lfsr_next(mrx);
    // row outputs: vector started at s = t - (NC-1)
    s = t - (NC - 1);
    if (s >= 0) begin
      checks++;
      if (y_row_valid !== hv[s % H]) begin failures++; $display("t=%0d row valid", t); end
      if (hv[s % H]) begin
        predict(s);
        for (int r = 0; r < NR; r++) begin
          checks++;
          if (y_row[r] !== 8'(exp_row[s % H][r])) begin
            failures++;
            if (failures < 10) $display("vec@%0d row %0d: got %0d want %0d", s, r, y_row[r], exp_row[s % H][r]);
          end
        end
      end
    end
    // combined outputs: vector started at s = t - NC, N sampled in this cycle
    s = t - NC;
    if (s >= 0) begin
      checks++;
      if (y_out_valid !== hv[s % H]) begin failures++; $display("t=%0d out valid", t); end
      if (hv[s % H]) begin
        n = (hb[t % H] == 0) ? 1 : ((int'(hb[t % H]) > NR) ? NR : int'(hb[t % H]));
        n_mode[n]++;
        for (int g = 0; g < NR; g++) begin
          want = 0;
          if (g < NR / n) for (int k = 0; k < n; k++) want += exp_row[s % H][g*n + k];
          checks++;
          if (y_out[g] !== 12'(want) || y_out_mask[g] !== (g < NR / n)) begin
            failures++;
            if (failures < 10) $display("vec@%0d N=%0d lane %0d: got %0d want %0d", s, n, g, y_out[g], want);
          end
        end
      end
    end
    t++;
  endtask

  initial begin
    logic [7:0] wv [NC];
    logic [7:0] xv [NC];
    real exact, est;
    int  s0;

    rst_n = 1'b0; x_valid = 1'b0; bslen = 5'd1;
    foreach (x_in[j]) x_in[j] = '0;
    foreach (w_in[r]) w_in[r] = '0;
    foreach (hv[i]) hv[i] = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    foreach (mrw[r]) mrw[r] = weight_seed(r);
    mrx = INPUT_SEED;

    // ---- phase 1: pipelined random traffic ----
    for (int i = 0; i < 1500; i++) begin
      x_valid = ($urandom_range(0, 9) != 0);
      foreach (x_in[j]) x_in[j] = 8'($urandom);
      foreach (w_in[r]) w_in[r] = 8'($urandom);
      bslen = 5'($urandom_range(1, 16));
      step();
    end

    // ---- phase 2: isolated dot-products, one per 128 cycles ----
    x_valid = 1'b0; bslen = 5'd16;
    for (int k = 0; k < 48; k++) begin
      foreach (wv[j]) wv[j] = 8'($urandom);
      foreach (xv[j]) xv[j] = 8'($urandom);
      s0 = t;
      for (int j = 0; j < NC; j++) begin
        x_valid = (j == 0);
        foreach (x_in[c]) x_in[c] = (j == 0) ? xv[c] : 8'($urandom);
        foreach (w_in[r]) w_in[r] = wv[j];
        step();
      end
      n_wave++;
      exact = 0.0;
      for (int j = 0; j < NC; j++) exact += bip(wv[j]) * bip(xv[j]);
      // model counts of this wave (bit-exact, already checked against the RTL)
      est = 0.0;
      for (int r = 0; r < NR; r++) begin
        err1_sum += (((2.0 * exp_row[s0 % H][r] - NC) - exact) >= 0.0 ?
                     ((2.0 * exp_row[s0 % H][r] - NC) - exact) : (exact - (2.0 * exp_row[s0 % H][r] - NC))) / NC;
        err1_n++;
        est += 2.0 * exp_row[s0 % H][r] - NC;
      end
      est = est / NR;
      err16_sum += ((est - exact) >= 0.0 ? (est - exact) : (exact - est)) / NC;
      err16_n++;
    end
    // drain
    x_valid = 1'b0;
    repeat (NC + 2) step();

    $display("mean |error| / 128: N=1 %.4f  N=16 %.4f", err1_sum / err1_n, err16_sum / err16_n);
    checks++;
    if (!(err16_sum / err16_n < 0.06)) begin failures++; $display("N=16 error too large"); end
    checks++;
    if (!(err16_sum / err16_n < err1_sum / err1_n)) begin failures++; $display("N=16 not better than N=1"); end

    $display("mechanisms: back_to_back=%0d idle=%0d waves=%0d", n_back_to_back, n_idle, n_wave);
    for (int k = 1; k <= 16; k++) $display("  results with N=%0d: %0d", k, n_mode[k]);
    checks++; if (n_back_to_back == 0) begin failures++; $display("no back-to-back vectors"); end
    checks++; if (n_idle == 0)         begin failures++; $display("no idle cycles"); end
    checks++; if (n_wave == 0)         begin failures++; $display("no dot-product waves"); end
    for (int k = 1; k <= 16; k++) begin
      checks++;
      if (n_mode[k] == 0) begin failures++; $display("N=%0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
