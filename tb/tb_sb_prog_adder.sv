// Self-checking testbench for sb_prog_adder: random row counts (0..128) and a
// random bit-stream length code (0..31) every cycle; one cycle later each of
// the floor(16/N) lanes must hold the sum of its N rows, the mask must flag
// exactly those lanes, the other lanes must read zero, and out_valid must
// follow in_valid. N = 0 counts as 1 and N > 16 as 16. Every N from 1 to 16
// and both out-of-range cases are required to occur.
module tb_sb_prog_adder;
  import sb_pkg::*;
  logic        clk = 1'b0;
  logic        rst_n, in_valid, out_valid;
  bslen_t      bslen;
  logic [7:0]  y   [16];
  logic [15:0] out_mask;
  logic [11:0] sum [16];
  int checks = 0, failures = 0;
  int seen_n [17];   // by effective N; 0 unused
  int seen_zero = 0, seen_big = 0;

  sb_prog_adder #(.NROWS(16), .IN_W(8), .OUT_W(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, want;
    logic [7:0] ys [16];
    logic v;
    rst_n = 1'b0; in_valid = 1'b1; bslen = 5'd1;
    foreach (y[i]) y[i] = '0;
    @(posedge clk); #1;
    checks++;
    if (out_valid !== 1'b0) begin failures++; $display("out_valid after reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      bslen = 5'($urandom_range(0, 31));
      v = 1'($urandom);
      in_valid = v;
      foreach (y[i]) begin y[i] = 8'($urandom_range(0, 128)); ys[i] = y[i]; end
      n = (bslen == 0) ? 1 : ((int'(bslen) > 16) ? 16 : int'(bslen));
      seen_n[n]++;
      if (bslen == 0) seen_zero++;
      if (int'(bslen) > 16) seen_big++;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== v) begin failures++; $display("t=%0d valid", t); end
      for (int g = 0; g < 16; g++) begin
        want = 0;
        if (g < 16 / n) for (int k = 0; k < n; k++) want += ys[g*n + k];
        checks++;
        if (sum[g] !== 12'(want) || out_mask[g] !== (g < 16 / n)) begin
          failures++;
          if (failures < 10) $display("t=%0d N=%0d lane %0d: got %0d mask %b want %0d", t, n, g, sum[g], out_mask[g], want);
        end
      end
    end
    for (int k = 1; k <= 16; k++) begin
      checks++;
      if (seen_n[k] == 0) begin failures++; $display("N=%0d never tested", k); end
    end
    checks++;
    if (seen_zero == 0 || seen_big == 0) begin failures++; $display("out-of-range N never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
