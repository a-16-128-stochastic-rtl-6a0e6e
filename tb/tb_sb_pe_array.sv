// Self-checking testbench for sb_pe_array at the full 16 x 128 size. Each row
// gets its own random weight bit and every column one random input bit shared
// by all rows; a reference model predicts every row output after each clock
// from the bit history, as in the row testbench. This checks that rows use
// their own weight and the common column inputs.
module tb_sb_pe_array;
  localparam int NR = 16, NC = 128, H = 256;
  logic          clk = 1'b0;
  logic          rst_n;
  logic [NR-1:0] w_bits;
  logic [NC-1:0] x_bits;
  logic [7:0]    y [NR];
  logic [NR-1:0] wh [H];
  logic [NC-1:0] xh [H];
  int checks = 0, failures = 0;

  sb_pe_array #(.NROWS(NR), .NCOLS(NC), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, c;
    rst_n = 1'b0; w_bits = '0; x_bits = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      for (int r = 0; r < NR; r++) w_bits[r] = 1'($urandom);
      for (int j = 0; j < NC; j++) x_bits[j] = 1'($urandom);
      wh[t % H] = w_bits; xh[t % H] = x_bits;
      @(posedge clk); #1;
      if (t >= NC) begin
        for (int r = 0; r < NR; r++) begin
          want = 0;
          for (int j = 0; j < NC; j++) begin
            c = t - (NC - 1 - j);
            want += (wh[c % H][r] == xh[c % H][j]) ? 1 : 0;
          end
          checks++;
          if (y[r] !== 8'(want)) begin
            failures++;
            if (failures < 10) $display("t=%0d row %0d got %0d want %0d", t, r, y[r], want);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
