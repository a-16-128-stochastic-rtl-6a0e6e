// Self-checking testbench for sb_dp_row at the full 128 inputs. Random weight
// and input bits every cycle; a reference model keeps the bit history and,
// after each clock once the chain is full, predicts the row output as the sum
// over j of XNOR(weight bit, input bit j) taken at the cycle when element j
// worked on that partial sum (COLS-1-j cycles before the last element). Also
// drives one clean dot-product with known bits and checks it leaves after
// exactly COLS cycles.
module tb_sb_dp_row;
  localparam int NC = 128;
  localparam int H  = 256;
  logic          clk = 1'b0;
  logic          rst_n, w_bit;
  logic [NC-1:0] x_bits;
  logic [7:0]    y;
  logic          wh [H];
  logic [NC-1:0] xh [H];
  int checks = 0, failures = 0;

  sb_dp_row #(.COLS(NC), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, c;
    rst_n = 1'b0; w_bit = 1'b0; x_bits = '0;
    @(posedge clk); #1;
    checks++;
    if (y !== 8'd0) begin failures++; $display("reset"); end
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      w_bit = 1'($urandom);
      for (int j = 0; j < NC; j++) x_bits[j] = 1'($urandom);
      wh[t % H] = w_bit; xh[t % H] = x_bits;
      @(posedge clk); #1;
      if (t >= NC) begin
        want = 0;
        for (int j = 0; j < NC; j++) begin
          c = t - (NC - 1 - j);
          want += (wh[c % H] == xh[c % H][j]) ? 1 : 0;
        end
        checks++;
        if (y !== 8'(want)) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d want %0d", t, y, want);
        end
      end
    end
    // One isolated dot-product: weight bit 1 throughout, input bit j = (j%3==0)
    // at cycle s+j only, zeros elsewhere. Count = number of j with j%3==0 = 43.
    w_bit = 1'b1;
    for (int k = 0; k < NC; k++) begin
      x_bits = '0;
      x_bits[k] = (k % 3 == 0);
      @(posedge clk); #1;
    end
    checks++;
    if (y !== 8'd43) begin failures++; $display("isolated dot-product: got %0d want 43", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
