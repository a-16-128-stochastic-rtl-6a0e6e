// Self-checking testbench for sb_b2s_cmp: all 65536 pairs of operand and random
// number; the stochastic bit must be 1 exactly when operand > random number.
// Also checks that over all 255 non-zero random numbers an operand v produces
// v-1 ones, the probability the converter is meant to encode.
module tb_sb_b2s_cmp;
  logic [7:0] value, rnd;
  logic       bit_o;
  int checks = 0, failures = 0;

  sb_b2s_cmp #(.W(8)) dut (.*);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      int ones;
      ones = 0;
      for (int r = 0; r < 256; r++) begin
        value = 8'(v); rnd = 8'(r);
        #1;
        checks++;
        if (bit_o !== (v > r)) begin
          failures++;
          if (failures < 10) $display("v=%0d r=%0d got %b", v, r, bit_o);
        end
        if (r != 0 && bit_o) ones++;
      end
      checks++;
      if (ones != ((v == 0) ? 0 : v - 1)) begin
        failures++;
        $display("v=%0d: %0d ones over 255 random numbers", v, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
