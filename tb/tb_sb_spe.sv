// Self-checking testbench for sb_spe: random weight bit, input bit and incoming
// partial sum every cycle; after each clock the registered output must equal
// the previous partial sum plus the XNOR of the two bits. Also checks that reset
// clears the register.
module tb_sb_spe;
  logic       clk = 1'b0;
  logic       rst_n;
  logic       w_bit, x_bit;
  logic [7:0] psum_in, psum_out;
  int checks = 0, failures = 0;

  sb_spe #(.W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_v;
    rst_n = 1'b0; w_bit = 1'b1; x_bit = 1'b1; psum_in = 8'd77;
    @(posedge clk); #1;
    checks++;
    if (psum_out !== 8'd0) begin failures++; $display("reset: got %0d", psum_out); end
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      w_bit   = 1'($urandom);
      x_bit   = 1'($urandom);
      psum_in = 8'($urandom_range(0, 127));
      expect_v = psum_in + ((w_bit == x_bit) ? 8'd1 : 8'd0);
      @(posedge clk); #1;
      checks++;
      if (psum_out !== expect_v) begin
        failures++;
        if (failures < 10) $display("w=%b x=%b in=%0d: got %0d want %0d", w_bit, x_bit, psum_in, psum_out, expect_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
