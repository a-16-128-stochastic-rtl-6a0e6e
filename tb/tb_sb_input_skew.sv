// Self-checking testbench for sb_input_skew at the full 128 columns: a new
// random vector every cycle; after each clock, column j must hold the element j
// of the vector presented j cycles earlier.
module tb_sb_input_skew;
  localparam int NC = 128;
  logic       clk = 1'b0;
  logic [7:0] x_in  [NC];
  logic [7:0] x_out [NC];
  logic [7:0] hist  [NC*2][NC];   // hist[t % (2*NC)] = vector presented at cycle t
  int checks = 0, failures = 0;

  sb_input_skew #(.NCOLS(NC), .W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int j = 0; j < NC; j++) x_in[j] = 8'($urandom);
      hist[t % (2*NC)] = x_in;
      #1;
      if (t >= NC) begin
        for (int j = 0; j < NC; j++) begin
          checks++;
          if (x_out[j] !== hist[(t - j) % (2*NC)][j]) begin
            failures++;
            if (failures < 10) $display("t=%0d col %0d: got %0d want %0d", t, j, x_out[j], hist[(t-j)%(2*NC)][j]);
          end
        end
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
