// Self-checking testbench for sb_lfsr: reset loads the seed; each enabled step
// matches the recurrence s' = {s[6:0], s[7]^s[5]^s[4]^s[3]}; a disabled cycle
// holds the state; and the sequence visits all 255 non-zero values once per
// period of 255 steps.
module tb_sb_lfsr;
  logic       clk = 1'b0;
  logic       rst_n, en;
  logic [7:0] rnd;
  int checks = 0, failures = 0;
  localparam logic [7:0] SEED = 8'h5A;

  sb_lfsr #(.W(8), .TAPS(8'hB8), .SEED(SEED)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit seen [256];
    logic [7:0] prev, model;
    rst_n = 1'b0; en = 1'b1;
    @(posedge clk); #1;
    check(rnd == SEED, "reset loads seed");
    rst_n = 1'b1;
    model = SEED;
    for (int i = 0; i < 255; i++) begin
      check(!seen[model], $sformatf("value %0d repeats at step %0d", model, i));
      check(model != 0, "zero state");
      seen[model] = 1'b1;
      prev = rnd;
      @(posedge clk); #1;
      model = {model[6:0], model[7] ^ model[5] ^ model[4] ^ model[3]};
      check(rnd == model, $sformatf("step %0d: %0d -> got %0d want %0d", i, prev, rnd, model));
    end
    check(rnd == SEED, "period of 255");
    en = 1'b0; prev = rnd;
    repeat (3) @(posedge clk);
    #1 check(rnd == prev, "hold when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
