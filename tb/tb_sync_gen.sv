// tb_sync_gen: random button levels; a pulse is expected exactly on the
// clock after each low-to-high change of the sampled level, and never twice
// for one press.
module tb_sync_gen;
  int checks = 0, failures = 0, pulses = 0;
  logic clk = 0, rst = 1, signal = 0, pulse;
  logic prev_s = 1'b0;  // level sampled at the edge that releases reset

  sync_gen dut (.clk, .rst, .signal, .pulse);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 2000; i++) begin
      logic exp_pulse;
      @(negedge clk);
      // expected pulse from the level sampled at the last edge
      signal = ($urandom_range(3) == 0) ? ~signal : signal;
      @(posedge clk); #1;
      exp_pulse = signal && !prev_s;
      prev_s = signal;
      checks++;
      if (pulse !== exp_pulse) begin failures++; $display("cycle %0d pulse=%b exp=%b", i, pulse, exp_pulse); end
      if (pulse) pulses++;
    end
    checks++;
    if (pulses < 50) begin failures++; $display("too few pulses %0d", pulses); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
