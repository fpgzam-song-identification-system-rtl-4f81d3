// tb_debounce: with a 6-clock settle time, glitches shorter than the settle
// time must not reach `clean`, and a held level must appear exactly
// STABLE_CYCLES+1 clocks after it was first sampled.
module tb_debounce;
  localparam int N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, noisy = 0, clean;

  debounce #(.STABLE_CYCLES(N)) dut (.clk, .rst, .noisy, .clean);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_clean(input logic v, input string what);
    checks++;
    if (clean !== v) begin failures++; $display("%s: clean=%b exp %b at %0t", what, clean, v, $time); end
  endtask

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    expect_clean(0, "after reset");
    for (int trial = 0; trial < 20; trial++) begin
      logic lvl;
      int glitch;
      lvl = ~clean;
      // glitch shorter than the settle time
      glitch = $urandom_range(1, N - 1);
      noisy = lvl;
      repeat (glitch) @(negedge clk);
      noisy = ~lvl;
      repeat (N + 3) @(negedge clk);
      expect_clean(~lvl, "glitch");
      // held change: first sampled at the next edge, visible after N+1 more
      noisy = lvl;
      repeat (N + 1) @(negedge clk);
      expect_clean(~lvl, "one clock early");
      @(negedge clk);
      expect_clean(lvl, "settled");
      repeat (3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
