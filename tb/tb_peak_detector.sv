// tb_peak_detector: the testbench plays the frame buffer (one clock of read
// latency, five ranges per address) holding random spectra with planted
// peaks and ties, and checks the slice, `ready` 102 clocks after `ena`, and
// that everything is zero while `ena` is low.
module tb_peak_detector;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ena = 0;
  logic [4:0][9:0] din = '0;
  logic [8:0] addr;
  logic [44:0] slice;
  logic ready;
  logic [9:0] spec [512];

  peak_detector dut (.clk, .rst, .ena, .din, .addr, .slice, .ready);

  always #5 clk = ~clk;

  // frame buffer behaviour
  always_ff @(posedge clk)
    for (int k = 0; k < 5; k++)
      din[k] <= (addr < 100) ? spec[addr + 100 * k] : 10'd0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int t = 0; t < 40; t++) begin
      logic [44:0] exp_s;
      int lat;
      // spectrum: noise, plus in some trials a tie for the maximum
      for (int b = 0; b < 512; b++) spec[b] = 10'($urandom_range(t % 4 == 0 ? 0 : 700));
      if (t % 3 == 1) begin
        spec[5] = 10'd1000; spec[60] = 10'd1000;     // tie in range 0: first wins
      end
      spec[499] = 10'd1023;                          // last bin of range 4
      // reference: first bin holding the maximum of each range
      for (int k = 0; k < 5; k++) begin
        int best, bin;
        best = 0; bin = 0;
        for (int o = 0; o < 100; o++)
          if (spec[100 * k + o] > 10'(best)) begin best = spec[100 * k + o]; bin = 100 * k + o; end
        exp_s[9 * k +: 9] = 9'(bin);
      end
      @(negedge clk);
      checks++;
      if (ready !== 0 || slice !== '0) begin failures++; $display("outputs not zero while disabled"); end
      ena = 1;
      lat = 0;
      while (!ready && lat < 400) begin @(negedge clk); lat++; end
      checks += 2;
      if (lat != 102) begin failures++; $display("ready after %0d clocks, expected 102", lat); end
      if (slice !== exp_s) begin failures++; $display("trial %0d slice %h exp %h", t, slice, exp_s); end
      repeat (20) @(negedge clk);
      checks++;
      if (!ready || slice !== exp_s) begin failures++; $display("result not held"); end
      ena = 0;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
