// tb_input_cascade: streams 6 FFT frames (one point per `sync`, every 4
// clocks) with one planted peak per 100-bin range and random lower points,
// and checks that each frame yields exactly one slice equal to the planted
// bins, presented with `ready` high 103 clocks (one in the capture FSM, 102 in the
// peak detector) after the first
// negative-frequency point, and that `ready` is low while bins are written.
module tb_input_cascade;
  localparam int FRAMES = 6;
  int checks = 0, failures = 0, slices = 0;
  logic clk = 0, rst = 1, sync = 0;
  logic [18:0] fft_amp = '0;
  logic [9:0]  fft_idx = '0;
  logic [44:0] slice;
  logic ready, ready_q = 0;
  logic [44:0] exp_slice [FRAMES];
  int neg_start_clk = 0, clk_count = 0;

  input_cascade dut (.clk, .rst, .sync, .fft_amp, .fft_idx, .slice, .ready);

  always #5 clk = ~clk;
  always @(posedge clk) clk_count++;

  initial begin
    repeat (FRAMES * 1024 * 4 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slice monitor on the rising edge of ready
  always @(negedge clk) begin
    if (ready && !ready_q) begin
      checks += 2;
      if (slices < FRAMES && slice !== exp_slice[slices]) begin
        failures++; $display("frame %0d slice %h exp %h", slices, slice, exp_slice[slices]);
      end
      if (clk_count - neg_start_clk != 103) begin
        failures++; $display("ready %0d clocks after the negative half began", clk_count - neg_start_clk);
      end
      slices++;
    end
    ready_q = ready;
  end

  initial begin
    logic [18:0] amp_of [1024];
    @(negedge clk); @(negedge clk); rst = 0;
    for (int f = 0; f < FRAMES; f++) begin
      // spectrum: noise below 2^17, one peak per range at or above 2^18
      for (int i = 0; i < 1024; i++) amp_of[i] = 19'($urandom_range(131071));
      for (int k = 0; k < 5; k++) begin
        int b;
        b = 100 * k + $urandom_range(99);
        amp_of[b] = 19'(262144 + $urandom_range(262143));
        exp_slice[f][9*k +: 9] = 9'(b);
      end
      for (int i = 0; i < 1024; i++) begin
        fft_idx = 10'(i);
        fft_amp = amp_of[i];
        if (i == 512) neg_start_clk = clk_count;
        if (i == 200) begin
          checks++;
          if (ready) begin failures++; $display("ready high while capturing"); end
        end
        repeat (3) @(negedge clk);
        sync = 1; @(negedge clk); sync = 0;
      end
    end
    fft_idx = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (slices != FRAMES) begin failures++; $display("%0d slices for %0d frames", slices, FRAMES); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
