// tb_fft_output: streams FFT points (one per `sync`, every 4 clocks) starting
// in the middle of a frame, and checks that exactly bins 0..511 of every
// complete frame are written once, in order, with amplitude bits 18:9, that
// `we` is one clock wide, and that `rdy` is high in the negative half and low
// while the positive half is being written.
module tb_fft_output;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, sync = 0;
  logic [18:0] fft_amp = '0;
  logic [9:0]  fft_idx = 10'd700;
  logic [9:0]  amp;
  logic [8:0]  bin;
  logic we, rdy;
  int exp_bin = 0, writes = 0, frames_done = 0;
  logic [18:0] amp_of [1024];

  fft_output dut (.clk, .rst, .sync, .fft_amp, .fft_idx, .amp, .bin, .we, .rdy);

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write monitor
  always @(posedge clk) if (!rst && we) begin
    checks += 2;
    if (bin !== 9'(exp_bin)) begin failures++; $display("write bin %0d exp %0d", bin, exp_bin); end
    if (amp !== amp_of[exp_bin][18:9]) begin failures++; $display("bin %0d amp %0d exp %0d", bin, amp, amp_of[exp_bin][18:9]); end
    exp_bin = (exp_bin + 1) % 512;
    writes++;
  end

  initial begin
    for (int i = 0; i < 1024; i++) amp_of[i] = 19'($urandom);
    fft_amp = amp_of[fft_idx];
    @(negedge clk); @(negedge clk); rst = 0;
    for (int s = 0; s < 324 + 3 * 1024; s++) begin
      // point held for 4 clocks, sync on the last
      repeat (3) @(negedge clk);
      sync = 1;
      @(negedge clk);
      sync = 0;
      // checks on rdy at chosen points
      if (fft_idx == 10'd600 && s > 324) begin
        checks++;
        if (!rdy) begin failures++; $display("rdy low in negative half"); end
      end
      if (fft_idx == 10'd300) begin
        checks++;
        if (rdy) begin failures++; $display("rdy high while writing"); end
      end
      if (fft_idx == 10'd1023 && s > 324) frames_done++;
      fft_idx = fft_idx + 1'b1;
      fft_amp = amp_of[fft_idx];
    end
    // the partial first frame (from 700) must not be written
    checks++;
    if (writes != 3 * 512) begin failures++; $display("writes %0d exp %0d", writes, 3 * 512); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  a_we_pulse: assert property (@(posedge clk) disable iff (rst) we |=> !we);
endmodule
