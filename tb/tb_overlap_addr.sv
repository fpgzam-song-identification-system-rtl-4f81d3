// tb_overlap_addr: with an enable every third clock, the address must run
// 0..1023, 512..1535, 1024..2047, ... (frames start 512 samples apart), and a
// restart pulse between enables must bring it back to 0 at the next enable.
module tb_overlap_addr;
  int checks = 0, failures = 0, frames = 0, restarts = 0;
  logic clk = 0, rst = 1, ce = 0, restart = 0;
  logic [16:0] addr;
  logic fft_start;

  overlap_addr dut (.clk, .rst, .ce, .restart, .addr, .fft_start);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one enable pulse, then two idle clocks
  task automatic step();
    @(negedge clk); ce = 1;
    @(negedge clk); ce = 0;
    @(negedge clk);
  endtask

  initial begin
    int n;  // samples since (re)start
    @(negedge clk); @(negedge clk); rst = 0;
    n = 0;
    for (int i = 0; i < 5000; i++) begin
      int exp_a;
      if (i == 3100) begin
        @(negedge clk); restart = 1; @(negedge clk); restart = 0;
        step();
        checks += 2;
        if (addr !== 17'd0) begin failures++; $display("restart addr %0d", addr); end
        if (fft_start !== 1'b0) begin failures++; $display("start not dropped on restart"); end
        restarts++;
        n = 0;
        continue;
      end
      step();
      n++;
      // after n enables: frame = n / 1024, position in frame = n % 1024
      exp_a = (n / 1024) * 512 + (n % 1024);
      checks++;
      if (addr !== 17'(exp_a)) begin failures++; $display("n=%0d addr %0d exp %0d", n, addr, exp_a); end
      if (n % 1024 == 0) frames++;
    end
    checks++;
    if (frames < 3 || restarts != 1) begin failures++; $display("coverage frames=%0d restarts=%0d", frames, restarts); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
