// tb_frame_buffer: fills all 512 entries, then checks that every read
// address below 100 returns entries a, a+100, ..., a+400 one clock later and
// that addresses from 100 up return zeros.
module tb_frame_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [8:0] addr = '0;
  logic [9:0] din = '0;
  logic [4:0][9:0] dout;
  logic [9:0] model [512];

  frame_buffer dut (.clk, .we, .addr, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk);
      we = 1; addr = 9'(a); din = 10'($urandom); model[a] = din;
    end
    @(negedge clk); we = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); addr = 9'(a);
      @(negedge clk);
      for (int k = 0; k < 5; k++) begin
        logic [9:0] e;
        e = (a < 100) ? model[a + 100 * k] : 10'd0;
        checks++;
        if (dout[k] !== e) begin failures++; $display("a=%0d k=%0d got %0d exp %0d", a, k, dout[k], e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
