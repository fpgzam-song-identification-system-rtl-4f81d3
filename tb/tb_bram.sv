// tb_bram: writes random words to the 512 x 45 memory, reads them back with
// one clock of latency, and checks read-before-write on a shared address.
module tb_bram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [8:0]  addr = '0;
  logic [44:0] din = '0, dout;
  logic [44:0] model [512];

  bram dut (.clk, .we, .addr, .din, .dout);

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
      we = 1; addr = 9'(a); din = {13'($urandom), 32'($urandom)}; model[a] = din;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      int a;
      a = $urandom_range(511);
      @(negedge clk); addr = 9'(a);
      @(negedge clk);
      checks++;
      if (dout !== model[a]) begin failures++; $display("addr %0d got %h exp %h", a, dout, model[a]); end
    end
    // read-before-write: the old word appears while the new one is written
    @(negedge clk); addr = 9'd77; we = 1; din = ~model[77];
    @(negedge clk); we = 0;
    checks++;
    if (dout !== model[77]) begin failures++; $display("read-before-write failed"); end
    @(negedge clk);
    checks++;
    if (dout !== ~model[77]) begin failures++; $display("write after RBW failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
