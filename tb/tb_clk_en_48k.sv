// tb_clk_en_48k: the enable must be one clock wide and repeat every 564
// clocks (27 MHz / 564 = 47.87 kHz) at the default setting.
module tb_clk_en_48k;
  localparam int DIV = 564;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, ce;
  int cycle = 0, last = -1, pulses = 0;

  clk_en_48k dut (.clk, .rst, .ce);

  always #5 clk = ~clk;

  initial begin
    repeat (DIV * 30) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    while (pulses < 20) begin
      @(negedge clk);
      cycle++;
      if (ce) begin
        if (last >= 0) begin
          checks++;
          if (cycle - last != DIV) begin failures++; $display("period %0d", cycle - last); end
        end else begin
          checks++;
          if (cycle != DIV - 1) begin failures++; $display("first pulse after %0d", cycle); end
        end
        last = cycle;
        pulses++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
