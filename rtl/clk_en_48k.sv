// clk_en_48k: sample-rate clock enable.
//
// A free-running counter divides the 27 MHz system clock by DIVIDE and
// raises `ce` for one clock out of every DIVIDE. With DIVIDE = 564 the rate
// is 27e6/564 = 47.87 kHz, the "48 kHz" at which the FFT accepts one audio
// sample and emits one output point. The whole design runs on the 27 MHz
// clock; this pulse is used as an enable, never as a clock.
module clk_en_48k #(
  parameter int unsigned DIVIDE = 564
) (
  input  logic clk,
  input  logic rst,  // synchronous, active high
  output logic ce    // one-clock pulse every DIVIDE clocks
);
  localparam int unsigned CW = $clog2(DIVIDE);

  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (rst || count == CW'(DIVIDE - 1)) count <= '0;
    else                                 count <= count + 1'b1;
  end

  assign ce = (count == CW'(DIVIDE - 1));
endmodule
