// debounce: push-button debouncer.
//
// The input is sampled every clock; `clean` takes the input's value only
// after the input has held that value for STABLE_CYCLES consecutive clocks.
// Any change restarts the count. On reset `clean` takes the input's current
// value at once. With the default 270000 cycles the settle time is 10 ms at
// 27 MHz, the count used on the board the design was built for.
module debounce #(
  parameter int unsigned STABLE_CYCLES = 270000
) (
  input  logic clk,
  input  logic rst,    // synchronous, active high
  input  logic noisy,  // raw button level
  output logic clean   // debounced level
);
  localparam int unsigned CW = $clog2(STABLE_CYCLES + 1);

  logic          last;   // input value the count refers to
  logic [CW-1:0] count;  // clocks `last` has been stable

  always_ff @(posedge clk) begin
    if (rst) begin
      last  <= noisy;
      clean <= noisy;
      count <= '0;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CW'(STABLE_CYCLES)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end
endmodule
