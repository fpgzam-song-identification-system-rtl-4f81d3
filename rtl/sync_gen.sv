// sync_gen: rising-edge detector for the "learn" and "zam" buttons.
//
// Emits a pulse exactly one clock wide on the first clock where `signal` is
// seen high after having been low, however long `signal` then stays high.
// A signal that is already high when reset releases gives no pulse until it
// has gone low and high again. `pulse` is registered.
module sync_gen (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  input  logic signal,  // level input (debounced button)
  output logic pulse    // one-clock pulse on the rising edge of `signal`
);
  logic seen;  // `signal` was high on the previous clock

  always_ff @(posedge clk) begin
    if (rst) begin
      seen  <= 1'b1;
      pulse <= 1'b0;
    end else begin
      seen  <= signal;
      pulse <= signal && !seen;
    end
  end
endmodule
