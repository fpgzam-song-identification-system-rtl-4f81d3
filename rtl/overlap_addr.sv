// overlap_addr: audio sample addressing for 50%-overlapped FFT frames.
//
// On every sample enable `ce` the sample address advances by one, while a
// frame counter counts 0..FRAME_LEN-1. When the counter wraps, the address
// steps back by BACKSTEP instead of advancing, so consecutive frames of
// FRAME_LEN = 1024 samples start 512 samples apart (50% overlap): frames
// cover 0..1023, 512..1535, 1024..2047, ...
// `restart` (the learn or zam button pulse, one 27 MHz clock wide) is held
// until the next `ce`, where it sets the address and the counter to zero and
// drops `fft_start` for that sample period, so a song or clip is always
// fingerprinted from its first sample. `fft_start` is high otherwise.
// A synchronous reset clears everything at once (the FFT's synchronous clear
// is driven from the same reset, keeping the two aligned).
module overlap_addr #(
  parameter int unsigned ADDR_W    = 17,   // 2 s at 48 kHz = 96000 samples
  parameter int unsigned FRAME_LEN = 1024, // FFT transform length
  parameter int unsigned BACKSTEP  = 511   // address decrement at frame end
) (
  input  logic              clk,
  input  logic              rst,        // synchronous, active high
  input  logic              ce,         // sample-rate enable
  input  logic              restart,    // one-clock request to start over
  output logic [ADDR_W-1:0] addr,       // audio sample address
  output logic              fft_start   // start strobe level for the FFT
);
  localparam int unsigned CW = $clog2(FRAME_LEN);

  logic [CW-1:0] count;
  logic          restart_pend;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr         <= '0;
      count        <= '0;
      fft_start    <= 1'b0;
      restart_pend <= 1'b0;
    end else begin
      if (restart) restart_pend <= 1'b1;
      if (ce) begin
        if (restart || restart_pend) begin
          addr         <= '0;
          count        <= '0;
          fft_start    <= 1'b0;
          restart_pend <= 1'b0;
        end else if (count == CW'(FRAME_LEN - 1)) begin
          addr      <= addr - ADDR_W'(BACKSTEP);
          count     <= '0;
          fft_start <= 1'b1;
        end else begin
          addr      <= addr + 1'b1;
          count     <= count + 1'b1;
          fft_start <= 1'b1;
        end
      end
    end
  end
endmodule
