// fft_output: capture of one FFT frame into the frame buffer.
//
// The FFT streams one output point per sample period (`sync` is the 48 kHz
// enable, one 27 MHz clock wide), bins 0..1023 in natural order, with the
// point's intensity on `fft_amp` and its index on `fft_idx`. This block
// writes the positive-frequency half (bins 0..511) into the frame buffer and
// then tells the peak detector that a whole frame is there.
//
// Three states, with the encodings of the description:
//   2'b00 IDLE   - wait until `fft_idx` is 0 (a new transform starts);
//   2'b01 ACTIVE - if bit 9 of the index is 0 and `sync` is high, latch the
//                  top ten bits of the amplitude and the low nine index bits,
//                  raise `we` for one clock, clear `rdy`, go to SYNC;
//                  if bit 9 is 1 (negative frequencies) raise `rdy`, go IDLE;
//   2'b10 SYNC   - `we` low; wait for `sync` to drop, then back to ACTIVE
//                  (or, if bit 9 is 1, raise `rdy` and go IDLE).
// `rdy` stays high from the end of one frame's positive half until the first
// write of the next frame, which gives the peak detector ~512 sample periods.
// `amp`, `bin`, `we` and `rdy` are registered; the frame buffer writes on the
// clock after `we` is raised.
module fft_output
  import fpgzam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,      // synchronous, active high
  input  logic                 sync,     // FFT output strobe (sample enable)
  input  logic [FFT_AMP_W-1:0] fft_amp,  // intensity of the current point
  input  logic [FFT_IDX_W-1:0] fft_idx,  // index of the current point
  output logic [FB_DATA_W-1:0] amp,      // amplitude to store
  output bin_t                 bin,      // frame buffer write address
  output logic                 we,       // frame buffer write enable
  output logic                 rdy       // a complete frame is in the buffer
);
  typedef enum logic [1:0] {
    FO_IDLE   = 2'b00,
    FO_ACTIVE = 2'b01,
    FO_SYNC   = 2'b10
  } fo_state_e;

  fo_state_e state;
  logic      negative;  // FFT is emitting the negative-frequency half

  assign negative = fft_idx[FFT_IDX_W-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= FO_IDLE;
      amp   <= '0;
      bin   <= '0;
      we    <= 1'b0;
      rdy   <= 1'b0;
    end else begin
      unique case (state)
        FO_IDLE: begin
          we <= 1'b0;
          if (fft_idx == '0) state <= FO_ACTIVE;
        end
        FO_ACTIVE: begin
          if (negative) begin
            rdy   <= 1'b1;
            we    <= 1'b0;
            state <= FO_IDLE;
          end else if (sync) begin
            amp   <= fft_amp[FFT_AMP_W-1 -: FB_DATA_W];
            bin   <= fft_idx[BIN_W-1:0];
            rdy   <= 1'b0;
            we    <= 1'b1;
            state <= FO_SYNC;
          end
        end
        FO_SYNC: begin
          we <= 1'b0;
          if (negative) begin
            rdy   <= 1'b1;
            state <= FO_IDLE;
          end else if (!sync) begin
            state <= FO_ACTIVE;
          end
        end
        default: state <= FO_IDLE;
      endcase
    end
  end

  // A write is a single-clock strobe.
  a_we_single: assert property (@(posedge clk) disable iff (rst) we |=> !we);
endmodule
