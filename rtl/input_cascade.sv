// input_cascade: FFT output stream in, fingerprint slices out.
//
// Wiring of the capture FSM (fft_output), the address multiplexer, the
// five-range frame buffer and the peak detector:
//   fft_output writes bins 0..511 (top ten amplitude bits) into the frame
//   buffer; when the FFT moves to the negative half it raises `rdy`, which
//   enables the peak detector; the detector reads the buffer through the
//   multiplexer (its read address passes whenever no write is in progress)
//   and, 102 clocks later, presents the slice with `ready` high. `ready`
//   falls when the next frame's first bin is written, one FFT frame
//   (1024 sample periods) after it rose.
module input_cascade
  import fpgzam_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 sync,     // FFT output strobe (sample enable)
  input  logic [FFT_AMP_W-1:0] fft_amp,  // intensity of the current point
  input  logic [FFT_IDX_W-1:0] fft_idx,  // index of the current point
  output slice_t               slice,
  output logic                 ready
);
  logic [FB_DATA_W-1:0]                 fo_amp;
  bin_t                                 fo_bin, pd_addr, fb_addr;
  logic                                 fo_we, fo_rdy;
  logic [NUM_RANGES-1:0][FB_DATA_W-1:0] fb_dout;

  fft_output u_fft_output (
    .clk, .rst, .sync, .fft_amp, .fft_idx,
    .amp(fo_amp), .bin(fo_bin), .we(fo_we), .rdy(fo_rdy)
  );

  addr_mux #(.WIDTH(BIN_W)) u_addr_mux (
    .write(fo_we), .waddr(fo_bin), .raddr(pd_addr), .addr(fb_addr)
  );

  frame_buffer u_frame_buffer (
    .clk, .we(fo_we), .addr(fb_addr), .din(fo_amp), .dout(fb_dout)
  );

  peak_detector u_peak_detector (
    .clk, .rst, .ena(fo_rdy), .din(fb_dout), .addr(pd_addr),
    .slice, .ready
  );
endmodule
