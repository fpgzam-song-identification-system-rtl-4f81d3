// fpgzam: song identifier top level.
//
// The design learns up to three short songs (2 s each) as fingerprints and
// then tells which of them a short clip (about 250 ms) comes from. A song is
// reduced to a sequence of "slices": for every 1024-point FFT frame of the
// audio (frames overlapped by 50%), the loudest bin in each of five 100-bin
// frequency ranges is kept, and the five 9-bit bin numbers form a 45-bit
// slice. A clip of 22 slices is slid over the 3 x 170 stored song slices,
// counting how many bin numbers differ; fewer than 50 differences in a
// window is a match, and the bank number of the matching song is reported.
//
// Data path (everything on one 27 MHz clock `clk`):
//   clk_en_48k    sample-rate enable (27 MHz / 564)
//   overlap_addr  audio sample address for overlapped frames, FFT start
//   [FFT core]    external 1024-point streaming FFT, through the fft_* ports
//   intensity     re^2 + im^2 of every FFT output point; bits
//                 AMP_LSB+18..AMP_LSB feed the input cascade
//   input_cascade frame capture, frame buffer, peak detector -> slices
//   zam_fsm       learn / zam / search control, memory write addresses
//   bram x2       song memory 512 x 45, clip memory 32 x 45, each behind an
//                 addr_mux that gives the write address priority
//   searcher      sliding comparison, result = bank 1..3 or 0 (no match)
//   debounce, sync_gen  button conditioning into one-clock pulses
//
// The FFT and the audio sample store are outside this module: the audio
// sample at `audio_addr` must be presented on `audio_sample`; it is passed to
// `fft_xn_re`, and the FFT's output point (`fft_xk_re`, `fft_xk_im`,
// `fft_xk_index`, natural order, one point per `fft_ce`) is expected back.
// `fft_sclr` is the synchronous clear of the FFT, driven by `rst`.
// On the original board the bank number is shown on two active-low LEDs as
// ~result; here `result` is brought out as it is.
module fpgzam
  import fpgzam_pkg::*;
#(
  parameter int unsigned DEBOUNCE_CYCLES = 270000, // 10 ms at 27 MHz
  parameter int unsigned CLK_DIVIDE      = 564,    // 27 MHz -> 47.87 kHz
  parameter int unsigned AMP_LSB         = 6       // intensity bits used: [AMP_LSB+18:AMP_LSB]
) (
  input  logic                        clk,          // 27 MHz system clock
  input  logic                        rst,          // synchronous, active high
  input  logic                        btn_learn,    // "learn" button, active high
  input  logic                        btn_zam,      // "zam" button, active high
  input  logic [1:0]                  idx,          // bank to learn into (1..3)
  // audio sample store
  output logic [16:0]                 audio_addr,
  input  logic signed [7:0]           audio_sample,
  // FFT core
  output logic                        fft_ce,       // sample-rate clock enable
  output logic                        fft_start,
  output logic                        fft_sclr,
  output logic signed [7:0]           fft_xn_re,
  input  logic signed [FFT_AMP_W-1:0] fft_xk_re,
  input  logic signed [FFT_AMP_W-1:0] fft_xk_im,
  input  logic [FFT_IDX_W-1:0]        fft_xk_index,
  // status
  output logic                        learn_mode,   // a song is being learned
  output logic                        searching,    // clip recorded, search running
  output logic                        search_done,
  output logic [1:0]                  result        // matching bank, 0 = no match
);
  logic ce48, learn_lvl, zam_lvl, learn_pulse, zam_pulse;
  logic [2*FFT_AMP_W-1:0] power;
  slice_t slice, song_dout, clip_dout;
  logic   slice_rdy, we_song, we_clip;
  logic [SONG_ADDR_W-1:0] wr_addr, song_raddr, song_addr;
  logic [CLIP_ADDR_W-1:0] clip_raddr, clip_addr;

  // ---- buttons ----
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_learn (
    .clk, .rst, .noisy(btn_learn), .clean(learn_lvl));
  debounce #(.STABLE_CYCLES(DEBOUNCE_CYCLES)) u_db_zam (
    .clk, .rst, .noisy(btn_zam), .clean(zam_lvl));
  sync_gen u_sync_learn (.clk, .rst, .signal(learn_lvl), .pulse(learn_pulse));
  sync_gen u_sync_zam   (.clk, .rst, .signal(zam_lvl),   .pulse(zam_pulse));

  // ---- audio in, FFT control ----
  clk_en_48k #(.DIVIDE(CLK_DIVIDE)) u_clk_en (.clk, .rst, .ce(ce48));

  overlap_addr u_overlap (
    .clk, .rst, .ce(ce48), .restart(learn_pulse || zam_pulse),
    .addr(audio_addr), .fft_start);

  assign fft_ce    = ce48;
  assign fft_sclr  = rst;
  assign fft_xn_re = audio_sample;

  // ---- FFT out -> slices ----
  intensity #(.IN_W(FFT_AMP_W)) u_intensity (
    .re(fft_xk_re), .im(fft_xk_im), .power);

  input_cascade u_input_cascade (
    .clk, .rst, .sync(ce48),
    .fft_amp(power[AMP_LSB +: FFT_AMP_W]), .fft_idx(fft_xk_index),
    .slice, .ready(slice_rdy));

  // ---- ZAM subsystem ----
  zam_fsm u_fsm (
    .clk, .rst, .frame(slice_rdy), .learn(learn_pulse), .start(zam_pulse),
    .stop(search_done), .idx,
    .we_song, .we_clip, .search(searching), .mode(learn_mode), .addr(wr_addr));

  addr_mux #(.WIDTH(SONG_ADDR_W)) u_song_amux (
    .write(we_song), .waddr(wr_addr), .raddr(song_raddr), .addr(song_addr));
  bram #(.ADDR_W(SONG_ADDR_W), .DATA_W(SLICE_W)) u_song_mem (
    .clk, .we(we_song), .addr(song_addr), .din(slice), .dout(song_dout));

  addr_mux #(.WIDTH(CLIP_ADDR_W)) u_clip_amux (
    .write(we_clip), .waddr(wr_addr[CLIP_ADDR_W-1:0]), .raddr(clip_raddr), .addr(clip_addr));
  bram #(.ADDR_W(CLIP_ADDR_W), .DATA_W(SLICE_W)) u_clip_mem (
    .clk, .we(we_clip), .addr(clip_addr), .din(slice), .dout(clip_dout));

  searcher u_searcher (
    .clk, .rst, .enable(searching), .song_din(song_dout), .clip_din(clip_dout),
    .song_addr(song_raddr), .clip_addr(clip_raddr), .done(search_done), .result);
endmodule
