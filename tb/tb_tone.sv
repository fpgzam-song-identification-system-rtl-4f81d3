// tb_tone: the whole song identifier driven by test tones through a
// behavioural model of the FFT core, at a reduced sample period (4 clocks)
// and debounce time (8 clocks).
//
// Audio store stand-in: sample n of a sound is round(A * sin(2 pi f n / fs))
// with fs = 27 MHz / 564 and A = 10 (8-bit signed). Sounds: a 750 Hz tone,
// and a "song" of 2 kHz for the first second followed by 7 kHz.
//
// FFT stand-in: a 1024-point unscaled DFT in natural order, streamed with a
// latency of one frame. On every `fft_ce` it takes one input sample and
// presents one output point (index = position in the frame) of the frame
// it finished last; a low `fft_start` marks the sample as the first of a new
// frame. Its outputs are rounded to integers and fit the 19-bit ports.
//
// Reference: for each finished frame the testbench works out the slice on
// its own (power re^2+im^2, bits 24:15 as the stored amplitude, strict
// maximum per 100-bin range starting from bin 0 at amplitude 0) and compares
// every slice the design produces with it. It checks that the tones land in
// the expected bins (750 Hz -> 16, 2 kHz -> 43, 7 kHz -> 150, i.e.
// f * 1024 / fs rounded), records the slices written to the song and clip
// memories, and predicts the search result by scoring every window itself.
//
// Scenario: play 750 Hz and check slices; learn the 2 kHz / 7 kHz song into
// bank 1 and the 750 Hz tone into bank 3; zam the start of the song.
// Single tones leave the other ranges empty (bin 0), so two different tones
// differ in only one or two ranges per slice (22 or 44 of 110 bins) and fall
// under the threshold: the predicted result, not "bank 1", is what is
// checked, and the scores are printed.
// The test frequencies and the 750 Hz -> bin 16 expectation are the source
// description's; the tone level, the DFT stand-in and the reference check
// are this testbench's own.
module tb_tone;
  localparam int  DIV = 4;
  localparam int  DEB = 8;
  localparam real FS  = 27.0e6 / 564.0;
  localparam real AMP = 10.0;
  localparam real PI  = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, btn_learn = 0, btn_zam = 0;
  logic [1:0] idx = 0;
  logic [16:0] audio_addr;
  logic signed [7:0] audio_sample;
  logic fft_ce, fft_start, fft_sclr;
  logic signed [7:0] fft_xn_re;
  logic signed [18:0] fft_xk_re = '0, fft_xk_im = '0;
  logic [9:0] fft_xk_index = '0;
  logic learn_mode, searching, search_done;
  logic [1:0] result;

  fpgzam #(.DEBOUNCE_CYCLES(DEB), .CLK_DIVIDE(DIV)) dut (
    .clk, .rst, .btn_learn, .btn_zam, .idx, .audio_addr, .audio_sample,
    .fft_ce, .fft_start, .fft_sclr, .fft_xn_re, .fft_xk_re, .fft_xk_im,
    .fft_xk_index, .learn_mode, .searching, .search_done, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- audio store stand-in ----------------
  int sound = 0;   // 0 silence, 1 750 Hz, 2 2 kHz then 7 kHz

  function automatic logic signed [7:0] tone_sample(int s, int n);
    real f, x;
    if (s == 0) return '0;
    if (s == 1) f = 750.0;
    else        f = (n < int'(FS)) ? 2000.0 : 7000.0;
    x = AMP * $sin(2.0 * PI * f * real'(n) / FS);
    return 8'($rtoi(x >= 0.0 ? x + 0.5 : x - 0.5));
  endfunction

  assign audio_sample = tone_sample(sound, int'(audio_addr));

  // ---------------- FFT stand-in ----------------
  real cos_t [1024], sin_t [1024];
  int  xin [1024];
  int  ore [1024], oim [1024];       // frame being presented
  int  in_cnt = 0;
  logic [44:0] ref_cur = '0;         // reference slice of the presented frame
  int  tone_frames = 0;              // frames of 750 Hz transformed so far

  initial
    for (int i = 0; i < 1024; i++) begin
      cos_t[i] = $cos(2.0 * PI * real'(i) / 1024.0);
      sin_t[i] = $sin(2.0 * PI * real'(i) / 1024.0);
      ore[i] = 0; oim[i] = 0;
    end

  function automatic int rnd(real x);
    return $rtoi(x >= 0.0 ? x + 0.5 : x - 0.5);
  endfunction

  task automatic transform();
    for (int k = 0; k <= 512; k++) begin
      real sr, si;
      sr = 0.0; si = 0.0;
      for (int n = 0; n < 1024; n++) begin
        sr += real'(xin[n]) * cos_t[(k * n) % 1024];
        si -= real'(xin[n]) * sin_t[(k * n) % 1024];
      end
      ore[k] = rnd(sr); oim[k] = rnd(si);
      if (k > 0 && k < 512) begin ore[1024 - k] = ore[k]; oim[1024 - k] = -oim[k]; end
    end
    if (sound == 1) tone_frames++;
    // reference slice
    for (int r = 0; r < 5; r++) begin
      int best, best_v;
      best = 0; best_v = 0;
      for (int a = 0; a < 100; a++) begin
        longint p;
        int v;
        p = longint'(ore[100 * r + a]) * ore[100 * r + a] + longint'(oim[100 * r + a]) * oim[100 * r + a];
        v = int'((p >> 15) & 64'd1023);
        if (v > best_v) begin best = 100 * r + a; best_v = v; end
      end
      ref_cur[9 * r +: 9] = 9'(best);
    end
  endtask

  always @(posedge clk) if (fft_ce) begin
    int n;
    n = fft_start ? in_cnt : 0;
    fft_xk_index <= 10'(n);
    fft_xk_re    <= 19'(ore[n]);
    fft_xk_im    <= 19'(oim[n]);
    xin[n] = int'(fft_xn_re);
    if (n == 1023) transform();
    in_cnt <= (n + 1) % 1024;
  end

  // ---------------- slice and memory monitors ----------------
  int n_slices = 0, n_750 = 0;
  logic rdy_q = 0;
  logic [44:0] ref_song [512], ref_clip [32];
  bit song_written [512];

  initial for (int a = 0; a < 512; a++) song_written[a] = 0;

  always @(posedge clk) begin
    if (dut.slice_rdy && !rdy_q) begin
      n_slices++;
      checks++;
      if (dut.slice !== ref_cur) begin
        failures++;
        if (failures < 10) $display("slice %h, reference %h", dut.slice, ref_cur);
      end
      if (sound == 1 && tone_frames > 0 && !learn_mode && !searching) begin
        checks++;
        n_750++;
        if (dut.slice[8:0] !== 9'd16) begin failures++; $display("750 Hz in bin %0d", dut.slice[8:0]); end
      end
    end
    rdy_q <= dut.slice_rdy;
    if (dut.we_song) begin ref_song[dut.wr_addr] = ref_cur; song_written[dut.wr_addr] = 1; end
    if (dut.we_clip) ref_clip[dut.wr_addr[4:0]] = ref_cur;
  end

  // ---------------- stimulus ----------------
  task automatic press(ref logic b);
    @(negedge clk); b = 1;
    repeat (DEB + 20) @(negedge clk);
    b = 0;
  endtask

  task automatic learn(input int s, input int bank);
    int t;
    sound = s;
    idx = 2'(bank);
    press(btn_learn);
    t = 0;
    while (learn_mode && t < 2_000_000) begin @(negedge clk); t++; end
  endtask

  // predicted result: bank of the last window scoring under 50
  function automatic int predict(output int best_d [3]);
    int res;
    res = 0;
    for (int b = 0; b < 3; b++) best_d[b] = 999;
    for (int base = 0; base <= 3 * 170 - 22; base++) begin
      int d, bank;
      d = 0;
      for (int j = 0; j < 22; j++) begin
        logic [44:0] s;
        s = dut.u_song_mem.mem[base + j];
        for (int r = 0; r < 5; r++) if (s[9 * r +: 9] != ref_clip[j][9 * r +: 9]) d++;
      end
      bank = (base + 21) / 170 + 1;
      if (d < best_d[bank - 1]) best_d[bank - 1] = d;
      if (d < 50) res = bank;
    end
    return res;
  endfunction

  initial begin
    int t, exp_res;
    int best_d [3];
    repeat (5) @(negedge clk); rst = 0;

    // 750 Hz: a few frames of slices
    sound = 1;
    repeat (6 * 1024 * DIV) @(negedge clk);

    learn(2, 1);
    learn(1, 3);
    // stored slices must be the reference ones; tone bins of the song
    for (int a = 0; a < 512; a++) if (song_written[a]) begin
      checks++;
      if (dut.u_song_mem.mem[a] !== ref_song[a]) begin failures++; $display("song slot %0d differs", a); end
    end
    checks += 3;
    if (ref_song[5][8:0] != 9'd43)     begin failures++; $display("2 kHz in bin %0d", ref_song[5][8:0]); end
    if (ref_song[160][17:9] != 9'd150) begin failures++; $display("7 kHz in bin %0d", ref_song[160][17:9]); end
    if (ref_song[345][8:0] != 9'd16)   begin failures++; $display("750 Hz learned as bin %0d", ref_song[345][8:0]); end

    // zam the first quarter second of the song
    sound = 2;
    press(btn_zam);
    t = 0;
    while (!search_done && t < 2_000_000) begin @(negedge clk); t++; end
    exp_res = predict(best_d);
    checks++;
    if (result !== 2'(exp_res)) begin failures++; $display("result %0d, predicted %0d", result, exp_res); end
    $display("zam of 2 kHz clip: result %0d (predicted %0d), lowest delta per bank %0d %0d %0d",
             result, exp_res, best_d[0], best_d[1], best_d[2]);
    checks++;
    if (n_750 < 3 || n_slices < 170 * 2 + 22) begin
      failures++;
      $display("too few slices: %0d, of 750 Hz alone %0d", n_slices, n_750);
    end
    $display("slices=%0d 750Hz-slices=%0d", n_slices, n_750);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
