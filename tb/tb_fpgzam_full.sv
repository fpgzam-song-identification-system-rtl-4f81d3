// tb_fpgzam_full: one complete operation of the song identifier with every
// parameter at its default: 27 MHz clock, 564-clock sample period (47.87 kHz)
// and 10 ms (270000-clock) button debounce. A synthetic song (see
// tb_fpgzam for the FFT stand-in) is learned into bank 2, 170 frames of
// 1024 samples, and its stored slices are checked; then a 22-frame clip
// from frame 40 of the same song is zammed and must give result 2. About
// 112 million clocks.
module tb_fpgzam_full;
  localparam int DIV = 564;
  localparam int DEB = 270000;

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

  // mechanism counters
  int n_learn = 0, n_abort = 0, n_zam = 0, n_match = 0, n_nomatch = 0,
      n_noisy = 0, n_restart = 0, n_slices = 0;

  fpgzam dut (
    .clk, .rst, .btn_learn, .btn_zam, .idx, .audio_addr, .audio_sample,
    .fft_ce, .fft_start, .fft_sclr, .fft_xn_re, .fft_xk_re, .fft_xk_im,
    .fft_xk_index, .learn_mode, .searching, .search_done, .result);

  always #5 clk = ~clk;

  // audio store stand-in: a sample derived from the address
  assign audio_sample = 8'(audio_addr * 3);

  initial begin
    repeat (150_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- synthetic songs ----------------
  int song = 0, frame_no = 0;   // what is playing
  bit noisy = 0;                // perturb every third frame

  function automatic int peak_bin(int s, int n, int k);
    int unsigned h;
    h = 32'(s) * 32'd2654435761 ^ 32'(n) * 32'd40503 ^ 32'(k) * 32'd2246822519;
    h = h ^ (h >> 13);
    h = h * 32'd3266489917;
    h = h ^ (h >> 16);
    return 100 * k + int'(h % 100);
  endfunction

  function automatic logic [44:0] slice_of(int s, int n, bit nz);
    logic [44:0] v;
    for (int k = 0; k < 5; k++) begin
      int b;
      b = peak_bin(s, n, k);
      if (nz && n % 3 == 0 && k == 0) b = (b + 50) % 100;  // move range 0's peak
      v[9*k +: 9] = 9'(b);
    end
    return v;
  endfunction

  // FFT stand-in: next point on every enable, natural order
  always @(posedge clk) if (fft_ce) begin
    logic [9:0] ni;
    logic [44:0] sl;
    int re;
    ni = fft_xk_index + 1'b1;
    if (ni == 0) frame_no <= frame_no + 1;
    sl = slice_of(song, (ni == 0) ? frame_no + 1 : frame_no, noisy);
    re = $urandom_range(1000);
    for (int k = 0; k < 5; k++)
      if (ni < 500 && 9'(ni) == sl[9*k +: 9] && song != 0) re = 3000 + $urandom_range(2000);
    fft_xk_index <= ni;
    fft_xk_re    <= 19'(re);
    fft_xk_im    <= 19'($urandom_range(600)) - 19'd300;
  end

  // count restarts of the audio address after a button pulse
  bit restart_pend = 0;
  logic [16:0] addr_q = '0;
  always @(posedge clk) begin
    if (dut.learn_pulse || dut.zam_pulse) restart_pend = 1;
    else if (restart_pend && audio_addr == 17'd0 && addr_q != 17'd0) begin
      n_restart++;
      restart_pend = 0;
    end
    addr_q <= audio_addr;
  end

  // count slices produced
  logic rdy_q = 0;
  always @(posedge clk) begin
    if (dut.slice_rdy && !rdy_q) n_slices++;
    rdy_q <= dut.slice_rdy;
  end

  // wait until the FFT stand-in starts frame 0 of song s at `start_frame`
  task automatic play(input int s, input int start_frame, input bit nz);
    @(posedge clk iff (fft_ce && fft_xk_index == 10'd1023));
    song = s; frame_no = start_frame - 1; noisy = nz;
    @(posedge clk iff (fft_ce && fft_xk_index == 10'd40));
  endtask

  task automatic press(ref logic b);
    @(negedge clk); b = 1;
    repeat (DEB + 20) @(negedge clk);
    b = 0;
  endtask

  task automatic learn_song(input int s, input int bank);
    int t;
    play(s, 0, 0);
    idx = 2'(bank);
    press(btn_learn);
    checks++;
    if (!learn_mode) begin failures++; $display("learn mode not entered"); end
    t = 0;
    while (learn_mode && t < 120_000_000) begin @(negedge clk); t++; end
    for (int a = 0; a < 170; a++) begin
      logic [44:0] got, e;
      got = dut.u_song_mem.mem[(bank - 1) * 170 + a];
      e = slice_of(s, a, 0);
      checks++;
      if (got !== e) begin
        failures++;
        if (failures < 10) $display("bank %0d slot %0d: %h exp %h", bank, a, got, e);
      end
    end
    n_learn++;
  endtask

  task automatic zam(input int s, input int start_frame, input bit nz, input int exp_res);
    int t;
    play(s, start_frame, nz);
    press(btn_zam);
    t = 0;
    while (!search_done && t < 120_000_000) begin @(negedge clk); t++; end
    checks++;
    if (result !== 2'(exp_res)) begin failures++; $display("zam song %0d @%0d: result %0d exp %0d", s, start_frame, result, exp_res); end
    n_zam++;
    if (exp_res == 0) n_nomatch++; else n_match++;
    if (nz) n_noisy++;
    repeat (10) @(negedge clk);
    checks++;
    if (searching || result !== 2'(exp_res)) begin failures++; $display("search not ended / result lost"); end
  endtask

  initial begin
    repeat (5) @(negedge clk); rst = 0;
    learn_song(2, 2);
    zam(2, 40, 0, 2);
    checks++;
    if (n_learn != 1 || n_match != 1 || n_restart < 1 || n_slices < 170 + 22) begin
      failures++;
      $display("coverage: learn=%0d match=%0d restart=%0d slices=%0d", n_learn, n_match, n_restart, n_slices);
    end
    $display("learned=%0d matches=%0d restarts=%0d slices=%0d", n_learn, n_match, n_restart, n_slices);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
