// tb_searcher: the testbench holds a 3 x 170-slice song memory and a
// 22-slice clip memory (one clock read latency, as the block RAMs have) and
// checks the searcher's result for: an exact copy of a window in each bank;
// copies with 49 and 50 changed bins (threshold 50: match / no match); a
// clip found nowhere; and a window straddling banks 1 and 2 (reported as
// bank 2, the bank of its last slice). It also checks the search time
// (489 windows x 24 clocks) and the `done` handshake.
module tb_searcher;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, enable = 0;
  logic [44:0] song_din, clip_din;
  logic [8:0] song_addr;
  logic [4:0] clip_addr;
  logic done;
  logic [1:0] result;
  logic [44:0] song [512];
  logic [44:0] clip [32];

  searcher dut (.clk, .rst, .enable, .song_din, .clip_din, .song_addr, .clip_addr, .done, .result);

  always #5 clk = ~clk;
  always_ff @(posedge clk) begin
    song_din <= song[song_addr];
    clip_din <= clip[clip_addr];
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [44:0] rnd_slice();
    logic [44:0] s;
    for (int k = 0; k < 5; k++) s[9*k +: 9] = 9'(100 * k + $urandom_range(99));
    return s;
  endfunction

  // copy the window at `start` into the clip and change `ndiff` bins
  task automatic make_clip(input int start, input int ndiff);
    for (int j = 0; j < 22; j++) clip[j] = song[start + j];
    for (int d = 0; d < ndiff; d++) begin
      int j, k;
      j = d % 22; k = d / 22;
      clip[j][9*k +: 9] = 9'(511 - k);   // bin value never used by the songs
    end
  endtask

  task automatic run(input int exp_res, input string what);
    int t;
    @(negedge clk); enable = 1;
    t = 0;
    while (!done && t < 20000) begin @(negedge clk); t++; end
    checks += 2;
    if (result !== 2'(exp_res)) begin failures++; $display("%s: result %0d exp %0d", what, result, exp_res); end
    if (t != 489 * 24 + 1) begin failures++; $display("%s: done after %0d clocks", what, t); end
    repeat (5) @(negedge clk);
    checks++;
    if (!done || result !== 2'(exp_res)) begin failures++; $display("%s: result not held", what); end
    enable = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (done || result !== 2'(exp_res)) begin failures++; $display("%s: done not cleared / result lost", what); end
  endtask

  initial begin
    for (int a = 0; a < 512; a++) song[a] = rnd_slice();
    for (int a = 0; a < 32; a++) clip[a] = '0;
    repeat (3) @(negedge clk); rst = 0;
    make_clip(18, 0);        run(1, "exact bank 1");
    make_clip(200, 0);       run(2, "exact bank 2");
    make_clip(488, 0);       run(3, "exact bank 3 end");
    make_clip(300, 49);      run(2, "49 differences");
    make_clip(300, 50);      run(0, "50 differences");
    for (int j = 0; j < 22; j++) begin
      clip[j] = '0;
      for (int k = 0; k < 5; k++) clip[j][9*k +: 9] = 9'(511 - k);
    end
    run(0, "unknown clip");
    make_clip(160, 0);       run(2, "straddling banks 1-2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
