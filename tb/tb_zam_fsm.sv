// tb_zam_fsm: a free-running "slice ready" pulse train stands in for the
// input cascade. The test learns into banks 2, 1 and 3 (170 writes each at
// 170.., 0.., 340..), tries bank 0 (no writes), then zams (22 clip writes at
// 0..21 followed by `search`) and ends the search with `stop`. Every write
// must fall inside a high `frame` pulse, one per pulse.
module tb_zam_fsm;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, frame = 0, learn = 0, start = 0, stop = 0;
  logic [1:0] idx = 0;
  logic we_song, we_clip, search, mode;
  logic [8:0] addr;
  int song_w [$], clip_w [$];
  int frame_id = 0, last_write_frame = -1;

  zam_fsm dut (.clk, .rst, .frame, .learn, .start, .stop, .idx,
               .we_song, .we_clip, .search, .mode, .addr);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slice-ready pulses: 7 clocks high, 13 low
  initial forever begin
    repeat (13) @(negedge clk);
    frame = 1; frame_id++;
    repeat (7) @(negedge clk);
    frame = 0;
  end

  always @(posedge clk) if (!rst && (we_song || we_clip)) begin
    checks += 2;
    if (!frame) begin failures++; $display("write outside a slice-ready pulse"); end
    if (frame_id == last_write_frame) begin failures++; $display("two writes in one frame"); end
    last_write_frame = frame_id;
    if (we_song) song_w.push_back(int'(addr));
    else         clip_w.push_back(int'(addr));
  end

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  task automatic learn_bank(input int b);
    int t;
    song_w.delete();
    idx = 2'(b);
    pulse(learn);
    @(negedge clk);
    checks++;
    if (!mode) begin failures++; $display("mode not set while learning"); end
    t = 0;
    while (mode && t < 20000) begin @(negedge clk); t++; end
    checks += 2;
    if (song_w.size() != 170) begin failures++; $display("bank %0d: %0d writes", b, song_w.size()); end
    else if (song_w[0] != (b - 1) * 170 || song_w[169] != (b - 1) * 170 + 169) begin
      failures++; $display("bank %0d: addresses %0d..%0d", b, song_w[0], song_w[169]);
    end
    for (int i = 1; i < song_w.size(); i++) begin
      checks++;
      if (song_w[i] != song_w[i-1] + 1) begin failures++; $display("non-consecutive address"); break; end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst = 0;
    learn_bank(2);
    learn_bank(1);
    learn_bank(3);
    // bank 0: no learning
    song_w.delete();
    idx = 0; pulse(learn);
    repeat (200) @(negedge clk);
    checks++;
    if (song_w.size() != 0 || mode) begin failures++; $display("idx 0 wrote %0d slices", song_w.size()); end
    // zam: clip then search
    pulse(start);
    begin
      int t = 0;
      while (!search && t < 20000) begin @(negedge clk); t++; end
    end
    checks += 3;
    if (clip_w.size() != 22) begin failures++; $display("clip writes %0d", clip_w.size()); end
    else if (clip_w[0] != 0 || clip_w[21] != 21) begin failures++; $display("clip addresses %0d..%0d", clip_w[0], clip_w[21]); end
    if (!search) begin failures++; $display("search not started"); end
    repeat (50) @(negedge clk);
    checks++;
    if (!search) begin failures++; $display("search dropped before stop"); end
    stop = 1; @(negedge clk); stop = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (search) begin failures++; $display("search not ended by stop"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  a_single_we: assert property (@(posedge clk) disable iff (rst) !(we_song && we_clip));
endmodule
