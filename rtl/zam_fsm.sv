// zam_fsm: controller of the identifier ("learn", "zam", search).
//
// Four main states and a four-state write cycle shared by both recordings:
//   IDLE   - nothing to do; a `learn` pulse goes to LEARN, a `start` (zam)
//            pulse to ZAM.
//   LEARN  - record a song: `idx` (1..3) selects the bank, i.e. the start
//            address (idx-1)*FP_LEN in the song memory; idx 0 aborts. `mode`
//            goes high (learning) and the return state is IDLE.
//   ZAM    - record a clip of CLIP_LEN slices at address 0 of the clip
//            memory; the return state is SEARCH.
//   SEARCH - hold `search` high until the searcher reports `stop`.
//   Write cycle: FRM_WAIT1 waits for `frame` (slice ready), FRM_STORE pulses
//   the write enable of the song memory (`mode`=1) or of the clip memory
//   (`mode`=0), FRM_WAIT2 waits for `frame` to fall, FRM_NEXT increments the
//   address. After the last slice is stored the FSM goes to the state saved
//   in `stack`.
// `addr` is the write address for both memories (the clip memory uses its
// five low bits). All outputs are registered; a write enable is one clock
// long and occurs while the slice is still presented with `frame` high.
module zam_fsm
  import fpgzam_pkg::*;
#(
  parameter int unsigned SONG_LEN = FP_LEN,   // slices per song
  parameter int unsigned SNIP_LEN = CLIP_LEN  // slices per clip
) (
  input  logic                   clk,
  input  logic                   rst,       // synchronous, active high
  input  logic                   frame,     // slice ready from the input cascade
  input  logic                   learn,     // one-clock "learn" pulse
  input  logic                   start,     // one-clock "zam" pulse
  input  logic                   stop,      // search finished
  input  logic [1:0]             idx,       // bank to learn into (0 = none)
  output logic                   we_song,   // song memory write enable
  output logic                   we_clip,   // clip memory write enable
  output logic                   search,    // searcher enable
  output logic                   mode,      // 1 while learning a song
  output logic [SONG_ADDR_W-1:0] addr       // write address
);
  zam_state_e             state, stack;
  logic [SONG_ADDR_W-1:0] cntr, last;  // slices stored so far, last count

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_IDLE;
      stack   <= ST_IDLE;
      we_song <= 1'b0;
      we_clip <= 1'b0;
      search  <= 1'b0;
      mode    <= 1'b0;
      addr    <= '0;
      cntr    <= '0;
      last    <= '0;
    end else begin
      unique case (state)
        ST_IDLE: begin
          we_song <= 1'b0;
          we_clip <= 1'b0;
          search  <= 1'b0;
          mode    <= 1'b0;
          cntr    <= '0;
          if (learn)      state <= ST_LEARN;
          else if (start) state <= ST_ZAM;
        end
        ST_LEARN: begin
          if (idx == 2'd0) state <= ST_IDLE;
          else begin
            addr  <= SONG_ADDR_W'((int'(idx) - 1) * SONG_LEN);
            mode  <= 1'b1;
            stack <= ST_IDLE;
            last  <= SONG_ADDR_W'(SONG_LEN - 1);
            state <= ST_FRM_WAIT1;
          end
        end
        ST_ZAM: begin
          addr  <= '0;
          mode  <= 1'b0;
          stack <= ST_SEARCH;
          last  <= SONG_ADDR_W'(SNIP_LEN - 1);
          state <= ST_FRM_WAIT1;
        end
        ST_FRM_WAIT1: if (frame) state <= ST_FRM_STORE;
        ST_FRM_STORE: begin
          we_song <= mode;
          we_clip <= !mode;
          state   <= ST_FRM_WAIT2;
        end
        ST_FRM_WAIT2: begin
          we_song <= 1'b0;
          we_clip <= 1'b0;
          if (cntr >= last)  state <= stack;
          else if (!frame)   state <= ST_FRM_NEXT;
        end
        ST_FRM_NEXT: begin
          addr  <= addr + 1'b1;
          cntr  <= cntr + 1'b1;
          state <= ST_FRM_WAIT1;
        end
        ST_SEARCH: begin
          we_song <= 1'b0;
          we_clip <= 1'b0;
          search  <= 1'b1;
          if (stop) state <= ST_IDLE;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Only one memory is written at a time.
  a_one_we: assert property (@(posedge clk) disable iff (rst) !(we_song && we_clip));
endmodule
