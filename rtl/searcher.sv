// searcher: slides the clip fingerprint over the song memory.
//
// For every window start s = 0 .. NUM_BANKS*FP_LEN - CLIP_LEN it compares
// clip slice j with song slice s+j for j = 0..CLIP_LEN-1. Each slice holds
// five 9-bit bin numbers; every bin that differs adds one to the window's
// `delta` (0..5*CLIP_LEN). A window whose delta is below THRESHOLD is a
// match, and `result` is set to the bank (1..NUM_BANKS) that holds the
// window's last slice; a later matching window overwrites it. `result` 0
// means no window matched. When the last window has been scored, `done`
// rises and stays high, with `result` held, until `enable` falls; `done`
// then clears, `result` stays until the next search starts.
//
// States: IDLE (wait for `enable`), WORK (issue CLIP_LEN reads on both
// memories, accumulate the differences one clock behind the reads, because
// the memories have one clock of read latency), NEXT (score the window,
// move one slice on), DONE (wait for `enable` to fall).
// Addresses are combinational from the window start and slice counter.
// Timing: CLIP_LEN+2 clocks per window; 489 windows, 11736 clocks, for the
// default 3 banks of 170 slices and a 22-slice clip.
module searcher
  import fpgzam_pkg::*;
#(
  parameter int unsigned SONG_LEN  = FP_LEN,
  parameter int unsigned SNIP_LEN  = CLIP_LEN,
  parameter int unsigned BANKS     = NUM_BANKS,
  parameter int unsigned THRESH    = THRESHOLD
) (
  input  logic                   clk,
  input  logic                   rst,        // synchronous, active high
  input  logic                   enable,     // start / keep searching
  input  slice_t                 song_din,   // song memory read data
  input  slice_t                 clip_din,   // clip memory read data
  output logic [SONG_ADDR_W-1:0] song_addr,  // song memory read address
  output logic [CLIP_ADDR_W-1:0] clip_addr,  // clip memory read address
  output logic                   done,
  output logic [1:0]             result      // matching bank, 0 = none
);
  localparam int unsigned LAST_BASE = BANKS * SONG_LEN - SNIP_LEN;
  localparam int unsigned DW        = $clog2(NUM_RANGES * SNIP_LEN + 1);
  localparam int unsigned JW        = $clog2(SNIP_LEN + 1);

  typedef enum logic [1:0] {S_IDLE, S_WORK, S_NEXT, S_DONE} srch_state_e;

  srch_state_e            state;
  logic [SONG_ADDR_W-1:0] base;   // window start
  logic [JW-1:0]          j;      // slice being read
  logic                   rd_v;   // read data valid this clock
  logic [DW-1:0]          delta;
  logic [2:0]             diff;   // differing bins in the current pair
  logic [1:0]             bank;   // bank of the window's last slice

  assign song_addr = base + SONG_ADDR_W'(j);
  assign clip_addr = CLIP_ADDR_W'(j);

  always_comb begin
    diff = '0;
    for (int k = 0; k < NUM_RANGES; k++)
      if (song_din[k*BIN_W +: BIN_W] != clip_din[k*BIN_W +: BIN_W]) diff = diff + 1'b1;
  end

  always_comb begin
    bank = 2'd1;
    for (int b = 1; b < BANKS; b++)
      if (int'(base) + SNIP_LEN - 1 >= b * SONG_LEN) bank = 2'(b + 1);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state  <= S_IDLE;
      base   <= '0;
      j      <= '0;
      rd_v   <= 1'b0;
      delta  <= '0;
      done   <= 1'b0;
      result <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (enable) begin
          base   <= '0;
          j      <= '0;
          rd_v   <= 1'b0;
          delta  <= '0;
          done   <= 1'b0;
          result <= '0;
          state  <= S_WORK;
        end
        S_WORK: begin
          if (rd_v) delta <= delta + DW'(diff);
          rd_v <= (j < JW'(SNIP_LEN));
          if (j < JW'(SNIP_LEN)) j <= j + 1'b1;
          else                   state <= S_NEXT;
        end
        S_NEXT: begin
          if (delta < DW'(THRESH)) result <= bank;
          if (base >= SONG_ADDR_W'(LAST_BASE)) begin
            done  <= 1'b1;
            state <= S_DONE;
          end else begin
            base  <= base + 1'b1;
            j     <= '0;
            rd_v  <= 1'b0;
            delta <= '0;
            state <= S_WORK;
          end
        end
        S_DONE: if (!enable) begin
          done  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
