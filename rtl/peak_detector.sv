// peak_detector: turns one buffered spectrum into a fingerprint slice.
//
// While `ena` is low every register is preset and `slice`/`ready` are zero.
// When `ena` rises (a complete frame is in the frame buffer), the detector
// steps its read address 0..99; each read returns the same relative bin of
// all five 100-bin ranges (0-99, 100-199, ..., 400-499). One clock later it
// compares each returned amplitude with the range's running maximum and, if
// strictly greater, keeps it and records the absolute bin number
// (range*100 + offset). After the 100th comparison it outputs the five bin
// numbers as `slice` = {f4, f3, f2, f1, f0} (range 0 in bits 8:0) and raises
// `ready`; both hold while `ena` stays high.
// Timing: `ready` rises 102 clocks after `ena` is first seen high. A range
// whose amplitudes are all zero reports bin 0.
module peak_detector
  import fpgzam_pkg::*;
(
  input  logic                                 clk,
  input  logic                                 rst,   // synchronous, active high
  input  logic                                 ena,   // frame available
  input  logic [NUM_RANGES-1:0][FB_DATA_W-1:0] din,   // frame buffer outputs
  output bin_t                                 addr,  // frame buffer read address
  output slice_t                               slice,
  output logic                                 ready
);
  localparam int unsigned CW = $clog2(RANGE_LEN + 1);

  logic [CW-1:0]                         cnt;     // next offset to read
  logic                                  rd_v;    // din holds a requested word
  logic [CW-1:0]                         rd_i;    // offset that din belongs to
  logic [NUM_RANGES-1:0][FB_DATA_W-1:0]  max_amp;
  bin_t [NUM_RANGES-1:0]                 max_bin;

  assign addr = BIN_W'(cnt);

  always_ff @(posedge clk) begin
    if (rst || !ena) begin
      cnt     <= '0;
      rd_v    <= 1'b0;
      rd_i    <= '0;
      max_amp <= '0;
      max_bin <= '0;
      slice   <= '0;
      ready   <= 1'b0;
    end else begin
      // read stage
      rd_v <= (cnt < CW'(RANGE_LEN));
      rd_i <= cnt;
      if (cnt < CW'(RANGE_LEN)) cnt <= cnt + 1'b1;
      // compare stage
      if (rd_v) begin
        for (int k = 0; k < NUM_RANGES; k++) begin
          if (din[k] > max_amp[k]) begin
            max_amp[k] <= din[k];
            max_bin[k] <= BIN_W'(k * RANGE_LEN) + BIN_W'(rd_i);
          end
        end
      end
      // result
      if (cnt == CW'(RANGE_LEN) && !rd_v) begin
        slice <= max_bin;
        ready <= 1'b1;
      end
    end
  end
endmodule
