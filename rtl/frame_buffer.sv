// frame_buffer: 512-entry spectrum buffer with a five-range read port.
//
// Write side: when `we` is high, `din` is stored at `addr` on the rising
// clock edge. Read side: on every clock, if `addr` is below RANGE_LEN (100)
// the five words at addr, addr+100, addr+200, addr+300 and addr+400 are
// loaded into dout[0]..dout[4]; otherwise all five outputs load zero. So one
// read address fetches the same relative bin of all five frequency ranges,
// and the peak detector scans the five ranges in parallel in 100 clocks.
// Read latency is one clock. `addr` comes through an address multiplexer, so
// writes (from the FFT capture) and reads (from the peak detector) share it.
module frame_buffer
  import fpgzam_pkg::*;
(
  input  logic                                   clk,
  input  logic                                   we,
  input  bin_t                                   addr,
  input  logic [FB_DATA_W-1:0]                   din,
  output logic [NUM_RANGES-1:0][FB_DATA_W-1:0]   dout
);
  logic [FB_DATA_W-1:0] mem [2**BIN_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    for (int k = 0; k < NUM_RANGES; k++) begin
      if (addr < BIN_W'(RANGE_LEN)) dout[k] <= mem[addr + BIN_W'(k * RANGE_LEN)];
      else                          dout[k] <= '0;
    end
  end
endmodule
