// bram: single-port synchronous RAM (block RAM style).
//
// One address serves both the write and the read. On a rising clock edge
// the word at `addr` is written when `we` is high, and `dout` is loaded with
// the word at `addr` (read-before-write: a read of the address being written
// returns the old word). Read latency is one clock.
// The defaults give the 512 x 45 song fingerprint memory; the clip memory is
// the same module with ADDR_W = 5 (32 x 45). Contents are not initialised.
module bram #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 45
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= din;
    dout <= mem[addr];
  end
endmodule
