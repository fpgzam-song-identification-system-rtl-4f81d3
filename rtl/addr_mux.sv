// addr_mux: address multiplexer in front of a single-port memory.
//
// While `write` is high the writer's address reaches the memory, otherwise
// the reader's, so the reader cannot disturb a write. Purely combinational.
// The same module is used in front of the frame buffer (9 bits), the song
// memory (9 bits) and the clip memory (5 bits), as in the description.
module addr_mux #(
  parameter int unsigned WIDTH = 9
) (
  input  logic             write,  // writer owns the memory
  input  logic [WIDTH-1:0] waddr,  // write address
  input  logic [WIDTH-1:0] raddr,  // read address
  output logic [WIDTH-1:0] addr    // address to the memory
);
  always_comb addr = write ? waddr : raddr;
endmodule
