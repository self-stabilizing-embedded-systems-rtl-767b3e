// data_ram: the node's volatile data RAM (ring-buffer index, heap headers,
// heap contents and stack). Word addressed, one synchronous write port and a
// combinational read port (own choice, to let the core finish a load in one
// cycle). The RAM is deliberately never reset: after a fault its contents are
// arbitrary and it is the software and the segment checks that make the
// system stabilize. Size is this design's choice; the concept only asks for
// constrained memory.
module data_ram import ss_pkg::*; #(
  parameter int unsigned WORDS = RAM_WORDS,
  localparam int unsigned AW = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  word_t         wdata,
  output word_t         rdata
);
  word_t mem [WORDS];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
