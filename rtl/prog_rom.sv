// prog_rom: program ROM, readable only through the PC.
//
// ROM_HW halfwords. At elaboration every location is first filled with the
// RESET instruction and the program image (INIT_FILE, hex, one halfword per
// line) is then loaded over the start of the ROM, so a PC that points beyond
// the program meets a RESET instruction and the machine resets (part of the
// concept). The PC is exactly as wide as the ROM address, so no PC value can
// point anywhere else. Three consecutive halfwords (PC, PC+1, PC+2, wrapping
// at the end) are read combinationally so that the core can fetch an opcode
// and its optional four data bytes in one cycle (own choice).
module prog_rom import ss_pkg::*; #(
  parameter int unsigned ROM_HW    = 1024,
  parameter string       INIT_FILE = "rtl/ss_program.hex",
  localparam int unsigned AW = $clog2(ROM_HW)
) (
  input  logic [AW-1:0] pc,
  output logic [15:0]   hw0,
  output logic [15:0]   hw1,
  output logic [15:0]   hw2
);
  logic [15:0] mem [ROM_HW];

  initial begin
    for (int i = 0; i < ROM_HW; i++) mem[i] = RESET_HW;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  logic [AW-1:0] pc1, pc2;
  always_comb begin
    pc1 = AW'((32'(pc) + 1) % ROM_HW);
    pc2 = AW'((32'(pc) + 2) % ROM_HW);
    hw0 = mem[pc];
    hw1 = mem[pc1];
    hw2 = mem[pc2];
  end
endmodule
