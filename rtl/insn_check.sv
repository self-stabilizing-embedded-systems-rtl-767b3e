// insn_check: PC guard and immediate decoder of the instruction fetch.
//
// It looks at the three halfwords starting at the PC. The PC points at an
// instruction only if the top bit of the first halfword is one: opcode
// halfwords always carry that marker and the first and third data bytes of an
// instruction always have a zero top bit, so a PC that lands inside the data
// of an instruction gives opc_valid = 0 and the core resets the machine
// (part of the concept). The 32-bit immediate is rebuilt from the two data
// halfwords and the two bits that were stuffed into the opcode halfword:
// bit 14 carries data[31], bit 13 carries data[15] (bit order is this
// design's choice). has_data is op[4] of the opcode field (own encoding).
// The top bits of the two data halfwords are not examined: they are zero in
// every correct program and only serve to make a misplaced PC fail the check.
// Purely combinational.
module insn_check import ss_pkg::*; (
  input  logic [15:0]      hw0,       // halfword at PC: Opcode0, Opcode1
  input  logic [15:0]      hw1,       // halfword at PC+1: Data0, Data1
  input  logic [15:0]      hw2,       // halfword at PC+2: Data2, Data3
  output logic             opc_valid, // PC points at an opcode halfword
  output logic [OPC_W-1:0] opcode,    // 13-bit opcode field
  output logic             has_data,  // four data bytes follow the opcode
  output word_t            data       // reassembled 32-bit immediate
);
  always_comb begin
    opc_valid = hw0[15];
    opcode    = hw0[OPC_W-1:0];
    has_data  = hw0[12];
    data      = {hw0[14], hw1[14:0], hw0[13], hw2[14:0]};
  end
endmodule
