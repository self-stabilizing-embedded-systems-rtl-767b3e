// ss_pkg: shared constants and types of the self-stabilizing embedded node.
//
// Instruction format (halfword = 16 bits, the PC counts halfwords):
//   halfword at PC    : {1'b1, d31, d15, opcode[12:0]}   -- Opcode0/Opcode1
//   halfword at PC+1  : {1'b0, data[30:16]}              -- Data0/Data1 (optional)
//   halfword at PC+2  : {1'b0, data[14:0]}               -- Data2/Data3 (optional)
// The top bit of every opcode halfword is one and the top bit of Data0 and
// Data2 is zero, so a PC that lands on a data halfword is recognised and the
// machine resets. The two data bits displaced by these markers (data[31] and
// data[15]) are stuffed into the opcode halfword, leaving 13 opcode bits and a
// full 32-bit immediate. This layout follows the concept; which stuffed bit
// sits in bit 14 and which in bit 13 is this design's choice.
//
// The 13-bit opcode field is split here into {op[4:0], rd[3:0], rs[3:0]};
// op[4] = 1 means that the four data bytes follow. The operation set, the
// RAM size and the segment table are this design's own choices: the concept
// fixes the principles (RESET fill of unused ROM, segment table in ROM, stack
// at the end of RAM, N and Z flags, age register) but no instruction set.
package ss_pkg;

  localparam int unsigned XLEN      = 32;  // 32-bit architecture
  localparam int unsigned OPC_W     = 13;  // opcode bits left after marker and stuffing
  localparam int unsigned NREGS     = 16;  // general purpose registers r0..r15
  localparam int unsigned RAM_WORDS = 256; // 32-bit words of data RAM
  localparam int unsigned RAM_AW    = $clog2(RAM_WORDS);

  typedef logic [XLEN-1:0] word_t;

  // Operations (op field, bits 12:8 of the opcode halfword).
  typedef enum logic [4:0] {
    OP_RESET = 5'h00,  // reset the machine; fills all unused ROM
    OP_WDR   = 5'h01,  // reset_watchdog(): kick, SP := end of RAM, flags and registers := 0, AR := time
    OP_MOV   = 5'h02,  // rd := rs
    OP_ADD   = 5'h03,  // rd := rd + rs, flags
    OP_SUB   = 5'h04,  // rd := rd - rs, flags
    OP_AND   = 5'h05,  // rd := rd & rs, flags
    OP_PUSH  = 5'h06,  // stack[--SP] := rs
    OP_POP   = 5'h07,  // rd := stack[SP++]
    OP_RET   = 5'h08,  // PC := stack[SP++]
    OP_IN    = 5'h09,  // rd := sensor data (no wait)
    OP_OUT   = 5'h0A,  // actuator port rd := rs
    OP_ARMIN = 5'h0B,  // AR := min(AR, rs)
    OP_ARGET = 5'h0C,  // rd := AR
    OP_CLK   = 5'h0D,  // rd := clock time
    OP_WEV   = 5'h0E,  // wait for a sensor sample, rd := sample
    OP_CMP   = 5'h0F,  // flags of rd - rs
    OP_LDI   = 5'h10,  // rd := imm
    OP_JMP   = 5'h11,  // PC := imm
    OP_JZ    = 5'h12,  // if Z  PC := imm
    OP_JN    = 5'h13,  // if N  PC := imm
    OP_CALL  = 5'h14,  // stack[--SP] := PC+3, PC := imm
    OP_ADDI  = 5'h15,  // rd := rd + imm, flags
    OP_LD    = 5'h16,  // rd := segment imm : [rs]
    OP_ST    = 5'h17,  // segment imm : [rd] := rs
    OP_CMPI  = 5'h18,  // flags of rd - imm
    OP_JNZ   = 5'h19   // if !Z PC := imm
  } op_e;

  // Opcode halfword that fills the ROM outside the program.
  localparam logic [15:0] RESET_HW = 16'h8000;

  // Why the machine was reset last.
  typedef enum logic [2:0] {
    RC_POWER   = 3'd0,  // power-on
    RC_WDT     = 3'd1,  // watchdog expired
    RC_BADPC   = 3'd2,  // PC did not point at an opcode halfword
    RC_RESETOP = 3'd3,  // RESET instruction (ROM outside the program)
    RC_ILLEGAL = 3'd4,  // undefined operation
    RC_SEGMENT = 3'd5   // segment violation
  } rst_cause_e;

  // Segment table, constant and therefore in ROM. Word bases and sizes in RAM.
  localparam int unsigned NSEG      = 4;
  localparam int unsigned SEG_W     = 4;   // width of a segment number
  localparam int unsigned SEG_INDEX = 0;   // ring-buffer head index, first word of RAM
  localparam int unsigned SEG_HEAP  = 1;   // ring buffer / heap block headers
  localparam int unsigned SEG_DATA  = 2;   // heap block contents
  localparam int unsigned SEG_STACK = 3;   // stack, at the end of RAM
  localparam int unsigned SEG_BASE [NSEG] = '{0, 4, 68, 192};
  localparam int unsigned SEG_SIZE [NSEG] = '{4, 64, 124, 64};
  localparam int unsigned STACK_BASE = SEG_BASE[SEG_STACK];
  localparam word_t       SP_INIT    = word_t'(RAM_WORDS);  // empty stack: end of RAM

  function automatic logic is_legal(logic [4:0] op);
    return op <= 5'h19;
  endfunction

endpackage
