// cpu_core: 32-bit register machine whose program execution stabilizes.
//
// State: PC (halfword index into the program ROM, exactly as wide as the ROM
// address), SP (absolute RAM word address, empty stack = end of RAM), 16
// general purpose registers, the N and Z flags and the age register AR.
// One instruction per cycle: the three halfwords at PC come from the ROM
// combinationally, insn_check validates and decodes them, and the result is
// committed at the clock edge. WEV (wait_for_event) holds the PC until
// sensor_valid and acknowledges the sample with sensor_ack.
//
// Self-stabilization hooks, as the concept prescribes:
//  * the opcode halfword at PC must carry its marker bit, else rst_req
//    (cause RC_BADPC);
//  * the RESET instruction that fills unused ROM raises rst_req, and so does
//    an undefined operation (a wild PC that reads data as code usually
//    ends up at one);
//  * WDR, the reset_watchdog() of the main loop, kicks the watchdog, puts SP
//    to the end of RAM, clears N, Z and all general registers and loads AR
//    with the clock time;
//  * every RAM access goes out as segment:offset (stack accesses use the
//    stack segment) and is checked by the segment unit outside the core.
// rst_req is combinational; the system registers it into rst, so the core
// suppresses every side effect (RAM write, kick, actuator, sensor ack) in the
// cycle in which it requests a reset. The instruction set is this design's
// own (see ss_pkg). Synchronous active-high reset.
module cpu_core import ss_pkg::*; #(
  parameter int unsigned ROM_AW = 10
) (
  input  logic              clk,
  input  logic              rst,
  // program ROM
  output logic [ROM_AW-1:0] pc,
  input  logic [15:0]       hw0,
  input  logic [15:0]       hw1,
  input  logic [15:0]       hw2,
  // segmented data memory
  output logic              mem_req,
  output logic              mem_we,
  output logic [SEG_W-1:0]  mem_seg,
  output word_t             mem_off,
  output word_t             mem_wdata,
  input  word_t             mem_rdata,
  // clock and watchdog
  input  word_t             time_now,
  output logic              wdt_kick,
  // sensors and actuators
  input  word_t             sensor_data,
  input  logic              sensor_valid,
  output logic              sensor_ack,
  output logic              act_valid,
  output logic [3:0]        act_port,
  output word_t             act_data,
  // reset request
  output logic              rst_req,
  output rst_cause_e        rst_cause,
  // observation of the age register
  output word_t             ar
);
  logic [ROM_AW-1:0] pc_q;
  word_t             sp_q;
  word_t             regs_q [NREGS];
  logic              n_q, z_q;

  // decode
  logic             opc_valid, has_data;
  logic [OPC_W-1:0] opcode;
  word_t            imm;
  op_e              op;
  logic [3:0]       rd, rs;

  insn_check u_check (
    .hw0, .hw1, .hw2, .opc_valid, .opcode, .has_data, .data(imm)
  );

  assign op = op_e'(opcode[12:8]);
  assign rd = opcode[7:4];
  assign rs = opcode[3:0];
  assign pc = pc_q;

  word_t rd_val, rs_val;
  assign rd_val = regs_q[rd];
  assign rs_val = regs_q[rs];

  logic [ROM_AW-1:0] pc_seq;
  assign pc_seq = has_data ? pc_q + ROM_AW'(3) : pc_q + ROM_AW'(1);

  // next-state
  logic              fault;
  logic [ROM_AW-1:0] pc_d;
  word_t             sp_d;
  logic              rd_we;
  word_t             rd_wdata;
  logic              flags_we;
  word_t             alu_res;
  logic              clear_all;
  logic              ar_set, ar_min;

  always_comb begin
    fault     = 1'b0;
    rst_cause = RC_POWER;
    pc_d      = pc_seq;
    sp_d      = sp_q;
    rd_we     = 1'b0;
    rd_wdata  = '0;
    flags_we  = 1'b0;
    alu_res   = '0;
    clear_all = 1'b0;
    ar_set    = 1'b0;
    ar_min    = 1'b0;
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_seg   = '0;
    mem_off   = '0;
    mem_wdata = '0;
    wdt_kick  = 1'b0;
    sensor_ack = 1'b0;

    if (!opc_valid) begin
      fault     = 1'b1;
      rst_cause = RC_BADPC;
    end else if (!is_legal(opcode[12:8])) begin
      fault     = 1'b1;
      rst_cause = RC_ILLEGAL;
    end else begin
      unique case (op)
        OP_RESET: begin fault = 1'b1; rst_cause = RC_RESETOP; end
        OP_WDR: begin
          wdt_kick  = 1'b1;
          clear_all = 1'b1;
          sp_d      = SP_INIT;
          ar_set    = 1'b1;
        end
        OP_MOV:   begin rd_we = 1'b1; rd_wdata = rs_val; end
        OP_ADD:   begin alu_res = rd_val + rs_val; rd_we = 1'b1; rd_wdata = alu_res; flags_we = 1'b1; end
        OP_SUB:   begin alu_res = rd_val - rs_val; rd_we = 1'b1; rd_wdata = alu_res; flags_we = 1'b1; end
        OP_AND:   begin alu_res = rd_val & rs_val; rd_we = 1'b1; rd_wdata = alu_res; flags_we = 1'b1; end
        OP_CMP:   begin alu_res = rd_val - rs_val; flags_we = 1'b1; end
        OP_ADDI:  begin alu_res = rd_val + imm; rd_we = 1'b1; rd_wdata = alu_res; flags_we = 1'b1; end
        OP_CMPI:  begin alu_res = rd_val - imm; flags_we = 1'b1; end
        OP_LDI:   begin rd_we = 1'b1; rd_wdata = imm; end
        OP_PUSH, OP_CALL: begin
          mem_req   = 1'b1;
          mem_we    = 1'b1;
          mem_seg   = SEG_W'(SEG_STACK);
          mem_off   = sp_q - 1 - word_t'(STACK_BASE);
          mem_wdata = (op == OP_CALL) ? word_t'(pc_seq) : rs_val;
          sp_d      = sp_q - 1;
          if (op == OP_CALL) pc_d = imm[ROM_AW-1:0];
        end
        OP_POP, OP_RET: begin
          mem_req = 1'b1;
          mem_seg = SEG_W'(SEG_STACK);
          mem_off = sp_q - word_t'(STACK_BASE);
          sp_d    = sp_q + 1;
          if (op == OP_RET) pc_d = mem_rdata[ROM_AW-1:0];
          else begin rd_we = 1'b1; rd_wdata = mem_rdata; end
        end
        OP_LD: begin
          mem_req  = 1'b1;
          mem_seg  = imm[SEG_W-1:0];
          mem_off  = rs_val;
          rd_we    = 1'b1;
          rd_wdata = mem_rdata;
        end
        OP_ST: begin
          mem_req   = 1'b1;
          mem_we    = 1'b1;
          mem_seg   = imm[SEG_W-1:0];
          mem_off   = rd_val;
          mem_wdata = rs_val;
        end
        OP_IN:    begin rd_we = 1'b1; rd_wdata = sensor_data; end
        OP_WEV: begin
          if (sensor_valid) begin
            sensor_ack = 1'b1;
            rd_we      = 1'b1;
            rd_wdata   = sensor_data;
          end else begin
            pc_d = pc_q;
          end
        end
        OP_OUT:   ;  // registered below
        OP_ARMIN: ar_min = 1'b1;
        OP_ARGET: begin rd_we = 1'b1; rd_wdata = ar; end
        OP_CLK:   begin rd_we = 1'b1; rd_wdata = time_now; end
        OP_JMP:   pc_d = imm[ROM_AW-1:0];
        OP_JZ:    if (z_q)  pc_d = imm[ROM_AW-1:0];
        OP_JNZ:   if (!z_q) pc_d = imm[ROM_AW-1:0];
        OP_JN:    if (n_q)  pc_d = imm[ROM_AW-1:0];
        default:  begin fault = 1'b1; rst_cause = RC_ILLEGAL; end
      endcase
    end

    // nothing leaves the core while it is in reset or asks for one
    if (rst || fault) begin
      mem_req    = 1'b0;
      mem_we     = 1'b0;
      wdt_kick   = 1'b0;
      sensor_ack = 1'b0;
    end
    rst_req = fault && !rst;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pc_q <= '0;
      sp_q <= SP_INIT;
      n_q  <= 1'b0;
      z_q  <= 1'b0;
      for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
      act_valid <= 1'b0;
      act_port  <= '0;
      act_data  <= '0;
    end else if (!fault) begin
      pc_q <= pc_d;
      sp_q <= sp_d;
      if (clear_all) begin
        n_q <= 1'b0;
        z_q <= 1'b0;
        for (int i = 0; i < NREGS; i++) regs_q[i] <= '0;
      end else begin
        if (flags_we) begin
          n_q <= alu_res[XLEN-1];
          z_q <= (alu_res == '0);
        end
        if (rd_we) regs_q[rd] <= rd_wdata;
      end
      act_valid <= (op == OP_OUT);
      if (op == OP_OUT) begin
        act_port <= rd;
        act_data <= rs_val;
      end
    end else begin
      act_valid <= 1'b0;
    end
  end

  // interface rules: a sample is only taken when offered, a write is always
  // an access, and nothing leaves the core while it is held in reset
  a_ack_needs_valid: assert property (@(posedge clk) sensor_ack |-> sensor_valid);
  a_we_needs_req:    assert property (@(posedge clk) mem_we |-> mem_req);
  a_quiet_in_reset:  assert property (@(posedge clk) rst |-> !(mem_req || wdt_kick || sensor_ack || rst_req));

  age_reg u_ar (
    .clk, .rst,
    .set_now (ar_set && !fault),
    .time_now,
    .min_en  (ar_min && !fault),
    .ts      (rs_val),
    .ar
  );
endmodule
