// tb_cpu_core: runs small programs, assembled here into a ROM array, on the
// core with a flat memory model, and checks the results the programs send to
// the actuator ports. Covers arithmetic and flags, the stuffed immediate
// bits, PUSH/POP, CALL/RET, segment-addressed LD/ST, WEV stalling until a
// sample arrives, CLK, the age register, and WDR (kick, registers cleared,
// SP back at the end of RAM). It then checks the three reset requests: PC on
// a data halfword, the RESET instruction and an undefined operation.
module tb_cpu_core;
  import ss_pkg::*;
  logic clk = 0, rst;
  logic [9:0] pc;
  logic [15:0] hw0, hw1, hw2;
  logic mem_req, mem_we;
  logic [3:0] mem_seg;
  logic [31:0] mem_off, mem_wdata, mem_rdata;
  logic [31:0] time_now;
  logic wdt_kick;
  logic [31:0] sensor_data;
  logic sensor_valid, sensor_ack;
  logic act_valid;
  logic [3:0] act_port;
  logic [31:0] act_data;
  logic rst_req;
  rst_cause_e rst_cause;
  logic [31:0] ar;

  cpu_core dut (.*);
  always #5 clk = ~clk;

  // ---- ROM and memory models ----
  logic [15:0] rom [1024];
  logic [31:0] ram [256];
  int seg_base [4] = '{0, 4, 68, 192};
  assign hw0 = rom[pc];
  assign hw1 = rom[10'(pc + 1)];
  assign hw2 = rom[10'(pc + 2)];
  assign mem_rdata = (mem_seg < 4) ? ram[8'(seg_base[mem_seg] + int'(mem_off))] : 32'h0;
  always @(posedge clk) if (mem_req && mem_we) ram[8'(seg_base[mem_seg] + int'(mem_off))] <= mem_wdata;

  // ---- assembler ----
  int ap;
  task automatic e0(logic [4:0] op, logic [3:0] rd = 0, logic [3:0] rs = 0);
    rom[ap] = {1'b1, 2'b00, op, rd, rs}; ap++;
  endtask
  task automatic ei(logic [4:0] op, logic [3:0] rd, logic [3:0] rs, logic [31:0] imm);
    rom[ap]   = {1'b1, imm[31], imm[15], op, rd, rs};
    rom[ap+1] = {1'b0, imm[30:16]};
    rom[ap+2] = {1'b0, imm[14:0]};
    ap += 3;
  endtask

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // actuator log
  logic [31:0] outv [16];
  int          outn [16];
  int kicks = 0, cycles = 0;
  logic [31:0] push_off_after_wdr;
  bit seen_wdr;
  always @(posedge clk) begin
    cycles++;
    if (act_valid) begin outv[act_port] = act_data; outn[act_port]++; end
    if (wdt_kick) begin kicks++; seen_wdr = 1; end
    else if (seen_wdr && mem_req && mem_we) begin push_off_after_wdr = mem_off; seen_wdr = 0; end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int L1, L2, SUB, BAD, p;
  task automatic build();
    ap = 0;
    ei(OP_LDI, 1, 0, 5);
    ei(OP_LDI, 2, 0, 32'hFFFF_FFFF);
    e0(OP_ADD, 1, 2);               // r1 = 4
    e0(OP_OUT, 0, 1);
    e0(OP_OUT, 1, 2);
    ei(OP_LDI, 3, 0, 4);
    e0(OP_SUB, 3, 1);               // 0 -> Z
    ei(OP_JZ, 0, 0, L1);
    e0(OP_OUT, 15, 3);              // skipped
    L1 = ap;
    e0(OP_PUSH, 0, 2);
    e0(OP_POP, 4, 0);
    e0(OP_OUT, 2, 4);               // FFFFFFFF
    ei(OP_CALL, 0, 0, SUB);
    e0(OP_OUT, 3, 5);               // 0x00012345
    ei(OP_LDI, 6, 0, 3);
    ei(OP_ST, 6, 1, 2);             // seg2[3] = 4
    ei(OP_LD, 7, 6, 2);
    e0(OP_OUT, 4, 7);               // 4
    e0(OP_WEV, 8, 0);
    e0(OP_OUT, 5, 8);               // sample
    e0(OP_CLK, 9, 0);
    e0(OP_OUT, 6, 9);               // time
    ei(OP_LDI, 12, 0, 9);
    e0(OP_PUSH, 0, 12);             // leave SP one below the end
    e0(OP_WDR);                     // AR = time, regs = 0
    ei(OP_LDI, 10, 0, 50);
    e0(OP_ARMIN, 0, 10);
    ei(OP_LDI, 10, 0, 70);
    e0(OP_ARMIN, 0, 10);
    e0(OP_ARGET, 11, 0);
    e0(OP_OUT, 7, 11);              // 50
    e0(OP_OUT, 8, 12);              // 0, cleared by WDR
    e0(OP_PUSH, 0, 12);             // first push after WDR: offset 63
    ei(OP_ADDI, 13, 0, 32'hFFFF_FFFF);  // -1 -> N
    ei(OP_JN, 0, 0, L2);
    e0(OP_OUT, 15, 13);             // skipped
    L2 = ap;
    ei(OP_CMPI, 13, 0, 32'hFFFF_FFFF);
    ei(OP_JNZ, 0, 0, L2);           // not taken
    e0(OP_OUT, 9, 13);              // FFFFFFFF
    ei(OP_JMP, 0, 0, BAD);          // BAD is a data halfword
    SUB = ap;
    ei(OP_LDI, 5, 0, 32'h0001_2345);
    e0(OP_RET);
    BAD = 1;                         // first data halfword of the first LDI
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) rom[i] = RESET_HW;
    for (int i = 0; i < 256; i++) ram[i] = 0;
    for (int i = 0; i < 16; i++) begin outn[i] = 0; outv[i] = 0; end
    seen_wdr = 0; push_off_after_wdr = 0;
    L1 = 0; L2 = 0; SUB = 0; BAD = 1;
    build(); build();
    time_now = 32'd100; sensor_data = 32'hABC; sensor_valid = 0;
    rst = 1;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    // let the core reach WEV and wait there
    p = 0;
    while (!(hw0[15] && hw0[12:8] == OP_WEV) && p < 200) begin @(posedge clk); #1; p++; end
    check(p < 200, "reached WEV");
    repeat (10) @(posedge clk);
    #1 check(hw0[12:8] == OP_WEV && !rst_req, "stalls on WEV without a sample");
    @(negedge clk) sensor_valid = 1;
    @(posedge clk); #1 sensor_valid = 0;
    p = 0;
    while (!rst_req && p < 200) begin @(negedge clk); p++; end
    check(rst_req && rst_cause == RC_BADPC, "jump onto data halfword requests reset");
    check(outv[0] == 4 && outv[1] == 32'hFFFF_FFFF, "add and stuffed immediate bits");
    check(outn[15] == 0, "taken branches skip");
    check(outv[2] == 32'hFFFF_FFFF, "push/pop");
    check(outv[3] == 32'h0001_2345, "call/ret");
    check(outv[4] == 4, "segment store/load");
    check(outv[5] == 32'hABC, "wait for event sample");
    check(outv[6] == 100, "clock read");
    check(outv[7] == 50, "age register minimum");
    check(outn[8] == 1 && outv[8] == 0, "WDR clears registers");
    check(kicks == 1, "WDR kicks watchdog once");
    check(push_off_after_wdr == 63, "WDR puts SP at end of RAM");
    check(outv[9] == 32'hFFFF_FFFF && outn[9] == 1, "compare with immediate");
    // RESET instruction
    rst = 1; rom[0] = RESET_HW; @(posedge clk); #1 rst = 0; #1;
    check(rst_req && rst_cause == RC_RESETOP, "RESET instruction requests reset");
    // undefined operation
    rst = 1; rom[0] = {1'b1, 2'b00, 5'h1F, 8'h00}; @(posedge clk); #1 rst = 0; #1;
    check(rst_req && rst_cause == RC_ILLEGAL, "undefined operation requests reset");
    // no write leaves the core while it requests a reset
    rst = 1; rom[0] = {1'b1, 2'b00, 5'h1F, 8'h00}; @(posedge clk); #1 rst = 0; #1;
    check(!mem_req && !wdt_kick, "no side effects during a reset request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
