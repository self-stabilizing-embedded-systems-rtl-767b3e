// ss_top: a self-stabilizing embedded node.
//
// The core runs the program in the ROM (a main loop: wait for a sensor
// sample, process it, send output, reset the watchdog). Four mechanisms pull
// the node back to correct execution after any temporary fault:
//   1. the core resets when the PC does not point at an opcode halfword or
//      meets RESET / an undefined operation (unused ROM is RESET-filled);
//   2. the clock's watchdog resets the node if the main loop is not reached
//      in time (endless loop, lost event);
//   3. the segment unit resets the node on any access outside its segment;
//   4. the main loop's WDR instruction re-initialises SP, flags, registers
//      and the age register every iteration.
// All reset requests are ORed and registered into one synchronous system
// reset (sys_rst, one cycle); reset_cause keeps the last reason. The clock
// time is cleared only by por. RAM writes are suppressed while a reset is
// requested or active. Sensors and actuators are external: a sample is
// offered with sensor_valid and taken with sensor_ack; each OUT instruction
// gives one act_valid cycle. The reset combining is this design's choice.
module ss_top import ss_pkg::*; #(
  parameter int unsigned ROM_HW    = 1024,
  parameter string       INIT_FILE = "rtl/ss_program.hex",
  parameter int unsigned TICK_DIV  = 1000,
  parameter int unsigned WDT_TICKS = 4
) (
  input  logic       clk,
  input  logic       por,           // power-on reset, active high, synchronous
  input  word_t      sensor_data,
  input  logic       sensor_valid,
  output logic       sensor_ack,
  output logic       act_valid,
  output logic [3:0] act_port,
  output word_t      act_data,
  output word_t      time_now,
  output word_t      age,           // current age register
  output logic       sys_rst,       // system reset pulse
  output rst_cause_e reset_cause    // reason of the last system reset
);
  localparam int unsigned ROM_AW = $clog2(ROM_HW);

  logic [ROM_AW-1:0] pc;
  logic [15:0]       hw0, hw1, hw2;
  logic              mem_req, mem_we;
  logic [SEG_W-1:0]  mem_seg;
  word_t             mem_off, mem_wdata, mem_rdata;
  logic [RAM_AW-1:0] ram_addr;
  logic              seg_violation;
  logic              wdt_kick, wdt_expired;
  logic              core_rst_req;
  rst_cause_e        core_cause;

  prog_rom #(.ROM_HW(ROM_HW), .INIT_FILE(INIT_FILE)) u_rom (
    .pc, .hw0, .hw1, .hw2
  );

  cpu_core #(.ROM_AW(ROM_AW)) u_cpu (
    .clk, .rst(sys_rst),
    .pc, .hw0, .hw1, .hw2,
    .mem_req, .mem_we, .mem_seg, .mem_off, .mem_wdata, .mem_rdata,
    .time_now, .wdt_kick,
    .sensor_data, .sensor_valid, .sensor_ack,
    .act_valid, .act_port, .act_data,
    .rst_req(core_rst_req), .rst_cause(core_cause),
    .ar(age)
  );

  segment_unit u_seg (
    .req(mem_req), .seg(mem_seg), .offset(mem_off),
    .addr(ram_addr), .violation(seg_violation)
  );

  data_ram #(.WORDS(RAM_WORDS)) u_ram (
    .clk,
    .we    (mem_we && !seg_violation && !sys_rst),
    .addr  (ram_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata)
  );

  clock_watchdog #(.TICK_DIV(TICK_DIV), .WDT_TICKS(WDT_TICKS)) u_clk (
    .clk, .por, .rst(sys_rst), .kick(wdt_kick),
    .time_now, .wdt_expired
  );

  // reset combining
  always_ff @(posedge clk) begin
    if (por) begin
      sys_rst     <= 1'b1;
      reset_cause <= RC_POWER;
    end else begin
      sys_rst <= wdt_expired || core_rst_req || seg_violation;
      if (wdt_expired)        reset_cause <= RC_WDT;
      else if (core_rst_req)  reset_cause <= core_cause;
      else if (seg_violation) reset_cause <= RC_SEGMENT;
    end
  end
endmodule
