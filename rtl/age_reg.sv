// age_reg: the age register AR.
//
// AR holds the timestamp of the oldest data the program has read since it
// last entered its main loop. set_now loads the current clock time (done by
// the reset_watchdog instruction at the main loop, where all processing
// starts from fresh sensor data); min_en replaces AR by the minimum of AR and
// ts (done when the program reads a heap block and its timestamp). Written
// blocks are then stamped with AR, so derived data is never younger than what
// it was derived from. Behaviour follows the concept; the unsigned 32-bit
// timestamp and the reset value 0 (the oldest possible age) are own choices.
// One register, updated at the clock edge; set_now wins over min_en.
module age_reg import ss_pkg::*; (
  input  logic  clk,
  input  logic  rst,
  input  logic  set_now,
  input  word_t time_now,
  input  logic  min_en,
  input  word_t ts,
  output word_t ar
);
  always_ff @(posedge clk) begin
    if (rst)          ar <= '0;
    else if (set_now) ar <= time_now;
    else if (min_en && ts < ar) ar <= ts;
  end
endmodule
