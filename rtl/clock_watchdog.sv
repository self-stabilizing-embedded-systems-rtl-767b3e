// clock_watchdog: hardware clock that doubles as the watchdog.
//
// time_now advances by one every TICK_DIV clock cycles (a tick is the time
// unit of block timestamps and of the age register). The watchdog counts
// ticks since it was last kicked; when WDT_TICKS ticks pass without a kick it
// raises wdt_expired for one cycle, which resets the whole system. A system
// reset (rst) restarts the watchdog but not the time: as the concept has it,
// after a fault the time may stay wrong and only its rate must be right, so
// the time is cleared only at power-on (por). The tick length and the
// timeout are this design's choices.
module clock_watchdog import ss_pkg::*; #(
  parameter int unsigned TICK_DIV  = 1000,
  parameter int unsigned WDT_TICKS = 4
) (
  input  logic  clk,
  input  logic  por,          // power-on reset: clears everything
  input  logic  rst,          // system reset: restarts the watchdog
  input  logic  kick,         // reset_watchdog()
  output word_t time_now,     // clock time in ticks
  output logic  wdt_expired   // one-cycle reset request
);
  localparam int unsigned DW = (TICK_DIV > 1) ? $clog2(TICK_DIV) : 1;
  localparam int unsigned WW = $clog2(WDT_TICKS + 1);

  logic [DW-1:0] div_q;
  logic [WW-1:0] wdt_q;
  logic          tick;

  assign tick = (div_q == DW'(TICK_DIV - 1));

  always_ff @(posedge clk) begin
    if (por) begin
      div_q    <= '0;
      time_now <= '0;
    end else begin
      div_q <= tick ? '0 : div_q + 1'b1;
      if (tick) time_now <= time_now + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (por || rst || kick) begin
      wdt_q       <= '0;
      wdt_expired <= 1'b0;
    end else begin
      wdt_expired <= 1'b0;
      if (tick) begin
        if (wdt_q >= WW'(WDT_TICKS - 1)) begin
          wdt_q       <= '0;
          wdt_expired <= 1'b1;
        end else begin
          wdt_q <= wdt_q + 1'b1;
        end
      end
    end
  end
endmodule
