// tb_ss_top: end-to-end run of the node at its default sizes.
//
// The ROM program keeps the last 8 sensor samples in a ring buffer with a
// timestamp each, and after every sample sends the sum of the ring on port 0
// and the age register (oldest timestamp it read) on port 1. The testbench
// feeds random samples, keeps its own model of the last 8 accepted samples
// and of the clock time at which each was taken, and checks every output
// once the node has been stable for 8 samples. RAM starts with random
// contents, so power-on itself is a recovery from an arbitrary state.
//
// It then injects temporary faults one after the other and checks that each
// triggers the expected mechanism and that the node returns to correct
// outputs within 8 further samples:
//   PC moved onto a data halfword      -> reset, cause BADPC
//   PC moved into the RESET-filled ROM -> reset, cause RESETOP
//   loop counter corrupted (endless)   -> watchdog reset
//   sensor events withheld             -> watchdog reset
//   SP corrupted n_before CALL           -> segment violation reset
//   ring index register corrupted      -> segment violation reset
//   ring buffer and index in RAM trashed, age register trashed
//                                      -> no reset, outputs repair themselves
//   ROM read disturbed for one cycle   -> reset, cause ILLEGAL
// Each mechanism must occur at least once.
module tb_ss_top;
  import ss_pkg::*;
  logic clk = 0, por;
  logic [31:0] sensor_data;
  logic sensor_valid, sensor_ack;
  logic act_valid;
  logic [3:0] act_port;
  logic [31:0] act_data, time_now, age;
  logic sys_rst;
  rst_cause_e reset_cause;

  ss_top dut (.*);
  always #5 clk = ~clk;

  // program addresses (see the program listing in the README)
  localparam int A_STORE = 14, A_CALL = 25, A_LOOP = 44, A_END = 66;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog: testbench timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- reference model of the last 8 accepted samples ----
  logic [31:0] samp [8];
  logic [31:0] stamp [8];
  int nacc = 0;        // samples accepted since start
  int since_fault = 0; // outputs since the last injected fault
  int events_on = 1;
  int good_out = 0;
  int n_cause [8];

  always @(posedge clk) begin
    if (sensor_ack) begin
      samp[nacc % 8]  = sensor_data;
      stamp[nacc % 8] = time_now;
      nacc++;
    end
    if (sys_rst && !por) begin
      n_cause[reset_cause]++;
      since_fault = 0;
    end
  end

  // sample source
  initial begin
    sensor_valid = 0; sensor_data = 0;
    forever begin
      repeat ($urandom_range(20, 150)) @(negedge clk);
      wait (events_on == 1);
      @(negedge clk);
      sensor_data = $urandom_range(0, 1 << 20);
      sensor_valid = 1;
      @(posedge clk);
      while (!sensor_ack) @(posedge clk);
      @(negedge clk) sensor_valid = 0;
    end
  end

  // output checker: port 0 = sum, port 1 = age
  logic [31:0] exp_sum, exp_age;
  always @(posedge clk) begin
    if (act_valid && act_port == 0) begin
      exp_sum = 0;
      for (int i = 0; i < 8; i++) exp_sum += samp[i];
      since_fault++;
      if (since_fault > 8 && nacc >= 8) begin
        check(act_data == exp_sum, "ring-buffer sum");
        if (act_data == exp_sum) good_out++;
      end
    end
    if (act_valid && act_port == 1 && since_fault > 8 && nacc >= 8) begin
      exp_age = stamp[0];
      for (int i = 1; i < 8; i++) if (stamp[i] < exp_age) exp_age = stamp[i];
      check(act_data >= exp_age && act_data <= exp_age + 1, "age register = oldest sample time");
      check(act_data <= time_now, "age not in the future");
    end
  end

  task automatic wait_outputs(int n);
    int target;
    target = good_out + n;
    while (good_out < target) @(posedge clk);
  endtask

  task automatic wait_pc(int lo, int hi);
    @(negedge clk);
    while (!(int'(dut.u_cpu.pc_q) >= lo && int'(dut.u_cpu.pc_q) <= hi) || sys_rst) @(negedge clk);
  endtask

  // expect one reset with the given cause within max cycles
  task automatic expect_reset(rst_cause_e c, int max, string what);
    int n_before, k;
    n_before = n_cause[c];
    k = 0;
    while (n_cause[c] == n_before && k < max) begin @(posedge clk); k++; end
    #1 check(n_cause[c] > n_before, what);
    since_fault = 0;
  endtask

  int mech [10];
  int t0, w0;
  initial begin
    for (int i = 0; i < 8; i++) begin samp[i] = 0; stamp[i] = 0; n_cause[i] = 0; end
    for (int i = 0; i < 10; i++) mech[i] = 0;
    por = 1;
    repeat (3) @(posedge clk);
    #1 por = 0;

    // power-on from random RAM: stabilizes within 8 samples
    wait_outputs(6); mech[0]++;

    // 1: PC onto the first data halfword of an instruction
    @(negedge clk) dut.u_cpu.pc_q = 10'd2;  // data halfword of the LD at 1
    expect_reset(RC_BADPC, 10, "PC on data halfword resets");
    if (n_cause[RC_BADPC] > 0) mech[1]++;
    wait_outputs(4);

    // 2: PC beyond the program, into RESET-filled ROM
    @(negedge clk) dut.u_cpu.pc_q = 10'd700;
    expect_reset(RC_RESETOP, 10, "PC outside the program resets");
    if (n_cause[RC_RESETOP] > 0) mech[2]++;
    wait_outputs(4);

    // 3: endless loop, broken by the watchdog. A lasting fault keeps the
    // loop counter high and the loop index low until the node resets.
    wait_pc(A_LOOP, A_END - 2);
    t0 = cyc;
    w0 = n_cause[RC_WDT];
    fork
      expect_reset(RC_WDT, 6000, "endless loop ends in watchdog reset");
      while (cyc - t0 < 6000 && n_cause[RC_WDT] == w0) begin
        dut.u_cpu.regs_q[5] = 32'h7FFF_FFFF;
        dut.u_cpu.regs_q[9] = 32'd0;
        @(negedge clk);
      end
    join
    check(cyc - t0 <= 4 * 1000 + 10, "watchdog within its timeout");
    if (n_cause[RC_WDT] > 0) mech[3]++;
    wait_outputs(4);

    // 4: events withheld: the wait is ended by the watchdog
    events_on = 0;
    expect_reset(RC_WDT, 6000, "waiting without events ends in watchdog reset");
    mech[4]++;
    events_on = 1;
    wait_outputs(4);

    // 5: corrupted SP just n_before a CALL
    wait_pc(A_CALL, A_CALL);
    dut.u_cpu.sp_q = 32'd5;
    expect_reset(RC_SEGMENT, 10, "stack outside its segment resets");
    if (n_cause[RC_SEGMENT] > 0) mech[5]++;
    wait_outputs(4);

    // 6: ring index register corrupted just n_before the store
    wait_pc(A_STORE, A_STORE);
    dut.u_cpu.regs_q[2] = 32'd1000;
    expect_reset(RC_SEGMENT, 10, "ring index outside its segment resets");
    if (n_cause[RC_SEGMENT] > 1) mech[6]++;
    wait_outputs(4);

    // 7: RAM trashed (head index, ring, stamps): no reset, repair in 8 samples
    wait_pc(0, 0);
    for (int i = 0; i < 68; i++) dut.u_ram.mem[i] = $urandom;
    since_fault = 0;
    wait_outputs(4); mech[7]++;

    // 8: age register trashed: repaired at the next main loop
    wait_pc(A_END - 2, A_END - 1);
    dut.u_cpu.u_ar.ar = 32'hFFFF_FFF0;
    since_fault = 0;
    wait_outputs(4); mech[8]++;

    // 9: a disturbed ROM read returns an undefined operation for one cycle
    wait_pc(A_LOOP, A_END - 2);
    force dut.hw0 = 16'h9F00;
    @(posedge clk); #1;
    release dut.hw0;
    expect_reset(RC_ILLEGAL, 10, "undefined operation read from ROM resets");
    if (n_cause[RC_ILLEGAL] > 0) mech[9]++;
    wait_outputs(4);

    // a long fault-free stretch at the end
    wait_outputs(40);

    for (int i = 0; i < 10; i++) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
    end
    $display("mechanisms: poweron=%0d badpc=%0d resetop=%0d wdt_loop=%0d wdt_wait=%0d seg_sp=%0d seg_idx=%0d ram=%0d ar=%0d rom_read=%0d",
             mech[0], mech[1], mech[2], mech[3], mech[4], mech[5], mech[6], mech[7], mech[8], mech[9]);
    $display("resets: badpc=%0d resetop=%0d wdt=%0d segment=%0d, samples=%0d, good outputs=%0d",
             n_cause[RC_BADPC], n_cause[RC_RESETOP], n_cause[RC_WDT], n_cause[RC_SEGMENT], nacc, good_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
