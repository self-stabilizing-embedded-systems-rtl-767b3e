// tb_ss_heap: the node running the dynamic-heap example program.
//
// The program in tb/ss_heap_program.hex manages 16 heap blocks of 4 words.
// Block headers (kind word and timestamp word per block) are in segment 1,
// block contents in segment 2. Kind 0 = free, 16'h100 + n = first block of
// an allocation of n blocks, 16'h200 = further block of an allocation.
//   boot : mark all headers free, WDR
//   main : heap check - every header well formed, every allocation covered
//          by its continuation headers, every timestamp neither in the
//          future nor more than K = 10 ticks old; on a violation the
//          program executes RESET, and the boot code rebuilds the heap
//        : wait for a sample; free every allocation at least KEEP = 2 ticks
//          old; allocate (sample mod 4) + 1 blocks first fit, stamp them
//          with AR and put the sample in the first word
//        : send the number of allocated blocks (port 0) and the sum of the
//          first words of all allocations (port 1), WDR, loop
// The testbench checks every output pair against its own scan of the RAM
// (well-formedness, timestamps within K of the clock, count and sum). It
// then corrupts a header kind, a timestamp into the future, a timestamp
// into the distant past, a free header into a continuation, the clock time,
// and a block's contents, and checks that each header fault resets the node
// through the program's RESET, that the heap is well formed afterwards, and
// that a corrupted block is released within K ticks. It also counts frees.
// Clock tick shortened to 500 cycles.
module tb_ss_heap;
  import ss_pkg::*;
  localparam int NB = 16, K = 10;
  localparam int HB = 4, CB = 68;          // RAM word bases of segments 1 and 2
  localparam int A_JMP = 327;              // JMP main, after the outputs and WDR
  logic clk = 0, por;
  logic [31:0] sensor_data;
  logic sensor_valid, sensor_ack;
  logic act_valid;
  logic [3:0] act_port;
  logic [31:0] act_data, time_now, age;
  logic sys_rst;
  rst_cause_e reset_cause;

  ss_top #(.INIT_FILE("tb/ss_heap_program.hex"), .TICK_DIV(500), .WDT_TICKS(4)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc++;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++; $display("watchdog: testbench timed out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] rd(int a);
    return dut.u_ram.mem[a];
  endfunction

  // independent scan of the heap
  function automatic bit heap_ok(logic [31:0] now, output int cnt, output logic [31:0] sum);
    int i, s;
    logic [31:0] k, t;
    i = 0; cnt = 0; sum = 0;
    while (i < NB) begin
      k = rd(HB + 2 * i);
      if (k == 0) i++;
      else if (k > 32'h100 && k <= 32'(32'h100 + NB - i)) begin
        s = int'(k - 32'h100);
        t = rd(HB + 2 * i + 1);
        if (t > now || now - t > K) return 0;
        for (int j = 1; j < s; j++) if (rd(HB + 2 * (i + j)) != 32'h200) return 0;
        cnt += s;
        sum += rd(CB + 4 * i);
        i += s;
      end else return 0;
    end
    return 1;
  endfunction

  // sample source
  initial begin
    sensor_valid = 0; sensor_data = 0;
    forever begin
      repeat ($urandom_range(20, 300)) @(negedge clk);
      @(negedge clk);
      sensor_data = $urandom_range(0, 1 << 16);
      sensor_valid = 1;
      @(posedge clk);
      while (!sensor_ack) @(posedge clk);
      @(negedge clk) sensor_valid = 0;
    end
  end

  int n_cause [8];
  int outputs = 0, frees = 0, last_cnt = 0;
  logic [31:0] out_cnt;
  always @(posedge clk) begin
    if (sys_rst && !por) n_cause[reset_cause]++;
    if (act_valid && act_port == 0) out_cnt = act_data;
    if (act_valid && act_port == 1) begin
      int cnt; logic [31:0] sum; bit ok;
      ok = heap_ok(time_now, cnt, sum);
      check(ok, "heap well formed at output");
      check(out_cnt == 32'(cnt) && act_data == sum, "count and sum match the heap");
      if (int'(out_cnt) < last_cnt) frees++;
      last_cnt = int'(out_cnt);
      outputs++;
    end
  end

  task automatic wait_outputs(int n);
    int target;
    target = outputs + n;
    while (outputs < target) @(posedge clk);
  endtask

  // stop at the last instruction of the main loop with at least one allocation live;
  // returns the header index of the first allocation
  task automatic at_wdr_with_alloc(output int idx);
    idx = -1;
    while (idx < 0) begin
      @(negedge clk);
      if (int'(dut.u_cpu.pc_q) == A_JMP && !sys_rst)
        for (int i = NB - 1; i >= 0; i--)
          if (rd(HB + 2 * i) > 32'h100 && rd(HB + 2 * i) <= 32'h110) idx = i;
    end
  endtask

  task automatic expect_heap_reset(string what);
    int n0, k;
    n0 = n_cause[RC_RESETOP];
    k = 0;
    while (n_cause[RC_RESETOP] == n0 && k < 2000) begin @(posedge clk); k++; end
    check(n_cause[RC_RESETOP] > n0, what);
    wait_outputs(3);
  endtask

  int idx, mech [8];
  logic [31:0] t_bad, tnow;
  initial begin
    for (int i = 0; i < 8; i++) begin n_cause[i] = 0; mech[i] = 0; end
    por = 1;
    repeat (3) @(posedge clk);
    #1 por = 0;
    // power-on with random RAM: the boot code builds an empty heap
    wait_outputs(30);
    mech[0] = 1;

    at_wdr_with_alloc(idx);
    dut.u_ram.mem[HB + 2 * idx] = 32'h1234;
    expect_heap_reset("corrupt header kind resets");
    mech[1] = 1;

    at_wdr_with_alloc(idx);
    dut.u_ram.mem[HB + 2 * idx + 1] = time_now + 100;
    expect_heap_reset("timestamp in the future resets");
    mech[2] = 1;

    while (time_now < K + 5) @(posedge clk);
    at_wdr_with_alloc(idx);
    dut.u_ram.mem[HB + 2 * idx + 1] = time_now - K - 3;
    expect_heap_reset("outdated timestamp resets");
    mech[3] = 1;

    at_wdr_with_alloc(idx);
    idx = -1;
    for (int i = 0; i < NB; i++) if (idx < 0 && rd(HB + 2 * i) == 0) idx = i;
    if (idx >= 0) begin
      dut.u_ram.mem[HB + 2 * idx] = 32'h200;
      expect_heap_reset("stray continuation header resets");
      mech[4] = 1;
    end

    at_wdr_with_alloc(idx);
    dut.u_clk.time_now = time_now + 1000;
    expect_heap_reset("clock jump makes the heap outdated and resets");
    mech[5] = 1;

    // block contents corrupted: no reset, block released within K ticks
    at_wdr_with_alloc(idx);
    t_bad = rd(HB + 2 * idx + 1);
    dut.u_ram.mem[CB + 4 * idx] = 32'hDEAD_BEEF;
    tnow = time_now;
    while (rd(HB + 2 * idx) != 0 && rd(HB + 2 * idx + 1) == t_bad && time_now <= tnow + K) @(posedge clk);
    check(time_now <= tnow + K, "corrupted block released within K ticks");
    mech[6] = 1;
    wait_outputs(20);

    check(frees > 0, "allocations are freed");
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (mech[i] == 0) begin failures++; $display("FAIL: mechanism %0d never happened", i); end
    end
    $display("outputs=%0d frees=%0d resets: heap(RESET op)=%0d segment=%0d wdt=%0d badpc=%0d",
             outputs, frees, n_cause[RC_RESETOP], n_cause[RC_SEGMENT], n_cause[RC_WDT], n_cause[RC_BADPC]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
