// tb_segment_unit: checks translation and violations for offsets inside,
// at and beyond every segment limit, for undefined segment numbers and for
// huge (wrapped negative) offsets. The expected table is written out here:
// index 0..3, heap headers 4..67, block contents 68..191, stack 192..255.
module tb_segment_unit;
  logic req;
  logic [3:0] seg;
  logic [31:0] offset;
  logic [7:0] addr;
  logic violation;
  int checks = 0, failures = 0;
  int base [4] = '{0, 4, 68, 192};
  int size [4] = '{4, 64, 124, 64};

  segment_unit dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic probe(logic [3:0] s, logic [31:0] o);
    bit exp_v; int exp_a;
    seg = s; offset = o; req = 1; #1;
    exp_v = !(s < 4 && o < 32'(size[s]));
    exp_a = exp_v ? 0 : base[s] + int'(o);
    checks++;
    if (violation != exp_v || (!exp_v && addr != 8'(exp_a))) begin
      failures++; $display("FAIL seg %0d off %0d: v=%b a=%0d", s, o, violation, addr);
    end
  endtask

  initial begin
    for (int s = 0; s < 16; s++) begin
      probe(4'(s), 0);
      if (s < 4) begin
        probe(4'(s), 32'(size[s] - 1));
        probe(4'(s), 32'(size[s]));
      end
      probe(4'(s), 32'hFFFF_FFFF);
    end
    for (int i = 0; i < 3000; i++) probe(4'($urandom_range(0, 5)), 32'($urandom_range(0, 140)));
    req = 0; #1;
    checks++;
    if (violation) begin failures++; $display("FAIL: violation without request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
