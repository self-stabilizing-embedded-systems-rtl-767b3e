// tb_age_reg: random set/min sequences against a reference model.
module tb_age_reg;
  logic clk = 0, rst, set_now, min_en;
  logic [31:0] time_now, ts, ar, model;
  int checks = 0, failures = 0;

  age_reg dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    rst = 1; set_now = 0; min_en = 0; time_now = 0; ts = 0;
    @(posedge clk); #1 rst = 0; model = 0;
    checks++; if (ar != 0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      time_now = 1000 + i;
      set_now = $urandom_range(0, 9) == 0;
      min_en  = $urandom_range(0, 1) == 1;
      ts = time_now - $urandom_range(0, 2000);
      @(posedge clk);
      if (set_now) model = time_now;
      else if (min_en && ts < model) model = ts;
      #1;
      checks++;
      if (ar != model) begin failures++; $display("FAIL %0d: ar=%0d model=%0d", i, ar, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
