// tb_data_ram: random writes and reads against a reference array.
module tb_data_ram;
  logic clk = 0, we;
  logic [7:0] addr;
  logic [31:0] wdata, rdata;
  logic [31:0] model [256];
  bit valid [256];
  int checks = 0, failures = 0;

  data_ram dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) valid[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = 8'($urandom);
      we = $urandom_range(0, 1) == 1;
      wdata = $urandom;
      #1;
      if (valid[addr]) begin
        checks++;
        if (rdata != model[addr]) begin failures++; $display("FAIL read %0d", addr); end
      end
      if (we) begin model[addr] = wdata; valid[addr] = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
