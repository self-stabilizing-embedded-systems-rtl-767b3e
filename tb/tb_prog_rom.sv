// tb_prog_rom: checks that the program image is loaded at address 0, that
// every other location holds the RESET halfword 16'h8000, and that the three
// fetch halfwords are PC, PC+1, PC+2 with wrap-around.
module tb_prog_rom;
  localparam int unsigned N = 1024;
  logic [9:0]  pc;
  logic [15:0] hw0, hw1, hw2;
  logic [15:0] img [N];
  int checks = 0, failures = 0;
  int plen;

  prog_rom dut (.*);

  initial begin
    #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [15:0] expect_hw(int a);
    return (a < plen) ? img[a] : 16'h8000;
  endfunction

  initial begin
    for (int i = 0; i < N; i++) img[i] = 16'h0;
    $readmemh("rtl/ss_program.hex", img);
    plen = 0;
    for (int i = 0; i < N; i++) if (img[i] != 16'h0) plen = i + 1;
    for (int a = 0; a < N; a++) begin
      pc = 10'(a); #1;
      checks++;
      if (hw0 != expect_hw(a) || hw1 != expect_hw((a + 1) % N) || hw2 != expect_hw((a + 2) % N)) begin
        failures++; $display("FAIL at %0d: %h %h %h", a, hw0, hw1, hw2);
      end
    end
    checks++;
    if (plen < 10) begin failures++; $display("FAIL: program image missing"); end
    pc = 10'd1023; #1;
    checks++;
    if (hw0 != 16'h8000 || hw1 != img[0] || hw2 != img[1]) begin failures++; $display("FAIL wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
