// tb_insn_check: checks the opcode marker test and the immediate reassembly
// against an independent encoder, including the printed example of an
// instruction whose four data bytes are all ones.
module tb_insn_check;
  import ss_pkg::*;
  logic [15:0] hw0, hw1, hw2;
  logic opc_valid, has_data;
  logic [12:0] opcode;
  logic [31:0] data;
  int checks = 0, failures = 0;

  insn_check dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    // example: opcode 0x0006 with data 0xFFFFFFFF
    hw0 = 16'hE006; hw1 = 16'h7FFF; hw2 = 16'h7FFF; #1;
    check(opc_valid, "example valid");
    check(opcode == 13'h0006, "example opcode");
    check(data == 32'hFFFF_FFFF, "example data");
    for (int i = 0; i < 2000; i++) begin
      logic [12:0] op; logic [31:0] d; logic [7:0] b0, b1, b2, b3;
      op = 13'($urandom); d = $urandom;
      {b0, b1, b2, b3} = d;
      hw0 = {1'b1, b0[7], b2[7], op};
      hw1 = {1'b0, b0[6:0], b1};
      hw2 = {1'b0, b2[6:0], b3};
      #1;
      check(opc_valid && opcode == op && data == d && has_data == op[12], "random encode/decode");
      // PC on a data halfword: the first halfword now has its top bit clear
      hw0 = hw1; hw1 = hw2; hw2 = 16'($urandom); #1;
      check(!opc_valid, "data halfword rejected");
      hw0 = hw1; #1;
      check(!opc_valid, "third data byte rejected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
