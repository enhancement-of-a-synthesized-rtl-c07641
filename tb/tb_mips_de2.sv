// tb_mips_de2: the whole system at its default size running its default
// program, the ID-number display program. After reset the program must have
// written the segment patterns of "00917785" (HEX7..HEX0 = 40 40 10 79 78 78
// 00 12) after its 17th instruction, one instruction per cycle, and must then
// loop between 0x40 and 0x44 (store to HEX4, jump).
module tb_mips_de2;
  logic        clk = 0, reset;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  logic [31:0] pc, instr;
  int checks = 0, failures = 0;

  mips_de2 dut (.*);

  always #20 clk = ~clk;  // 25 MHz

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic bit shows_id();
    return {HEX7, HEX6, HEX5, HEX4, HEX3, HEX2, HEX1, HEX0} ==
           {7'h40, 7'h40, 7'h10, 7'h79, 7'h78, 7'h78, 7'h00, 7'h12};
  endfunction

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    reset = 1;
    repeat (2) @(negedge clk);
    chk("blank after reset", 32'({HEX7, HEX6, HEX5, HEX4, HEX3, HEX2, HEX1, HEX0} == {8{7'h7F}}), 1);
    chk("pc after reset", pc, 0);
    chk("first instruction", instr, 32'h3C020000);
    reset = 0;
    cycles = 0;
    while (!shows_id() && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    chk("cycles until the ID is shown", cycles, 17);
    chk("HEX7", 32'(HEX7), 32'h40); chk("HEX6", 32'(HEX6), 32'h40); chk("HEX5", 32'(HEX5), 32'h10);
    chk("HEX4", 32'(HEX4), 32'h79); chk("HEX3", 32'(HEX3), 32'h78); chk("HEX2", 32'(HEX2), 32'h78);
    chk("HEX1", 32'(HEX1), 32'h00); chk("HEX0", 32'(HEX0), 32'h12);
    for (int i = 0; i < 6; i++) begin
      chk("loop pc", pc, (i % 2 == 1) ? 32'h40 : 32'h44);
      chk("loop instr", instr, (i % 2 == 1) ? 32'hAC620010 : 32'h08000010);
      @(negedge clk);
    end
    chk("display stays", {31'b0, shows_id()}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
