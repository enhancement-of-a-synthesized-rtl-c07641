// tb_controller: checks the control unit's outputs for each instruction class,
// including the branch select pcsrc for beq with zero high and low.
module tb_controller;
  import mips_pkg::*;

  logic [5:0] op, funct;
  logic       zero;
  logic       signext, shiftl16, regwrite, regdst, alusrc, memwrite, memtoreg, jump, pcsrc, lh;
  alu_ctrl_t  alucontrol;
  int checks = 0, failures = 0;

  controller dut (.*);

  task automatic expect_ctl(input string name, input logic [9:0] e, input logic [2:0] ea);
    #1;
    checks++;
    if ({signext, shiftl16, regwrite, regdst, alusrc, memwrite, memtoreg, jump, pcsrc, lh} !== e
        || alucontrol !== ea) begin
      failures++;
      $display("FAIL %s: got %b/%b exp %b/%b", name,
               {signext, shiftl16, regwrite, regdst, alusrc, memwrite, memtoreg, jump, pcsrc, lh},
               alucontrol, e, ea);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    zero = 0;
    //                                 se s16 rw rd as mw mr j  pc lh
    op = 6'h00; funct = 6'h27; expect_ctl("nor",   10'b0_0_1_1_0_0_0_0_0_0, 3'b011);
    op = 6'h00; funct = 6'h2A; expect_ctl("slt",   10'b0_0_1_1_0_0_0_0_0_0, 3'b111);
    op = 6'h00; funct = 6'h22; expect_ctl("sub",   10'b0_0_1_1_0_0_0_0_0_0, 3'b110);
    op = 6'h0C; funct = 6'h27; expect_ctl("andi",  10'b0_0_1_0_1_0_0_0_0_0, 3'b000);
    op = 6'h0D; funct = 6'h00; expect_ctl("ori",   10'b0_0_1_0_1_0_0_0_0_0, 3'b001);
    op = 6'h0F; expect_ctl("lui",                  10'b0_1_1_0_1_0_0_0_0_0, 3'b010);
    op = 6'h23; expect_ctl("lw",                   10'b1_0_1_0_1_0_1_0_0_0, 3'b010);
    op = 6'h21; expect_ctl("lh",                   10'b1_0_1_0_1_0_1_0_0_1, 3'b010);
    op = 6'h2B; expect_ctl("sw",                   10'b1_0_0_0_1_1_0_0_0_0, 3'b010);
    op = 6'h02; expect_ctl("j",                    10'b0_0_0_0_0_0_0_1_0_0, 3'b010);
    op = 6'h04; zero = 0; expect_ctl("beq nt",     10'b1_0_0_0_0_0_0_0_0_0, 3'b110);
    op = 6'h04; zero = 1; expect_ctl("beq t",      10'b1_0_0_0_0_0_0_0_1_0, 3'b110);
    op = 6'h08; zero = 1; expect_ctl("addi z",     10'b1_0_1_0_1_0_0_0_0_0, 3'b010);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
