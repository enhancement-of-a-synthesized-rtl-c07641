// tb_aludec: checks the ALU decoder for every aluop and function code.
module tb_aludec;
  import mips_pkg::*;

  logic [5:0] funct;
  logic [2:0] aluop;
  alu_ctrl_t  alucontrol;
  logic [2:0] exp;
  int checks = 0, failures = 0;

  aludec dut (.funct(funct), .aluop(aluop), .alucontrol(alucontrol));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++) begin
      for (int f = 0; f < 64; f++) begin
        aluop = 3'(a); funct = 6'(f);
        if (a == 0)      exp = 3'b010;
        else if (a == 1) exp = 3'b110;
        else if (a == 2) exp = 3'b001;
        else if (a == 3) exp = 3'b000;
        else begin
          case (f)
            32, 33:  exp = 3'b010;
            34, 35:  exp = 3'b110;
            36:      exp = 3'b000;
            37:      exp = 3'b001;
            39:      exp = 3'b011;
            42:      exp = 3'b111;
            default: exp = 3'b010;
          endcase
        end
        #1;
        checks++;
        if (alucontrol !== exp) begin
          failures++;
          $display("FAIL aluop=%b funct=%b got=%b exp=%b", aluop, funct, alucontrol, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
