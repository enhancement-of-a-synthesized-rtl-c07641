// tb_maindec: checks the main decoder for all 64 opcodes.
// Expected control fields are built field by field from what each instruction
// must do (write a register, use the immediate, touch memory, ...), not from
// the decoder's packed constants. Unknown opcodes must give an all-zero word.
module tb_maindec;
  import mips_pkg::*;

  logic [5:0] op;
  ctrl_t      ctrl, exp;
  logic       lh, exp_lh;
  int checks = 0, failures = 0;

  maindec dut (.op(op), .ctrl(ctrl), .lh(lh));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      op = 6'(i);
      exp = '0; exp_lh = 1'b0;
      case (6'(i))
        6'h00: begin exp.regwrite = 1; exp.regdst = 1; exp.aluop = 3'b100; end
        6'h23: begin exp.signext = 1; exp.regwrite = 1; exp.alusrc = 1; exp.memtoreg = 1; end
        6'h21: begin exp.signext = 1; exp.regwrite = 1; exp.alusrc = 1; exp.memtoreg = 1; exp_lh = 1; end
        6'h2B: begin exp.signext = 1; exp.alusrc = 1; exp.memwrite = 1; end
        6'h04: begin exp.signext = 1; exp.branch = 1; exp.aluop = 3'b001; end
        6'h08, 6'h09: begin exp.signext = 1; exp.regwrite = 1; exp.alusrc = 1; end
        6'h0C: begin exp.regwrite = 1; exp.alusrc = 1; exp.aluop = 3'b011; end
        6'h0D: begin exp.regwrite = 1; exp.alusrc = 1; exp.aluop = 3'b010; end
        6'h0F: begin exp.shiftl16 = 1; exp.regwrite = 1; exp.alusrc = 1; end
        6'h02: begin exp.jump = 1; end
        default: ;
      endcase
      #1;
      checks++;
      if (ctrl !== exp || lh !== exp_lh) begin
        failures++;
        $display("FAIL op=%b ctrl=%b exp=%b lh=%b exp_lh=%b", op, ctrl, exp, lh, exp_lh);
      end
    end
    // the two control words the text spells out in full
    op = 6'b001100; #1; checks++; if (ctrl !== 12'b001010000011) failures++;
    op = 6'b000000; #1; checks++; if (ctrl !== 12'b001100000100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
