// tb_immext: checks sign extension, zero extension and the lui shift.
module tb_immext;
  logic [15:0] imm;
  logic        signext, shiftl16;
  logic [31:0] immx, e;
  int checks = 0, failures = 0;

  immext dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      imm = (i < 4) ? 16'(i * 16'h4000 + 16'h3C3C) : 16'($urandom);
      signext = 1'(i); shiftl16 = 1'(i >> 1);
      if (shiftl16)     e = imm * 32'h10000;
      else if (signext) e = imm[15] ? 32'hFFFF0000 + 32'(imm) : 32'(imm);
      else              e = 32'(imm);
      #1;
      checks++;
      if (immx !== e) begin
        failures++;
        $display("FAIL imm=%h se=%b s16=%b got=%h exp=%h", imm, signext, shiftl16, immx, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
