// tb_regfile: random writes and reads against a shadow copy; register 0 must
// read zero even after writes to it. Writes take effect at the next edge.
module tb_regfile;
  logic        clk = 0;
  logic        we3;
  logic [4:0]  ra1, ra2, wa3;
  logic [31:0] wd3, rd1, rd2;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we3 = 0; ra1 = 0; ra2 = 0; wa3 = 0; wd3 = 0;
    // fill every register first
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); we3 = 1; wa3 = 5'(i); wd3 = $urandom;
      shadow[i] = (i == 0) ? 32'h0 : wd3;
    end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we3 = ($urandom % 2) == 1; wa3 = 5'($urandom); wd3 = $urandom;
      ra1 = 5'($urandom); ra2 = (n % 5 == 0) ? 5'd0 : 5'($urandom);
      #1;
      checks++;
      if (rd1 !== shadow[ra1] || rd2 !== shadow[ra2]) begin
        failures++;
        $display("FAIL ra1=%0d rd1=%h exp=%h ra2=%0d rd2=%h exp=%h", ra1, rd1, shadow[ra1], ra2, rd2, shadow[ra2]);
      end
      @(posedge clk);
      if (we3 && wa3 != 0) shadow[wa3] = wd3;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
