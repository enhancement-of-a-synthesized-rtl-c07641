// tb_lhw: checks the load-half unit on the two worked cases (lower half of
// 0xA5A52008 gives 0x00002008, upper half of 0xA5A52013 gives 0xFFFFA5A5),
// on pass-through with lh low, and on random words.
module tb_lhw;
  logic [31:0] fword, memhw, e;
  logic        lh, lhcontrol;
  int checks = 0, failures = 0;

  lhw dut (.*);

  task automatic run(input logic [31:0] w, input logic l, input logic c, input logic [31:0] ex);
    fword = w; lh = l; lhcontrol = c; #1;
    checks++;
    if (memhw !== ex) begin
      failures++;
      $display("FAIL w=%h lh=%b ctl=%b got=%h exp=%h", w, l, c, memhw, ex);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    logic [15:0] h;
    run(32'hA5A52008, 1, 0, 32'h00002008);
    run(32'hA5A52013, 1, 1, 32'hFFFFA5A5);
    run(32'hA5A52013, 0, 1, 32'hA5A52013);
    run(32'h7FFF8000, 1, 0, 32'hFFFF8000);
    run(32'h7FFF8000, 1, 1, 32'h00007FFF);
    for (int i = 0; i < 2000; i++) begin
      w = $urandom;
      h = (i % 2 == 1) ? w[31:16] : w[15:0];
      if (i % 3 == 0) run(w, 0, 1'(i), w);
      else            run(w, 1, 1'(i), 32'($signed(h)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
