// tb_addr_decoder: checks that exactly the page 0xFFFF2000..0xFFFF2FFF goes to
// the GPIO block and all other addresses to memory.
module tb_addr_decoder;
  logic [31:0] addr;
  logic        cs_mem, cs_gpio, exp;
  int checks = 0, failures = 0;

  addr_decoder dut (.*);

  task automatic run(input logic [31:0] a);
    addr = a; #1;
    exp = (a >= 32'hFFFF2000) && (a <= 32'hFFFF2FFF);
    checks++;
    if (cs_gpio !== exp || cs_mem !== !exp) begin
      failures++;
      $display("FAIL addr=%h gpio=%b mem=%b", a, cs_gpio, cs_mem);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    run(32'hFFFF2010); run(32'hFFFF202C); run(32'hFFFF2000); run(32'hFFFF2FFF);
    run(32'hFFFF1FFC); run(32'hFFFF3000); run(32'h00000040); run(32'hA5A52008);
    run(32'h7FFF2010);
    for (int i = 0; i < 2000; i++) run((i % 2 == 1) ? {20'hFFFF2, 12'($urandom)} : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
