// tb_ram2port: loads the display program from its initialisation file, checks
// its words through both ports, then random writes on port B against a shadow
// copy, read back the same cycle through port B and the next through port A.
module tb_ram2port;
  localparam int AW = 6;
  logic          clk = 0;
  logic [AW-1:0] addr_a, addr_b;
  logic          we_b;
  logic [31:0]   q_a, d_b, q_b;
  logic [31:0]   shadow [2**AW];
  int checks = 0, failures = 0;

  ram2port #(.AW(AW), .INIT_FILE("rtl/id_display.hex")) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we_b = 0; addr_a = 0; addr_b = 0; d_b = 0;
    for (int i = 0; i < 2**AW; i++) shadow[i] = 0;
    shadow[0]  = 32'h3C020000; shadow[3]  = 32'h24632010;
    shadow[16] = 32'hAC620010; shadow[17] = 32'h08000010;
    foreach (shadow[i]) begin
      if (i == 0 || i == 3 || i == 16 || i == 17 || i > 17) begin
        addr_a = AW'(i); addr_b = AW'(i); #1;
        checks++;
        if (q_a !== shadow[i] || q_b !== shadow[i]) begin
          failures++;
          $display("FAIL init word %0d: %h %h exp %h", i, q_a, q_b, shadow[i]);
        end
      end
    end
    for (int i = 0; i < 2**AW; i++) begin
      @(negedge clk); we_b = 1; addr_b = AW'(i); d_b = $urandom; shadow[i] = d_b;
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      we_b = 1'($urandom); addr_b = AW'($urandom); d_b = $urandom; addr_a = AW'($urandom);
      #1;
      checks++;
      if (q_a !== shadow[addr_a] || q_b !== shadow[addr_b]) begin
        failures++;
        $display("FAIL read a[%0d]=%h exp %h b[%0d]=%h exp %h", addr_a, q_a, shadow[addr_a], addr_b, q_b, shadow[addr_b]);
      end
      @(posedge clk);
      if (we_b) shadow[addr_b] = d_b;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
