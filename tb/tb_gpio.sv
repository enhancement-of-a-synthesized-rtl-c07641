// tb_gpio: checks the reset value of the eight display registers, writes the
// segment patterns of "00917785" to HEX7..HEX0 at 0x10 + 4*i, reads them back,
// and checks that writes with cs or we low, or to other offsets, change nothing.
module tb_gpio;
  import mips_pkg::*;

  logic        clk = 0, reset, cs, we;
  logic [11:0] addr;
  logic [31:0] wdata, rdata;
  logic [6:0]  hex [NUM_HEX];
  logic [6:0]  exp [NUM_HEX];
  int checks = 0, failures = 0;

  gpio dut (.*);

  always #5 clk = ~clk;

  task automatic check_all(input string what);
    for (int i = 0; i < NUM_HEX; i++) begin
      checks++;
      if (hex[i] !== exp[i]) begin
        failures++;
        $display("FAIL %s: HEX%0d=%h exp %h", what, i, hex[i], exp[i]);
      end
    end
  endtask

  task automatic wr(input logic c, input logic w, input logic [11:0] a, input logic [31:0] d);
    @(negedge clk); cs = c; we = w; addr = a; wdata = d;
    @(negedge clk); cs = 0; we = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // segment patterns of "00917785", HEX0 first
  logic [6:0] pat [NUM_HEX] = '{7'h12, 7'h00, 7'h78, 7'h78, 7'h79, 7'h10, 7'h40, 7'h40};

  initial begin
    cs = 0; we = 0; addr = 0; wdata = 0; reset = 1;
    @(negedge clk); @(negedge clk); reset = 0;
    foreach (exp[i]) exp[i] = 7'h7F;
    check_all("reset");
    for (int i = 0; i < NUM_HEX; i++) begin
      wr(1, 1, 12'(16 + 4 * i), {25'h1ABCDE, pat[i]});
      exp[i] = pat[i];
    end
    check_all("display 00917785");
    for (int i = 0; i < NUM_HEX; i++) begin
      addr = 12'(16 + 4 * i); #1;
      checks++;
      if (rdata !== {25'b0, pat[i]}) begin failures++; $display("FAIL read HEX%0d %h", i, rdata); end
    end
    wr(0, 1, 12'h010, 32'h1);
    wr(1, 0, 12'h014, 32'h1);
    wr(1, 1, 12'h00C, 32'h1);
    wr(1, 1, 12'h030, 32'h1);
    check_all("ignored writes");
    addr = 12'h030; #1; checks++; if (rdata !== 0) failures++;
    reset = 1; @(negedge clk); reset = 0;
    foreach (exp[i]) exp[i] = 7'h7F;
    check_all("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
