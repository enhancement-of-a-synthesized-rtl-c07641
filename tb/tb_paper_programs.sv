// tb_paper_programs: runs the three instruction experiments on the whole
// system at its default size, as machine code, and checks the ALU result and
// write-back value of each instruction against the worked values:
//   andi: 0xFFFF3C3C & 0x5A5A                        -> 0x00001818
//   nor:  ~(0xFFFF5A5A | 0xFFFF3C3C)                 -> 0x00008181
//   lh:   lower half of 0xA5A52008 at offset 0        -> 0x00002008
//         upper half of 0xA5A52013 at offset 0xB      -> 0xFFFFA5A5
// Each program is written into memory while reset is held. The load-half data
// addresses (0xA5A52008, 0xA5A52013) alias, in the 8 KB memory, onto program
// words 2 and 4, which have already executed when they are overwritten.
module tb_paper_programs;
  logic        clk = 0, reset;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  logic [31:0] pc, instr;
  int checks = 0, failures = 0;

  mips_de2 dut (.*);

  always #20 clk = ~clk;

  typedef struct {
    logic [31:0] pc;
    logic [31:0] instr;
    logic [31:0] aluout;
    logic [31:0] wb;      // value at the register write port
  } step_t;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // load words at 0, reset, then compare each listed step in order
  task automatic run(input string name, input logic [31:0] words [], input step_t steps []);
    reset = 1;
    @(negedge clk);
    for (int i = 0; i < 64; i++) dut.u_mem.mem[i] = (i < words.size()) ? words[i] : 32'h0;
    @(negedge clk);
    reset = 0;
    foreach (steps[k]) begin
      while (pc != steps[k].pc) @(negedge clk);
      chk({name, " instr"},  instr,           steps[k].instr);
      chk({name, " aluout"}, dut.u_cpu.dataaddr, steps[k].aluout);
      chk({name, " wb"},     dut.u_cpu.u_dp.memhw, steps[k].wb);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // andi experiment: lui $2,0xFFFF; addiu $2,$2,0x3C3C; andi $3,$2,0x5A5A
    run("andi", '{32'h3C02FFFF, 32'h24423C3C, 32'h30435A5A},
        '{'{32'h00, 32'h3C02FFFF, 32'hFFFF0000, 32'hFFFF0000},
          '{32'h04, 32'h24423C3C, 32'hFFFF3C3C, 32'hFFFF3C3C},
          '{32'h08, 32'h30435A5A, 32'h00001818, 32'h00001818}});
    // nor experiment, placed at 0x0C as in the captured run (0x18 holds a nop)
    run("nor", '{32'h0, 32'h0, 32'h0, 32'h3C02FFFF, 32'h24423C3C, 32'h3C04FFFF,
                 32'h00000000, 32'h24845A5A, 32'h00822827},
        '{'{32'h0C, 32'h3C02FFFF, 32'hFFFF0000, 32'hFFFF0000},
          '{32'h10, 32'h24423C3C, 32'hFFFF3C3C, 32'hFFFF3C3C},
          '{32'h14, 32'h3C04FFFF, 32'hFFFF0000, 32'hFFFF0000},
          '{32'h1C, 32'h24845A5A, 32'hFFFF5A5A, 32'hFFFF5A5A},
          '{32'h20, 32'h00822827, 32'h00008181, 32'h00008181}});
    // load-half experiment
    run("lh", '{32'h3C0200AA, 32'h24420055, 32'h3C03A5A5, 32'h24632008, 32'hAC630000,
                32'h8C620000, 32'h84620000, 32'h2462000B, 32'hAC62000B, 32'h8462000B},
        '{'{32'h00, 32'h3C0200AA, 32'h00AA0000, 32'h00AA0000},
          '{32'h04, 32'h24420055, 32'h00AA0055, 32'h00AA0055},
          '{32'h08, 32'h3C03A5A5, 32'hA5A50000, 32'hA5A50000},
          '{32'h0C, 32'h24632008, 32'hA5A52008, 32'hA5A52008},
          '{32'h14, 32'h8C620000, 32'hA5A52008, 32'hA5A52008},
          '{32'h18, 32'h84620000, 32'hA5A52008, 32'h00002008},
          '{32'h24, 32'h8462000B, 32'hA5A52013, 32'hFFFFA5A5}});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
