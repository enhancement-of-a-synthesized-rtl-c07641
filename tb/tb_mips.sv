// tb_mips: runs the test program on the core with a testbench memory and
// checks it cycle by cycle against the instruction-set reference model: the PC
// of every cycle (one instruction per cycle) and the address and data of every
// store. Then it checks the stored results of the andi, nor and load-half
// experiments and of the loop against hand-computed values.
module tb_mips;
  import mips_asm_pkg::*;

  logic        clk = 0, reset;
  logic [31:0] pc, instr, dataaddr, writedata, readdata;
  logic        memwrite;
  logic [31:0] mem [2**REF_AW];
  ref_t        rs;
  int checks = 0, failures = 0;
  int cycles = 0;

  mips dut (.*);

  assign instr    = mem[pc[REF_AW+1:2]];
  assign readdata = mem[dataaddr[REF_AW+1:2]];
  always_ff @(posedge clk) if (memwrite) mem[dataaddr[REF_AW+1:2]] <= writedata;

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sa, sd, last_pc;
    bit st;
    load_program(mem, 1'b0);
    rs.mem = mem;
    rs.pc  = 0;
    for (int i = 0; i < 32; i++) rs.r[i] = 0;
    for (int i = 0; i < 8; i++) rs.hex[i] = 7'h7F;
    reset = 1;
    @(negedge clk); @(negedge clk);
    reset = 0;
    last_pc = 32'hFFFF_FFFF;
    // one instruction per cycle: compare at each negative edge
    while (rs.pc != last_pc) begin
      last_pc = rs.pc;
      chk("pc", pc, rs.pc);
      st = ref_step(rs, sa, sd);
      chk("memwrite", {31'b0, memwrite}, {31'b0, st});
      if (st) begin
        chk("store address", dataaddr, sa);
        chk("store data", writedata, sd);
      end
      @(negedge clk);
      cycles++;
    end
    // 0x40 + 4*r above the data base holds register r
    chk("andi  $3",  mem[(DATA_BASE + 32'h40 + 4*3)  >> 2], 32'h00001818);
    chk("nor   $5",  mem[(DATA_BASE + 32'h40 + 4*5)  >> 2], 32'h00008181);
    chk("lw    $9",  mem[(DATA_BASE + 32'h40 + 4*9)  >> 2], 32'hA5A52008);
    chk("lh lo $10", mem[(DATA_BASE + 32'h40 + 4*10) >> 2], 32'h00002008);
    chk("lh hi $12", mem[(DATA_BASE + 32'h40 + 4*12) >> 2], 32'hFFFFA5A5);
    chk("loop  $14", mem[(DATA_BASE + 32'h40 + 4*14) >> 2], 32'd15);
    chk("slt   $16", mem[(DATA_BASE + 32'h40 + 4*16) >> 2], 32'd1);
    chk("sub   $17", mem[(DATA_BASE + 32'h40 + 4*17) >> 2], 32'h00001818 - 32'h00008181);
    // 17 set-up + 19 in the loop (four trips of 4, one of 3) + 7 ALU + 18 stores
    // + lw + beq + the first pass of the spin: one cycle per instruction
    chk("cycles to spin", cycles, 17 + 19 + 7 + 18 + 2 + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
