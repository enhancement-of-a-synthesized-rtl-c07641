// tb_mips_de2_ops: end-to-end test of the whole system at its default size.
// While reset is held, the testbench replaces the memory contents with its
// test program (andi, nor and load-half experiments, a counted loop with beq
// and j, the other ALU operations, stores and loads to memory, and writes and
// a read-back of two seven-segment registers). It then checks every cycle's PC
// and every store against the reference model, the final displays, and counts
// how often each mechanism occurred: each must occur at least once.
module tb_mips_de2_ops;
  import mips_asm_pkg::*;

  logic        clk = 0, reset;
  logic [6:0]  HEX0, HEX1, HEX2, HEX3, HEX4, HEX5, HEX6, HEX7;
  logic [31:0] pc, instr;
  logic [31:0] prog [2**REF_AW];
  ref_t        rs;
  int checks = 0, failures = 0;

  typedef enum int {M_ANDI, M_NOR, M_LH_LO, M_LH_HI, M_LW, M_SW_MEM, M_SW_GPIO, M_LW_GPIO,
                    M_BEQ_TAKEN, M_BEQ_NOT, M_JUMP, M_SLT, M_LUI, M_N} mech_t;
  int seen [M_N];

  mips_de2 dut (.*);

  always #20 clk = ~clk;

  task automatic chk(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] sa, sd, last_pc, ea, a, b;
    logic [5:0]  op;
    bit st, gp;
    foreach (seen[i]) seen[i] = 0;
    load_program(prog, 1'b1);
    reset = 1;
    @(negedge clk);
    for (int i = 0; i < 2**REF_AW; i++) dut.u_mem.mem[i] = prog[i];
    @(negedge clk);
    rs.mem = prog;
    rs.pc  = 0;
    for (int i = 0; i < 32; i++) rs.r[i] = 0;
    for (int i = 0; i < 8; i++) rs.hex[i] = 7'h7F;
    reset = 0;
    last_pc = 32'hFFFF_FFFF;
    while (rs.pc != last_pc) begin
      last_pc = rs.pc;
      chk("pc", pc, rs.pc);
      chk("instr", instr, rs.mem[rs.pc[REF_AW+1:2]]);
      // classify the instruction from the reference state before it executes
      op = instr[31:26];
      a  = (instr[25:21] == 0) ? 0 : rs.r[instr[25:21]];
      b  = (instr[20:16] == 0) ? 0 : rs.r[instr[20:16]];
      ea = a + {{16{instr[15]}}, instr[15:0]};
      gp = is_gpio(ea);
      case (op)
        6'h0C: seen[M_ANDI]++;
        6'h0F: seen[M_LUI]++;
        6'h21: if (ea[1]) seen[M_LH_HI]++; else seen[M_LH_LO]++;
        6'h23: if (gp) seen[M_LW_GPIO]++; else seen[M_LW]++;
        6'h2B: if (gp) seen[M_SW_GPIO]++; else seen[M_SW_MEM]++;
        6'h04: if (a == b) seen[M_BEQ_TAKEN]++; else seen[M_BEQ_NOT]++;
        6'h02: seen[M_JUMP]++;
        6'h00: if (instr[5:0] == 6'h27) seen[M_NOR]++;
               else if (instr[5:0] == 6'h2A) seen[M_SLT]++;
        default: ;
      endcase
      st = ref_step(rs, sa, sd);
      chk("memwrite", {31'b0, dut.memwrite}, {31'b0, st});
      if (st) begin
        chk("store address", dut.dataaddr, sa);
        chk("store data", dut.writedata, sd);
      end
      @(negedge clk);
    end
    // worked values, independent of the reference model
    chk("andi result", dut.u_mem.mem[(DATA_BASE + 32'h40 + 4*3)  >> 2], 32'h00001818);
    chk("nor result",  dut.u_mem.mem[(DATA_BASE + 32'h40 + 4*5)  >> 2], 32'h00008181);
    chk("lh lower",    dut.u_mem.mem[(DATA_BASE + 32'h40 + 4*10) >> 2], 32'h00002008);
    chk("lh upper",    dut.u_mem.mem[(DATA_BASE + 32'h40 + 4*12) >> 2], 32'hFFFFA5A5);
    chk("HEX7 read back", dut.u_mem.mem[(DATA_BASE + 32'hC0) >> 2], 32'h40);
    chk("HEX7", 32'(HEX7), 32'h40);
    chk("HEX0", 32'(HEX0), 32'h12);
    chk("HEX1 untouched", 32'(HEX1), 32'h7F);
    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %s occurred %0d times", mech_t'(m), seen[m]);
      checks++;
      if (seen[m] == 0) begin
        failures++;
        $display("FAIL mechanism %s never occurred", mech_t'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
