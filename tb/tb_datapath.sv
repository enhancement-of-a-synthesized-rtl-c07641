// tb_datapath: drives the datapath with control signals derived in the
// testbench from each fetched instruction (its own decode table, written from
// the instruction definitions) and checks, cycle by cycle against the
// reference model, the PC, the ALU result used as store address, and the store
// data. The test program includes the andi, nor, lh (both halves), beq and j
// cases.
module tb_datapath;
  import mips_pkg::*;
  import mips_asm_pkg::*;

  logic        clk = 0, reset;
  logic        signext, shiftl16, regwrite, regdst, alusrc, memtoreg, jump, pcsrc, lh, zero;
  alu_ctrl_t   alucontrol;
  logic [31:0] pc, instr, aluout, writedata, readdata;
  logic        memwrite;
  logic [31:0] mem [2**REF_AW];
  ref_t        rs;
  int checks = 0, failures = 0;

  datapath dut (.*);

  assign instr    = mem[pc[REF_AW+1:2]];
  assign readdata = mem[aluout[REF_AW+1:2]];

  // testbench decode
  always_comb begin
    logic [5:0] op, fn;
    op = instr[31:26]; fn = instr[5:0];
    {signext, shiftl16, regwrite, regdst, alusrc, memtoreg, jump, lh, memwrite} = '0;
    alucontrol = ALU_ADD;
    case (op)
      6'h00: begin
        regwrite = 1; regdst = 1;
        alucontrol = (fn == 6'h27) ? ALU_NOR : (fn == 6'h2A) ? ALU_SLT :
                     (fn == 6'h24) ? ALU_AND : (fn == 6'h25) ? ALU_OR  :
                     (fn == 6'h22 || fn == 6'h23) ? ALU_SUB : ALU_ADD;
      end
      6'h08, 6'h09: begin signext = 1; regwrite = 1; alusrc = 1; end
      6'h0C: begin regwrite = 1; alusrc = 1; alucontrol = ALU_AND; end
      6'h0D: begin regwrite = 1; alusrc = 1; alucontrol = ALU_OR; end
      6'h0F: begin shiftl16 = 1; regwrite = 1; alusrc = 1; end
      6'h23: begin signext = 1; regwrite = 1; alusrc = 1; memtoreg = 1; end
      6'h21: begin signext = 1; regwrite = 1; alusrc = 1; memtoreg = 1; lh = 1; end
      6'h2B: begin signext = 1; alusrc = 1; memwrite = 1; end
      6'h04: begin signext = 1; alucontrol = ALU_SUB; end
      6'h02: jump = 1;
      default: ;
    endcase
  end
  assign pcsrc = (instr[31:26] == 6'h04) && zero;
  always_ff @(posedge clk) if (memwrite) mem[aluout[REF_AW+1:2]] <= writedata;

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
    reset = 1;
    @(negedge clk); @(negedge clk);
    reset = 0;
    last_pc = 32'hFFFF_FFFF;
    while (rs.pc != last_pc) begin
      last_pc = rs.pc;
      chk("pc", pc, rs.pc);
      st = ref_step(rs, sa, sd);
      if (st) begin
        chk("store address", aluout, sa);
        chk("store data", writedata, sd);
      end
      @(negedge clk);
    end
    chk("lh lo", mem[(DATA_BASE + 32'h40 + 4*10) >> 2], 32'h00002008);
    chk("lh hi", mem[(DATA_BASE + 32'h40 + 4*12) >> 2], 32'hFFFFA5A5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
