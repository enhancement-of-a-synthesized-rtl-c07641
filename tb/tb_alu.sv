// tb_alu: checks every ALU operation on the worked values of the andi and nor
// tests (0xFFFF3C3C & 0x00005A5A = 0x00001818, ~(0xFFFF5A5A | 0xFFFF3C3C) =
// 0x00008181) and on random operands against a reference, plus the zero flag.
module tb_alu;
  import mips_pkg::*;

  logic [31:0] a, b, y, e;
  alu_ctrl_t   f;
  logic        zero;
  int checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .alucontrol(f), .result(y), .zero(zero));

  function automatic logic [31:0] model(input logic [2:0] op, input logic [31:0] x, input logic [31:0] z);
    case (op)
      3'b000: return x & z;
      3'b001: return x | z;
      3'b010: return x + z;
      3'b011: return ~(x | z);
      3'b110: return x + ~z + 1;
      3'b111: return (x[31] != z[31]) ? {31'b0, x[31]} : {31'b0, (x - z) >> 31 == 1};
      default: return 0;
    endcase
  endfunction

  task automatic run(input alu_ctrl_t op, input logic [31:0] x, input logic [31:0] z);
    a = x; b = z; f = op; #1;
    e = model(op, x, z);
    checks++;
    if (y !== e || zero !== (e == 0)) begin
      failures++;
      $display("FAIL f=%b a=%h b=%h y=%h exp=%h zero=%b", op, x, z, y, e, zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  alu_ctrl_t ops [6] = '{ALU_AND, ALU_OR, ALU_ADD, ALU_NOR, ALU_SUB, ALU_SLT};

  initial begin
    a = 32'hFFFF3C3C; b = 32'h00005A5A; f = ALU_AND; #1;
    checks++; if (y !== 32'h00001818) failures++;
    a = 32'hFFFF5A5A; b = 32'hFFFF3C3C; f = ALU_NOR; #1;
    checks++; if (y !== 32'h00008181) failures++;
    run(ALU_SUB, 32'h1234, 32'h1234);
    run(ALU_SLT, 32'hFFFFFFFF, 32'h1);
    run(ALU_SLT, 32'h1, 32'hFFFFFFFF);
    run(ALU_SLT, 32'h80000000, 32'h7FFFFFFF);
    run(ALU_SLT, 32'h7FFFFFFF, 32'h80000000);
    run(ALU_ADD, 32'hFFFFFFFF, 32'h1);
    for (int i = 0; i < 3000; i++) run(ops[i % 6], $urandom, (i % 7 == 0) ? 32'h0 : $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
