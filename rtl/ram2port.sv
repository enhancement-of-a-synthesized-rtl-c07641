// ram2port: unified instruction/data memory with two ports.
//
// 2**AW words of 32 bits (default 2048 words, 8 KB), loaded at start-up from
// the hex memory-initialisation file INIT_FILE (one 32-bit word per line,
// word 0 first); words the file does not cover start at zero. Port A is a
// read-only instruction port, port B a read/write data port. Both read
// combinationally from a word address, as a single-cycle core needs; port B
// writes the whole word on the rising clock edge when we is high. A program
// and its data share this one array, as they share one initialisation file in
// the described system. The size, the unified organisation and the read timing
// are this design's choices.
module ram2port #(
  parameter int unsigned AW        = 11,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  // port A: instruction fetch
  input  logic [AW-1:0] addr_a,
  output logic [31:0]   q_a,
  // port B: data
  input  logic [AW-1:0] addr_b,
  input  logic          we_b,
  input  logic [31:0]   d_b,
  output logic [31:0]   q_b
);

  logic [31:0] mem [2**AW];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = 32'h0;
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we_b) mem[addr_b] <= d_b;
  end

  assign q_a = mem[addr_a];
  assign q_b = mem[addr_b];

endmodule
