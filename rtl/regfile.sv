// regfile: 32 x 32-bit register file of the MIPS core.
//
// Two combinational read ports (ra1/rd1, ra2/rd2) and one write port written
// on the rising clock edge when we3 is high. Register 0 always reads as zero
// and is never written. There is no reset: like the FPGA memory it maps to,
// the contents are undefined until software writes them. Only the register
// count and the MIPS $0 rule come from the architecture; the port naming and
// the timing are the usual single-cycle arrangement.
module regfile (
  input  logic        clk,
  input  logic        we3,
  input  logic [4:0]  ra1,
  input  logic [4:0]  ra2,
  input  logic [4:0]  wa3,
  input  logic [31:0] wd3,
  output logic [31:0] rd1,
  output logic [31:0] rd2
);

  logic [31:0] rf [32];

  always_ff @(posedge clk) begin
    if (we3 && wa3 != 5'd0) rf[wa3] <= wd3;
  end

  assign rd1 = (ra1 == 5'd0) ? 32'd0 : rf[ra1];
  assign rd2 = (ra2 == 5'd0) ? 32'd0 : rf[ra2];

endmodule
