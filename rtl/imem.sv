// imem: instruction memory of the IF stage.
//
// WORDS 32-bit instruction words, read asynchronously at the byte address
// pc (word index pc[AW+1:2]; higher address bits wrap), so that the
// instruction is available in the same cycle the PC is. A separate write
// port loads the program before or while the pipeline runs; it writes at the
// rising edge. WORDS must be a power of two.
module imem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [63:0]   pc,
  output logic [31:0]   instr,
  input  logic          we,
  input  logic [AW-1:0] waddr,   // word index
  input  logic [31:0]   wdata
);

  logic [31:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign instr = mem[pc[AW+1:2]];

endmodule
