// reg_file: the 32 x 64-bit integer register array of the pipeline.
//
// Two read ports (regA, regB) serve the instruction in ID and one write port
// (regW, datW) serves the instruction in WB. A register written in a cycle is
// seen by a read of the same register in that same cycle, which models the
// write-in-the-first-half, read-in-the-second-half timing of the pipeline.
// Register 31 always reads as zero and ignores writes, as in the Alpha
// architecture. A third read port (regD) is for observation only.
//
// Timing: reads are combinational; the write happens at the rising edge.
module reg_file
  import alpha_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned DW    = 64
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [4:0]        regA,
  input  logic [4:0]        regB,
  output logic [DW-1:0]     datA,
  output logic [DW-1:0]     datB,
  input  logic              wen,
  input  logic [4:0]        regW,
  input  logic [DW-1:0]     datW,
  input  logic [4:0]        regD,
  output logic [DW-1:0]     datD
);

  logic [DW-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (wen && regW != RZERO) begin
      regs[regW] <= datW;
    end
  end

  function automatic logic [DW-1:0] rd(input logic [4:0] idx,
                                       input logic w_en, input logic [4:0] w_idx,
                                       input logic [DW-1:0] w_dat,
                                       input logic [DW-1:0] stored);
    if (idx == RZERO)                 return '0;
    else if (w_en && w_idx == idx)    return w_dat;   // write before read
    else                              return stored;
  endfunction

  always_comb begin
    datA = rd(regA, wen, regW, datW, regs[regA]);
    datB = rd(regB, wen, regW, datW, regs[regB]);
    datD = (regD == RZERO) ? '0 : regs[regD];
  end

endmodule
