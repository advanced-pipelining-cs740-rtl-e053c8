// alu: the integer ALU of the EX stage.
//
// Performs the Alpha subset's operate functions on two 64-bit operands:
// addq (a+b), subq (a-b), bis (a|b), xor (a^b), cmplt (signed a<b gives 1,
// else 0) and cmoveq (result b, written only when a == 0). PASSB forwards
// operand B unchanged; the pipeline uses it to write the link address of
// br, bsr and jmp. For cmoveq the output wr_ok is low when the move must not
// happen, and the pipeline then drops the register write; for every other
// operation wr_ok is high. ovf flags signed overflow of addq/subq.
//
// Timing: purely combinational, within the EX stage.
module alu
  import alpha_pkg::*;
#(
  parameter int unsigned DW = 64
) (
  input  alu_op_e        op,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  output logic [DW-1:0]  y,
  output logic           wr_ok,
  output logic           ovf
);

  logic [DW-1:0] sum, diff;

  always_comb begin
    sum   = a + b;
    diff  = a - b;
    wr_ok = 1'b1;
    ovf   = 1'b0;
    unique case (op)
      ALU_ADD: begin
        y   = sum;
        ovf = (a[DW-1] == b[DW-1]) && (sum[DW-1] != a[DW-1]);
      end
      ALU_SUB: begin
        y   = diff;
        ovf = (a[DW-1] != b[DW-1]) && (diff[DW-1] != a[DW-1]);
      end
      ALU_OR:     y = a | b;
      ALU_XOR:    y = a ^ b;
      ALU_CMPLT:  y = {{(DW-1){1'b0}}, ($signed(a) < $signed(b))};
      ALU_CMOVEQ: begin
        y     = b;
        wr_ok = (a == '0);
      end
      default:    y = b;   // ALU_PASSB
    endcase
  end

endmodule
