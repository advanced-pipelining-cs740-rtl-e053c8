// branch_unit: branch condition and target, computed in the EX stage.
//
// Target = incrPC + (sign-extended 21-bit displacement << 2) for conditional
// and unconditional branches, and the value of Rb with its two low bits
// cleared for jumps. The condition is the zero test of operand A: beq is
// taken when A == 0, bne when A != 0; br, bsr and jmp are always taken.
// The result (branch flag and target) is latched into EX/MEM and acts on the
// PC when the branch is in MEM. Timing: purely combinational.
module branch_unit
  import alpha_pkg::*;
(
  input  br_kind_e br,
  input  word_t    a,        // condition operand (Ra, forwarded)
  input  word_t    b,        // jump target operand (Rb, forwarded)
  input  word_t    incr_pc,
  input  word_t    disp,     // sign-extended IR[20:0]
  output logic     taken,
  output word_t    target
);

  logic z;

  always_comb begin
    z      = (a == '0);
    target = incr_pc + (disp << 2);
    unique case (br)
      BR_EQ:   taken = z;
      BR_NE:   taken = !z;
      BR_UNC:  taken = 1'b1;
      BR_JMP: begin
        taken  = 1'b1;
        target = {b[XLEN-1:2], 2'b00};
      end
      default: taken = 1'b0;
    endcase
  end

endmodule
