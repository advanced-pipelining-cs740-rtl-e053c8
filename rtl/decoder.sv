// decoder: instruction decode for the ID stage.
//
// Turns a 32-bit Alpha instruction into the control word that travels with it
// down the pipeline: ALU operation, operand selection, memory access, branch
// kind, and the three register numbers the hazard logic works with. ASrc and
// BSrc are the registers the instruction reads (IR[25:21] and IR[20:16]);
// WDst is the register it writes. A field the instruction does not use is set
// to r31, which reads as zero and is never a hazard, and wen is cleared.
//
//   RR  (op 0x10/0x11, IR[12]=0): rc <- ra funct rb    reads ra, rb  writes rc
//   RI  (op 0x10/0x11, IR[12]=1): rc <- ra funct ib    reads ra      writes rc
//   mulq (op 0x13, RR or RI form): rc <- ra * rb, in the multiplier
//   ldq: ra <- Mem[rb + sext(IR[15:0])]                 reads rb      writes ra
//   stq: Mem[rb + sext(IR[15:0])] <- ra                 reads ra, rb
//   beq/bne: branch on ra, target incrPC + sext(IR[20:0])<<2   reads ra
//   br/bsr : ra <- incrPC, PC-relative target                  writes ra
//   jmp    : ra <- incrPC, target rb                   reads rb      writes ra
//   addq/v, subq/v: as addq, subq, flagged to trap on signed overflow
//   call_pal 0: halt; call_pal with another function: exception
//   rei    : return from exception (opcode 0x1E)
//
// Anything else decodes as a valid instruction flagged illegal, which raises
// an exception when it reaches MEM and otherwise has no effect.
// Also extracts the immediates: the 8-bit unsigned literal IR[20:13], the
// 16-bit memory offset and the 21-bit branch displacement, both sign-extended.
// Timing: purely combinational.
module decoder
  import alpha_pkg::*;
(
  input  logic        valid,
  input  logic [31:0] ir,
  output ctrl_t       ctl,
  output word_t       imm16,
  output word_t       lit8,
  output word_t       disp
);

  logic [5:0] op;
  logic [6:0] fn;
  reg_idx_t   ra, rb, rc;
  logic       is_lit;

  always_comb begin
    op     = ir[31:26];
    ra     = ir[25:21];
    rb     = ir[20:16];
    rc     = ir[4:0];
    fn     = ir[11:5];
    is_lit = ir[12];

    imm16 = {{(XLEN-16){ir[15]}}, ir[15:0]};
    lit8  = {{(XLEN-8){1'b0}}, ir[20:13]};
    disp  = {{(XLEN-21){ir[20]}}, ir[20:0]};

    ctl          = '0;
    ctl.alu_op   = ALU_ADD;
    ctl.br       = BR_NONE;
    ctl.wdst     = RZERO;
    ctl.asrc     = RZERO;
    ctl.bsrc     = RZERO;

    unique case (op)
      OP_INTA, OP_INTL: begin
        ctl.asrc     = ra;
        ctl.bsrc     = is_lit ? RZERO : rb;
        ctl.b_is_imm = is_lit;
        ctl.wdst     = rc;
        if (op == OP_INTA) begin
          unique case (fn)
            FN_ADDQ:  ctl.alu_op = ALU_ADD;
            FN_SUBQ:  ctl.alu_op = ALU_SUB;
            FN_CMPLT: ctl.alu_op = ALU_CMPLT;
            FN_ADDQV: begin ctl.alu_op = ALU_ADD; ctl.trapv = 1'b1; end
            FN_SUBQV: begin ctl.alu_op = ALU_SUB; ctl.trapv = 1'b1; end
            default:  ctl.illegal = 1'b1;
          endcase
        end else begin
          unique case (fn)
            FN_BIS:    ctl.alu_op = ALU_OR;
            FN_XOR:    ctl.alu_op = ALU_XOR;
            FN_CMOVEQ: ctl.alu_op = ALU_CMOVEQ;
            default:   ctl.illegal = 1'b1;
          endcase
        end
      end
      OP_INTM: begin
        ctl.asrc     = ra;
        ctl.bsrc     = is_lit ? RZERO : rb;
        ctl.b_is_imm = is_lit;
        ctl.wdst     = rc;
        if (fn == FN_MULQ) ctl.is_mul  = 1'b1;
        else               ctl.illegal = 1'b1;
      end
      OP_LDQ: begin
        ctl.a_is_imm = 1'b1;
        ctl.bsrc     = rb;
        ctl.wdst     = ra;
        ctl.mem_rd   = 1'b1;
      end
      OP_STQ: begin
        ctl.a_is_imm = 1'b1;
        ctl.asrc     = ra;
        ctl.bsrc     = rb;
        ctl.mem_wr   = 1'b1;
      end
      OP_BEQ, OP_BNE: begin
        ctl.asrc = ra;
        ctl.br   = (op == OP_BEQ) ? BR_EQ : BR_NE;
      end
      OP_BR, OP_BSR: begin
        ctl.alu_op  = ALU_PASSB;
        ctl.b_is_pc = 1'b1;
        ctl.wdst    = ra;
        ctl.br      = BR_UNC;
      end
      OP_JMP: begin
        ctl.alu_op  = ALU_PASSB;
        ctl.b_is_pc = 1'b1;
        ctl.bsrc    = rb;
        ctl.wdst    = ra;
        ctl.br      = BR_JMP;
      end
      OP_PAL: begin
        if (ir[25:0] == '0) ctl.halt = 1'b1;
        else                ctl.callpal = 1'b1;
      end
      OP_REI: ctl.rei = 1'b1;
      default: ctl.illegal = 1'b1;
    endcase

    if (ctl.illegal) begin
      ctl.is_mul = 1'b0;
      ctl.asrc   = RZERO;
      ctl.bsrc   = RZERO;
      ctl.wdst   = RZERO;
      ctl.alu_op = ALU_ADD;
    end
    ctl.wen   = valid && !ctl.illegal && (ctl.wdst != RZERO);
    ctl.valid = valid;
    if (!valid) ctl = '0;
  end

endmodule
