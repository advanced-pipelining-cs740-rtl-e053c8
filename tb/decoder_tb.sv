// decoder_tb: decodes every instruction form of the subset with random
// register fields and checks the register roles (ASrc, BSrc, WDst), the
// operation, operand selection, memory, branch, exception flags and the
// three immediates, against the instruction formats: RR, RI, load, store,
// conditional branch, br/bsr, jmp, call_pal, rei, mulq; plus illegal encodings,
// r31 destinations and bubbles.
module decoder_tb;
  import alpha_pkg::*;
  import alpha_tb_pkg::*;

  logic        valid;
  logic [31:0] ir;
  ctrl_t       ctl;
  logic [63:0] imm16, lit8, disp;
  int checks = 0, failures = 0;

  decoder dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (ir=%h)", what, ir); end
  endtask

  task automatic roles(input int ea, input int eb, input int ew, input string what);
    check(ctl.valid && ctl.asrc == 5'(ea) && ctl.bsrc == 5'(eb) && ctl.wdst == 5'(ew) &&
          ctl.wen == (ew != 31) && !ctl.illegal,
          $sformatf("%s roles a=%0d b=%0d w=%0d wen=%b", what, ctl.asrc, ctl.bsrc, ctl.wdst, ctl.wen));
  endtask

  initial begin
    logic [6:0] fa[5] = '{ADDQ, SUBQ, CMPLT, ADDQV, SUBQV};
    alu_op_e    oa[5] = '{ALU_ADD, ALU_SUB, ALU_CMPLT, ALU_ADD, ALU_SUB};
    logic [6:0] fl[3] = '{BIS, XOR, CMOVEQ};
    alu_op_e    ol[3] = '{ALU_OR, ALU_XOR, ALU_CMOVEQ};
    valid = 1'b1;
    // the encodings of the example program
    ir = 32'h43e7f401; #1;
    roles(31, 31, 1, "addq r31,0x3f,r1");
    check(ctl.b_is_imm && lit8 == 64'h3f && ctl.alu_op == ALU_ADD, "addq literal");
    ir = 32'h47ff041f; #1;
    check(ctl.valid && !ctl.wen && ctl.alu_op == ALU_OR && !ctl.illegal, "bis r31,r31,r31 is a nop");
    ir = 32'he7e00005; #1;
    check(ctl.br == BR_EQ && ctl.asrc == 31 && disp == 64'd5 && !ctl.wen, "beq r31,+5");
    ir = 32'h00000000; #1;
    check(ctl.halt && !ctl.wen && !ctl.callpal, "call_pal halt");

    for (int i = 0; i < 400; i++) begin
      automatic int ra = $urandom_range(31), rb = $urandom_range(31), rc = $urandom_range(31);
      automatic int k, lit = $urandom_range(255), off = $urandom_range(65535);
      automatic int dsp = $urandom_range(2097151);
      k = $urandom_range(4);
      ir = rr(INTA, fa[k], ra, rb, rc); #1;
      roles(ra, rb, rc, "RR arith");
      check(ctl.alu_op == oa[k] && !ctl.b_is_imm && ctl.trapv == (k >= 3), "RR arith op");
      ir = ri(INTA, fa[k], ra, lit, rc); #1;
      roles(ra, 31, rc, "RI arith");
      check(ctl.b_is_imm && lit8 == 64'(lit) && ctl.alu_op == oa[k], "RI arith literal");
      k = $urandom_range(2);
      ir = rr(INTL, fl[k], ra, rb, rc); #1;
      roles(ra, rb, rc, "RR logic");
      check(ctl.alu_op == ol[k], "RR logic op");
      ir = rr(INTM, MULQ, ra, rb, rc); #1;
      roles(ra, rb, rc, "RR mulq");
      check(ctl.is_mul && !ctl.b_is_imm && !ctl.mem_rd && ctl.br == BR_NONE, "RR mulq");
      ir = ri(INTM, MULQ, ra, lit, rc); #1;
      roles(ra, 31, rc, "RI mulq");
      check(ctl.is_mul && ctl.b_is_imm && lit8 == 64'(lit), "RI mulq literal");
      ir = rr(INTM, 7'h30, ra, rb, rc); #1;
      check(ctl.illegal && !ctl.is_mul && !ctl.wen, "unknown multiply function illegal");
      ir = mem(LDQ, ra, rb, off); #1;
      roles(31, rb, ra, "ldq");
      check(ctl.mem_rd && !ctl.mem_wr && ctl.a_is_imm && imm16 == 64'(signed'(16'(off))), "ldq");
      ir = mem(STQ, ra, rb, off); #1;
      roles(ra, rb, 31, "stq");
      check(ctl.mem_wr && !ctl.mem_rd && ctl.a_is_imm && imm16 == 64'(signed'(16'(off))), "stq");
      ir = bra(($urandom_range(1) != 0) ? BEQ : BNE, ra, dsp); #1;
      roles(ra, 31, 31, "cond branch");
      check((ctl.br == BR_EQ) == (ir[31:26] == BEQ) && ctl.br != BR_NONE &&
            disp == 64'(signed'(21'(dsp))), "cond branch kind and displacement");
      ir = bra(($urandom_range(1) != 0) ? BR : BSR, ra, dsp); #1;
      roles(31, 31, ra, "br/bsr");
      check(ctl.br == BR_UNC && ctl.b_is_pc && ctl.alu_op == ALU_PASSB, "br/bsr link");
      ir = jmp(ra, rb); #1;
      roles(31, rb, ra, "jmp");
      check(ctl.br == BR_JMP && ctl.b_is_pc, "jmp");
      ir = {6'h00, 26'($urandom_range(1, 255))}; #1;
      check(ctl.callpal && !ctl.halt && !ctl.wen, "call_pal function");
      ir = REI; #1;
      check(ctl.rei && !ctl.wen && ctl.br == BR_NONE, "rei");
      ir = {6'h01, 26'($urandom)}; #1;
      check(ctl.illegal && !ctl.wen && !ctl.mem_wr && ctl.br == BR_NONE, "reserved opcode illegal");
      ir = rr(INTA, 7'h11, ra, rb, rc); #1;
      check(ctl.illegal && !ctl.wen, "unknown function illegal");
      valid = 1'b0; #1;
      check(ctl == '0, "bubble decodes to zero");
      valid = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
