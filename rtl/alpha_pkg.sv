// alpha_pkg: shared constants and types of the five-stage Alpha-subset pipeline.
//
// The instruction subset is the one the pipeline implements: register-register
// and register-literal ALU operations (addq, subq, bis, xor, cmoveq, cmplt),
// quadword load and store (ldq, stq), conditional branches (beq, bne),
// unconditional branches (br, bsr), register jumps (jmp/jsr/ret) and
// call_pal 0 used as halt, the multi-cycle integer multiply mulq (opcode
// 0x13, function 0x20), other call_pal functions, the overflow-trapping
// addq/v and subq/v (functions 0x60, 0x69) and rei (opcode 0x1E) for the
// exception mechanism. The ALU opcodes (0x10, 0x11), their function codes
// and the beq opcode (0x39) are those of the Alpha encoding; the remaining
// opcodes (ldq 0x29, stq 0x2D, bne 0x3D, br 0x30, bsr 0x34, jmp 0x1A) are the
// standard Alpha values and are this design's choice of encoding.
//
// Each pipeline register is a packed struct whose all-zero value is a bubble:
// the valid and write-enable bits are zero, so stage logic treats it as a NOP.
package alpha_pkg;

  localparam int unsigned XLEN = 64;   // Alpha quadword
  localparam logic [4:0]  RZERO = 5'd31;  // r31 reads as zero, writes are dropped

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;

  // Opcode field IR[31:26]
  localparam logic [5:0] OP_PAL  = 6'h00;
  localparam logic [5:0] OP_INTA = 6'h10;  // addq, subq, cmplt
  localparam logic [5:0] OP_INTL = 6'h11;  // bis, xor, cmoveq
  localparam logic [5:0] OP_INTM = 6'h13;  // mulq
  localparam logic [5:0] OP_JMP  = 6'h1A;
  localparam logic [5:0] OP_REI  = 6'h1E;  // return from exception or interrupt
  localparam logic [5:0] OP_LDQ  = 6'h29;
  localparam logic [5:0] OP_STQ  = 6'h2D;
  localparam logic [5:0] OP_BR   = 6'h30;
  localparam logic [5:0] OP_BSR  = 6'h34;
  localparam logic [5:0] OP_BEQ  = 6'h39;
  localparam logic [5:0] OP_BNE  = 6'h3D;

  // Function field IR[11:5]
  localparam logic [6:0] FN_ADDQ   = 7'h20;  // with OP_INTA
  localparam logic [6:0] FN_SUBQ   = 7'h29;  // with OP_INTA
  localparam logic [6:0] FN_CMPLT  = 7'h4D;  // with OP_INTA
  localparam logic [6:0] FN_ADDQV  = 7'h60;  // with OP_INTA, traps on overflow
  localparam logic [6:0] FN_SUBQV  = 7'h69;  // with OP_INTA, traps on overflow
  localparam logic [6:0] FN_BIS    = 7'h20;  // with OP_INTL
  localparam logic [6:0] FN_XOR    = 7'h40;  // with OP_INTL
  localparam logic [6:0] FN_CMOVEQ = 7'h24;  // with OP_INTL
  localparam logic [6:0] FN_MULQ   = 7'h20;  // with OP_INTM

  typedef enum logic [2:0] {
    ALU_ADD    = 3'd0,
    ALU_SUB    = 3'd1,
    ALU_OR     = 3'd2,
    ALU_XOR    = 3'd3,
    ALU_CMOVEQ = 3'd4,
    ALU_CMPLT  = 3'd5,
    ALU_PASSB  = 3'd6   // result = operand B (link address of br/bsr/jmp)
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE = 3'd0,
    BR_EQ   = 3'd1,   // taken when A == 0
    BR_NE   = 3'd2,   // taken when A != 0
    BR_UNC  = 3'd3,   // br, bsr: always taken, PC-relative
    BR_JMP  = 3'd4    // jmp/jsr/ret: always taken, target = Rb
  } br_kind_e;

  // Decoded control of one instruction
  typedef struct packed {
    logic      valid;     // real instruction (0: bubble)
    logic      illegal;   // opcode/function not in the subset (executes as NOP)
    alu_op_e   alu_op;
    logic      a_is_imm;  // ALU A takes the sign-extended 16-bit offset (ld/st)
    logic      b_is_imm;  // ALU B takes the 8-bit literal (RI form)
    logic      b_is_pc;   // ALU B takes incrPC (link value)
    logic      mem_rd;    // ldq
    logic      mem_wr;    // stq
    br_kind_e  br;
    logic      halt;      // call_pal 0
    logic      callpal;   // call_pal with a nonzero function: exception
    logic      trapv;     // addq/v, subq/v: overflow raises an exception
    logic      rei;       // return from exception
    logic      is_mul;    // mulq: executes in the multi-cycle multiplier
    logic      wen;       // writes register WDst
    reg_idx_t  wdst;
    reg_idx_t  asrc;      // register read as operand A (RZERO: none)
    reg_idx_t  bsrc;      // register read as operand B (RZERO: none)
  } ctrl_t;

  // IF/ID: ID_in
  typedef struct packed {
    logic        valid;
    logic [31:0] ir;
    word_t       incr_pc;
  } if_id_t;

  // ID/EX: EX_in
  typedef struct packed {
    ctrl_t  ctl;
    word_t  adat;      // register value for ASrc
    word_t  bdat;      // register value for BSrc
    word_t  imm16;     // sign-extended IR[15:0]
    word_t  lit8;      // zero-extended IR[20:13]
    word_t  disp;      // sign-extended IR[20:0]
    word_t  incr_pc;
  } id_ex_t;

  // EX/MEM: MEM_in
  typedef struct packed {
    ctrl_t  ctl;
    word_t  alu_out;
    word_t  adata;     // store data (operand A after forwarding)
    logic   taken;     // branch flag
    word_t  target;    // branch / jump target
    logic   ovf;       // arithmetic overflow of a trapping instruction
    word_t  incr_pc;
  } ex_mem_t;

  // MEM/WB: WB_in
  typedef struct packed {
    logic     valid;
    logic     wen;
    logic     is_load;
    reg_idx_t wdst;
    word_t    result;  // ALUout or load data
  } mem_wb_t;

  // Pipe register control (transfer / stall / bubble)
  typedef enum logic [1:0] {
    PR_TRANSFER = 2'd0,
    PR_STALL    = 2'd1,
    PR_BUBBLE   = 2'd2
  } pr_ctl_e;

  // Exception cause, as recorded in EXC_SUM
  typedef enum logic [2:0] {
    EXC_NONE      = 3'd0,
    EXC_CALLPAL   = 3'd1,
    EXC_OVERFLOW  = 3'd2,
    EXC_ILLEGAL   = 3'd3,
    EXC_INTERRUPT = 3'd4
  } exc_cause_e;

  // Operand source selected by the forwarding logic
  typedef enum logic [1:0] {
    FW_REG  = 2'd0,   // value read in ID
    FW_EXEX = 2'd1,   // MEM_in.ALUout (instruction that just finished EX)
    FW_MEMEX= 2'd2    // WB_in result (instruction two ahead)
  } fwd_sel_e;

endpackage
