// alpha_pipe: five-stage pipelined processor for a subset of the Alpha ISA.
//
// Stages IF (PC, instruction memory, incrPC), ID (decode, register read),
// EX (ALU, branch condition and target), MEM (data memory, PC update by a
// taken branch) and WB (register write). The four pipeline registers IF/ID,
// ID/EX, EX/MEM and MEM/WB are written by the hazard unit's transfer / stall /
// bubble commands; an all-zero register is a bubble.
//
// Data hazards: results are forwarded to the EX inputs from MEM_in (EX-EX)
// and WB_in (MEM-EX), and a load's result in WB is forwarded to the data of a
// store in MEM (MEM-MEM). The one case forwarding cannot cover, a load
// followed by an instruction that uses its result in EX, costs one stall
// cycle. The register file writes before it reads, so a result in WB reaches
// ID in the same cycle. With FORWARDING=0 there are no bypass paths and an
// instruction waits in ID until its producers have reached WB.
//
// Control hazards: branches and jumps resolve in MEM. By default the pipeline
// keeps fetching sequentially (predict not taken) and, when a branch is
// taken, cancels the three younger instructions: 0 cycles lost when not taken,
// 3 when taken. With BRANCH_STALL=1 fetching stops while a branch is in ID or
// EX: 2 cycles lost when not taken, 3 when taken.
//
// call_pal 0 halts: when it reaches MEM the younger instructions are
// cancelled, the PC freezes and `halted` rises; older instructions complete.
//
// Integer multiply (mulq) runs in an 8-stage multiplier (mul_unit) beside
// EX: instructions issue in order but a multiply completes out of order,
// 8 cycles in execute, then MEM and WB. An instruction in ID waits while it
// reads or writes a register a multiply in flight will write, or while it
// would reach MEM together with a finished multiply.
//
// Exceptions are precise and are taken in MEM (exc_unit): an illegal
// instruction, call_pal with a nonzero function, overflow of addq/v or
// subq/v, or the irq input while interrupts are enabled. The instruction in
// MEM and the three younger ones are cancelled, EXC_ADDR and EXC_SUM are set,
// the processor enters kernel mode with interrupts disabled and fetches from
// EXC_VECTOR. rei returns to EXC_ADDR in user mode.
//
// Interface: the program is written through the imem_* port and data
// through the dmem_* host port, both while rst is held or after halt.
// dbg_reg reads a register. The ev_* outputs pulse for one cycle per event
// so that a test bench can count stalls, forwards and cancellations; retire
// pulses for each instruction that leaves WB.
module alpha_pipe
  import alpha_pkg::*;
#(
  parameter bit          FORWARDING   = 1'b1,
  parameter bit          BRANCH_STALL = 1'b0,
  parameter int unsigned IMEM_WORDS   = 1024,
  parameter int unsigned DMEM_WORDS   = 1024,
  parameter logic [63:0] RESET_PC     = 64'h0,
  parameter logic [63:0] EXC_VECTOR   = 64'h0000_0000_0000_0800,
  localparam int unsigned IAW = $clog2(IMEM_WORDS),
  localparam int unsigned DAW = $clog2(DMEM_WORDS)
) (
  input  logic           clk,
  input  logic           rst,
  // program load
  input  logic           imem_we,
  input  logic [IAW-1:0] imem_waddr,
  input  logic [31:0]    imem_wdata,
  // data memory host port
  input  logic           dmem_we,
  input  logic [DAW-1:0] dmem_addr,
  input  logic [63:0]    dmem_wdata,
  output logic [63:0]    dmem_rdata,
  // register observation
  input  logic [4:0]     dbg_reg,
  output logic [63:0]    dbg_reg_data,
  // external interrupt request and exception status
  input  logic           irq,
  output logic [63:0]    exc_addr,
  output logic [2:0]     exc_sum,
  output logic           kernel_mode,
  output logic           int_enable,
  // status and events
  output logic           halted,
  output logic [63:0]    pc_out,
  output logic           retire,
  output logic           ev_data_stall,
  output logic           ev_branch_stall,
  output logic           ev_taken,
  output logic           ev_not_taken,
  output logic           ev_fwd_exex,
  output logic           ev_fwd_memex,
  output logic           ev_fwd_memmem,
  output logic           ev_exception,
  output logic           ev_mul_stall,
  output logic           ev_mul_done,
  output logic [1:0]     ev_cancelled     // younger valid instructions cancelled (IF, ID, EX)
);

  localparam int unsigned W_IFID  = $bits(if_id_t);
  localparam int unsigned W_IDEX  = $bits(id_ex_t);
  localparam int unsigned W_EXMEM = $bits(ex_mem_t);
  localparam int unsigned W_MEMWB = $bits(mem_wb_t);

  // ---------------- pipeline registers ----------------
  if_id_t  if_id_d,  if_id_q;
  id_ex_t  id_ex_d,  id_ex_q;
  ex_mem_t ex_mem_d, ex_mem_q;
  mem_wb_t mem_wb_d, mem_wb_q;
  pr_ctl_e if_id_ctl, id_ex_ctl, ex_mem_ctl, mem_wb_ctl;

  pipe_reg #(.W(W_IFID))  u_if_id  (.clk, .rst, .ctl(if_id_ctl),  .d(if_id_d),  .q(if_id_q));
  pipe_reg #(.W(W_IDEX))  u_id_ex  (.clk, .rst, .ctl(id_ex_ctl),  .d(id_ex_d),  .q(id_ex_q));
  pipe_reg #(.W(W_EXMEM)) u_ex_mem (.clk, .rst, .ctl(ex_mem_ctl), .d(ex_mem_d), .q(ex_mem_q));
  pipe_reg #(.W(W_MEMWB)) u_mem_wb (.clk, .rst, .ctl(mem_wb_ctl), .d(mem_wb_d), .q(mem_wb_q));

  // ---------------- IF ----------------
  word_t       pc;
  logic [31:0] instr;
  logic        pc_stall, pc_redirect, mem_redirect;
  logic        exc_take, exc_rei;
  word_t       exc_target;

  imem #(.WORDS(IMEM_WORDS)) u_imem (
    .clk, .pc, .instr,
    .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      pc     <= RESET_PC;
      halted <= 1'b0;
    end else if (pc_redirect) begin
      if (exc_take || exc_rei)   pc     <= exc_target;
      else if (ex_mem_q.ctl.halt) halted <= 1'b1;
      else                        pc     <= ex_mem_q.target;
    end else if (!pc_stall && !halted) begin
      pc <= pc + 64'd4;
    end
  end

  always_comb begin
    if_id_d.valid   = !halted;
    if_id_d.ir      = instr;
    if_id_d.incr_pc = pc + 64'd4;
  end
  assign pc_out = pc;

  // ---------------- ID ----------------
  ctrl_t id_ctl;
  word_t id_imm16, id_lit8, id_disp, rf_a, rf_b;

  decoder u_dec (
    .valid(if_id_q.valid), .ir(if_id_q.ir),
    .ctl(id_ctl), .imm16(id_imm16), .lit8(id_lit8), .disp(id_disp)
  );

  reg_file u_rf (
    .clk, .rst,
    .regA(id_ctl.asrc), .regB(id_ctl.bsrc), .datA(rf_a), .datB(rf_b),
    .wen(mem_wb_q.wen), .regW(mem_wb_q.wdst), .datW(mem_wb_q.result),
    .regD(dbg_reg), .datD(dbg_reg_data)
  );

  always_comb begin
    id_ex_d.ctl     = id_ctl;
    id_ex_d.adat    = rf_a;
    id_ex_d.bdat    = rf_b;
    id_ex_d.imm16   = id_imm16;
    id_ex_d.lit8    = id_lit8;
    id_ex_d.disp    = id_disp;
    id_ex_d.incr_pc = if_id_q.incr_pc;
  end

  // ---------------- EX ----------------
  fwd_sel_e sel_a, sel_b;
  logic     mem_mem;
  word_t    fa, fb, alu_a, alu_b, alu_y, br_target;
  logic     alu_wr_ok, alu_ovf, br_taken;

  fwd_unit u_fwd (
    .ex_valid(id_ex_q.ctl.valid), .ex_asrc(id_ex_q.ctl.asrc), .ex_bsrc(id_ex_q.ctl.bsrc),
    .mem_wen(ex_mem_q.ctl.wen), .mem_is_load(ex_mem_q.ctl.mem_rd), .mem_wdst(ex_mem_q.ctl.wdst),
    .mem_is_store(ex_mem_q.ctl.mem_wr), .mem_asrc(ex_mem_q.ctl.asrc),
    .wb_wen(mem_wb_q.wen), .wb_is_load(mem_wb_q.is_load), .wb_wdst(mem_wb_q.wdst),
    .sel_a, .sel_b, .mem_mem
  );

  function automatic word_t fwd_mux(input fwd_sel_e s, input word_t reg_v,
                                    input word_t exex_v, input word_t memex_v);
    unique case (s)
      FW_EXEX:  return exex_v;
      FW_MEMEX: return memex_v;
      default:  return reg_v;
    endcase
  endfunction

  always_comb begin
    if (FORWARDING) begin
      fa = fwd_mux(sel_a, id_ex_q.adat, ex_mem_q.alu_out, mem_wb_q.result);
      fb = fwd_mux(sel_b, id_ex_q.bdat, ex_mem_q.alu_out, mem_wb_q.result);
    end else begin
      fa = id_ex_q.adat;
      fb = id_ex_q.bdat;
    end
    alu_a = id_ex_q.ctl.a_is_imm ? id_ex_q.imm16 : fa;
    alu_b = id_ex_q.ctl.b_is_imm ? id_ex_q.lit8 :
            id_ex_q.ctl.b_is_pc  ? id_ex_q.incr_pc : fb;
  end

  alu u_alu (.op(id_ex_q.ctl.alu_op), .a(alu_a), .b(alu_b),
             .y(alu_y), .wr_ok(alu_wr_ok), .ovf(alu_ovf));

  branch_unit u_br (.br(id_ex_q.ctl.br), .a(fa), .b(fb), .incr_pc(id_ex_q.incr_pc),
                    .disp(id_ex_q.disp), .taken(br_taken), .target(br_target));

  always_comb begin
    ex_mem_d.ctl     = id_ex_q.ctl;
    // cmoveq with A != 0 writes nothing; a multiply writes through mul_unit
    ex_mem_d.ctl.wen = id_ex_q.ctl.wen && alu_wr_ok && !id_ex_q.ctl.is_mul;
    ex_mem_d.alu_out = alu_y;
    ex_mem_d.adata   = fa;
    ex_mem_d.taken   = id_ex_q.ctl.valid && br_taken;
    ex_mem_d.target  = br_target;
    ex_mem_d.ovf     = id_ex_q.ctl.trapv && alu_ovf;
    ex_mem_d.incr_pc = id_ex_q.incr_pc;
  end

  // ---------------- multiplier (EX1..EX8) ----------------
  logic     mul_hit, mul_slot, mul_done;
  reg_idx_t mul_wdst;
  word_t    mul_prod;

  mul_unit u_mul (
    .clk, .rst,
    .issue(id_ex_q.ctl.valid && id_ex_q.ctl.is_mul && !mem_redirect),
    .a(fa), .b(alu_b), .wdst(id_ex_q.ctl.wdst),
    .kill1(exc_take && ex_mem_q.ctl.is_mul),
    .q_a(id_ctl.asrc), .q_b(id_ctl.bsrc), .q_w(id_ctl.wen ? id_ctl.wdst : RZERO),
    .hit(mul_hit), .slot(mul_slot),
    .out_valid(mul_done), .out_wdst(mul_wdst), .out_prod(mul_prod)
  );

  // ---------------- MEM ----------------
  word_t mem_rdata, st_data;

  assign st_data = (FORWARDING && mem_mem) ? mem_wb_q.result : ex_mem_q.adata;

  dmem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .addr(ex_mem_q.alu_out),
    .rd(ex_mem_q.ctl.mem_rd), .rdata(mem_rdata),
    .wr(ex_mem_q.ctl.mem_wr && !exc_take), .wdata(st_data),
    .h_we(dmem_we), .h_addr(dmem_addr), .h_wdata(dmem_wdata), .h_rdata(dmem_rdata)
  );

  exc_cause_e exc_sum_e;

  exc_unit #(.VECTOR(EXC_VECTOR)) u_exc (
    .clk, .rst,
    .mem_valid(ex_mem_q.ctl.valid), .mem_incr_pc(ex_mem_q.incr_pc),
    .mem_illegal(ex_mem_q.ctl.illegal), .mem_callpal(ex_mem_q.ctl.callpal),
    .mem_ovf(ex_mem_q.ovf), .mem_rei(ex_mem_q.ctl.rei), .irq,
    .take(exc_take), .rei_now(exc_rei), .target(exc_target),
    .exc_addr, .exc_sum(exc_sum_e), .kernel(kernel_mode), .int_en(int_enable)
  );
  assign exc_sum = exc_sum_e;

  assign mem_redirect = ex_mem_q.ctl.valid &&
                        (ex_mem_q.taken || ex_mem_q.ctl.halt || exc_take || exc_rei);

  // A finished multiply takes the MEM slot, which the hazard unit has kept
  // free of other instructions; it writes its register but does not retire
  // again (its instruction already passed through the pipeline).
  always_comb begin
    if (mul_done) begin
      mem_wb_d.valid   = 1'b0;
      mem_wb_d.wen     = (mul_wdst != RZERO);
      mem_wb_d.is_load = 1'b0;
      mem_wb_d.wdst    = mul_wdst;
      mem_wb_d.result  = mul_prod;
    end else begin
      mem_wb_d.valid   = ex_mem_q.ctl.valid;
      mem_wb_d.wen     = ex_mem_q.ctl.wen;
      mem_wb_d.is_load = ex_mem_q.ctl.mem_rd;
      mem_wb_d.wdst    = ex_mem_q.ctl.wdst;
      mem_wb_d.result  = ex_mem_q.ctl.mem_rd ? mem_rdata : ex_mem_q.alu_out;
    end
  end

  // The multiply's MEM slot is never shared with an instruction.
  always_ff @(posedge clk) begin
    if (!rst) assert (!(mul_done && ex_mem_q.ctl.valid))
      else $error("multiply result and an instruction both in MEM");
  end

  // ---------------- WB ----------------
  assign retire = mem_wb_q.valid;

  // ---------------- stall control ----------------
  logic data_stall, mul_stall, branch_stall;

  hazard_unit #(.FORWARDING(FORWARDING), .BRANCH_STALL(BRANCH_STALL)) u_hz (
    .id_valid(id_ctl.valid), .id_asrc(id_ctl.asrc), .id_bsrc(id_ctl.bsrc),
    .id_is_store(id_ctl.mem_wr), .id_is_branch(id_ctl.br != BR_NONE),
    .ex_valid(id_ex_q.ctl.valid), .ex_wen(id_ex_q.ctl.wen), .ex_is_load(id_ex_q.ctl.mem_rd),
    .ex_wdst(id_ex_q.ctl.wdst), .ex_is_branch(id_ex_q.ctl.br != BR_NONE),
    .mem_wen(ex_mem_q.ctl.wen), .mem_wdst(ex_mem_q.ctl.wdst),
    .mem_redirect, .mem_kill(exc_take),
    .mul_hazard(id_ctl.valid && (mul_hit || mul_slot)),
    .pc_stall, .pc_redirect,
    .if_id_ctl, .id_ex_ctl, .ex_mem_ctl, .mem_wb_ctl,
    .data_stall, .mul_stall, .branch_stall
  );

  // ---------------- event outputs ----------------
  always_comb begin
    ev_data_stall   = data_stall;
    ev_branch_stall = branch_stall;
    ev_taken        = ex_mem_q.ctl.valid && ex_mem_q.ctl.br != BR_NONE && ex_mem_q.taken &&
                      !exc_take;
    ev_not_taken    = ex_mem_q.ctl.valid && ex_mem_q.ctl.br != BR_NONE && !ex_mem_q.taken &&
                      !exc_take;
    ev_exception    = exc_take;
    ev_mul_stall    = mul_stall;
    ev_mul_done     = mul_done;
    ev_fwd_exex     = FORWARDING && id_ex_q.ctl.valid &&
                      (sel_a == FW_EXEX || sel_b == FW_EXEX);
    ev_fwd_memex    = FORWARDING && id_ex_q.ctl.valid &&
                      (sel_a == FW_MEMEX || sel_b == FW_MEMEX);
    ev_fwd_memmem   = FORWARDING && mem_mem;
    ev_cancelled    = mem_redirect ? 2'(!halted) + 2'(if_id_q.valid) + 2'(id_ex_q.ctl.valid) : 2'd0;
  end

endmodule
