// alpha_tb_pkg: test bench support for the Alpha-subset pipeline.
//
// Instruction encoders, a sequential instruction-set reference model (one
// instruction at a time, no pipeline) and a generator of random programs.
// The reference model is written from the instruction definitions alone, so
// the pipeline's results can be checked against it independently.
package alpha_tb_pkg;

  // ---------------- encoders ----------------
  function automatic logic [31:0] rr(input logic [5:0] op, input logic [6:0] fn,
                                     input int ra, input int rb, input int rc);
    return {op, 5'(ra), 5'(rb), 3'b000, 1'b0, fn, 5'(rc)};
  endfunction

  function automatic logic [31:0] ri(input logic [5:0] op, input logic [6:0] fn,
                                     input int ra, input int lit, input int rc);
    return {op, 5'(ra), 8'(lit), 1'b1, fn, 5'(rc)};
  endfunction

  function automatic logic [31:0] mem(input logic [5:0] op, input int ra, input int rb,
                                      input int off);
    return {op, 5'(ra), 5'(rb), 16'(off)};
  endfunction

  function automatic logic [31:0] bra(input logic [5:0] op, input int ra, input int disp);
    return {op, 5'(ra), 21'(disp)};
  endfunction

  function automatic logic [31:0] jmp(input int ra, input int rb);
    return {6'h1A, 5'(ra), 5'(rb), 16'h0000};
  endfunction

  localparam logic [31:0] HALT = 32'h0000_0000;
  localparam logic [31:0] NOP  = 32'h47ff_041f;   // bis r31, r31, r31

  // common opcodes / functions
  localparam logic [5:0] INTA = 6'h10, INTL = 6'h11, LDQ = 6'h29, STQ = 6'h2D,
                         BEQ = 6'h39, BNE = 6'h3D, BR = 6'h30, BSR = 6'h34,
                         INTM = 6'h13;
  localparam logic [6:0] ADDQ = 7'h20, SUBQ = 7'h29, CMPLT = 7'h4D,
                         BIS = 7'h20, XOR = 7'h40, CMOVEQ = 7'h24,
                         ADDQV = 7'h60, SUBQV = 7'h69, MULQ = 7'h20;
  localparam logic [5:0] REI_OP = 6'h1E;
  localparam logic [31:0] REI = {REI_OP, 26'd0};
  localparam logic [63:0] VECTOR = 64'h800;   // exception handler address

  // ---------------- reference model ----------------
  class alpha_iss;
    logic [63:0] r[32];
    logic [63:0] m[];
    int unsigned dwords;
    int unsigned executed;
    int unsigned taken;
    int unsigned not_taken;
    int unsigned exceptions;
    int unsigned muls;          // multiplies executed
    logic [63:0] exc_addr;
    int unsigned last_cause;    // 1 call_pal, 2 overflow, 3 illegal

    function new(int unsigned dmem_words);
      dwords = dmem_words;
      m = new[dmem_words];
      foreach (r[i]) r[i] = '0;
      foreach (m[i]) m[i] = '0;
      executed = 0; taken = 0; not_taken = 0; exceptions = 0; muls = 0;
      exc_addr = '0; last_cause = 0;
    endfunction

    function logic [63:0] rd(int i);
      return (i == 31) ? 64'd0 : r[i];
    endfunction

    function void wr(int i, logic [63:0] v);
      if (i != 31) r[i] = v;
    endfunction

    // Run until halt or max_steps; returns 1 when the program halted.
    function bit run(logic [31:0] prog[], int unsigned max_steps);
      logic [63:0] pc = 0;
      for (int unsigned s = 0; s < max_steps; s++) begin
        logic [31:0] ir;
        logic [5:0]  op;
        int          ra, rb, rc;
        logic [6:0]  fn;
        logic [63:0] a, b, y, npc, addr;
        int unsigned idx, midx;
        idx = int'(pc[31:2]) % prog.size();
        ir  = prog[idx];
        op  = ir[31:26]; ra = int'(ir[25:21]); rb = int'(ir[20:16]); rc = int'(ir[4:0]);
        fn  = ir[11:5];
        npc = pc + 4;
        executed++;
        if (ir == HALT) return 1'b1;
        a = rd(ra);
        b = ir[12] ? {56'd0, ir[20:13]} : rd(rb);
        case (op)
          INTA: case (fn)
                  ADDQ:  wr(rc, a + b);
                  SUBQ:  wr(rc, a - b);
                  CMPLT: wr(rc, ($signed(a) < $signed(b)) ? 64'd1 : 64'd0);
                  ADDQV, SUBQV: begin
                    logic signed [64:0] wide;
                    wide = (fn == ADDQV) ? $signed({a[63], a}) + $signed({b[63], b})
                                         : $signed({a[63], a}) - $signed({b[63], b});
                    if (wide[64] != wide[63]) begin
                      trap(2, npc, npc);
                    end else begin
                      wr(rc, wide[63:0]);
                    end
                  end
                  default: trap(3, pc, npc);
                endcase
          INTL: case (fn)
                  BIS:    wr(rc, a | b);
                  XOR:    wr(rc, a ^ b);
                  CMOVEQ: if (a == 0) wr(rc, b);
                  default: trap(3, pc, npc);
                endcase
          INTM: if (fn == MULQ) begin
                  wr(rc, a * b);
                  muls++;
                end else begin
                  trap(3, pc, npc);
                end
          6'h00: trap(1, npc, npc);    // call_pal with a nonzero function
          REI_OP: npc = exc_addr;
          LDQ: begin
            addr = rd(rb) + {{48{ir[15]}}, ir[15:0]};
            midx = int'(addr[34:3]) % dwords;
            wr(ra, m[midx]);
          end
          STQ: begin
            addr = rd(rb) + {{48{ir[15]}}, ir[15:0]};
            midx = int'(addr[34:3]) % dwords;
            y = rd(ra);
            m[midx] = y;
          end
          BEQ, BNE: begin
            if ((op == BEQ) == (rd(ra) == 0)) begin
              npc = npc + ({{43{ir[20]}}, ir[20:0]} << 2);
              taken++;
            end else begin
              not_taken++;
            end
          end
          BR, BSR: begin
            wr(ra, npc);
            npc = npc + ({{43{ir[20]}}, ir[20:0]} << 2);
            taken++;
          end
          6'h1A: begin
            y = rd(rb);
            wr(ra, npc);
            npc = {y[63:2], 2'b00};
            taken++;
          end
          default: trap(3, pc, npc);
        endcase
        pc = npc;
      end
      return 1'b0;
    endfunction

    // Take an exception: record cause and address, continue at the handler.
    function void trap(int unsigned cause, logic [63:0] addr, ref logic [63:0] npc);
      exceptions++;
      last_cause = cause;
      exc_addr   = addr;
      npc        = VECTOR;
    endfunction
  endclass

  // ---------------- random programs ----------------
  // n random instructions over registers r1..r8 (and r31), forward branches
  // only, followed by halts. Starts by giving every register a value.
  function automatic void gen_random(ref logic [31:0] prog[], input int n);
    int k = 0;
    prog = new[n + 16];
    for (int i = 1; i <= 8; i++) prog[k++] = ri(INTA, ADDQ, 31, $urandom_range(255), i);
    while (k < n + 8) begin
      int ra = pick_reg(), rb = pick_reg(), rc = pick_reg();
      int kind = $urandom_range(99);
      if (kind < 40) begin
        logic [6:0] fns[6] = '{ADDQ, SUBQ, CMPLT, BIS, XOR, CMOVEQ};
        logic [5:0] ops[6] = '{INTA, INTA, INTA, INTL, INTL, INTL};
        int f = $urandom_range(5);
        if ($urandom_range(1)) prog[k++] = rr(ops[f], fns[f], ra, rb, rc);
        else                   prog[k++] = ri(ops[f], fns[f], ra, $urandom_range(255), rc);
      end else if (kind < 46) begin
        if ($urandom_range(1)) prog[k++] = rr(INTM, MULQ, ra, rb, rc);
        else                   prog[k++] = ri(INTM, MULQ, ra, $urandom_range(255), rc);
      end else if (kind < 60) begin
        prog[k++] = mem(LDQ, ra, $urandom_range(1) ? 31 : rb, 8 * $urandom_range(31));
      end else if (kind < 80) begin
        prog[k++] = mem(STQ, ra, $urandom_range(1) ? 31 : rb, 8 * $urandom_range(31));
      end else if (kind < 94) begin
        prog[k++] = bra($urandom_range(1) ? BEQ : BNE, ra, $urandom_range(3));
      end else begin
        prog[k++] = bra($urandom_range(1) ? BR : BSR, rc, $urandom_range(2));
      end
    end
    while (k < n + 16) prog[k++] = HALT;
  endfunction

  function automatic int pick_reg();
    int v = $urandom_range(9);
    return (v == 0) ? 31 : (v == 9 ? 1 : v);
  endfunction

endpackage
