// alpha_pipe_exc_tb: precise exceptions and interrupts of the pipeline, at its
// default configuration.
//
// The common handler sits at the exception vector 0x800. Directed tests:
//   - addq/v overflowing: the result is not written, EXC_ADDR is the next
//     instruction, EXC_SUM says overflow, the handler runs in kernel mode
//     with interrupts off and rei resumes after the faulting instruction;
//   - call_pal with a nonzero function: same, cause call_pal;
//   - an illegal instruction: EXC_ADDR is its own address, the instructions
//     after it leave no trace, the handler halts;
//   - an overflow right behind a store, and a store right behind the
//     overflow: the older store happens, the younger one does not.
// Random programs are then run while the irq input is raised at random
// times. The handler counts interrupts in r20 and returns with rei, which
// re-executes the interrupted instruction. All other registers and the data
// memory must match the reference model run without interrupts, r20 must
// equal the number of interrupts taken, and every instruction must retire
// exactly once (plus the two handler instructions per interrupt).
module alpha_pipe_exc_tb;
  import alpha_tb_pkg::*;

  localparam int unsigned IW    = 1024;
  localparam int unsigned DW    = 1024;
  localparam int          NRAND = 60;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic        dmem_we = 1'b0;
  logic [9:0]  dmem_addr = '0;
  logic [63:0] dmem_wdata = '0, dmem_rdata;
  logic [4:0]  dbg_reg = '0;
  logic [63:0] dbg_reg_data, pc_out;
  logic        halted, retire;
  logic        ev_data_stall, ev_branch_stall, ev_taken, ev_not_taken;
  logic        ev_fwd_exex, ev_fwd_memex, ev_fwd_memmem, ev_exception;
  logic        ev_mul_stall, ev_mul_done;
  logic [1:0]  ev_cancelled;
  logic        irq = 1'b0;
  logic [63:0] exc_addr;
  logic [2:0]  exc_sum;
  logic        kernel_mode, int_enable;

  alpha_pipe dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_exc = 0, n_retire = 0, n_kernel = 0, t_int = 0, t_exc = 0;
  bit irq_random = 1'b0;
  int unsigned irq_gap;

  always @(posedge clk) if (!rst) begin
    n_exc    += int'(ev_exception);
    n_retire += int'(retire);
    n_kernel += int'(kernel_mode);
    if (kernel_mode) check(!int_enable, "interrupts disabled in kernel mode");
  end

  // Random interrupt requests: raise irq, hold it until the processor
  // enters kernel mode, then wait a random time.
  always @(negedge clk) begin
    if (rst || !irq_random) begin
      irq <= 1'b0;
      irq_gap <= $urandom_range(40, 5);
    end else if (irq && kernel_mode) begin
      irq <= 1'b0;
      irq_gap <= $urandom_range(40, 5);
    end else if (!irq) begin
      if (irq_gap == 0) irq <= 1'b1;
      else              irq_gap <= irq_gap - 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] dinit(int i);
    return (i == 0) ? 64'h7fff_ffff_ffff_fff0 : 64'(i * 8 + 3);
  endfunction

  // Run a program (handler included) to halt; compare all registers but
  // skip_reg and the whole data memory with the reference model.
  task automatic run_prog(input logic [31:0] prog[], input string name,
                          input int skip_reg, output alpha_iss iss);
    int cyc;
    bit ok;
    iss = new(DW);
    for (int i = 0; i < int'(DW); i++) iss.m[i] = dinit(i);
    ok = iss.run(prog, 100000);
    check(ok, {name, ": reference model halts"});

    rst = 1'b1;
    @(negedge clk);
    for (int i = 0; i < int'(IW); i++) begin
      imem_we = 1'b1; imem_waddr = 10'(i);
      imem_wdata = (i < prog.size()) ? prog[i] : HALT;
      dmem_we = 1'b1; dmem_addr = 10'(i); dmem_wdata = dinit(i);
      @(negedge clk);
    end
    imem_we = 1'b0; dmem_we = 1'b0;
    @(negedge clk);
    n_exc = 0; n_retire = 0; n_kernel = 0;
    rst = 1'b0;
    cyc = 0;
    while (!halted && cyc < 20000) begin
      @(negedge clk);
      cyc++;
    end
    check(halted, {name, ": pipeline halts"});
    repeat (12) @(negedge clk);   // multiplies still in flight complete
    for (int i = 0; i < 32; i++) begin
      dbg_reg = 5'(i);
      #1;
      if (i != skip_reg)
        check(dbg_reg_data == iss.rd(i),
              $sformatf("%s: r%0d = %h, expected %h", name, i, dbg_reg_data, iss.rd(i)));
    end
    for (int i = 0; i < int'(DW); i++) begin
      dmem_addr = 10'(i);
      #1;
      if (dmem_rdata != iss.m[i] || i == 0)
        check(dmem_rdata == iss.m[i],
              $sformatf("%s: mem[%0d] = %h, expected %h", name, i, dmem_rdata, iss.m[i]));
    end
    t_exc += n_exc;
  endtask

  // Program image: code at 0, handler at the vector.
  function automatic void image(ref logic [31:0] p[], input logic [31:0] code[$],
                                input logic [31:0] handler[$]);
    p = new[IW];
    foreach (p[i]) p[i] = HALT;
    foreach (code[i]) p[i] = code[i];
    for (int i = 0; i < handler.size(); i++) begin
      int          k = 512 + i;    // word index of the vector 0x800
      logic [31:0] w = handler[i];
      p[k] = w;
    end
  endfunction

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[];
    logic [31:0] count_rei[$] = '{ri(INTA, ADDQ, 20, 1, 20), REI};
    alpha_iss    iss;

    // Overflow: r1 = 0x7fff...fff0, addq/v r1, 0x20 overflows.
    image(p, '{mem(LDQ, 1, 31, 0), ri(INTA, ADDQV, 1, 8'h20, 3),
               ri(INTA, ADDQ, 31, 7, 4), HALT}, count_rei);
    run_prog(p, "overflow", -1, iss);
    check(iss.exceptions == 1 && iss.rd(3) == 0 && iss.rd(4) == 7 && iss.rd(20) == 1,
          "overflow: model result");
    check(n_exc == 1, $sformatf("overflow: %0d exceptions taken", n_exc));
    check(exc_addr == 64'h8, $sformatf("overflow: EXC_ADDR %h", exc_addr));
    check(exc_sum == 3'd2, $sformatf("overflow: EXC_SUM %0d", exc_sum));
    check(n_kernel == 5, $sformatf("overflow: %0d cycles in kernel mode", n_kernel));
    check(!kernel_mode && int_enable, "overflow: user mode after rei");
    check(n_retire == int'(iss.executed) - 1,
          $sformatf("overflow: retired %0d, expected %0d", n_retire, iss.executed - 1));

    // subq/v without overflow behaves as subq.
    image(p, '{ri(INTA, ADDQ, 31, 9, 1), ri(INTA, SUBQV, 1, 4, 3), HALT}, count_rei);
    run_prog(p, "subq/v", -1, iss);
    check(n_exc == 0 && iss.rd(3) == 5, "subq/v: no exception");

    // call_pal with function 0x83.
    image(p, '{ri(INTA, ADDQ, 31, 1, 1), {6'h00, 26'h83}, ri(INTA, ADDQ, 31, 2, 2), HALT},
          count_rei);
    run_prog(p, "call_pal", -1, iss);
    check(n_exc == 1 && exc_addr == 64'h8 && exc_sum == 3'd1,
          $sformatf("call_pal: %0d exceptions, EXC_ADDR %h, EXC_SUM %0d", n_exc, exc_addr, exc_sum));
    check(iss.rd(2) == 2 && iss.rd(20) == 1, "call_pal: model result");

    // Illegal instruction at 0x8; what follows must leave no trace.
    image(p, '{ri(INTA, ADDQ, 31, 1, 1), mem(STQ, 1, 31, 16), {6'h01, 26'h0},
               ri(INTA, ADDQ, 31, 2, 2), mem(STQ, 1, 31, 24), HALT},
          '{ri(INTA, ADDQ, 31, 9, 9), HALT});
    run_prog(p, "illegal", -1, iss);
    check(n_exc == 1 && exc_addr == 64'h8 && exc_sum == 3'd3,
          $sformatf("illegal: %0d exceptions, EXC_ADDR %h, EXC_SUM %0d", n_exc, exc_addr, exc_sum));
    check(iss.rd(2) == 0 && iss.rd(9) == 9 && iss.m[2] == 64'd1 && iss.m[3] == dinit(3),
          "illegal: model result");
    check(kernel_mode, "illegal: handler halted in kernel mode");

    // Overflow between two stores.
    image(p, '{mem(LDQ, 1, 31, 0), ri(INTA, ADDQ, 31, 5, 2), mem(STQ, 2, 31, 8),
               ri(INTA, ADDQV, 1, 8'hff, 3), mem(STQ, 2, 31, 16), HALT},
          '{ri(INTA, ADDQ, 20, 1, 20), HALT});
    run_prog(p, "store order", -1, iss);
    check(iss.m[1] == 64'd5 && iss.m[2] == dinit(2), "store order: model result");

    // Random programs under random interrupts.
    irq_random = 1'b1;
    for (int t = 0; t < NRAND; t++) begin
      logic [31:0] body[];
      logic [31:0] code[$];
      gen_random(body, 60);
      code = body;
      image(p, code, count_rei);
      run_prog(p, $sformatf("interrupts %0d", t), 20, iss);
      dbg_reg = 5'd20;
      #1;
      check(dbg_reg_data == 64'(n_exc),
            $sformatf("interrupts %0d: r20 = %0d, %0d taken", t, dbg_reg_data, n_exc));
      check(n_retire == int'(iss.executed) + 2 * n_exc,
            $sformatf("interrupts %0d: retired %0d, expected %0d", t, n_retire,
                      int'(iss.executed) + 2 * n_exc));
      t_int += n_exc;
    end
    irq_random = 1'b0;
    check(t_int > 0, $sformatf("interrupts taken: %0d", t_int));
    $display("exceptions taken: %0d (interrupts %0d)", t_exc, t_int);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
