// alpha_pipe_stall_tb: end-to-end test of the pipeline without bypass paths and
// with fetch stalled while a branch is in ID or EX (FORWARDING=0, BRANCH_STALL=1).
//
// Each test loads a program through the instruction-memory port, fills the
// data memory through the host port, releases reset and runs until halt.
// The final register file and data memory are compared with the sequential
// reference model of alpha_tb_pkg. Tests:
//   - the taken-branch and not-taken-branch example programs (beq / bne r31),
//   - a subroutine call and return through bsr and jmp,
//   - the 36 data-hazard cases: 3 writers (RR.rc, RI.rc, L.ra) x 6 readers
//     (RR.ra, RR.rb, RI.ra, L.rb, S.ra, S.rb) x distance 1 and 2, each with the
//     exact number of stall cycles it must cost,
//   - multiplies: a dependent reader at distance 1 and 2, independent
//     instructions completing ahead of the multiply, a younger write to the
//     multiply's destination,
//   - random programs (with multiplies).
// The cycle count of every run is checked: halt is seen n + 3 cycles after
// reset for n executed instructions, plus 3 per taken branch, plus (in the
// branch-stall mode only) 2 per not-taken branch, plus one per data-stall or multiply-stall
// cycle (a multiply stall of a wrong-path instruction costs nothing).
// Every mechanism of the configuration must occur at least once: data
// stalls, multiply stalls, taken and not-taken branches, cancellation, and
// either the three forwarding paths (EX-EX, MEM-EX, MEM-MEM) or, without
// forwarding, none of them; branch stalls exactly when BRANCH_STALL=1.
module alpha_pipe_stall_tb;
  import alpha_tb_pkg::*;

  localparam bit          FWD   = 1'b0;
  localparam bit          BS    = 1'b1;
  localparam int unsigned IW    = 1024;
  localparam int unsigned DW    = 1024;
  localparam int          NRAND = 150;

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
  logic        ev_fwd_exex, ev_fwd_memex, ev_fwd_memmem;
  logic [1:0]  ev_cancelled;
  logic        ev_exception, ev_mul_stall, ev_mul_done;
  logic        irq = 1'b0;
  logic [63:0] exc_addr;
  logic [2:0]  exc_sum;
  logic        kernel_mode, int_enable;

  alpha_pipe #(.FORWARDING(FWD), .BRANCH_STALL(BS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_stall = 0, n_bstall = 0, n_taken = 0, n_nt = 0, n_exex = 0, n_memex = 0,
      n_memmem = 0, n_cancel = 0, n_retire = 0, n_mstall = 0, n_mdone = 0,
      n_mfree = 0;                                                          // per run
  bit prev_mstall = 1'b0;
  int t_stall = 0, t_bstall = 0, t_taken = 0, t_nt = 0, t_exex = 0, t_memex = 0,
      t_memmem = 0, t_cancel = 0, t_mstall = 0, t_mdone = 0;               // totals

  always @(posedge clk) if (!rst) begin
    n_stall  += int'(ev_data_stall);
    n_bstall += int'(ev_branch_stall);
    n_taken  += int'(ev_taken);
    n_nt     += int'(ev_not_taken);
    n_exex   += int'(ev_fwd_exex);
    n_memex  += int'(ev_fwd_memex);
    n_memmem += int'(ev_fwd_memmem);
    n_cancel += int'(ev_cancelled);
    n_retire += int'(retire);
    n_mstall += int'(ev_mul_stall);
    n_mdone  += int'(ev_mul_done);
    // A multiply stall of an instruction that the redirect of the next cycle
    // cancels (it followed a taken branch or the halt) costs no time.
    n_mfree  += int'(prev_mstall && ev_cancelled != 0);
    prev_mstall = ev_mul_stall;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [63:0] dinit(int i);
    return 64'h0101_0000_0000_0000 * 64'(i) + 64'(i * 8 + 3);
  endfunction

  // Load a program and initial data, run to halt, compare with the model.
  // exp_stalls < 0: do not check the number of stall cycles (data stalls
  // plus multiply stalls).
  task automatic run_prog(input logic [31:0] prog[], input string name,
                          input int exp_stalls, output alpha_iss iss);
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
      dmem_we = (i < int'(DW)); dmem_addr = 10'(i); dmem_wdata = dinit(i);
      @(negedge clk);
    end
    imem_we = 1'b0; dmem_we = 1'b0;
    @(negedge clk);
    {n_stall, n_bstall, n_taken, n_nt, n_exex, n_memex, n_memmem, n_cancel, n_retire,
     n_mstall, n_mdone, n_mfree} = '0;
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
    check(n_taken == int'(iss.taken) && n_nt == int'(iss.not_taken),
          $sformatf("%s: branches taken %0d/%0d, not taken %0d/%0d", name,
                    n_taken, iss.taken, n_nt, iss.not_taken));
    // every executed instruction, the halt included, leaves WB
    check(n_retire == int'(iss.executed),
          $sformatf("%s: retired %0d, expected %0d", name, n_retire, iss.executed));
    begin
      int exp_cyc = int'(iss.executed) + 3 + n_stall + n_mstall - n_mfree +
                    (BS ? 2 * int'(iss.taken + iss.not_taken) + int'(iss.taken)
                        : 3 * int'(iss.taken));
      check(cyc == exp_cyc, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cyc));
    end
    check(n_mdone == int'(iss.muls),
          $sformatf("%s: %0d multiplies completed, expected %0d", name, n_mdone, iss.muls));
    if (exp_stalls >= 0)
      check(n_stall + n_mstall == exp_stalls,
            $sformatf("%s: %0d + %0d stall cycles, expected %0d", name, n_stall, n_mstall,
                      exp_stalls));
    t_mstall += n_mstall; t_mdone += n_mdone;
    t_stall += n_stall; t_bstall += n_bstall; t_taken += n_taken; t_nt += n_nt;
    t_exex += n_exex; t_memex += n_memex; t_memmem += n_memmem; t_cancel += n_cancel;
  endtask

  // watchdog
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[];
    alpha_iss    iss;

    // Taken branch example: beq r31 at 0x0 skips to 0x18.
    p = '{32'he7e00005, 32'h43e7f401, 32'h43e7f402, 32'h43e7f403, 32'h43e7f404,
          32'h47ff041f, 32'h43e7f405, 32'h47ff041f, 32'h00000000};
    run_prog(p, "taken branch", 0, iss);
    check(iss.rd(5) == 64'd63 && iss.rd(1) == 0, "taken branch: model result");
    check(n_cancel == (BS ? 1 : 3) + 3,   // the branch's, then the halt's
          $sformatf("taken branch: %0d instructions cancelled", n_cancel));

    // Not-taken branch example: bne r31 falls through.
    p = '{bra(BNE, 31, 5), 32'h43e7f401, 32'h43e7f402, 32'h43e7f403, 32'h43e7f404, HALT};
    run_prog(p, "not-taken branch", 0, iss);
    check(iss.rd(4) == 64'd63, "not-taken branch: model result");

    // Subroutine call and return.
    p = '{bra(BSR, 26, 2), ri(INTA, ADDQ, 31, 1, 9), HALT,
          ri(INTA, ADDQ, 31, 5, 10), jmp(31, 26), HALT};
    run_prog(p, "bsr/jmp", 0, iss);
    check(iss.rd(9) == 1 && iss.rd(10) == 5 && iss.rd(26) == 4, "bsr/jmp: model result");

    // Stalling example: addq then four dependent readers of $2.
    p = '{ri(INTA, ADDQ, 31, 63, 2), ri(INTA, ADDQ, 2, 0, 3), ri(INTA, ADDQ, 2, 0, 4),
          ri(INTA, ADDQ, 2, 0, 5), ri(INTA, ADDQ, 2, 0, 6), HALT};
    run_prog(p, "addq chain", FWD ? 0 : 2, iss);

    // Multiply: a dependent reader right behind it waits until the product is
    // in WB (9 cycles), one instruction later 8; independent instructions
    // pass it, except the one that would meet its result in MEM (1 cycle).
    for (int d = 1; d <= 3; d++) begin
      logic [31:0] q[$];
      q.delete();
      q.push_back(ri(INTA, ADDQ, 31, 200, 2));
      q.push_back(ri(INTA, SUBQ, 31, 3, 3));
      q.push_back(NOP);
      q.push_back(NOP);
      q.push_back(rr(INTM, MULQ, 2, 3, 1));
      if (d == 3) begin
        for (int i = 0; i < 8; i++) q.push_back(ri(INTA, ADDQ, 2, i, 4 + i % 4));
        q.push_back(ri(INTM, MULQ, 1, 5, 9));
      end else begin
        if (d == 2) q.push_back(NOP);
        q.push_back(rr(INTA, ADDQ, 1, 2, 4));
      end
      q.push_back(HALT);
      p = q;
      run_prog(p, $sformatf("mulq reader %0d", d), (d == 1) ? 9 : (d == 2) ? 8 : 1, iss);
      check(iss.rd(1) == 64'hffff_ffff_ffff_fda8, "mulq: model result");
    end
    p = '{ri(INTA, ADDQ, 31, 9, 1), ri(INTM, MULQ, 1, 3, 2), ri(INTA, ADDQ, 31, 4, 2),
          ri(INTM, MULQ, 1, 5, 31), HALT};
    run_prog(p, "mulq then a younger write", -1, iss);
    check(iss.rd(2) == 4, "mulq then a younger write: model result");

    // The 36 data-hazard cases.
    for (int w = 0; w < 3; w++)
      for (int rdr = 0; rdr < 6; rdr++)
        for (int d = 1; d <= 2; d++) begin
          string wn[3] = '{"RR.rc", "RI.rc", "L.ra"};
          string rn[6] = '{"RR.ra", "RR.rb", "RI.ra", "L.rb", "S.ra", "S.rb"};
          logic [31:0] q[$];
          int exp;
          q.delete();
          q.push_back(ri(INTA, ADDQ, 31, 40, 2));
          q.push_back(ri(INTA, ADDQ, 31, 3, 3));
          q.push_back(NOP);
          q.push_back(NOP);
          case (w)
            0: q.push_back(rr(INTA, ADDQ, 2, 3, 1));
            1: q.push_back(ri(INTA, ADDQ, 2, 7, 1));
            default: q.push_back(mem(LDQ, 1, 31, 8));
          endcase
          if (d == 2) q.push_back(NOP);
          case (rdr)
            0: q.push_back(rr(INTA, ADDQ, 1, 2, 4));
            1: q.push_back(rr(INTA, SUBQ, 2, 1, 4));
            2: q.push_back(ri(INTA, ADDQ, 1, 5, 4));
            3: q.push_back(mem(LDQ, 4, 1, 0));
            4: q.push_back(mem(STQ, 1, 31, 16));
            default: q.push_back(mem(STQ, 2, 1, 0));
          endcase
          q.push_back(HALT);
          if (FWD) exp = (w == 2 && d == 1 && rdr != 4) ? 1 : 0;
          else     exp = (d == 1) ? 2 : 1;
          p = q;
          run_prog(p, $sformatf("hazard %s/%s/%0d", wn[w], rn[rdr], d), exp, iss);
        end

    // Random programs.
    for (int t = 0; t < NRAND; t++) begin
      gen_random(p, 60);
      run_prog(p, $sformatf("random %0d", t), -1, iss);
    end

    // Every mechanism must have happened.
    check(t_stall > 0,  $sformatf("data stalls seen: %0d", t_stall));
    check(t_taken > 0,  $sformatf("taken branches seen: %0d", t_taken));
    check(t_nt > 0,     $sformatf("not-taken branches seen: %0d", t_nt));
    check(t_cancel > 0, $sformatf("cancelled instructions seen: %0d", t_cancel));
    check(t_mstall > 0, $sformatf("multiply stalls seen: %0d", t_mstall));
    check(t_mdone > 0,  $sformatf("multiplies seen: %0d", t_mdone));
    if (FWD) begin
      check(t_exex > 0,   $sformatf("EX-EX forwards seen: %0d", t_exex));
      check(t_memex > 0,  $sformatf("MEM-EX forwards seen: %0d", t_memex));
      check(t_memmem > 0, $sformatf("MEM-MEM forwards seen: %0d", t_memmem));
    end else begin
      check(t_exex + t_memex + t_memmem == 0, "no forwarding without bypass paths");
    end
    if (BS) check(t_bstall > 0, $sformatf("branch stalls seen: %0d", t_bstall));
    else    check(t_bstall == 0, "no branch stalls in predict-not-taken mode");
    $display("events: data_stall=%0d branch_stall=%0d taken=%0d not_taken=%0d exex=%0d memex=%0d memmem=%0d cancelled=%0d mul_stall=%0d mul_done=%0d",
             t_stall, t_bstall, t_taken, t_nt, t_exex, t_memex, t_memmem, t_cancel,
             t_mstall, t_mdone);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
