// branch_cpi_tb: the cost of branches for a typical integer branch mix.
//
// The mix is 16% branches, two thirds of them taken, as is typical of
// integer benchmark programs. A 300-instruction program reproduces it
// exactly: 48 conditional branches (32 taken: beq r31; 16 not taken:
// bne r31) at random places among 252 independent ALU instructions,
// then a halt. A taken branch here jumps to the next instruction, so both
// paths run the same code, but the pipeline still pays the full penalty.
//
// The same program runs on two copies of the pipeline, started together:
//   - predict not taken with cancel (the default): 3 cycles per taken
//     branch, 0 per not-taken branch, so CPI rises by 0.16 * 0.67 * 3 = 0.32;
//   - fetch stalled until the branch resolves (BRANCH_STALL=1): 3 per taken
//     and 2 per not-taken branch, so CPI rises by
//     0.16 * (0.67 * 3 + 0.33 * 2) = 0.43.
// Both must halt after exactly 300 + 1 + 3 cycles plus those penalties,
// must count 32 taken and 16 not-taken branches, and must end with the
// registers of the reference model.
module branch_cpi_tb;
  import alpha_tb_pkg::*;

  localparam int NINSTR = 300;
  localparam int NBR    = 48;
  localparam int NTAKEN = 32;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        imem_we = 1'b0;
  logic [9:0]  imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic        dmem_we = 1'b0;
  logic [9:0]  dmem_addr = '0;
  logic [63:0] dmem_wdata = '0;
  logic [4:0]  dbg_reg = '0;
  logic        irq = 1'b0;

  // per-copy outputs: [0] predict not taken, [1] branch stall
  logic [63:0] dmem_rdata[2], dbg_reg_data[2], pc_out[2], exc_addr[2];
  logic        halted[2], retire[2], kernel_mode[2], int_enable[2];
  logic [2:0]  exc_sum[2];
  logic        ev_data_stall[2], ev_branch_stall[2], ev_taken[2], ev_not_taken[2];
  logic        ev_fwd_exex[2], ev_fwd_memex[2], ev_fwd_memmem[2], ev_exception[2];
  logic        ev_mul_stall[2], ev_mul_done[2];
  logic [1:0]  ev_cancelled[2];

  alpha_pipe #(.BRANCH_STALL(1'b0)) u_pnt (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .dmem_we, .dmem_addr, .dmem_wdata,
    .dmem_rdata(dmem_rdata[0]), .dbg_reg, .dbg_reg_data(dbg_reg_data[0]), .irq,
    .exc_addr(exc_addr[0]), .exc_sum(exc_sum[0]), .kernel_mode(kernel_mode[0]),
    .int_enable(int_enable[0]), .halted(halted[0]), .pc_out(pc_out[0]), .retire(retire[0]),
    .ev_data_stall(ev_data_stall[0]), .ev_branch_stall(ev_branch_stall[0]),
    .ev_taken(ev_taken[0]), .ev_not_taken(ev_not_taken[0]), .ev_fwd_exex(ev_fwd_exex[0]),
    .ev_fwd_memex(ev_fwd_memex[0]), .ev_fwd_memmem(ev_fwd_memmem[0]),
    .ev_exception(ev_exception[0]), .ev_mul_stall(ev_mul_stall[0]),
    .ev_mul_done(ev_mul_done[0]), .ev_cancelled(ev_cancelled[0]));

  alpha_pipe #(.BRANCH_STALL(1'b1)) u_stall (
    .clk, .rst, .imem_we, .imem_waddr, .imem_wdata, .dmem_we, .dmem_addr, .dmem_wdata,
    .dmem_rdata(dmem_rdata[1]), .dbg_reg, .dbg_reg_data(dbg_reg_data[1]), .irq,
    .exc_addr(exc_addr[1]), .exc_sum(exc_sum[1]), .kernel_mode(kernel_mode[1]),
    .int_enable(int_enable[1]), .halted(halted[1]), .pc_out(pc_out[1]), .retire(retire[1]),
    .ev_data_stall(ev_data_stall[1]), .ev_branch_stall(ev_branch_stall[1]),
    .ev_taken(ev_taken[1]), .ev_not_taken(ev_not_taken[1]), .ev_fwd_exex(ev_fwd_exex[1]),
    .ev_fwd_memex(ev_fwd_memex[1]), .ev_fwd_memmem(ev_fwd_memmem[1]),
    .ev_exception(ev_exception[1]), .ev_mul_stall(ev_mul_stall[1]),
    .ev_mul_done(ev_mul_done[1]), .ev_cancelled(ev_cancelled[1]));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_taken[2] = '{0, 0}, n_nt[2] = '{0, 0}, n_stall[2] = '{0, 0};

  always @(posedge clk) if (!rst) begin
    for (int m = 0; m < 2; m++) begin
      n_taken[m] += int'(ev_taken[m]);
      n_nt[m]    += int'(ev_not_taken[m]);
      n_stall[m] += int'(ev_data_stall[m]);
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // watchdog
  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] p[];
    bit          is_br[NINSTR];
    bit          tk[NINSTR];
    int          cyc[2];
    alpha_iss    iss;
    bit          ok;

    // place the branches and choose which are taken
    for (int i = 0; i < NINSTR; i++) begin is_br[i] = 1'b0; tk[i] = 1'b0; end
    for (int b = 0; b < NBR; ) begin
      automatic int pos = $urandom_range(NINSTR - 1);
      if (!is_br[pos]) begin
        is_br[pos] = 1'b1;
        tk[pos]    = (b < NTAKEN);
        b++;
      end
    end
    p = new[NINSTR + 1];
    for (int i = 0; i < NINSTR; i++) begin
      automatic int rc = 1 + i % 8;
      if (is_br[i]) p[i] = bra(tk[i] ? BEQ : BNE, 31, 0);
      else          p[i] = ri(INTA, ADDQ, $urandom_range(1) ? 31 : rc, $urandom_range(255), rc);
    end
    p[NINSTR] = HALT;

    iss = new(1024);
    ok = iss.run(p, 10000);
    check(ok && iss.taken == NTAKEN && iss.not_taken == NBR - NTAKEN, "reference model run");

    for (int i = 0; i < 1024; i++) begin
      imem_we = 1'b1; imem_waddr = 10'(i);
      imem_wdata = (i < p.size()) ? p[i] : HALT;
      dmem_we = 1'b1; dmem_addr = 10'(i); dmem_wdata = '0;
      @(negedge clk);
    end
    imem_we = 1'b0; dmem_we = 1'b0;
    @(negedge clk);
    rst = 1'b0;
    cyc = '{0, 0};
    while (!(halted[0] && halted[1]) && cyc[1] < 5000) begin
      automatic logic was_halted[2] = halted;
      @(negedge clk);
      for (int m = 0; m < 2; m++) if (!was_halted[m]) cyc[m]++;
    end

    for (int m = 0; m < 2; m++) begin
      automatic int    base = NINSTR + 1 + 3;
      automatic int    exp  = base + 3 * NTAKEN + ((m == 1) ? 2 * (NBR - NTAKEN) : 0);
      automatic real   extra_cpi = real'(cyc[m] - base) / real'(NINSTR);
      automatic real   want = (m == 0) ? 0.32 : 0.43;
      automatic string mode = (m == 0) ? "predict not taken" : "branch stall";
      check(halted[m], {mode, ": halts"});
      check(n_taken[m] == NTAKEN && n_nt[m] == NBR - NTAKEN,
            $sformatf("%s: %0d taken, %0d not taken", mode, n_taken[m], n_nt[m]));
      check(n_stall[m] == 0, $sformatf("%s: %0d data stalls", mode, n_stall[m]));
      check(cyc[m] == exp, $sformatf("%s: %0d cycles, expected %0d", mode, cyc[m], exp));
      check(extra_cpi > want - 0.01 && extra_cpi < want + 0.01,
            $sformatf("%s: CPI increase %.3f, expected %.2f", mode, extra_cpi, want));
      $display("%s: %0d instructions, %0d cycles to halt, CPI increase from branches %.3f",
               mode, NINSTR, cyc[m], extra_cpi);
    end
    for (int i = 0; i < 32; i++) begin
      dbg_reg = 5'(i);
      #1;
      for (int m = 0; m < 2; m++)
        check(dbg_reg_data[m] == iss.rd(i),
              $sformatf("copy %0d: r%0d = %h, expected %h", m, i, dbg_reg_data[m], iss.rd(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
