// hazard_unit_tb: random pipeline states applied to the stall control in its
// default mode (forwarding, predict not taken) and in the mode without
// forwarding and with branch stalls, checked against the rules:
//   redirect in MEM: PC loads the target, IF/ID, ID/EX, EX/MEM bubble
//     (MEM/WB too when the MEM instruction is killed by an exception);
//   data stall or multiply stall (data stall first): PC and IF/ID stall,
//   ID/EX bubbles;
//   branch stall: PC stalls, IF/ID bubbles.
// Also checks the textbook cases by name: load-use stalls one cycle with
// forwarding, load to store data does not, and without forwarding a read
// matching a write in EX or MEM stalls.
module hazard_unit_tb;
  import alpha_pkg::*;

  logic     id_valid, id_is_store, id_is_branch, ex_valid, ex_wen, ex_is_load, ex_is_branch;
  logic     mem_wen, mem_redirect, mem_kill, mul_hazard;
  reg_idx_t id_asrc, id_bsrc, ex_wdst, mem_wdst;

  logic     pc_stall[2], pc_redirect[2], data_stall[2], branch_stall[2], mul_stall[2];
  pr_ctl_e  if_id_ctl[2], id_ex_ctl[2], ex_mem_ctl[2], mem_wb_ctl[2];

  hazard_unit u_fwd (
    .id_valid, .id_asrc, .id_bsrc, .id_is_store, .id_is_branch,
    .ex_valid, .ex_wen, .ex_is_load, .ex_wdst, .ex_is_branch,
    .mem_wen, .mem_wdst, .mem_redirect, .mem_kill, .mul_hazard,
    .pc_stall(pc_stall[0]), .pc_redirect(pc_redirect[0]),
    .if_id_ctl(if_id_ctl[0]), .id_ex_ctl(id_ex_ctl[0]), .ex_mem_ctl(ex_mem_ctl[0]),
    .mem_wb_ctl(mem_wb_ctl[0]), .data_stall(data_stall[0]), .branch_stall(branch_stall[0]),
    .mul_stall(mul_stall[0]));

  hazard_unit #(.FORWARDING(1'b0), .BRANCH_STALL(1'b1)) u_stall (
    .id_valid, .id_asrc, .id_bsrc, .id_is_store, .id_is_branch,
    .ex_valid, .ex_wen, .ex_is_load, .ex_wdst, .ex_is_branch,
    .mem_wen, .mem_wdst, .mem_redirect, .mem_kill, .mul_hazard,
    .pc_stall(pc_stall[1]), .pc_redirect(pc_redirect[1]),
    .if_id_ctl(if_id_ctl[1]), .id_ex_ctl(id_ex_ctl[1]), .ex_mem_ctl(ex_mem_ctl[1]),
    .mem_wb_ctl(mem_wb_ctl[1]), .data_stall(data_stall[1]), .branch_stall(branch_stall[1]),
    .mul_stall(mul_stall[1]));

  int checks = 0, failures = 0;
  int n_red = 0, n_ds[2] = '{0, 0}, n_bs = 0, n_ms = 0;

  function automatic reg_idx_t r();
    int v = $urandom_range(3);
    return (v == 3) ? 5'd31 : 5'(v + 1);
  endfunction

  task automatic check_mode(int m);
    bit ua, ub, ds, bs, ms;
    pr_ctl_e e_ifid, e_idex, e_exmem, e_memwb;
    bit e_pcs, e_pcr;
    ua = id_valid && id_asrc != 31;
    ub = id_valid && id_bsrc != 31;
    if (m == 0)
      ds = ex_valid && ex_is_load && ex_wen &&
           ((ua && !id_is_store && ex_wdst == id_asrc) || (ub && ex_wdst == id_bsrc));
    else
      ds = (ex_valid && ex_wen && ((ua && ex_wdst == id_asrc) || (ub && ex_wdst == id_bsrc))) ||
           (mem_wen && ((ua && mem_wdst == id_asrc) || (ub && mem_wdst == id_bsrc)));
    ms = mul_hazard && !ds;
    bs = (m == 1) && ((id_valid && id_is_branch) || (ex_valid && ex_is_branch));
    {e_ifid, e_idex, e_exmem, e_memwb} = {PR_TRANSFER, PR_TRANSFER, PR_TRANSFER, PR_TRANSFER};
    e_pcs = 0; e_pcr = 0;
    if (mem_redirect) begin
      e_pcr = 1; e_ifid = PR_BUBBLE; e_idex = PR_BUBBLE; e_exmem = PR_BUBBLE;
      if (mem_kill) e_memwb = PR_BUBBLE;
      ds = 0; bs = 0; ms = 0;
    end else if (ds || ms) begin
      e_pcs = 1; e_ifid = PR_STALL; e_idex = PR_BUBBLE; bs = 0;
    end else if (bs) begin
      e_pcs = 1; e_ifid = PR_BUBBLE;
    end
    checks++;
    if (pc_stall[m] != e_pcs || pc_redirect[m] != e_pcr || if_id_ctl[m] != e_ifid ||
        id_ex_ctl[m] != e_idex || ex_mem_ctl[m] != e_exmem || mem_wb_ctl[m] != e_memwb ||
        data_stall[m] != ds || branch_stall[m] != bs || mul_stall[m] != ms) begin
      failures++;
      $display("FAIL: mode %0d: pcs=%b pcr=%b ifid=%0d idex=%0d exmem=%0d memwb=%0d ds=%b bs=%b",
               m, pc_stall[m], pc_redirect[m], if_id_ctl[m], id_ex_ctl[m], ex_mem_ctl[m],
               mem_wb_ctl[m], data_stall[m], branch_stall[m]);
    end
    n_ds[m] += int'(ds);
    if (m == 1) n_bs += int'(bs);
    n_ms += int'(ms);
  endtask

  task automatic named(input bit exp_fwd, input bit exp_stall, input string what);
    #1;
    checks++;
    if (data_stall[0] != exp_fwd || data_stall[1] != exp_stall) begin
      failures++;
      $display("FAIL: %s: stall %b/%b expected %b/%b", what, data_stall[0], data_stall[1],
               exp_fwd, exp_stall);
    end
  endtask

  initial begin
    // ldq $1 in EX; addq $2,$1,$2 in ID
    {id_valid, id_is_store, id_is_branch, ex_valid, ex_wen, ex_is_load, ex_is_branch} = 7'b1001110;
    {mem_wen, mem_redirect, mem_kill, mul_hazard} = 4'b0000;
    id_asrc = 2; id_bsrc = 1; ex_wdst = 1; mem_wdst = 31;
    named(1, 1, "load-ALU");
    // ldq $1 in EX; stq $1,16($2) in ID: data comes by MEM-MEM forwarding
    id_is_store = 1; id_asrc = 1; id_bsrc = 2;
    named(0, 1, "load-store data");
    // ldq $1 in EX; stq $2,16($1): address needs the load result
    id_asrc = 2; id_bsrc = 1;
    named(1, 1, "load-store address");
    // addq ... $2 in EX, reader of $2 in ID
    id_is_store = 0; ex_is_load = 0; ex_wdst = 2; id_asrc = 2; id_bsrc = 31;
    named(0, 1, "ALU-ALU distance 1");
    ex_wen = 0; mem_wen = 1; mem_wdst = 2;
    named(0, 1, "ALU-ALU distance 2");

    for (int i = 0; i < 20000; i++) begin
      id_valid = $urandom_range(4) != 0; id_is_store = $urandom_range(1);
      id_is_branch = $urandom_range(3) == 0; ex_valid = $urandom_range(4) != 0;
      ex_wen = $urandom_range(1); ex_is_load = $urandom_range(1);
      ex_is_branch = $urandom_range(3) == 0; mem_wen = $urandom_range(1);
      mem_redirect = $urandom_range(5) == 0; mul_hazard = $urandom_range(4) == 0; mem_kill = mem_redirect && $urandom_range(1);
      id_asrc = r(); id_bsrc = r(); ex_wdst = r(); mem_wdst = r();
      #1;
      check_mode(0);
      check_mode(1);
      n_red += int'(mem_redirect);
    end
    checks++;
    if (n_red == 0 || n_ds[0] == 0 || n_ds[1] == 0 || n_bs == 0 || n_ms == 0) failures++;
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
