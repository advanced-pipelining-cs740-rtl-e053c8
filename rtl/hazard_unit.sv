// hazard_unit: the stall control of the pipeline.
//
// Decides, for every pipeline register, whether the next clock edge transfers,
// stalls or bubbles it, and whether the PC loads a branch target.
//
//   Redirect: a taken branch or jump, a halt, an exception or a rei in MEM
//   loads the PC with the target (halt freezes it) and turns the three
//   younger instructions in IF/ID, ID/EX and EX/MEM into bubbles
//   (fetch-and-cancel, i.e. predict not taken). For an exception (mem_kill)
//   the instruction in MEM becomes a bubble in MEM/WB as well. This has the
//   highest priority.
//   Data stall: the instruction in ID waits (PC and IF/ID stall, ID/EX gets a
//   bubble). With FORWARDING=1 this happens only when the instruction in EX is
//   a load whose destination the instruction in ID reads, except for the data
//   register of a store, which MEM-MEM forwarding supplies. With FORWARDING=0
//   it happens when either register read in ID matches either pending write,
//   in EX or in MEM.
//   Multiply stall: the same action when the instruction in ID reads or
//   writes a register that a multiply in flight will write, or would need
//   the MEM/WB path in the cycle the multiply does (mul_hazard). It is
//   reported apart from the data stall, and only when there is no data stall.
//   Branch stall (BRANCH_STALL=1 only): while a branch or jump is in ID or EX
//   the PC stalls and a bubble enters ID, so fetching waits for the branch to
//   resolve in MEM.
//
// Timing: purely combinational; its outputs act on the next clock edge.
module hazard_unit
  import alpha_pkg::*;
#(
  parameter bit FORWARDING   = 1'b1,
  parameter bit BRANCH_STALL = 1'b0
) (
  // instruction in ID
  input  logic      id_valid,
  input  reg_idx_t  id_asrc,
  input  reg_idx_t  id_bsrc,
  input  logic      id_is_store,
  input  logic      id_is_branch,
  // instruction in EX
  input  logic      ex_valid,
  input  logic      ex_wen,
  input  logic      ex_is_load,
  input  reg_idx_t  ex_wdst,
  input  logic      ex_is_branch,
  // instruction in MEM
  input  logic      mem_wen,
  input  reg_idx_t  mem_wdst,
  input  logic      mem_redirect,   // taken branch/jump, halt, exception or rei in MEM
  input  logic      mem_kill,       // exception: abort the instruction in MEM too
  // multiplier
  input  logic      mul_hazard,     // ID instruction conflicts with a multiply in flight
  // decisions
  output logic      pc_stall,
  output logic      pc_redirect,
  output pr_ctl_e   if_id_ctl,
  output pr_ctl_e   id_ex_ctl,
  output pr_ctl_e   ex_mem_ctl,
  output pr_ctl_e   mem_wb_ctl,
  output logic      data_stall,
  output logic      mul_stall,
  output logic      branch_stall
);

  logic use_a, use_b;

  always_comb begin
    use_a = id_valid && (id_asrc != RZERO);
    use_b = id_valid && (id_bsrc != RZERO);

    if (FORWARDING) begin
      data_stall = ex_valid && ex_is_load && ex_wen &&
                   ((use_a && !id_is_store && ex_wdst == id_asrc) ||
                    (use_b && ex_wdst == id_bsrc));
    end else begin
      data_stall = (ex_valid && ex_wen && ((use_a && ex_wdst == id_asrc) ||
                                           (use_b && ex_wdst == id_bsrc))) ||
                   (mem_wen && ((use_a && mem_wdst == id_asrc) ||
                                (use_b && mem_wdst == id_bsrc)));
    end
    branch_stall = BRANCH_STALL && ((id_valid && id_is_branch) || (ex_valid && ex_is_branch));
    mul_stall    = mul_hazard && !data_stall;

    pc_stall    = 1'b0;
    pc_redirect = 1'b0;
    if_id_ctl   = PR_TRANSFER;
    id_ex_ctl   = PR_TRANSFER;
    ex_mem_ctl  = PR_TRANSFER;
    mem_wb_ctl  = PR_TRANSFER;

    if (mem_redirect) begin
      pc_redirect  = 1'b1;
      if_id_ctl    = PR_BUBBLE;
      id_ex_ctl    = PR_BUBBLE;
      ex_mem_ctl   = PR_BUBBLE;
      if (mem_kill) mem_wb_ctl = PR_BUBBLE;
      data_stall   = 1'b0;
      mul_stall    = 1'b0;
      branch_stall = 1'b0;
    end else if (data_stall || mul_stall) begin
      pc_stall     = 1'b1;
      if_id_ctl    = PR_STALL;
      id_ex_ctl    = PR_BUBBLE;
      branch_stall = 1'b0;
    end else if (branch_stall) begin
      pc_stall     = 1'b1;
      if_id_ctl    = PR_BUBBLE;
    end
  end

endmodule
