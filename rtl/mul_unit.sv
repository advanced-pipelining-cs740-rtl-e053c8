// mul_unit: pipelined integer multiplier (mulq) beside the one-cycle EX stage.
//
// A multiply spends STAGES cycles in execute (EX1..EX8 by default) instead
// of one. Stage k adds the partial product of operand A with the k-th
// DW/STAGES-bit chunk of operand B, so a new multiply can start every cycle
// and each one takes exactly STAGES cycles. The product is the low DW bits
// of A*B. After the last stage the result takes the MEM slot and then WB,
// so it completes out of order: younger one-cycle instructions may finish
// first.
//
// The unit also answers the hazard questions that such completion raises.
// hit: a multiply in flight (or the one issuing) will write one of the registers q_a, q_b or q_w
// (read-after-write or write-after-write; r31 never matches), and the
// instruction asking must wait. slot: the multiply in stage STAGES-2 will
// use the MEM/WB path in the same cycle as an instruction now in ID would,
// so that instruction must wait one cycle.
//
// Interface: issue loads stage 1 with a, b and the destination at the clock
// edge; kill1 discards the multiply in stage 1 (its instruction was aborted
// in MEM). out_valid/out_wdst/out_prod present the finished multiply.
module mul_unit
  import alpha_pkg::*;
#(
  parameter int unsigned STAGES = 8,
  parameter int unsigned DW     = 64,
  localparam int unsigned CH    = DW / STAGES
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          issue,
  input  logic [DW-1:0] a,
  input  logic [DW-1:0] b,
  input  reg_idx_t      wdst,
  input  logic          kill1,
  input  reg_idx_t      q_a,
  input  reg_idx_t      q_b,
  input  reg_idx_t      q_w,
  output logic          hit,
  output logic          slot,
  output logic          out_valid,
  output reg_idx_t      out_wdst,
  output logic [DW-1:0] out_prod
);

  typedef struct packed {
    logic          valid;
    reg_idx_t      wdst;
    logic [DW-1:0] a;
    logic [DW-1:0] b;
    logic [DW-1:0] acc;
  } mstage_t;

  mstage_t st [STAGES];

  // partial product of a with chunk k of b, placed at its weight
  function automatic logic [DW-1:0] pp(input logic [DW-1:0] x, input logic [DW-1:0] y,
                                       input int unsigned k);
    logic [CH-1:0] c;
    c = y[k*CH +: CH];
    return (x * {{(DW-CH){1'b0}}, c}) << (k * CH);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(STAGES); k++) st[k] <= '0;
    end else begin
      st[0].valid <= issue;
      st[0].wdst  <= wdst;
      st[0].a     <= a;
      st[0].b     <= b;
      st[0].acc   <= pp(a, b, 0);
      for (int k = 1; k < int'(STAGES); k++) begin
        st[k].valid <= st[k-1].valid && !(k == 1 && kill1);
        st[k].wdst  <= st[k-1].wdst;
        st[k].a     <= st[k-1].a;
        st[k].b     <= st[k-1].b;
        st[k].acc   <= st[k-1].acc + pp(st[k-1].a, st[k-1].b, k);
      end
    end
  end

  always_comb begin
    // the multiply being issued from EX counts as in flight
    hit = issue && wdst != RZERO && (wdst == q_a || wdst == q_b || wdst == q_w);
    for (int k = 0; k < int'(STAGES); k++) begin
      if (st[k].valid && st[k].wdst != RZERO &&
          (st[k].wdst == q_a || st[k].wdst == q_b || st[k].wdst == q_w))
        hit = 1'b1;
    end
    slot      = st[STAGES-3].valid;
    out_valid = st[STAGES-1].valid;
    out_wdst  = st[STAGES-1].wdst;
    out_prod  = st[STAGES-1].acc;
  end

endmodule
