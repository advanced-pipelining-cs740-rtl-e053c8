// pipe_reg: pipeline register with the three operations of the stall control.
//
// On each rising clock edge the register either transfers its next-state input
// to its current state (normal operation), stalls (keeps its current state) or
// is loaded with a bubble (all zeros). The pipeline's stage logic is built so
// that an all-zero state behaves as a NOP. Reset also loads the bubble.
//
// Interface: ctl selects the operation for the coming edge; d is the next
// state, q the current state. Timing: one cycle, q changes only at the edge.
module pipe_reg
  import alpha_pkg::*;
#(
  parameter int unsigned W = 64
) (
  input  logic         clk,
  input  logic         rst,
  input  pr_ctl_e      ctl,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst) begin
      q <= '0;
    end else begin
      unique case (ctl)
        PR_TRANSFER: q <= d;
        PR_BUBBLE:   q <= '0;
        default:     q <= q;      // PR_STALL
      endcase
    end
  end

endmodule
