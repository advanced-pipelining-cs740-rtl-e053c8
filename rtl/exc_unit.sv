// exc_unit: precise exception and interrupt control, acting in the MEM stage.
//
// Recognises the events of the instruction in MEM: an illegal instruction, a
// call_pal with a nonzero function, signed overflow of addq/v or subq/v, and
// an external interrupt request (irq, level sensitive, taken only while
// interrupts are enabled). Because every older instruction has already left
// MEM and no younger one has changed any state, taking the exception here
// gives a clean break: `take` aborts the instruction in MEM (its store and
// register write are suppressed by the pipeline) and, through the hazard
// unit, the younger ones, and sends the PC to the common handler VECTOR.
// An internal event has priority over an interrupt in the same cycle.
//
// On taking an exception the unit sets
//   EXC_ADDR: the address of the instruction in MEM for an illegal
//             instruction or an interrupt (the instruction about to be
//             executed), the following address for overflow and call_pal;
//   EXC_SUM : the cause (exc_cause_e);
// and switches to kernel mode with interrupts disabled. rei, when it reaches
// MEM, sends the PC back to EXC_ADDR and restores user mode with interrupts
// enabled. Reset: user mode, interrupts enabled, EXC_ADDR and EXC_SUM zero.
// Timing: take/redirect are combinational from the MEM stage; the status
// registers change at the clock edge that ends the cycle.
module exc_unit
  import alpha_pkg::*;
#(
  parameter logic [63:0] VECTOR = 64'h0000_0000_0000_0800
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       mem_valid,
  input  word_t      mem_incr_pc,
  input  logic       mem_illegal,
  input  logic       mem_callpal,
  input  logic       mem_ovf,
  input  logic       mem_rei,
  input  logic       irq,
  output logic       take,        // abort MEM and younger, go to VECTOR
  output logic       rei_now,     // rei in MEM: go to EXC_ADDR
  output word_t      target,      // new PC when take or rei_now
  output word_t      exc_addr,
  output exc_cause_e exc_sum,
  output logic       kernel,
  output logic       int_en
);

  exc_cause_e cause;
  word_t      addr;

  always_comb begin
    cause = EXC_NONE;
    addr  = mem_incr_pc - 64'd4;
    if (mem_valid) begin
      if (mem_illegal) begin
        cause = EXC_ILLEGAL;
      end else if (mem_callpal) begin
        cause = EXC_CALLPAL;
        addr  = mem_incr_pc;
      end else if (mem_ovf) begin
        cause = EXC_OVERFLOW;
        addr  = mem_incr_pc;
      end else if (irq && int_en) begin
        cause = EXC_INTERRUPT;
      end
    end
    take    = (cause != EXC_NONE);
    rei_now = mem_valid && mem_rei && !take;
    target  = take ? VECTOR : exc_addr;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      exc_addr <= '0;
      exc_sum  <= EXC_NONE;
      kernel   <= 1'b0;
      int_en   <= 1'b1;
    end else if (take) begin
      exc_addr <= addr;
      exc_sum  <= cause;
      kernel   <= 1'b1;
      int_en   <= 1'b0;
    end else if (rei_now) begin
      kernel   <= 1'b0;
      int_en   <= 1'b1;
    end
  end

endmodule
