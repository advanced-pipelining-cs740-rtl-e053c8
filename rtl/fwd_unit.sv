// fwd_unit: bypass (forwarding) control.
//
// Chooses where the EX stage takes its two register operands from. The
// pending writes it compares against are those of the instruction in MEM
// (MEM_in.WDst, result MEM_in.ALUout: EX-EX forwarding) and of the
// instruction in WB (WB_in.WDst, result WB_in: MEM-EX forwarding); the
// nearer one wins. A load in MEM has no data yet, so it is never an EX-EX
// source; the hazard unit stalls the dependent instruction instead.
// It also detects MEM-MEM forwarding: a load in WB whose WDst is the store
// data register (MEM_in.ASrc) of a store in MEM supplies that store's data.
// Register 31 is never forwarded. Timing: purely combinational.
module fwd_unit
  import alpha_pkg::*;
(
  input  logic      ex_valid,
  input  reg_idx_t  ex_asrc,
  input  reg_idx_t  ex_bsrc,
  input  logic      mem_wen,
  input  logic      mem_is_load,
  input  reg_idx_t  mem_wdst,
  input  logic      mem_is_store,
  input  reg_idx_t  mem_asrc,
  input  logic      wb_wen,
  input  logic      wb_is_load,
  input  reg_idx_t  wb_wdst,
  output fwd_sel_e  sel_a,
  output fwd_sel_e  sel_b,
  output logic      mem_mem
);

  function automatic fwd_sel_e pick(input reg_idx_t src,
                                    input logic m_wen, input logic m_ld, input reg_idx_t m_dst,
                                    input logic w_wen, input reg_idx_t w_dst);
    if (src == RZERO)                        return FW_REG;
    else if (m_wen && !m_ld && m_dst == src) return FW_EXEX;
    else if (w_wen && w_dst == src)          return FW_MEMEX;
    else                                     return FW_REG;
  endfunction

  always_comb begin
    sel_a   = FW_REG;
    sel_b   = FW_REG;
    if (ex_valid) begin
      sel_a = pick(ex_asrc, mem_wen, mem_is_load, mem_wdst, wb_wen, wb_wdst);
      sel_b = pick(ex_bsrc, mem_wen, mem_is_load, mem_wdst, wb_wen, wb_wdst);
    end
    mem_mem = mem_is_store && wb_wen && wb_is_load &&
              (mem_asrc != RZERO) && (wb_wdst == mem_asrc);
  end

endmodule
