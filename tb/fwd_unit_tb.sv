// fwd_unit_tb: random pipeline states, with register numbers drawn from a
// small set so that matches are frequent, checked against the forwarding
// rules: the nearest pending write wins, MEM_in only when it is not a load,
// r31 never forwarded, MEM-MEM only from a load in WB to a store in MEM.
module fwd_unit_tb;
  import alpha_pkg::*;
  logic     ex_valid, mem_wen, mem_is_load, mem_is_store, wb_wen, wb_is_load, mem_mem;
  reg_idx_t ex_asrc, ex_bsrc, mem_wdst, mem_asrc, wb_wdst;
  fwd_sel_e sel_a, sel_b;
  int checks = 0, failures = 0;
  int seen[3];

  fwd_unit dut (.*);

  function automatic reg_idx_t r();
    int v = $urandom_range(3);
    return (v == 3) ? 5'd31 : 5'(v + 1);
  endfunction

  function automatic fwd_sel_e ref_sel(reg_idx_t s);
    if (!ex_valid || s == 31) return FW_REG;
    if (mem_wen && !mem_is_load && mem_wdst == s) return FW_EXEX;
    if (wb_wen && wb_wdst == s) return FW_MEMEX;
    return FW_REG;
  endfunction

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic emm;
      ex_valid = $urandom_range(4) != 0;
      ex_asrc = r(); ex_bsrc = r(); mem_wdst = r(); mem_asrc = r(); wb_wdst = r();
      mem_wen = $urandom_range(1); mem_is_load = $urandom_range(1);
      mem_is_store = $urandom_range(1); wb_wen = $urandom_range(1); wb_is_load = $urandom_range(1);
      #1;
      emm = mem_is_store && wb_wen && wb_is_load && mem_asrc != 31 && wb_wdst == mem_asrc;
      checks++;
      if (sel_a != ref_sel(ex_asrc) || sel_b != ref_sel(ex_bsrc) || mem_mem != emm) begin
        failures++;
        $display("FAIL: sel_a=%0d/%0d sel_b=%0d/%0d mm=%b/%b", sel_a, ref_sel(ex_asrc),
                 sel_b, ref_sel(ex_bsrc), mem_mem, emm);
      end
      seen[sel_a]++;
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
