// exc_unit_tb: random event combinations for the instruction in MEM,
// checked against the exception rules: priority of illegal, call_pal,
// overflow, then interrupt (only while enabled); EXC_ADDR is the
// instruction's own address for illegal and interrupt and the next one for
// call_pal and overflow; kernel mode and interrupt disable on entry; rei
// returns to EXC_ADDR and restores user mode with interrupts enabled.
module exc_unit_tb;
  import alpha_pkg::*;
  logic        clk = 1'b0, rst = 1'b1;
  logic        mem_valid = 0, mem_illegal = 0, mem_callpal = 0, mem_ovf = 0, mem_rei = 0, irq = 0;
  logic [63:0] mem_incr_pc = 64'd4, target, exc_addr;
  logic        take, rei_now, kernel, int_en;
  exc_cause_e  exc_sum;
  int checks = 0, failures = 0;
  int seen[5] = '{0, 0, 0, 0, 0};

  exc_unit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic        m_kernel = 0, m_ie = 1;
    logic [63:0] m_addr = 0;
    exc_cause_e  m_sum = EXC_NONE;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(!kernel && int_en && exc_addr == 0 && exc_sum == EXC_NONE, "reset state");
    for (int i = 0; i < 5000; i++) begin
      exc_cause_e c;
      logic [63:0] a;
      mem_valid = $urandom_range(5) != 0;
      mem_illegal = $urandom_range(9) == 0; mem_callpal = $urandom_range(9) == 0;
      mem_ovf = $urandom_range(9) == 0; mem_rei = $urandom_range(5) == 0;
      irq = $urandom_range(3) == 0;
      mem_incr_pc = {32'd0, $urandom} & ~64'd3;
      #1;
      c = EXC_NONE; a = mem_incr_pc - 4;
      if (mem_valid) begin
        if (mem_illegal)      c = EXC_ILLEGAL;
        else if (mem_callpal) begin c = EXC_CALLPAL; a = mem_incr_pc; end
        else if (mem_ovf)     begin c = EXC_OVERFLOW; a = mem_incr_pc; end
        else if (irq && m_ie) c = EXC_INTERRUPT;
      end
      check(take == (c != EXC_NONE), $sformatf("take=%b cause %0d", take, c));
      check(rei_now == (mem_valid && mem_rei && c == EXC_NONE), "rei_now");
      if (take) check(target == 64'h800, "target is the vector");
      else if (rei_now) check(target == m_addr, "rei target is EXC_ADDR");
      seen[c]++;
      @(posedge clk);
      if (c != EXC_NONE) begin
        m_addr = a; m_sum = c; m_kernel = 1; m_ie = 0;
      end else if (mem_valid && mem_rei) begin
        m_kernel = 0; m_ie = 1;
      end
      @(negedge clk);
      check(exc_addr == m_addr && exc_sum == m_sum && kernel == m_kernel && int_en == m_ie,
            $sformatf("state addr=%h sum=%0d k=%b ie=%b", exc_addr, exc_sum, kernel, int_en));
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("cause %0d exercised", i));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
