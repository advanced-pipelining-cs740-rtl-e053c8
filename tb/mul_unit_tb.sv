// mul_unit_tb: the 8-stage multiplier on its own.
//
// Random multiplies are issued on random cycles (back to back included) with
// random operands, some of them signed or at the extremes. Each must come out
// exactly 8 cycles later with the low 64 bits of the product and its
// destination; one killed in stage 1 must never come out. Every cycle the
// hazard outputs are compared with a model of the multiplies in flight: hit
// when one of them (or the one issuing) writes a queried register other
// than r31, slot when one is 3 cycles from coming out.
module mul_unit_tb;
  import alpha_pkg::*;

  localparam int unsigned STAGES = 8;

  logic        clk = 1'b0;
  logic        rst = 1'b1;
  logic        issue = 1'b0, kill1 = 1'b0;
  logic [63:0] a = '0, b = '0;
  reg_idx_t    wdst = '0, q_a = '0, q_b = '0, q_w = '0;
  logic        hit, slot, out_valid;
  reg_idx_t    out_wdst;
  logic [63:0] out_prod;

  mul_unit dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    bit          v;
    reg_idx_t    w;
    logic [63:0] p;
  } flight_t;

  flight_t fl[STAGES];    // fl[k]: the multiply in stage k+1
  int checks = 0, failures = 0, n_out = 0, n_kill = 0, n_hit = 0, n_slot = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] operand();
    case ($urandom_range(5))
      0:       return 64'hffff_ffff_ffff_ffff;
      1:       return 64'h8000_0000_0000_0000;
      2:       return 64'($urandom_range(255));
      3:       return -64'($urandom_range(1000));
      default: return {$urandom, $urandom};
    endcase
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 20000; c++) begin
      bit exp_hit;
      // inputs for this cycle
      issue = $urandom_range(2) != 0;
      a = operand(); b = operand();
      wdst = 5'($urandom_range(31));
      kill1 = fl[0].v && $urandom_range(5) == 0;
      q_a = 5'($urandom_range(31)); q_b = 5'($urandom_range(31)); q_w = 5'($urandom_range(31));
      #1;
      // combinational outputs against the model
      exp_hit = issue && wdst != RZERO && (wdst == q_a || wdst == q_b || wdst == q_w);
      for (int k = 0; k < int'(STAGES); k++)
        if (fl[k].v && fl[k].w != RZERO && (fl[k].w == q_a || fl[k].w == q_b || fl[k].w == q_w))
          exp_hit = 1'b1;
      check(hit == exp_hit, $sformatf("cycle %0d: hit %b expected %b", c, hit, exp_hit));
      check(slot == fl[STAGES-3].v, $sformatf("cycle %0d: slot %b", c, slot));
      check(out_valid == fl[STAGES-1].v, $sformatf("cycle %0d: out_valid %b", c, out_valid));
      if (fl[STAGES-1].v)
        check(out_wdst == fl[STAGES-1].w && out_prod == fl[STAGES-1].p,
              $sformatf("cycle %0d: product %h to r%0d, expected %h to r%0d", c, out_prod,
                        out_wdst, fl[STAGES-1].p, fl[STAGES-1].w));
      n_out  += int'(out_valid);
      n_kill += int'(kill1);
      n_hit  += int'(hit);
      n_slot += int'(slot);
      // advance the model with the clock
      @(posedge clk);
      for (int k = int'(STAGES) - 1; k > 0; k--) fl[k] = fl[k-1];
      if (kill1) fl[1].v = 1'b0;
      fl[0].v = issue; fl[0].w = wdst; fl[0].p = a * b;
      @(negedge clk);
    end
    check(n_out > 0 && n_kill > 0 && n_hit > 0 && n_slot > 0,
          $sformatf("seen: %0d results, %0d kills, %0d hits, %0d slots", n_out, n_kill, n_hit, n_slot));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
