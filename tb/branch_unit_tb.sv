// branch_unit_tb: condition and target of every branch kind, including the
// taken-branch example (beq r31 with displacement 5 at address 0 goes to
// 0x18), negative displacements and jump targets with the low bits cleared.
module branch_unit_tb;
  import alpha_pkg::*;
  br_kind_e    br;
  logic [63:0] a, b, incr_pc, disp, target;
  logic        taken;
  int checks = 0, failures = 0;

  branch_unit dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    br = BR_EQ; a = 0; b = 0; incr_pc = 64'h4; disp = 64'd5;
    #1 check(taken && target == 64'h18, "beq r31, 0x18 taken to 0x18");
    br = BR_NE;
    #1 check(!taken, "bne r31 not taken");
    for (int i = 0; i < 3000; i++) begin
      logic [20:0] d21;
      logic        et;
      logic [63:0] etgt;
      br = br_kind_e'($urandom_range(4));
      a  = ($urandom_range(2) == 0) ? 64'd0 : {$urandom, $urandom};
      b  = {$urandom, $urandom};
      incr_pc = {32'd0, $urandom} & ~64'd3;
      d21 = 21'($urandom);
      disp = {{43{d21[20]}}, d21};
      #1;
      etgt = incr_pc + 4 * disp;
      case (br)
        BR_EQ:  et = (a == 0);
        BR_NE:  et = (a != 0);
        BR_UNC: et = 1'b1;
        BR_JMP: begin et = 1'b1; etgt = b - (b % 4); end
        default: et = 1'b0;
      endcase
      check(taken == et, $sformatf("%s taken=%b", br.name(), taken));
      if (et) check(target == etgt, $sformatf("%s target %h expected %h", br.name(), target, etgt));
    end
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
