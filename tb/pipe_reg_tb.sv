// pipe_reg_tb: checks the transfer, stall and bubble operations and reset of
// the pipeline register against a software copy of its state, over random
// sequences of commands and data.
module pipe_reg_tb;
  import alpha_pkg::*;

  localparam int unsigned W = 70;
  logic         clk = 1'b0, rst = 1'b1;
  pr_ctl_e      ctl = PR_TRANSFER;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  pipe_reg #(.W(W)) dut (.clk, .rst, .ctl, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_t = 0, n_s = 0, n_b = 0;
    @(negedge clk);
    d = '1;
    @(negedge clk);
    checks++; if (q != '0) begin failures++; $display("FAIL: reset value %h", q); end
    rst = 1'b0;
    model = '0;
    for (int i = 0; i < 2000; i++) begin
      automatic int c = $urandom_range(2);
      ctl = pr_ctl_e'(c);
      d = {$urandom, $urandom, $urandom};
      @(posedge clk);
      case (c)
        0: begin model = d;  n_t++; end
        1: n_s++;
        default: begin model = '0; n_b++; end
      endcase
      @(negedge clk);
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL: op %0d: q=%h expected %h", c, q, model);
      end
    end
    checks++;
    if (n_t == 0 || n_s == 0 || n_b == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
