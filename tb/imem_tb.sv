// imem_tb: writes random instruction words through the load port and reads
// them back at byte addresses, checking the word indexing, that the two low
// address bits and the bits above the memory are ignored, and that the read
// is combinational.
module imem_tb;
  localparam int unsigned WORDS = 1024;
  logic        clk = 1'b0, we = 1'b0;
  logic [63:0] pc = '0;
  logic [31:0] instr, wdata = '0;
  logic [9:0]  waddr = '0;
  logic [31:0] model [WORDS];
  int checks = 0, failures = 0;

  imem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(negedge clk);
    for (int i = 0; i < int'(WORDS); i++) begin
      we = 1'b1; waddr = 10'(i); wdata = $urandom; model[i] = wdata;
      @(negedge clk);
    end
    we = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      automatic int w = $urandom_range(WORDS - 1);
      pc = {20'($urandom), 32'd0, 10'(w), 2'($urandom)};
      pc[63:12] = ($urandom_range(1) != 0) ? pc[63:12] : '0;
      #1;
      checks++;
      if (instr != model[w]) begin
        failures++;
        $display("FAIL: pc=%h instr=%h expected %h", pc, instr, model[w]);
      end
    end
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
