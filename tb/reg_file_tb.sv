// reg_file_tb: random writes and reads of the register array compared with a
// software copy. Checks reset to zero, that r31 reads zero and ignores
// writes, and that a read of the register being written in the same cycle
// returns the new value (write before read).
module reg_file_tb;
  logic        clk = 1'b0, rst = 1'b1;
  logic [4:0]  regA = '0, regB = '0, regW = '0, regD = '0;
  logic [63:0] datA, datB, datD, datW = '0;
  logic        wen = 1'b0;
  logic [63:0] model [32];
  int checks = 0, failures = 0, n_bypass = 0;

  reg_file dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [63:0] expect_rd(logic [4:0] r);
    if (r == 31) return '0;
    if (wen && regW == r && regW != 31) return datW;
    return model[r];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 32; i++) begin
      regD = 5'(i); #1;
      check(datD == 0, $sformatf("r%0d not zero after reset", i));
    end
    for (int i = 0; i < 5000; i++) begin
      wen  = $urandom_range(3) != 0;
      regW = 5'($urandom);
      datW = {$urandom, $urandom};
      regA = ($urandom_range(3) == 0) ? regW : 5'($urandom);
      regB = ($urandom_range(7) == 0) ? 5'd31 : 5'($urandom);
      regD = 5'($urandom);
      #1;
      check(datA == expect_rd(regA), $sformatf("port A r%0d = %h", regA, datA));
      check(datB == expect_rd(regB), $sformatf("port B r%0d = %h", regB, datB));
      check(datD == ((regD == 31) ? 64'd0 : model[regD]), $sformatf("port D r%0d", regD));
      if (wen && regA == regW && regW != 31) n_bypass++;
      @(posedge clk);
      if (wen && regW != 31) model[regW] = datW;
      @(negedge clk);
    end
    check(n_bypass > 0, "same-cycle write and read exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
