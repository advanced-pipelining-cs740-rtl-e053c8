// dmem_tb: random loads, stores and host-port accesses compared with a
// software copy of the memory: quadword indexing by address bits [12:3],
// combinational load data (zero when no load), stores at the clock edge, and
// a host write taking the cycle over a pipeline store.
module dmem_tb;
  localparam int unsigned WORDS = 1024;
  logic        clk = 1'b0, rd = 1'b0, wr = 1'b0, h_we = 1'b0;
  logic [63:0] addr = '0, rdata, wdata = '0, h_wdata = '0, h_rdata;
  logic [9:0]  h_addr = '0;
  logic [63:0] model [WORDS];
  int checks = 0, failures = 0;

  dmem #(.WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    @(negedge clk);
    for (int i = 0; i < int'(WORDS); i++) begin
      h_we = 1'b1; h_addr = 10'(i); h_wdata = {$urandom, $urandom}; model[i] = h_wdata;
      @(negedge clk);
    end
    h_we = 1'b0;
    for (int i = 0; i < 5000; i++) begin
      automatic int w = $urandom_range(WORDS - 1);
      addr = {$urandom, 19'($urandom), 10'(w), 3'($urandom)};
      rd = $urandom_range(1); wr = $urandom_range(1);
      wdata = {$urandom, $urandom};
      h_we = $urandom_range(7) == 0; h_addr = 10'($urandom); h_wdata = {$urandom, $urandom};
      #1;
      check(rdata == (rd ? model[w] : 64'd0), $sformatf("load word %0d: %h", w, rdata));
      check(h_rdata == model[h_addr], "host read");
      @(posedge clk);
      if (h_we)    model[h_addr] = h_wdata;
      else if (wr) model[w] = wdata;
      @(negedge clk);
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
