// dmem: data memory of the MEM stage.
//
// WORDS 64-bit quadwords addressed by byte address; ldq and stq use the
// quadword index addr[AW+2:3] (the low three bits are ignored, higher bits
// wrap). Read is asynchronous so the load result is available at the end of
// MEM; a store writes at the rising edge. A second, host port writes and
// reads the array for loading data and observing results; in a cycle with a
// host write, a pipeline store is dropped, so the host writes only while the
// pipeline is held in reset or halted. WORDS must be a power of 2.
module dmem #(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned AW    = $clog2(WORDS)
) (
  input  logic          clk,
  input  logic [63:0]   addr,
  input  logic          rd,
  output logic [63:0]   rdata,
  input  logic          wr,
  input  logic [63:0]   wdata,
  input  logic          h_we,
  input  logic [AW-1:0] h_addr,  // quadword index
  input  logic [63:0]   h_wdata,
  output logic [63:0]   h_rdata
);

  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we)    mem[h_addr] <= h_wdata;
    else if (wr) mem[addr[AW+2:3]] <= wdata;
  end

  assign rdata   = rd ? mem[addr[AW+2:3]] : '0;
  assign h_rdata = mem[h_addr];

endmodule
