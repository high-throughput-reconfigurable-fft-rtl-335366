// sram_bank: one single-port SRAM bank (DEPTH x W) with a registered output.
//
// Stands for one 512x32 SRAM macro of a memory group, written as an array.
// A read (en = 1, we = 0) presents addr; the word is in the array's read
// register one cycle later and on rdata after the output pipeline register,
// two cycles after the request. A write (en = 1, we = 1) stores wdata at the
// clock edge. The output register follows the document ("registers are used at
// the output of the SRAM blocks"); the port protocol is this design's.
module sram_bank #(
  parameter int DEPTH = 512,
  parameter int W     = 32
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);
  logic [W-1:0] mem [DEPTH];
  logic [W-1:0] q;

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    q         <= mem[addr];
    end
    rdata <= q;
  end
endmodule
