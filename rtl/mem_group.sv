// mem_group: one memory group (A or B) of BANKS independent SRAM banks.
//
// Every bank has its own address, so one access can touch a different row in
// each bank (the write side of a stage needs this). All banks share en and we:
// a group is either read or written in a given cycle, which the ping-pong
// schedule guarantees. Read latency is two cycles (see sram_bank).
// Eight banks per group follow the document; per-bank addresses are this
// design's choice.
module mem_group #(
  parameter int BANKS = 8,
  parameter int DEPTH = 512,
  parameter int W     = 32
) (
  input  logic                                  clk,
  input  logic                                  en,
  input  logic                                  we,
  input  logic [BANKS-1:0][$clog2(DEPTH)-1:0]   addr,
  input  logic [BANKS-1:0][W-1:0]               wdata,
  output logic [BANKS-1:0][W-1:0]               rdata
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    sram_bank #(.DEPTH(DEPTH), .W(W)) u_bank (
      .clk, .en, .we, .addr(addr[b]), .wdata(wdata[b]), .rdata(rdata[b])
    );
  end
endmodule
