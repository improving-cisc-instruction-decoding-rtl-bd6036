// regfile: multi-ported register file.
//
// DEPTH words of WIDTH bits with NRD combinational read ports and NWR write
// ports that write at the clock edge; when two write ports address the same
// word, the higher-numbered port wins. With its defaults it is the 512-entry
// fill unit register file that holds the values of renamed line registers;
// with other sizes it also serves as the physical register file of the
// microengine.
//
// The 512 entries come from the document (5-bit line counter plus 4-bit
// register number). Data width and port counts are this design's own.
module regfile #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NRD   = 3,
  parameter int unsigned NWR   = 3
) (
  input  logic                                 clk,
  input  logic [NRD-1:0][$clog2(DEPTH)-1:0]    raddr,
  output logic [NRD-1:0][WIDTH-1:0]            rdata,
  input  logic [NWR-1:0]                       we,
  input  logic [NWR-1:0][$clog2(DEPTH)-1:0]    waddr,
  input  logic [NWR-1:0][WIDTH-1:0]            wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_comb
    for (int r = 0; r < NRD; r++) rdata[r] = mem[raddr[r]];

  always_ff @(posedge clk)
    for (int w = 0; w < NWR; w++)
      if (we[w]) mem[waddr[w]] <= wdata[w];
endmodule
