// pattern_lut: one-bit pattern table of the track segment finder.
//
// Entry a holds the trained hypothesis for hitmap pattern a: 1 = the pattern is
// accepted as a track segment, 0 = rejected as noise. The table has 2**ADDR_W
// entries (32, 512 or 4096 for LUT-5, LUT-9, LUT-12). Two read ports let one
// copy serve two track segments per clock, as a dual-port block RAM does; the
// finder keeps one copy per pair of track segments.
//
// Contents come from a configuration file produced by the offline training
// (INIT_FILE, one binary digit per line, entry 0 first) and can be rewritten
// between runs through the write port (we_i, waddr_i, wdata_i; one entry per
// clock). Reads are registered twice, like a block RAM with its output register
// enabled: data for an address presented before edge n appears after edge n+1
// (latency 2). A write and a read of the same entry in one clock return the old
// value. The memory has no reset; it is defined only once it has been loaded.
//
// The one-bit table, its training-file origin and its placement in distributed
// memory or block RAM follow the design description. The file format, the
// write port and the two-stage read are this design's choice.
module pattern_lut #(
  parameter int unsigned ADDR_W    = 12,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              we_i,
  input  logic [ADDR_W-1:0] waddr_i,
  input  logic              wdata_i,
  input  logic [ADDR_W-1:0] raddr_a_i,
  input  logic [ADDR_W-1:0] raddr_b_i,
  output logic              rdata_a_o,
  output logic              rdata_b_o
);

  localparam int unsigned DEPTH = 2 ** ADDR_W;

  logic mem [DEPTH];
  logic rd_a_q, rd_b_q;

  initial begin
    if (INIT_FILE != "") $readmemb(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (we_i) mem[waddr_i] <= wdata_i;
    rd_a_q    <= mem[raddr_a_i];
    rd_b_q    <= mem[raddr_b_i];
    rdata_a_o <= rd_a_q;
    rdata_b_o <= rd_b_q;
  end

endmodule
