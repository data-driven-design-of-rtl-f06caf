// hitmap_extract: cuts the wire hits of one super layer into track segment
// hitmaps and turns each hitmap into a pattern-table address.
//
// Every wire of the address layer owns two track segments (TS): TS number w is
// the lower hitmap of address wire w (layers 2, 1, 0), TS number WIRES + w the
// upper one (layers 2, 3, 4). Bit k of a TS address is the hit of the k-th wire
// of its hitmap, in the order defined in tsf_pkg. Wire indices wrap around in
// phi, so the first and last wires of a layer are neighbours. The gathering is
// pure wiring; the result is registered once, which makes this one pipeline
// stage (latency 1 clock).
//
// Using the wire pattern of a hitmap as a memory address follows the design
// description; the window shapes and bit order are this design's choice.
module hitmap_extract
  import tsf_pkg::*;
#(
  parameter tsf_version_e VERSION = LUT12,
  parameter int unsigned  WIRES   = SL8_WIRES,
  localparam int unsigned N       = hm_bits(VERSION),
  localparam int unsigned NUM_TS  = 2 * WIRES
) (
  input  logic                                clk,
  input  logic [NUM_LAYERS-1:0][WIRES-1:0]    hits_i,   // hits, one bit per wire
  output logic [NUM_TS-1:0][N-1:0]            addr_o    // pattern address per TS
);

  logic [NUM_TS-1:0][N-1:0] addr_d;

  for (genvar h = 0; h < 2; h++) begin : g_half
    for (genvar w = 0; w < int'(WIRES); w++) begin : g_wire
      for (genvar k = 0; k < int'(N); k++) begin : g_bit
        localparam int unsigned D = hm_dist(VERSION, k);
        localparam int unsigned L = (h == 1) ? ADDR_LAYER + D : ADDR_LAYER - D;
        localparam int unsigned W = unsigned'((w + hm_offset(VERSION, k) + int'(WIRES))
                                              % int'(WIRES));
        assign addr_d[h * WIRES + w][k] = hits_i[L][W];
      end
    end
  end

  always_ff @(posedge clk) addr_o <= addr_d;

endmodule
