// displaced_tsf: displaced-vertex track segment finder for one super layer.
//
// The finder looks for track segments (TS) of low-angle tracks that do not come
// from the interaction point. Instead of demanding a minimum number of hit
// layers, it splits each classic segment into a lower and an upper hitmap of
// three layers and asks a trained one-bit pattern table whether the hit pattern
// of the hitmap looks like a track. The table is produced offline from labelled
// events; its threshold sets the balance between hit purity and efficiency and
// does not change the hardware.
//
// Data flow, one frame of wire hits per clock, fully pipelined:
//   stage 1     input register of the NUM_LAYERS x WIRES hits
//   stage 2     hitmap_extract: 2*WIRES pattern addresses of N bits
//   stage 3-4   pattern_lut: WIRES table copies, each reading the lower and
//               upper TS of one address wire
//   stage 5-8   ts_output_limiter: first MAX_OUT accepted TS to the output
//               link, the rest dropped
// A frame presented with hits_valid_i before clock edge n leaves with
// ts_valid_o after edge n+7, i.e. a latency of 8 clocks (63 ns at 127 MHz).
//
// TS identifiers: lower TS of address wire w = w, upper TS = WIRES + w.
// The pattern table is loaded from INIT_FILE at start-up and can be rewritten
// between runs with cfg_we_i / cfg_addr_i / cfg_data_i, which write all copies
// at once. Frames seen while a write is in progress use a mix of old and new
// contents.
//
// Follows the design description: the upper/lower split, the three hitmap sizes
// (VERSION), one table per board, the SL8 size (5 x 384 wires), discarding TS
// beyond the link budget and the 8-clock latency. This design's own choices:
// the hitmap windows (tsf_pkg), the output format and budget (MAX_OUT), the
// configuration port and the sharing of one table by upper and lower hitmaps.
module displaced_tsf
  import tsf_pkg::*;
#(
  parameter tsf_version_e VERSION   = LUT12,
  parameter int unsigned  WIRES     = SL8_WIRES,
  parameter int unsigned  MAX_OUT   = 16,
  parameter string        INIT_FILE = "",
  localparam int unsigned N         = hm_bits(VERSION),
  localparam int unsigned NUM_TS    = 2 * WIRES,
  localparam int unsigned ID_W      = $clog2(NUM_TS),
  localparam int unsigned CNT_W     = $clog2(NUM_TS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // wire hits of one frame
  input  logic                             hits_valid_i,
  input  logic [NUM_LAYERS-1:0][WIRES-1:0] hits_i,
  // pattern table configuration
  input  logic                             cfg_we_i,
  input  logic [N-1:0]                     cfg_addr_i,
  input  logic                             cfg_data_i,
  // accepted track segments of one frame
  output logic                             ts_valid_o,
  output logic [MAX_OUT-1:0]               ts_slot_valid_o,
  output logic [MAX_OUT-1:0][ID_W-1:0]     ts_id_o,
  output logic [CNT_W-1:0]                 ts_found_o,
  output logic [CNT_W-1:0]                 ts_dropped_o
);

  // ---- stage 1: input register
  logic [NUM_LAYERS-1:0][WIRES-1:0] hits_q;
  logic [3:0]                       v_q;     // frame valid, stages 1..4

  always_ff @(posedge clk) hits_q <= hits_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[2:0], hits_valid_i};
  end

  // ---- stage 2: hitmaps to pattern addresses
  logic [NUM_TS-1:0][N-1:0] addr;

  hitmap_extract #(
    .VERSION (VERSION),
    .WIRES   (WIRES)
  ) u_hitmap (
    .clk    (clk),
    .hits_i (hits_q),
    .addr_o (addr)
  );

  // ---- stages 3-4: pattern tables, one copy per address wire
  logic [NUM_TS-1:0] accept;

  for (genvar w = 0; w < int'(WIRES); w++) begin : g_lut
    pattern_lut #(
      .ADDR_W    (N),
      .INIT_FILE (INIT_FILE)
    ) u_lut (
      .clk       (clk),
      .we_i      (cfg_we_i),
      .waddr_i   (cfg_addr_i),
      .wdata_i   (cfg_data_i),
      .raddr_a_i (addr[w]),
      .raddr_b_i (addr[WIRES + w]),
      .rdata_a_o (accept[w]),
      .rdata_b_o (accept[WIRES + w])
    );
  end

  // ---- stages 5-8: link budget
  ts_output_limiter #(
    .NUM_TS  (NUM_TS),
    .MAX_OUT (MAX_OUT)
  ) u_limiter (
    .clk          (clk),
    .rst_n        (rst_n),
    .valid_i      (v_q[3]),
    .flags_i      (accept),
    .valid_o      (ts_valid_o),
    .slot_valid_o (ts_slot_valid_o),
    .slot_id_o    (ts_id_o),
    .found_o      (ts_found_o),
    .dropped_o    (ts_dropped_o)
  );

endmodule
