// tsf_pkg: shared constants, types and hitmap geometry of the displaced-vertex
// track segment finder (TSF).
//
// A super layer (SL) of the drift chamber hands five wire layers to the trigger.
// The middle layer (index 2) holds the address wire of every track segment (TS).
// Each address wire owns two TS: a lower one, whose hitmap spans layers 2, 1, 0,
// and an upper one, spanning layers 2, 3, 4. A hitmap therefore has three layers
// and widens with the distance d from the address layer. Three sizes exist,
// named after their number of wires: LUT-5, LUT-9 and LUT-12. The split into
// upper/lower halves of two to three layers and the three sizes follow the
// design description; the exact wire windows are this design's choice:
//
//   d (layers from address layer)   0   1   2    wires
//   LUT5                            1   2   2    5
//   LUT9                            1   3   5    9
//   LUT12                           2   4   6    12
//
// A window of width W on a layer covers wire offsets -floor((W-1)/2) ..
// W-1-floor((W-1)/2) relative to the address wire, wrapping around in phi.
// Hitmap bit k counts the windows in order d = 0, 1, 2 and, inside a window,
// from the lowest offset up. The upper and lower hitmaps use the same bit
// order, mirrored in the layer direction, so both read the same pattern table.
package tsf_pkg;

  typedef enum logic [1:0] {
    LUT5  = 2'd0,
    LUT9  = 2'd1,
    LUT12 = 2'd2
  } tsf_version_e;

  // Wire layers of one super layer connected to the trigger.
  localparam int unsigned NUM_LAYERS = 5;
  // Layer that carries the TS address wires.
  localparam int unsigned ADDR_LAYER = 2;
  // Layers of one hitmap, address layer included.
  localparam int unsigned HM_DEPTH = 3;
  // Wires per layer in the outermost super layer SL8 (5 x 384 = 1920 inputs).
  localparam int unsigned SL8_WIRES = 384;

  // Width of the hitmap window d layers away from the address layer.
  function automatic int unsigned layer_width(tsf_version_e v, int unsigned d);
    case (v)
      LUT5:    return (d == 0) ? 1 : 2;
      LUT9:    return 2 * d + 1;
      default: return 2 * d + 2;
    endcase
  endfunction

  // Number of wires (pattern address bits) in one hitmap.
  function automatic int unsigned hm_bits(tsf_version_e v);
    int unsigned n;
    n = 0;
    for (int unsigned d = 0; d < HM_DEPTH; d++) n += layer_width(v, d);
    return n;
  endfunction

  // Layer distance of hitmap bit k.
  function automatic int unsigned hm_dist(tsf_version_e v, int unsigned k);
    int unsigned base;
    base = 0;
    for (int unsigned d = 0; d < HM_DEPTH; d++) begin
      if (k < base + layer_width(v, d)) return d;
      base += layer_width(v, d);
    end
    return HM_DEPTH - 1;
  endfunction

  // Wire offset of hitmap bit k relative to the address wire.
  function automatic int hm_offset(tsf_version_e v, int unsigned k);
    int unsigned base;
    int          w;
    base = 0;
    for (int unsigned d = 0; d < HM_DEPTH; d++) begin
      w = int'(layer_width(v, d));
      if (k < base + layer_width(v, d)) return int'(k - base) - (w - 1) / 2;
      base += layer_width(v, d);
    end
    return 0;
  endfunction

endpackage
