// tb_hitmap_extract: self-checking test of the hitmap gathering.
//
// Three instances cover the LUT-5, LUT-9 and LUT-12 hitmaps on a small layer
// of 16 wires, so that the phi wrap-around is exercised at both ends. The
// reference uses literal (layer distance, wire offset) tables for each size,
// written out by hand below, and checks every address bit of every track
// segment one clock after random hits are applied. Single-hit frames check
// that each wire lands in exactly the expected bits.
module tb_hitmap_extract;
  import tsf_pkg::*;
  localparam int unsigned W = 16;
  localparam int WI = int'(W);

  logic clk = 1'b0;
  logic [NUM_LAYERS-1:0][W-1:0] hits = '0;
  logic [2*W-1:0][4:0]  a5;
  logic [2*W-1:0][8:0]  a9;
  logic [2*W-1:0][11:0] a12;

  int checks = 0, failures = 0;
  int wrap_hits = 0;

  hitmap_extract #(.VERSION(LUT5),  .WIRES(W)) u5  (.clk(clk), .hits_i(hits), .addr_o(a5));
  hitmap_extract #(.VERSION(LUT9),  .WIRES(W)) u9  (.clk(clk), .hits_i(hits), .addr_o(a9));
  hitmap_extract #(.VERSION(LUT12), .WIRES(W)) u12 (.clk(clk), .hits_i(hits), .addr_o(a12));

  always #5 clk = ~clk;

  // hitmap wires: {layer distance, offset}, in address bit order
  int d5  [5]  = '{0, 1, 1, 2, 2};
  int o5  [5]  = '{0, 0, 1, 0, 1};
  int d9  [9]  = '{0, 1, 1, 1, 2, 2, 2, 2, 2};
  int o9  [9]  = '{0, -1, 0, 1, -2, -1, 0, 1, 2};
  int d12 [12] = '{0, 0, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2};
  int o12 [12] = '{0, 1, -1, 0, 1, 2, -2, -1, 0, 1, 2, 3};

  function automatic bit ref_bit(logic [NUM_LAYERS-1:0][W-1:0] h, int ts, int d, int o);
    int half, w, layer, wi;
    half  = ts / WI;
    w     = ts % WI;
    layer = half ? 2 + d : 2 - d;
    wi    = (w + o + WI) % WI;
    return h[layer][wi];
  endfunction

  task automatic check_all(logic [NUM_LAYERS-1:0][W-1:0] h);
    for (int ts = 0; ts < 2 * W; ts++) begin
      for (int k = 0; k < 5; k++) begin
        checks++;
        if (a5[ts][k] !== ref_bit(h, ts, d5[k], o5[k])) begin
          failures++; $display("FAIL LUT5 ts %0d bit %0d", ts, k);
        end
      end
      for (int k = 0; k < 9; k++) begin
        checks++;
        if (a9[ts][k] !== ref_bit(h, ts, d9[k], o9[k])) begin
          failures++; $display("FAIL LUT9 ts %0d bit %0d", ts, k);
        end
      end
      for (int k = 0; k < 12; k++) begin
        checks++;
        if (a12[ts][k] !== ref_bit(h, ts, d12[k], o12[k])) begin
          failures++; $display("FAIL LUT12 ts %0d bit %0d", ts, k);
        end
        if ((ts % WI + o12[k] < 0 || ts % WI + o12[k] >= WI) && a12[ts][k]) wrap_hits++;
      end
    end
  endtask

  initial begin
    logic [NUM_LAYERS-1:0][W-1:0] h;
    // single hits
    for (int l = 0; l < int'(NUM_LAYERS); l++) begin
      for (int w = 0; w < int'(W); w++) begin
        h = '0; h[l][w] = 1'b1;
        hits = h;
        @(posedge clk); #1;
        check_all(h);
      end
    end
    // random frames
    for (int i = 0; i < 200; i++) begin
      for (int l = 0; l < int'(NUM_LAYERS); l++) h[l] = W'($urandom);
      hits = h;
      @(posedge clk); #1;
      check_all(h);
    end
    if (wrap_hits == 0) begin
      failures++; $display("FAIL phi wrap-around never exercised");
    end
    $display("wrap-around hits seen: %0d", wrap_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
