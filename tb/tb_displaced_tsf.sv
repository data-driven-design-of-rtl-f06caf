// tb_displaced_tsf: end-to-end test of the track segment finder at its default
// size (LUT-12 hitmaps, SL8 with 5 x 384 wires, 768 track segments, 16 output
// slots).
//
// Two runs, each preceded by loading a different random pattern table through
// the configuration port (the reconfiguration between runs). Each run sends
// frames of random hits whose density sweeps from empty to busy, with gaps in
// hits_valid_i. A reference model built here (its own hitmap table, a copy of
// the pattern table, selection of the first 16 accepted segments) predicts
// every output frame, which is compared exactly 8 clocks after its input. A
// separate single-frame probe measures the latency. The run counts frames that
// overflowed the link budget, accepted segments in the lower and the upper
// half, accepted segments whose hitmap wraps around in phi and idle frames,
// and fails if any of them never occurred.
module tb_displaced_tsf;
  import tsf_pkg::*;
  localparam int WIRES   = 384;
  localparam int NUM_TS  = 2 * WIRES;
  localparam int NB      = 12;
  localparam int MAX_OUT = 16;
  localparam int LAT     = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hits_valid = 1'b0;
  logic [NUM_LAYERS-1:0][WIRES-1:0] hits = '0;
  logic cfg_we = 1'b0;
  logic [NB-1:0] cfg_addr = '0;
  logic cfg_data = 1'b0;
  logic ts_valid;
  logic [MAX_OUT-1:0] slot_v;
  logic [MAX_OUT-1:0][9:0] ts_id;
  logic [9:0] found, dropped;

  displaced_tsf dut (
    .clk(clk), .rst_n(rst_n),
    .hits_valid_i(hits_valid), .hits_i(hits),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_data_i(cfg_data),
    .ts_valid_o(ts_valid), .ts_slot_valid_o(slot_v), .ts_id_o(ts_id),
    .ts_found_o(found), .ts_dropped_o(dropped)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_lower = 0, n_upper = 0, n_wrap = 0, n_idle = 0, n_reload = 0;

  // LUT-12 hitmap: layer distance and wire offset of each address bit
  int hd [NB] = '{0, 0, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2};
  int ho [NB] = '{0, 1, -1, 0, 1, 2, -2, -1, 0, 1, 2, 3};

  bit pat [4096];

  typedef struct {
    bit v;
    int n;
    int ids [MAX_OUT];
    bit wrap;
  } frame_t;

  frame_t q [$];

  function automatic frame_t ref_frame(logic [NUM_LAYERS-1:0][WIRES-1:0] h, bit v);
    frame_t r;
    r.v = v; r.n = 0; r.wrap = 1'b0;
    for (int k = 0; k < MAX_OUT; k++) r.ids[k] = -1;
    for (int ts = 0; ts < NUM_TS; ts++) begin
      int w, up;
      logic [NB-1:0] a;
      w  = ts % WIRES;
      up = ts / WIRES;
      for (int k = 0; k < NB; k++)
        a[k] = h[up ? 2 + hd[k] : 2 - hd[k]][(w + ho[k] + WIRES) % WIRES];
      if (pat[a]) begin
        if (r.n < MAX_OUT) begin
          r.ids[r.n] = ts;
          if (w < 2 || w > WIRES - 4) r.wrap = 1'b1;
        end
        r.n++;
      end
    end
    return r;
  endfunction

  task automatic load_table(int permille);
    for (int a = 0; a < 4096; a++) begin
      pat[a] = (a != 0) && ($urandom_range(0, 999) < permille);
      cfg_we = 1'b1; cfg_addr = NB'(a); cfg_data = pat[a];
      @(posedge clk); #1;
    end
    cfg_we = 1'b0;
    n_reload++;
  endtask

  task automatic check_out(frame_t e);
    checks++;
    if (ts_valid !== e.v) begin failures++; $display("FAIL valid exp %0b got %0b", e.v, ts_valid); end
    if (!e.v) begin n_idle++; return; end
    checks += 2;
    if (found !== 10'(e.n)) begin failures++; $display("FAIL found exp %0d got %0d", e.n, found); end
    if (dropped !== 10'(e.n > MAX_OUT ? e.n - MAX_OUT : 0)) begin
      failures++; $display("FAIL dropped %0d for %0d found", dropped, e.n);
    end
    for (int k = 0; k < MAX_OUT; k++) begin
      checks++;
      if (e.ids[k] < 0) begin
        if (slot_v[k] !== 1'b0) begin failures++; $display("FAIL slot %0d not empty", k); end
      end else begin
        if (slot_v[k] !== 1'b1 || ts_id[k] !== 10'(e.ids[k])) begin
          failures++; $display("FAIL slot %0d exp %0d got v=%0b id=%0d", k, e.ids[k], slot_v[k], ts_id[k]);
        end
        if (e.ids[k] < WIRES) n_lower++; else n_upper++;
      end
    end
    if (e.n > MAX_OUT) n_overflow++;
    if (e.wrap) n_wrap++;
  endtask

  task automatic run_frames(int nframes);
    logic [NUM_LAYERS-1:0][WIRES-1:0] h;
    int dens;
    q.delete();
    for (int f = 0; f < nframes; f++) begin
      dens = (f * 7) % 120;  // hit probability in per mille, 0 .. 11.9 %
      for (int l = 0; l < NUM_LAYERS; l++)
        for (int w = 0; w < WIRES; w++)
          h[l][w] = ($urandom_range(0, 999) < dens);
      hits       = h;
      hits_valid = ($urandom_range(0, 7) != 0);
      q.push_back(ref_frame(h, hits_valid));
      @(posedge clk); #1;
      if (q.size() >= LAT) check_out(q.pop_front());
    end
    hits_valid = 1'b0;
    hits = '0;
    for (int f = 0; f < LAT - 1; f++) begin
      @(posedge clk); #1;
      check_out(q.pop_front());
    end
  endtask

  task automatic latency_probe();
    int cyc;
    repeat (LAT + 2) @(posedge clk);
    #1 hits_valid = 1'b1;
    @(posedge clk);
    #1 hits_valid = 1'b0;
    cyc = 1;
    while (!ts_valid && cyc < 40) begin
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != LAT) begin failures++; $display("FAIL latency %0d clocks, expected %0d", cyc, LAT); end
    else $display("latency %0d clocks", cyc);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // run 1
    load_table(60);
    latency_probe();
    run_frames(300);
    // run 2, new pat
    load_table(150);
    run_frames(300);
    $display("overflow=%0d lower=%0d upper=%0d wrap=%0d idle=%0d reload=%0d",
             n_overflow, n_lower, n_upper, n_wrap, n_idle, n_reload);
    if (n_overflow == 0) begin failures++; $display("FAIL no overflow frame"); end
    if (n_lower == 0 || n_upper == 0) begin failures++; $display("FAIL a half never accepted"); end
    if (n_wrap == 0) begin failures++; $display("FAIL no wrap-around segment"); end
    if (n_idle == 0) begin failures++; $display("FAIL no idle frame"); end
    if (n_reload < 2) begin failures++; $display("FAIL no reconfiguration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
