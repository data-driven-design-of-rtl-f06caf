// tb_displaced_tsf_versions: end-to-end test of the two smaller hitmap sizes on
// the SL8 geometry (5 x 384 wires, 768 track segments).
//
// u_lut5 is a LUT-5 finder whose pattern table comes from the configuration
// file lut5_patterns.mem at start-up: 6 of the 32 patterns are accepted: the
// address wire with one wire in each of the two layers beyond it, or the
// address wire with both wires one layer out and one wire two layers out. u_lut9 is a LUT-9 finder whose 512-entry table is
// loaded at random through the configuration port. Both see the same random
// hit frames. A reference model with hand-written hitmap tables predicts each
// output frame, compared 8 clocks after its input. Frames above the link
// budget must occur for both sizes.
module tb_displaced_tsf_versions;
  import tsf_pkg::*;
  localparam int WIRES   = 384;
  localparam int NUM_TS  = 2 * WIRES;
  localparam int MAX_OUT = 16;
  localparam int LAT     = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic hits_valid = 1'b0;
  logic [NUM_LAYERS-1:0][WIRES-1:0] hits = '0;
  logic cfg_we = 1'b0;
  logic [8:0] cfg_addr = '0;
  logic cfg_data = 1'b0;

  logic               v5, v9;
  logic [MAX_OUT-1:0] sv5, sv9;
  logic [MAX_OUT-1:0][9:0] id5, id9;
  logic [9:0] f5, f9, d5, d9;

  displaced_tsf #(.VERSION(LUT5), .INIT_FILE("tb/lut5_patterns.mem")) u_lut5 (
    .clk(clk), .rst_n(rst_n), .hits_valid_i(hits_valid), .hits_i(hits),
    .cfg_we_i(1'b0), .cfg_addr_i(5'd0), .cfg_data_i(1'b0),
    .ts_valid_o(v5), .ts_slot_valid_o(sv5), .ts_id_o(id5),
    .ts_found_o(f5), .ts_dropped_o(d5)
  );

  displaced_tsf #(.VERSION(LUT9)) u_lut9 (
    .clk(clk), .rst_n(rst_n), .hits_valid_i(hits_valid), .hits_i(hits),
    .cfg_we_i(cfg_we), .cfg_addr_i(cfg_addr), .cfg_data_i(cfg_data),
    .ts_valid_o(v9), .ts_slot_valid_o(sv9), .ts_id_o(id9),
    .ts_found_o(f9), .ts_dropped_o(d9)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_over [2] = '{0, 0};
  int n_acc  [2] = '{0, 0};

  // hitmap wires {layer distance, offset} in address bit order
  int hd5 [5] = '{0, 1, 1, 2, 2};
  int ho5 [5] = '{0, 0, 1, 0, 1};
  int hd9 [9] = '{0, 1, 1, 1, 2, 2, 2, 2, 2};
  int ho9 [9] = '{0, -1, 0, 1, -2, -1, 0, 1, 2};

  bit pat5 [32];
  bit pat9 [512];

  typedef struct {
    bit v;
    int n;
    int ids [MAX_OUT];
  } frame_t;

  frame_t q5 [$], q9 [$];

  function automatic frame_t ref_frame(logic [NUM_LAYERS-1:0][WIRES-1:0] h, bit v, bit big);
    frame_t r;
    r.v = v; r.n = 0;
    for (int k = 0; k < MAX_OUT; k++) r.ids[k] = -1;
    for (int ts = 0; ts < NUM_TS; ts++) begin
      int w, up, a, nb;
      bit acc;
      w  = ts % WIRES;
      up = ts / WIRES;
      a  = 0;
      nb = big ? 9 : 5;
      for (int k = 0; k < nb; k++) begin
        int d, o;
        d = big ? hd9[k] : hd5[k];
        o = big ? ho9[k] : ho5[k];
        if (h[up ? 2 + d : 2 - d][(w + o + WIRES) % WIRES]) a |= 1 << k;
      end
      acc = big ? pat9[a] : pat5[a];
      if (acc) begin
        if (r.n < MAX_OUT) r.ids[r.n] = ts;
        r.n++;
      end
    end
    return r;
  endfunction

  task automatic check_out(frame_t e, bit big, logic v, logic [MAX_OUT-1:0] sv,
                           logic [MAX_OUT-1:0][9:0] id, logic [9:0] fnd, logic [9:0] drp);
    checks++;
    if (v !== e.v) begin failures++; $display("FAIL %0d valid", big); end
    if (!e.v) return;
    checks += 2;
    if (fnd !== 10'(e.n)) begin failures++; $display("FAIL %0d found exp %0d got %0d", big, e.n, fnd); end
    if (drp !== 10'(e.n > MAX_OUT ? e.n - MAX_OUT : 0)) begin failures++; $display("FAIL %0d dropped", big); end
    for (int k = 0; k < MAX_OUT; k++) begin
      checks++;
      if (e.ids[k] < 0) begin
        if (sv[k] !== 1'b0) begin failures++; $display("FAIL %0d slot %0d not empty", big, k); end
      end else if (sv[k] !== 1'b1 || id[k] !== 10'(e.ids[k])) begin
        failures++; $display("FAIL %0d slot %0d exp %0d got %0d", big, k, e.ids[k], id[k]);
      end
    end
    if (e.n > MAX_OUT) n_over[big]++;
    n_acc[big] += e.n;
  endtask

  initial begin
    logic [NUM_LAYERS-1:0][WIRES-1:0] h;
    int dens;
    $readmemb("tb/lut5_patterns.mem", pat5);
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int a = 0; a < 512; a++) begin
      pat9[a] = (a != 0) && ($urandom_range(0, 99) < 8);
      cfg_we = 1'b1; cfg_addr = 9'(a); cfg_data = pat9[a];
      @(posedge clk); #1;
    end
    cfg_we = 1'b0;
    for (int f = 0; f < 400; f++) begin
      dens = (f * 11) % 300;  // per mille
      for (int l = 0; l < NUM_LAYERS; l++)
        for (int w = 0; w < WIRES; w++)
          h[l][w] = ($urandom_range(0, 999) < dens);
      hits       = h;
      hits_valid = ($urandom_range(0, 7) != 0);
      q5.push_back(ref_frame(h, hits_valid, 1'b0));
      q9.push_back(ref_frame(h, hits_valid, 1'b1));
      @(posedge clk); #1;
      if (q5.size() >= LAT) begin
        check_out(q5.pop_front(), 1'b0, v5, sv5, id5, f5, d5);
        check_out(q9.pop_front(), 1'b1, v9, sv9, id9, f9, d9);
      end
    end
    $display("LUT5: accepted=%0d overflow frames=%0d; LUT9: accepted=%0d overflow frames=%0d",
             n_acc[0], n_over[0], n_acc[1], n_over[1]);
    if (n_over[0] == 0 || n_over[1] == 0) begin failures++; $display("FAIL no overflow frame"); end
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
