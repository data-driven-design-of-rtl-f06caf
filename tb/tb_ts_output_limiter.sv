// tb_ts_output_limiter: self-checking test of the link-budget selector.
//
// 100 track segments in groups of 32 (the last group partly empty) and a
// budget of 8 slots. Every clock gets a random frame whose density is drawn
// from empty to full, so frames below, at and above the budget all occur.
// The reference list, the found and dropped counts and the valid flag are
// queued in the testbench and compared exactly 4 clocks later. The run counts
// frames with overflow, with an exactly full budget and with no segment at
// all, and fails if any of these never happened.
module tb_ts_output_limiter;
  localparam int unsigned NUM_TS  = 100;
  localparam int unsigned MAX_OUT = 8;
  localparam int unsigned ID_W    = $clog2(NUM_TS);
  localparam int unsigned CNT_W   = $clog2(NUM_TS + 1);
  localparam int          LAT     = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i = 1'b0;
  logic [NUM_TS-1:0] flags = '0;
  logic valid_o;
  logic [MAX_OUT-1:0] sv;
  logic [MAX_OUT-1:0][ID_W-1:0] sid;
  logic [CNT_W-1:0] found, dropped;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_full = 0, n_empty = 0;

  ts_output_limiter #(.NUM_TS(NUM_TS), .MAX_OUT(MAX_OUT), .GROUP(32)) dut (
    .clk(clk), .rst_n(rst_n), .valid_i(valid_i), .flags_i(flags),
    .valid_o(valid_o), .slot_valid_o(sv), .slot_id_o(sid),
    .found_o(found), .dropped_o(dropped)
  );

  always #5 clk = ~clk;

  typedef struct {
    bit                  v;
    int                  n;
    int                  ids [MAX_OUT];
  } frame_t;

  frame_t q [$];

  function automatic frame_t ref_frame(logic [NUM_TS-1:0] f, bit v);
    frame_t r;
    r.v = v;
    r.n = 0;
    for (int k = 0; k < int'(MAX_OUT); k++) r.ids[k] = -1;
    for (int i = 0; i < int'(NUM_TS); i++) begin
      if (f[i]) begin
        if (r.n < int'(MAX_OUT)) r.ids[r.n] = i;
        r.n++;
      end
    end
    return r;
  endfunction

  task automatic check_out(frame_t e);
    checks++;
    if (valid_o !== e.v) begin failures++; $display("FAIL valid exp %0b got %0b", e.v, valid_o); end
    if (!e.v) return;
    checks += 2;
    if (found !== CNT_W'(e.n)) begin failures++; $display("FAIL found exp %0d got %0d", e.n, found); end
    if (dropped !== CNT_W'(e.n > int'(MAX_OUT) ? e.n - int'(MAX_OUT) : 0)) begin
      failures++; $display("FAIL dropped got %0d for %0d found", dropped, e.n);
    end
    for (int k = 0; k < int'(MAX_OUT); k++) begin
      checks++;
      if (e.ids[k] < 0) begin
        if (sv[k] !== 1'b0) begin failures++; $display("FAIL slot %0d should be empty", k); end
      end else if (sv[k] !== 1'b1 || sid[k] !== ID_W'(e.ids[k])) begin
        failures++; $display("FAIL slot %0d exp %0d got v=%0b id=%0d", k, e.ids[k], sv[k], sid[k]);
      end
    end
    if (e.n > int'(MAX_OUT)) n_overflow++;
    if (e.n == int'(MAX_OUT)) n_full++;
    if (e.n == 0) n_empty++;
  endtask

  initial begin
    logic [NUM_TS-1:0] f;
    int dens, placed, pos;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 3000; c++) begin
      dens = $urandom_range(0, 40);
      f = '0;
      if (c % 5 == 1) begin
        // exactly MAX_OUT segments, spread at random
        placed = 0;
        while (placed < int'(MAX_OUT)) begin
          pos = $urandom_range(0, NUM_TS - 1);
          if (!f[pos]) begin f[pos] = 1'b1; placed++; end
        end
      end else begin
        for (int i = 0; i < int'(NUM_TS); i++) f[i] = ($urandom_range(0, 399) < dens * (c % 3 == 0 ? 1 : 10) / 4);
      end
      flags   = f;
      valid_i = ($urandom_range(0, 9) != 0);
      q.push_back(ref_frame(f, valid_i));
      @(posedge clk); #1;
      if (q.size() >= LAT) check_out(q.pop_front());
    end
    valid_i = 1'b0;
    repeat (LAT) begin
      q.push_back(ref_frame('0, 1'b0));
      @(posedge clk); #1;
      check_out(q.pop_front());
    end
    $display("frames: overflow=%0d full=%0d empty=%0d", n_overflow, n_full, n_empty);
    if (n_overflow == 0 || n_full == 0 || n_empty == 0) begin
      failures++; $display("FAIL a frame class never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
