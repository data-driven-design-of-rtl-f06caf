// ts_output_limiter: fits the positively classified track segments of one frame
// into the output link budget.
//
// Input is one flag per track segment (TS) and frame; TS i has identifier i.
// The first MAX_OUT flagged TS in identifier order are written, in that order,
// into output slots 0..MAX_OUT-1; slot_valid_o marks the filled slots, which
// are always the lowest ones. Flagged TS beyond the budget are discarded, and
// the frame reports how many TS were flagged (found_o) and how many were
// dropped (dropped_o).
//
// Pipeline (latency 4 clocks, one frame per clock):
//   1. register the flags and count them in groups of GROUP;
//   2. exclusive prefix sum of the group counts, and the frame total;
//   3. rank of each TS = group prefix + flags below it in its group; a TS is
//      kept when flagged and its rank is below MAX_OUT;
//   4. each slot s collects the identifier of the kept TS of rank s.
//
// Discarding TS above the link bandwidth follows the design description. The
// budget MAX_OUT, the identifier-order priority, the slot format and the
// counters are this design's choice.
module ts_output_limiter #(
  parameter int unsigned NUM_TS  = 768,
  parameter int unsigned MAX_OUT = 16,
  parameter int unsigned GROUP   = 32,
  localparam int unsigned ID_W   = $clog2(NUM_TS),
  localparam int unsigned CNT_W  = $clog2(NUM_TS + 1)
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             valid_i,
  input  logic [NUM_TS-1:0]                flags_i,
  output logic                             valid_o,
  output logic [MAX_OUT-1:0]               slot_valid_o,
  output logic [MAX_OUT-1:0][ID_W-1:0]     slot_id_o,
  output logic [CNT_W-1:0]                 found_o,
  output logic [CNT_W-1:0]                 dropped_o
);

  localparam int unsigned NG     = (NUM_TS + GROUP - 1) / GROUP;
  localparam int unsigned GCNT_W = $clog2(GROUP + 1);

  // ---- stage 1: flags and group counts
  logic [NUM_TS-1:0]            flags_s1;
  logic [NG-1:0][GCNT_W-1:0]    gcnt_d, gcnt_s1;
  logic                         v_s1;

  always_comb begin
    for (int g = 0; g < int'(NG); g++) begin
      gcnt_d[g] = '0;
      for (int j = 0; j < int'(GROUP); j++) begin
        if (g * int'(GROUP) + j < int'(NUM_TS))
          gcnt_d[g] += GCNT_W'(flags_i[g * int'(GROUP) + j]);
      end
    end
  end

  always_ff @(posedge clk) begin
    flags_s1 <= flags_i;
    gcnt_s1  <= gcnt_d;
  end

  // ---- stage 2: prefix sums of the group counts
  logic [NUM_TS-1:0]            flags_s2;
  logic [NG-1:0][CNT_W-1:0]     gpre_d, gpre_s2;
  logic [CNT_W-1:0]             total_d, total_s2;
  logic                         v_s2;

  always_comb begin
    total_d = '0;
    for (int g = 0; g < int'(NG); g++) begin
      gpre_d[g] = total_d;
      total_d  += CNT_W'(gcnt_s1[g]);
    end
  end

  always_ff @(posedge clk) begin
    flags_s2 <= flags_s1;
    gpre_s2  <= gpre_d;
    total_s2 <= total_d;
  end

  // ---- stage 3: rank of every TS, keep decision
  localparam int unsigned SLOT_W = (MAX_OUT > 1) ? $clog2(MAX_OUT) : 1;

  logic [NUM_TS-1:0]              keep_d, keep_s3;
  logic [NUM_TS-1:0][SLOT_W-1:0]  rank_d, rank_s3;
  logic [CNT_W-1:0]               total_s3;
  logic                           v_s3;

  always_comb begin
    keep_d = '0;
    rank_d = '0;
    for (int g = 0; g < int'(NG); g++) begin
      logic [CNT_W-1:0] r;
      r = gpre_s2[g];
      for (int j = 0; j < int'(GROUP); j++) begin
        if (g * int'(GROUP) + j < int'(NUM_TS)) begin
          keep_d[g * GROUP + j] = flags_s2[g * GROUP + j] && (r < CNT_W'(MAX_OUT));
          rank_d[g * GROUP + j] = SLOT_W'(r);
          r += CNT_W'(flags_s2[g * GROUP + j]);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    keep_s3  <= keep_d;
    rank_s3  <= rank_d;
    total_s3 <= total_s2;
  end

  // ---- stage 4: slot multiplexers
  logic [MAX_OUT-1:0]             sv_d;
  logic [MAX_OUT-1:0][ID_W-1:0]   sid_d;

  for (genvar s = 0; s < int'(MAX_OUT); s++) begin : g_slot
    always_comb begin
      sv_d[s]  = 1'b0;
      sid_d[s] = '0;
      for (int i = 0; i < int'(NUM_TS); i++) begin
        if (keep_s3[i] && rank_s3[i] == SLOT_W'(s)) begin
          sv_d[s]  = 1'b1;
          sid_d[s] = sid_d[s] | ID_W'(i);
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    slot_valid_o <= sv_d;
    slot_id_o    <= sid_d;
    found_o      <= total_s3;
    dropped_o    <= (total_s3 > CNT_W'(MAX_OUT)) ? total_s3 - CNT_W'(MAX_OUT) : '0;
  end

  // ---- frame valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_s1    <= 1'b0;
      v_s2    <= 1'b0;
      v_s3    <= 1'b0;
      valid_o <= 1'b0;
    end else begin
      v_s1    <= valid_i;
      v_s2    <= v_s1;
      v_s3    <= v_s2;
      valid_o <= v_s3;
    end
  end

  // Filled slots are always the lowest ones.
  a_slots_packed : assert property (@(posedge clk) disable iff (!rst_n)
    valid_o |-> ((slot_valid_o & (slot_valid_o + 1'b1)) == '0));

endmodule
