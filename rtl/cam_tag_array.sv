// CAM tag store of a highly associative cache.
//
// Each of the SETS sets holds WAYS tag entries with a valid bit. A search
// compares the tag with every entry of the addressed set at once, as the
// match lines of a CAM do, and reports a hit and the index of the matching
// way; that way, together with the set, selects one data-array line. The
// search is combinational: result in the same cycle as the search inputs.
// A write stores a tag into one way and marks it valid, at the clock edge.
// Reset clears every valid bit, so that no stale tag can match.
//
// The CAM tag organisation, 32 ways and 32 sets come from the design; the
// flip-flop model of the CAM cells, the single write port and the reset
// behaviour are this design's own choices. The match vector is checked to
// be one-hot or empty: the refill logic never loads the same tag twice
// into one set.
module cam_tag_array #(
  parameter int unsigned SETS  = fmp_pkg::SETS,
  parameter int unsigned WAYS  = fmp_pkg::WAYS,
  parameter int unsigned TAG_W = 22,
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // search port
  input  logic [SET_W-1:0] srch_set,
  input  logic [TAG_W-1:0] srch_tag,
  output logic             srch_hit,
  output logic [WAY_W-1:0] srch_way,
  // write port (line fill)
  input  logic             wr_en,
  input  logic [SET_W-1:0] wr_set,
  input  logic [WAY_W-1:0] wr_way,
  input  logic [TAG_W-1:0] wr_tag
);

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid[s] <= '0;
    end else if (wr_en) begin
      valid[wr_set][wr_way] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) tags[wr_set][wr_way] <= wr_tag;
  end

  // match lines of the addressed set
  always_comb begin
    for (int w = 0; w < WAYS; w++)
      match[w] = valid[srch_set][w] && (tags[srch_set][w] == srch_tag);
  end

  // encode the match line into a way number
  always_comb begin
    srch_hit = |match;
    srch_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (match[w]) srch_way = WAY_W'(w);
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(match))
    else $error("cam_tag_array: several ways match one tag");

endmodule
