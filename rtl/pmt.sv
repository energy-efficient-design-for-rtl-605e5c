// Predicted Mask Table (PMT).
//
// One entry per instruction-cache line (LINES entries, the same number as
// the cache has lines), addressed by the line number {set, way} that the
// CAM match selects. An entry says whether the line holds a branch that the
// branch predictor predicted taken the last time the line was fetched, and
// the word position of that branch. The read is combinational, so that the
// entry of the line being fetched is available in the fetch cycle to gate
// the wordline segments. A write updates one entry at the clock edge; the
// line-fill clear port has priority over the update port.
//
// The table size (one entry per cache line) and its content (is there a
// branch to be taken) come from the design. Storing the branch's word
// position, the combinational read and the write-priority rule are this
// design's own choices. Entries need no reset: an entry is read only for a
// line that hits, and every line is cleared when it is filled.
module pmt #(
  parameter int unsigned LINES = fmp_pkg::LINES,
  parameter int unsigned WPL   = fmp_pkg::WPL,
  localparam int unsigned LINE_W = (LINES > 1) ? $clog2(LINES) : 1,
  localparam int unsigned POS_W  = (WPL > 1) ? $clog2(WPL) : 1
) (
  input  logic              clk,
  // read port
  input  logic [LINE_W-1:0] rd_line,
  output logic              rd_taken,
  output logic [POS_W-1:0]  rd_pos,
  // update port (branch predictor outcome)
  input  logic              upd_en,
  input  logic [LINE_W-1:0] upd_line,
  input  logic              upd_taken,
  input  logic [POS_W-1:0]  upd_pos,
  // clear port (line fill)
  input  logic              clr_en,
  input  logic [LINE_W-1:0] clr_line
);

  logic [POS_W:0] mem [LINES];  // {taken, pos}

  always_ff @(posedge clk) begin
    if (clr_en)      mem[clr_line] <= '0;
    else if (upd_en) mem[upd_line] <= {upd_taken, upd_pos};
  end

  assign {rd_taken, rd_pos} = mem[rd_line];

endmodule
