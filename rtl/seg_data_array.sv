// Instruction data array with a segmented wordline.
//
// LINES lines of WPL words. The wordline of a line is split into one
// segment per word, each with its own driver enable, so a read activates
// only the words whose bit in rd_word_en is set; the other words of the
// line are neither driven nor sensed. A read is synchronous: rd_line and
// rd_word_en are sampled at the clock edge and rd_data holds the selected
// words one cycle later, with every word that was not enabled read as zero.
// rd_data keeps its value in cycles without a read. A write (line fill)
// stores a whole line at the clock edge.
//
// Per-word wordline segments and the 8-word, 256-bit line come from the
// design. Zeroing the disabled words, the one-cycle read latency and the
// separate write port are this design's own choices: the array is written
// as a memory, standing in for the SRAM macro with segmented drivers.
module seg_data_array #(
  parameter int unsigned LINES  = fmp_pkg::LINES,
  parameter int unsigned WPL    = fmp_pkg::WPL,
  parameter int unsigned WORD_W = fmp_pkg::WORD_W,
  localparam int unsigned LINE_W = (LINES > 1) ? $clog2(LINES) : 1
) (
  input  logic                       clk,
  // read port
  input  logic                       rd_en,
  input  logic [LINE_W-1:0]          rd_line,
  input  logic [WPL-1:0]             rd_word_en,
  output logic [WPL-1:0][WORD_W-1:0] rd_data,
  // write port
  input  logic                       wr_en,
  input  logic [LINE_W-1:0]          wr_line,
  input  logic [WPL-1:0][WORD_W-1:0] wr_data
);

  // one memory per word column: a wordline segment drives one column
  for (genvar w = 0; w < WPL; w++) begin : g_col
    logic [WORD_W-1:0] col [LINES];

    always_ff @(posedge clk) begin
      if (wr_en) col[wr_line] <= wr_data[w];
    end

    always_ff @(posedge clk) begin
      if (rd_en) rd_data[w] <= rd_word_en[w] ? col[rd_line] : '0;
    end
  end

endmodule
