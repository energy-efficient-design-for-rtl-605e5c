// Self-checking testbench for seg_data_array at its default size (1024 lines
// of eight 32-bit words). It writes random lines, keeping its own copy, then
// reads lines with random word-enable masks and checks, one cycle after each
// read, that the enabled words carry the stored data and the disabled words
// read as zero. It also checks that the output holds when no read is made.
module tb_seg_data_array;
  localparam int LINES = 1024, WPL = 8, WORD_W = 32;

  logic clk = 1'b0;
  logic rd_en, wr_en;
  logic [9:0] rd_line, wr_line;
  logic [WPL-1:0] rd_word_en;
  logic [WPL-1:0][WORD_W-1:0] rd_data, wr_data;

  int checks = 0, failures = 0;
  logic [WPL-1:0][WORD_W-1:0] model [LINES];
  bit written [LINES];

  seg_data_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [WPL-1:0][WORD_W-1:0] expect_of(input int l, input logic [WPL-1:0] en);
    logic [WPL-1:0][WORD_W-1:0] e;
    for (int w = 0; w < WPL; w++) e[w] = en[w] ? model[l][w] : '0;
    return e;
  endfunction

  initial begin
    logic [WPL-1:0][WORD_W-1:0] exp_d;
    rd_en = 0; wr_en = 0; rd_line = 0; wr_line = 0; rd_word_en = 0; wr_data = '0;
    for (int l = 0; l < LINES; l++) written[l] = 0;

    for (int i = 0; i < 1500; i++) begin
      int l;
      l = $urandom_range(LINES-1);
      @(negedge clk);
      wr_en = 1; wr_line = 10'(l);
      for (int w = 0; w < WPL; w++) wr_data[w] = $urandom;
      model[l] = wr_data; written[l] = 1;
    end
    @(negedge clk) wr_en = 0;

    for (int i = 0; i < 4000; i++) begin
      int l;
      do l = $urandom_range(LINES-1); while (!written[l]);
      @(negedge clk);
      rd_en = 1; rd_line = 10'(l); rd_word_en = WPL'($urandom);
      exp_d = expect_of(l, rd_word_en);
      @(negedge clk);
      rd_en = ($urandom_range(1) == 1);
      rd_line = 10'($urandom_range(LINES-1));
      rd_word_en = '0;
      checks++;
      if (rd_data !== exp_d) begin
        failures++;
        $display("FAIL line %0d: got %h expected %h", l, rd_data, exp_d);
      end
      if (!rd_en) begin
        // no read: the output must hold
        @(negedge clk);
        checks++;
        if (rd_data !== exp_d) begin
          failures++;
          $display("FAIL hold: got %h expected %h", rd_data, exp_d);
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
