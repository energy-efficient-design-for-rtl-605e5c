// Self-checking testbench for the Predicted Mask Table at its default size
// (1024 entries). It clears every entry, then applies random updates and
// clears, with both in the same cycle at times, keeping its own copy of the
// table, and checks random reads against it (the clear must win).
module tb_pmt;
  localparam int LINES = 1024;

  logic clk = 1'b0;
  logic [9:0] rd_line, upd_line, clr_line;
  logic rd_taken, upd_en, upd_taken, clr_en;
  logic [2:0] rd_pos, upd_pos;

  int checks = 0, failures = 0;
  logic [3:0] model [LINES];

  pmt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_line(input int l);
    rd_line = 10'(l);
    #1;
    checks++;
    if ({rd_taken, rd_pos} !== model[l]) begin
      failures++;
      $display("FAIL line %0d: got %b/%0d expected %b/%0d", l, rd_taken, rd_pos,
               model[l][3], model[l][2:0]);
    end
  endtask

  initial begin
    upd_en = 0; clr_en = 0; upd_line = 0; clr_line = 0; upd_taken = 0; upd_pos = 0; rd_line = 0;
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk);
      clr_en = 1; clr_line = 10'(l); model[l] = '0;
    end
    @(negedge clk) clr_en = 0;
    for (int l = 0; l < LINES; l += 37) check_line(l);

    for (int i = 0; i < 6000; i++) begin
      @(negedge clk);
      upd_en = ($urandom_range(3) != 0);
      clr_en = ($urandom_range(5) == 0);
      upd_line = 10'($urandom_range(LINES-1));
      clr_line = ($urandom_range(1) == 1) ? upd_line : 10'($urandom_range(LINES-1));
      upd_taken = ($urandom_range(1) == 1);
      upd_pos = 3'($urandom);
      if (clr_en) model[clr_line] = '0;
      else if (upd_en) model[upd_line] = {upd_taken, upd_pos};
      @(negedge clk);
      upd_en = 0; clr_en = 0;
      check_line($urandom_range(LINES-1));
      check_line(int'(upd_line));
      check_line(int'(clr_line));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
