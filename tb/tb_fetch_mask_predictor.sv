// Self-checking testbench for fetch_mask_predictor (8-word lines, 4-word
// fetch, 1024 PMT entries). A reference model of the Predicted Mask Table
// and of the mask rules, written here independently, is driven with random
// fetches and random branch-predictor outcomes. Every cycle the segment,
// target, predicted, fetch and needed masks and the mask-miss flag are
// compared with the model. It counts the cases it exercised: a target mask
// that trims a segment (branch in), a predicted mask that trims it (branch
// out), both at once, and mask misses; each must occur.
module tb_fetch_mask_predictor;
  localparam int LINES = 1024, WPL = 8, FW = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic acc_valid, bp_taken, clr_en, mask_miss;
  logic [9:0] acc_line, clr_line;
  logic [2:0] acc_start, bp_pos;
  logic [7:0] seg_mask, target_mask, pred_mask, fetch_mask, need_mask;

  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0, n_both = 0, n_miss = 0;
  bit       m_taken [LINES];
  int       m_pos   [LINES];

  fetch_mask_predictor dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input string what, input logic [7:0] got, input logic [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: line %0d start %0d got %b expected %b", what, acc_line, acc_start, got, exp);
    end
  endtask

  initial begin
    int lines_used [8];
    acc_valid = 0; acc_line = 0; acc_start = 0; bp_taken = 0; bp_pos = 0; clr_en = 0; clr_line = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // clear the table as line fills would
    for (int l = 0; l < LINES; l++) begin
      @(negedge clk);
      clr_en = 1; clr_line = 10'(l);
      m_taken[l] = 0; m_pos[l] = 0;
    end
    @(negedge clk) clr_en = 0;
    // a few lines, so that entries are revisited often
    for (int i = 0; i < 8; i++) lines_used[i] = $urandom_range(LINES-1);

    for (int i = 0; i < 20000; i++) begin
      int l, st, sf, sl, p;
      logic [7:0] e_seg, e_tgt, e_pred, e_need, e_fetch;
      @(negedge clk);
      l  = lines_used[$urandom_range(7)];
      st = ($urandom_range(2) == 0) ? $urandom_range(7) : ($urandom_range(1) * FW);
      sf = (st / FW) * FW; sl = sf + FW - 1;
      acc_valid = ($urandom_range(7) != 0);
      acc_line = 10'(l); acc_start = 3'(st);
      bp_taken = ($urandom_range(2) == 0);
      p = $urandom_range(sl, st);
      bp_pos = bp_taken ? 3'(p) : 3'($urandom_range(7));
      // reference masks
      for (int w = 0; w < WPL; w++) begin
        e_seg[w]  = (w >= sf && w <= sl);
        e_tgt[w]  = (w >= st);
        e_pred[w] = !(m_taken[l] && m_pos[l] >= st) || (w <= m_pos[l]);
        e_need[w] = e_seg[w] && e_tgt[w] && (!bp_taken || w <= p);
      end
      e_fetch = e_seg & e_tgt & e_pred;
      #1;
      cmp("seg_mask", seg_mask, e_seg);
      cmp("target_mask", target_mask, e_tgt);
      cmp("pred_mask", pred_mask, e_pred);
      cmp("fetch_mask", fetch_mask, e_fetch);
      cmp("need_mask", need_mask, e_need);
      cmp("mask_miss", {7'b0, mask_miss}, {7'b0, acc_valid && |(e_need & ~e_fetch)});
      if (acc_valid) begin
        bit t_in, t_out;
        t_in  = (e_seg & e_tgt) != e_seg;
        t_out = (e_seg & e_pred) != e_seg;
        if (t_in) n_in++;
        if (t_out && (e_fetch != (e_seg & e_tgt))) n_out++;
        if (t_in && (e_fetch != (e_seg & e_tgt))) n_both++;
        if (|(e_need & ~e_fetch)) n_miss++;
        // reference PMT update
        if (bp_taken) begin m_taken[l] = 1; m_pos[l] = p; end
        else if (m_taken[l] && m_pos[l] >= st && m_pos[l] <= sl) begin m_taken[l] = 0; m_pos[l] = 0; end
      end
    end
    @(negedge clk) acc_valid = 0;

    $display("branch in %0d, branch out %0d, both %0d, mask misses %0d", n_in, n_out, n_both, n_miss);
    checks++; if (n_in == 0)   begin failures++; $display("FAIL no branch-in case"); end
    checks++; if (n_out == 0)  begin failures++; $display("FAIL no branch-out case"); end
    checks++; if (n_both == 0) begin failures++; $display("FAIL no combined case"); end
    checks++; if (n_miss == 0) begin failures++; $display("FAIL no mask miss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
