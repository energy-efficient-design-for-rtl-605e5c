// Self-checking testbench for cam_tag_array at its default size (32 sets of
// 32 ways). It checks that nothing matches after reset, then fills ways with
// random tags, keeping its own copy of the contents, and searches for stored
// tags (expecting the right way), for tags never stored (expecting a miss)
// and for stored tags in the wrong set (expecting a miss). It also
// overwrites ways and checks that the old tag no longer matches.
module tb_cam_tag_array;
  localparam int SETS = 32, WAYS = 32, TAG_W = 22;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [4:0] srch_set, wr_set, srch_way, wr_way;
  logic [TAG_W-1:0] srch_tag, wr_tag;
  logic srch_hit, wr_en;

  int checks = 0, failures = 0;
  logic [TAG_W-1:0] m_tag [SETS][WAYS];
  logic             m_val [SETS][WAYS];

  cam_tag_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic exp_hit, input logic [4:0] exp_way, input string what);
    #1;
    checks++;
    if (srch_hit !== exp_hit || (exp_hit && srch_way !== exp_way)) begin
      failures++;
      $display("FAIL %s: set %0d tag %h hit %b way %0d, expected hit %b way %0d",
               what, srch_set, srch_tag, srch_hit, srch_way, exp_hit, exp_way);
    end
  endtask

  task automatic write(input int s, input int w, input logic [TAG_W-1:0] t);
    @(negedge clk);
    wr_en = 1'b1; wr_set = 5'(s); wr_way = 5'(w); wr_tag = t;
    @(negedge clk);
    wr_en = 1'b0;
    m_tag[s][w] = t; m_val[s][w] = 1'b1;
  endtask

  // tag not present in set s of the model
  function automatic logic [TAG_W-1:0] fresh_tag(input int s);
    logic [TAG_W-1:0] t;
    bit clash;
    do begin
      t = TAG_W'($urandom);
      clash = 0;
      for (int w = 0; w < WAYS; w++) if (m_val[s][w] && m_tag[s][w] == t) clash = 1;
    end while (clash);
    return t;
  endfunction

  initial begin
    wr_en = 0; wr_set = 0; wr_way = 0; wr_tag = 0; srch_set = 0; srch_tag = 0;
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) m_val[s][w] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // nothing matches after reset
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      srch_set = 5'($urandom); srch_tag = TAG_W'($urandom);
      check(1'b0, '0, "after reset");
    end

    // fill random ways with distinct tags
    for (int i = 0; i < 600; i++) begin
      int s, w;
      s = $urandom_range(SETS-1); w = $urandom_range(WAYS-1);
      write(s, w, fresh_tag(s));
    end

    // search: stored tags, missing tags, stored tag in another set
    for (int i = 0; i < 3000; i++) begin
      int s, w;
      @(negedge clk);
      s = $urandom_range(SETS-1); w = $urandom_range(WAYS-1);
      case ($urandom_range(2))
        0: begin
          srch_set = 5'(s);
          if (m_val[s][w]) begin srch_tag = m_tag[s][w]; check(1'b1, 5'(w), "stored tag"); end
          else begin srch_tag = fresh_tag(s); check(1'b0, '0, "absent tag"); end
        end
        1: begin
          srch_set = 5'(s); srch_tag = fresh_tag(s);
          check(1'b0, '0, "absent tag");
        end
        default: begin
          // tag of way w in set s, searched in set s^1 where it is absent
          if (m_val[s][w]) begin
            bit present;
            present = 0;
            for (int v = 0; v < WAYS; v++)
              if (m_val[s^1][v] && m_tag[s^1][v] == m_tag[s][w]) present = 1;
            if (!present) begin
              srch_set = 5'(s ^ 1); srch_tag = m_tag[s][w];
              check(1'b0, '0, "tag of another set");
            end
          end
        end
      endcase
    end

    // overwrite: the old tag goes, the new one matches
    for (int i = 0; i < 100; i++) begin
      int s, w;
      logic [TAG_W-1:0] old_t, new_t;
      s = $urandom_range(SETS-1); w = $urandom_range(WAYS-1);
      if (!m_val[s][w]) write(s, w, fresh_tag(s));
      old_t = m_tag[s][w];
      new_t = fresh_tag(s);
      write(s, w, new_t);
      srch_set = 5'(s); srch_tag = old_t; check(1'b0, '0, "overwritten tag");
      @(negedge clk);
      srch_tag = new_t; check(1'b1, 5'(w), "new tag");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
