// End-to-end testbench for fmp_icache at its default size (32 KB, 32 ways,
// 32-byte lines, 4-wide fetch), with no parameter overridden.
//
// A processor front end is modelled around the cache: a dynamic branch
// predictor (a table of per-branch taken bits that change from time to
// time), a synthetic program whose instruction words, branches and branch
// targets are hash functions of the address, and a main memory with random
// handshake delays that returns a whole line per request. The front end
// issues one fetch per cycle; its next address is the target of the first
// predicted-taken branch in the fetched words or else the next aligned
// segment. The run has three phases: a loop in a 2 KB region (hits, the
// PMT learns), a 96 KB region (capacity misses, round-robin evictions),
// and the first region again.
//
// An independent model of the cache contents (tags with round-robin
// replacement) and of the Predicted Mask Table predicts, for every fetch,
// hit or miss, the wordline-segment mask the array must be read with, and
// whether a mask miss occurs. Every response is checked for address, word
// mask and instruction words, and for its latency (1 cycle after a hit,
// 2 after a mask miss). The mechanisms are counted and each must occur:
// hits, misses, evictions, memory back-pressure, branch-in and branch-out
// trimming, both together, and mask misses. The words read are compared
// with a whole-line read and with a full fetch-segment read.
module tb_fmp_icache;
  localparam int FW = 4, WPL = 8, WAYS = 32, SETS = 32;

  logic clk = 1'b0, rst_n = 1'b0;
  logic req_valid, req_ready, req_bp_taken;
  logic [31:0] req_pc;
  logic [2:0]  req_bp_pos;
  logic rsp_valid;
  logic [31:0] rsp_pc;
  logic [FW-1:0][31:0] rsp_words;
  logic [FW-1:0] rsp_mask;
  logic mem_req_valid, mem_req_ready, mem_rsp_valid;
  logic [31:0] mem_req_addr;
  logic [WPL-1:0][31:0] mem_rsp_data;
  logic arr_rd_en, mask_miss;
  logic [WPL-1:0] arr_word_en;

  fmp_icache dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ program
  function automatic logic [31:0] h(input logic [31:0] x, input int k);
    x = x * 32'h9E3779B1 + 32'(k) * 32'h85EBCA6B;
    x ^= x >> 15;
    x *= 32'h2C1B3C6D;
    x ^= x >> 12;
    x *= 32'h297A2D39;
    x ^= x >> 15;
    return x;
  endfunction

  function automatic logic [31:0] insn(input logic [31:0] a);
    return h(a >> 2, 1);
  endfunction

  function automatic bit is_branch(input logic [31:0] a);
    return (h(a >> 2, 2) % 6) == 0;
  endfunction

  logic [31:0] region_base;
  int unsigned region_words;

  function automatic logic [31:0] target_of(input logic [31:0] a);
    return region_base + 32'((h(a >> 2, 4) % region_words) * 4);
  endfunction

  // ------------------------------------------------------------ branch predictor
  bit pt [int unsigned];

  function automatic bit predict(input logic [31:0] a);
    if (!pt.exists(a)) pt[a] = h(a >> 2, 3) % 3 != 0;
    else if ($urandom_range(11) == 0) pt[a] = !pt[a];
    return pt[a];
  endfunction

  // ------------------------------------------------------------ cache model
  logic [31:0] m_line [SETS][WAYS];   // line address held, or '1 when empty
  int          m_rr   [SETS];
  bit          p_taken [int unsigned];  // PMT model, by line address
  int          p_pos   [int unsigned];

  function automatic bit model_hit(input logic [31:0] la);
    int s = int'(la[9:5]);
    for (int w = 0; w < WAYS; w++) if (m_line[s][w] == la) return 1;
    return 0;
  endfunction

  // ------------------------------------------------------------ expectations
  typedef struct {
    logic [31:0]        pc;
    logic [FW-1:0]      mask;
    logic [FW-1:0][31:0] words;
    longint             t_acc;
    int                 lat;     // expected latency, 0 = not fixed
  } exp_t;
  exp_t q[$];

  int n_acc = 0, n_hit = 0, n_miss = 0, n_evict = 0, n_backp = 0;
  int n_in = 0, n_out = 0, n_both = 0, n_mmiss = 0, n_rsp = 0;
  longint words_read = 0, words_seg = 0, words_line = 0;

  // ------------------------------------------------------------ memory
  int mem_wait = -1;
  logic [31:0] mem_addr_q;

  always @(negedge clk) begin
    mem_rsp_valid <= 1'b0;
    if (rst_n) begin
      if (mem_wait > 0) mem_wait--;
      else if (mem_wait == 0) begin
        mem_rsp_valid <= 1'b1;
        for (int w = 0; w < WPL; w++) mem_rsp_data[w] <= insn(mem_addr_q + 32'(4 * w));
        mem_wait = -1;
      end
      if (mem_req_valid && mem_wait < 0 && !mem_rsp_valid) begin
        mem_req_ready <= ($urandom_range(2) != 0);
      end else mem_req_ready <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      mem_addr_q <= mem_req_addr;
      mem_wait   <= $urandom_range(4);
    end
    if (rst_n && mem_req_valid && !mem_req_ready) n_backp++;
  end

  // ------------------------------------------------------------ responses
  always @(negedge clk) begin
    if (rst_n && rsp_valid) begin
      n_rsp++;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected response pc %h", rsp_pc);
      end else begin
        exp_t e;
        bit bad;
        e = q.pop_front();
        bad = (rsp_pc !== e.pc) || (rsp_mask !== e.mask);
        for (int i = 0; i < FW; i++) if (e.mask[i] && rsp_words[i] !== e.words[i]) bad = 1;
        if (e.lat != 0 && cycle - e.t_acc != longint'(e.lat)) begin
          bad = 1;
          $display("latency %0d, expected %0d", cycle - e.t_acc, e.lat);
        end
        if (bad) begin
          failures++;
          $display("FAIL response pc %h mask %b words %h, expected pc %h mask %b words %h",
                   rsp_pc, rsp_mask, rsp_words, e.pc, e.mask, e.words);
        end
      end
    end
  end

  // ------------------------------------------------------------ front end
  task automatic run(input logic [31:0] base, input int unsigned words, input int fetches);
    logic [31:0] pc;
    region_base = base; region_words = words;
    pc = base;
    for (int n = 0; n < fetches; n++) begin
      int st, sf, sl, pos;
      bit tk;
      logic [31:0] la, nxt;
      st = int'(pc[4:2]); sf = (st / FW) * FW; sl = sf + FW - 1;
      tk = 0; pos = 0;
      for (int w = st; w <= sl; w++) begin
        logic [31:0] a = {pc[31:5], 5'(4 * w)};
        if (!tk && is_branch(a) && predict(a)) begin tk = 1; pos = w; end
      end
      nxt = tk ? target_of({pc[31:5], 5'(4 * pos)}) : {pc[31:4], 4'b0} + 32'd16;
      // present the request until it is taken
      req_valid = 1; req_pc = pc; req_bp_taken = tk; req_bp_pos = 3'(pos);
      #1;
      while (!req_ready) begin
        @(negedge clk);
        #1;
      end
      // accepted at the coming edge: work out what the cache must do
      begin
        exp_t e;
        logic [7:0] seg, tgt, pred, need, fetch;
        bit hit, pv;
        int s;
        la = {pc[31:5], 5'b0};
        s = int'(la[9:5]);
        hit = model_hit(la);
        if (!hit) begin
          if (m_line[s][m_rr[s]] != '1) n_evict++;
          m_line[s][m_rr[s]] = la;
          m_rr[s] = (m_rr[s] + 1) % WAYS;
          p_taken[la] = 0; p_pos[la] = 0;
          n_miss++;
        end else n_hit++;
        for (int w = 0; w < WPL; w++) begin
          seg[w]  = (w >= sf && w <= sl);
          tgt[w]  = (w >= st);
          pred[w] = !(p_taken[la] && p_pos[la] >= st) || (w <= p_pos[la]);
          need[w] = seg[w] && tgt[w] && (!tk || w <= pos);
        end
        fetch = seg & tgt & pred;
        pv = |(need & ~fetch);
        if (hit) begin
          checks++;
          if (!arr_rd_en || arr_word_en !== fetch || mask_miss !== pv) begin
            failures++;
            $display("FAIL pc %h: word enable %b miss %b, expected %b miss %b",
                     pc, arr_word_en, mask_miss, fetch, pv);
          end
          words_read += $countones(fetch) + (pv ? $countones(need & ~fetch) : 0);
          words_seg  += FW;
          words_line += WPL;
          if (tgt != 8'hFF && (seg & tgt) != seg) n_in++;
          if ((fetch) != (seg & tgt)) begin
            n_out++;
            if ((seg & tgt) != seg) n_both++;
          end
          if (pv) n_mmiss++;
        end
        if (tk) begin p_taken[la] = 1; p_pos[la] = pos; end
        else if (p_taken[la] && p_pos[la] >= st && p_pos[la] <= sl) begin
          p_taken[la] = 0; p_pos[la] = 0;
        end
        e.pc = pc; e.t_acc = cycle;
        e.lat = !hit ? 0 : (pv ? 2 : 1);
        for (int i = 0; i < FW; i++) begin
          e.mask[i]  = need[sf + i];
          e.words[i] = insn({pc[31:4], 4'b0} + 32'(4 * i));
        end
        q.push_back(e);
        n_acc++;
      end
      @(negedge clk);
      if ($urandom_range(15) == 0) begin
        // an idle cycle now and then
        req_valid = 0;
        @(negedge clk);
      end
      pc = nxt;
    end
    req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req_pc = 0; req_bp_taken = 0; req_bp_pos = 0;
    mem_req_ready = 0; mem_rsp_valid = 0; mem_rsp_data = '0;
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) m_line[s][w] = '1;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    run(32'h0000_1000, 512, 20000);     // 2 KB loop
    run(32'h0004_0000, 24576, 20000);   // 96 KB region
    run(32'h0000_1000, 512, 20000);     // back to the loop
    repeat (50) @(negedge clk);

    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d responses missing", q.size()); end
    $display("fetches %0d: hits %0d, misses %0d, evictions %0d, memory back-pressure cycles %0d",
             n_acc, n_hit, n_miss, n_evict, n_backp);
    $display("branch-in trims %0d, branch-out trims %0d, both %0d, mask misses %0d",
             n_in, n_out, n_both, n_mmiss);
    $display("words read on hits %0d; whole-line reads %0d (saving %0.1f%%); segment reads %0d (saving %0.1f%%)",
             words_read, words_line, 100.0 * (1.0 - real'(words_read) / real'(words_line)),
             words_seg, 100.0 * (1.0 - real'(words_read) / real'(words_seg)));
    checks++; if (n_hit   == 0) begin failures++; $display("FAIL no hit"); end
    checks++; if (n_miss  == 0) begin failures++; $display("FAIL no miss"); end
    checks++; if (n_evict == 0) begin failures++; $display("FAIL no eviction"); end
    checks++; if (n_backp == 0) begin failures++; $display("FAIL no memory back-pressure"); end
    checks++; if (n_in    == 0) begin failures++; $display("FAIL no branch-in trim"); end
    checks++; if (n_out   == 0) begin failures++; $display("FAIL no branch-out trim"); end
    checks++; if (n_both  == 0) begin failures++; $display("FAIL no combined trim"); end
    checks++; if (n_mmiss == 0) begin failures++; $display("FAIL no mask miss"); end
    checks++; if (n_rsp != n_acc) begin failures++; $display("FAIL %0d responses for %0d fetches", n_rsp, n_acc); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
