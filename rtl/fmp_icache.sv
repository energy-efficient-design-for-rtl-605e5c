// Low-energy instruction cache with a segmented wordline and a Fetch Mask
// Predictor.
//
// A highly associative cache (CAM tags, default 32 KB, 32 ways, 32-byte
// lines of eight instructions) for a processor that fetches FETCH_W
// instructions per cycle. Each fetch reads only the words the processor is
// expected to use: the aligned FETCH_W-word segment of the line holding the
// fetch address, minus the words before a branch target, minus the words
// after a branch that the Predicted Mask Table expects to be taken. The
// resulting mask drives the per-word wordline segments of the data array
// (see fetch_mask_predictor and seg_data_array).
//
// Interface and timing:
//  * Fetch request: req_pc with req_valid, accepted when req_ready is high.
//    The branch predictor's outcome for the same fetch block comes with it
//    (req_bp_taken, req_bp_pos = word of the line holding the taken branch);
//    it is used only to update the PMT and to check the mask, never to form
//    it, as it comes from a lookup made in parallel with the cache access.
//  * Fetch response: one cycle after a hit, rsp_valid with the FETCH_W words
//    of the segment in rsp_words and, in rsp_mask, the words the processor
//    uses (from the fetch address up to the predicted-taken branch).
//  * Mask miss: when the predicted mask left out a word the branch predictor
//    says is needed, req_ready drops for one cycle, the missing words are
//    read from the same line, and the response comes one cycle later with
//    all needed words.
//  * Cache miss: the line is requested from memory (mem_req_*, a valid/ready
//    handshake, line-aligned byte address), written into the set's
//    round-robin victim way when mem_rsp_valid brings it, its PMT entry is
//    cleared, and the request is looked up again; req_ready is low meanwhile.
//  * arr_rd_en/arr_word_en show the wordline segments driven each cycle,
//    the quantity the read energy of the data array is proportional to.
//
// The cache geometry, CAM tags, segmented wordline, target mask, PMT and
// their combination follow the design. The request/response protocol, the
// one-cycle latency, the mask-miss replay, the refill handshake, the
// round-robin replacement and the 32-bit address are this design's own.
module fmp_icache #(
  parameter int unsigned ADDR_W      = fmp_pkg::ADDR_W,
  parameter int unsigned WORD_W      = fmp_pkg::WORD_W,
  parameter int unsigned CACHE_BYTES = fmp_pkg::CACHE_BYTES,
  parameter int unsigned WAYS        = fmp_pkg::WAYS,
  parameter int unsigned LINE_BYTES  = fmp_pkg::LINE_BYTES,
  parameter int unsigned FETCH_W     = fmp_pkg::FETCH_W,
  localparam int unsigned WPL    = LINE_BYTES / (WORD_W / 8),
  localparam int unsigned LINES  = CACHE_BYTES / LINE_BYTES,
  localparam int unsigned SETS   = LINES / WAYS,
  localparam int unsigned POS_W  = $clog2(WPL),
  localparam int unsigned BOFF_W = $clog2(WORD_W / 8),
  localparam int unsigned OFF_W  = $clog2(LINE_BYTES),
  localparam int unsigned SET_W  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned LINE_W = $clog2(LINES),
  localparam int unsigned IDX_W  = (SETS > 1) ? $clog2(SETS) : 0,
  localparam int unsigned TAG_W  = ADDR_W - OFF_W - IDX_W
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // fetch request from the processor
  input  logic                           req_valid,
  output logic                           req_ready,
  input  logic [ADDR_W-1:0]              req_pc,
  input  logic                           req_bp_taken,
  input  logic [POS_W-1:0]               req_bp_pos,
  // fetch response to the decoder
  output logic                           rsp_valid,
  output logic [ADDR_W-1:0]              rsp_pc,
  output logic [FETCH_W-1:0][WORD_W-1:0] rsp_words,
  output logic [FETCH_W-1:0]             rsp_mask,
  // line refill from memory
  output logic                           mem_req_valid,
  input  logic                           mem_req_ready,
  output logic [ADDR_W-1:0]              mem_req_addr,
  input  logic                           mem_rsp_valid,
  input  logic [WPL-1:0][WORD_W-1:0]     mem_rsp_data,
  // data-array activity
  output logic                           arr_rd_en,
  output logic [WPL-1:0]                 arr_word_en,
  output logic                           mask_miss
);

  typedef enum logic [2:0] {
    S_RUN,       // accept a request every cycle
    S_REPLAY,    // read the words a mask miss left out
    S_MEM_REQ,   // ask memory for the missing line
    S_MEM_WAIT,  // wait for the line and write it
    S_RETRY      // look the pending request up again after the fill
  } state_t;

  state_t state, state_d;

  // pending request (miss or mask miss)
  logic [ADDR_W-1:0] pend_pc;
  logic              pend_bp_taken;
  logic [POS_W-1:0]  pend_bp_pos;
  logic [LINE_W-1:0] pend_line;
  logic [WPL-1:0]    pend_missing;
  logic [WPL-1:0]    pend_need;

  // current access
  logic              acc_req;     // a normal lookup this cycle
  logic [ADDR_W-1:0] acc_pc;
  logic              acc_bp_taken;
  logic [POS_W-1:0]  acc_bp_pos;
  logic [SET_W-1:0]  acc_set;
  logic [TAG_W-1:0]  acc_tag;
  logic [POS_W-1:0]  acc_start;
  logic              cam_hit;
  logic [WAY_W-1:0]  cam_way;
  logic [LINE_W-1:0] acc_line;
  logic              acc_hit;
  logic              acc_miss;

  logic [WPL-1:0] fetch_mask, need_mask;
  logic           fmp_miss;

  // refill
  logic [WAY_W-1:0]  rr_ptr [SETS];
  logic [SET_W-1:0]  pend_set;
  logic [TAG_W-1:0]  pend_tag;
  logic [WAY_W-1:0]  victim_way;
  logic              fill;
  logic [LINE_W-1:0] fill_line;

  // response stage
  logic                       s1_valid, s1_partial, s1_merge;
  logic [ADDR_W-1:0]          s1_pc;
  logic [WPL-1:0]             s1_need;
  logic [WPL-1:0][WORD_W-1:0] arr_rdata, hold, line_words;

  function automatic logic [SET_W-1:0] set_of(input logic [ADDR_W-1:0] a);
    if (SETS > 1) return SET_W'(a >> OFF_W);
    else          return '0;
  endfunction

  // ---------------------------------------------------------------- access
  assign req_ready = (state == S_RUN);

  always_comb begin
    if (state == S_RUN) begin
      acc_req      = req_valid;
      acc_pc       = req_pc;
      acc_bp_taken = req_bp_taken;
      acc_bp_pos   = req_bp_pos;
    end else begin
      acc_req      = (state == S_RETRY);
      acc_pc       = pend_pc;
      acc_bp_taken = pend_bp_taken;
      acc_bp_pos   = pend_bp_pos;
    end
  end

  assign acc_set   = set_of(acc_pc);
  assign acc_tag   = acc_pc[ADDR_W-1 -: TAG_W];
  assign acc_start = acc_pc[BOFF_W +: POS_W];
  assign pend_set  = set_of(pend_pc);
  assign pend_tag  = pend_pc[ADDR_W-1 -: TAG_W];

  cam_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_cam (
    .clk      (clk),
    .rst_n    (rst_n),
    .srch_set (acc_set),
    .srch_tag (acc_tag),
    .srch_hit (cam_hit),
    .srch_way (cam_way),
    .wr_en    (fill),
    .wr_set   (pend_set),
    .wr_way   (victim_way),
    .wr_tag   (pend_tag)
  );

  assign acc_line = LINE_W'({acc_set, cam_way});
  assign acc_hit  = acc_req && cam_hit;
  assign acc_miss = acc_req && !cam_hit;

  fetch_mask_predictor #(.LINES(LINES), .WPL(WPL), .FETCH_W(FETCH_W)) u_fmp (
    .clk        (clk),
    .rst_n      (rst_n),
    .acc_valid  (acc_hit),
    .acc_line   (acc_line),
    .acc_start  (acc_start),
    .bp_taken   (acc_bp_taken),
    .bp_pos     (acc_bp_pos),
    .clr_en     (fill),
    .clr_line   (fill_line),
    .seg_mask   (),
    .target_mask(),
    .pred_mask  (),
    .fetch_mask (fetch_mask),
    .need_mask  (need_mask),
    .mask_miss  (fmp_miss)
  );

  assign mask_miss = fmp_miss;

  // ---------------------------------------------------------------- data array
  always_comb begin
    if (state == S_REPLAY) begin
      arr_rd_en   = 1'b1;
      arr_word_en = pend_missing;
    end else begin
      arr_rd_en   = acc_hit;
      arr_word_en = acc_hit ? fetch_mask : '0;
    end
  end

  assign fill_line = LINE_W'({pend_set, victim_way});

  seg_data_array #(.LINES(LINES), .WPL(WPL), .WORD_W(WORD_W)) u_data (
    .clk       (clk),
    .rd_en     (arr_rd_en),
    .rd_line   ((state == S_REPLAY) ? pend_line : acc_line),
    .rd_word_en(arr_word_en),
    .rd_data   (arr_rdata),
    .wr_en     (fill),
    .wr_line   (fill_line),
    .wr_data   (mem_rsp_data)
  );

  // ---------------------------------------------------------------- control
  assign victim_way    = rr_ptr[pend_set];
  assign fill          = (state == S_MEM_WAIT) && mem_rsp_valid;
  assign mem_req_valid = (state == S_MEM_REQ);
  assign mem_req_addr  = {pend_pc[ADDR_W-1:OFF_W], {OFF_W{1'b0}}};

  always_comb begin
    state_d = state;
    case (state)
      S_RUN, S_RETRY: begin
        if (acc_miss)      state_d = S_MEM_REQ;
        else if (fmp_miss) state_d = S_REPLAY;
        else               state_d = S_RUN;
      end
      S_REPLAY:   state_d = S_RUN;
      S_MEM_REQ:  if (mem_req_ready) state_d = S_MEM_WAIT;
      S_MEM_WAIT: if (mem_rsp_valid) state_d = S_RETRY;
      default:    state_d = S_RUN;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_RUN;
      for (int s = 0; s < SETS; s++) rr_ptr[s] <= '0;
    end else begin
      state <= state_d;
      if (fill) rr_ptr[pend_set] <= WAY_W'(rr_ptr[pend_set] + 1'b1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_pc       <= '0;
      pend_bp_taken <= 1'b0;
      pend_bp_pos   <= '0;
      pend_line     <= '0;
      pend_missing  <= '0;
      pend_need     <= '0;
    end else if (acc_req) begin
      pend_pc       <= acc_pc;
      pend_bp_taken <= acc_bp_taken;
      pend_bp_pos   <= acc_bp_pos;
      pend_line     <= acc_line;
      pend_missing  <= need_mask & ~fetch_mask;
      pend_need     <= need_mask;
    end
  end

  // ---------------------------------------------------------------- response
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid   <= 1'b0;
      s1_partial <= 1'b0;
      s1_merge   <= 1'b0;
      s1_pc      <= '0;
      s1_need    <= '0;
      hold       <= '0;
    end else begin
      if (s1_partial) hold <= arr_rdata;
      if (state == S_REPLAY) begin
        s1_valid   <= 1'b1;
        s1_partial <= 1'b0;
        s1_merge   <= 1'b1;
        s1_pc      <= pend_pc;
        s1_need    <= pend_need;
      end else begin
        s1_valid   <= acc_hit;
        s1_partial <= acc_hit && fmp_miss;
        s1_merge   <= 1'b0;
        s1_pc      <= acc_pc;
        s1_need    <= need_mask;
      end
    end
  end

  assign line_words = s1_merge ? (arr_rdata | hold) : arr_rdata;

  always_comb begin
    automatic int seg = int'(s1_pc[BOFF_W +: POS_W]) / int'(FETCH_W);
    for (int i = 0; i < FETCH_W; i++) begin
      rsp_words[i] = line_words[seg * FETCH_W + i];
      rsp_mask[i]  = s1_need[seg * FETCH_W + i];
    end
  end

  assign rsp_valid = s1_valid && !s1_partial;
  assign rsp_pc    = s1_pc;

  // ---------------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr))
    else $error("fmp_icache: memory request withdrawn before it was accepted");

  assert property (@(posedge clk) disable iff (!rst_n)
                   req_valid && !req_ready |=> req_valid && $stable(req_pc))
    else $error("fmp_icache: fetch request withdrawn or changed before it was accepted");

  assert property (@(posedge clk) disable iff (!rst_n)
                   mem_rsp_valid |-> state == S_MEM_WAIT)
    else $error("fmp_icache: refill data with no refill outstanding");

  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_RETRY |-> cam_hit)
    else $error("fmp_icache: refilled line does not hit");

endmodule
