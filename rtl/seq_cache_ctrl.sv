// seq_cache_ctrl: controller of the two-way sequential way-access cache with
// priority replacement and promotion placement.
//
// Sequential way access: a request probes only way 0 (its tag array and its
// data array, in parallel) in the first cycle.  A hit there completes the
// access.  On a way-0 miss, way 1 alone is probed in the next cycle.  Because
// the probed way is fixed by the controller state, the output multiplexer
// select (probe_way) is known in advance and never depends on a hit signal.
//
// Promotion placement: a hit in way 1 returns the data at once and then swaps
// the two lines of the set, so the hit line moves to way 0 and the former
// way-0 line to way 1.  Both tags are rewritten in the hit cycle; the data
// words are exchanged one word per array per cycle (4 read cycles of both
// arrays, 4 write cycles of both arrays: 8 + 8 data accesses per swap).
//
// Priority replacement: on a miss the refilled line always goes to way 0.
// With promotion, way 0 always holds the most recently used line of a set,
// so way 1 holds the least recently used one and is the victim; no LRU state
// is kept.  The victim is written back if dirty, the way-0 line is moved into
// way 1, and the line read from main memory is written into way 0.
//
// Interface and timing.  CPU side: a request is accepted when cpu_req_valid
// and cpu_req_ready are both high; exactly one cpu_resp_valid pulse answers
// it.  A read hit in way 0 answers in the next cycle and the next request can
// be accepted in that same cycle (one access per cycle).  A write hit in way
// 0 answers in the next cycle and blocks one more cycle, since the data array
// is written only after the tag matched.  A hit in way 1 answers two cycles
// after acceptance, followed by 8 swap cycles with cpu_req_ready low.  A miss
// answers when the refilled line has been written into way 0.  Memory side:
// one 16-byte line per transfer; mem_req_* is held until mem_req_ready, and
// mem_resp_valid marks the end of the transfer (with the data for a read).
// Address bits [1:0] are not used (lint reports them): every access is one
// 32-bit word, and stores select their bytes with cpu_req_be.
//
// The probe order, the swap, the victim choice and the move of the way-0 line
// follow the source thesis.  The write-back, write-allocate store policy with a
// dirty bit per line, the byte enables, the handshakes, and the order of the
// miss steps (write back, move, refill) are choices of this design.
module seq_cache_ctrl
  import seq_cache_pkg::*;
#(
  parameter int unsigned SETS   = 1024,
  parameter int unsigned ADDR_W = 32,
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - IDX_W - LINE_OFF_W,
  localparam int unsigned DA_W  = IDX_W + WORD_OFF_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // CPU side
  input  logic                     cpu_req_valid,
  output logic                     cpu_req_ready,
  input  logic                     cpu_req_write,
  input  logic [ADDR_W-1:0]        cpu_req_addr,
  input  word_t                    cpu_req_wdata,
  input  be_t                      cpu_req_be,
  output logic                     cpu_resp_valid,
  output word_t                    cpu_resp_rdata,
  // main memory side
  output logic                     mem_req_valid,
  input  logic                     mem_req_ready,
  output logic                     mem_req_write,
  output logic [ADDR_W-LINE_OFF_W-1:0] mem_req_addr,
  output line_t                    mem_req_wdata,
  input  logic                     mem_resp_valid,
  input  line_t                    mem_resp_rdata,
  // tag arrays (index 0 = way 0)
  output logic [1:0]               tag_ce,
  output logic [1:0]               tag_we,
  output logic [IDX_W-1:0]         tag_addr,
  output logic [1:0]               tag_wvalid,
  output logic [1:0]               tag_wdirty,
  output logic [1:0][TAG_W-1:0]    tag_wtag,
  input  logic [1:0]               tag_rvalid,
  input  logic [1:0]               tag_rdirty,
  input  logic [1:0][TAG_W-1:0]    tag_rtag,
  input  logic                     tag_busy,
  input  logic [1:0]               way_hit,
  // data arrays
  output logic [1:0]               data_ce,
  output logic [1:0]               data_we,
  output logic [1:0][DA_W-1:0]     data_addr,
  output be_t                      data_be,
  output logic [1:0][WORD_BITS-1:0] data_wdata,
  input  logic [1:0][WORD_BITS-1:0] data_rdata,
  // predetermined select of the output multiplexer and the probed tag
  output way_t                     probe_way,
  output logic [TAG_W-1:0]         cmp_tag,
  input  word_t                    way_rdata
);

  // ---------------------------------------------------------------- state
  state_t             state, state_n;
  logic [2:0]         cnt, cnt_n;
  logic               mem_sent, mem_sent_n;

  logic               r_write;
  logic [TAG_W-1:0]   r_tag;
  logic [IDX_W-1:0]   r_idx;
  woff_t              r_woff;
  word_t              r_wdata;
  be_t                r_be;

  // way-0 and way-1 entries captured in the probe cycles
  logic               e0_valid, e0_dirty;
  logic [TAG_W-1:0]   e0_tag, e1_tag;
  logic               cap_e0, cap_e1;  // capture the probed entry

  word_t              lbuf [WORDS_PER_LINE];
  logic               lbuf_wb_we;     // capture a way-1 word for write-back
  woff_t              lbuf_wb_idx;
  logic               lbuf_fill_we;   // capture the line from main memory

  logic               accept;

  // request fields of the incoming address
  logic [TAG_W-1:0]   in_tag;
  logic [IDX_W-1:0]   in_idx;
  woff_t              in_woff;
  assign in_woff = cpu_req_addr[BYTE_OFF_W +: WORD_OFF_W];
  assign in_idx  = cpu_req_addr[LINE_OFF_W +: IDX_W];
  assign in_tag  = cpu_req_addr[ADDR_W-1 -: TAG_W];

  function automatic word_t merge(word_t old, word_t nw, be_t be);
    word_t r;
    for (int b = 0; b < WORD_BYTES; b++)
      r[8*b +: 8] = be[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  assign cmp_tag = r_tag;

  // ---------------------------------------------------------------- next state and array control
  always_comb begin
    state_n       = state;
    cnt_n         = cnt;
    mem_sent_n    = mem_sent;
    accept        = 1'b0;
    cpu_req_ready = 1'b0;
    cpu_resp_valid = 1'b0;
    cpu_resp_rdata = way_rdata;
    probe_way     = WAY0;
    cap_e0        = 1'b0;
    cap_e1        = 1'b0;
    lbuf_wb_we    = 1'b0;
    lbuf_wb_idx   = woff_t'(cnt - 3'd1);
    lbuf_fill_we  = 1'b0;

    tag_ce     = '0;
    tag_we     = '0;
    tag_addr   = r_idx;
    tag_wvalid = '0;
    tag_wdirty = '0;
    tag_wtag   = '{default: '0};
    data_ce    = '0;
    data_we    = '0;
    data_addr  = '{default: {r_idx, r_woff}};
    data_be    = '1;
    data_wdata = '{default: '0};

    mem_req_valid = 1'b0;
    mem_req_write = 1'b0;
    mem_req_addr  = {r_tag, r_idx};
    mem_req_wdata = {lbuf[3], lbuf[2], lbuf[1], lbuf[0]};

    unique case (state)
      S_IDLE: begin
        cpu_req_ready = !tag_busy;
        accept        = cpu_req_valid && !tag_busy;
        if (accept) state_n = S_PROBE0;
      end

      S_PROBE0: begin
        probe_way = WAY0;
        cap_e0    = 1'b1;
        if (way_hit[0]) begin
          cpu_resp_valid = 1'b1;
          if (r_write) begin
            // store hit: write the word, mark the line dirty
            data_ce[0]    = 1'b1;
            data_we[0]    = 1'b1;
            data_be       = r_be;
            data_wdata[0] = r_wdata;
            if (!tag_rdirty[0]) begin
              tag_ce[0]     = 1'b1;
              tag_we[0]     = 1'b1;
              tag_wvalid[0] = 1'b1;
              tag_wdirty[0] = 1'b1;
              tag_wtag[0]   = r_tag;
            end
            state_n = S_IDLE;
          end else begin
            // load hit in one cycle; the next request may start now
            cpu_req_ready = 1'b1;
            accept        = cpu_req_valid;
            state_n       = accept ? S_PROBE0 : S_IDLE;
          end
        end else begin
          // way 0 missed: probe way 1 alone
          tag_ce[1]  = 1'b1;
          data_ce[1] = 1'b1;
          state_n    = S_PROBE1;
        end
      end

      S_PROBE1: begin
        probe_way = WAY1;
        cap_e1    = 1'b1;
        if (way_hit[1]) begin
          cpu_resp_valid = 1'b1;
          // promotion: exchange the two tags now, the data words next
          tag_ce        = 2'b11;
          tag_we        = 2'b11;
          tag_wvalid[0] = 1'b1;
          tag_wdirty[0] = tag_rdirty[1] | r_write;
          tag_wtag[0]   = r_tag;
          tag_wvalid[1] = e0_valid;
          tag_wdirty[1] = e0_dirty;
          tag_wtag[1]   = e0_tag;
          cnt_n         = '0;
          state_n       = S_SWAP_RD;
        end else begin
          // miss: way 1 holds the least recently used line
          cnt_n = '0;
          if (tag_rvalid[1] && tag_rdirty[1]) state_n = S_WB_RD;
          else if (e0_valid)                  state_n = S_MOVE;
          else                                state_n = S_FILL_MEM;
        end
      end

      S_SWAP_RD: begin
        data_ce      = 2'b11;
        data_addr[0] = {r_idx, woff_t'(cnt)};
        data_addr[1] = {r_idx, woff_t'(cnt)};
        state_n      = S_SWAP_WR;
      end

      S_SWAP_WR: begin
        data_ce       = 2'b11;
        data_we       = 2'b11;
        data_addr[0]  = {r_idx, woff_t'(cnt)};
        data_addr[1]  = {r_idx, woff_t'(cnt)};
        data_wdata[0] = (r_write && woff_t'(cnt) == r_woff)
                        ? merge(data_rdata[1], r_wdata, r_be) : data_rdata[1];
        data_wdata[1] = data_rdata[0];
        cnt_n         = cnt + 3'd1;
        state_n       = (cnt == 3'd3) ? S_IDLE : S_SWAP_RD;
      end

      S_WB_RD: begin
        // read way 1 word cnt; the word read in the previous cycle is captured
        if (cnt < 3'd4) begin
          data_ce[1]   = 1'b1;
          data_addr[1] = {r_idx, woff_t'(cnt)};
        end
        lbuf_wb_we = (cnt != 3'd0);
        cnt_n      = cnt + 3'd1;
        if (cnt == 3'd4) begin
          cnt_n   = '0;
          state_n = S_WB_MEM;
        end
      end

      S_WB_MEM: begin
        mem_req_valid = !mem_sent;
        mem_req_write = 1'b1;
        mem_req_addr  = {e1_tag, r_idx};
        if (mem_req_valid && mem_req_ready) mem_sent_n = 1'b1;
        if (mem_sent && mem_resp_valid) begin
          cnt_n   = '0;
          state_n = e0_valid ? S_MOVE : S_FILL_MEM;
        end
      end

      S_MOVE: begin
        // copy the way-0 line into way 1, read and write overlapped
        if (cnt < 3'd4) begin
          data_ce[0]   = 1'b1;
          data_addr[0] = {r_idx, woff_t'(cnt)};
        end
        if (cnt != 3'd0) begin
          data_ce[1]    = 1'b1;
          data_we[1]    = 1'b1;
          data_addr[1]  = {r_idx, woff_t'(cnt - 3'd1)};
          data_wdata[1] = data_rdata[0];
        end else begin
          tag_ce[1]     = 1'b1;
          tag_we[1]     = 1'b1;
          tag_wvalid[1] = e0_valid;
          tag_wdirty[1] = e0_dirty;
          tag_wtag[1]   = e0_tag;
        end
        cnt_n = cnt + 3'd1;
        if (cnt == 3'd4) begin
          cnt_n   = '0;
          state_n = S_FILL_MEM;
        end
      end

      S_FILL_MEM: begin
        mem_req_valid = !mem_sent;
        mem_req_write = 1'b0;
        mem_req_addr  = {r_tag, r_idx};
        if (mem_req_valid && mem_req_ready) mem_sent_n = 1'b1;
        if (mem_sent && mem_resp_valid) begin
          lbuf_fill_we = 1'b1;
          cnt_n        = '0;
          state_n      = S_FILL_WR;
        end
      end

      S_FILL_WR: begin
        // the refilled line goes to way 0 (priority replacement)
        data_ce[0]    = 1'b1;
        data_we[0]    = 1'b1;
        data_addr[0]  = {r_idx, woff_t'(cnt)};
        data_wdata[0] = lbuf[woff_t'(cnt)];
        if (cnt == 3'd0) begin
          tag_ce[0]     = 1'b1;
          tag_we[0]     = 1'b1;
          tag_wvalid[0] = 1'b1;
          tag_wdirty[0] = r_write;
          tag_wtag[0]   = r_tag;
        end
        cnt_n = cnt + 3'd1;
        if (cnt == 3'd3) begin
          cpu_resp_valid = 1'b1;
          cpu_resp_rdata = lbuf[r_woff];
          state_n        = S_IDLE;
        end
      end

      default: state_n = S_IDLE;
    endcase

    // a newly accepted request probes way 0 with its own address
    if (accept) begin
      tag_ce[0]    = 1'b1;
      tag_addr     = in_idx;
      data_ce[0]   = 1'b1;
      data_addr[0] = {in_idx, in_woff};
    end
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      mem_sent <= 1'b0;
      r_write  <= 1'b0;
      r_tag    <= '0;
      r_idx    <= '0;
      r_woff   <= '0;
      r_wdata  <= '0;
      r_be     <= '0;
      e0_valid <= 1'b0;
      e0_dirty <= 1'b0;
      e0_tag   <= '0;
      e1_tag   <= '0;
    end else begin
      state    <= state_n;
      cnt      <= cnt_n;
      // a new state starts with no memory request outstanding
      mem_sent <= (state_n != state) ? 1'b0 : mem_sent_n;
      if (accept) begin
        r_write <= cpu_req_write;
        r_tag   <= in_tag;
        r_idx   <= in_idx;
        r_woff  <= in_woff;
        r_wdata <= cpu_req_wdata;
        r_be    <= cpu_req_be;
      end
      if (cap_e0) begin
        e0_valid <= tag_rvalid[0];
        e0_dirty <= tag_rdirty[0];
        e0_tag   <= tag_rtag[0];
      end
      if (cap_e1) begin
        e1_tag   <= tag_rtag[1];
      end
    end
  end

  // line buffer: write-back source and refill destination
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < WORDS_PER_LINE; i++) lbuf[i] <= '0;
    end else if (lbuf_fill_we) begin
      for (int i = 0; i < WORDS_PER_LINE; i++)
        lbuf[i] <= (r_write && woff_t'(i) == r_woff)
                   ? merge(mem_resp_rdata[WORD_BITS*i +: WORD_BITS], r_wdata, r_be)
                   : mem_resp_rdata[WORD_BITS*i +: WORD_BITS];
    end else if (lbuf_wb_we) begin
      lbuf[lbuf_wb_idx] <= data_rdata[1];
    end
  end

  // ---------------------------------------------------------------- protocol rules
  // A memory request is held stable until it is accepted.
  a_mem_hold: assert property (@(posedge clk) disable iff (!rst_n)
    mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable(mem_req_addr)
                                        && $stable(mem_req_write));
  // The probed way is never the one whose tag arrays are being cleared.
  a_no_req_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    tag_busy |-> !accept);
  // Only one way is probed in a probe cycle.
  a_one_way: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_PROBE0 && !way_hit[0]) |-> !tag_ce[0] && !data_ce[0]);

endmodule
