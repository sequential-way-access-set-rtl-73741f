// tb_seq_cache_ctrl: directed test of the cache controller.
//
// The controller is wired to two tag arrays, two data arrays and two tag
// comparators, as in the cache, and to the behavioural main memory with the
// short latencies (read 6, write 8 cycles).  Blocks A, B, C map to the same
// set.  The scenarios are the placement examples of the design:
//   1. the frequent-block sequence A A A B A A A: with promotion the second
//      run of A pays one way-1 hit (swap) and then hits way 0 again;
//   2. a miss whose victim is in way 1 while way 0 holds a line: the way-0
//      line is moved to way 1 and the new line is placed in way 0;
//   3. a hit in way 1 promotes the line to way 0 (swap);
//   4. a dirty victim is written back with the right line address and data.
// For every access the response latency, the load data and which arrays
// were activated are compared with values worked out by hand from the
// timing rules in the controller description.
module tb_seq_cache_ctrl;
  import seq_cache_pkg::*;
  import seq_cache_tb_pkg::*;

  localparam int unsigned SETS = 1024, IDX_W = 10, TAG_W = 18, DA_W = 12;
  localparam int unsigned RL = 6, WL = 8;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0]  cpu_req_be = 4'hF;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_req_wdata, mem_resp_rdata;

  logic [1:0]  tag_ce, tag_we, tag_wvalid, tag_wdirty, tag_rvalid, tag_rdirty, busy, way_hit;
  logic [IDX_W-1:0] tag_addr;
  logic [1:0][TAG_W-1:0] tag_wtag, tag_rtag;
  logic [1:0]  data_ce, data_we;
  logic [1:0][DA_W-1:0] data_addr;
  logic [3:0]  data_be;
  logic [1:0][31:0] data_wdata, data_rdata;
  way_t        probe_way;
  logic [TAG_W-1:0] cmp_tag;
  logic [31:0] way_rdata;

  for (genvar w = 0; w < 2; w++) begin : g_way
    tag_array #(.SETS(SETS), .TAG_W(TAG_W)) u_tag (
      .clk, .rst_n, .ce(tag_ce[w]), .we(tag_we[w]), .addr(tag_addr),
      .wvalid(tag_wvalid[w]), .wdirty(tag_wdirty[w]), .wtag(tag_wtag[w]),
      .rvalid(tag_rvalid[w]), .rdirty(tag_rdirty[w]), .rtag(tag_rtag[w]), .busy(busy[w]));
    data_array #(.WORDS(SETS * 4)) u_data (
      .clk, .ce(data_ce[w]), .we(data_we[w]), .addr(data_addr[w]), .be(data_be),
      .wdata(data_wdata[w]), .rdata(data_rdata[w]));
    tag_comparator #(.TAG_W(TAG_W)) u_comp (
      .entry_valid(tag_rvalid[w]), .entry_tag(tag_rtag[w]), .req_tag(cmp_tag), .hit(way_hit[w]));
  end
  assign way_rdata = (probe_way == WAY1) ? data_rdata[1] : data_rdata[0];

  seq_cache_ctrl #(.SETS(SETS), .ADDR_W(32)) dut (
    .clk, .rst_n, .cpu_req_valid, .cpu_req_ready, .cpu_req_write, .cpu_req_addr,
    .cpu_req_wdata, .cpu_req_be, .cpu_resp_valid, .cpu_resp_rdata,
    .mem_req_valid, .mem_req_ready, .mem_req_write, .mem_req_addr, .mem_req_wdata,
    .mem_resp_valid, .mem_resp_rdata,
    .tag_ce, .tag_we, .tag_addr, .tag_wvalid, .tag_wdirty, .tag_wtag,
    .tag_rvalid, .tag_rdirty, .tag_rtag, .tag_busy(|busy), .way_hit,
    .data_ce, .data_we, .data_addr, .data_be, .data_wdata, .data_rdata,
    .probe_way, .cmp_tag, .way_rdata);

  main_memory_model #(.READ_LAT(RL), .WRITE_LAT(WL)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_write(mem_req_write), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // activity and memory-write monitors
  int tag_act [2] = '{0, 0}, data_act [2] = '{0, 0};
  logic [27:0] wb_addr;
  logic [127:0] wb_data;
  int n_wb = 0;
  always @(posedge clk) begin
    for (int w = 0; w < 2; w++) begin
      tag_act[w]  += int'(tag_ce[w]);
      data_act[w] += int'(data_ce[w]);
    end
    if (mem_req_valid && mem_req_ready && mem_req_write) begin
      wb_addr = mem_req_addr; wb_data = mem_req_wdata; n_wb++;
    end
  end

  // one access; returns latency (cycles from acceptance to response), the
  // data, and the per-way activations from acceptance until the cache is
  // idle again (so a swap is included)
  task automatic access(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                        output int lat, output logic [31:0] rd,
                        output int ta0, output int ta1, output int da0, output int da1);
    int s_t0, s_t1, s_d0, s_d1;
    @(negedge clk);
    s_t0 = tag_act[0]; s_t1 = tag_act[1]; s_d0 = data_act[0]; s_d1 = data_act[1];
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_addr = a; cpu_req_wdata = wd; cpu_req_be = 4'hF;
    do @(posedge clk); while (!cpu_req_ready);
    @(negedge clk); cpu_req_valid = 0;
    lat = 1;
    while (!cpu_resp_valid) begin @(negedge clk); lat++; end
    rd = cpu_resp_rdata;
    @(negedge clk);
    while (!cpu_req_ready) @(negedge clk);
    ta0 = tag_act[0] - s_t0; ta1 = tag_act[1] - s_t1;
    da0 = data_act[0] - s_d0; da1 = data_act[1] - s_d1;
  endtask

  function automatic logic [31:0] addr_of(logic [TAG_W-1:0] t, int set, int w);
    return {t, IDX_W'(set), 2'(w), 2'b00};
  endfunction

  localparam logic [TAG_W-1:0] TA = 18'h0A0A0, TB = 18'h0B0B0, TC = 18'h0C0C0, TD = 18'h0D0D0;
  localparam int SET = 77;
  localparam int MISS_EMPTY = 2 + RL + 4;          // no move, no write-back
  localparam int MISS_MOVE  = 2 + 5 + RL + 4;      // way-0 line moved to way 1
  localparam int MISS_WB    = 2 + 5 + WL + 5 + RL + 4;

  initial begin
    int lat, ta0, ta1, da0, da1;
    logic [31:0] rd;
    int exp_lat [7];
    string nm;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!cpu_req_ready) @(negedge clk);

    // ---- scenario 1: A A A B A A A
    exp_lat = '{MISS_EMPTY, 1, 1, MISS_MOVE, 2, 1, 1};
    for (int i = 0; i < 7; i++) begin
      logic [TAG_W-1:0] t;
      t = (i == 3) ? TB : TA;
      access(0, addr_of(t, SET, i % 4), 0, lat, rd, ta0, ta1, da0, da1);
      nm = (i == 3) ? "B" : "A";
      check(lat == exp_lat[i], $sformatf("seq1 access %0d (%s) latency %0d expected %0d", i, nm, lat, exp_lat[i]));
      check(rd == init_word(32'(addr_of(t, SET, i % 4) >> 2)), $sformatf("seq1 access %0d data", i));
      if (exp_lat[i] == 1) begin
        // only way 0 is activated on a way-0 hit
        check(ta0 == 1 && da0 == 1 && ta1 == 0 && da1 == 0,
              $sformatf("seq1 access %0d activations t0=%0d t1=%0d d0=%0d d1=%0d", i, ta0, ta1, da0, da1));
      end
      if (exp_lat[i] == 2) begin
        // both probes, 2 tag writes, 4+4 word reads and writes per way
        check(ta0 == 2 && ta1 == 2 && da0 == 9 && da1 == 9,
              $sformatf("seq1 swap activations t0=%0d t1=%0d d0=%0d d1=%0d", ta0, ta1, da0, da1));
      end
    end

    // ---- scenario 2: set now holds A (way 0), B (way 1); C evicts B
    access(0, addr_of(TC, SET, 2), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == MISS_MOVE, $sformatf("C miss latency %0d expected %0d", lat, MISS_MOVE));
    check(rd == init_word(32'(addr_of(TC, SET, 2) >> 2)), "C data");
    // A must now be in way 1 and C in way 0
    access(0, addr_of(TC, SET, 0), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == 1, $sformatf("C re-access latency %0d expected 1", lat));
    // ---- scenario 3: A hits way 1 and is promoted
    access(0, addr_of(TA, SET, 3), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == 2, $sformatf("A way-1 hit latency %0d expected 2", lat));
    check(rd == init_word(32'(addr_of(TA, SET, 3) >> 2)), "A data after moves");
    access(0, addr_of(TA, SET, 1), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == 1, $sformatf("A after promotion latency %0d expected 1", lat));
    access(0, addr_of(TC, SET, 1), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == 2, $sformatf("C demoted to way 1, latency %0d expected 2", lat));
    // B was evicted by C
    access(0, addr_of(TB, SET, 0), 0, lat, rd, ta0, ta1, da0, da1);
    check(lat == MISS_MOVE, $sformatf("B evicted, latency %0d expected %0d", lat, MISS_MOVE));

    // ---- scenario 4: dirty line written back
    // set: B (way 0), C (way 1).  Store to B (way-0 store hit), then D and A
    // misses push B out of the set; B's victim write-back carries the store.
    access(1, addr_of(TB, SET, 2), 32'hCAFE_F00D, lat, rd, ta0, ta1, da0, da1);
    check(lat == 1, $sformatf("store hit latency %0d expected 1", lat));
    check(ta0 == 2 && da0 == 2 && ta1 == 0 && da1 == 0,
          $sformatf("store hit activations t0=%0d d0=%0d t1=%0d d1=%0d", ta0, da0, ta1, da1));
    access(0, addr_of(TD, SET, 0), 0, lat, rd, ta0, ta1, da0, da1);  // C out, B to way 1
    check(lat == MISS_MOVE, $sformatf("D miss latency %0d expected %0d", lat, MISS_MOVE));
    check(n_wb == 0, "clean victim written back");
    access(0, addr_of(TA, SET, 0), 0, lat, rd, ta0, ta1, da0, da1);  // B (dirty) out
    check(lat == MISS_WB, $sformatf("dirty-victim miss latency %0d expected %0d", lat, MISS_WB));
    check(n_wb == 1, $sformatf("%0d write-backs, expected 1", n_wb));
    check(wb_addr == 28'({TB, 10'(SET)}), $sformatf("write-back line address %h", wb_addr));
    for (int w = 0; w < 4; w++) begin
      logic [31:0] e;
      e = (w == 2) ? 32'hCAFE_F00D : init_word(32'(addr_of(TB, SET, w) >> 2));
      check(wb_data[32*w +: 32] == e, $sformatf("write-back word %0d %h expected %h", w, wb_data[32*w +: 32], e));
    end
    // the stored value survives the round trip through main memory
    access(0, addr_of(TB, SET, 2), 0, lat, rd, ta0, ta1, da0, da1);
    check(rd == 32'hCAFE_F00D, $sformatf("reload of stored word %h", rd));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
