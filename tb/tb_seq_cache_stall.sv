// tb_seq_cache_stall: the end-to-end test of tb_seq_cache with a main memory
// that delays accepting each request by 0..5 cycles.  Hits keep their exact
// latency checks; a miss must take at least its unstalled latency, and
// cpu_req_ready must return exactly one cycle after the miss is answered.
// The rest of the description of tb_seq_cache applies:
//
// A random stream of loads and stores (random byte enables) runs through the
// cache, backed by the behavioural main memory.  The addresses draw a few
// tags per set so that way-0 hits, way-1 hits (promotion swaps), misses into
// empty sets, misses that move the way-0 line, and misses that write back a
// dirty victim all happen.  A reference model, independent of the RTL, keeps
// the contents of each set's way 0 and way 1 under the placement rules and
// the architectural value of every word, and predicts for every request:
//   - the load data,
//   - where it hits, hence the response latency in cycles
//     (way 0: 1; way 1: 2; miss: 2 + [5 + write latency if the victim is
//     dirty] + [5 if way 0 held a line] + read latency + 4),
//   - the cycle at which cpu_req_ready returns, checked every cycle,
//   - the output multiplexer select in the response cycle,
//   - the number of tag- and data-array activations, summed over the run,
//   - the number of main-memory reads and writes.
// Each mechanism is counted and must occur at least once.
module tb_seq_cache_stall;
  import seq_cache_pkg::*;
  import seq_cache_tb_pkg::*;

  localparam int unsigned CB     = 512;     // cache bytes (16 sets)
  localparam int unsigned NREQ   = 20000;
  localparam int unsigned NTAGS  = 4;       // tags per set in the stream
  localparam int unsigned RL     = 16;      // main memory read latency
  localparam int unsigned WL     = 18;      // main memory write latency
  localparam int unsigned SETS   = CB / 32;
  localparam int unsigned IDX_W  = $clog2(SETS);
  localparam int unsigned TAG_W  = 32 - IDX_W - 4;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0]  cpu_req_be = '0;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_req_wdata, mem_resp_rdata;
  logic [1:0]  act_tag, act_data;
  way_t        probe_way;

  seq_cache #(.CACHE_BYTES(CB)) dut (.*);

  main_memory_model #(.READ_LAT(RL), .WRITE_LAT(WL), .MAX_STALL(5)) mem (
    .clk, .rst_n,
    .req_valid (mem_req_valid), .req_ready (mem_req_ready),
    .req_write (mem_req_write), .req_addr (mem_req_addr),
    .req_wdata (mem_req_wdata), .resp_valid (mem_resp_valid),
    .resp_rdata (mem_resp_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- reference model
  typedef enum {HIT0, HIT1, MISS} kind_e;
  typedef struct {
    kind_e       kind;
    bit          write;
    logic [31:0] rdata;
    int unsigned lat;
    longint      t_acc;
  } exp_t;

  logic            v0 [SETS], v1 [SETS], d0 [SETS], d1 [SETS];
  logic [TAG_W-1:0] t0 [SETS], t1 [SETS];
  logic [31:0]     ref_mem [logic [29:0]];
  exp_t            expq [$];

  longint cycle = 0, next_ready = 0;
  longint exp_tag_act = 0, exp_data_act = 0, got_tag_act = 0, got_data_act = 0;
  int     exp_mem_rd = 0, exp_mem_wr = 0;
  int n_hit0_rd = 0, n_hit0_wr = 0, n_hit1 = 0, n_miss_empty = 0, n_miss_move = 0,
      n_miss_wb = 0, n_wr_miss = 0, n_back2back = 0, n_stalled = 0;

  function automatic logic [31:0] ref_rd(logic [29:0] wa);
    return ref_mem.exists(wa) ? ref_mem[wa] : init_word({2'b00, wa});
  endfunction

  function automatic exp_t predict(logic wr, logic [31:0] a, logic [31:0] wd, logic [3:0] be);
    exp_t e;
    int unsigned s;
    logic [TAG_W-1:0] t;
    s = int'(a[4 +: IDX_W]);
    t = a[31 -: TAG_W];
    e.write = wr;
    e.rdata = ref_rd(a[31:2]);
    if (wr) ref_mem[a[31:2]] = merge_be(e.rdata, wd, be);
    if (v0[s] && t0[s] == t) begin
      e.kind = HIT0; e.lat = 1;
      exp_tag_act  += 1 + ((wr && !d0[s]) ? 1 : 0);
      exp_data_act += wr ? 2 : 1;
      if (wr) d0[s] = 1;
      if (wr) n_hit0_wr++; else n_hit0_rd++;
    end else if (v1[s] && t1[s] == t) begin
      logic dd;
      e.kind = HIT1; e.lat = 2;
      exp_tag_act  += 4;
      exp_data_act += 18;
      dd = d1[s] | wr;
      t1[s] = t0[s]; v1[s] = v0[s]; d1[s] = d0[s];
      t0[s] = t; v0[s] = 1; d0[s] = dd;
      n_hit1++;
    end else begin
      e.kind = MISS;
      e.lat  = 2 + RL + 4;
      exp_tag_act  += 2 + 1;
      exp_data_act += 2 + 4;
      exp_mem_rd++;
      if (v1[s] && d1[s]) begin
        e.lat += 5 + WL; exp_data_act += 4; exp_mem_wr++; n_miss_wb++;
      end
      if (v0[s]) begin
        e.lat += 5; exp_tag_act += 1; exp_data_act += 8; n_miss_move++;
      end else n_miss_empty++;
      if (wr) n_wr_miss++;
      t1[s] = t0[s]; v1[s] = v0[s]; d1[s] = d0[s];
      t0[s] = t; v0[s] = 1; d0[s] = wr;
    end
    return e;
  endfunction

  function automatic int unsigned occupancy(exp_t e);
    case (e.kind)
      HIT0:    return e.write ? 2 : 1;
      HIT1:    return 11;
      default: return e.lat + 1;
    endcase
  endfunction

  // ---------------------------------------------------------------- monitor
  bit started = 0;
  always @(posedge clk) if (started) begin
    cycle++;
    got_tag_act  += longint'(act_tag[0])  + longint'(act_tag[1]);
    got_data_act += longint'(act_data[0]) + longint'(act_data[1]);
    check(cpu_req_ready == (cycle >= next_ready),
          $sformatf("cpu_req_ready=%b at cycle %0d, expected from cycle %0d",
                    cpu_req_ready, cycle, next_ready));
    if (cpu_resp_valid) begin
      exp_t e;
      check(expq.size() != 0, "response without request");
      if (expq.size() != 0) begin
        e = expq.pop_front();
        if (e.kind == MISS) begin
          check(cycle - e.t_acc >= longint'(e.lat),
                $sformatf("MISS latency %0d below %0d", cycle - e.t_acc, e.lat));
          next_ready = cycle + 1;
          n_stalled += int'(cycle - e.t_acc > longint'(e.lat));
        end else
          check(cycle - e.t_acc == longint'(e.lat),
                $sformatf("%s latency %0d expected %0d", e.kind.name(), cycle - e.t_acc, e.lat));
        if (!e.write)
          check(cpu_resp_rdata == e.rdata,
                $sformatf("load data %h expected %h", cpu_resp_rdata, e.rdata));
        if (e.kind != MISS)
          check(probe_way == ((e.kind == HIT1) ? WAY1 : WAY0), "output mux select");
      end
    end
    if (cpu_req_valid && cpu_req_ready) begin
      exp_t e;
      if (cpu_resp_valid) n_back2back++;
      e = predict(cpu_req_write, cpu_req_addr, cpu_req_wdata, cpu_req_be);
      e.t_acc = cycle;
      next_ready = (e.kind == MISS) ? 64'h7FFF_FFFF_FFFF_FFFF : cycle + longint'(occupancy(e));
      expq.push_back(e);
    end
  end

  // ---------------------------------------------------------------- stimulus
  logic [TAG_W-1:0] tag_pool [NTAGS];

  initial begin
    for (int i = 0; i < NTAGS; i++) tag_pool[i] = TAG_W'($urandom);
    for (int s = 0; s < SETS; s++) begin
      v0[s] = 0; v1[s] = 0; d0[s] = 0; d1[s] = 0; t0[s] = '0; t1[s] = '0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!cpu_req_ready) @(negedge clk);
    started = 1;
    for (int n = 0; n < NREQ; n++) begin
      int unsigned r;
      logic [TAG_W-1:0] tg;
      if ($urandom_range(7) == 0) begin
        cpu_req_valid = 0;
        repeat ($urandom_range(3)) @(negedge clk);
      end
      // skewed tag choice: a hot tag per set gets most references
      r  = $urandom_range(99);
      tg = (r < 60) ? tag_pool[0] : tag_pool[1 + $urandom_range(NTAGS - 2)];
      cpu_req_valid = 1;
      cpu_req_write = ($urandom_range(99) < 30);
      cpu_req_addr  = {tg, IDX_W'($urandom_range(SETS - 1)), 2'($urandom), 2'b00};
      cpu_req_wdata = $urandom;
      cpu_req_be    = cpu_req_write ? 4'($urandom_range(1, 15)) : 4'hF;
      do @(posedge clk); while (!cpu_req_ready);
      @(negedge clk);
    end
    cpu_req_valid = 0;
    while (expq.size() != 0) @(negedge clk);
    repeat (30) @(negedge clk);
    check(got_tag_act == exp_tag_act,
          $sformatf("tag-array activations %0d expected %0d", got_tag_act, exp_tag_act));
    check(got_data_act == exp_data_act,
          $sformatf("data-array activations %0d expected %0d", got_data_act, exp_data_act));
    check(mem.n_reads == exp_mem_rd, $sformatf("memory reads %0d expected %0d", mem.n_reads, exp_mem_rd));
    check(mem.n_writes == exp_mem_wr, $sformatf("memory writes %0d expected %0d", mem.n_writes, exp_mem_wr));
    $display("mechanisms: load-hit-way0=%0d store-hit-way0=%0d hit-way1-promotion=%0d miss-empty=%0d miss-move=%0d miss-writeback=%0d store-miss=%0d back-to-back=%0d",
             n_hit0_rd, n_hit0_wr, n_hit1, n_miss_empty, n_miss_move, n_miss_wb, n_wr_miss, n_back2back);
    $display("activity: tag=%0d data=%0d cycles=%0d", got_tag_act, got_data_act, cycle);
    check(n_hit0_rd > 0, "no load hit in way 0");
    check(n_hit0_wr > 0, "no store hit in way 0");
    check(n_hit1 > 0, "no promotion swap");
    check(n_miss_empty > 0, "no miss into an empty set");
    check(n_miss_move > 0, "no priority-replacement move");
    check(n_miss_wb > 0, "no dirty write-back");
    check(n_wr_miss > 0, "no store miss");
    check(n_back2back > 0, "no request accepted in the response cycle");
    check(n_stalled > 0, "no miss was slowed by the memory stall");
    $display("misses slowed by memory stalls: %0d", n_stalled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
