// tb_size_sweep: the matrix kernel on every evaluated cache size.
//
// Runs the 50 x 50 matrix multiply (see matrix_runner) on caches of 2, 4, 8,
// 16, 32, 64 and 128 KB, each once with the long-latency main memory (read
// 16, write 18 cycles) and once with the short-latency one (read 6, write 8),
// all in parallel.  Each run checks its result and its bookkeeping; this
// module adds up their checks and checks that the miss count does not grow
// as the cache grows.  The three matrices start at multiples of 64 KB, so
// their elements share set indices at every size and conflict misses remain
// even in caches larger than the 30,000-byte working set.
module tb_size_sweep;
  localparam int NS = 7;
  localparam int unsigned SIZES [NS] = '{2048, 4096, 8192, 16384, 32768, 65536, 131072};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done_l [NS], done_s [NS];
  int   chk_l [NS], chk_s [NS], fail_l [NS], fail_s [NS];
  longint miss_l [NS];

  for (genvar i = 0; i < NS; i++) begin : g_size
    matrix_runner #(.CB(SIZES[i]), .RL(16), .WL(18)) u_long (
      .clk, .rst_n, .done(done_l[i]), .checks(chk_l[i]), .failures(fail_l[i]));
    matrix_runner #(.CB(SIZES[i]), .RL(6), .WL(8)) u_short (
      .clk, .rst_n, .done(done_s[i]), .checks(chk_s[i]), .failures(fail_s[i]));
    always @(posedge clk) miss_l[i] = u_long.n_miss;
  end

  int checks = 0, failures = 0;

  function automatic bit all_done();
    for (int i = 0; i < NS; i++) if (!done_l[i] || !done_s[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!all_done()) @(negedge clk);
    @(negedge clk);
    for (int i = 0; i < NS; i++) begin
      checks += chk_l[i] + chk_s[i];
      failures += fail_l[i] + fail_s[i];
    end
    for (int i = 1; i < NS; i++) begin
      checks++;
      if (miss_l[i] > miss_l[i-1]) begin
        failures++;
        $display("FAIL: %0d misses at %0d bytes, %0d at %0d bytes", miss_l[i], SIZES[i],
                 miss_l[i-1], SIZES[i-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
