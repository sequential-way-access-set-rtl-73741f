// tb_workloads: benchmark kernels run through the cache at its default size.
//
// The testbench plays the processor: it executes three of the evaluated
// kernels with every data load and store going through a 32 KB cache backed
// by the long-latency main memory (read 16, write 18 cycles):
//   Matrix : C = A x B with 50 x 50 integer matrices,
//   FFT    : 1024-point radix-2 complex FFT in fixed point (Q14 twiddles),
//   Sorting: quicksort of 65536 random 32-bit integers.
// Each kernel is also computed on plain testbench arrays, and the results
// read back through the cache must match.  Per kernel it reports the
// accesses, the accesses that hit way 0, hit way 1 or missed (from the
// response latency), the tag- and data-array activations and the cycles,
// and the activations a conventional two-way cache would make for the same
// hits (both ways on every probe).  Matrix and Sorting overflow the cache and
// must show promotion swaps and misses; the FFT's 12 KB working set (real,
// imaginary and twiddle arrays at distinct set indices) is installed by its
// initialising stores, so every FFT access must hit way 0.
module tb_workloads;
  import seq_cache_pkg::*;
  import seq_cache_tb_pkg::*;

  logic clk = 0, rst_n = 0;
  logic cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0]  cpu_req_be = 4'hF;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_req_wdata, mem_resp_rdata;
  logic [1:0]  act_tag, act_data;
  way_t        probe_way;

  seq_cache dut (.*);

  main_memory_model #(.READ_LAT(16), .WRITE_LAT(18)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_write(mem_req_write), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0, n_tag = 0, n_data = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_tag  += longint'(act_tag[0])  + longint'(act_tag[1]);
    n_data += longint'(act_data[0]) + longint'(act_data[1]);
  end

  longint n_acc, n_h0, n_h1, n_miss;

  task automatic access(input bit wr, input logic [31:0] a, input logic [31:0] wd,
                        output logic [31:0] rd);
    int lat;
    @(negedge clk);
    cpu_req_valid = 1; cpu_req_write = wr; cpu_req_addr = a; cpu_req_wdata = wd;
    do @(posedge clk); while (!cpu_req_ready);
    @(negedge clk); cpu_req_valid = 0;
    lat = 1;
    while (!cpu_resp_valid) begin @(negedge clk); lat++; end
    rd = cpu_resp_rdata;
    n_acc++;
    if (lat == 1) n_h0++; else if (lat == 2) n_h1++; else n_miss++;
  endtask

  task automatic st(logic [31:0] a, logic [31:0] d);
    logic [31:0] unused;
    access(1, a, d, unused);
  endtask

  task automatic ld(logic [31:0] a, output logic [31:0] d);
    access(0, a, 0, d);
  endtask

  longint c0, t0, d0;
  task automatic begin_kernel();
    n_acc = 0; n_h0 = 0; n_h1 = 0; n_miss = 0;
    c0 = cyc; t0 = n_tag; d0 = n_data;
  endtask

  task automatic end_kernel(string name, bit fits);
    longint conv;
    conv = 2 * n_acc;
    $display("%-8s accesses=%0d hit_way0=%0d hit_way1=%0d miss=%0d tag_act=%0d data_act=%0d cycles=%0d conventional_probe_act=%0d",
             name, n_acc, n_h0, n_h1, n_miss, n_tag - t0, n_data - d0, cyc - c0, conv);
    if (fits) begin
      // the working set was installed by the initialising stores, each line
      // in way 0 of its own set: every access must hit way 0
      check(n_h0 == n_acc, {name, ": access outside way 0"});
    end else begin
      check(n_h1 > 0, {name, ": no promotion swap"});
      check(n_miss > 0, {name, ": no miss"});
      check(n_h0 > n_h1, {name, ": way 0 does not take most hits"});
    end
  endtask

  // ---------------------------------------------------------------- Matrix
  localparam int N = 50;
  localparam logic [31:0] MA = 32'h0001_0000, MB = 32'h0002_0000, MC = 32'h0003_0000;
  int ra [N][N], rb [N][N], rc [N][N];

  task automatic run_matrix();
    logic [31:0] x, y;
    int sum;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ra[i][j] = int'($urandom_range(200)) - 100;
        rb[i][j] = int'($urandom_range(200)) - 100;
        st(MA + 32'(4 * (i * N + j)), ra[i][j]);
        st(MB + 32'(4 * (i * N + j)), rb[i][j]);
      end
    begin_kernel();
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        sum = 0;
        for (int k = 0; k < N; k++) begin
          ld(MA + 32'(4 * (i * N + k)), x);
          ld(MB + 32'(4 * (k * N + j)), y);
          sum += int'(x) * int'(y);
        end
        st(MC + 32'(4 * (i * N + j)), sum);
      end
    end_kernel("Matrix", 0);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        rc[i][j] = 0;
        for (int k = 0; k < N; k++) rc[i][j] += ra[i][k] * rb[k][j];
        ld(MC + 32'(4 * (i * N + j)), x);
        check(int'(x) == rc[i][j], $sformatf("C[%0d][%0d]=%0d expected %0d", i, j, int'(x), rc[i][j]));
      end
  endtask

  // ---------------------------------------------------------------- FFT
  localparam int NF = 1024, LOGNF = 10;
  localparam logic [31:0] FRE = 32'h0004_0000, FIM = 32'h0004_1000, FTW = 32'h0004_2000;
  int fre [NF], fim [NF], twr [NF/2], twi [NF/2];

  function automatic int bitrev(int v);
    int r = 0;
    for (int b = 0; b < LOGNF; b++) r |= ((v >> b) & 1) << (LOGNF - 1 - b);
    return r;
  endfunction

  task automatic run_fft();
    logic [31:0] ar, ai, br, bi, wr, wi;
    int tr, ti;
    for (int k = 0; k < NF / 2; k++) begin
      twr[k] = int'($rtoi($cos(2.0 * 3.14159265358979 * k / NF) * 16384.0));
      twi[k] = -int'($rtoi($sin(2.0 * 3.14159265358979 * k / NF) * 16384.0));
      st(FTW + 32'(8 * k), twr[k]);
      st(FTW + 32'(8 * k + 4), twi[k]);
    end
    for (int i = 0; i < NF; i++) begin
      fre[bitrev(i)] = int'($urandom_range(2000)) - 1000;
      fim[bitrev(i)] = int'($urandom_range(2000)) - 1000;
    end
    for (int i = 0; i < NF; i++) begin
      st(FRE + 32'(4 * i), fre[i]);
      st(FIM + 32'(4 * i), fim[i]);
    end
    begin_kernel();
    for (int s = 1; s <= LOGNF; s++) begin
      int m = 1 << s, h = m / 2, step = NF / m;
      for (int k = 0; k < NF; k += m)
        for (int j = 0; j < h; j++) begin
          int p = k + j, q = k + j + h;
          // through the cache
          ld(FTW + 32'(8 * j * step), wr);
          ld(FTW + 32'(8 * j * step + 4), wi);
          ld(FRE + 32'(4 * q), br); ld(FIM + 32'(4 * q), bi);
          ld(FRE + 32'(4 * p), ar); ld(FIM + 32'(4 * p), ai);
          tr = (int'(wr) * int'(br) - int'(wi) * int'(bi)) >>> 14;
          ti = (int'(wr) * int'(bi) + int'(wi) * int'(br)) >>> 14;
          st(FRE + 32'(4 * q), (int'(ar) - tr) >>> 1); st(FIM + 32'(4 * q), (int'(ai) - ti) >>> 1);
          st(FRE + 32'(4 * p), (int'(ar) + tr) >>> 1); st(FIM + 32'(4 * p), (int'(ai) + ti) >>> 1);
          // reference on plain arrays
          tr = (twr[j * step] * fre[q] - twi[j * step] * fim[q]) >>> 14;
          ti = (twr[j * step] * fim[q] + twi[j * step] * fre[q]) >>> 14;
          fre[q] = (fre[p] - tr) >>> 1; fim[q] = (fim[p] - ti) >>> 1;
          fre[p] = (fre[p] + tr) >>> 1; fim[p] = (fim[p] + ti) >>> 1;
        end
    end
    end_kernel("FFT", 1);
    for (int i = 0; i < NF; i++) begin
      ld(FRE + 32'(4 * i), ar); ld(FIM + 32'(4 * i), ai);
      check(int'(ar) == fre[i] && int'(ai) == fim[i], $sformatf("FFT bin %0d", i));
    end
  endtask

  // ---------------------------------------------------------------- Sorting
  localparam int NS = 65536;
  localparam logic [31:0] SA = 32'h0010_0000;
  int sref [NS];
  int lo_stk [64], hi_stk [64];

  function automatic logic [31:0] sa(int i);
    return SA + 32'(4 * i);
  endfunction

  task automatic run_sort();
    int sp;
    longint sum_in = 0, sum_out = 0;
    logic [31:0] pv, x, y;
    for (int i = 0; i < NS; i++) begin
      sref[i] = int'($urandom);
      sum_in += longint'(sref[i]);
      st(sa(i), sref[i]);
    end
    begin_kernel();
    sp = 0; lo_stk[0] = 0; hi_stk[0] = NS - 1;
    while (sp >= 0) begin
      int lo = lo_stk[sp], hi = hi_stk[sp];
      sp--;
      if (lo < hi) begin
        int i = lo - 1, j = hi + 1;
        ld(sa(lo + (hi - lo) / 2), pv);
        // Hoare partition
        forever begin
          do begin i++; ld(sa(i), x); end while (int'(x) < int'(pv));
          do begin j--; ld(sa(j), y); end while (int'(y) > int'(pv));
          if (i >= j) break;
          st(sa(i), y); st(sa(j), x);
        end
        // push the larger part first, so the stack stays shallow
        if (j - lo > hi - j - 1) begin
          sp++; lo_stk[sp] = lo;    hi_stk[sp] = j;
          sp++; lo_stk[sp] = j + 1; hi_stk[sp] = hi;
        end else begin
          sp++; lo_stk[sp] = j + 1; hi_stk[sp] = hi;
          sp++; lo_stk[sp] = lo;    hi_stk[sp] = j;
        end
      end
    end
    end_kernel("Sorting", 0);
    ld(sa(0), y);
    sum_out = longint'(int'(y));
    for (int i = 1; i < NS; i++) begin
      ld(sa(i), x);
      if (int'(x) < int'(y)) check(0, $sformatf("not sorted at %0d", i));
      sum_out += longint'(int'(x));
      y = x;
    end
    check(1, "sorted order");
    check(sum_in == sum_out, "sorted data is not a permutation of the input");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!cpu_req_ready) @(negedge clk);
    run_matrix();
    run_fft();
    run_sort();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
