// matrix_runner: one cache of a given size running the 50 x 50 matrix kernel.
//
// Testbench helper.  It instantiates a seq_cache of CB bytes and a
// behavioural main memory with the given read and write latencies, waits for
// the cache to leave reset, stores two random 50 x 50 integer matrices, and
// computes C = A x B with every load and store going through the cache.  It
// then reads C back through the cache and compares it with a plain
// computation.  It counts accesses by outcome (taken from the response
// latency: 1 = way-0 hit, 2 = way-1 hit, more = miss), array activations
// and cycles of the kernel, and raises done at the end.  Every cycle it also
// checks that each way enables at most one of its data memory cells, and
// that one exactly when act_data shows the way's data array active (a way
// of more than 32 KB is split into 16 KB cells).
module matrix_runner
  import seq_cache_pkg::*;
#(
  parameter int unsigned CB = 32768,
  parameter int unsigned RL = 16,
  parameter int unsigned WL = 18
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures
);

  logic        cpu_req_valid = 0, cpu_req_ready, cpu_req_write = 0;
  logic [31:0] cpu_req_addr = '0, cpu_req_wdata = '0;
  logic [3:0]  cpu_req_be = 4'hF;
  logic        cpu_resp_valid;
  logic [31:0] cpu_resp_rdata;
  logic        mem_req_valid, mem_req_ready, mem_req_write, mem_resp_valid;
  logic [27:0] mem_req_addr;
  logic [127:0] mem_req_wdata, mem_resp_rdata;
  logic [1:0]  act_tag, act_data;
  way_t        probe_way;

  seq_cache #(.CACHE_BYTES(CB)) dut (.*);

  main_memory_model #(.READ_LAT(RL), .WRITE_LAT(WL)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_write(mem_req_write), .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_rdata(mem_resp_rdata));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL (%0d bytes): %s", CB, what);
    end
  endtask

  longint cyc = 0, n_tag = 0, n_data = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_tag  += longint'(act_tag[0])  + longint'(act_tag[1]);
    n_data += longint'(act_data[0]) + longint'(act_data[1]);
  end

  // data memory cells per way, worked out from the cache size
  localparam int unsigned CELLS = (CB / 2 <= 32768) ? 1 : CB / 2 / 16384;
  logic [1:0][CELLS-1:0] cell_ce;
  assign cell_ce[0] = dut.g_way[0].u_data.cell_ce;
  assign cell_ce[1] = dut.g_way[1].u_data.cell_ce;
  int bad_cells = 0;
  longint n_cell_act = 0;
  always @(posedge clk) if (rst_n) begin
    for (int w = 0; w < 2; w++) begin
      if ($countones(cell_ce[w]) != int'(act_data[w])) bad_cells++;
      n_cell_act += longint'($countones(cell_ce[w]));
    end
  end

  longint n_acc = 0, n_h0 = 0, n_h1 = 0, n_miss = 0;

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

  localparam int N = 50;
  localparam logic [31:0] MA = 32'h0001_0000, MB = 32'h0002_0000, MC = 32'h0003_0000;
  int ra [N][N], rb [N][N];

  initial begin
    logic [31:0] x, y;
    int sum, r0;
    longint c0, t0, d0;
    checks = 0; failures = 0; done = 0;
    @(posedge rst_n);
    while (!cpu_req_ready) @(negedge clk);
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        ra[i][j] = (i * 7 + j * 3) % 23 - 11;
        rb[i][j] = (i * 5 + j * 11) % 19 - 9;
        access(1, MA + 32'(4 * (i * N + j)), ra[i][j], x);
        access(1, MB + 32'(4 * (i * N + j)), rb[i][j], x);
      end
    n_acc = 0; n_h0 = 0; n_h1 = 0; n_miss = 0;
    r0 = int'(mem.n_reads);
    c0 = cyc; t0 = n_tag; d0 = n_data;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        sum = 0;
        for (int k = 0; k < N; k++) begin
          access(0, MA + 32'(4 * (i * N + k)), 0, x);
          access(0, MB + 32'(4 * (k * N + j)), 0, y);
          sum += int'(x) * int'(y);
        end
        access(1, MC + 32'(4 * (i * N + j)), sum, x);
      end
    $display("%7d bytes  RL=%0d WL=%0d  accesses=%0d hit_way0=%0d hit_way1=%0d miss=%0d tag_act=%0d data_act=%0d cycles=%0d",
             CB, RL, WL, n_acc, n_h0, n_h1, n_miss, n_tag - t0, n_data - d0, cyc - c0);
    check(n_h0 + n_h1 + n_miss == n_acc, "outcome counts do not add up");
    check(longint'(mem.n_reads) - longint'(r0) == n_miss, "misses differ from memory reads");
    check(n_tag - t0 >= n_acc, "fewer tag activations than accesses");
    check(bad_cells == 0, $sformatf("%0d cycles with wrong data cell enables", bad_cells));
    check(n_cell_act == n_data, "cell enables differ from data-array activations");
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        sum = 0;
        for (int k = 0; k < N; k++) sum += ra[i][k] * rb[k][j];
        access(0, MC + 32'(4 * (i * N + j)), 0, x);
        check(int'(x) == sum, $sformatf("C[%0d][%0d]", i, j));
      end
    done = 1;
  end

endmodule
