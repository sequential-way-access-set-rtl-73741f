// seq_cache: two-way sequential way-access set-associative cache, with
// priority replacement and promotion placement (the "Seq+Pri+Pmt"
// organisation), at its evaluated size of 32 KB with 16-byte lines.
//
// A conventional two-way cache reads both ways' tag and data arrays on every
// access and lets the tag comparators pick the data word.  This cache reads
// one way per cycle: way 0 first, way 1 only when way 0 misses.  Hits in way
// 0 therefore cost one array pair instead of two, and since the probed way is
// known before the tags are compared, the output multiplexer is steered by the
// controller state (probe_way) instead of by the hit signals.  Placement keeps
// the most recently used line of each set in way 0: a refilled line is
// written to way 0 and a hit in way 1 swaps the two lines.
//
// Structure: per way one tag array, one data array and one tag comparator,
// plus the controller (seq_cache_ctrl) and the output multiplexer.  Address
// split for the default size: byte offset [1:0], word offset [3:2], set index
// [13:4] (1024 sets), tag [31:14].  Each way's data array is one memory cell
// up to 32 KB per way and is split into 16 KB cells above that, of which an
// access enables only the addressed one.  The act_tag/act_data outputs show
// which arrays are activated in each cycle, so a testbench can count array
// accesses; probe_way is the multiplexer select.
//
// Timing (see seq_cache_ctrl): load hit in way 0 answers one cycle after
// acceptance at one access per cycle; hit in way 1 answers after two cycles
// and is followed by an 8-cycle swap; a miss costs an optional line
// write-back, a 5-cycle line move, the main-memory read and 4 refill cycles.
// After reset the tag arrays clear their valid bits, one set per cycle, and
// cpu_req_ready stays low meanwhile.  The block structure and the sizes
// follow the source thesis; the interfaces, write policy and reset sequence are
// this design's choices.
module seq_cache
  import seq_cache_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 32768,
  parameter int unsigned LINE_BYTES  = 16,
  parameter int unsigned ADDR_W      = 32,
  localparam int unsigned SETS  = CACHE_BYTES / (2 * LINE_BYTES),
  localparam int unsigned IDX_W = $clog2(SETS),
  localparam int unsigned TAG_W = ADDR_W - IDX_W - LINE_OFF_W,
  localparam int unsigned DA_W  = IDX_W + WORD_OFF_W,
  localparam int unsigned WAY_BYTES  = CACHE_BYTES / 2,
  localparam int unsigned CELL_BYTES = (WAY_BYTES <= MAX_CELL_BYTES) ? WAY_BYTES
                                                                     : SPLIT_CELL_BYTES,
  localparam int unsigned CELLS      = WAY_BYTES / CELL_BYTES
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cpu_req_valid,
  output logic                         cpu_req_ready,
  input  logic                         cpu_req_write,
  input  logic [ADDR_W-1:0]            cpu_req_addr,
  input  word_t                        cpu_req_wdata,
  input  be_t                          cpu_req_be,
  output logic                         cpu_resp_valid,
  output word_t                        cpu_resp_rdata,
  output logic                         mem_req_valid,
  input  logic                         mem_req_ready,
  output logic                         mem_req_write,
  output logic [ADDR_W-LINE_OFF_W-1:0] mem_req_addr,
  output line_t                        mem_req_wdata,
  input  logic                         mem_resp_valid,
  input  line_t                        mem_resp_rdata,
  output logic [1:0]                   act_tag,
  output logic [1:0]                   act_data,
  output way_t                         probe_way
);

  // The line organisation is fixed by the package (four 32-bit words).
  if (LINE_BYTES != WORDS_PER_LINE * WORD_BYTES) begin : g_bad_line
    $error("seq_cache: LINE_BYTES must be %0d", WORDS_PER_LINE * WORD_BYTES);
  end

  logic [1:0]                tag_ce, tag_we, tag_wvalid, tag_wdirty;
  logic [1:0]                tag_rvalid, tag_rdirty, tag_busy_w, way_hit;
  logic [IDX_W-1:0]          tag_addr;
  logic [1:0][TAG_W-1:0]     tag_wtag, tag_rtag;
  logic [1:0]                data_ce, data_we;
  logic [1:0][DA_W-1:0]      data_addr;
  be_t                       data_be;
  logic [1:0][WORD_BITS-1:0] data_wdata, data_rdata;
  logic [1:0][CELLS-1:0]     data_cell_ce;
  logic [TAG_W-1:0]          cmp_tag;
  word_t                     way_rdata;

  for (genvar w = 0; w < 2; w++) begin : g_way
    tag_array #(.SETS(SETS), .TAG_W(TAG_W)) u_tag (
      .clk    (clk),
      .rst_n  (rst_n),
      .ce     (tag_ce[w]),
      .we     (tag_we[w]),
      .addr   (tag_addr),
      .wvalid (tag_wvalid[w]),
      .wdirty (tag_wdirty[w]),
      .wtag   (tag_wtag[w]),
      .rvalid (tag_rvalid[w]),
      .rdirty (tag_rdirty[w]),
      .rtag   (tag_rtag[w]),
      .busy   (tag_busy_w[w])
    );

    data_array #(
      .WORDS      (SETS * WORDS_PER_LINE),
      .CELL_WORDS (CELL_BYTES / WORD_BYTES)
    ) u_data (
      .clk   (clk),
      .ce    (data_ce[w]),
      .we    (data_we[w]),
      .addr  (data_addr[w]),
      .be    (data_be),
      .wdata (data_wdata[w]),
      .rdata (data_rdata[w]),
      .cell_ce (data_cell_ce[w])
    );

    tag_comparator #(.TAG_W(TAG_W)) u_comp (
      .entry_valid (tag_rvalid[w]),
      .entry_tag   (tag_rtag[w]),
      .req_tag     (cmp_tag),
      .hit         (way_hit[w])
    );
  end

  // Output multiplexer: its select is the predetermined probed way, not a hit.
  assign way_rdata = (probe_way == WAY1) ? data_rdata[1] : data_rdata[0];

  seq_cache_ctrl #(.SETS(SETS), .ADDR_W(ADDR_W)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .cpu_req_valid  (cpu_req_valid),
    .cpu_req_ready  (cpu_req_ready),
    .cpu_req_write  (cpu_req_write),
    .cpu_req_addr   (cpu_req_addr),
    .cpu_req_wdata  (cpu_req_wdata),
    .cpu_req_be     (cpu_req_be),
    .cpu_resp_valid (cpu_resp_valid),
    .cpu_resp_rdata (cpu_resp_rdata),
    .mem_req_valid  (mem_req_valid),
    .mem_req_ready  (mem_req_ready),
    .mem_req_write  (mem_req_write),
    .mem_req_addr   (mem_req_addr),
    .mem_req_wdata  (mem_req_wdata),
    .mem_resp_valid (mem_resp_valid),
    .mem_resp_rdata (mem_resp_rdata),
    .tag_ce         (tag_ce),
    .tag_we         (tag_we),
    .tag_addr       (tag_addr),
    .tag_wvalid     (tag_wvalid),
    .tag_wdirty     (tag_wdirty),
    .tag_wtag       (tag_wtag),
    .tag_rvalid     (tag_rvalid),
    .tag_rdirty     (tag_rdirty),
    .tag_rtag       (tag_rtag),
    .tag_busy       (|tag_busy_w),
    .way_hit        (way_hit),
    .data_ce        (data_ce),
    .data_we        (data_we),
    .data_addr      (data_addr),
    .data_be        (data_be),
    .data_wdata     (data_wdata),
    .data_rdata     (data_rdata),
    .probe_way      (probe_way),
    .cmp_tag        (cmp_tag),
    .way_rdata      (way_rdata)
  );

  assign act_tag  = tag_ce;
  for (genvar w = 0; w < 2; w++) begin : g_act
    assign act_data[w] = |data_cell_ce[w];   // the cell actually enabled
  end

endmodule
