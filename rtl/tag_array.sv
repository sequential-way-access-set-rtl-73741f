// tag_array: the tag memory of one cache way.
//
// One entry per set, each {valid, dirty, tag}.  It models a single-port
// synchronous SRAM such as a memory-compiler macro: the entry addressed in a
// cycle with ce=1 and we=0 appears on rdata after the next rising clock edge
// and stays there until the next read; with ce=1 and we=1 the entry is
// written at that edge.  A cycle with ce=0 leaves the memory idle, which is
// what saves energy when a way is not probed.  The valid bits are cleared by
// reset, one set per cycle after rst_n is released, while busy is high; this
// sequential clear is a choice of this design (a macro has no reset), which
// the source thesis does not describe.
module tag_array #(
  parameter int unsigned SETS  = 1024,
  parameter int unsigned TAG_W = 18,
  localparam int unsigned IDX_W = $clog2(SETS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ce,
  input  logic             we,
  input  logic [IDX_W-1:0] addr,
  input  logic             wvalid,
  input  logic             wdirty,
  input  logic [TAG_W-1:0] wtag,
  output logic             rvalid,
  output logic             rdirty,
  output logic [TAG_W-1:0] rtag,
  output logic             busy
);

  typedef struct packed {
    logic             valid;
    logic             dirty;
    logic [TAG_W-1:0] tag;
  } entry_t;

  entry_t             mem [SETS];
  entry_t             rd_q;
  logic [IDX_W-1:0]   clr_idx;
  logic               clearing;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_idx  <= '0;
      rd_q     <= '0;
    end else if (clearing) begin
      mem[clr_idx] <= '0;
      clr_idx      <= clr_idx + 1'b1;
      if (clr_idx == IDX_W'(SETS - 1)) clearing <= 1'b0;
    end else if (ce) begin
      if (we) mem[addr] <= '{valid: wvalid, dirty: wdirty, tag: wtag};
      else    rd_q      <= mem[addr];
    end
  end

  assign busy   = clearing;
  assign rvalid = rd_q.valid;
  assign rdirty = rd_q.dirty;
  assign rtag   = rd_q.tag;

endmodule
