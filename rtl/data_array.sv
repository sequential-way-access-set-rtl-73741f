// data_array: the data memory of one cache way.
//
// WORDS entries of 32 bits, addressed by {set index, word offset}, so one
// access moves one word: a line of four words takes four accesses, which is
// how the source thesis counts data-array activity.  It models single-port
// synchronous SRAM macros: with ce=1 and we=0 the addressed word appears on
// rdata after the next rising edge and is held until the next read; with
// ce=1 and we=1 the bytes selected by be are written at that edge.
//
// The array is built from CELLS = WORDS / CELL_WORDS memory cells.  The top
// address bits pick the cell and only that cell is enabled (cell_ce), the
// way the thesis builds each way of its 128 KB cache from four 16 KB cells
// of which only the selected one is activated.  The read data comes from the
// cell read last.  With CELL_WORDS = WORDS (the default, and the 32 KB cache)
// there is a single cell, and cell_ce is simply ce.  The byte enables are
// this design's choice for sub-word stores.  The contents are not reset, like
// an SRAM.
module data_array #(
  parameter int unsigned WORDS      = 4096,
  parameter int unsigned CELL_WORDS = WORDS,
  localparam int unsigned AW    = $clog2(WORDS),
  localparam int unsigned CELLS = WORDS / CELL_WORDS,
  localparam int unsigned CW    = $clog2(CELL_WORDS),
  localparam int unsigned SW    = (CELLS > 1) ? $clog2(CELLS) : 1
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [3:0]       be,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  output logic [CELLS-1:0] cell_ce
);

  logic [SW-1:0] csel, csel_q;
  logic [CW-1:0] caddr;
  logic [31:0]   rd_q [CELLS];

  if (CELLS > 1) begin : g_sel
    assign csel = addr[AW-1 -: SW];
  end else begin : g_one
    assign csel = '0;
  end
  assign caddr = addr[CW-1:0];

  for (genvar c = 0; c < CELLS; c++) begin : g_cell
    logic [31:0] mem [CELL_WORDS];
    assign cell_ce[c] = ce && (csel == SW'(c));
    always_ff @(posedge clk) begin
      if (cell_ce[c]) begin
        if (we) begin
          for (int b = 0; b < 4; b++)
            if (be[b]) mem[caddr][8*b +: 8] <= wdata[8*b +: 8];
        end else begin
          rd_q[c] <= mem[caddr];
        end
      end
    end
  end

  // the csel whose word is on rdata
  always_ff @(posedge clk) begin
    if (ce && !we) csel_q <= csel;
  end

  assign rdata = rd_q[csel_q];

endmodule
