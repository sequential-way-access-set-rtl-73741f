// main_memory_model: behavioural model of the main memory behind the cache.
//
// Not synthesizable logic: it is the backing store of the simulation setup.
// One request of one 16-byte line at a time.  A request is accepted when
// req_valid is high and the model is idle (req_ready high); that is cycle 1
// of the transfer, and resp_valid is high in cycle READ_LAT of a read (with
// the line on resp_rdata) or cycle WRITE_LAT of a write.  The defaults, 16
// and 18 cycles, are the long-latency memory of the source thesis; 6 and 8 give
// the short-latency one.  Storage is sparse (an associative array); a line
// never written reads as seq_cache_tb_pkg::init_word of its word addresses.
// With MAX_STALL > 0 each request waits a random 0..MAX_STALL cycles before
// req_ready rises, to exercise the requester's hold rule.  It counts read
// and write transfers for the testbenches.
module main_memory_model
  import seq_cache_tb_pkg::*;
#(
  parameter int unsigned LADDR_W   = 28,
  parameter int unsigned READ_LAT  = 16,
  parameter int unsigned WRITE_LAT = 18,
  parameter int unsigned MAX_STALL = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  logic               req_write,
  input  logic [LADDR_W-1:0] req_addr,
  input  logic [127:0]       req_wdata,
  output logic               resp_valid,
  output logic [127:0]       resp_rdata
);

  logic [127:0] store [logic [LADDR_W-1:0]];
  logic               busy;
  logic               op_write;
  logic [LADDR_W-1:0] op_addr;
  logic [127:0]       op_wdata;
  int unsigned        remain;
  int unsigned        n_reads, n_writes;
  int unsigned        stall;

  function automatic logic [127:0] read_line(logic [LADDR_W-1:0] a);
    logic [127:0] l;
    if (store.exists(a)) return store[a];
    for (int i = 0; i < 4; i++) l[32*i +: 32] = init_word(32'({a, 2'(i)}));
    return l;
  endfunction

  assign req_ready  = !busy && stall == 0;
  assign resp_valid = busy && remain == 0;
  assign resp_rdata = resp_valid && !op_write ? read_line(op_addr) : '0;

  always @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      remain   <= 0;
      n_reads  <= 0;
      n_writes <= 0;
      op_write <= 1'b0;
      op_addr  <= '0;
      op_wdata <= '0;
      stall    <= 0;
    end else if (!busy) begin
      if (req_valid && stall != 0) begin
        stall <= stall - 1;
      end else if (req_valid) begin
        stall    <= $urandom_range(MAX_STALL);
        busy     <= 1'b1;
        op_write <= req_write;
        op_addr  <= req_addr;
        op_wdata <= req_wdata;
        remain   <= (req_write ? WRITE_LAT : READ_LAT) - 2;
      end
    end else if (remain != 0) begin
      remain <= remain - 1;
    end else begin
      busy <= 1'b0;
      if (op_write) begin
        store[op_addr] = op_wdata;  // sparse array: blocking update
        n_writes <= n_writes + 1;
      end else begin
        n_reads <= n_reads + 1;
      end
    end
  end

endmodule
