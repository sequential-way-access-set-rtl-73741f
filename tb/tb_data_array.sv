// tb_data_array: self-checking test of one way's data memory.
//
// Fills the whole array, then mixes random byte-enabled writes and reads,
// comparing each read (available one cycle after the request) with a
// reference array; also checks that the output holds while ce is low and
// that a write does not disturb the read register.  A second array split
// into four cells gets the same stimulus: it must return the same data, and
// on every access exactly the addressed cell must be enabled.
module tb_data_array;
  localparam int unsigned WORDS = 4096, AW = $clog2(WORDS);

  logic clk = 0;
  logic ce = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [3:0] be = '0;
  logic [31:0] wdata = '0, rdata, rdata4;
  logic [0:0] cell_ce;
  logic [3:0] cell_ce4;
  int checks = 0, failures = 0;
  logic [31:0] refm [WORDS];

  data_array #(.WORDS(WORDS)) dut (.*);
  data_array #(.WORDS(WORDS), .CELL_WORDS(WORDS / 4)) dut4 (
    .clk, .ce, .we, .addr, .be, .wdata, .rdata(rdata4), .cell_ce(cell_ce4));

  // cell enables, sampled with every access
  always @(negedge clk) begin
    if (ce) begin
      check(cell_ce == 1'b1, "single-cell array not enabled");
      check(cell_ce4 == 4'(1 << addr[AW-1 -: 2]),
            $sformatf("word %0d enabled cells %b", addr, cell_ce4));
    end else begin
      check(cell_ce == '0 && cell_ce4 == '0, "cell enabled while idle");
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(int a, logic [3:0] b, logic [31:0] d);
    @(negedge clk); ce = 1; we = 1; addr = AW'(a); be = b; wdata = d;
    for (int i = 0; i < 4; i++) if (b[i]) refm[a][8*i +: 8] = d[8*i +: 8];
    @(negedge clk); ce = 0; we = 0;
  endtask

  initial begin
    logic [31:0] last;
    for (int a = 0; a < WORDS; a++) wr(a, 4'hF, $urandom);
    for (int n = 0; n < 20000; n++) begin
      int a;
      a = $urandom_range(WORDS - 1);
      if ($urandom_range(2) == 0) begin
        wr(a, 4'($urandom), $urandom);
        check(rdata == last, "write changed the read output");
        check(rdata4 == last, "write changed the read output (4 cells)");
      end else begin
        @(negedge clk); ce = 1; we = 0; addr = AW'(a);
        @(negedge clk); ce = 0;
        check(rdata == refm[a], $sformatf("word %0d read %h expected %h", a, rdata, refm[a]));
        check(rdata4 == refm[a], $sformatf("word %0d read %h expected %h (4 cells)", a, rdata4, refm[a]));
        last = refm[a];
        @(negedge clk);
        check(rdata == last, "read data not held");
        check(rdata4 == last, "read data not held (4 cells)");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
