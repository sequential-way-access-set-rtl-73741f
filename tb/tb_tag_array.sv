// tb_tag_array: self-checking test of one way's tag memory.
//
// Checks that after reset busy stays high for exactly SETS cycles while the
// valid bits are cleared, that every entry then reads as invalid, that a read
// shows the entry one cycle later and holds it while ce is low, and that
// random writes read back as written (against a reference array).
module tb_tag_array;
  localparam int unsigned SETS = 1024, TAG_W = 18, IW = $clog2(SETS);

  logic clk = 0, rst_n = 0;
  logic ce = 0, we = 0, wvalid = 0, wdirty = 0;
  logic [IW-1:0] addr = '0;
  logic [TAG_W-1:0] wtag = '0;
  logic rvalid, rdirty, busy;
  logic [TAG_W-1:0] rtag;
  int checks = 0, failures = 0;
  logic [TAG_W+1:0] refm [SETS];

  tag_array #(.SETS(SETS), .TAG_W(TAG_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic rd(int a, output logic [TAG_W+1:0] v);
    @(negedge clk); ce = 1; we = 0; addr = IW'(a);
    @(negedge clk); ce = 0; v = {rvalid, rdirty, rtag};
  endtask

  initial begin
    int busy_cycles;
    logic [TAG_W+1:0] v;
    repeat (3) @(negedge clk);
    rst_n = 1;
    busy_cycles = 0;
    while (busy) begin @(negedge clk); busy_cycles++; end
    check(busy_cycles == SETS, $sformatf("busy lasted %0d cycles", busy_cycles));
    for (int a = 0; a < SETS; a++) begin
      rd(a, v);
      check(v[TAG_W+1] == 1'b0, $sformatf("entry %0d valid after reset", a));
      refm[a] = '0;
    end
    for (int n = 0; n < 3000; n++) begin
      int a;
      a = $urandom_range(SETS - 1);
      if ($urandom_range(1)) begin
        @(negedge clk);
        ce = 1; we = 1; addr = IW'(a);
        wvalid = 1'($urandom); wdirty = 1'($urandom); wtag = TAG_W'($urandom);
        refm[a] = {wvalid, wdirty, wtag};
        @(negedge clk); ce = 0; we = 0;
      end else begin
        rd(a, v);
        check(v == refm[a], $sformatf("entry %0d read %h expected %h", a, v, refm[a]));
        // output holds while the array is idle
        @(negedge clk);
        check({rvalid, rdirty, rtag} == refm[a], "read data not held");
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
