// tb_tag_comparator: self-checking test of the per-way hit signal.
//
// Drives random and equal tags with both values of the valid bit, plus
// tags that differ in a single bit, and checks hit = valid && tags equal.
module tb_tag_comparator;
  localparam int unsigned TAG_W = 18;
  logic entry_valid;
  logic [TAG_W-1:0] entry_tag, req_tag;
  logic hit;
  int checks = 0, failures = 0;

  tag_comparator #(.TAG_W(TAG_W)) dut (.*);

  task automatic check_one();
    bit expect_hit;
    #1;
    expect_hit = entry_valid && (entry_tag === req_tag);
    checks++;
    if (hit !== expect_hit) begin
      failures++;
      $display("FAIL: valid=%b tag=%h req=%h hit=%b", entry_valid, entry_tag, req_tag, hit);
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) begin
      entry_valid = 1'($urandom);
      entry_tag   = TAG_W'($urandom);
      req_tag     = (n % 2 == 0) ? entry_tag : TAG_W'($urandom);
      check_one();
    end
    for (int b = 0; b < TAG_W; b++) begin
      entry_valid = 1'b1;
      entry_tag   = TAG_W'($urandom);
      req_tag     = entry_tag ^ (TAG_W'(1) << b);
      check_one();
      req_tag     = entry_tag;
      check_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
