// tag_comparator: the hit signal of one cache way.
//
// Compares the tag read from the way's tag array with the tag of the request
// and qualifies the match with the entry's valid bit.  Purely combinational;
// it is evaluated in the cycle the tag array output is valid.  In the
// sequential way-access cache only the probed way's comparator matters in a
// cycle, and its output does not drive the data multiplexer.
module tag_comparator #(
  parameter int unsigned TAG_W = 18
) (
  input  logic             entry_valid,
  input  logic [TAG_W-1:0] entry_tag,
  input  logic [TAG_W-1:0] req_tag,
  output logic             hit
);

  assign hit = entry_valid && (entry_tag == req_tag);

endmodule
