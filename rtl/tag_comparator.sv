// Tag comparator of the L1 cache.
//
// Compares the tag read from the tag array with the tag field of the request
// address. hit is set when the comparator is enabled, the stored entry is
// valid and all TAG_W bits are equal. Purely combinational. When the CoC
// hits, the array read is disabled, so the comparator sees an invalid entry
// and reports no hit; the data-out register is then enabled by the CoC hit
// through the OR gate instead.
module tag_comparator #(
  parameter int unsigned TAG_W = 19
) (
  input  logic             en,
  input  logic [TAG_W-1:0] stored_tag,
  input  logic             stored_valid,
  input  logic [TAG_W-1:0] req_tag,
  output logic             hit
);

  assign hit = en && stored_valid && (stored_tag == req_tag);

endmodule
