// tag_comparator: the address-tag comparator of the IUnit.
//
// Each bit cell compares one stored tag bit with the corresponding FetchPC
// tag bit and raises its Not_Bit_Match signal when they differ; the
// Not_Bit_Match signals of all tag bits are OR'ed onto one wired line, so
// Match is true only when every bit agrees. This is the two-level structure
// of the reference comparator (a per-bit compare, then a wide OR), written
// as logic rather than as precharged gates. Purely combinational; the
// reference width is 23 tag bits.
module tag_comparator #(
  parameter int unsigned TAG_W = 23
) (
  input  logic [TAG_W-1:0] stored_tag,  // tag read from the tag array
  input  logic [TAG_W-1:0] fetch_tag,   // tag field of FetchPC
  output logic             match
);

  logic [TAG_W-1:0] not_bit_match;

  always_comb begin
    not_bit_match = stored_tag ^ fetch_tag;
    match         = !(|not_bit_match);
  end

endmodule
