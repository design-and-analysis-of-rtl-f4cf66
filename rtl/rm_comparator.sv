// rm_comparator: maskable equality comparator of the mat datapath.
//
// Compares a stored word (data and meta-data) with the compare value of the
// request. The mask has one bit more than the meta-data: mask[0] covers the
// whole main data word as one chunk, mask[i+1] covers meta-data bit i. A field
// whose mask bit is 1 takes part in the compare; a field with mask 0 is a
// don't-care. match is 1 when every selected field is equal (all fields
// masked out gives a match). Combinational; in the mat it sits in the
// post-access half of the array cycle.
//
// The chunked data mask and per-bit meta-data mask follow the document; the
// polarity (1 = compare) is this design's choice.
module rm_comparator #(
  parameter int unsigned D = 32,
  parameter int unsigned M = 4
) (
  input  logic [D-1:0] data_a,
  input  logic [D-1:0] data_b,
  input  logic [M-1:0] md_a,
  input  logic [M-1:0] md_b,
  input  logic [M:0]   mask,
  output logic         match
);
  logic         data_eq;
  logic [M-1:0] md_ok;

  always_comb begin
    data_eq = (data_a == data_b);
    for (int i = 0; i < M; i++) md_ok[i] = ~mask[i+1] | (md_a[i] == md_b[i]);
    match = (~mask[0] | data_eq) & (&md_ok);
  end
endmodule
