// rm_gang_io: gang-operation I/O logic of the meta-data columns.
//
// A gang operation acts on every word of the mat in one cycle, column by
// column. For each meta-data column n the operation either sets the whole
// column, clears it, or leaves it alone. gmask[n] selects the column and
// gdata[n] says whether it is set (1) or cleared (0); gang_en qualifies both.
// This is the logic of the document's gang I/O figure (inputs gang_en,
// gmask[n], gdata[n], outputs gset[n], gclr[n]). Purely combinational.
module rm_gang_io #(
  parameter int unsigned M = 4
) (
  input  logic         gang_en,
  input  logic [M-1:0] gmask,
  input  logic [M-1:0] gdata,
  output logic [M-1:0] gset,
  output logic [M-1:0] gclr
);
  always_comb begin
    for (int n = 0; n < M; n++) begin
      gset[n] = gang_en & gmask[n] &  gdata[n];
      gclr[n] = gang_en & gmask[n] & ~gdata[n];
    end
  end
endmodule
