// rm_imcn: inter-mat control network.
//
// NBUS one-bit buses run past the mats, which sit in a line (mat 0 .. mat
// NUM_MATS-1). Each bus is cut into segments at configuration time: the
// link[b] bit of mat k joins mat k's piece of bus b to mat k+1's piece. On a
// segment the bus is a wired OR: every mat whose drv_en[i] is set drives its
// ext_out[i] onto bus drv_bus[i], and the bus reads 1 when any driver on the
// segment is 1 (on silicon a precharged line with pull-down drivers). Each
// mat's ext_in[i] is the value of bus in_bus[i] on that mat's segment.
// This lets a tag mat send hit/miss to the data mats of its cache, or the
// ways of a cache OR their hits into a global hit.
//
// Combinational: the value arrives in the same cycle (the document allows a
// fraction of a cycle). Configuration comes from each mat's IMCN register.
// The bus count, the wired OR and the bus select at each ext_in follow the
// document; the one-link-bit-per-mat segment scheme is this design's choice.
module rm_imcn
  import rm_pkg::*;
#(
  parameter int unsigned NUM_MATS = 4
) (
  input  logic [NUM_MATS-1:0][E-1:0] ext_out,
  input  imcn_cfg_t [NUM_MATS-1:0]   cfg,
  output logic [NUM_MATS-1:0][E-1:0] ext_in
);
  logic [NUM_MATS-1:0][NBUS-1:0] drive;   // what each mat puts on each bus
  logic [NUM_MATS-1:0][NBUS-1:0] fwd;     // OR of drivers from the left
  logic [NUM_MATS-1:0][NBUS-1:0] bwd;     // OR of drivers from the right
  logic [NUM_MATS-1:0][NBUS-1:0] bus_at;  // bus value seen at each mat

  always_comb begin
    for (int k = 0; k < NUM_MATS; k++) begin
      drive[k] = '0;
      for (int i = 0; i < E; i++)
        if (cfg[k].drv_en[i]) drive[k][cfg[k].drv_bus[i]] |= ext_out[k][i];
    end
    for (int k = 0; k < NUM_MATS; k++) begin
      fwd[k] = drive[k];
      if (k > 0) fwd[k] |= fwd[k-1] & cfg[k-1].link;
    end
    for (int k = NUM_MATS - 1; k >= 0; k--) begin
      bwd[k] = drive[k];
      if (k < NUM_MATS - 1) bwd[k] |= bwd[k+1] & cfg[k].link;
    end
    for (int k = 0; k < NUM_MATS; k++) begin
      bus_at[k] = fwd[k] | bwd[k];
      for (int i = 0; i < E; i++) ext_in[k][i] = bus_at[k][cfg[k].in_bus[i]];
    end
  end
endmodule
