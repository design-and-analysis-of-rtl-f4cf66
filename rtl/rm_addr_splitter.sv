// rm_addr_splitter: virtual-to-hardware address translation of one
// processor port.
//
// The hardware address of a word in the reconfigurable memory is a mat ID
// (which mat, routed by the request crossbar) plus a mat address (which word
// in the mat). The top LMID_W bits of the processor's address are the logical
// memory ID; they index a small per-port table that says how this logical
// memory (a scratchpad, a cache tag array, a cache data array, a FIFO) is laid
// out over the mats. Each output field is a base from the table plus an
// offset cut out of the address by a shift and a mask, in the style of an
// address centrifuge. The mat ID mask comes straight from the table and
// selects multicast. For cache tag accesses the table can send the remaining
// high address bits as the compare data.
//
// A request with hw_direct set bypasses the table: its address holds
// {mat ID mask, mat ID, mat address} in the low bits.
//
// Combinational. The table is written through cfg_we/cfg_idx/cfg_entry and
// resets to all-zero entries. The field formulas follow the document; the
// table width, field sizes and the direct mode encoding are this design's.
module rm_addr_splitter
  import rm_pkg::*;
#(
  parameter int unsigned NUM_MATS = 4,
  localparam int unsigned MW      = (NUM_MATS > 1) ? $clog2(NUM_MATS) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  proc_req_t          in,
  output logic               out_valid,
  output logic               out_reply,
  output logic [MW-1:0]      out_mat_id,
  output logic [MW-1:0]      out_mat_mask,
  output payload_t           out_payload,
  input  logic               cfg_we,
  input  logic [LMID_W-1:0]  cfg_idx,
  input  split_entry_t       cfg_entry
);
  split_entry_t table_q [1 << LMID_W];
  split_entry_t ent;
  logic [VA_W-1:0] id_off, addr_off;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < (1 << LMID_W); i++) table_q[i] <= '0;
    end else if (cfg_we) begin
      table_q[cfg_idx] <= cfg_entry;
    end
  end

  assign ent      = table_q[in.va[VA_W-1 -: LMID_W]];
  assign id_off   = (in.va >> ent.id_shift)   & ((VA_W'(1) << ent.id_bits) - 1);
  assign addr_off = (in.va >> ent.addr_shift) & ((VA_W'(1) << ent.addr_bits) - 1);

  always_comb begin
    out_valid         = in.valid;
    out_reply         = in.reply;
    out_payload.op    = in.op;
    out_payload.mask  = in.mask;
    out_payload.mdata = in.mdata;
    if (in.hw_direct) begin
      out_payload.addr = in.va[AW-1:0];
      out_mat_id       = in.va[AW +: MW];
      out_mat_mask     = in.va[AW+MW +: MW];
      out_payload.data = in.data;
    end else begin
      out_payload.addr = ent.addr_base + AW'(addr_off);
      out_mat_id       = MW'(ent.id_base) + MW'(id_off);
      out_mat_mask     = MW'(ent.id_mask);
      out_payload.data = ent.tag_en ? D'(in.va >> ent.tag_shift) : in.data;
    end
  end
endmodule
