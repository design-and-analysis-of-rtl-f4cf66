// rm_rmw_decoder: word tracking for pipelined read-modify-write operations.
//
// An RMW takes three cycles in the array: the read (cycle R), the modify
// cycle in which the PLA computes new meta-data (R+1), and the writeback
// through the meta-data second port (R+2). Up to three RMWs are in flight, so
// there are three storage slots and the slot used rotates every cycle: the
// slot at rotation index k is loaded in its read cycle, is in its modify
// cycle one cycle later and fires its writeback the cycle after that. A
// main-port write to the same word during the modify cycle aborts the
// writeback (the newer write must win); a write during the writeback cycle is
// ordered after the writeback by the array itself.
//
// On silicon each row has three latches fed by the decoded wordline; here a
// slot stores the word address, which is logically the same. Outputs are
// combinational from the slots. Reset clears all slots.
module rm_rmw_decoder #(
  parameter int unsigned AW    = 9,
  parameter int unsigned SLOTS = 3
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rd_rmw,     // an RMW read is in the array this cycle
  input  logic [AW-1:0] rd_addr,
  input  logic          wr_en,      // a main-port meta-data write this cycle
  input  logic [AW-1:0] wr_addr,
  output logic          mod_valid,  // an RMW is in its modify cycle
  output logic [AW-1:0] mod_addr,
  output logic          wb_en,      // writeback through port 1 this cycle
  output logic [AW-1:0] wb_addr
);
  localparam int unsigned SW = $clog2(SLOTS);

  logic [SW-1:0] rot;                 // slot of this cycle's read
  logic [SW-1:0] mod_slot, wb_slot;
  logic          slot_v    [SLOTS];
  logic [AW-1:0] slot_addr [SLOTS];

  always_comb begin
    mod_slot = (rot == 0) ? SW'(SLOTS - 1) : rot - 1'b1;
    wb_slot  = (mod_slot == 0) ? SW'(SLOTS - 1) : mod_slot - 1'b1;
  end

  assign mod_valid = slot_v[mod_slot];
  assign mod_addr  = slot_addr[mod_slot];
  assign wb_en     = slot_v[wb_slot];
  assign wb_addr   = slot_addr[wb_slot];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rot <= '0;
      for (int s = 0; s < SLOTS; s++) begin
        slot_v[s]    <= 1'b0;
        slot_addr[s] <= '0;
      end
    end else begin
      rot <= (rot == SW'(SLOTS - 1)) ? '0 : rot + 1'b1;
      slot_v[rot]    <= rd_rmw;
      slot_addr[rot] <= rd_addr;
      // abort: a write to the word while it is being modified
      if (slot_v[mod_slot] && wr_en && wr_addr == slot_addr[mod_slot])
        slot_v[mod_slot] <= 1'b0;
      // the writeback slot is free after this cycle
      if (slot_v[wb_slot]) slot_v[wb_slot] <= 1'b0;
    end
  end
endmodule
