// rm_pointer_logic: pointer address translation of the mat address path.
//
// A pointer operation names one of NPTR pointers instead of a word address.
// The pointer store (dual-ported on silicon) supplies the pointer value, whose
// low AW bits become the word address. The stride store supplies the
// pointer's stride, and an adder/subtractor forms pointer +/- stride, which is
// written back at the clock edge when the update is enabled. Because the
// write lands at the edge, a pointer operation in the next cycle already sees
// the new value (the write-through behaviour the document asks for), so
// back-to-back operations on one pointer work.
//
// Pointers are PTR_W bits, RANGE_W bits longer than a word address. When
// range_en is set, the mat only takes part in the access if those upper bits
// equal range_id; that lets a FIFO span up to 2^RANGE_W mats that all receive
// every request and keep their pointers in lock step. The pointer update
// happens whether or not this mat is in range.
//
// Configuration: cfg_we writes pointer cfg_idx (cfg_sel=0) or stride
// (cfg_sel=1); cfg_rdata reads the same location combinationally. Reset
// clears pointers and strides. Sizes (4 pointers of 11 bits, 4-bit strides)
// are the prototype's; unsigned strides with wrap-around are this design's
// choice.
module rm_pointer_logic #(
  parameter int unsigned NPTR     = 4,
  parameter int unsigned PTR_W    = 11,
  parameter int unsigned STRIDE_W = 4,
  parameter int unsigned AW       = 9,
  localparam int unsigned PW      = $clog2(NPTR),
  localparam int unsigned RANGE_W = PTR_W - AW
) (
  input  logic               clk,
  input  logic               rst_n,
  // pointer operation (pre-access half cycle)
  input  logic               ptr_en,
  input  logic [PW-1:0]      ptr_num,
  input  logic               upd_en,
  input  logic               upd_sub,
  input  logic               range_en,
  input  logic [RANGE_W-1:0] range_id,
  output logic [AW-1:0]      addr,
  output logic               in_range,
  // configuration access
  input  logic               cfg_we,
  input  logic               cfg_sel,     // 0: pointer, 1: stride
  input  logic [PW-1:0]      cfg_idx,
  input  logic [PTR_W-1:0]   cfg_wdata,
  output logic [PTR_W-1:0]   cfg_rdata
);
  logic [PTR_W-1:0]    ptr_mem    [NPTR];
  logic [STRIDE_W-1:0] stride_mem [NPTR];
  logic [PTR_W-1:0]    cur, nxt;

  assign cur      = ptr_mem[ptr_num];
  assign addr     = cur[AW-1:0];
  assign in_range = ~range_en | (cur[PTR_W-1:AW] == range_id);
  assign nxt      = upd_sub ? cur - PTR_W'(stride_mem[ptr_num])
                            : cur + PTR_W'(stride_mem[ptr_num]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NPTR; i++) begin
        ptr_mem[i]    <= '0;
        stride_mem[i] <= '0;
      end
    end else begin
      if (ptr_en && upd_en) ptr_mem[ptr_num] <= nxt;
      if (cfg_we) begin
        if (cfg_sel) stride_mem[cfg_idx] <= cfg_wdata[STRIDE_W-1:0];
        else         ptr_mem[cfg_idx]    <= cfg_wdata;
      end
    end
  end

  assign cfg_rdata = cfg_sel ? PTR_W'(stride_mem[cfg_idx]) : ptr_mem[cfg_idx];

  // A configuration write and a pointer update never target the store in the
  // same cycle: both come from the one request the mat accepts per cycle.
  assert property (@(posedge clk) disable iff (!rst_n) !(cfg_we && ptr_en));
endmodule
