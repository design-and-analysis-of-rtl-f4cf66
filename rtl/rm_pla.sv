// rm_pla: reconfigurable NOR-NOR PLA used as the modify logic of
// read-modify-write operations.
//
// The first plane is a ternary CAM: each of the TERMS rows holds one trit per
// input, stored as two bits (z, o):
//   z o
//   0 0  don't care (matches 0 and 1)
//   0 1  matches an input of 1
//   1 0  matches an input of 0
//   1 1  never matches (row disabled)
// A row's matchline stays high when no trit mismatches; that is the row's
// logical wordline. The second plane is an SRAM of NOUT bits per row. Output
// column c is 1 when some matching row stores a 1 in column c (sum of
// products). On silicon the column line is a wired NOR, so the polarity of the
// final output is this design's choice.
//
// Configuration: one row per configuration address, laid out as
// {sram[NOUT-1:0], o[NIN-1:0], z[NIN-1:0]}; written with cfg_we at the clock
// edge and read back combinationally. After reset all trits are 11 (no row
// matches) so the outputs are 0. The logic evaluation is combinational.
module rm_pla #(
  parameter int unsigned TERMS = 16,
  parameter int unsigned NIN   = 6,
  parameter int unsigned NOUT  = 4,
  localparam int unsigned ROW_W = 2 * NIN + NOUT,
  localparam int unsigned RW    = $clog2(TERMS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NIN-1:0]   in,
  output logic [NOUT-1:0]  out,
  output logic [TERMS-1:0] lwl,        // per-row match (observability)
  input  logic             cfg_we,
  input  logic [RW-1:0]    cfg_row,
  input  logic [ROW_W-1:0] cfg_wdata,
  output logic [ROW_W-1:0] cfg_rdata
);
  typedef struct packed {
    logic [NOUT-1:0] sram;
    logic [NIN-1:0]  o;
    logic [NIN-1:0]  z;
  } row_t;

  row_t rows [TERMS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < TERMS; r++) rows[r] <= '{sram: '0, o: '1, z: '1};
    end else if (cfg_we) begin
      rows[cfg_row] <= row_t'(cfg_wdata);
    end
  end

  assign cfg_rdata = rows[cfg_row];

  // CAM plane: a trit mismatches when the input is 1 and z is set, or when
  // the input is 0 and o is set.
  always_comb begin
    for (int r = 0; r < TERMS; r++) begin
      lwl[r] = ~|((rows[r].z & in) | (rows[r].o & ~in));
    end
  end

  // SRAM plane.
  always_comb begin
    out = '0;
    for (int r = 0; r < TERMS; r++) begin
      if (lwl[r]) out |= rows[r].sram;
    end
  end
endmodule
