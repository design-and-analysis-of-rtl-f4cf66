// rm_sram_core: the mat's storage array, WORDS x (D data + M meta-data bits).
//
// Port 0 is the normal access port: a combinational read of the addressed
// word's data and a write of data and meta-data at the clock edge. The
// meta-data columns are read at their own address (rmd_addr), so the mat can
// check a word's meta-data while port 0 writes another word. Port 1
// exists only for the meta-data columns and is used by the read-modify-write
// writeback. The meta-data columns also support gang operations that act on
// every word in one cycle: gset[n] sets column n, gclr[n] clears it, and
// cgang clears column CG_TARGET in every word whose column CG_COND holds 1.
//
// Order inside one clock cycle follows the document's circuit timing: the
// port-1 writeback fires first, gang operations next, the port-0 write last.
// The meta-data read returns the port-1 value when both name the same word in
// the same cycle, so a read never sees meta-data older than a writeback that
// happens with it.
//
// The data columns are a plain array (a RAM); the meta-data columns are
// registers because every word takes part in gang operations. Contents are
// not reset. The pulsed decoder, sense amplifiers and replica timing of the
// silicon are not modelled: this is the array's logical behaviour only.
module rm_sram_core #(
  parameter int unsigned WORDS     = 512,
  parameter int unsigned D         = 32,
  parameter int unsigned M         = 4,
  parameter int unsigned CG_COND   = 1,
  parameter int unsigned CG_TARGET = 0,
  localparam int unsigned AW       = $clog2(WORDS)
) (
  input  logic          clk,
  // port 0
  input  logic [AW-1:0] p0_addr,
  input  logic          p0_we,
  input  logic [D-1:0]  p0_wdata,
  input  logic [M-1:0]  p0_wmd,
  output logic [D-1:0]  p0_rdata,
  // meta-data read
  input  logic [AW-1:0] rmd_addr,
  output logic [M-1:0]  rmd,
  // port 1: meta-data writeback
  input  logic          p1_we,
  input  logic [AW-1:0] p1_addr,
  input  logic [M-1:0]  p1_wmd,
  // gang operations
  input  logic [M-1:0]  gset,
  input  logic [M-1:0]  gclr,
  input  logic          cgang
);
  logic [D-1:0] data_mem [WORDS];
  logic [M-1:0] md_mem   [WORDS];

  assign p0_rdata = data_mem[p0_addr];
  assign rmd      = (p1_we && p1_addr == rmd_addr) ? p1_wmd : md_mem[rmd_addr];

  always_ff @(posedge clk) begin
    if (p0_we) data_mem[p0_addr] <= p0_wdata;
  end

  always_ff @(posedge clk) begin
    for (int w = 0; w < WORDS; w++) begin
      logic [M-1:0] v;
      v = md_mem[w];
      if (p1_we && p1_addr == AW'(w)) v = p1_wmd;
      v = (v | gset) & ~gclr;
      if (cgang && v[CG_COND]) v[CG_TARGET] = 1'b0;
      if (p0_we && p0_addr == AW'(w)) v = p0_wmd;
      md_mem[w] <= v;
    end
  end
endmodule
