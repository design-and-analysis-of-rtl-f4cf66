// rm_rep_xbar: reply crossbar from the mats back to the processor ports.
//
// Replies always return to the port that issued the request, and the mat
// latency is fixed, so the reply crossbar is scheduled by the request
// crossbar's schedule delayed by MAT_LAT cycles: no arbitration. For each
// port it takes the mats that were addressed by that port MAT_LAT cycles ago
// and combines their replies: data and meta-data come from the mat whose
// valid bit is set (at most one may be valid for a multicast; the mats'
// configuration guarantees this), and valid, match and complete are ORed over
// the addressed mats, so a multicast tag check reports the global hit. Data
// and meta-data are returned only when the request carried the reply bit.
// The result is registered: the port sees it one cycle after the mat output.
//
// The delayed schedule and the valid-selected mux follow the document; the OR
// of match and complete is this design's choice.
module rm_rep_xbar
  import rm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2,
  parameter int unsigned NUM_MATS  = 4,
  parameter int unsigned LAT       = MAT_LAT
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  sched_t [NUM_MATS-1:0]     sched,     // schedule as it reaches the mats
  input  reply_t [NUM_MATS-1:0]     mat_rep,   // mat outputs
  output reply_t [NUM_PORTS-1:0]    out,
  output logic   [NUM_PORTS-1:0]    out_sched  // a reply was scheduled
);
  sched_t [NUM_MATS-1:0] pipe [LAT];
  sched_t [NUM_MATS-1:0] now;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < LAT; s++) pipe[s] <= '0;
    end else begin
      pipe[0] <= sched;
      for (int s = 1; s < LAT; s++) pipe[s] <= pipe[s-1];
    end
  end
  assign now = pipe[LAT-1];

  reply_t [NUM_PORTS-1:0] out_d;
  logic   [NUM_PORTS-1:0] sch_d;

  always_comb begin
    out_d = '0;
    sch_d = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      for (int k = 0; k < NUM_MATS; k++) begin
        if (now[k].valid && now[k].port == 8'(p)) begin
          sch_d[p]          = 1'b1;
          out_d[p].valid    |= mat_rep[k].valid;
          out_d[p].match    |= mat_rep[k].match;
          out_d[p].complete |= mat_rep[k].complete;
          if (mat_rep[k].valid && now[k].reply) begin
            out_d[p].data  = mat_rep[k].data;
            out_d[p].mdata = mat_rep[k].mdata;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out       <= '0;
      out_sched <= '0;
    end else begin
      out       <= out_d;
      out_sched <= sch_d;
    end
  end
endmodule
