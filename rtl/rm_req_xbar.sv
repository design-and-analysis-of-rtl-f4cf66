// rm_req_xbar: request crossbar from the processor ports to the mats.
//
// Each port presents a request with a mat ID, a mat ID mask, the 60-bit
// payload for the mat, a valid bit and a reply bit. Mat k takes the request
// when its number equals the mat ID in every bit position where the mask is
// 0; mask bits of 1 are wildcards, so one request can be multicast to a
// power-of-two group of mats on a power-of-two boundary. The crosspoints are
// registered: a request launched in cycle t is at the mat inputs in t+1
// (one full cycle for the crossbar traversal).
//
// Alongside each mat's request the crossbar records the schedule (source
// port, reply bit) that the reply crossbar needs. Ports are scheduled
// statically so that no two address the same mat in one cycle; if that rule
// is broken the lowest-numbered port wins and conflict is raised, and an
// assertion flags it in simulation. No arbitration or queueing, as in the
// document; the conflict fallback is this design's choice.
module rm_req_xbar
  import rm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2,
  parameter int unsigned NUM_MATS  = 4,
  localparam int unsigned MW       = (NUM_MATS > 1) ? $clog2(NUM_MATS) : 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic     [NUM_PORTS-1:0]      in_valid,
  input  logic     [NUM_PORTS-1:0]      in_reply,
  input  logic     [NUM_PORTS-1:0][MW-1:0] in_mat_id,
  input  logic     [NUM_PORTS-1:0][MW-1:0] in_mat_mask,
  input  payload_t [NUM_PORTS-1:0]      in_payload,
  output mat_req_t [NUM_MATS-1:0]       mat_req,
  output sched_t   [NUM_MATS-1:0]       sched,
  output logic                          conflict
);
  mat_req_t [NUM_MATS-1:0] req_d;
  sched_t   [NUM_MATS-1:0] sched_d;
  logic                    conflict_d;

  always_comb begin
    req_d      = '0;
    sched_d    = '0;
    conflict_d = 1'b0;
    for (int k = 0; k < NUM_MATS; k++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (in_valid[p] && (((MW'(k) ^ in_mat_id[p]) & ~in_mat_mask[p]) == '0)) begin
          if (req_d[k].valid) begin
            conflict_d = 1'b1;
          end else begin
            req_d[k].valid = 1'b1;
            req_d[k].p     = in_payload[p];
            sched_d[k]     = '{valid: 1'b1, reply: in_reply[p], port: 8'(p)};
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mat_req  <= '0;
      sched    <= '0;
      conflict <= 1'b0;
    end else begin
      mat_req  <= req_d;
      sched    <= sched_d;
      conflict <= conflict_d;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !conflict_d)
    else $error("rm_req_xbar: two ports addressed the same mat");
endmodule
