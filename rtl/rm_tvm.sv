// rm_tvm: test vector memory, an on-die stand-in for a processor port.
//
// It holds DEPTH requests and DEPTH replies in wide shift registers. A pulse
// on run launches the requests one per cycle, entry 0 first, by rotating the
// request register by one entry per cycle; after DEPTH cycles the entries are
// back in their original order. With loop set the launch repeats until loop
// is cleared. Each reply is captured LAT cycles after its request left (the
// fixed access latency), shifting the reply register by one entry, so after a
// burst reply entry i belongs to request i.
//
// All storage forms one serial scan chain for loading requests and reading
// replies at low speed: with scan_en, scan_in enters bit 0 of request entry 0,
// the request register shifts towards its top, its top bit feeds bit 0 of
// reply entry 0 and the top bit of the reply register is scan_out.
//
// Request entry layout (LSB first): payload (60 bits), mat ID mask, mat ID,
// reply bit, valid bit. Reply entry: the reply_t packet (39 bits). The
// document gives 16 entries of 64-bit requests and 40-bit replies; the
// entry layouts and the scan order here are this design's.
module rm_tvm
  import rm_pkg::*;
#(
  parameter int unsigned NUM_MATS = 4,
  parameter int unsigned DEPTH    = 16,
  parameter int unsigned LAT      = 4,
  localparam int unsigned MW      = (NUM_MATS > 1) ? $clog2(NUM_MATS) : 1,
  localparam int unsigned REQ_W   = $bits(payload_t) + 2 * MW + 2,
  localparam int unsigned REP_W   = $bits(reply_t)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic           loop,
  output logic           busy,
  // request out
  output logic           out_valid,
  output logic           out_reply,
  output logic [MW-1:0]  out_mat_id,
  output logic [MW-1:0]  out_mat_mask,
  output payload_t       out_payload,
  // reply in
  input  reply_t         rep,
  // scan
  input  logic           scan_en,
  input  logic           scan_in,
  output logic           scan_out
);
  typedef struct packed {
    logic          valid;
    logic          reply;
    logic [MW-1:0] mat_id;
    logic [MW-1:0] mat_mask;
    payload_t      p;
  } tvm_req_t;

  logic [DEPTH*REQ_W-1:0] req_sr;
  logic [DEPTH*REP_W-1:0] rep_sr;
  logic [$clog2(DEPTH+1)-1:0] left;     // launches left in this burst
  logic                   launching;
  logic [LAT-1:0]         cap_pipe;
  tvm_req_t               head;

  assign launching = (left != 0);
  assign busy      = launching | (|cap_pipe);
  assign head      = tvm_req_t'(req_sr[REQ_W-1:0]);

  assign out_valid    = launching & head.valid;
  assign out_reply    = head.reply;
  assign out_mat_id   = head.mat_id;
  assign out_mat_mask = head.mat_mask;
  assign out_payload  = head.p;
  assign scan_out     = rep_sr[DEPTH*REP_W-1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      left     <= '0;
      cap_pipe <= '0;
      req_sr   <= '0;
      rep_sr   <= '0;
    end else if (scan_en) begin
      req_sr <= {req_sr[DEPTH*REQ_W-2:0], scan_in};
      rep_sr <= {rep_sr[DEPTH*REP_W-2:0], req_sr[DEPTH*REQ_W-1]};
    end else begin
      cap_pipe <= {cap_pipe[LAT-2:0], launching};
      if (launching) begin
        req_sr <= {req_sr[REQ_W-1:0], req_sr[DEPTH*REQ_W-1:REQ_W]};
        if (left == 1 && loop) left <= ($clog2(DEPTH+1))'(DEPTH);
        else                   left <= left - 1'b1;
      end else if (run) begin
        left <= ($clog2(DEPTH+1))'(DEPTH);
      end
      if (cap_pipe[LAT-1])
        rep_sr <= {REP_W'(rep), rep_sr[DEPTH*REP_W-1:REP_W]};
    end
  end
endmodule
