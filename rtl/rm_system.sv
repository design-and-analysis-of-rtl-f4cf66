// rm_system: reconfigurable memory system, top level.
//
// An array of identical memory mats that software configures into caches,
// FIFOs and scratchpads, connected to the computation by two crossbars and
// to each other by a narrow control network:
//
//   port p --> address splitter --+--> request crossbar --> mat k
//          \-> test vector memory-/         (1 cycle)       (2 cycles)
//                                                              |
//   port p <-- reply crossbar (1 cycle) <----------------------+
//   mat k  <-> inter-mat control network (same cycle) <-> other mats
//
// Each port's request comes either from the processor side through the
// port's address splitter (virtual address -> mat ID, mat ID mask, mat
// address) or, with tvm_mode set, from the port's test vector memory, which
// holds raw hardware requests. A request issued in cycle t returns its reply
// on the same port in cycle t+4. Mats are configured with configuration
// write requests through the same path; the address splitter tables are
// written through split_cfg_*. The test vector memories of all ports form
// one scan chain, port 0 first.
//
// Defaults follow the prototype: two ports and four mats of 512 x (32+4)
// bits. All four mat positions hold complete mats (the prototype placed
// simpler test structures in two of them); the mux between the splitter and
// the test vector memory at each port is this design's choice.
module rm_system
  import rm_pkg::*;
#(
  parameter int unsigned NUM_PORTS = 2,
  parameter int unsigned NUM_MATS  = 4,
  localparam int unsigned MW       = (NUM_MATS > 1) ? $clog2(NUM_MATS) : 1
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // processor ports
  input  proc_req_t   [NUM_PORTS-1:0]    proc_req,
  output reply_t      [NUM_PORTS-1:0]    proc_rep,
  output logic        [NUM_PORTS-1:0]    proc_rep_sched,
  // address splitter tables
  input  logic        [NUM_PORTS-1:0]    split_cfg_we,
  input  logic        [LMID_W-1:0]       split_cfg_idx,
  input  split_entry_t                   split_cfg_entry,
  // test vector memories
  input  logic                           tvm_mode,
  input  logic                           tvm_run,
  input  logic                           tvm_loop,
  output logic        [NUM_PORTS-1:0]    tvm_busy,
  input  logic                           scan_en,
  input  logic                           scan_in,
  output logic                           scan_out,
  // status
  output logic                           xbar_conflict
);
  // per-port request after the source mux
  logic     [NUM_PORTS-1:0]         x_valid, x_reply;
  logic     [NUM_PORTS-1:0][MW-1:0] x_id, x_mask;
  payload_t [NUM_PORTS-1:0]         x_payload;

  logic [NUM_PORTS:0] scan_chain;
  assign scan_chain[0] = scan_in;
  assign scan_out      = scan_chain[NUM_PORTS];

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_port
    logic          s_valid, s_reply, t_valid, t_reply;
    logic [MW-1:0] s_id, s_mask, t_id, t_mask;
    payload_t      s_payload, t_payload;

    rm_addr_splitter #(.NUM_MATS(NUM_MATS)) u_split (
      .clk, .rst_n,
      .in          (proc_req[p]),
      .out_valid   (s_valid),
      .out_reply   (s_reply),
      .out_mat_id  (s_id),
      .out_mat_mask(s_mask),
      .out_payload (s_payload),
      .cfg_we      (split_cfg_we[p]),
      .cfg_idx     (split_cfg_idx),
      .cfg_entry   (split_cfg_entry)
    );

    rm_tvm #(.NUM_MATS(NUM_MATS), .DEPTH(16), .LAT(4)) u_tvm (
      .clk, .rst_n,
      .run         (tvm_run),
      .loop        (tvm_loop),
      .busy        (tvm_busy[p]),
      .out_valid   (t_valid),
      .out_reply   (t_reply),
      .out_mat_id  (t_id),
      .out_mat_mask(t_mask),
      .out_payload (t_payload),
      .rep         (proc_rep[p]),
      .scan_en,
      .scan_in     (scan_chain[p]),
      .scan_out    (scan_chain[p+1])
    );

    always_comb begin
      if (tvm_mode) begin
        x_valid[p] = t_valid;  x_reply[p] = t_reply;
        x_id[p]    = t_id;     x_mask[p]  = t_mask;  x_payload[p] = t_payload;
      end else begin
        x_valid[p] = s_valid;  x_reply[p] = s_reply;
        x_id[p]    = s_id;     x_mask[p]  = s_mask;  x_payload[p] = s_payload;
      end
    end
  end

  mat_req_t  [NUM_MATS-1:0]        mat_req;
  sched_t    [NUM_MATS-1:0]        sched;
  reply_t    [NUM_MATS-1:0]        mat_rep;
  logic      [NUM_MATS-1:0][E-1:0] ext_out, ext_in;
  imcn_cfg_t [NUM_MATS-1:0]        imcn_cfg;

  rm_req_xbar #(.NUM_PORTS(NUM_PORTS), .NUM_MATS(NUM_MATS)) u_req_xbar (
    .clk, .rst_n,
    .in_valid   (x_valid),
    .in_reply   (x_reply),
    .in_mat_id  (x_id),
    .in_mat_mask(x_mask),
    .in_payload (x_payload),
    .mat_req,
    .sched,
    .conflict   (xbar_conflict)
  );

  for (genvar k = 0; k < NUM_MATS; k++) begin : g_mat
    rm_mat u_mat (
      .clk, .rst_n,
      .req     (mat_req[k]),
      .rep     (mat_rep[k]),
      .ext_in  (ext_in[k]),
      .ext_out (ext_out[k]),
      .imcn_cfg(imcn_cfg[k])
    );
  end

  rm_imcn #(.NUM_MATS(NUM_MATS)) u_imcn (
    .ext_out,
    .cfg   (imcn_cfg),
    .ext_in
  );

  rm_rep_xbar #(.NUM_PORTS(NUM_PORTS), .NUM_MATS(NUM_MATS), .LAT(MAT_LAT)) u_rep_xbar (
    .clk, .rst_n,
    .sched,
    .mat_rep,
    .out      (proc_rep),
    .out_sched(proc_rep_sched)
  );
endmodule
