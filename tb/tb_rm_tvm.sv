// Testbench for rm_tvm: scans in 16 random requests, runs a burst and checks
// that the requests come out one per cycle in order, feeds a random reply
// every cycle and checks through the scan chain that reply entry i holds the
// reply presented LAT cycles after request i left. Then runs the same burst
// again (the request register must be back in order) in loop mode for two
// to four passes and checks the stop when loop is cleared. Eight rounds, each
// with fresh random requests.
module tb_rm_tvm;
  import rm_pkg::*;
  localparam int NM = 4, MW = 2, DEPTH = 16, LAT = 4;
  localparam int REQ_W = $bits(payload_t) + 2 * MW + 2, REP_W = $bits(reply_t);
  logic clk = 0, rst_n = 0, run = 0, loop = 0, busy;
  logic out_valid, out_reply;
  logic [MW-1:0] out_mat_id, out_mat_mask;
  payload_t out_payload;
  reply_t rep = '0;
  logic scan_en = 0, scan_in = 0, scan_out;
  logic [DEPTH*REQ_W-1:0] reqs;
  logic [DEPTH*REP_W-1:0] got;
  reply_t rep_hist [4096];
  reply_t exp_rep [DEPTH];
  int launch_cyc [$];
  int cyc = 0, checks = 0, failures = 0, nlaunch = 0;

  rm_tvm #(.NUM_MATS(NM), .DEPTH(DEPTH), .LAT(LAT)) dut (.*);
  always #5 clk = ~clk;

  // a fresh random reply every cycle, remembered by cycle number
  always @(negedge clk) begin
    rep = reply_t'({$urandom, $urandom});
    rep_hist[cyc % 4096] = rep;
  end
  always @(posedge clk) begin
    if (rst_n && dut.launching && !scan_en) begin
      logic [REQ_W-1:0] e;
      e = reqs[(nlaunch % DEPTH) * REQ_W +: REQ_W];
      checks++;
      if ({out_valid, out_reply, out_mat_id, out_mat_mask, out_payload} !==
          e) begin
        failures++; if (failures < 10) $display("FAIL launch %0d cyc %0d: %h vs %h", nlaunch, cyc, {out_valid, out_reply, out_mat_id, out_mat_mask, out_payload}, e);
      end
      if (nlaunch < DEPTH) launch_cyc.push_back(cyc);
      nlaunch++;
    end
    cyc <= cyc + 1;
  end

  // Shift the whole chain once: the first DEPTH*REP_W bits out of scan_out
  // are the reply register (top first); the last DEPTH*REQ_W bits shifted in
  // (top first) end up as the request register.
  task automatic scan_all(input logic [DEPTH*REQ_W-1:0] din, output logic [DEPTH*REP_W-1:0] dout);
    for (int k = 0; k < DEPTH*REP_W + DEPTH*REQ_W; k++) begin
      @(negedge clk);
      scan_en = 1;
      scan_in = (k >= DEPTH*REP_W) ? din[DEPTH*REQ_W - 1 - (k - DEPTH*REP_W)] : 1'b0;
      if (k < DEPTH*REP_W) dout[DEPTH*REP_W - 1 - k] = scan_out;
    end
    @(negedge clk); scan_en = 0;
  endtask

  task automatic burst(bit lp, int passes);
    nlaunch = 0; launch_cyc.delete();
    @(negedge clk); run = 1; loop = lp;
    @(negedge clk); run = 0;
    while (nlaunch < DEPTH * passes - 1) @(negedge clk);
    loop = 0;
    while (busy) @(negedge clk);
    checks++;
    if (nlaunch != DEPTH * passes) begin failures++; $display("FAIL %0d launches, expected %0d", nlaunch, DEPTH * passes); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 8; round++) begin
      for (int i = 0; i < DEPTH * REQ_W; i += 32) reqs[i +: 32] = $urandom;
      reqs[REQ_W-1] = 1'b1;  // at least entry 0 valid
      reqs[2*REQ_W-1] = 1'b0; // and entry 1 a bubble
      scan_all(reqs, got);
      burst(0, 1);
      for (int i = 0; i < DEPTH; i++) exp_rep[i] = rep_hist[(launch_cyc[i] + LAT) % 4096];
      // unload: replies come out first (top of the reply register first), the
      // requests follow them and are refilled at the same time
      scan_all(reqs, got);
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (reply_t'(got[i*REP_W +: REP_W]) !== exp_rep[i]) begin
          failures++; $display("FAIL round %0d reply entry %0d", round, i);
        end
      end
      burst(1, 2 + round % 3);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
