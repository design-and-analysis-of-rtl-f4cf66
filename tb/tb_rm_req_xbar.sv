// Testbench for rm_req_xbar: two ports send random requests with random mat
// IDs and masks (multicast), scheduled so that they never address the same
// mat; each mat's registered request and schedule are checked one cycle
// later against a reference decode.
module tb_rm_req_xbar;
  import rm_pkg::*;
  localparam int NP = 2, NM = 4, MW = 2;
  logic clk = 0, rst_n = 0;
  logic [NP-1:0] in_valid = 0, in_reply = 0;
  logic [NP-1:0][MW-1:0] in_mat_id = '0, in_mat_mask = '0;
  payload_t [NP-1:0] in_payload = '0;
  mat_req_t [NM-1:0] mat_req, exp_req;
  sched_t [NM-1:0] sched, exp_sched;
  logic conflict;
  int checks = 0, failures = 0, nmulti = 0, nboth = 0;

  rm_req_xbar #(.NUM_PORTS(NP), .NUM_MATS(NM)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic hits(int p, int k);
    return in_valid[p] && (((MW'(k) ^ in_mat_id[p]) & ~in_mat_mask[p]) == '0);
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (n > 0) begin
        checks++;
        if (mat_req !== exp_req || sched !== exp_sched || conflict !== 1'b0) begin
          failures++; if (failures < 10) $display("FAIL cycle %0d", n);
        end
      end
      for (int p = 0; p < NP; p++) begin
        in_valid[p] = $urandom % 4 != 0;
        in_reply[p] = $urandom;
        in_mat_id[p] = MW'($urandom);
        in_mat_mask[p] = ($urandom % 3 == 0) ? MW'($urandom) : '0;
        in_payload[p] = payload_t'({$urandom, $urandom});
      end
      // static schedule: port 1 only where port 0 is not
      for (int k = 0; k < NM; k++) if (hits(0, k) && hits(1, k)) in_valid[1] = 1'b0;
      exp_req = '0; exp_sched = '0;
      for (int k = 0; k < NM; k++)
        for (int p = 0; p < NP; p++)
          if (hits(p, k)) begin
            exp_req[k] = '{valid: 1'b1, p: in_payload[p]};
            exp_sched[k] = '{valid: 1'b1, reply: in_reply[p], port: 8'(p)};
          end
      if (in_valid[0] && in_mat_mask[0] != 0) nmulti++;
      if (&in_valid) nboth++;
    end
    checks++;
    if (nmulti == 0 || nboth == 0) begin failures++; $display("FAIL coverage"); end
    $display("multicast=%0d both_ports=%0d", nmulti, nboth);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
