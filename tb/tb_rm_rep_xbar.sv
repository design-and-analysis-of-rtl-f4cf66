// Testbench for rm_rep_xbar: random schedules (each mat owned by at most one
// port, at most one valid mat per port) and random mat replies. The port
// output registered at cycle j must combine the replies of cycle j with the
// schedule given LAT cycles earlier: data from the valid mat when the reply
// bit is set, valid/match/complete ORed over the port's mats.
module tb_rm_rep_xbar;
  import rm_pkg::*;
  localparam int NP = 2, NM = 4, LAT = MAT_LAT, N = 4000;
  logic clk = 0, rst_n = 0;
  sched_t [NM-1:0] sched = '0;
  reply_t [NM-1:0] mat_rep = '0;
  reply_t [NP-1:0] out, exp_out;
  logic [NP-1:0] out_sched, exp_sch;
  sched_t [NM-1:0] sh [N];
  int checks = 0, failures = 0, nmulti = 0;

  rm_rep_xbar #(.NUM_PORTS(NP), .NUM_MATS(NM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < N; j++) begin
      @(negedge clk);
      if (j > LAT) begin
        checks++;
        if (out !== exp_out || out_sched !== exp_sch) begin
          failures++; if (failures < 10) $display("FAIL cycle %0d", j);
        end
      end
      for (int k = 0; k < NM; k++) begin
        sched[k].valid = $urandom % 4 != 0;
        sched[k].reply = $urandom;
        sched[k].port  = 8'($urandom % NP);
      end
      sh[j] = sched;
      for (int k = 0; k < NM; k++) mat_rep[k] = reply_t'({$urandom, $urandom});
      // at most one valid mat per port among the mats scheduled LAT ago
      if (j >= LAT) begin
        logic [NP-1:0] seen;
        seen = '0;
        for (int k = 0; k < NM; k++)
          if (sh[j-LAT][k].valid && mat_rep[k].valid) begin
            if (seen[sh[j-LAT][k].port]) mat_rep[k].valid = 1'b0;
            seen[sh[j-LAT][k].port] = 1'b1;
          end
        exp_out = '0; exp_sch = '0;
        for (int p = 0; p < NP; p++) begin
          int cnt;
          cnt = 0;
          for (int k = 0; k < NM; k++)
            if (sh[j-LAT][k].valid && sh[j-LAT][k].port == 8'(p)) begin
              cnt++;
              exp_sch[p] = 1'b1;
              exp_out[p].valid    |= mat_rep[k].valid;
              exp_out[p].match    |= mat_rep[k].match;
              exp_out[p].complete |= mat_rep[k].complete;
              if (mat_rep[k].valid && sh[j-LAT][k].reply) begin
                exp_out[p].data  = mat_rep[k].data;
                exp_out[p].mdata = mat_rep[k].mdata;
              end
            end
          if (cnt > 1) nmulti++;
        end
      end
    end
    checks++;
    if (nmulti == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
