// Testbench for rm_pla: after reset every output is 0; then the PLA is
// programmed as a 4-bit counter on the meta-data inputs (the function used
// for the prototype's power measurement: 16 terms, term r matches md == r
// and stores r+1) and all 64 input combinations are checked, together with
// configuration read-back. A second program checks an OR of two product
// terms that use the ext and match inputs, and a disabled (null) row.
// Last, 20 random programs against a model of the trit table, with read-back.
module tb_rm_pla;
  localparam int TERMS = 16, NIN = 6, NOUT = 4, ROW_W = 2*NIN + NOUT;
  logic clk = 0, rst_n = 0;
  logic [NIN-1:0]   in;
  logic [NOUT-1:0]  out;
  logic [TERMS-1:0] lwl;
  logic             cfg_we = 0;
  logic [3:0]       cfg_row = 0;
  logic [ROW_W-1:0] cfg_wdata = 0, cfg_rdata;
  int checks = 0, failures = 0;

  rm_pla #(.TERMS(TERMS), .NIN(NIN), .NOUT(NOUT)) dut (.*);

  always #5 clk = ~clk;

  // row word {sram, o, z} from a pattern: care[i]=0 -> don't care
  function automatic logic [ROW_W-1:0] row(logic [NIN-1:0] val, logic [NIN-1:0] care, logic [NOUT-1:0] o);
    logic [NIN-1:0] zz, oo;
    for (int i = 0; i < NIN; i++) begin
      zz[i] = care[i] & ~val[i];
      oo[i] = care[i] &  val[i];
    end
    return {o, oo, zz};
  endfunction

  task automatic wr(int r, logic [ROW_W-1:0] w);
    @(negedge clk); cfg_we = 1; cfg_row = 4'(r); cfg_wdata = w;
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    in = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int v = 0; v < 64; v++) begin
      in = 6'(v); #1; checks++;
      if (out !== 0) begin failures++; $display("FAIL reset output %b for %b", out, in); end
    end
    for (int r = 0; r < 16; r++) wr(r, row(6'(r), 6'b001111, 4'(r + 1)));
    for (int r = 0; r < 16; r++) begin
      @(negedge clk); cfg_row = 4'(r); #1; checks++;
      if (cfg_rdata !== row(6'(r), 6'b001111, 4'(r + 1))) begin failures++; $display("FAIL readback row %0d", r); end
    end
    for (int v = 0; v < 64; v++) begin
      in = 6'(v); #1; checks++;
      if (out !== 4'((v % 16) + 1)) begin failures++; $display("FAIL counter in=%b out=%h", in, out); end
      checks++;
      if (lwl !== (16'h1 << (v % 16))) begin failures++; $display("FAIL lwl %h", lwl); end
    end
    // second program: out[0] = ext & match | md[0] & ~md[1]; out[3] = md[3]
    for (int r = 0; r < 16; r++) wr(r, {4'b0, 6'b111111, 6'b111111});   // all rows null
    wr(0, row(6'b110000, 6'b110000, 4'b0001));
    wr(1, row(6'b000001, 6'b000011, 4'b0001));
    wr(2, row(6'b001000, 6'b001000, 4'b1000));
    for (int v = 0; v < 64; v++) begin
      logic [3:0] e;
      in = 6'(v); #1;
      e = '0;
      e[0] = (in[5] & in[4]) | (in[0] & ~in[1]);
      e[3] = in[3];
      checks++;
      if (out !== e) begin failures++; $display("FAIL sop in=%b out=%b exp=%b", in, out, e); end
    end
    // random programs: every row random, trit codes per the stored-value
    // table (z o: 00 any, 01 match 1, 10 match 0, 11 never), all inputs
    for (int prog = 0; prog < 20; prog++) begin
      logic [ROW_W-1:0] rows [TERMS];
      for (int r = 0; r < TERMS; r++) begin
        rows[r] = ROW_W'($urandom);
        wr(r, rows[r]);
      end
      for (int r = 0; r < TERMS; r++) begin
        @(negedge clk); cfg_row = 4'(r); #1; checks++;
        if (cfg_rdata !== rows[r]) begin failures++; $display("FAIL random readback row %0d", r); end
      end
      for (int v = 0; v < 64; v++) begin
        logic [NOUT-1:0] e;
        logic [TERMS-1:0] l;
        in = 6'(v); #1;
        e = '0;
        for (int r = 0; r < TERMS; r++) begin
          l[r] = 1'b1;
          for (int i = 0; i < NIN; i++) begin
            logic z, o;
            z = rows[r][i]; o = rows[r][NIN + i];
            if ((z && o) || (o && !in[i]) || (z && in[i])) l[r] = 1'b0;
          end
          if (l[r]) e |= rows[r][2*NIN +: NOUT];
        end
        checks++;
        if (out !== e || lwl !== l) begin
          failures++; $display("FAIL random program %0d in=%b out=%b exp=%b", prog, in, out, e);
        end
      end
    end
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
