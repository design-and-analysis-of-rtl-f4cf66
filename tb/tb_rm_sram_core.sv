// Testbench for rm_sram_core: random port-0 reads and writes, port-1
// meta-data writebacks, gang set/clear and conditional gang clear on all
// words, checked against a reference array updated in the same order the
// array promises (writeback, then gang, then port-0 write). Also checks that
// a meta-data read sees a same-cycle port-1 write, and the document's
// conditional gang example (clear md[0] where md[1] is 1, Table 3.2).
module tb_rm_sram_core;
  localparam int WORDS = 512, D = 32, M = 4, AW = 9;
  logic clk = 0;
  logic [AW-1:0] p0_addr = 0, p1_addr = 0, rmd_addr = 0;
  logic p0_we = 0, p1_we = 0, cgang = 0;
  logic [D-1:0] p0_wdata = 0, p0_rdata;
  logic [M-1:0] p0_wmd = 0, rmd, p1_wmd = 0, gset = 0, gclr = 0;
  int checks = 0, failures = 0, ngang = 0, ncg = 0, nfwd = 0;

  rm_sram_core #(.WORDS(WORDS), .D(D), .M(M), .CG_COND(1), .CG_TARGET(0)) dut (.*);
  always #5 clk = ~clk;

  logic [D-1:0] rd [WORDS];
  logic [M-1:0] rm [WORDS];

  task automatic step();
    @(posedge clk);
    for (int w = 0; w < WORDS; w++) begin
      if (p1_we && p1_addr == AW'(w)) rm[w] = p1_wmd;
      rm[w] = (rm[w] | gset) & ~gclr;
      if (cgang && rm[w][1]) rm[w][0] = 1'b0;
      if (p0_we && p0_addr == AW'(w)) begin rm[w] = p0_wmd; rd[w] = p0_wdata; end
    end
  endtask

  initial begin
    // initialise every word through port 0
    for (int w = 0; w < WORDS; w++) begin
      @(negedge clk); p0_we = 1; p0_addr = AW'(w); p0_wdata = $urandom; p0_wmd = M'($urandom);
      step();
    end
    @(negedge clk); p0_we = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      p0_addr  = AW'($urandom % 16);
      p0_we    = ($urandom % 3) == 0;
      rmd_addr = ($urandom % 2) ? p0_addr : AW'($urandom % 16);
      p0_wdata = $urandom; p0_wmd = M'($urandom);
      p1_we    = ($urandom % 3) == 0;
      p1_addr  = ($urandom % 2) ? p0_addr : AW'($urandom % 16);
      p1_wmd   = M'($urandom);
      gset = '0; gclr = '0; cgang = 0;
      case ($urandom % 8)
        0: begin gset = M'($urandom); gclr = M'($urandom) & ~gset; ngang++; end
        1: begin cgang = 1; ncg++; end
        default: ;
      endcase
      #1;
      checks++;
      if (p0_rdata !== rd[p0_addr] ||
          rmd !== ((p1_we && p1_addr == rmd_addr) ? p1_wmd : rm[rmd_addr])) begin
        failures++; $display("FAIL read %0d/%0d: %h/%b", p0_addr, rmd_addr, p0_rdata, rmd);
      end
      if (p1_we && p1_addr == rmd_addr) nfwd++;
      step();
    end
    @(negedge clk); p0_we = 0; p1_we = 0; gset = 0; gclr = 0; cgang = 0;
    // every word after the random phase
    for (int w = 0; w < WORDS; w++) begin
      p0_addr = AW'(w); rmd_addr = AW'(w); #1; checks++;
      if (p0_rdata !== rd[w] || rmd !== rm[w]) begin failures++; $display("FAIL final word %0d", w); end
    end
    // Table 3.2 on four words
    for (int w = 0; w < 4; w++) begin
      @(negedge clk); p0_we = 1; p0_addr = AW'(w); p0_wmd = M'(w); step();
    end
    @(negedge clk); p0_we = 0; cgang = 1; step(); @(negedge clk); cgang = 0;
    for (int w = 0; w < 4; w++) begin
      rmd_addr = AW'(w); #1; checks++;
      if (rmd[0] !== ((w == 1) ? 1'b1 : 1'b0) || rmd[1] !== w[1]) begin
        failures++; $display("FAIL cgang table row %0d: %b", w, rmd[1:0]);
      end
    end
    checks++;
    if (ngang == 0 || ncg == 0 || nfwd == 0) begin failures++; $display("FAIL coverage"); end
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
