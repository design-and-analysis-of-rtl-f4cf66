// Testbench for rm_write_buffer: conditional writes whose condition arrives
// one cycle after the push, with random condition values, random array-busy
// cycles, reads searching the buffer and ordinary writes that supersede
// buffered entries. A reference memory built from the same stream checks that
// exactly the writes whose condition was 1 (and that were not superseded)
// reach the array, in order, and that searches return committed data (also
// in the cycle the condition arrives). Gang set/clear, conditional gang and
// second-port meta-data writes in cycles without a drain must reach the
// buffered meta-data as well as the array.
module tb_rm_write_buffer;
  localparam int AW = 9, D = 32, M = 4;
  logic clk = 0, rst_n = 0;
  logic push = 0, resolve = 0, cond = 0, drain_ok = 0, kill_en = 0;
  logic [AW-1:0] push_addr = 0, srch_addr = 0, kill_addr = 0;
  logic [D-1:0] push_data = 0;
  logic [M-1:0] push_md = 0;
  logic md_we = 0, cgang = 0;
  logic [AW-1:0] md_addr = 0;
  logic [M-1:0] md_wdata = 0, gset = 0, gclr = 0;
  logic drain, hit, hit_pend, full;
  logic [AW-1:0] drain_addr;
  logic [D-1:0] drain_data, hit_data;
  logic [M-1:0] drain_md, hit_md;
  int checks = 0, failures = 0, commits = 0, drops = 0, drains = 0, hits = 0, kills = 0;
  int mdops = 0, rhits = 0;

  rm_write_buffer #(.DEPTH(2), .AW(AW), .D(D), .M(M)) dut (.*);
  always #5 clk = ~clk;

  // array as seen through the buffer, and the array itself
  logic [D-1:0] arr [8];
  logic [D-1:0] vis [8];      // what a read must see: committed writes applied
  logic [M-1:0] arr_md [8];
  logic [M-1:0] vis_md [8];
  logic         last_push;
  logic [AW-1:0] last_addr;
  logic [D-1:0]  last_data;
  logic [M-1:0]  last_md;

  // second-port write: older than the entry committing in this cycle
  function automatic logic [M-1:0] upd_p1(logic [M-1:0] md, int w);
    if (md_we && md_addr == AW'(w)) md = md_wdata;
    return md;
  endfunction
  // gang: younger than every buffered entry
  function automatic logic [M-1:0] upd(logic [M-1:0] md, int w);
    md = (md | gset) & ~gclr;
    if (cgang && md[1]) md[0] = 1'b0;
    return md;
  endfunction

  initial begin
    for (int i = 0; i < 8; i++) begin arr[i] = 0; vis[i] = 0; arr_md[i] = 0; vis_md[i] = 0; end
    last_push = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      resolve   = last_push;
      cond      = $urandom % 2;
      push      = ($urandom % 3) != 0;
      push_addr = AW'($urandom % 8);
      push_data = $urandom;
      push_md   = M'($urandom);
      drain_ok  = push || ($urandom % 2);
      kill_en   = !push && !drain_ok && ($urandom % 2);
      kill_addr = AW'($urandom % 8);
      srch_addr = AW'($urandom % 8);
      md_we = 0; gset = 0; gclr = 0; cgang = 0;
      if (!push && !drain_ok && !kill_en) begin
        md_we = $urandom; md_addr = AW'($urandom % 8); md_wdata = M'($urandom);
        case ($urandom % 3)
          0: begin gset = M'($urandom); gclr = M'($urandom) & ~gset; end
          1: cgang = 1;
          default: ;
        endcase
        mdops++;
      end
      #1;
      // search: committed value must equal the visible reference, else the
      // array holds the visible value
      begin
        logic [D-1:0] ed;
        logic [M-1:0] em;
        ed = vis[srch_addr[2:0]]; em = vis_md[srch_addr[2:0]];
        if (resolve && cond && srch_addr == last_addr) begin ed = last_data; em = last_md; rhits++; end
        checks++;
        if ((hit ? hit_data : arr[srch_addr[2:0]]) !== ed ||
            (hit ? hit_md : arr_md[srch_addr[2:0]]) !== em) begin
          failures++; $display("FAIL search cycle %0d addr %0d hit=%b", n, srch_addr, hit);
        end
      end
      if (hit) hits++;
      checks++;
      if (drain && !drain_ok) begin failures++; $display("FAIL drain without a free slot"); end
      @(posedge clk);
      if (drain) begin arr[drain_addr[2:0]] = drain_data; arr_md[drain_addr[2:0]] = drain_md; drains++; end
      for (int w = 0; w < 8; w++) begin arr_md[w] = upd_p1(arr_md[w], w); vis_md[w] = upd_p1(vis_md[w], w); end
      if (resolve && cond) begin
        vis[last_addr[2:0]] = last_data; vis_md[last_addr[2:0]] = last_md; commits++;
      end
      if (resolve && !cond) drops++;
      for (int w = 0; w < 8; w++) begin arr_md[w] = upd(arr_md[w], w); vis_md[w] = upd(vis_md[w], w); end
      if (kill_en) begin
        arr[kill_addr[2:0]] = 32'hDEAD_0000 + n; vis[kill_addr[2:0]] = 32'hDEAD_0000 + n;
        arr_md[kill_addr[2:0]] = M'(n); vis_md[kill_addr[2:0]] = M'(n); kills++;
      end
      last_push = push; last_addr = push_addr; last_data = push_data; last_md = push_md;
    end
    // let everything drain
    @(negedge clk); push = 0; kill_en = 0; resolve = last_push; cond = 1; drain_ok = 1;
    md_we = 0; gset = 0; gclr = 0; cgang = 0;
    @(posedge clk); if (drain) begin arr[drain_addr[2:0]] = drain_data; arr_md[drain_addr[2:0]] = drain_md; end
    if (resolve) begin vis[last_addr[2:0]] = last_data; vis_md[last_addr[2:0]] = last_md; end
    @(negedge clk); resolve = 0;
    repeat (4) begin
      @(posedge clk);
      if (drain) begin arr[drain_addr[2:0]] = drain_data; arr_md[drain_addr[2:0]] = drain_md; end
      @(negedge clk);
    end
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (arr[i] !== vis[i] || arr_md[i] !== vis_md[i]) begin failures++; $display("FAIL final word %0d %h exp %h", i, arr[i], vis[i]); end
    end
    checks++;
    if (commits == 0 || drops == 0 || hits == 0 || kills == 0 || mdops == 0 || rhits == 0) begin failures++; $display("FAIL coverage"); end
    $display("commits=%0d drops=%0d drains=%0d hits=%0d kills=%0d mdops=%0d", commits, drops, drains, hits, kills, mdops);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
