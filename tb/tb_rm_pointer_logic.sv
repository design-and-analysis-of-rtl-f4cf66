// Testbench for rm_pointer_logic: pointer and stride configuration with
// read-back, back-to-back post-increment pointer operations on the same
// pointer (each one must see the previous update), decrement, wrap-around of
// the 11-bit pointer, two FIFOs interleaved in one mat with stride 2, and
// the range check used by a FIFO spanning four mats (the pointer keeps
// updating while the mat is out of range); then a random mix of pointer
// operations and configuration accesses against a model.
module tb_rm_pointer_logic;
  localparam int NPTR = 4, PTR_W = 11, STRIDE_W = 4, AW = 9;
  logic clk = 0, rst_n = 0;
  logic ptr_en = 0, upd_en = 0, upd_sub = 0, range_en = 0;
  logic [1:0] ptr_num = 0, range_id = 0;
  logic [AW-1:0] addr;
  logic in_range;
  logic cfg_we = 0, cfg_sel = 0;
  logic [1:0] cfg_idx = 0;
  logic [PTR_W-1:0] cfg_wdata = 0, cfg_rdata;
  int checks = 0, failures = 0;
  logic [PTR_W-1:0] model [NPTR];
  logic [STRIDE_W-1:0] smodel [NPTR];

  rm_pointer_logic #(.NPTR(NPTR), .PTR_W(PTR_W), .STRIDE_W(STRIDE_W), .AW(AW)) dut (.*);
  always #5 clk = ~clk;

  task automatic cfg(logic sel, int idx, int val);
    @(negedge clk); cfg_we = 1; cfg_sel = sel; cfg_idx = 2'(idx); cfg_wdata = PTR_W'(val);
    if (sel) smodel[idx] = STRIDE_W'(val); else model[idx] = PTR_W'(val);
    @(negedge clk); cfg_we = 0;
  endtask

  // one pointer operation; checks the address and range flag it produces
  task automatic op(int p, logic upd, logic sub);
    @(negedge clk);
    ptr_en = 1; ptr_num = 2'(p); upd_en = upd; upd_sub = sub;
    #1;
    checks++;
    if (addr !== model[p][AW-1:0] ||
        in_range !== (!range_en || model[p][PTR_W-1:AW] == range_id)) begin
      failures++;
      $display("FAIL ptr %0d addr=%0d exp=%0d in_range=%b", p, addr, model[p][AW-1:0], in_range);
    end
    if (upd) model[p] = sub ? model[p] - PTR_W'(smodel[p]) : model[p] + PTR_W'(smodel[p]);
    @(posedge clk); #1 ptr_en = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < NPTR; i++) begin model[i] = 0; smodel[i] = 0; end
    // FIFO 0 on even words (P0 head, P1 tail), FIFO 1 on odd words (P2, P3)
    cfg(0, 0, 0); cfg(0, 1, 0); cfg(0, 2, 1); cfg(0, 3, 1);
    for (int i = 0; i < 4; i++) cfg(1, i, 2);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk); cfg_sel = 0; cfg_idx = 2'(i); #1; checks++;
      if (cfg_rdata !== model[i]) begin failures++; $display("FAIL ptr readback %0d", i); end
      cfg_sel = 1; #1; checks++;
      if (cfg_rdata !== PTR_W'(smodel[i])) begin failures++; $display("FAIL stride readback %0d", i); end
    end
    // back-to-back pushes to both FIFOs without any idle cycle
    @(negedge clk);
    for (int n = 0; n < 6; n++) begin
      int p;
      p = (n % 2) ? 3 : 1;
      ptr_en = 1; ptr_num = 2'(p); upd_en = 1; upd_sub = 0; #1;
      checks++;
      if (addr !== model[p][AW-1:0]) begin failures++; $display("FAIL b2b %0d addr %0d exp %0d", n, addr, model[p][AW-1:0]); end
      if (addr[0] !== (p == 3)) begin failures++; $display("FAIL interleave parity"); end
      model[p] = model[p] + PTR_W'(smodel[p]);
      @(negedge clk);
    end
    ptr_en = 0;
    // head follows
    op(0, 1, 0); op(0, 1, 0); op(0, 0, 0);
    // decrement and wrap-around
    cfg(0, 2, 1); cfg(1, 2, 3);
    op(2, 1, 1); op(2, 1, 1); op(2, 0, 0);
    // FIFO spanning four mats: this mat is slice 2
    range_en = 1; range_id = 2;
    cfg(0, 0, 1020); cfg(1, 0, 1);
    for (int n = 0; n < 12; n++) op(0, 1, 0);
    range_en = 0;
    // random mix, one request per cycle: pointer operations (random pointer,
    // update, direction, range check) or a configuration write or read-back
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      ptr_en = 0; cfg_we = 0;
      range_en = $urandom % 2; range_id = 2'($urandom);
      case ($urandom % 8)
        0: begin
          cfg_we = 1; cfg_sel = $urandom % 2; cfg_idx = 2'($urandom); cfg_wdata = PTR_W'($urandom);
          if (cfg_sel) smodel[cfg_idx] = cfg_wdata[STRIDE_W-1:0]; else model[cfg_idx] = cfg_wdata;
        end
        1: begin
          cfg_sel = $urandom % 2; cfg_idx = 2'($urandom); #1; checks++;
          if (cfg_rdata !== (cfg_sel ? PTR_W'(smodel[cfg_idx]) : model[cfg_idx])) begin
            failures++; $display("FAIL random readback sel %0d idx %0d", cfg_sel, cfg_idx);
          end
        end
        default: begin
          int p;
          p = $urandom % NPTR;
          ptr_en = 1; ptr_num = 2'(p); upd_en = $urandom % 4 != 0; upd_sub = $urandom % 2;
          #1; checks++;
          if (addr !== model[p][AW-1:0] ||
              in_range !== (!range_en || model[p][PTR_W-1:AW] == range_id)) begin
            failures++;
            $display("FAIL random ptr %0d addr=%0d exp=%0d", p, addr, model[p][AW-1:0]);
          end
          if (upd_en) model[p] = upd_sub ? model[p] - PTR_W'(smodel[p]) : model[p] + PTR_W'(smodel[p]);
        end
      endcase
    end
    @(negedge clk); ptr_en = 0; cfg_we = 0;
    for (int i = 0; i < NPTR; i++) begin
      cfg_sel = 0; cfg_idx = 2'(i); #1; checks++;
      if (cfg_rdata !== model[i]) begin failures++; $display("FAIL final pointer %0d", i); end
      @(negedge clk);
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
