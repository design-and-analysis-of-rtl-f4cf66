// Testbench for rm_addr_splitter: fills the eight-entry table with random
// field layouts, then checks random addresses against the base + (va >>
// shift) & mask formulas, the tag forwarding and the hw_direct bypass. A
// directed case maps a 4-mat scratchpad with the word interleaved across the
// mats (mat ID from va[1:0], mat address from va[10:2]).
module tb_rm_addr_splitter;
  import rm_pkg::*;
  localparam int NM = 4, MW = 2;
  logic clk = 0, rst_n = 0;
  proc_req_t in = '0;
  logic out_valid, out_reply;
  logic [MW-1:0] out_mat_id, out_mat_mask;
  payload_t out_payload;
  logic cfg_we = 0;
  logic [LMID_W-1:0] cfg_idx = 0;
  split_entry_t cfg_entry = '0;
  split_entry_t tbl [8];
  int checks = 0, failures = 0, ndirect = 0, ntag = 0;

  rm_addr_splitter #(.NUM_MATS(NM)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(string what, logic [MW-1:0] id, logic [MW-1:0] msk, logic [AW-1:0] a, logic [D-1:0] d);
    checks++;
    if (out_valid !== in.valid || out_reply !== in.reply || out_mat_id !== id ||
        out_mat_mask !== msk || out_payload.addr !== a || out_payload.data !== d ||
        out_payload.op !== in.op || out_payload.mask !== in.mask || out_payload.mdata !== in.mdata) begin
      failures++;
      if (failures < 10) $display("FAIL %s va=%h: id %0d/%0d addr %0d/%0d", what, in.va, out_mat_id, id, out_payload.addr, a);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // scratchpad, logical memory 1
    cfg_we = 1; cfg_idx = 1;
    cfg_entry = '{id_base: 8'd0, id_mask: 8'd0, id_shift: 5'd0, id_bits: 4'd2,
                  addr_base: '0, addr_shift: 5'd2, addr_bits: 4'd9, tag_en: 1'b0, tag_shift: 5'd0};
    tbl[1] = cfg_entry;
    @(negedge clk); cfg_we = 0;
    for (int w = 0; w < 2048; w++) begin
      in = '0; in.valid = 1; in.va = {3'd1, 29'(w)}; in.data = $urandom; #1;
      check("scratchpad", MW'(w % 4), '0, AW'(w / 4), in.data);
    end
    for (int i = 0; i < 8; i++) begin
      @(negedge clk);
      cfg_we = 1; cfg_idx = 3'(i);
      cfg_entry = split_entry_t'({$urandom, $urandom});
      tbl[i] = cfg_entry;
    end
    @(negedge clk); cfg_we = 0;
    for (int n = 0; n < 20000; n++) begin
      split_entry_t e;
      logic [31:0] idoff, aoff;
      in = proc_req_t'({$urandom, $urandom, $urandom, $urandom});
      in.hw_direct = ($urandom % 8) == 0;
      #1;
      if (in.hw_direct) begin
        ndirect++;
        check("direct", in.va[AW +: MW], in.va[AW+MW +: MW], in.va[AW-1:0], in.data);
      end else begin
        e = tbl[in.va[31:29]];
        idoff = (in.va >> e.id_shift) & ((32'd1 << e.id_bits) - 1);
        aoff  = (in.va >> e.addr_shift) & ((32'd1 << e.addr_bits) - 1);
        if (e.tag_en) ntag++;
        check("table", MW'(e.id_base + idoff), MW'(e.id_mask), AW'(e.addr_base + aoff),
              e.tag_en ? in.va >> e.tag_shift : in.data);
      end
    end
    checks++;
    if (ndirect == 0 || ntag == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
