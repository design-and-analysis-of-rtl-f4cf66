// Testbench for rm_comparator: directed cases (tag check that compares the
// data and the valid bit but ignores LRU bits) and 20000 random cases
// checked against a bit-by-bit reference.
module tb_rm_comparator;
  localparam int D = 32, M = 4;
  logic [D-1:0] data_a, data_b;
  logic [M-1:0] md_a, md_b;
  logic [M:0]   mask;
  logic         match;
  int checks = 0, failures = 0;

  rm_comparator #(.D(D), .M(M)) dut (.data_a, .data_b, .md_a, .md_b, .mask, .match);

  function automatic logic ref_match();
    logic r = 1'b1;
    if (mask[0]) for (int i = 0; i < D; i++) if (data_a[i] != data_b[i]) r = 1'b0;
    for (int i = 0; i < M; i++) if (mask[i+1] && md_a[i] != md_b[i]) r = 1'b0;
    return r;
  endfunction

  task automatic expect_match(logic e, string what);
    #1;
    checks++;
    if (match !== e) begin failures++; $display("FAIL %s: match=%b expected %b", what, match, e); end
  endtask

  initial begin
    // valid in md[0], LRU in md[3:2]
    data_a = 32'hCAFE_0123; md_a = 4'b1101;
    data_b = 32'hCAFE_0123; md_b = 4'b0001;
    mask = 5'b00011; expect_match(1, "tag+valid hit, LRU ignored");
    md_a = 4'b1100;  expect_match(0, "valid bit clear");
    md_a = 4'b1101; data_b = 32'hCAFE_0124; expect_match(0, "tag differs");
    mask = 5'b00010; expect_match(1, "data masked out");
    mask = 5'b00000; md_a = 4'b0000; expect_match(1, "all masked");
    for (int n = 0; n < 20000; n++) begin
      data_a = $urandom; md_a = $urandom; mask = $urandom;
      data_b = ($urandom % 2) ? data_a : (data_a ^ (32'h1 << ($urandom % 32)));
      md_b   = ($urandom % 2) ? md_a : M'($urandom);
      #1;
      checks++;
      if (match !== ref_match()) begin
        failures++;
        if (failures < 10) $display("FAIL random %h %h %b %b mask %b -> %b", data_a, data_b, md_a, md_b, mask, match);
      end
    end
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
