// Testbench for rm_imcn: random bus segmentations, driver and receiver
// selections and ext_out values, checked against a reference that labels the
// segments of each bus and ORs the drivers of each segment. Also a directed
// case: two cache ways OR their hit bits on bus 0 and a data mat reads it.
module tb_rm_imcn;
  import rm_pkg::*;
  localparam int NM = 6;
  logic [NM-1:0][E-1:0] ext_out, ext_in;
  imcn_cfg_t [NM-1:0] cfg;
  int checks = 0, failures = 0;

  rm_imcn #(.NUM_MATS(NM)) dut (.ext_out, .cfg, .ext_in);

  function automatic logic ref_in(int k, int i);
    int b, lo, hi;
    logic v;
    b = cfg[k].in_bus[i];
    lo = k; while (lo > 0 && cfg[lo-1].link[b]) lo--;
    hi = k; while (hi < NM - 1 && cfg[hi].link[b]) hi++;
    v = 0;
    for (int j = lo; j <= hi; j++)
      for (int o = 0; o < E; o++)
        if (cfg[j].drv_en[o] && cfg[j].drv_bus[o] == 2'(b) && ext_out[j][o]) v = 1;
    return v;
  endfunction

  initial begin
    // directed: mats 0 and 1 (tag ways) drive ext_out[0] on bus 0; mats 0..3
    // form one segment; mat 2 reads bus 0 on ext_in[0]
    cfg = '0;
    for (int k = 0; k < 3; k++) cfg[k].link = 4'b0001;
    cfg[0].drv_en = 2'b01; cfg[1].drv_en = 2'b01;
    for (int c = 0; c < 4; c++) begin
      ext_out = '0; ext_out[0][0] = c[0]; ext_out[1][0] = c[1]; #1;
      checks++;
      if (ext_in[2][0] !== (c != 0) || ext_in[4][0] !== 1'b0) begin
        failures++; $display("FAIL global hit case %0d", c);
      end
    end
    for (int n = 0; n < 20000; n++) begin
      for (int k = 0; k < NM; k++) cfg[k] = imcn_cfg_t'($urandom);
      ext_out = ($bits(ext_out))'($urandom);
      #1;
      for (int k = 0; k < NM; k++)
        for (int i = 0; i < E; i++) begin
          checks++;
          if (ext_in[k][i] !== ref_in(k, i)) begin
            failures++;
            if (failures < 10) $display("FAIL mat %0d in %0d", k, i);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
