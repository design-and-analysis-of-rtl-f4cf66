// Testbench for rm_gang_io: all 512 combinations of gang_en, gmask and gdata
// for four columns, checked against the set/clear/NOP rule of a gang
// operation (a selected column is set when its data bit is 1 and cleared
// when it is 0; an unselected column is left alone). Also replays the
// document's example: set md[3], clear md[2:1], leave md[0].
module tb_rm_gang_io;
  localparam int M = 4;
  logic         gang_en;
  logic [M-1:0] gmask, gdata, gset, gclr;
  int checks = 0, failures = 0;

  rm_gang_io #(.M(M)) dut (.gang_en, .gmask, .gdata, .gset, .gclr);

  // apply a gang operation to a column pattern, the way the array does
  function automatic logic [M-1:0] apply(logic [M-1:0] v, logic [M-1:0] s, logic [M-1:0] c);
    return (v | s) & ~c;
  endfunction

  initial begin
    for (int e = 0; e < 2; e++)
      for (int mk = 0; mk < 16; mk++)
        for (int d = 0; d < 16; d++) begin
          gang_en = e[0]; gmask = mk[3:0]; gdata = d[3:0];
          #1;
          for (int n = 0; n < M; n++) begin
            logic es, ec;
            es = (e == 1) && mk[n] && d[n];
            ec = (e == 1) && mk[n] && !d[n];
            checks++;
            if (gset[n] !== es || gclr[n] !== ec) begin
              failures++;
              $display("FAIL en=%0d mask=%b data=%b col %0d: gset=%b gclr=%b", e, mk[3:0], d[3:0], n, gset[n], gclr[n]);
            end
          end
        end
    // document example: rows 1010 0101 0000 -> 0010 1001 1000 with set,clear,clear,NOP
    gang_en = 1; gmask = 4'b1110; gdata = 4'b1000; #1;
    checks++;
    if (apply(4'b1010, gset, gclr) !== 4'b1000 || apply(4'b0101, gset, gclr) !== 4'b1001 ||
        apply(4'b0000, gset, gclr) !== 4'b1000 || apply(4'b1001, gset, gclr) !== 4'b1001) begin
      failures++; $display("FAIL example gang operation");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
