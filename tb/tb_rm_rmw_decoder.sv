// Testbench for rm_rmw_decoder: random streams of RMW reads and writes,
// checked cycle by cycle against a reference that tracks each RMW through
// its read, modify and writeback cycles: the writeback must come exactly two
// cycles after the read for the same word, three RMWs may be in flight, and
// a write to the word during the modify cycle must cancel the writeback.
module tb_rm_rmw_decoder;
  localparam int AW = 9;
  logic clk = 0, rst_n = 0;
  logic rd_rmw = 0, wr_en = 0;
  logic [AW-1:0] rd_addr = 0, wr_addr = 0;
  logic mod_valid, wb_en;
  logic [AW-1:0] mod_addr, wb_addr;
  int checks = 0, failures = 0, aborts = 0, wbs = 0, full3 = 0;

  rm_rmw_decoder #(.AW(AW), .SLOTS(3)) dut (.*);
  always #5 clk = ~clk;

  // reference: stage 1 = modify cycle, stage 2 = writeback cycle
  logic          m_v1 = 0, m_v2 = 0;
  logic [AW-1:0] m_a1 = 0, m_a2 = 0;

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      rd_rmw  = ($urandom % 3) != 0;
      rd_addr = AW'($urandom % 8);
      wr_en   = ($urandom % 3) == 0;
      wr_addr = AW'($urandom % 8);
      #1;
      checks++;
      if (mod_valid !== m_v1 || (m_v1 && mod_addr !== m_a1)) begin
        failures++; $display("FAIL modify cycle %0d: %b %0d exp %b %0d", n, mod_valid, mod_addr, m_v1, m_a1);
      end
      checks++;
      if (wb_en !== m_v2 || (m_v2 && wb_addr !== m_a2)) begin
        failures++; $display("FAIL writeback cycle %0d: %b %0d exp %b %0d", n, wb_en, wb_addr, m_v2, m_a2);
      end
      if (m_v2) wbs++;
      if (rd_rmw && m_v1 && m_v2) full3++;
      @(posedge clk);
      if (m_v1 && wr_en && wr_addr == m_a1) aborts++;
      m_v2 = m_v1 && !(wr_en && wr_addr == m_a1);
      m_a2 = m_a1;
      m_v1 = rd_rmw;
      m_a1 = rd_addr;
    end
    checks++;
    if (aborts == 0 || wbs == 0 || full3 == 0) begin failures++; $display("FAIL coverage"); end
    $display("aborts=%0d writebacks=%0d three-in-flight=%0d", aborts, wbs, full3);
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
