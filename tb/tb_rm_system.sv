// Testbench for rm_system at its default size (two ports, four mats): every
// mechanism of the system is used in a directed scenario, every reply is
// checked on the cycle it must arrive (four cycles after issue), and each
// mechanism has a counter that must end non-zero.
//
// Scenarios, in order:
//   scratchpad   address splitter table maps a 2048-word scratchpad across
//                the four mats (word interleaved); writes on port 0, reads on
//                both ports at once from different mats
//   multicast    one write to all four mats through the mat ID mask
//   cache        2-way set-associative cache: tag ways in mats 0 and 1, data
//                ways in mats 2 and 3. Port 0 multicasts the tag compare;
//                port 1 in the same cycle multicasts a conditional read or
//                write to the data mats, whose condition is the hit of their
//                way, carried by the inter-mat control network. Hits, misses,
//                committed and dropped writes, global hit in the reply OR
//   counter      PLA programmed as a 4-bit counter; back-to-back RMWs
//   fifo         FIFO spanning mats 0 and 1: pointer push/pop multicast to
//                both mats, the range check picks the mat that executes
//   gang         gang clear of the tag valid bits (all later compares miss),
//                conditional gang clear
//   config       configuration read-back of every mat's control register
//   tvm          test vector memory: scan in 16 requests, burst, scan out
//                the replies, loop mode
module tb_rm_system;
  import rm_pkg::*;
  localparam int NP = 2, NM = 4, MW = 2, T = 60000;

  logic clk = 0, rst_n = 0;
  proc_req_t [NP-1:0] proc_req;
  reply_t [NP-1:0] proc_rep;
  logic [NP-1:0] proc_rep_sched, split_cfg_we, tvm_busy;
  logic [LMID_W-1:0] split_cfg_idx;
  split_entry_t split_cfg_entry;
  logic tvm_mode, tvm_run, tvm_loop, scan_en, scan_in, scan_out, xbar_conflict;

  rm_system dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  // expected replies per port and arrival cycle; emsk selects the checked bits
  reply_t er   [NP][T];
  reply_t emsk [NP][T];
  logic   ee   [NP][T];
  int     lat_ok;

  // requests for the next cycle and their expected replies
  proc_req_t q [NP];
  reply_t    qe [NP], qm [NP];

  // mechanism counters
  int n_split, n_both, n_mcast, n_hit, n_miss, n_xwr_commit, n_xwr_drop, n_xrd,
      n_rmw, n_fifo_cross, n_gang, n_cgang, n_cfg, n_tvm, n_tvm_loop, n_direct;

  localparam reply_t ALL  = '1;
  localparam reply_t NONE = '0;

  // model of the mat contents
  logic [D-1:0] md_d [NM][WORDS];
  logic [M-1:0] md_m [NM][WORDS];

  function automatic opcode_t OP(string s);
    opcode_t o;
    o = '0;
    for (int i = 0; i < s.len(); i++)
      case (s[i])
        "r": o.rd = 1;   "w": o.wr = 1;   "g": o.gang = 1;
        "c": o.cfg_rd = 1; "C": o.cfg_wr = 1; "m": o.cmp = 1;
        "p": o.ptr = 1;  "u": o.rmw = 1;  "i": o.icond = 1;  "x": o.xcond = 1;
        default: ;
      endcase
    return o;
  endfunction

  // hardware-direct request: va = {.., mat mask, mat ID, mat address}
  function automatic proc_req_t hw(string op, int mat, int mmask, int addr,
                                   logic [M:0] mask = '0, logic [M-1:0] md = '0,
                                   logic [D-1:0] d = '0);
    proc_req_t r;
    r = '0;
    r.valid = 1; r.reply = 1; r.hw_direct = 1;
    r.va = VA_W'({MW'(mmask), MW'(mat), AW'(addr)});
    r.op = OP(op); r.mask = mask; r.mdata = md; r.data = d;
    return r;
  endfunction

  function automatic reply_t R(logic [D-1:0] d, logic [M-1:0] m, logic v, logic mt, logic c);
    return '{data: d, mdata: m, valid: v, match: mt, complete: c};
  endfunction

  // advance one cycle: issue q[], check the replies due now
  task automatic tick();
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      proc_req[p] = q[p];
      if (q[p].valid) begin
        ee[p][cyc+4] = 1; er[p][cyc+4] = qe[p]; emsk[p][cyc+4] = qm[p];
        if (q[p].hw_direct) n_direct++;
      end
      q[p] = '0; qe[p] = '0; qm[p] = ALL;
    end
    #1;
    for (int p = 0; p < NP; p++) begin
      if (ee[p][cyc] || proc_rep_sched[p]) begin
        checks++;
        if (proc_rep_sched[p] !== ee[p][cyc] ||
            ((proc_rep[p] ^ er[p][cyc]) & emsk[p][cyc]) != '0) begin
          failures++;
          if (failures < 20)
            $display("FAIL cycle %0d port %0d: sched %b rep %h exp %h (mask %h)", cyc, p,
                     proc_rep_sched[p], proc_rep[p], er[p][cyc], emsk[p][cyc]);
        end else if (ee[p][cyc]) lat_ok++;
      end
    end
    checks++;
    if (xbar_conflict !== 1'b0) begin failures++; $display("FAIL crossbar conflict at %0d", cyc); end
    cyc++;
  endtask

  task automatic idle(int n);
    repeat (n) tick();
  endtask

  // issue one request on port p with expected reply e (mask m) and wait
  task automatic one(int p, proc_req_t r, reply_t e, reply_t m = ALL);
    q[p] = r; qe[p] = e; qm[p] = m;
    tick();
  endtask

  task automatic cfg_wr(int mat, int mmask, int addr, logic [D-1:0] d);
    one(0, hw("C", mat, mmask, addr, '0, '0, d), R(0, 0, 0, 0, 1));
    idle(3);
  endtask

  // ---- PLA program: 4-bit increment of md[3:0] -----------------------------
  task automatic program_counter(int mat, int mmask);
    logic [PLA_NIN-1:0] one_ [10], zero_ [10];
    logic [M-1:0] outb [10];
    one_[0] = 6'b000000; zero_[0] = 6'b000001; outb[0] = 4'b0001;
    one_[1] = 6'b000010; zero_[1] = 6'b000001; outb[1] = 4'b0010;
    one_[2] = 6'b000001; zero_[2] = 6'b000010; outb[2] = 4'b0010;
    one_[3] = 6'b000100; zero_[3] = 6'b000010; outb[3] = 4'b0100;
    one_[4] = 6'b000100; zero_[4] = 6'b000001; outb[4] = 4'b0100;
    one_[5] = 6'b000011; zero_[5] = 6'b000100; outb[5] = 4'b0100;
    one_[6] = 6'b001000; zero_[6] = 6'b000100; outb[6] = 4'b1000;
    one_[7] = 6'b001000; zero_[7] = 6'b000010; outb[7] = 4'b1000;
    one_[8] = 6'b001000; zero_[8] = 6'b000001; outb[8] = 4'b1000;
    one_[9] = 6'b000111; zero_[9] = 6'b001000; outb[9] = 4'b1000;
    for (int r = 0; r < 10; r++)
      cfg_wr(mat, mmask, CFG_PLA0 + r, D'({outb[r], one_[r], zero_[r]}));
  endtask

  // ---- TVM scan chain helpers ----------------------------------------------
  localparam int REQ_W = $bits(payload_t) + 2 * MW + 2, REP_W = $bits(reply_t);
  localparam int RQ = 16 * REQ_W, RP = 16 * REP_W, L = NP * (RQ + RP);

  // shift the whole chain once: returns its old content, loads din
  task automatic scan_chain(input logic [L-1:0] din, output logic [L-1:0] dout);
    for (int s = 0; s < L; s++) begin
      @(negedge clk);
      scan_en = 1;
      scan_in = din[L - 1 - s];
      dout[L - 1 - s] = scan_out;
      @(posedge clk);
    end
    @(negedge clk);
    scan_en = 0;
  endtask

  function automatic logic [REQ_W-1:0] tvm_entry(proc_req_t r);
    payload_t p;
    p.op = r.op; p.addr = r.va[AW-1:0]; p.mask = r.mask; p.mdata = r.mdata; p.data = r.data;
    return {r.valid, r.reply, r.va[AW +: MW], r.va[AW+MW +: MW], p};
  endfunction

  // ---- cache model ---------------------------------------------------------
  localparam int CI = 100;              // first cache index (word address)
  logic [D-1:0] tag [2][16];
  logic         tv  [2][16];
  logic [D-1:0] cdat [2][16];

  initial begin
    logic [L-1:0] chain_in, chain_out;
    proc_req_t tv_req [16];
    reply_t    tv_exp [16];
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < T; c++) begin ee[p][c] = 0; er[p][c] = '0; emsk[p][c] = '0; end
    for (int p = 0; p < NP; p++) begin q[p] = '0; qe[p] = '0; qm[p] = ALL; end
    proc_req = '0; split_cfg_we = '0; split_cfg_idx = '0; split_cfg_entry = '0;
    tvm_mode = 0; tvm_run = 0; tvm_loop = 0; scan_en = 0; scan_in = 0;
    lat_ok = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // clear every word of every mat with multicast writes
    for (int w = 0; w < WORDS; w++) begin
      one(0, hw("w", 0, 3, w, '0, '0, '0), R(0, 0, 0, 0, 1));
      for (int k = 0; k < NM; k++) begin md_d[k][w] = '0; md_m[k][w] = '0; end
    end
    n_mcast++;

    // ---- scratchpad through the address splitter ---------------------------
    @(negedge clk);
    split_cfg_we = '1; split_cfg_idx = 3'd1;
    split_cfg_entry = '{id_base: 8'd0, id_mask: 8'd0, id_shift: 5'd0, id_bits: 4'd2,
                        addr_base: 9'd256, addr_shift: 5'd2, addr_bits: 4'd8,
                        tag_en: 1'b0, tag_shift: 5'd0};
    @(negedge clk); split_cfg_we = '0;
    for (int v = 0; v < 1024; v++) begin
      proc_req_t r;
      r = '0; r.valid = 1; r.reply = 1; r.va = {3'd1, 29'(v)}; r.op = OP("w");
      r.data = $urandom; r.mdata = M'($urandom);
      md_d[v % 4][256 + v / 4] = r.data; md_m[v % 4][256 + v / 4] = r.mdata;
      one(0, r, R(0, 0, 0, 0, 1));
    end
    for (int v = 0; v < 1024; v += 2) begin
      for (int p = 0; p < NP; p++) begin
        int vv;
        vv = v + p;
        q[p] = '0; q[p].valid = 1; q[p].reply = 1; q[p].va = {3'd1, 29'(vv)}; q[p].op = OP("r");
        qe[p] = R(md_d[vv % 4][256 + vv / 4], md_m[vv % 4][256 + vv / 4], 1, 0, 1); qm[p] = ALL;
      end
      tick();
      n_split += 2; n_both++;
    end
    idle(4);

    // ---- multicast write, read back from each mat ----------------------------
    one(1, hw("w", 0, 3, 300, '0, 4'h5, 32'hCAFE_F00D), R(0, 0, 0, 0, 1));
    for (int k = 0; k < NM; k++) begin md_d[k][300] = 32'hCAFE_F00D; md_m[k][300] = 4'h5; end
    for (int k = 0; k < NM; k++) one(k % 2, hw("r", k, 0, 300), R(32'hCAFE_F00D, 4'h5, 1, 0, 1));
    n_mcast++;
    idle(4);

    // ---- cache ---------------------------------------------------------------
    // mats 0/1: tag ways, ext_out[0] = match, driving bus 0 / bus 1
    // mats 2/3: data ways, external condition = ext_in[0] from bus 0 / bus 1
    // buses 0 and 1 join all four mats (link bits of mats 0..2)
    for (int k = 0; k < NM; k++) begin
      matctl_t ctl;
      imcn_cfg_t ic;
      ctl = '0; ic = '0;
      if (k < 2) begin
        ctl.xo_sel[0] = XO_MATCH; ctl.range_en = 1; ctl.range_id = RANGE_W'(k);
        ic.drv_en[0] = 1; ic.drv_bus[0] = 2'(k);
      end else begin
        ctl.xcond_sel = 0;
        ic.in_bus[0] = 2'(k - 2);
      end
      if (k < 3) ic.link = 4'b0011;
      cfg_wr(k, 0, CFG_MATCTL, D'(ctl));
      cfg_wr(k, 0, CFG_IMCN, D'(ic));
      // read the control registers back
      one(0, hw("c", k, 0, CFG_MATCTL), R(D'(ctl), 0, 1, 0, 1));
      one(1, hw("c", k, 0, CFG_IMCN), R(D'(ic), 0, 1, 0, 1));
      n_cfg += 2;
    end
    // fill tags (md[0] = valid) and data; way 1 never holds the same tag as way 0
    for (int i = 0; i < 16; i++)
      for (int w = 0; w < 2; w++) begin
        tag[w][i] = {$urandom} & 32'hFFFF_FFF0 | w;
        tv[w][i] = ($urandom % 4) != 0;
        cdat[w][i] = $urandom;
        one(0, hw("w", w, 0, CI + i, '0, M'(tv[w][i]), tag[w][i]), R(0, 0, 0, 0, 1));
        one(1, hw("w", 2 + w, 0, CI + i, '0, '0, cdat[w][i]), R(0, 0, 0, 0, 1));
        md_d[w][CI + i] = tag[w][i]; md_m[w][CI + i] = M'(tv[w][i]);
        md_d[2 + w][CI + i] = cdat[w][i]; md_m[2 + w][CI + i] = '0;
      end
    idle(4);
    // random cache reads and writes
    for (int n = 0; n < 400; n++) begin
      int i, hw_way;
      logic [D-1:0] t, nd;
      logic hit;
      i = $urandom % 16;
      case ($urandom % 3)
        0: t = tag[0][i];
        1: t = tag[1][i];
        default: t = {$urandom} & 32'hFFFF_FFF0 | 32'd3;
      endcase
      hit = 0; hw_way = 0;
      for (int w = 0; w < 2; w++) if (tv[w][i] && tag[w][i] == t) begin hit = 1; hw_way = w; end
      if (hit) n_hit++; else n_miss++;
      // port 0: tag compare (data + valid bit) on both tag ways
      q[0] = hw("rm", 0, 1, CI + i, 5'b00011, 4'b0001, t);
      qe[0] = hit ? R(tag[hw_way][i], 4'b0001, 1, 1, 1) : R(0, 0, 0, 0, 1);
      qm[0] = hit ? ALL : R(0, 0, 1, 1, 1);
      if ($urandom % 2) begin
        // conditional read of both data ways
        q[1] = hw("rx", 2, 1, CI + i);
        qe[1] = hit ? R(cdat[hw_way][i], 0, 1, 0, 1) : R(0, 0, 0, 0, 0);
        qm[1] = hit ? ALL : R(0, 0, 1, 1, 1);
        n_xrd++;
      end else begin
        // conditional write of both data ways: only the hitting way writes
        nd = $urandom;
        q[1] = hw("wx", 2, 1, CI + i, '0, '0, nd);
        qe[1] = R(0, 0, 0, 0, hit);
        qm[1] = ALL;
        if (hit) begin cdat[hw_way][i] = nd; md_d[2 + hw_way][CI + i] = nd; n_xwr_commit++; end
        else n_xwr_drop++;
      end
      tick();
      if ($urandom % 4 == 0) idle(1);
    end
    idle(4);
    // every data word read back directly
    for (int i = 0; i < 16; i++)
      for (int w = 0; w < 2; w++) one(w, hw("r", 2 + w, 0, CI + i), R(cdat[w][i], 0, 1, 0, 1));
    idle(4);

    // ---- gang: invalidate every tag (clear md[0] in mats 0 and 1) ------------
    one(0, hw("g", 0, 1, 0, 5'b00010, '0), R(0, 0, 0, 0, 1));
    for (int k = 0; k < 2; k++) for (int w = 0; w < WORDS; w++) md_m[k][w][0] = 1'b0;
    for (int i = 0; i < 16; i++) tv[0][i] = 0;
    for (int i = 0; i < 16; i++) tv[1][i] = 0;
    n_gang++;
    for (int i = 0; i < 16; i++)
      one(0, hw("rm", 0, 1, CI + i, 5'b00011, 4'b0001, tag[0][i]), R(0, 0, 0, 0, 1), R(0, 0, 1, 1, 1));
    // conditional gang in mat 3: clear md[0] where md[1] = 1
    one(1, hw("w", 3, 0, 20, '0, 4'b0011, 32'd1), R(0, 0, 0, 0, 1));
    one(1, hw("w", 3, 0, 21, '0, 4'b0001, 32'd2), R(0, 0, 0, 0, 1));
    one(1, hw("gi", 3, 0, 0), R(0, 0, 0, 0, 1));
    for (int w = 0; w < WORDS; w++) if (md_m[3][w][1]) md_m[3][w][0] = 1'b0;
    md_m[3][20] = 4'b0010; md_m[3][21] = 4'b0001;
    one(1, hw("r", 3, 0, 20), R(1, 4'b0010, 1, 0, 1));
    one(1, hw("r", 3, 0, 21), R(2, 4'b0001, 1, 0, 1));
    n_cgang++;
    idle(4);

    // ---- PLA counter in mat 3: 12 back-to-back RMWs on one word --------------
    program_counter(3, 0);
    one(0, hw("w", 3, 0, 400, '0, 4'd7, 32'h77), R(0, 0, 0, 0, 1));
    for (int n = 0; n < 12; n++) begin
      one(0, hw("ru", 3, 0, 400), R(32'h77, M'(7 + n), 1, 0, 1));
      n_rmw++;
    end
    one(0, hw("r", 3, 0, 400), R(32'h77, M'(7 + 12), 1, 0, 1));
    md_m[3][400] = M'(7 + 12);
    idle(4);

    // ---- FIFO across mats 0 and 1 --------------------------------------------
    // pointer 0 = tail (push), pointer 1 = head (pop), stride 1, in both mats;
    // words 0..511 of the FIFO space are mat 0, 512..1023 are mat 1
    cfg_wr(0, 1, CFG_PTR0 + 0, 490);
    cfg_wr(0, 1, CFG_PTR0 + 1, 490);
    cfg_wr(0, 1, CFG_STR0 + 0, 1);
    cfg_wr(0, 1, CFG_STR0 + 1, 1);
    begin
      logic [D-1:0] fifo [$];
      for (int n = 0; n < 40; n++) begin
        logic [D-1:0] v;
        v = $urandom;
        fifo.push_back(v);
        // ptr spec {sub=0, upd=1, num=0}
        one(n % 2, hw("wp", 0, 1, 9'b0000_0100, '0, 4'h9, v), R(0, 0, 0, 0, 1));
        if (490 + n >= 512) n_fifo_cross++;
      end
      for (int n = 0; n < 40; n++) begin
        logic [D-1:0] v;
        v = fifo.pop_front();
        one(n % 2, hw("rp", 0, 1, 9'b0000_0101), R(v, 4'h9, 1, 0, 1));
      end
      // pointers read back from both mats: 530 in each
      for (int k = 0; k < 2; k++) begin
        one(0, hw("c", k, 0, CFG_PTR0 + 0), R(530, 0, 1, 0, 1));
        one(1, hw("c", k, 0, CFG_PTR0 + 1), R(530, 0, 1, 0, 1));
        n_cfg += 2;
      end
    end
    idle(4);

    // ---- test vector memory ----------------------------------------------------
    // port 0 entries: 8 writes to mat 3 words 200..207, 7 reads of them, one
    // bubble; port 1 entries all empty
    for (int e = 0; e < 16; e++) begin
      if (e < 8) begin
        tv_req[e] = hw("w", 3, 0, 200 + e, '0, M'(e), 32'hA000 + e);
        tv_exp[e] = R(0, 0, 0, 0, 1);
      end else if (e < 15) begin
        tv_req[e] = hw("r", 3, 0, 200 + e - 8);
        tv_exp[e] = R(32'hA000 + e - 8, M'(e - 8), 1, 0, 1);
      end else begin
        tv_req[e] = '0;
        tv_exp[e] = '0;
      end
    end
    chain_in = '0;
    for (int e = 0; e < 16; e++) chain_in[e * REQ_W +: REQ_W] = tvm_entry(tv_req[e]);
    scan_chain(chain_in, chain_out);
    // burst in loop mode: two passes of 16 launches starting in cycle c0; each
    // reply also appears on port 0 four cycles after its launch
    begin
      int c0;
      tvm_mode = 1; tvm_run = 1; tvm_loop = 1;
      c0 = cyc;
      for (int pass = 0; pass < 2; pass++)
        for (int e = 0; e < 16; e++) begin
          ee[0][c0 + 16 * pass + e + 4]   = tv_req[e].valid;
          er[0][c0 + 16 * pass + e + 4]   = tv_exp[e];
          emsk[0][c0 + 16 * pass + e + 4] = ALL;
        end
      tick();
      tvm_run = 0;
      idle(20);
      tvm_loop = 0;
      while (tvm_busy != '0) tick();
      checks++;
      if (cyc < c0 + 32 + 4 || cyc > c0 + 32 + 6) begin failures++; $display("FAIL tvm burst ended at %0d, started %0d", cyc, c0); end
      else n_tvm_loop++;
    end
    idle(2);
    tvm_mode = 0;
    scan_chain(chain_in, chain_out);
    for (int e = 0; e < 16; e++) begin
      checks++;
      if (reply_t'(chain_out[RQ + e * REP_W +: REP_W]) !== tv_exp[e]) begin
        failures++; $display("FAIL tvm reply %0d", e);
      end else n_tvm++;
    end

    // ---- coverage --------------------------------------------------------------
    begin
      int cov [17];
      string nm [17];
      cov = '{n_split, n_both, n_mcast, n_hit, n_miss, n_xwr_commit, n_xwr_drop, n_xrd,
              n_rmw, n_fifo_cross, n_gang, n_cgang, n_cfg, n_tvm, n_tvm_loop, n_direct, lat_ok};
      nm  = '{"splitter", "both_ports", "multicast", "cache_hit", "cache_miss", "xcond_write_commit",
              "xcond_write_drop", "xcond_read", "rmw", "fifo_cross_mat", "gang", "cond_gang",
              "config_read", "tvm_reply", "tvm_loop", "hw_direct", "reply_at_4_cycles"};
      for (int i = 0; i < 17; i++) begin
        checks++;
        $display("  %s=%0d", nm[i], cov[i]);
        if (cov[i] == 0) begin failures++; $display("FAIL mechanism %s never happened", nm[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
