// Workload testbench: rm_system with sixteen mats (an 8 x 2 array), running
// the memory organisations used as examples for the address splitter, all
// through processor addresses. The mats are the 512-word prototype mats, so
// the word counts are a quarter of the 2048-word-mat examples:
//   scratchpad   2048 words over mats 0-3, once packed contiguously (mat =
//                word / 512) and once word-interleaved (mat = word % 4);
//                both ports read at once from different mats
//   cache        2-way set-associative cache, tags in mats 0 and 1, data
//                arrays in mats 8-11 (way 0) and 12-15 (way 1), 512 lines of
//                four words per way. Port 0 sends tag compares (the splitter
//                puts the upper address bits in the compare data, multicast
//                to both tag mats), port 1 in the same cycle sends the data
//                read or write (multicast to the two ways' data mats),
//                conditioned on the tag hit of its way over the inter-mat
//                control network. The same processor address goes to both
//                ports: each port's splitter table maps it differently. Run
//                with the lines packed contiguously and interleaved over the
//                four data mats of a way.
//   power mix    the test vector used for power measurement: an even mix of
//                compare-modify-writes (a compare, then the PLA as a 4-bit
//                counter on the meta-data) and pointer writes, on one mat
//   fifo         a FIFO spanning mats 4-7: head and tail pointers with two
//                bits more than a word address, every push and pop multicast
//                to the four mats, the range check choosing the mat; it runs
//                through all four mats and wraps. Then two FIFOs in one mat
//                with stride 2, one in the even words and one in the odd.
//
// Every reply is checked in the cycle it must arrive (four cycles after
// issue). Each workload has a counter that must end non-zero.
module tb_rm_workloads;
  import rm_pkg::*;
  localparam int NP = 2, NM = 16, MW = 4, T = 60000;

  logic clk = 0, rst_n = 0;
  proc_req_t [NP-1:0] proc_req;
  reply_t [NP-1:0] proc_rep;
  logic [NP-1:0] proc_rep_sched, split_cfg_we, tvm_busy;
  logic [LMID_W-1:0] split_cfg_idx;
  split_entry_t split_cfg_entry;
  logic tvm_mode, tvm_run, tvm_loop, scan_en, scan_in, scan_out, xbar_conflict;

  rm_system #(.NUM_PORTS(NP), .NUM_MATS(NM)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  reply_t er   [NP][T];
  reply_t emsk [NP][T];
  logic   ee   [NP][T];

  proc_req_t q [NP];
  reply_t    qe [NP], qm [NP];

  int n_sp_contig, n_sp_inter, n_dual, n_hit, n_miss, n_wr_commit, n_wr_drop,
      n_line_contig, n_line_inter, n_cmw, n_ptr_wr, n_fifo_push, n_fifo_pop,
      n_fifo_mat_change, n_fifo_wrap, n_fifo2;

  localparam reply_t ALL = '1;

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

  // request through the address splitter of logical memory lm
  function automatic proc_req_t va(string op, int lm, logic [28:0] a,
                                   logic [M:0] mask = '0, logic [M-1:0] md = '0,
                                   logic [D-1:0] d = '0);
    proc_req_t r;
    r = '0;
    r.valid = 1; r.reply = 1; r.va = {3'(lm), a};
    r.op = OP(op); r.mask = mask; r.mdata = md; r.data = d;
    return r;
  endfunction

  function automatic reply_t R(logic [D-1:0] d, logic [M-1:0] m, logic v, logic mt, logic c);
    return '{data: d, mdata: m, valid: v, match: mt, complete: c};
  endfunction

  task automatic tick();
    @(negedge clk);
    for (int p = 0; p < NP; p++) begin
      proc_req[p] = q[p];
      if (q[p].valid) begin
        ee[p][cyc+4] = 1; er[p][cyc+4] = qe[p]; emsk[p][cyc+4] = qm[p];
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
        end
      end
    end
    checks++;
    if (xbar_conflict !== 1'b0) begin failures++; $display("FAIL crossbar conflict at %0d", cyc); end
    cyc++;
  endtask

  task automatic idle(int n);
    repeat (n) tick();
  endtask

  task automatic one(int p, proc_req_t r, reply_t e, reply_t m = ALL);
    q[p] = r; qe[p] = e; qm[p] = m;
    tick();
  endtask

  task automatic cfg_wr(int mat, int mmask, int addr, logic [D-1:0] d);
    one(0, hw("C", mat, mmask, addr, '0, '0, d), R(0, 0, 0, 0, 1));
  endtask

  // write one splitter table entry on the ports in pmask
  task automatic split(logic [NP-1:0] pmask, int lm, int id_base, int id_mask, int id_shift,
                       int id_bits, int addr_shift, int addr_bits, logic tag_en = 0,
                       int tag_shift = 0);
    @(negedge clk);
    split_cfg_we = pmask; split_cfg_idx = LMID_W'(lm);
    split_cfg_entry = '{id_base: 8'(id_base), id_mask: 8'(id_mask), id_shift: 5'(id_shift),
                        id_bits: 4'(id_bits), addr_base: '0, addr_shift: 5'(addr_shift),
                        addr_bits: 4'(addr_bits), tag_en: tag_en, tag_shift: 5'(tag_shift)};
    @(negedge clk);
    split_cfg_we = '0;
  endtask

  // ---- scratchpad: 2048 words over mats 0-3 ---------------------------------
  logic [D-1:0] sp [2048];

  task automatic scratchpad(logic interleaved);
    int lm;
    lm = interleaved ? 2 : 1;
    if (interleaved) split(2'b11, lm, 0, 0, 0, 2, 2, 9);   // mat = v % 4, addr = v / 4
    else             split(2'b11, lm, 0, 0, 9, 2, 0, 9);   // mat = v / 512, addr = v % 512
    for (int v = 0; v < 2048; v++) begin
      sp[v] = $urandom;
      one(v % 2, va("w", lm, 29'(v), '0, '0, sp[v]), R(0, 0, 0, 0, 1));
    end
    // two reads per cycle that fall in different mats
    for (int n = 0; n < 1024; n++) begin
      int a0, a1;
      a0 = $urandom % 2048;
      a1 = interleaved ? ((a0 & ~3) | ((a0 + 1 + $urandom % 3) & 3)) : (a0 + 512 * (1 + $urandom % 3)) % 2048;
      q[0] = va("r", lm, 29'(a0)); qe[0] = R(sp[a0], 0, 1, 0, 1); qm[0] = R('1, 0, 1, 1, 1);
      q[1] = va("r", lm, 29'(a1)); qe[1] = R(sp[a1], 0, 1, 0, 1); qm[1] = R('1, 0, 1, 1, 1);
      tick();
      n_dual++;
      if (interleaved) n_sp_inter++; else n_sp_contig++;
    end
    idle(4);
  endtask

  // ---- 2-way cache -------------------------------------------------------------
  // processor word address: {lm, tag[17:0], line[8:0], word[1:0]}
  localparam int NL = 64;               // lines exercised
  logic [17:0]  ctag [2][NL];
  logic         cval [2][NL];
  logic [D-1:0] cdat [2][NL][4];
  int           line_of [NL];

  function automatic int dmat(int way, int l, int w, logic interleaved);
    return interleaved ? 8 + 4 * way + w : 8 + 4 * way + (4 * l + w) / 512;
  endfunction

  function automatic int daddr(int l, int w, logic interleaved);
    return interleaved ? l : (4 * l + w) % 512;
  endfunction

  task automatic cache(logic interleaved);
    int lm;
    lm = interleaved ? 4 : 3;
    // port 0: tag array, multicast to mats 0 and 1, line index as address,
    //         the rest of the address as compare data
    split(2'b01, lm, 0, 1, 0, 0, 2, 9, 1, 11);
    // port 1: data array, multicast to the same position in both ways
    if (interleaved) split(2'b10, lm, 8, 4, 0, 2, 2, 9);   // mat 8 + word, addr = line
    else             split(2'b10, lm, 8, 4, 9, 2, 0, 9);   // mat 8 + (line*4+word)/512
    // fill: hardware-direct writes of tags (md[0] = valid) and data
    for (int i = 0; i < NL; i++) begin
      line_of[i] = interleaved ? 8 * i + 3 : 8 * i + 5;
      ctag[0][i] = 18'($urandom) & ~18'd1;
      ctag[1][i] = ctag[0][i] | 18'd1;
      for (int way = 0; way < 2; way++) begin
        cval[way][i] = ($urandom % 4) != 0;
        one(0, hw("w", way, 0, line_of[i], '0, M'(cval[way][i]), D'({3'(lm), ctag[way][i]})),
            R(0, 0, 0, 0, 1));
        for (int w = 0; w < 4; w++) begin
          cdat[way][i][w] = $urandom;
          one(1, hw("w", dmat(way, line_of[i], w, interleaved), 0,
                    daddr(line_of[i], w, interleaved), '0, '0, cdat[way][i][w]),
              R(0, 0, 0, 0, 1));
        end
      end
    end
    idle(4);
    for (int n = 0; n < 1500; n++) begin
      int i, w, hway;
      logic [17:0] t;
      logic hit;
      logic [28:0] a;
      logic [D-1:0] nd;
      i = $urandom % NL; w = $urandom % 4;
      case ($urandom % 3)
        0: t = ctag[0][i];
        1: t = ctag[1][i];
        default: t = 18'($urandom);             // usually a miss; the model decides
      endcase
      hit = 0; hway = 0;
      for (int way = 0; way < 2; way++)
        if (cval[way][i] && ctag[way][i] == t) begin hit = 1; hway = way; end
      if (hit) n_hit++; else n_miss++;
      a = {t, 9'(line_of[i]), 2'(w)};
      q[0] = va("rm", lm, a, 5'b00011, 4'b0001);
      qe[0] = hit ? R(D'({3'(lm), t}), 4'b0001, 1, 1, 1) : R(0, 0, 0, 0, 1);
      qm[0] = hit ? ALL : R(0, 0, 1, 1, 1);
      if ($urandom % 2) begin
        q[1] = va("rx", lm, a);
        qe[1] = hit ? R(cdat[hway][i][w], 0, 1, 0, 1) : R(0, 0, 0, 0, 0);
        qm[1] = hit ? ALL : R(0, 0, 1, 1, 1);
      end else begin
        nd = $urandom;
        q[1] = va("wx", lm, a, '0, '0, nd);
        qe[1] = R(0, 0, 0, 0, hit);
        qm[1] = R(0, 0, 0, 0, 1);
        if (hit) begin cdat[hway][i][w] = nd; n_wr_commit++; end
        else n_wr_drop++;
      end
      tick();
      if (interleaved) n_line_inter++; else n_line_contig++;
    end
    idle(4);
    // read every data word back directly: dropped writes left no trace
    for (int i = 0; i < NL; i++)
      for (int way = 0; way < 2; way++)
        for (int w = 0; w < 4; w++)
          one(0, hw("r", dmat(way, line_of[i], w, interleaved), 0, daddr(line_of[i], w, interleaved)),
              R(cdat[way][i][w], 0, 1, 0, 1));
    idle(4);
  endtask

  // ---- power test mix on mat 5 ------------------------------------------------
  task automatic program_counter(int mat);
    logic [PLA_NIN-1:0] o_ [10], z_ [10];
    logic [M-1:0] ob [10];
    o_[0] = 6'b000000; z_[0] = 6'b000001; ob[0] = 4'b0001;
    o_[1] = 6'b000010; z_[1] = 6'b000001; ob[1] = 4'b0010;
    o_[2] = 6'b000001; z_[2] = 6'b000010; ob[2] = 4'b0010;
    o_[3] = 6'b000100; z_[3] = 6'b000010; ob[3] = 4'b0100;
    o_[4] = 6'b000100; z_[4] = 6'b000001; ob[4] = 4'b0100;
    o_[5] = 6'b000011; z_[5] = 6'b000100; ob[5] = 4'b0100;
    o_[6] = 6'b001000; z_[6] = 6'b000100; ob[6] = 4'b1000;
    o_[7] = 6'b001000; z_[7] = 6'b000010; ob[7] = 4'b1000;
    o_[8] = 6'b001000; z_[8] = 6'b000001; ob[8] = 4'b1000;
    o_[9] = 6'b000111; z_[9] = 6'b001000; ob[9] = 4'b1000;
    for (int r = 0; r < 10; r++)
      cfg_wr(mat, 0, CFG_PLA0 + r, D'({ob[r], o_[r], z_[r]}));
  endtask

  task automatic power_mix();
    localparam int PM = 5;
    logic [D-1:0] key [4];
    logic [M-1:0] cnt [4];
    logic [D-1:0] pw [256];
    program_counter(PM);
    cfg_wr(PM, 0, CFG_PTR0, 100);
    cfg_wr(PM, 0, CFG_STR0, 1);
    for (int k = 0; k < 4; k++) begin
      key[k] = $urandom; cnt[k] = '0;
      one(0, hw("w", PM, 0, 10 + k, '0, '0, key[k]), R(0, 0, 0, 0, 1));
    end
    idle(4);
    // alternate: compare-modify-write of word 10+k, pointer write (pointer 0, +1)
    for (int n = 0; n < 512; n++) begin
      if (n % 2 == 0) begin
        int k;
        logic m;
        k = $urandom % 4;
        m = ($urandom % 4) != 0;
        q[0] = hw("rmu", PM, 0, 10 + k, 5'b00001, '0, m ? key[k] : ~key[k]);
        qe[0] = m ? R(key[k], cnt[k], 1, 1, 1) : R(0, 0, 0, 0, 1);
        qm[0] = m ? ALL : R(0, 0, 1, 1, 1);
        cnt[k] = cnt[k] + 1'b1;
        n_cmw++;
      end else begin
        pw[(n / 2) % 256] = $urandom;
        q[0] = hw("wp", PM, 0, 4'b0100, '0, '0, pw[(n / 2) % 256]);
        qe[0] = R(0, 0, 0, 0, 1);
        n_ptr_wr++;
      end
      tick();
    end
    idle(4);
    for (int k = 0; k < 4; k++)
      one(1, hw("r", PM, 0, 10 + k), R(key[k], cnt[k], 1, 0, 1));
    for (int j = 0; j < 256; j++)
      one(1, hw("r", PM, 0, 100 + j), R(pw[j], 0, 1, 0, 1));
    one(1, hw("c", PM, 0, CFG_PTR0), R(D'(100 + 256), 0, 1, 0, 1));
    idle(4);
  endtask

  // ---- FIFO spanning mats 4-7 (pointer 0 = head, pointer 1 = tail) ----------
  // Every push and pop is multicast to the four mats; the upper two pointer
  // bits pick the mat that executes. Pushes set md[0] (the full bit).
  task automatic fifo4();
    logic [D-1:0] fq [$];
    int head, tail;
    for (int k = 4; k < 8; k++) begin
      matctl_t ctl;
      ctl = '0; ctl.range_en = 1; ctl.range_id = RANGE_W'(k - 4);
      cfg_wr(k, 0, CFG_MATCTL, D'(ctl));
    end
    cfg_wr(4, 3, CFG_PTR0, 1900); cfg_wr(4, 3, CFG_PTR0 + 1, 1900);
    cfg_wr(4, 3, CFG_STR0, 1);    cfg_wr(4, 3, CFG_STR0 + 1, 1);
    head = 1900; tail = 1900;
    for (int n = 0; n < 6000; n++) begin
      logic push;
      push = (fq.size() == 0) || (fq.size() < 2048 && ($urandom % 100) < ((n / 1500) % 2 ? 35 : 65));
      if (push) begin
        logic [D-1:0] d;
        d = $urandom;
        fq.push_back(d);
        one(1, hw("wp", 4, 3, 4'b0101, '0, 4'b0001, d), R(0, 0, 0, 0, 1));
        tail = (tail + 1) % 2048;
        if (tail % 512 == 0) n_fifo_mat_change++;
        if (tail == 0) n_fifo_wrap++;
        n_fifo_push++;
      end else begin
        logic [D-1:0] d;
        d = fq.pop_front();
        one(1, hw("rp", 4, 3, 4'b0100), R(d, 4'b0001, 1, 0, 1));
        head = (head + 1) % 2048;
        n_fifo_pop++;
      end
    end
    idle(4);
    one(0, hw("c", 4 + tail / 512, 0, CFG_PTR0 + 1), R(D'(tail), 0, 1, 0, 1));
    one(0, hw("c", 4 + head / 512, 0, CFG_PTR0), R(D'(head), 0, 1, 0, 1));
    idle(4);
  endtask

  // ---- two FIFOs in mat 3: even words (pointers 0/1), odd words (2/3) ------
  task automatic fifo2();
    logic [D-1:0] fq [2][$];
    matctl_t ctl;
    ctl = '0;
    cfg_wr(3, 0, CFG_MATCTL, D'(ctl));
    for (int j = 0; j < 4; j++) begin
      cfg_wr(3, 0, CFG_PTR0 + j, j / 2);
      cfg_wr(3, 0, CFG_STR0 + j, 2);
    end
    for (int n = 0; n < 3000; n++) begin
      int f;
      logic push;
      f = $urandom % 2;
      push = (fq[f].size() == 0) || (fq[f].size() < 256 && ($urandom % 2));
      if (push) begin
        logic [D-1:0] d;
        d = $urandom;
        fq[f].push_back(d);
        one(0, hw("wp", 3, 0, {2'b01, 2'(2 * f + 1)}, '0, '0, d), R(0, 0, 0, 0, 1));
      end else begin
        one(0, hw("rp", 3, 0, {2'b01, 2'(2 * f)}), R(fq[f].pop_front(), 0, 1, 0, 1));
      end
      n_fifo2++;
    end
    idle(4);
  endtask

  task automatic need(string name, int n);
    checks++;
    $display("  %s=%0d", name, n);
    if (n == 0) begin failures++; $display("FAIL workload step %s never ran", name); end
  endtask

  initial begin
    for (int p = 0; p < NP; p++)
      for (int c = 0; c < T; c++) begin ee[p][c] = 0; er[p][c] = '0; emsk[p][c] = '0; end
    for (int p = 0; p < NP; p++) begin q[p] = '0; qe[p] = '0; qm[p] = ALL; end
    proc_req = '0; split_cfg_we = '0; split_cfg_idx = '0; split_cfg_entry = '0;
    tvm_mode = 0; tvm_run = 0; tvm_loop = 0; scan_en = 0; scan_in = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    scratchpad(0);
    scratchpad(1);

    // control network for the cache: tag mat w drives its match on bus w;
    // the data mats of way w take ext_in[0] from bus w; buses 0 and 1 span
    // all sixteen mats
    for (int k = 0; k < NM; k++) begin
      matctl_t ctl;
      imcn_cfg_t ic;
      ctl = '0; ic = '0;
      if (k < 2) begin
        ctl.xo_sel[0] = XO_MATCH;
        ic.drv_en[0] = 1; ic.drv_bus[0] = 2'(k);
      end else if (k >= 8) begin
        ic.in_bus[0] = (k < 12) ? 2'd0 : 2'd1;
      end
      if (k < NM - 1) ic.link = 4'b0011;
      cfg_wr(k, 0, CFG_MATCTL, D'(ctl));
      cfg_wr(k, 0, CFG_IMCN, D'(ic));
    end
    idle(4);
    cache(0);
    cache(1);

    power_mix();
    fifo4();
    fifo2();

    $display("workload counts:");
    need("scratchpad_contiguous_reads", n_sp_contig);
    need("scratchpad_interleaved_reads", n_sp_inter);
    need("two_port_cycles", n_dual);
    need("cache_hits", n_hit);
    need("cache_misses", n_miss);
    need("cache_writes_committed", n_wr_commit);
    need("cache_writes_dropped", n_wr_drop);
    need("cache_contiguous_lines", n_line_contig);
    need("cache_interleaved_lines", n_line_inter);
    need("compare_modify_writes", n_cmw);
    need("pointer_writes", n_ptr_wr);
    need("fifo4_pushes", n_fifo_push);
    need("fifo4_pops", n_fifo_pop);
    need("fifo4_mat_changes", n_fifo_mat_change);
    need("fifo4_pointer_wraps", n_fifo_wrap);
    need("two_fifo_ops", n_fifo2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    repeat (T - 10) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
