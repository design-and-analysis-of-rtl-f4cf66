// Testbench for rm_mat: a sequential reference model of the mat checks every
// reply and both ext_out bits of a long random request stream.
//
// The model executes each request completely, in order, when it is issued,
// using the ext_in values the stimulus will present in the request's output
// cycle (external condition and PLA input). Matching the pipelined mat
// against this atomic model checks all forwarding paths: RMW modify and
// writeback forwarding, write buffer hits (also in the cycle the condition
// arrives), the RMW abort by a write in the modify cycle, gang operations
// meeting RMWs and buffered writes, and drains meeting RMW writebacks.
//
// Phases: configuration writes and read-back; initialisation of every word;
// random traffic on a small window of words (reads with compare, RMW,
// pointer, internal and external condition; writes with pointer and
// conditions; gang and conditional gang; configuration reads) under random
// PLA programs and mat control settings; a directed PLA counter (Section 3
// power test: 4-bit counter in the meta-data); and the coverage counts of
// each mechanism, each of which must be non-zero.
module tb_rm_mat;
  import rm_pkg::*;
  localparam int N = 6000;   // random cycles per round
  localparam int ROUNDS = 4;

  logic clk = 0, rst_n = 0;
  mat_req_t req;
  reply_t rep;
  logic [E-1:0] ext_in, ext_out;
  imcn_cfg_t imcn_cfg;

  rm_mat dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- reference state ----------------------------------------------------
  logic [D-1:0] m_d [WORDS];
  logic [M-1:0] m_m [WORDS];
  logic [PTR_W-1:0] m_ptr [NPTR];
  logic [STRIDE_W-1:0] m_str [NPTR];
  matctl_t m_ctl;
  imcn_cfg_t m_imcn;
  logic [PLA_ROW_W-1:0] m_pla [PLA_TERMS];

  // ---- stimulus timeline ----------------------------------------------------
  localparam int T = 200000;
  logic [E-1:0] ext_seq [T];
  reply_t exp_rep [T];
  logic [E-1:0] exp_xo [T];
  logic exp_chk [T];
  mat_req_t req_log [T];
  int cyc = 0;

  // coverage of mechanisms
  int c_rd, c_wr, c_cmp_hit, c_cmp_miss, c_rmw, c_rmw_fwd, c_rmw_wbfwd, c_abort,
      c_ptr, c_ptr_oor, c_icond_fail, c_xrd_drop, c_xwr_commit, c_xwr_drop,
      c_xwr_fwd, c_gang, c_cgang, c_cfg_rd, c_gang_mod;

  function automatic logic [M-1:0] pla_eval(logic [PLA_NIN-1:0] in);
    logic [M-1:0] o;
    o = '0;
    for (int r = 0; r < PLA_TERMS; r++) begin
      logic [PLA_NIN-1:0] zz, oo;
      zz = m_pla[r][PLA_NIN-1:0];
      oo = m_pla[r][2*PLA_NIN-1:PLA_NIN];
      if (((zz & in) | (oo & ~in)) == '0) o |= m_pla[r][PLA_ROW_W-1 -: M];
    end
    return o;
  endfunction

  function automatic logic [D-1:0] cfg_value(logic [AW-1:0] a);
    if (a < 4)       return D'(m_ptr[a[1:0]]);
    else if (a < 8)  return D'(m_str[a[1:0]]);
    else if (a >= 16 && a < 32) return D'(m_pla[a[3:0]]);
    else if (a == CFG_MATCTL) return D'(m_ctl);
    else if (a == CFG_IMCN)   return D'(m_imcn);
    return '0;
  endfunction

  // Execute one request at issue cycle k on the model; record the reply
  // expected in cycle k+2.
  int last_rmw_k = -10, last_rmw_addr, last_xwr_k = -10, last_xwr_addr;
  task automatic model(mat_req_t r, int k);
    payload_t p;
    logic ok, exec, mr, cond, icok;
    logic [AW-1:0] a;
    reply_t o;
    logic o_xc;
    p = r.p;
    o = '0; o_xc = 0;
    exp_chk[k+2] = 1;
    cond = ext_seq[k+2][m_ctl.xcond_sel];
    if (r.valid) begin
      ok = 1; a = p.addr;
      if (p.op.ptr && (p.op.rd || p.op.wr)) begin
        ptr_spec_t ps;
        ps = ptr_spec_t'(p.addr);
        a  = m_ptr[ps.num][AW-1:0];
        ok = !m_ctl.range_en || (m_ptr[ps.num][PTR_W-1:AW] == m_ctl.range_id);
        if (ps.upd) m_ptr[ps.num] = ps.sub ? m_ptr[ps.num] - PTR_W'(m_str[ps.num])
                                          : m_ptr[ps.num] + PTR_W'(m_str[ps.num]);
        c_ptr++;
        if (!ok) c_ptr_oor++;
      end
      if (p.op.cfg_rd) begin
        o.data = cfg_value(p.addr); o.valid = 1; o.complete = 1; c_cfg_rd++;
      end else if (p.op.cfg_wr) begin
        o.complete = 1;
        if (p.addr < 4) m_ptr[p.addr[1:0]] = p.data[PTR_W-1:0];
        else if (p.addr < 8) m_str[p.addr[1:0]] = p.data[STRIDE_W-1:0];
        else if (p.addr >= 16 && p.addr < 32) m_pla[p.addr[3:0]] = p.data[PLA_ROW_W-1:0];
        else if (p.addr == CFG_MATCTL) m_ctl = matctl_t'(p.data[$bits(matctl_t)-1:0]);
        else if (p.addr == CFG_IMCN) m_imcn = imcn_cfg_t'(p.data[$bits(imcn_cfg_t)-1:0]);
      end else if (ok) begin
        icok = !p.op.icond || (((m_m[a] ^ p.mdata) & p.mask[M:1]) == '0);
        exec = p.op.gang || icok;
        mr   = (!p.mask[0] || m_d[a] == p.data) && (((m_m[a] ^ p.mdata) & p.mask[M:1]) == '0);
        if (!exec) c_icond_fail++;
        if (exec) begin
          o.complete = 1;
          if (p.op.rd) begin
            c_rd++;
            o.data = m_d[a]; o.mdata = m_m[a];
            o.valid = !p.op.cmp || mr;
            o.match = p.op.cmp && mr;
            if (p.op.cmp) begin if (mr) c_cmp_hit++; else c_cmp_miss++; end
            if (k - last_rmw_k == 1 && a == last_rmw_addr) c_rmw_fwd++;
            if (k - last_rmw_k == 2 && a == last_rmw_addr) c_rmw_wbfwd++;
            if (k - last_xwr_k == 1 && a == last_xwr_addr) c_xwr_fwd++;
            if (p.op.rmw) begin
              m_m[a] = pla_eval({ext_seq[k+2][m_ctl.pla_ext_sel], p.op.cmp & mr, m_m[a]});
              c_rmw++; last_rmw_k = k; last_rmw_addr = a;
            end
            if (p.op.xcond) begin o_xc = 1; if (!cond) c_xrd_drop++; end
          end else if (p.op.wr) begin
            c_wr++;
            if (k - last_rmw_k == 1 && a == last_rmw_addr && !p.op.xcond) c_abort++;
            if (!p.op.xcond || cond) begin m_d[a] = p.data; m_m[a] = p.mdata; end
            if (p.op.xcond) begin
              o_xc = 1;
              if (cond) c_xwr_commit++; else c_xwr_drop++;
              last_xwr_k = k; last_xwr_addr = a;
            end
          end else if (p.op.gang) begin
            if (k - last_rmw_k == 1) c_gang_mod++;
            for (int w = 0; w < WORDS; w++) begin
              if (p.op.icond) begin
                if (m_m[w][1]) m_m[w][0] = 1'b0;
              end else begin
                m_m[w] = (m_m[w] | (p.mask[M:1] & p.addr[M-1:0])) & ~(p.mask[M:1] & ~p.addr[M-1:0]);
              end
            end
            if (p.op.icond) c_cgang++; else c_gang++;
          end
        end
      end
    end
    // ext_out from the ungated outputs
    for (int i = 0; i < E; i++) begin
      case (m_ctl.xo_sel[i])
        XO_NONE:     exp_xo[k+2][i] = 1'b0;
        XO_MATCH:    exp_xo[k+2][i] = o.match;
        XO_VALID:    exp_xo[k+2][i] = o.valid;
        XO_COMPLETE: exp_xo[k+2][i] = o.complete;
        default:     exp_xo[k+2][i] = o.mdata[m_ctl.xo_sel[i][1:0]];
      endcase
    end
    if (o_xc && !cond) begin o.valid = 0; o.match = 0; o.complete = 0; end
    exp_rep[k+2] = o;
  endtask

  // One cycle: drive request r and ext_in, check the reply of the request
  // issued two cycles ago.
  task automatic issue(mat_req_t r);
    @(negedge clk);
    req_log[cyc] = r;
    model(r, cyc);
    req = r;
    ext_in = ext_seq[cyc];
    #1;
    if (exp_chk[cyc]) begin
      checks++;
      if (rep !== exp_rep[cyc] || ext_out !== exp_xo[cyc]) begin
        failures++;
        if (failures < 20)
        begin
          $display("FAIL cycle %0d: rep %h exp %h, ext_out %b exp %b", cyc, rep, exp_rep[cyc], ext_out, exp_xo[cyc]);
          for (int j = cyc - 6; j <= cyc; j++)
            $display("   %0d: v=%b op=%b a=%0d mask=%b md=%h d=%h ext=%b", j, req_log[j].valid, req_log[j].p.op,
                     req_log[j].p.addr, req_log[j].p.mask, req_log[j].p.mdata, req_log[j].p.data, ext_seq[j]);
        end
      end
    end
    cyc++;
  endtask

  function automatic mat_req_t mk(opcode_t op, logic [AW-1:0] a, logic [M:0] mask,
                                  logic [M-1:0] md, logic [D-1:0] d);
    mat_req_t r;
    r.valid = 1; r.p.op = op; r.p.addr = a; r.p.mask = mask; r.p.mdata = md; r.p.data = d;
    return r;
  endfunction

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

  task automatic idle(int n);
    repeat (n) issue('0);
  endtask

  task automatic cfg_write(logic [AW-1:0] a, logic [D-1:0] d);
    issue(mk(OP("C"), a, '0, '0, d));
    idle(3);
  endtask

  function automatic logic [PLA_ROW_W-1:0] rand_row();
    logic [PLA_NIN-1:0] oo, zz;
    for (int i = 0; i < PLA_NIN; i++)
      case ($urandom % 4)
        0: begin oo[i] = 1; zz[i] = 0; end
        1: begin oo[i] = 0; zz[i] = 1; end
        default: begin oo[i] = 0; zz[i] = 0; end
      endcase
    return {M'($urandom), oo, zz};
  endfunction

  // 4-bit increment of md[3:0] (10 product terms); inputs {ext, match, md}
  task automatic program_counter();
    logic [PLA_NIN-1:0] one [10], zero [10];
    logic [M-1:0] outb [10];
    // bit0 = ~m0
    one[0] = 6'b000000; zero[0] = 6'b000001; outb[0] = 4'b0001;
    // bit1 = m1~m0 | ~m1m0
    one[1] = 6'b000010; zero[1] = 6'b000001; outb[1] = 4'b0010;
    one[2] = 6'b000001; zero[2] = 6'b000010; outb[2] = 4'b0010;
    // bit2 = m2~m1 | m2~m0 | ~m2m1m0
    one[3] = 6'b000100; zero[3] = 6'b000010; outb[3] = 4'b0100;
    one[4] = 6'b000100; zero[4] = 6'b000001; outb[4] = 4'b0100;
    one[5] = 6'b000011; zero[5] = 6'b000100; outb[5] = 4'b0100;
    // bit3 = m3~m2 | m3~m1 | m3~m0 | ~m3m2m1m0
    one[6] = 6'b001000; zero[6] = 6'b000100; outb[6] = 4'b1000;
    one[7] = 6'b001000; zero[7] = 6'b000010; outb[7] = 4'b1000;
    one[8] = 6'b001000; zero[8] = 6'b000001; outb[8] = 4'b1000;
    one[9] = 6'b000111; zero[9] = 6'b001000; outb[9] = 4'b1000;
    for (int r = 0; r < PLA_TERMS; r++)
      if (r < 10) cfg_write(CFG_PLA0 + AW'(r), D'({outb[r], one[r], zero[r]}));
      else        cfg_write(CFG_PLA0 + AW'(r), D'({4'b0, 6'h3f, 6'h3f}));
  endtask

  function automatic mat_req_t rand_req();
    mat_req_t r;
    opcode_t op;
    logic [AW-1:0] a;
    int sel;
    r = '0;
    sel = $urandom % 100;
    op = '0;
    if (sel < 8) return '0;
    else if (sel < 50) begin
      op.rd = 1; op.cmp = $urandom % 3 == 0; op.rmw = $urandom % 3 == 0;
      op.ptr = $urandom % 5 == 0; op.icond = $urandom % 6 == 0; op.xcond = $urandom % 4 == 0;
    end else if (sel < 88) begin
      op.wr = 1; op.ptr = $urandom % 5 == 0; op.icond = $urandom % 6 == 0;
      op.xcond = $urandom % 2 == 0;
    end else if (sel < 95) begin
      op.gang = 1; op.icond = $urandom % 2 == 0;
    end else begin
      op.cfg_rd = 1;
    end
    a = AW'($urandom % 6);
    if (op.ptr) a = AW'($urandom % 16);
    if (op.cfg_rd) a = AW'($urandom % 40);
    if (op.gang) a = AW'($urandom);
    r = mk(op, a, (M+1)'($urandom), M'($urandom), ($urandom % 4 == 0) ? $urandom : D'($urandom % 4));
    return r;
  endfunction

  initial begin
    req = '0; ext_in = '0;
    for (int i = 0; i < T; i++) begin ext_seq[i] = E'($urandom); exp_chk[i] = 0; end
    for (int i = 0; i < NPTR; i++) begin m_ptr[i] = '0; m_str[i] = '0; end
    for (int r = 0; r < PLA_TERMS; r++) m_pla[r] = {4'b0, 6'h3f, 6'h3f};
    m_ctl = '0; m_imcn = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // initialise every word
    for (int w = 0; w < WORDS; w++) issue(mk(OP("w"), AW'(w), '0, M'($urandom), $urandom));
    idle(4);
    for (int round = 0; round < ROUNDS; round++) begin
      matctl_t ctl;
      // configuration: pointers near the word window (one near the top of the
      // mat so that it leaves the range), small strides, PLA, mat control
      cfg_write(CFG_PTR0 + 0, 0);
      cfg_write(CFG_PTR0 + 1, 3);
      cfg_write(CFG_PTR0 + 2, 5);
      cfg_write(CFG_PTR0 + 3, 509);
      for (int i = 0; i < NPTR; i++) cfg_write(CFG_STR0 + AW'(i), D'($urandom % 4));
      if (round == 0) program_counter();
      else for (int r = 0; r < PLA_TERMS; r++) cfg_write(CFG_PLA0 + AW'(r), D'(rand_row()));
      ctl = matctl_t'($urandom);
      ctl.range_en = 1; ctl.range_id = 0;
      cfg_write(CFG_MATCTL, D'(ctl));
      cfg_write(CFG_IMCN, $urandom);
      // read back every configuration register
      for (int a = 0; a < 40; a++) issue(mk(OP("c"), AW'(a), '0, '0, '0));
      idle(3);
      for (int n = 0; n < N; n++) issue(rand_req());
      idle(4);
    end
    // directed counter: 20 back-to-back increments of word 100, then a read
    program_counter();
    cfg_write(CFG_MATCTL, 0);
    issue(mk(OP("w"), 100, '0, 4'd5, 32'h1234));
    for (int i = 0; i < 20; i++) issue(mk(OP("ru"), 100, '0, '0, '0));
    issue(mk(OP("r"), 100, '0, '0, '0));
    idle(3);
    checks++;
    if (m_m[100] !== 4'd9) begin failures++; $display("FAIL counter model %0d", m_m[100]); end
    // coverage: every mechanism must have been exercised
    begin
      int cov [19];
      cov = '{c_rd, c_wr, c_cmp_hit, c_cmp_miss, c_rmw, c_rmw_fwd, c_rmw_wbfwd, c_abort,
              c_ptr, c_ptr_oor, c_icond_fail, c_xrd_drop, c_xwr_commit, c_xwr_drop,
              c_xwr_fwd, c_gang, c_cgang, c_cfg_rd, c_gang_mod};
      for (int i = 0; i < 19; i++) begin
        checks++;
        if (cov[i] == 0) begin failures++; $display("FAIL coverage item %0d never happened", i); end
      end
      $display("rd=%0d wr=%0d cmp_hit=%0d cmp_miss=%0d rmw=%0d rmw_fwd=%0d rmw_wbfwd=%0d abort=%0d",
               c_rd, c_wr, c_cmp_hit, c_cmp_miss, c_rmw, c_rmw_fwd, c_rmw_wbfwd, c_abort);
      $display("ptr=%0d ptr_oor=%0d icond_fail=%0d xrd_drop=%0d xwr_commit=%0d xwr_drop=%0d xwr_fwd=%0d",
               c_ptr, c_ptr_oor, c_icond_fail, c_xrd_drop, c_xwr_commit, c_xwr_drop, c_xwr_fwd);
      $display("gang=%0d cgang=%0d cfg_rd=%0d gang_in_modify=%0d", c_gang, c_cgang, c_cfg_rd, c_gang_mod);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (T - 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
