// rm_mat: reconfigurable memory mat.
//
// A 512-word SRAM whose words carry 4 meta-data bits next to the 32 data
// bits, plus a little peripheral logic, so that one block can serve as a
// slice of a cache (tag or data), a FIFO or a scratchpad. Base operations are
// read, write, gang (set/clear whole meta-data columns), configuration read
// and configuration write; modifiers add a masked compare, pointer
// addressing, read-modify-write of the meta-data, and conditions (internal:
// a masked match of mdata_in against the stored meta-data; external: a bit
// from the inter-mat control network).
//
// Pipeline (one request accepted every cycle, two cycles of latency):
//   cycle T    pre-access: pointer logic turns a pointer number into a word
//              address and may update the pointer; configuration registers
//              are read and written.
//   cycle T+1  array access: read or write of port 0, gang operations, the
//              internal condition, the comparator and the write buffer.
//   cycle T+2  the registered outputs are visible. An external condition
//              (ext_in bit chosen by the mat control register) is applied
//              here: it gates valid/complete/match of an xcond read, and
//              commits or drops an xcond write held in the write buffer.
// A read-modify-write reads in T+1, runs the PLA on the read meta-data, the
// compare result and an ext_in bit in T+2, and writes the PLA output back
// through the meta-data second port in T+3. A read of the same word during
// the modify cycle receives the PLA output; a read in the writeback cycle
// sees the written value; a write in the modify cycle aborts the writeback;
// a gang operation in the modify cycle is applied to the value written back.
//
// Conditional (xcond) writes go to a two-entry write buffer and drain into
// the array in a later cycle in which port 0 is free and no gang operation
// runs. The mat behaves as if every request executed atomically in issue
// order: reads see buffered writes (also in the cycle their condition
// arrives), gang operations and RMW writebacks update buffered entries, and
// ordinary writes drop older buffered entries of the same word. The
// meta-data columns have their own read address, so meta-data checks work
// while a drain uses port 0.
//
// Replies: reads return data and meta-data with valid=1; a compare is valid
// only when it matches (so in a multicast tag check only the hitting way
// answers) and drives match; complete reports that the operation executed
// (condition met, pointer in range). Writes and gang operations return only
// complete.
//
// Address field use: word address; for pointer operations {sub, upd, num};
// for gang operations gang_data in addr[M-1:0] with mask[M:1] as column
// select; for configuration operations the map in rm_pkg.
//
// Taken from the document: the operations, modifiers and their
// applicability, the two-cycle pipeline, the three-cycle RMW with second
// port writeback and abort rule, the PLA input set, the pointer sizes and
// the write buffer for external conditions. This design's own choices: the
// opcode encoding, the configuration map, mask polarity (1 = use the field),
// the external-condition timing, the ext_out source list and the forwarding
// paths.
module rm_mat
  import rm_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  mat_req_t       req,
  output reply_t         rep,
  input  logic [E-1:0]   ext_in,
  output logic [E-1:0]   ext_out,
  output imcn_cfg_t      imcn_cfg
);
  // ------------------------------------------------------------------------
  // configuration registers
  // ------------------------------------------------------------------------
  matctl_t   matctl;
  imcn_cfg_t imcn_q;
  assign imcn_cfg = imcn_q;

  // ------------------------------------------------------------------------
  // stage A: pre-access
  // ------------------------------------------------------------------------
  payload_t  pa;
  ptr_spec_t pspec;
  logic      a_valid;
  logic      a_ptr;
  logic [AW-1:0] ptr_addr;
  logic      ptr_in_range;
  logic [AW-1:0] a_addr;
  logic      a_ok;

  assign pa      = req.p;
  assign a_valid = req.valid;
  assign pspec   = ptr_spec_t'(pa.addr);
  assign a_ptr   = a_valid & pa.op.ptr & (pa.op.rd | pa.op.wr);

  // configuration decode
  logic a_cfg_ptr, a_cfg_pla, a_cfg_ctl, a_cfg_imcn;
  assign a_cfg_ptr  = (pa.addr < 9'd8);
  assign a_cfg_pla  = (pa.addr >= CFG_PLA0) && (pa.addr < CFG_PLA0 + 9'd16);
  assign a_cfg_ctl  = (pa.addr == CFG_MATCTL);
  assign a_cfg_imcn = (pa.addr == CFG_IMCN);

  logic a_cfg_we;
  assign a_cfg_we = a_valid & pa.op.cfg_wr;

  logic [PTR_W-1:0]     ptr_cfg_rdata;
  logic [PLA_ROW_W-1:0] pla_cfg_rdata;

  rm_pointer_logic #(.NPTR(NPTR), .PTR_W(PTR_W), .STRIDE_W(STRIDE_W), .AW(AW)) u_ptr (
    .clk, .rst_n,
    .ptr_en   (a_ptr),
    .ptr_num  (pspec.num),
    .upd_en   (pspec.upd),
    .upd_sub  (pspec.sub),
    .range_en (matctl.range_en),
    .range_id (matctl.range_id),
    .addr     (ptr_addr),
    .in_range (ptr_in_range),
    .cfg_we   (a_cfg_we & a_cfg_ptr),
    .cfg_sel  (pa.addr[2]),
    .cfg_idx  (pa.addr[1:0]),
    .cfg_wdata(pa.data[PTR_W-1:0]),
    .cfg_rdata(ptr_cfg_rdata)
  );

  assign a_addr = a_ptr ? ptr_addr : pa.addr;
  assign a_ok   = ~a_ptr | ptr_in_range;

  logic [D-1:0] a_cfg_rdata;
  always_comb begin
    a_cfg_rdata = '0;
    if (a_cfg_ptr)       a_cfg_rdata = D'(ptr_cfg_rdata);
    else if (a_cfg_pla)  a_cfg_rdata = D'(pla_cfg_rdata);
    else if (a_cfg_ctl)  a_cfg_rdata = D'(matctl);
    else if (a_cfg_imcn) a_cfg_rdata = D'(imcn_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      matctl <= '0;
      imcn_q <= '0;
    end else if (a_cfg_we) begin
      if (a_cfg_ctl)  matctl <= matctl_t'(pa.data[$bits(matctl_t)-1:0]);
      if (a_cfg_imcn) imcn_q <= imcn_cfg_t'(pa.data[$bits(imcn_cfg_t)-1:0]);
    end
  end

  // stage B registers
  logic          b_valid, b_ok;
  opcode_t       b_op;
  logic [AW-1:0] b_addr;
  logic [M:0]    b_mask;
  logic [M-1:0]  b_mdata;
  logic [D-1:0]  b_data;
  logic [D-1:0]  b_cfg_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_ok    <= 1'b0;
      b_op    <= '0;
      b_addr  <= '0;
      b_mask  <= '0;
      b_mdata <= '0;
      b_data  <= '0;
      b_cfg_rdata <= '0;
    end else begin
      b_valid <= a_valid;
      b_ok    <= a_ok;
      b_op    <= a_valid ? pa.op : '0;
      b_addr  <= a_addr;
      b_mask  <= pa.mask;
      b_mdata <= pa.mdata;
      b_data  <= pa.data;
      b_cfg_rdata <= a_cfg_rdata;
    end
  end

  // ------------------------------------------------------------------------
  // stage B: array access
  // ------------------------------------------------------------------------
  logic          cond_bit;                 // external condition, output cycle
  logic          pla_ext_bit;
  assign cond_bit    = ext_in[matctl.xcond_sel];
  assign pla_ext_bit = ext_in[matctl.pla_ext_sel];

  logic          b_live;                   // valid, in range
  logic          b_arr_use;                // uses the port-0 address this cycle
  assign b_live    = b_valid & b_ok;
  assign b_arr_use = b_live & (b_op.rd | (b_op.wr & ~b_op.xcond));

  // write buffer
  logic          wb_drain;
  logic [AW-1:0] wb_drain_addr;
  logic [D-1:0]  wb_drain_data;
  logic [M-1:0]  wb_drain_md;
  logic          wb_hit, wb_hit_pend;
  logic [D-1:0]  wb_hit_data;
  logic [M-1:0]  wb_hit_md;
  logic          wb_full;

  // array port 0
  logic [AW-1:0] p0_addr;
  logic          p0_we;
  logic [D-1:0]  p0_wdata;
  logic [M-1:0]  p0_wmd;
  logic [D-1:0]  arr_data;
  logic [M-1:0]  arr_md;

  // RMW
  logic          rmw_mod_valid, rmw_wb_en;
  logic [AW-1:0] rmw_mod_addr, rmw_wb_addr;
  logic [M-1:0]  mod_md_q;                 // meta-data read by the RMW
  logic          mod_match_q;
  logic [M-1:0]  pla_out;
  logic [M-1:0]  wbk_md_q;                 // PLA result, written back next cycle

  // current value of the word, oldest source first: array, committed write
  // buffer entry, RMW writeback in flight (read at T-2), RMW modify result
  // (read at T-1), and the conditional write resolving now (pushed at T-1).
  logic [D-1:0]  cur_data;
  logic [M-1:0]  cur_md;
  always_comb begin
    cur_data = wb_hit ? wb_hit_data : arr_data;
    cur_md   = arr_md;
    if (wb_hit && !wb_hit_pend)                  cur_md = wb_hit_md;
    if (rmw_wb_en && rmw_wb_addr == b_addr)      cur_md = wbk_md_q;
    if (rmw_mod_valid && rmw_mod_addr == b_addr) cur_md = pla_out;
    if (wb_hit && wb_hit_pend)                   cur_md = wb_hit_md;
  end

  logic icond_ok, b_exec, match_raw;
  assign icond_ok = ~b_op.icond | (((cur_md ^ b_mdata) & b_mask[M:1]) == '0);
  assign b_exec   = b_live & (b_op.gang | b_op.cfg_rd | b_op.cfg_wr | icond_ok);

  rm_comparator #(.D(D), .M(M)) u_cmp (
    .data_a(cur_data), .data_b(b_data),
    .md_a  (cur_md),   .md_b  (b_mdata),
    .mask  (b_mask),   .match (match_raw)
  );

  logic b_plain_wr, b_xcond_wr;
  assign b_plain_wr = b_exec & b_op.wr & ~b_op.xcond;
  assign b_xcond_wr = b_exec & b_op.wr &  b_op.xcond;

  always_comb begin
    p0_addr  = b_addr;
    p0_we    = b_plain_wr;
    p0_wdata = b_data;
    p0_wmd   = b_mdata;
    if (wb_drain) begin
      p0_addr  = wb_drain_addr;
      p0_we    = 1'b1;
      p0_wdata = wb_drain_data;
      // an older buffered write draining under an RMW writeback of the same
      // word: the writeback's meta-data is the newer value
      p0_wmd   = (rmw_wb_en && rmw_wb_addr == wb_drain_addr) ? wbk_md_q : wb_drain_md;
    end
  end

  // gang operations
  logic [M-1:0] gset, gclr;
  logic         cgang;
  rm_gang_io #(.M(M)) u_gang (
    .gang_en(b_exec & b_op.gang & ~b_op.icond),
    .gmask  (b_mask[M:1]),
    .gdata  (b_addr[M-1:0]),
    .gset, .gclr
  );
  assign cgang = b_exec & b_op.gang & b_op.icond;

  rm_sram_core #(.WORDS(WORDS), .D(D), .M(M), .CG_COND(1), .CG_TARGET(0)) u_sram (
    .clk,
    .p0_addr, .p0_we, .p0_wdata, .p0_wmd,
    .p0_rdata(arr_data),
    .rmd_addr(b_addr), .rmd(arr_md),
    .p1_we  (rmw_wb_en), .p1_addr(rmw_wb_addr), .p1_wmd(wbk_md_q),
    .gset, .gclr, .cgang
  );

  // output-cycle registers (declared here: the write buffer resolves from them)
  logic         o_valid, o_match, o_complete, o_xcond, o_xcond_wr;
  logic [D-1:0] o_data;
  logic [M-1:0] o_md;

  rm_write_buffer #(.DEPTH(2), .AW(AW), .D(D), .M(M), .CG_COND(1), .CG_TARGET(0)) u_wb (
    .clk, .rst_n,
    .push      (b_xcond_wr),
    .push_addr (b_addr),
    .push_data (b_data),
    .push_md   (b_mdata),
    .resolve   (o_xcond_wr),
    .cond      (cond_bit),
    .drain_ok  (~b_arr_use & ~(b_live & b_op.gang)),
    .drain     (wb_drain),
    .drain_addr(wb_drain_addr),
    .drain_data(wb_drain_data),
    .drain_md  (wb_drain_md),
    .srch_addr (b_addr),
    .hit       (wb_hit),
    .hit_data  (wb_hit_data),
    .hit_md    (wb_hit_md),
    .hit_pend  (wb_hit_pend),
    .kill_en   (b_plain_wr),
    .kill_addr (b_addr),
    .md_we     (rmw_wb_en),
    .md_addr   (rmw_wb_addr),
    .md_wdata  (wbk_md_q),
    .gset, .gclr, .cgang,
    .full      (wb_full)
  );

  rm_rmw_decoder #(.AW(AW), .SLOTS(3)) u_rmw (
    .clk, .rst_n,
    .rd_rmw   (b_exec & b_op.rd & b_op.rmw),
    .rd_addr  (b_addr),
    .wr_en    (b_plain_wr),
    .wr_addr  (b_addr),
    .mod_valid(rmw_mod_valid),
    .mod_addr (rmw_mod_addr),
    .wb_en    (rmw_wb_en),
    .wb_addr  (rmw_wb_addr)
  );

  rm_pla #(.TERMS(PLA_TERMS), .NIN(PLA_NIN), .NOUT(PLA_NOUT)) u_pla (
    .clk, .rst_n,
    .in       ({pla_ext_bit, mod_match_q, mod_md_q}),
    .out      (pla_out),
    .lwl      (),
    .cfg_we   (a_cfg_we & a_cfg_pla),
    .cfg_row  (pa.addr[3:0]),
    .cfg_wdata(pa.data[PLA_ROW_W-1:0]),
    .cfg_rdata(pla_cfg_rdata)
  );

  // a gang operation in the modify cycle also applies to the value about to be
  // written back, so the writeback does not undo it
  function automatic logic [M-1:0] gang_md(logic [M-1:0] v);
    v = (v | gset) & ~gclr;
    if (cgang && v[1]) v[0] = 1'b0;
    return v;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mod_md_q    <= '0;
      mod_match_q <= 1'b0;
      wbk_md_q    <= '0;
    end else begin
      mod_md_q    <= cur_md;
      mod_match_q <= b_op.cmp & match_raw;
      wbk_md_q    <= gang_md(pla_out);
    end
  end

  // ------------------------------------------------------------------------
  // output registers and external-condition gating
  // ------------------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      o_valid    <= 1'b0;
      o_match    <= 1'b0;
      o_complete <= 1'b0;
      o_xcond    <= 1'b0;
      o_xcond_wr <= 1'b0;
      o_data     <= '0;
      o_md       <= '0;
    end else begin
      o_valid    <= b_exec & ((b_op.rd & (~b_op.cmp | match_raw)) | b_op.cfg_rd);
      o_match    <= b_exec & b_op.rd & b_op.cmp & match_raw;
      o_complete <= b_exec;
      o_xcond    <= b_exec & b_op.xcond & (b_op.rd | b_op.wr);
      o_xcond_wr <= b_xcond_wr;
      o_data     <= (b_exec & b_op.rd) ? cur_data : (b_exec & b_op.cfg_rd) ? b_cfg_rdata : '0;
      o_md       <= (b_exec & b_op.rd) ? cur_md : '0;
    end
  end

  logic gate;
  assign gate = ~o_xcond | cond_bit;
  always_comb begin
    rep.data     = o_data;
    rep.mdata    = o_md;
    rep.valid    = o_valid & gate;
    rep.match    = o_match & gate;
    rep.complete = o_complete & gate;
  end

  // ext_out sources come from the registered, ungated outputs so that no
  // combinational path runs from ext_in back to ext_out.
  always_comb begin
    for (int i = 0; i < E; i++) begin
      unique case (matctl.xo_sel[i])
        XO_NONE:     ext_out[i] = 1'b0;
        XO_MATCH:    ext_out[i] = o_match;
        XO_VALID:    ext_out[i] = o_valid;
        XO_COMPLETE: ext_out[i] = o_complete;
        default:     ext_out[i] = o_md[matctl.xo_sel[i][1:0]];
      endcase
    end
  end

  // exactly one base operation per valid request
  assert property (@(posedge clk) disable iff (!rst_n)
    req.valid |-> $onehot({req.p.op.rd, req.p.op.wr, req.p.op.gang, req.p.op.cfg_rd, req.p.op.cfg_wr}));
  assert property (@(posedge clk) disable iff (!rst_n) !(b_xcond_wr && wb_full))
    else $error("rm_mat: write buffer full");
endmodule
