// ft_pipeline: the in-order taint-propagation pipeline.
//
// Instructions arrive in program order, decoded and no longer speculative,
// once the core would otherwise commit them. They come in bundles of up to
// NLANES. Each bundle passes four stages, as in the published design:
//   S1  pre-commit: read the source-register taints from the TRF and the
//       opcode's Filter TPT entry, and for loads and stores read the
//       memory-word taint from the TL1. A TL1 miss holds the bundle here
//       until the line is filled.
//   S2  second lookup stage. It holds what S1 read; the lookups in this RTL
//       answer in one cycle, so S2 is where a two-cycle TL1/TRF access
//       would finish.
//   S3  propagation. For each lane, in order, the Filter TPT entry and the
//       number of non-zero source taints pick a rule. If all taints are
//       zero, the result is zero; if exactly one is non-zero, it is
//       copied; otherwise the single-ported TPC is looked up with {opcode,
//       src1, src2, memory taint}. A trivial result is forwarded in the
//       same cycle to younger lanes. A TPC result is not: a lane that needs
//       it, and every lane after, waits one cycle. So does any second lane
//       that needs the TPC in the same cycle. A TPC miss stalls the stage
//       and raises tpc_miss with the key and the handler address. The
//       software handler computes the entry, writes it through the fill
//       port, and the lookup is retried. Register results are written to
//       the TRF here.
//   S4  commit. A store's new taint is compared with the old taint it read
//       in S1. An equal (silent) taint is not written. A non-silent taint is
//       written only if both the TL1 and the data L1 (st_dl1_hit) hit. If
//       either misses, neither cache is written and the store retries. This
//       keeps the data write and its taint write atomic. If a coherence
//       invalidation removed a TL1 line while the store was in flight, the
//       old taint it read may be out of date, so the store then writes its
//       taint as if it were not silent.
// Taint size 0 (FTCR) switches the engine off. Bundles then skip S1-S3,
// carry zero taints and use neither the TL1 nor the TPC.
//
// Hazards. S3 writes to the TRF are also written into the source taints held
// in S2 and S3, and S1's TRF reads see same-cycle writes. Store commits are
// likewise written into the memory taints held in S1-S3. A load in S3 takes
// its memory taint from the youngest older store with the same word
// address: first in its own bundle, then in S4, and otherwise the
// (updated) value it read.
//
// This design's own choices: at most NRD memory instructions per bundle
// (asserted); one store commits per cycle; filter code 11 acts as 00; on an
// exception bit, the lane commits and cm_exc is flagged, leaving the trap
// to the core; the engine-off path; the valid/ready input handshake.
module ft_pipeline
  import ft_pkg::*;
#(
  parameter int unsigned W   = NLANES,  // lanes per bundle
  parameter int unsigned NRD = 2        // TL1 read ports = memory ops per bundle
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration
  input  logic [TSIZE_W-1:0] tsize,
  input  addr_t              mtbr,
  input  addr_t              tpchr,
  input  logic               tpc_flash_clr,
  input  logic               filt_wr_en,
  input  opc_t               filt_wr_opc,
  input  filter_e            filt_wr_entry,
  input  opc_t               filt_rd_opc,
  output filter_e            filt_rd_entry,
  output logic               idle,
  // instructions from the core
  input  logic               in_valid,
  output logic               in_ready,
  input  ft_instr_t [W-1:0]  in_bundle,
  // TL1 lookups (S1)
  output logic [NRD-1:0]      tl1_rd_valid,
  output addr_t [NRD-1:0]     tl1_rd_addr,
  output logic [NRD-1:0][2:0] tl1_rd_bit,
  input  logic [NRD-1:0]      tl1_rd_hit,
  input  taint_t [NRD-1:0]    tl1_rd_data,
  // TL1 write (S4)
  output logic               tl1_wr_valid,
  output logic               tl1_wr_en,
  output addr_t              tl1_wr_addr,
  output logic [2:0]         tl1_wr_bit,
  output taint_t             tl1_wr_mask,
  output taint_t             tl1_wr_data,
  input  logic               tl1_wr_hit,
  input  logic               tl1_inv,      // a coherence invalidation removed a line
  // TPC miss handler
  output logic               tpc_miss,
  output tpc_key_t           tpc_miss_key,
  output addr_t              tpc_handler,
  input  logic               tpc_fill_en,
  input  tpc_key_t           tpc_fill_key,
  input  taint_t             tpc_fill_taint,
  input  logic               tpc_fill_exc,
  // load taint read (ends the load's replay window)
  output logic [W-1:0]       ld_taint_read,
  output logic [W-1:0][TAG_W-1:0] ld_taint_tag,
  // data L1 store handshake (S4)
  output logic               st_valid,
  output addr_t              st_addr,
  input  logic               st_dl1_hit,
  output logic               st_dl1_we,
  // commit
  output logic [W-1:0]       cm_valid,
  output logic [W-1:0][TAG_W-1:0] cm_tag,
  output taint_t [W-1:0]     cm_taint,
  output logic [W-1:0]       cm_exc,
  output ft_events_t         events
);
  localparam int unsigned LW = (W > 1) ? $clog2(W) : 1;

  logic   en;
  taint_t msk;
  assign en  = tsize != '0;
  assign msk = taint_mask(tsize);

  function automatic logic same_word(input addr_t a, input addr_t b);
    return a[ADDR_W-1:2] == b[ADDR_W-1:2];
  endfunction

  // ================================================================ state
  logic s1_v, s2_v, s3_v, s4_v;
  ft_instr_t [W-1:0] s1_q, s2_q, s3_q, s4_q;
  taint_t    [W-1:0] s2_t1, s2_t2, s2_tm, s3_t1, s3_t2, s3_tm;
  filter_e   [W-1:0] s2_flt, s3_flt;
  logic      [W-1:0] s3_done, s3_exc, s4_done, s4_exc;
  taint_t    [W-1:0] s3_res, s3_old, s4_res, s4_old;
  logic              s2_ook, s3_ook, s4_ook;   // old store taints still current

  logic s1_adv, s2_adv, s3_adv, s4_adv, s4_load;

  // ================================================================ S3 -> TRF writes
  logic   [W-1:0]             trf_we;
  reg_t   [W-1:0]             trf_widx;
  taint_t [W-1:0]             trf_wdata;

  // ================================================================ S4 store commit (patch source)
  logic   cm_st;          // a store commits this cycle
  addr_t  cm_st_addr;
  taint_t cm_st_taint;

  // ================================================================ S1
  logic [2*W-1:0][REG_W-1:0] trf_ridx;
  taint_t [2*W-1:0]          trf_rdata;
  logic [W:0][OPC_W-1:0]     flt_ropc;
  filter_e [W:0]             flt_rentry;

  taint_regfile #(.NREGS(NREGS), .W(MAXT), .NRD(2*W), .NWR(W)) u_trf (
    .clk, .rst_n,
    .rd_idx(trf_ridx), .rd_data(trf_rdata),
    .wr_en(trf_we), .wr_idx(trf_widx), .wr_data(trf_wdata)
  );

  filter_tpt #(.NOPC(1 << OPC_W), .NRD(W+1)) u_flt (
    .clk, .rst_n,
    .rd_opc(flt_ropc), .rd_entry(flt_rentry),
    .wr_en(filt_wr_en), .wr_opc(filt_wr_opc), .wr_entry(filt_wr_entry)
  );
  assign filt_rd_entry = flt_rentry[W];

  addr_t [W-1:0]      s1_taddr;
  logic  [W-1:0][2:0] s1_tbit;
  for (genvar l = 0; l < W; l++) begin : g_idx
    taint_index u_idx (
      .data_addr(s1_q[l].addr), .mtbr, .tsize,
      .taint_addr(s1_taddr[l]), .taint_bit(s1_tbit[l])
    );
  end

  // memory lanes to TL1 ports, in lane order
  logic [W-1:0]           s1_mem;
  logic [W-1:0][LW-1:0]   s1_port;   // port used by each memory lane
  logic                   s1_mem_ok;
  taint_t [W-1:0]         s1_tm;
  always_comb begin
    int unsigned n;
    n            = 0;
    tl1_rd_valid = '0;
    tl1_rd_addr  = '0;
    tl1_rd_bit   = '0;
    s1_port      = '0;
    for (int unsigned l = 0; l < W; l++) begin
      s1_mem[l] = s1_v && s1_q[l].valid && (s1_q[l].mem_rd || s1_q[l].mem_wr);
      if (s1_mem[l] && n < NRD) begin
        tl1_rd_valid[n] = 1'b1;
        tl1_rd_addr[n]  = s1_taddr[l];
        tl1_rd_bit[n]   = s1_tbit[l];
        s1_port[l]      = LW'(n);
        n++;
      end
    end
  end

  always_comb begin
    s1_mem_ok = 1'b1;
    for (int unsigned p = 0; p < NRD; p++)
      if (tl1_rd_valid[p] && !tl1_rd_hit[p]) s1_mem_ok = 1'b0;
    for (int unsigned l = 0; l < W; l++) begin
      s1_tm[l] = s1_mem[l] ? (tl1_rd_data[s1_port[l]] & msk) : '0;
      if (cm_st && s1_mem[l] && same_word(cm_st_addr, s1_q[l].addr))
        s1_tm[l] = cm_st_taint;
    end
  end

  always_comb begin
    for (int unsigned l = 0; l < W; l++) begin
      trf_ridx[2*l]   = s1_q[l].rs1;
      trf_ridx[2*l+1] = s1_q[l].rs2;
      flt_ropc[l]     = s1_q[l].opc;
    end
    flt_ropc[W] = filt_rd_opc;
  end

  always_comb
    for (int unsigned l = 0; l < W; l++) begin
      ld_taint_read[l] = s1_adv && s1_q[l].valid && s1_q[l].mem_rd;
      ld_taint_tag[l]  = s1_q[l].tag;
    end

  // ================================================================ S2 (updated holding values)
  taint_t [W-1:0] s2_t1_n, s2_t2_n, s2_tm_n;

  function automatic taint_t reg_patch(input taint_t cur, input reg_t r,
                                       input logic [W-1:0] we, input reg_t [W-1:0] wi,
                                       input taint_t [W-1:0] wd);
    taint_t t;
    t = cur;
    for (int unsigned k = 0; k < W; k++)
      if (we[k] && wi[k] == r && r != '0) t = wd[k];
    return t;
  endfunction

  always_comb
    for (int unsigned l = 0; l < W; l++) begin
      s2_t1_n[l] = reg_patch(s2_t1[l], s2_q[l].rs1, trf_we, trf_widx, trf_wdata);
      s2_t2_n[l] = reg_patch(s2_t2[l], s2_q[l].rs2, trf_we, trf_widx, trf_wdata);
      s2_tm_n[l] = s2_tm[l];
      if (cm_st && (s2_q[l].mem_rd || s2_q[l].mem_wr) && same_word(cm_st_addr, s2_q[l].addr))
        s2_tm_n[l] = cm_st_taint;
    end

  // ================================================================ S3 propagation
  // pass 1: sources, rule and trivial results, assuming every older lane
  // that is not TPC-bound resolves this cycle; find the first TPC lane.
  taint_t [W-1:0] p_t1, p_t2, p_tm, p_cur, p_res;
  logic   [W-1:0] p_tpc, p_dep, p_rfwd, p_mfwd;
  logic           c_found;
  logic [LW-1:0]  c_lane;

  always_comb begin
    taint_t [W-1:0] lres;   // local copies, read for older lanes
    logic   [W-1:0] ltpc;
    lres    = '0;
    ltpc    = '0;
    c_found = 1'b0;
    c_lane  = '0;
    for (int unsigned l = 0; l < W; l++) begin
      logic [1:0] nz;
      int         wr1, wr2, wrm;
      p_dep[l]  = 1'b0;
      p_rfwd[l] = 1'b0;
      p_mfwd[l] = 1'b0;
      // youngest older writer in this bundle
      wr1 = -1; wr2 = -1; wrm = -1;
      for (int unsigned k = 0; k < l; k++) begin
        if (s3_q[k].valid && s3_q[k].rd_en && s3_q[k].rd != '0) begin
          if (s3_q[k].rd == s3_q[l].rs1) wr1 = int'(k);
          if (s3_q[k].rd == s3_q[l].rs2) wr2 = int'(k);
        end
        if (s3_q[k].valid && s3_q[k].mem_wr && same_word(s3_q[k].addr, s3_q[l].addr))
          wrm = int'(k);
      end
      // register sources: done older lanes are already in the held value
      p_t1[l] = s3_t1[l];
      p_t2[l] = s3_t2[l];
      if (wr1 >= 0 && !s3_done[wr1]) begin
        if (ltpc[wr1]) p_dep[l] = 1'b1;
        p_t1[l] = lres[wr1];
        p_rfwd[l] = 1'b1;
      end
      if (wr2 >= 0 && !s3_done[wr2]) begin
        if (ltpc[wr2]) p_dep[l] = 1'b1;
        p_t2[l] = lres[wr2];
        p_rfwd[l] = 1'b1;
      end
      if (!s3_q[l].rs1_en) p_t1[l] = '0;
      if (!s3_q[l].rs2_en) p_t2[l] = '0;
      // memory: older store in this bundle, else in S4, else held value
      p_cur[l] = s3_tm[l];
      if (s3_q[l].mem_rd || s3_q[l].mem_wr) begin
        if (wrm >= 0) begin
          p_mfwd[l] = 1'b1;
          if (s3_done[wrm]) p_cur[l] = s3_res[wrm];
          else begin
            if (ltpc[wrm]) p_dep[l] = 1'b1;
            p_cur[l] = lres[wrm];
          end
        end else if (s4_v) begin
          for (int unsigned k = 0; k < W; k++)
            if (s4_q[k].valid && !s4_done[k] && s4_q[k].mem_wr &&
                same_word(s4_q[k].addr, s3_q[l].addr)) begin
              p_cur[l]  = s4_res[k];
              p_mfwd[l] = 1'b1;
            end
        end
      end
      p_tm[l] = s3_q[l].mem_rd ? p_cur[l] : '0;
      p_t1[l] &= msk;
      p_t2[l] &= msk;
      p_tm[l] &= msk;
      // rule selection
      nz = 2'(p_t1[l] != '0) + 2'(p_t2[l] != '0) + 2'(p_tm[l] != '0);
      p_tpc[l] = 1'b0;
      p_res[l] = '0;
      if (!en) p_res[l] = '0;
      else if (nz == 2'd0 && (s3_flt[l] == FLT_ZERO || s3_flt[l] == FLT_ONECOPY))
        p_res[l] = '0;
      else if (nz == 2'd1 && s3_flt[l] == FLT_ONECOPY)
        p_res[l] = p_t1[l] | p_t2[l] | p_tm[l];
      else
        p_tpc[l] = 1'b1;
      lres[l] = p_res[l];
      ltpc[l] = p_tpc[l];
      if (s3_v && s3_q[l].valid && !s3_done[l] && p_tpc[l] && !c_found) begin
        c_found = 1'b1;
        c_lane  = LW'(l);
      end
    end
  end

  // TPC: single lookup port, used by the first lane that needs it
  logic   lk_hit, lk_exc;
  taint_t lk_taint;
  tpc_key_t c_key;
  assign c_key = {s3_q[c_lane].opc, p_t1[c_lane], p_t2[c_lane], p_tm[c_lane]};

  tpc #(.ENTRIES(1 << TPC_IDX_W)) u_tpc (
    .clk, .rst_n, .flash_clr(tpc_flash_clr),
    .lk_key(c_key), .lk_hit, .lk_taint, .lk_exc,
    .fill_en(tpc_fill_en), .fill_key(tpc_fill_key),
    .fill_taint(tpc_fill_taint), .fill_exc(tpc_fill_exc)
  );

  // pass 2: which lanes resolve this cycle
  logic   [W-1:0] proc;
  taint_t [W-1:0] res;
  logic   [W-1:0] res_exc;
  logic           s3_dep_stall;
  always_comb begin
    logic stop;
    stop         = 1'b0;
    proc         = '0;
    res          = p_res;
    res_exc      = '0;
    s3_dep_stall = 1'b0;
    for (int unsigned l = 0; l < W; l++) begin
      if (s3_v && s3_q[l].valid && !s3_done[l] && !stop) begin
        if (c_found && LW'(l) == c_lane) begin
          if (lk_hit) begin
            proc[l]    = 1'b1;
            res[l]     = lk_taint & msk;
            res_exc[l] = lk_exc;
          end else stop = 1'b1;
        end else if (p_tpc[l] || p_dep[l]) begin
          stop         = 1'b1;
          s3_dep_stall = 1'b1;
        end else proc[l] = 1'b1;
      end
    end
  end

  assign tpc_miss     = s3_v && c_found && !lk_hit;
  assign tpc_miss_key = c_key;
  assign tpc_handler  = tpchr;

  always_comb
    for (int unsigned l = 0; l < W; l++) begin
      trf_we[l]    = proc[l] && s3_q[l].rd_en;
      trf_widx[l]  = s3_q[l].rd;
      trf_wdata[l] = res[l];
    end

  logic [W-1:0] s3_done_n;
  assign s3_done_n = s3_done | proc;
  logic s3_complete;
  always_comb begin
    s3_complete = 1'b1;
    for (int unsigned l = 0; l < W; l++)
      if (s3_q[l].valid && !s3_done_n[l]) s3_complete = 1'b0;
  end

  // ================================================================ S4 commit
  logic [W-1:0] cm_now;
  logic [LW-1:0] st_lane;
  logic          st_sel, st_silent, st_ok;
  always_comb begin
    st_sel  = 1'b0;
    st_lane = '0;
    for (int unsigned l = 0; l < W; l++)
      if (!st_sel && s4_v && s4_q[l].valid && !s4_done[l] && s4_q[l].mem_wr) begin
        st_sel  = 1'b1;
        st_lane = LW'(l);
      end
  end

  always_comb begin
    logic stop;
    // with the engine off no taint is written at all
    st_silent = !en || (s4_ook && (s4_res[st_lane] & msk) == (s4_old[st_lane] & msk));
    st_ok     = (st_silent || tl1_wr_hit) && (!s4_q[st_lane].data_wr || st_dl1_hit);
    stop   = 1'b0;
    cm_now = '0;
    for (int unsigned l = 0; l < W; l++)
      if (s4_v && s4_q[l].valid && !s4_done[l] && !stop) begin
        if (s4_q[l].mem_wr) begin
          // only the first store may go this cycle
          if (LW'(l) == st_lane && st_ok) cm_now[l] = 1'b1;
          else stop = 1'b1;
        end else cm_now[l] = 1'b1;
      end
  end

  addr_t      st_taddr;
  logic [2:0] st_tbit;
  taint_index u_st_idx (
    .data_addr(s4_q[st_lane].addr), .mtbr, .tsize,
    .taint_addr(st_taddr), .taint_bit(st_tbit)
  );

  assign tl1_wr_valid = st_sel && en && !st_silent;
  assign tl1_wr_en    = cm_now[st_lane] && st_sel && !st_silent;
  assign tl1_wr_addr  = st_taddr;
  assign tl1_wr_bit   = st_tbit;
  assign tl1_wr_mask  = msk;
  assign tl1_wr_data  = s4_res[st_lane];
  assign st_valid     = st_sel && s4_q[st_lane].data_wr;
  assign st_addr      = s4_q[st_lane].addr;
  assign st_dl1_we    = st_valid && cm_now[st_lane];

  assign cm_st       = st_sel && cm_now[st_lane];
  assign cm_st_addr  = s4_q[st_lane].addr;
  assign cm_st_taint = s4_res[st_lane] & msk;

  always_comb
    for (int unsigned l = 0; l < W; l++) begin
      cm_valid[l] = cm_now[l];
      cm_tag[l]   = s4_q[l].tag;
      cm_taint[l] = s4_res[l];
      cm_exc[l]   = cm_now[l] && s4_exc[l];
    end

  logic s4_complete;
  always_comb begin
    s4_complete = 1'b1;
    for (int unsigned l = 0; l < W; l++)
      if (s4_q[l].valid && !(s4_done[l] || cm_now[l])) s4_complete = 1'b0;
  end

  // ================================================================ flow
  assign s4_adv = s4_v && s4_complete;
  assign s3_adv = s3_v && s3_complete && (!s4_v || s4_adv);
  assign s2_adv = s2_v && (!s3_v || s3_adv);
  assign s1_adv = s1_v && s1_mem_ok && (!s2_v || s2_adv);
  // engine off: bundles go straight to commit
  assign s4_load  = en ? s3_adv : (in_valid && in_ready);
  assign in_ready = en ? (!s1_v || s1_adv) : (!s4_v || s4_adv);
  assign idle     = !s1_v && !s2_v && !s3_v && !s4_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0; s2_v <= 1'b0; s3_v <= 1'b0; s4_v <= 1'b0;
      s1_q <= '0; s2_q <= '0; s3_q <= '0; s4_q <= '0;
      s2_t1 <= '0; s2_t2 <= '0; s2_tm <= '0; s2_flt <= '{default: FLT_TPC};
      s3_t1 <= '0; s3_t2 <= '0; s3_tm <= '0; s3_flt <= '{default: FLT_TPC};
      s3_done <= '0; s3_exc <= '0; s3_res <= '0; s3_old <= '0;
      s4_done <= '0; s4_exc <= '0; s4_res <= '0; s4_old <= '0;
      s2_ook <= 1'b0; s3_ook <= 1'b0; s4_ook <= 1'b0;
    end else begin
      // an invalidated taint line may come back changed by another core:
      // the old taints read so far are no longer trusted for silent stores
      s2_ook <= (s1_adv ? 1'b1 : s2_ook) && !tl1_inv;
      s3_ook <= (s2_adv ? s2_ook : s3_ook) && !tl1_inv;
      s4_ook <= (s4_load ? (en && s3_ook) : s4_ook) && !tl1_inv;
      // S1
      if (en && in_valid && in_ready) begin
        s1_v <= 1'b1;
        s1_q <= in_bundle;
      end else if (s1_adv) s1_v <= 1'b0;
      // S2
      if (s1_adv) begin
        s2_v <= 1'b1;
        s2_q <= s1_q;
        for (int unsigned l = 0; l < W; l++) begin
          s2_t1[l]  <= trf_rdata[2*l];
          s2_t2[l]  <= trf_rdata[2*l+1];
          s2_tm[l]  <= s1_tm[l];
          s2_flt[l] <= flt_rentry[l];
        end
      end else begin
        if (s2_adv) s2_v <= 1'b0;
        s2_t1 <= s2_t1_n;
        s2_t2 <= s2_t2_n;
        s2_tm <= s2_tm_n;
      end
      // S3
      if (s2_adv) begin
        s3_v    <= 1'b1;
        s3_q    <= s2_q;
        s3_t1   <= s2_t1_n;
        s3_t2   <= s2_t2_n;
        s3_tm   <= s2_tm_n;
        s3_flt  <= s2_flt;
        s3_done <= '0;
        s3_exc  <= '0;
      end else begin
        if (s3_adv) s3_v <= 1'b0;
        s3_done <= s3_done_n;
        for (int unsigned l = 0; l < W; l++) begin
          if (proc[l]) begin
            s3_res[l] <= res[l];
            s3_exc[l] <= res_exc[l];
            s3_old[l] <= p_cur[l] & msk;
          end
          s3_t1[l] <= reg_patch(s3_t1[l], s3_q[l].rs1, trf_we, trf_widx, trf_wdata);
          s3_t2[l] <= reg_patch(s3_t2[l], s3_q[l].rs2, trf_we, trf_widx, trf_wdata);
          if (cm_st && (s3_q[l].mem_rd || s3_q[l].mem_wr) &&
              same_word(cm_st_addr, s3_q[l].addr))
            s3_tm[l] <= cm_st_taint;
        end
      end
      // S4
      if (s4_load) begin
        s4_v    <= 1'b1;
        s4_done <= '0;
        if (en) begin
          s4_q <= s3_q;
          for (int unsigned l = 0; l < W; l++) begin
            s4_res[l] <= proc[l] ? res[l] : s3_res[l];
            s4_exc[l] <= proc[l] ? res_exc[l] : s3_exc[l];
            s4_old[l] <= proc[l] ? (p_cur[l] & msk) : s3_old[l];
          end
        end else begin
          s4_q   <= in_bundle;
          s4_res <= '0;
          s4_exc <= '0;
          s4_old <= '0;
        end
      end else begin
        if (s4_adv) s4_v <= 1'b0;
        s4_done <= s4_done | cm_now;
      end
    end
  end

  // ================================================================ events
  always_comb begin
    events = '0;
    for (int unsigned l = 0; l < W; l++) begin
      if (proc[l] && !(c_found && LW'(l) == c_lane)) begin
        if (res[l] == '0 && (p_t1[l] | p_t2[l] | p_tm[l]) == '0)
          events.flt_zero += 3'd1;
        else events.flt_copy += 3'd1;
        if (p_rfwd[l]) events.reg_fwd += 3'd1;
      end
      if (proc[l] && p_mfwd[l]) events.mem_fwd += 3'd1;
    end
    events.tpc_hit   = 3'(s3_v && c_found && lk_hit);
    events.tpc_miss  = tpc_miss;
    events.tl1_inv   = tl1_inv;
    events.dep_stall = s3_dep_stall;
    events.tl1_stall = s1_v && !s1_mem_ok;
    events.st_silent = cm_st && st_silent;
    events.st_write  = cm_st && !st_silent;
    events.st_retry  = st_sel && !st_ok;
  end

  // ================================================================ rules
  // the core never sends more memory instructions in a bundle than there
  // are TL1 read ports
  function automatic int unsigned mem_ops(input ft_instr_t [W-1:0] b);
    int unsigned n;
    n = 0;
    for (int unsigned l = 0; l < W; l++)
      if (b[l].valid && (b[l].mem_rd || b[l].mem_wr)) n++;
    return n;
  endfunction
  a_mem_per_bundle: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && en) |-> mem_ops(in_bundle) <= NRD);
  // a bundle offered to the engine is held until it is taken
  a_in_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && !in_ready) |=> in_valid && $stable(in_bundle));
endmodule
