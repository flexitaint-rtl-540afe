// tb_flexitaint: end-to-end test of the taint engine at its default sizes.
//
// The test programs the engine with a two-bit policy (POL_BOTH in
// ft_tb_policy_pkg). The left bit is input tainting and the right bit is
// heap-pointer tracking. The Filter TPT entries are the ones this policy
// allows: 10 for ALU ops, 01 for loads, stores and jumps, 00 for
// taintm0/taintr0.
//
// A random program of bundles (up to four instructions, at most two memory
// operations) runs through the engine, and an in-order reference model
// works out every result taint and exception bit as it is generated.
// Commits are compared with the model in order. The core side is modelled
// here: a software TPC miss handler that answers after a random delay, a
// data L1 that misses a store now and then, taint prefetches issued ahead of
// the bundles, an L2 that serves TL1 lines with a random latency, and other
// cores that now and then invalidate a taint line.
//
// The program runs in phases: the policy with 2-bit taints; the engine off
// (taint size 0), where commits must carry zero taints and no state may
// change; the engine on again after a handler-register write, which
// flash-clears the TPC. The test counts every mechanism (filter rules,
// TPC hits and misses, same-cycle forwards, dependence stalls, TL1 stalls
// and fills, silent and non-silent store taints, atomic store retries,
// taint exceptions, TL1 invalidations, mode switches, flash clear, a refused user-mode write)
// and fails if any never happened. It also checks the four-cycle latency of
// an isolated instruction.
module tb_flexitaint;
  import ft_pkg::*;
  import ft_tb_policy_pkg::*;

  localparam int unsigned LB = 512;
  localparam addr_t MTBR_V = 32'h8000_0000, HANDLER = 32'h0040_2000;

  logic clk = 0, rst_n = 0;
  logic cfg_valid, cfg_ready, cfg_we, cfg_kernel, cfg_err;
  cfg_sel_e cfg_sel;
  opc_t cfg_opc;
  addr_t cfg_wdata, cfg_rdata;
  logic in_valid, in_ready;
  ft_instr_t [NLANES-1:0] in_bundle;
  logic pf_valid;
  addr_t pf_addr;
  logic tpc_miss, tpc_fill_en, tpc_fill_exc;
  tpc_key_t tpc_miss_key, tpc_fill_key;
  addr_t tpc_handler;
  taint_t tpc_fill_taint;
  logic [NLANES-1:0] ld_taint_read;
  logic [NLANES-1:0][TAG_W-1:0] ld_taint_tag;
  logic st_valid, st_dl1_hit, st_dl1_we;
  addr_t st_addr;
  logic [NLANES-1:0] cm_valid, cm_exc;
  logic [NLANES-1:0][TAG_W-1:0] cm_tag;
  taint_t [NLANES-1:0] cm_taint;
  ft_events_t events;
  logic inv_valid, inv_ready;
  addr_t inv_addr;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid, tl1_busy;
  addr_t mem_req_addr;
  logic [LB-1:0] mem_req_wdata, mem_resp_data;

  flexitaint dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference model
  taint_t ref_r [NREGS];
  taint_t ref_m [addr_t];           // keyed by word address
  logic   engine_on;
  taint_t msk;
  typedef struct packed { logic [TAG_W-1:0] tag; taint_t t; logic e; } exp_t;
  exp_t exp_q[$];

  function automatic taint_t mem_t(input addr_t a);
    addr_t w;
    w = {a[31:2], 2'b00};
    return ref_m.exists(w) ? ref_m[w] : '0;
  endfunction

  function automatic void ref_exec(input ft_instr_t i);
    taint_t t1, t2, tm, res;
    logic e;
    int nz;
    filter_e f;
    logic [16:0] p;
    if (!engine_on) begin
      exp_q.push_back('{tag: i.tag, t: '0, e: 1'b0});
      return;
    end
    t1 = i.rs1_en ? ref_r[i.rs1] & msk : '0;
    t2 = i.rs2_en ? ref_r[i.rs2] & msk : '0;
    tm = i.mem_rd ? mem_t(i.addr) & msk : '0;
    nz = int'(t1 != 0) + int'(t2 != 0) + int'(tm != 0);
    f  = filt_of(POL_BOTH, i.opc);
    e  = 1'b0;
    if (nz == 0 && (f == FLT_ZERO || f == FLT_ONECOPY)) res = '0;
    else if (nz == 1 && f == FLT_ONECOPY) res = t1 | t2 | tm;
    else begin
      p = policy(POL_BOTH, i.opc, t1, t2, tm);
      res = p[15:0] & msk;
      e = p[16];
    end
    if (i.rd_en && i.rd != 0) ref_r[i.rd] = res;
    if (i.mem_wr) ref_m[{i.addr[31:2], 2'b00}] = res;
    exp_q.push_back('{tag: i.tag, t: res, e: e});
  endfunction

  // ------------------------------------------------------------ program generator
  logic [TAG_W-1:0] next_tag = '0;
  addr_t hot [24];

  function automatic addr_t rnd_data_addr();
    int k;
    k = $urandom_range(0, 99);
    if (k < 85) return hot[$urandom_range(0, 23)];
    return 32'h1000_0000 + ($urandom_range(0, 65535) << 2);   // 256 KB: TL1 misses
  endfunction

  function automatic ft_instr_t gen_instr(input bit allow_mem);
    ft_instr_t i;
    int k;
    i = '0;
    i.valid = 1'b1;
    i.tag   = next_tag;
    next_tag++;
    i.rs1 = reg_t'($urandom_range(0, 6));
    i.rs2 = reg_t'($urandom_range(0, 6));
    i.rd  = reg_t'($urandom_range(1, 6));
    k = allow_mem ? $urandom_range(0, 99) : $urandom_range(0, 59);
    if (k < 22)      begin i.opc = OP_ADD; i.rs1_en = 1; i.rs2_en = 1; i.rd_en = 1; end
    else if (k < 34) begin i.opc = OP_SUB; i.rs1_en = 1; i.rs2_en = 1; i.rd_en = 1; end
    else if (k < 46) begin i.opc = OP_AND; i.rs1_en = 1; i.rs2_en = 1; i.rd_en = 1; end
    else if (k < 51) begin i.opc = OP_TAINTR0; i.rd_en = 1; end
    else if (k < 60) begin i.opc = OP_JR; i.rs1_en = 1; end
    else if (k < 78) begin i.opc = OP_LW; i.rs1_en = 1; i.rd_en = 1; i.mem_rd = 1; end
    else if (k < 95) begin i.opc = OP_SW; i.rs1_en = 1; i.rs2_en = 1; i.mem_wr = 1; i.data_wr = 1; end
    else             begin i.opc = OP_TAINTM0; i.rs1_en = 1; i.mem_wr = 1; end
    if (i.mem_rd || i.mem_wr) i.addr = rnd_data_addr();
    return i;
  endfunction

  function automatic bundle_t gen_bundle();
    bundle_t b;
    int n, nmem;
    b = '0;
    n = $urandom_range(1, NLANES);
    nmem = 0;
    for (int l = 0; l < n; l++) begin
      b[l] = gen_instr(nmem < 2);
      if (b[l].mem_rd || b[l].mem_wr) nmem++;
    end
    return b;
  endfunction

  // ------------------------------------------------------------ event counters
  int c_zero = 0, c_copy = 0, c_tpc_hit = 0, c_handler = 0, c_rfwd = 0, c_mfwd = 0;
  int c_dep = 0, c_tl1 = 0, c_silent = 0, c_write = 0, c_retry = 0, c_exc = 0;
  int c_fill = 0, c_wb = 0, c_off = 0, c_flash_miss = 0, c_ldread = 0, c_committed = 0;
  int c_inv = 0;
  int phase = 0;

  always_ff @(posedge clk) if (rst_n) begin
    c_zero   <= c_zero + int'(events.flt_zero);
    c_copy   <= c_copy + int'(events.flt_copy);
    c_tpc_hit <= c_tpc_hit + int'(events.tpc_hit);
    c_rfwd   <= c_rfwd + int'(events.reg_fwd);
    c_mfwd   <= c_mfwd + int'(events.mem_fwd);
    c_dep    <= c_dep + int'(events.dep_stall);
    c_tl1    <= c_tl1 + int'(events.tl1_stall);
    c_silent <= c_silent + int'(events.st_silent);
    c_write  <= c_write + int'(events.st_write);
    c_retry  <= c_retry + int'(events.st_retry);
    c_ldread <= c_ldread + $countones(ld_taint_read);
    c_inv    <= c_inv + int'(events.tl1_inv);
  end

  // ------------------------------------------------------------ commit checker
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NLANES; l++) if (cm_valid[l]) begin
      exp_t x;
      checks++;
      c_committed++;
      if (cm_exc[l]) c_exc++;
      if (!engine_on) c_off++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected commit tag %0d", cm_tag[l]);
      end else begin
        x = exp_q.pop_front();
        if (cm_tag[l] !== x.tag || (cm_taint[l] & msk) !== x.t || cm_exc[l] !== x.e) begin
          failures++;
          $display("FAIL t=%0t lane %0d tag %0d/%0d taint %h/%h exc %0d/%0d", $time, l,
                   cm_tag[l], x.tag, cm_taint[l] & msk, x.t, cm_exc[l], x.e);
        end
      end
    end
  end

  // ------------------------------------------------------------ TPC miss handler
  initial begin
    tpc_fill_en = 0; tpc_fill_key = '0; tpc_fill_taint = '0; tpc_fill_exc = 0;
    forever begin
      @(posedge clk);
      if (rst_n && tpc_miss) begin
        logic [16:0] p;
        tpc_key_t k;
        k = tpc_miss_key;
        checks++;
        if (tpc_handler !== HANDLER) begin failures++; $display("FAIL handler address"); end
        c_handler++;
        if (phase == 2) c_flash_miss++;
        repeat ($urandom_range(4, 20)) @(posedge clk);
        p = policy(POL_BOTH, k[KEY_W-1 -: OPC_W], k[3*MAXT-1 -: MAXT], k[2*MAXT-1 -: MAXT], k[MAXT-1:0]);
        @(negedge clk);
        tpc_fill_en = 1; tpc_fill_key = k; tpc_fill_taint = p[15:0] & msk; tpc_fill_exc = p[16];
        @(negedge clk);
        tpc_fill_en = 0;
      end
    end
  end

  // ------------------------------------------------------------ data L1 and L2 models
  // a store misses the data L1 one time in ten, for a cycle at a time
  always @(posedge clk) st_dl1_hit <= ($urandom_range(0, 9) != 0);
  logic [LB-1:0] l2 [addr_t];
  int lat;
  addr_t pend;
  logic pend_v;
  always @(posedge clk) begin
    mem_resp_valid <= 1'b0;
    if (!rst_n) pend_v <= 1'b0;
    else if (pend_v) begin
      if (lat == 0) begin
        mem_resp_data  <= l2.exists(pend) ? l2[pend] : '0;
        mem_resp_valid <= 1'b1;
        pend_v <= 1'b0;
        c_fill <= c_fill + 1;
      end else lat <= lat - 1;
    end else if (mem_req_valid && mem_req_ready) begin
      if (mem_req_we) begin l2[mem_req_addr] = mem_req_wdata; c_wb <= c_wb + 1; end
      else begin pend <= mem_req_addr; pend_v <= 1'b1; lat <= $urandom_range(5, 30); end
    end
  end
  assign mem_req_ready = !pend_v;

  // ------------------------------------------------------------ other cores
  // Now and then another core takes a taint line of the hot set: the TL1
  // must give it up (writing it back if dirty) and refetch it later.
  initial inv_valid = 0;
  always @(posedge clk) begin
    if (!rst_n) inv_valid <= 1'b0;
    else if (inv_valid && !inv_ready) inv_valid <= 1'b1;
    else if ($urandom_range(0, 149) == 0) begin
      inv_valid <= 1'b1;
      inv_addr  <= MTBR_V + ((hot[$urandom_range(0, 23)] >> 2) >> 2);
    end else inv_valid <= 1'b0;
  end

  // ------------------------------------------------------------ driver
  task automatic cfg_write(input cfg_sel_e s, input addr_t d, input logic k, input opc_t o = '0);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_sel = s; cfg_wdata = d; cfg_kernel = k; cfg_opc = o;
    #1;
    while (!cfg_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 cfg_valid = 0; cfg_we = 0;
  endtask

  bundle_t prog[$];

  task automatic run_bundles(input int n);
    for (int i = 0; i < n + 3; i++) prog.push_back(gen_bundle());
    for (int i = 0; i < n; i++) begin
      bundle_t b;
      b = prog.pop_front();
      for (int l = 0; l < NLANES; l++) if (b[l].valid) ref_exec(b[l]);
      @(negedge clk);
      in_valid = 1; in_bundle = b;
      // prefetch the first memory operand of a bundle three ahead
      pf_valid = 0;
      for (int l = NLANES - 1; l >= 0; l--)
        if (prog[2][l].valid && (prog[2][l].mem_rd || prog[2][l].mem_wr)) begin
          pf_valid = 1; pf_addr = prog[2][l].addr;
        end
      #1;
      while (!in_ready) begin @(negedge clk); pf_valid = 0; #1; end
      @(posedge clk);
      #1 in_valid = 0; pf_valid = 0;
      if ($urandom_range(0, 3) == 0) repeat ($urandom_range(1, 3)) @(posedge clk);
    end
    prog.delete();
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while (exp_q.size() != 0 && guard < 20000) begin @(posedge clk); guard++; end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    cfg_valid = 0; cfg_we = 0; cfg_sel = CFG_TPCHR; cfg_opc = '0; cfg_wdata = '0; cfg_kernel = 0;
    in_valid = 0; in_bundle = '0; pf_valid = 0; pf_addr = '0;
    engine_on = 0; msk = '0;
    for (int r = 0; r < NREGS; r++) ref_r[r] = '0;
    for (int h = 0; h < 24; h++) hot[h] = 32'h0001_0000 + 32'(h * 68);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- initialisation, in the published order
    cfg_write(CFG_MTBR, MTBR_V, 1);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_sel = CFG_TPCHR; cfg_wdata = 32'h1234; cfg_kernel = 0; #1;
    checks++;
    if (!cfg_err) begin failures++; $display("FAIL user TPCHR write not refused"); end
    @(posedge clk); #1 cfg_valid = 0;
    cfg_write(CFG_TPCHR, HANDLER, 1);
    for (int o = 0; o < 256; o++)
      if (filt_of(POL_BOTH, opc_t'(o)) != FLT_TPC) cfg_write(CFG_FILTER, addr_t'(filt_of(POL_BOTH, opc_t'(o))), 1, opc_t'(o));
    cfg_write(CFG_FTCR, 32'd2, 1);
    engine_on = 1; msk = taint_mask(5'd2);
    cfg_sel = CFG_FILTER; cfg_opc = OP_LW; #1;
    checks++;
    if (cfg_rdata != 32'(FLT_ZERO)) begin failures++; $display("FAIL filter read-back"); end

    // ---- latency of one isolated instruction: in at edge 0, commit at edge 4
    begin
      ft_instr_t i;
      int t0;
      i = gen_instr(0);
      i.opc = OP_AND; i.rs1_en = 1; i.rs2_en = 1; i.rs1 = 0; i.rs2 = 0; i.rd_en = 1; i.rd = 7;
      ref_exec(i);
      @(negedge clk);
      in_valid = 1; in_bundle = '0; in_bundle[0] = i;
      @(posedge clk); t0 = 0;
      #1 in_valid = 0;
      while (!cm_valid[0]) begin @(posedge clk); t0++; #1; end
      checks++;
      if (t0 != 3) begin failures++; $display("FAIL latency %0d cycles after accept", t0 + 1); end
      @(posedge clk);
    end

    // ---- phase 0: policy on
    phase = 0;
    run_bundles(1500);
    drain();

    // ---- phase 1: engine off
    phase = 1;
    cfg_write(CFG_FTCR, 32'd0, 1);
    engine_on = 0;
    run_bundles(300);
    drain();
    cfg_write(CFG_FTCR, 32'd2, 1);
    engine_on = 1;

    // ---- phase 2: handler register rewritten: TPC flash-cleared
    phase = 2;
    cfg_write(CFG_TPCHR, HANDLER, 1);
    run_bundles(600);
    drain();

    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d instructions never committed", exp_q.size()); end
    begin
      string names[18] = '{"filter zero", "filter copy", "TPC hit", "TPC miss handler",
        "register forward", "memory forward", "dependence stall", "TL1 stall", "silent store",
        "non-silent store", "store retry", "taint exception", "TL1 fill", "TL1 write-back",
        "engine off commits", "miss after flash clear", "load taint read", "TL1 invalidation"};
      int cnt[18];
      cnt = '{c_zero, c_copy, c_tpc_hit, c_handler, c_rfwd, c_mfwd, c_dep, c_tl1,
        c_silent, c_write, c_retry, c_exc, c_fill, c_wb, c_off, c_flash_miss, c_ldread, c_inv};
      for (int k = 0; k < 18; k++) begin
        $display("  %-24s %0d", names[k], cnt[k]);
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[k]); end
      end
    end
    $display("committed=%0d", c_committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
