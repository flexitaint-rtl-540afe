// ft_workload_run: runs the evaluated taint policies, one after another,
// through one taint engine with a given taint L1 geometry.
//
// For each policy of ft_tb_policy_pkg (1-bit input tainting, 1-bit
// heap-pointer tracking, 2-bit combined), the run resets the engine, clears
// the memory taint array, programs the handler register, the Filter TPT
// entries the policy allows, the taint array base and the taint size, and
// then sends NB random bundles. The bundles have up to four instructions and
// at most two memory operations, 85% of memory accesses go to a small hot
// set, and the rest spread over 256 KB. An in-order reference model checks
// the taint and exception bit of every commit. The core side is modelled as
// in the end-to-end test: a software TPC miss handler with a random delay,
// a data L1 that misses one store in ten, taint prefetches three bundles
// ahead, and an L2 with a random latency.
//
// For each policy it prints the cycles taken, the share of instructions that
// needed the TPC, the TPC misses, the share of stores whose taint write was
// not silent, the TL1 fills and the TL1 stall cycles. It counts a failure if
// a policy commits nothing, never calls the handler, or never raises the
// exception that its rules define.
//
// Ports: done rises when all three policies have run; checks and failures
// are running totals.
module ft_workload_run
  import ft_pkg::*;
  import ft_tb_policy_pkg::*;
#(
  parameter int unsigned TL1_BYTES = 4096,
  parameter int unsigned TL1_LINE  = 64,
  parameter int unsigned NB        = 800,
  parameter string       NAME      = "tl1"
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int unsigned LB = TL1_LINE * 8;
  localparam addr_t MTBR_V = 32'h8000_0000, HANDLER = 32'h0040_2000;

  logic rst_n = 0;
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
  logic inv_valid = 1'b0, inv_ready;   // no other cores here
  addr_t inv_addr = '0;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_resp_valid, tl1_busy;
  addr_t mem_req_addr;
  logic [LB-1:0] mem_req_wdata, mem_resp_data;

  flexitaint #(.TL1_BYTES(TL1_BYTES), .TL1_LINE(TL1_LINE)) dut (.*);

  pol_e pol = POL_INPUT;
  initial begin done = 0; checks = 0; failures = 0; end

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
    f  = filt_of(pol, i.opc);
    e  = 1'b0;
    if (nz == 0 && (f == FLT_ZERO || f == FLT_ONECOPY)) res = '0;
    else if (nz == 1 && f == FLT_ONECOPY) res = t1 | t2 | tm;
    else begin
      p = policy(pol, i.opc, t1, t2, tm);
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
  end

  // ------------------------------------------------------------ commit checker
  always @(posedge clk) if (rst_n) begin
    for (int l = 0; l < NLANES; l++) if (cm_valid[l]) begin
      exp_t x;
      checks++;
      c_committed++;
      if (cm_exc[l]) c_exc++;
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
                repeat ($urandom_range(4, 20)) @(posedge clk);
        p = policy(pol, k[KEY_W-1 -: OPC_W], k[3*MAXT-1 -: MAXT], k[2*MAXT-1 -: MAXT], k[MAXT-1:0]);
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
    for (int h = 0; h < 24; h++) hot[h] = 32'h0001_0000 + 32'(h * 68);
    for (int p = 0; p < 3; p++) begin
      int t0, n0, h0, tpc0, sil0, wr0, fill0, stall0, exc0;
      pol = pol_e'(p);
      // reset and a freshly initialised taint array
      @(negedge clk);
      rst_n = 0;
      for (int r = 0; r < NREGS; r++) ref_r[r] = '0;
      ref_m.delete();
      l2.delete();
      engine_on = 0; msk = '0;
      repeat (3) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      cfg_write(CFG_TPCHR, HANDLER, 1);
      for (int o = 0; o < 256; o++)
        if (filt_of(pol, opc_t'(o)) != FLT_TPC)
          cfg_write(CFG_FILTER, addr_t'(filt_of(pol, opc_t'(o))), 1, opc_t'(o));
      cfg_write(CFG_MTBR, MTBR_V, 1);
      cfg_write(CFG_FTCR, pol_tsize(pol), 1);
      engine_on = 1; msk = taint_mask(TSIZE_W'(pol_tsize(pol)));
      t0 = $time; n0 = c_committed; h0 = c_handler; tpc0 = c_tpc_hit;
      sil0 = c_silent; wr0 = c_write; fill0 = c_fill; stall0 = c_tl1; exc0 = c_exc;
      run_bundles(NB);
      drain();
      checks++;
      if (exp_q.size() != 0) begin
        failures++;
        $display("FAIL %s %s: %0d instructions never committed", NAME, pol.name(), exp_q.size());
      end
      $display("%s %-11s tsize=%0d cycles=%0d instr=%0d tpc_lookups=%0.1f%% tpc_miss=%0d nonsilent_st=%0.1f%% tl1_fills=%0d tl1_stall_cycles=%0d exc=%0d",
        NAME, pol.name(), pol_tsize(pol), ($time - t0) / 10, c_committed - n0,
        100.0 * (c_tpc_hit - tpc0 + c_handler - h0) / (c_committed - n0 + 1), c_handler - h0,
        100.0 * (c_write - wr0) / (c_write - wr0 + c_silent - sil0 + 1), c_fill - fill0,
        c_tl1 - stall0, c_exc - exc0);
      checks += 3;
      if (c_committed == n0) begin failures++; $display("FAIL %s %s: nothing committed", NAME, pol.name()); end
      if (c_handler == h0)   begin failures++; $display("FAIL %s %s: handler never ran", NAME, pol.name()); end
      if (c_exc == exc0)     begin failures++; $display("FAIL %s %s: no taint exception", NAME, pol.name()); end
    end
    done = 1;
  end
endmodule
