// tb_ft_pipeline: directed, cycle-checked test of the taint pipeline.
// The TL1 is modelled here as a byte array of taint memory, with misses
// that can be switched on. Each case sends one bundle to an empty pipeline,
// then checks the commit cycle, result taints, exception flags, TRF effects
// (through later instructions) and the TL1 writes:
//   - a trivial bundle commits four cycles after it is accepted;
//   - a chain of one-source copies resolves in one cycle through same-cycle
//     forwarding;
//   - a lane that depends on a same-cycle TPC result costs one cycle;
//   - two independent TPC lanes share the single port: one cycle more;
//   - a TPC miss waits for the handler's fill;
//   - a store whose taint does not change writes no taint; one that changes
//     it writes the new taint;
//   - a store held by a data-L1 miss writes neither cache until it hits;
//   - a load after a store to the same word in the same bundle gets the
//     store's taint;
//   - a TL1 miss in the first stage delays the bundle;
//   - back-to-back bundles flow at one bundle per cycle;
//   - a coherence invalidation while a store is in flight makes it write
//     its taint even when the taint is unchanged;
//   - a random back-to-back stream of adds, loads and stores, with data-L1
//     misses, matches an in-order model commit by commit, and the memory
//     taints match at the end.
module tb_ft_pipeline;
  import ft_pkg::*;
  localparam int unsigned W = 4, NRD = 2;
  localparam opc_t OP_ADD = 8'h20, OP_LW = 8'h23, OP_SW = 8'h2b;
  localparam addr_t MTBR_V = 32'h8000_0000;

  logic clk = 0, rst_n = 0;
  logic [TSIZE_W-1:0] tsize;
  addr_t mtbr, tpchr;
  logic tpc_flash_clr, filt_wr_en;
  opc_t filt_wr_opc, filt_rd_opc;
  filter_e filt_wr_entry, filt_rd_entry;
  logic idle, in_valid, in_ready;
  ft_instr_t [W-1:0] in_bundle;
  logic [NRD-1:0] tl1_rd_valid, tl1_rd_hit;
  addr_t [NRD-1:0] tl1_rd_addr;
  logic [NRD-1:0][2:0] tl1_rd_bit;
  taint_t [NRD-1:0] tl1_rd_data;
  logic tl1_wr_valid, tl1_wr_en, tl1_wr_hit;
  addr_t tl1_wr_addr;
  logic [2:0] tl1_wr_bit;
  taint_t tl1_wr_mask, tl1_wr_data;
  logic tpc_miss, tpc_fill_en, tpc_fill_exc;
  tpc_key_t tpc_miss_key, tpc_fill_key;
  addr_t tpc_handler;
  taint_t tpc_fill_taint;
  logic [W-1:0] ld_taint_read;
  logic [W-1:0][TAG_W-1:0] ld_taint_tag;
  logic st_valid, st_dl1_hit, st_dl1_we;
  addr_t st_addr;
  logic [W-1:0] cm_valid, cm_exc;
  logic [W-1:0][TAG_W-1:0] cm_tag;
  taint_t [W-1:0] cm_taint;
  ft_events_t events;
  logic tl1_inv;

  ft_pipeline #(.W(W), .NRD(NRD)) dut (.*);

  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---------------------------------------------------------- TL1 model
  logic [7:0] tmem [addr_t];
  logic       tl1_miss_on;
  int         n_tl1_writes;
  function automatic logic [7:0] tb(input addr_t a);
    return tmem.exists(a) ? tmem[a] : 8'h00;
  endfunction
  always_comb
    for (int p = 0; p < NRD; p++) begin
      tl1_rd_hit[p]  = !tl1_miss_on;
      tl1_rd_data[p] = taint_t'({tb(tl1_rd_addr[p] + 1), tb(tl1_rd_addr[p])} >> tl1_rd_bit[p]);
    end
  assign tl1_wr_hit = 1'b1;
  always @(posedge clk) if (tl1_wr_valid && tl1_wr_en) begin
    logic [15:0] w;
    w = {tb(tl1_wr_addr + 1), tb(tl1_wr_addr)};
    w = (w & ~(tl1_wr_mask << tl1_wr_bit)) | ((tl1_wr_data & tl1_wr_mask) << tl1_wr_bit);
    tmem[tl1_wr_addr] = w[7:0];
    tmem[tl1_wr_addr + 1] = w[15:8];
    n_tl1_writes++;
  end

  // 2-bit taints: word w has its taint at byte MTBR + w/4, bits 2*(w%4)
  function automatic taint_t mem_taint(input addr_t a);
    addr_t w;
    w = a >> 2;
    return taint_t'((tb(MTBR_V + (w >> 2)) >> (2 * (w % 4))) & 8'h3);
  endfunction
  task automatic set_mem_taint(input addr_t a, input logic [1:0] t);
    addr_t w, b;
    w = a >> 2;
    b = MTBR_V + (w >> 2);
    tmem[b] = (tb(b) & ~(8'h3 << (2 * (w % 4)))) | (8'(t) << (2 * (w % 4)));
  endtask

  // ---------------------------------------------------------- TPC handler: OR rule
  int handler_delay = 6;
  initial begin
    tpc_fill_en = 0; tpc_fill_key = '0; tpc_fill_taint = '0; tpc_fill_exc = 0;
    forever begin
      @(posedge clk);
      if (tpc_miss) begin
        tpc_key_t k;
        k = tpc_miss_key;
        repeat (handler_delay - 1) @(posedge clk);
        @(negedge clk);
        tpc_fill_en = 1; tpc_fill_key = k;
        tpc_fill_taint = k[3*MAXT-1 -: MAXT] | k[2*MAXT-1 -: MAXT] | k[MAXT-1:0];
        tpc_fill_exc = (k[KEY_W-1 -: OPC_W] == OP_ADD) && k[2*MAXT+1] && k[MAXT+1];
        @(negedge clk);
        tpc_fill_en = 0;
      end
    end
  end

  // ---------------------------------------------------------- helpers
  logic [TAG_W-1:0] tg = 0;
  function automatic ft_instr_t alu(input reg_t rd, input reg_t a, input reg_t b);
    ft_instr_t i;
    i = '0; i.valid = 1; i.tag = tg; tg++; i.opc = OP_ADD;
    i.rs1_en = 1; i.rs1 = a; i.rs2_en = 1; i.rs2 = b; i.rd_en = 1; i.rd = rd;
    return i;
  endfunction
  function automatic ft_instr_t ld(input reg_t rd, input reg_t a, input addr_t ad);
    ft_instr_t i;
    i = '0; i.valid = 1; i.tag = tg; tg++; i.opc = OP_LW;
    i.rs1_en = 1; i.rs1 = a; i.rd_en = 1; i.rd = rd; i.mem_rd = 1; i.addr = ad;
    return i;
  endfunction
  function automatic ft_instr_t st(input reg_t a, input reg_t v, input addr_t ad);
    ft_instr_t i;
    i = '0; i.valid = 1; i.tag = tg; tg++; i.opc = OP_SW;
    i.rs1_en = 1; i.rs1 = a; i.rs2_en = 1; i.rs2 = v; i.mem_wr = 1; i.data_wr = 1; i.addr = ad;
    return i;
  endfunction

  // send one bundle to the empty pipeline, wait for its last commit;
  // returns the number of cycles from acceptance to the final commit cycle
  taint_t got_t [W];
  logic   got_e [W];
  int n_dep;
  always @(posedge clk) if (events.dep_stall) n_dep++;
  task automatic send(input bundle_t b, output int lat);
    int n, seen;
    n = 0; seen = 0;
    for (int l = 0; l < W; l++) if (b[l].valid) n++;
    @(negedge clk);
    in_valid = 1; in_bundle = b;
    #1 while (!in_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    #1 in_valid = 0;
    lat = 0;
    while (seen < n) begin
      lat++;
      for (int l = 0; l < W; l++) if (cm_valid[l]) begin
        got_t[l] = cm_taint[l] & 16'h3; got_e[l] = cm_exc[l]; seen++;
      end
      @(posedge clk); #1;
    end
    lat--;
  endtask

  // set register r to taint t: ld r, (r0) from a word holding t
  task automatic set_reg(input reg_t r, input logic [1:0] t);
    bundle_t b;
    int lat;
    set_mem_taint(32'h0000_7000 + 32'(r) * 4, t);
    b = '0; b[0] = ld(r, 0, 32'h0000_7000 + 32'(r) * 4);
    send(b, lat);
  endtask

  // ---------------------------------------------------------- random stream
  // In-order model of the OR rule with this test's filter settings; every
  // commit is compared with it while rnd_on is set.
  logic   rnd_on = 0;
  taint_t rr [NREGS];
  taint_t rm [addr_t];
  typedef struct packed { logic [TAG_W-1:0] tag; taint_t t; logic e; } exp_t;
  exp_t   rq [$];
  int     rnd_commits = 0;
  function automatic void rnd_model(input ft_instr_t i);
    taint_t a, b, m, r;
    a = i.rs1_en ? rr[i.rs1] : '0;
    b = i.rs2_en ? rr[i.rs2] : '0;
    m = (i.mem_rd && rm.exists(i.addr)) ? rm[i.addr] : '0;
    r = a | b | m;
    if (i.rd_en && i.rd != 0) rr[i.rd] = r;
    if (i.mem_wr) rm[i.addr] = r;
    rq.push_back('{tag: i.tag, t: r, e: (i.opc == OP_ADD) && a[1] && b[1]});
  endfunction
  always @(posedge clk) if (rnd_on)
    for (int l = 0; l < W; l++) if (cm_valid[l]) begin
      exp_t x;
      rnd_commits++;
      x = rq.pop_front();
      chk(cm_tag[l] == x.tag && (cm_taint[l] & 16'h3) == x.t && cm_exc[l] == x.e,
          $sformatf("random stream tag %0d taint %h/%h exc %0d/%0d", cm_tag[l],
                    cm_taint[l] & 16'h3, x.t, cm_exc[l], x.e));
    end

  task automatic cfg_filter(input opc_t o, input filter_e f);
    @(negedge clk); filt_wr_en = 1; filt_wr_opc = o; filt_wr_entry = f;
    @(negedge clk); filt_wr_en = 0;
  endtask

  initial begin
    bundle_t b;
    int lat, w0, dep0;
    tsize = 0; mtbr = MTBR_V; tpchr = 32'h400; tpc_flash_clr = 0; filt_wr_en = 0;
    filt_wr_opc = 0; filt_wr_entry = FLT_TPC; filt_rd_opc = 0; in_valid = 0; in_bundle = '0;
    tl1_miss_on = 0; n_tl1_writes = 0; n_dep = 0; st_dl1_hit = 1; tl1_inv = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    tsize = 2;
    cfg_filter(OP_ADD, FLT_ONECOPY);
    cfg_filter(OP_LW, FLT_ONECOPY);
    cfg_filter(OP_SW, FLT_ZERO);
    filt_rd_opc = OP_SW; #1 chk(filt_rd_entry == FLT_ZERO, "filter read port");

    // 1. trivial bundle, four-stage latency
    b = '0; b[0] = alu(1, 0, 0);
    send(b, lat);
    chk(lat == 3 && got_t[0] == 0, "trivial instruction commits in the fourth stage");

    // 2. same-cycle forwarding chain of copies: r2=1; r3=r2+r0; r4=r3+r0; r5=r4+r0
    set_reg(2, 2'b01);
    b = '0; b[0] = alu(3, 2, 0); b[1] = alu(4, 3, 0); b[2] = alu(5, 4, 0); b[3] = alu(6, 5, 0);
    dep0 = n_dep;
    send(b, lat);
    chk(lat == 3, "copy chain resolves without stalls");
    chk(n_dep == dep0, "no dependence stall in a copy chain");
    chk(got_t[0] == 1 && got_t[1] == 1 && got_t[2] == 1 && got_t[3] == 1, "copied taints");

    // 3. TPC lane with a dependent lane: r7 = r2 + r8 (two sources: TPC), r9 = r7 + r0
    set_reg(8, 2'b10);
    handler_delay = 6;
    b = '0; b[0] = alu(7, 2, 8);
    send(b, lat);                              // first use: miss then fill
    chk(lat > 3 + 4 && got_t[0] == 2'b11, "TPC miss waits for the handler");
    b = '0; b[0] = alu(7, 2, 8); b[1] = alu(9, 7, 0);
    dep0 = n_dep;
    send(b, lat);
    chk(lat == 4, "dependent lane waits one cycle for the TPC result");
    chk(n_dep == dep0 + 1, "one dependence stall");
    chk(got_t[0] == 2'b11 && got_t[1] == 2'b11, "TPC result forwarded next cycle");

    // 4. two independent TPC lanes: the single port costs a cycle
    b = '0; b[0] = alu(10, 2, 8); b[1] = alu(11, 8, 2);
    send(b, lat);                              // second key misses once
    b = '0; b[0] = alu(10, 2, 8); b[1] = alu(11, 8, 2);
    send(b, lat);
    chk(lat == 4 && got_t[0] == 2'b11 && got_t[1] == 2'b11, "two TPC lanes take two cycles");

    // 5. exception bit: add with both pointer taints (policy raises it)
    set_reg(12, 2'b10);
    b = '0; b[0] = alu(13, 8, 12);
    send(b, lat);
    chk(got_t[0] == 2'b10 && got_e[0] == 1, "taint exception flagged at commit");

    // 6. silent and non-silent stores
    set_mem_taint(32'h100, 2'b00);
    w0 = n_tl1_writes;
    b = '0; b[0] = st(0, 0, 32'h100);          // zero over zero: silent
    send(b, lat);
    chk(n_tl1_writes == w0, "silent store writes no taint");
    b = '0; b[0] = st(0, 2, 32'h100);          // value taint 01: non-silent
    send(b, lat);
    chk(n_tl1_writes == w0 + 1 && mem_taint(32'h100) == 2'b01, "non-silent store writes its taint");

    // 7. data L1 miss holds a store and its taint write
    st_dl1_hit = 1'b0;
    w0 = n_tl1_writes;
    b = '0; b[0] = st(0, 8, 32'h104);          // taint 10 into a zero word
    fork
      send(b, lat);
      begin
        repeat (10) @(posedge clk);
        #1 chk(n_tl1_writes == w0 && !st_dl1_we, "no write while the data L1 misses");
        st_dl1_hit = 1'b1;
      end
    join
    chk(lat >= 10 && n_tl1_writes == w0 + 1 && mem_taint(32'h104) == 2'b10, "store completes after the data L1 hit");

    // 8. store then load of the same word in one bundle
    b = '0; b[0] = st(0, 8, 32'h108); b[1] = ld(14, 0, 32'h108); b[2] = alu(15, 14, 0);
    send(b, lat);
    chk(got_t[1] == 2'b10 && got_t[2] == 2'b10, "load takes the older store's taint");

    // 9. TL1 miss in the first stage delays the bundle
    tl1_miss_on = 1;
    fork
      begin b = '0; b[0] = ld(16, 0, 32'h10c); send(b, lat); end
      begin repeat (5) @(posedge clk); tl1_miss_on = 0; end
    join
    chk(lat >= 6, "TL1 miss stalls the pre-commit stage");

    // 10. back-to-back bundles: one bundle per cycle when nothing stalls
    begin
      int t, cnt;
      cnt = 0;
      fork
        for (int k = 0; k < 8; k++) begin
          @(negedge clk); in_valid = 1; in_bundle = '0; in_bundle[0] = alu(17, 0, 0);
          in_bundle[1] = alu(18, 2, 0);
          #1 while (!in_ready) begin @(negedge clk); #1; end
          @(posedge clk);
          #1 in_valid = 0;
        end
        begin
          t = 0;
          while (cnt < 16 && t < 40) begin @(posedge clk); #1; cnt += $countones(cm_valid); t++; end
        end
      join
      in_valid = 0;
      chk(cnt == 16 && t <= 12, "full throughput of one bundle per cycle");
    end

    // 11. an invalidation while a store is in flight: its old taint is no
    //     longer trusted, so an unchanged taint is written anyway
    set_mem_taint(32'h110, 2'b00);
    w0 = n_tl1_writes;
    fork
      begin b = '0; b[0] = st(0, 0, 32'h110); send(b, lat); end
      begin repeat (2) @(posedge clk); @(negedge clk); tl1_inv = 1; @(negedge clk); tl1_inv = 0; end
    join
    chk(n_tl1_writes == w0 + 1 && mem_taint(32'h110) == 2'b00, "store after an invalidation writes its taint");
    b = '0; b[0] = st(0, 0, 32'h110);
    send(b, lat);
    chk(n_tl1_writes == w0 + 1, "without an invalidation the same store is silent");

    // 12. random back-to-back stream: register and memory hazards across
    //     lanes and stages, TPC misses, data-L1 misses, against the model
    begin
      // clear every register taint left by the cases above
      bundle_t z;
      int lt;
      for (int r = 1; r < NREGS; r += 4) begin
        z = '0;
        for (int l = 0; l < W; l++) if (r + l < NREGS) z[l] = alu(reg_t'(r + l), 0, 0);
        send(z, lt);
      end
      for (int r = 0; r < NREGS; r++) rr[r] = '0;
      for (int k = 0; k < 8; k++) begin
        addr_t ad;
        ad = 32'h200 + 32'(k) * 4;
        set_mem_taint(ad, 2'(k));
        rm[ad] = taint_t'(k % 4);
      end
    end
    handler_delay = 3;
    rnd_on = 1;
    fork
      for (int n = 0; n < 600; n++) begin
        bundle_t rb;
        int nm, k;
        rb = '0; nm = 0;
        for (int l = 0; l < $urandom_range(1, W); l++) begin
          reg_t d, a, c;
          addr_t ad;
          d = reg_t'($urandom_range(0, 6)); a = reg_t'($urandom_range(0, 6));
          c = reg_t'($urandom_range(0, 6)); ad = 32'h200 + 32'($urandom_range(0, 7)) * 4;
          k = $urandom_range(0, 9);
          if (k < 3 && nm < NRD)      begin rb[l] = ld(d, a, ad); nm++; end
          else if (k < 5 && nm < NRD) begin rb[l] = st(a, c, ad); nm++; end
          else                        rb[l] = alu(d, a, c);
          rnd_model(rb[l]);
        end
        @(negedge clk);
        st_dl1_hit = ($urandom_range(0, 7) != 0);
        in_valid = 1; in_bundle = rb;
        #1 while (!in_ready) begin @(negedge clk); st_dl1_hit = ($urandom_range(0, 7) != 0); #1; end
        @(posedge clk);
        #1 in_valid = 0;
      end
      begin
        int g;
        g = 0;
        while (g < 20000) begin
          @(negedge clk);
          if (!in_valid) st_dl1_hit = ($urandom_range(0, 7) != 0);
          if (rq.size() == 0 && !in_valid && idle) break;
          g++;
        end
      end
    join
    rnd_on = 0;
    st_dl1_hit = 1;
    chk(rq.size() == 0 && rnd_commits > 600, "random stream fully committed");
    for (int k = 0; k < 8; k++) begin
      addr_t ad;
      ad = 32'h200 + 32'(k) * 4;
      chk(mem_taint(ad) == (rm.exists(ad) ? rm[ad] : '0), $sformatf("memory taint of %h", ad));
    end

    repeat (2) @(posedge clk);
    #1 chk(idle, "pipeline drains to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
