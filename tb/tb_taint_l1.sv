// tb_taint_l1: self-checking test of the taint L1 cache.
// A behavioural next level (an array of lines with a random latency) backs
// the cache. A byte-array reference model holds the architectural taint
// memory. Random slot reads on both ports, masked slot writes and
// prefetches run over a region four times the cache size, so misses,
// dirty write-backs and refills all happen. Every read that hits must
// match the reference model, which catches lost or misplaced writes. The
// test counts hits, misses, write-backs and prefetch fills, and fails if
// any of them never happened. Coherence invalidations of random lines are
// mixed in: an invalidated line must stop hitting at once, and its dirty
// data must survive through the next level.
module tb_taint_l1;
  import ft_pkg::*;
  localparam int unsigned LB = 512, REGION = 16384, BASE = 32'h4000_0000;
  logic clk = 0, rst_n = 0;
  logic [1:0] rd_valid, rd_hit;
  addr_t [1:0] rd_addr;
  logic [1:0][2:0] rd_bit;
  taint_t [1:0] rd_data;
  logic wr_valid, wr_en, wr_hit, pf_valid, inv_valid, inv_ready, inv_hit;
  addr_t wr_addr, pf_addr, inv_addr;
  logic [2:0] wr_bit;
  taint_t wr_mask, wr_data;
  logic req_valid, req_ready, req_we, resp_valid, busy;
  addr_t req_addr;
  logic [LB-1:0] req_wdata, resp_data;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_wb = 0, n_pf = 0, n_inv = 0, n_inv_wb = 0;

  taint_l1 #(.SIZE_BYTES(4096), .WAYS(4), .LINE_BYTES(64), .NRD(2)) dut (.*);

  logic [7:0] arch [REGION];   // reference taint memory
  logic [7:0] l2   [REGION];   // next-level contents

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // next level: accepts one request, answers a read after 3..12 cycles
  int lat;
  addr_t pend;
  logic  pend_v;
  always_ff @(posedge clk) begin
    resp_valid <= 1'b0;
    if (!rst_n) begin
      pend_v <= 1'b0;
    end else if (pend_v) begin
      if (lat == 0) begin
        for (int b = 0; b < 64; b++) resp_data[b*8 +: 8] <= l2[pend - BASE + b];
        resp_valid <= 1'b1;
        pend_v <= 1'b0;
      end else lat <= lat - 1;
    end else if (req_valid && req_ready) begin
      if (req_we) begin
        for (int b = 0; b < 64; b++) l2[req_addr - BASE + b] <= req_wdata[b*8 +: 8];
        n_wb++;
      end else begin
        pend <= req_addr; pend_v <= 1'b1; lat <= $urandom_range(3, 12);
        if (!(|rd_valid) && !wr_valid) n_pf++;
      end
    end
  end
  logic rdy_rand;
  always @(posedge clk) rdy_rand <= ($urandom_range(0, 3) != 0);
  assign req_ready = !pend_v && rdy_rand;

  function automatic addr_t rnd_addr(output logic [2:0] bitp, output taint_t m);
    int unsigned s;
    s = $urandom_range(0, 4);
    m = taint_t'((32'd1 << (1 << s)) - 1);
    if (s == 4) begin bitp = 0; return BASE + ($urandom_range(0, REGION - 1) & ~32'd1); end
    if (s == 3) begin bitp = 0; return BASE + $urandom_range(0, REGION - 1); end
    bitp = 3'($urandom_range(0, 7) & ~((1 << s) - 1));
    return BASE + $urandom_range(0, REGION - 1);
  endfunction

  function automatic taint_t arch_slot(input addr_t a, input logic [2:0] b);
    logic [23:0] w;
    w = {arch[(a - BASE + 2) % REGION], arch[(a - BASE + 1) % REGION], arch[a - BASE]};
    return taint_t'(w >> b);
  endfunction

  initial begin
    rd_valid = '0; rd_addr = '0; rd_bit = '0; wr_valid = 0; wr_en = 0; wr_addr = '0;
    wr_bit = 0; wr_mask = '0; wr_data = '0; pf_valid = 0; pf_addr = '0;
    inv_valid = 0; inv_addr = '0;
    for (int i = 0; i < REGION; i++) begin arch[i] = 8'($urandom); l2[i] = arch[i]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int op;
      taint_t m0, m1;
      op = $urandom_range(0, 9);
      @(negedge clk);
      if (op < 5) begin
        // two reads, retried until both hit
        rd_addr[0] = rnd_addr(rd_bit[0], m0);
        rd_addr[1] = (op == 0) ? rd_addr[0] : rnd_addr(rd_bit[1], m1);
        if (op == 0) begin rd_bit[1] = rd_bit[0]; m1 = m0; end
        rd_valid = 2'b11;
        #1;
        if (rd_hit == 2'b11) n_hit++; else n_miss++;
        while (rd_hit != 2'b11) begin @(negedge clk); #1; end
        for (int p = 0; p < 2; p++) begin
          taint_t m;
          m = p ? m1 : m0;
          checks++;
          if ((rd_data[p] & m) !== (arch_slot(rd_addr[p], rd_bit[p]) & m)) begin
            failures++;
            $display("FAIL read port %0d addr %h.%0d got %h exp %h", p, rd_addr[p], rd_bit[p],
                     rd_data[p] & m, arch_slot(rd_addr[p], rd_bit[p]) & m);
          end
        end
        @(posedge clk); #1 rd_valid = '0;
      end else if (op < 9) begin
        // masked slot write: check, wait for a hit, then write
        wr_addr = rnd_addr(wr_bit, wr_mask);
        wr_data = taint_t'($urandom);
        wr_valid = 1;
        #1;
        while (!wr_hit) begin @(negedge clk); #1; end
        wr_en = 1;
        @(posedge clk);
        begin
          logic [23:0] w;
          int unsigned o;
          o = wr_addr - BASE;
          w = {arch[(o + 2) % REGION], arch[(o + 1) % REGION], arch[o]};
          w = (w & ~(24'(wr_mask) << wr_bit)) | (24'(wr_data & wr_mask) << wr_bit);
          arch[o] = w[7:0];
          if (wr_mask > 16'hff || wr_bit + $countones(wr_mask) > 8) arch[(o + 1) % REGION] = w[15:8];
        end
        #1 wr_valid = 0; wr_en = 0;
      end else if ($urandom_range(0, 1) == 0) begin
        pf_valid = 1;
        pf_addr = BASE + $urandom_range(0, REGION - 1);
        @(posedge clk); #1 pf_valid = 0;
        repeat (15) @(posedge clk);
      end else begin
        // invalidation: the line must stop hitting, and dirty data must
        // reach the next level (later reads refill from there)
        int wb0;
        logic h;
        inv_valid = 1;
        inv_addr = BASE + $urandom_range(0, REGION - 1);
        #1 while (!inv_ready) begin @(negedge clk); #1; end
        h = inv_hit;
        wb0 = n_wb;
        @(posedge clk);
        #1 inv_valid = 0;
        rd_valid = 2'b01; rd_addr[0] = inv_addr; rd_bit[0] = 0;
        #1 checks++;
        if (rd_hit[0]) begin failures++; $display("FAIL line %h still hits after invalidation", inv_addr); end
        rd_valid = '0;
        repeat (15) @(posedge clk);
        if (h) n_inv++;
        if (n_wb != wb0) n_inv_wb++;
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_wb == 0 || n_pf == 0 || n_inv == 0 || n_inv_wb == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("hits=%0d misses=%0d writebacks=%0d prefetch_fills=%0d invalidations=%0d inv_writebacks=%0d",
             n_hit, n_miss, n_wb, n_pf, n_inv, n_inv_wb);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
