// taint_l1: the Taint L1 cache (TL1).
//
// This small write-back cache is the only storage dedicated to taints. It
// caches the packed memory-taint array, which otherwise lives in ordinary
// memory and shares the L2 with data. The default geometry follows the
// published configuration: 4 KB, 4-way set-associative, 64-byte lines.
//
// Ports, all addressed by taint byte address plus the bit position of the
// taint slot in that byte:
//   rd[NRD]  lookups for the pre-commit stage. They are combinational:
//            hit/miss and the 16 bits starting at the slot come back in the
//            same cycle. The default of two follows the published
//            "dual-ported" TL1.
//   wr       the commit-time taint write, masked to the slot. wr_valid asks
//            for the tag check, and its hit flag comes back combinationally,
//            so the commit logic can hold back the data-cache write on a
//            taint miss. wr_en then writes the slot at the rising edge, and
//            only on a hit. A caller can thus check without writing, which
//            is what holds back the taint write on a data-cache miss.
//   pf       a non-binding prefetch tag probe. A miss starts a line fill if
//            the fill engine is idle; otherwise the prefetch is dropped.
//   inv      a coherence invalidation of one taint line, from the data-cache
//            side of the core (another core is about to write the line).
//            It is accepted (inv_ready) while the fill engine is idle, ahead
//            of any miss. A present line stops hitting at once, and a dirty
//            one is written back first. inv_hit says whether the line was
//            present.
// A demand miss on rd or wr also starts a fill: the requester simply
// retries until it hits. One fill is in flight at a time: a dirty victim is
// first written back, then the line is read. Demand misses take priority
// over prefetches, and the lowest-numbered read port goes first.
//
// Next-level port: req_valid/req_ready with req_we, a line address and the
// line data for write-backs. A read's line comes back on resp_valid, any
// number of cycles later. Writes get no response.
//
// This design's own choices are the single outstanding miss, round-robin
// replacement, write-back with write-allocate, the combinational lookup and
// the form of the invalidation port. The published design does not give
// them; it only requires that taint lines stay coherent like data lines.
module taint_l1
  import ft_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 4096,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned NRD        = 2,
  localparam int unsigned LINE_BITS = LINE_BYTES * 8,
  localparam int unsigned SETS      = SIZE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned OFF_W     = $clog2(LINE_BYTES),
  localparam int unsigned SET_W     = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned TAGW      = ADDR_W - OFF_W - $clog2(SETS),
  localparam int unsigned WAY_W     = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // pre-commit lookups
  input  logic [NRD-1:0]        rd_valid,
  input  addr_t [NRD-1:0]       rd_addr,
  input  logic [NRD-1:0][2:0]   rd_bit,
  output logic [NRD-1:0]        rd_hit,
  output taint_t [NRD-1:0]      rd_data,
  // commit write
  input  logic                  wr_valid,     // tag check (a miss starts a fill)
  input  logic                  wr_en,        // write the slot if wr_hit
  input  addr_t                 wr_addr,
  input  logic [2:0]            wr_bit,
  input  taint_t                wr_mask,
  input  taint_t                wr_data,
  output logic                  wr_hit,
  // prefetch probe
  input  logic                  pf_valid,
  input  addr_t                 pf_addr,
  // coherence invalidation
  input  logic                  inv_valid,
  input  addr_t                 inv_addr,
  output logic                  inv_ready,    // accepted this cycle
  output logic                  inv_hit,      // the line was present
  // next level
  output logic                  req_valid,
  input  logic                  req_ready,
  output logic                  req_we,
  output addr_t                 req_addr,
  output logic [LINE_BITS-1:0]  req_wdata,
  input  logic                  resp_valid,
  input  logic [LINE_BITS-1:0]  resp_data,
  // status
  output logic                  busy         // a fill is in progress
);
  typedef logic [TAGW-1:0]      ltag_t;
  typedef logic [SET_W-1:0]     set_t;
  typedef logic [WAY_W-1:0]     way_t;
  typedef logic [LINE_BITS-1:0] line_t;

  logic  [SETS-1:0][WAYS-1:0] v_q, d_q;
  ltag_t tag_q  [SETS][WAYS];
  line_t data_q [SETS][WAYS];
  way_t  rr_q   [SETS];

  function automatic set_t set_of(input addr_t a);
    return (SETS > 1) ? set_t'(a >> OFF_W) : '0;
  endfunction
  function automatic ltag_t tag_of(input addr_t a);
    return ltag_t'(a >> (ADDR_W - TAGW));
  endfunction
  function automatic logic [OFF_W+2:0] bitpos(input addr_t a, input logic [2:0] b);
    return {a[OFF_W-1:0], b};
  endfunction

  // lookup of one address: hit and way
  function automatic logic lookup(input addr_t a, output way_t w);
    logic h;
    h = 1'b0;
    w = '0;
    for (int unsigned i = 0; i < WAYS; i++)
      if (v_q[set_of(a)][i] && tag_q[set_of(a)][i] == tag_of(a)) begin
        h = 1'b1;
        w = way_t'(i);
      end
    return h;
  endfunction

  way_t [NRD-1:0] rd_way;
  way_t           wr_way, pf_way, inv_way;
  logic           pf_hit;

  always_comb begin
    for (int unsigned p = 0; p < NRD; p++) begin
      rd_hit[p]  = lookup(rd_addr[p], rd_way[p]);
      rd_data[p] = taint_t'(data_q[set_of(rd_addr[p])][rd_way[p]]
                             >> bitpos(rd_addr[p], rd_bit[p]));
    end
    wr_hit = lookup(wr_addr, wr_way);
    pf_hit = lookup(pf_addr, pf_way);
    inv_hit = lookup(inv_addr, inv_way);
  end

  // ---------------------------------------------------------------- fills
  typedef enum logic [1:0] {F_IDLE, F_WB, F_RD, F_WAIT} fstate_e;
  fstate_e fs_q;
  addr_t   miss_q;            // line address being filled
  way_t    vict_q;
  logic    inv_q;             // the write-back is for an invalidation

  logic  start;
  addr_t start_addr;
  always_comb begin
    start      = 1'b0;
    start_addr = '0;
    if (wr_valid && !wr_hit) begin
      start = 1'b1; start_addr = wr_addr;
    end
    for (int p = NRD-1; p >= 0; p--)
      if (rd_valid[p] && !rd_hit[p]) begin
        start = 1'b1; start_addr = rd_addr[p];
      end
    if (!start && pf_valid && !pf_hit) begin
      start = 1'b1; start_addr = pf_addr;
    end
  end

  // victim: an invalid way if there is one, else the round-robin pointer
  way_t start_vict;
  always_comb begin
    start_vict = rr_q[set_of(start_addr)];
    for (int i = WAYS-1; i >= 0; i--)
      if (!v_q[set_of(start_addr)][i]) start_vict = way_t'(i);
  end

  // a commit write into the victim in the cycle its fill starts
  logic vict_written, inv_written, inv_take;
  assign vict_written = wr_valid && wr_en && wr_hit && wr_way == start_vict &&
                        set_of(wr_addr) == set_of(start_addr);
  assign inv_written  = wr_valid && wr_en && wr_hit && wr_way == inv_way &&
                        set_of(wr_addr) == set_of(inv_addr);
  // an invalidation is taken when the fill engine is idle, ahead of any miss
  assign inv_ready = fs_q == F_IDLE;
  assign inv_take  = inv_valid && inv_ready;

  assign busy      = fs_q != F_IDLE;
  assign req_valid = fs_q == F_WB || fs_q == F_RD;
  assign req_we    = fs_q == F_WB;
  assign req_addr  = (fs_q == F_WB)
                   ? {tag_q[set_of(miss_q)][vict_q], set_of(miss_q), OFF_W'(0)}
                   : {miss_q[ADDR_W-1:OFF_W], OFF_W'(0)};
  assign req_wdata = data_q[set_of(miss_q)][vict_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs_q   <= F_IDLE;
      miss_q <= '0;
      vict_q <= '0;
      inv_q  <= 1'b0;
      v_q    <= '0;
      d_q    <= '0;
      for (int unsigned s = 0; s < SETS; s++) rr_q[s] <= '0;
    end else begin
      unique case (fs_q)
        F_IDLE: if (inv_take) begin
          // drop the line; a dirty one is written back first
          if (inv_hit) begin
            miss_q <= inv_addr;
            vict_q <= inv_way;
            inv_q  <= 1'b1;
            v_q[set_of(inv_addr)][inv_way] <= 1'b0;
            if (d_q[set_of(inv_addr)][inv_way] || inv_written) fs_q <= F_WB;
          end
        end else if (start) begin
          miss_q <= start_addr;
          inv_q  <= 1'b0;
          vict_q <= start_vict;
          // the victim stops hitting at once; its data stays for write-back
          v_q[set_of(start_addr)][start_vict] <= 1'b0;
          fs_q   <= (v_q[set_of(start_addr)][start_vict] &&
                     (d_q[set_of(start_addr)][start_vict] || vict_written)) ? F_WB : F_RD;
        end
        F_WB:   if (req_ready) begin
          d_q[set_of(miss_q)][vict_q] <= 1'b0;
          fs_q <= inv_q ? F_IDLE : F_RD;
        end
        F_RD:   if (req_ready) fs_q <= F_WAIT;
        F_WAIT: if (resp_valid) begin
          v_q[set_of(miss_q)][vict_q] <= 1'b1;
          d_q[set_of(miss_q)][vict_q] <= 1'b0;
          rr_q[set_of(miss_q)]        <= (WAYS > 1) ? way_t'(vict_q + 1'b1) : '0;
          fs_q <= F_IDLE;
        end
      endcase
      if (wr_valid && wr_en && wr_hit) d_q[set_of(wr_addr)][wr_way] <= 1'b1;
    end
  end

  // line data and tags
  always_ff @(posedge clk) begin
    if (fs_q == F_WAIT && resp_valid) begin
      tag_q[set_of(miss_q)][vict_q]  <= tag_of(miss_q);
      data_q[set_of(miss_q)][vict_q] <= resp_data;
    end
    if (wr_valid && wr_en && wr_hit) begin
      data_q[set_of(wr_addr)][wr_way] <=
        (data_q[set_of(wr_addr)][wr_way] & ~(line_t'(wr_mask) << bitpos(wr_addr, wr_bit)))
        | (line_t'(taint_t'(wr_data & wr_mask)) << bitpos(wr_addr, wr_bit));
    end
  end

  // a fill only ever starts from an idle fill engine
  a_fill_from_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (fs_q == F_WAIT && resp_valid) |=> fs_q == F_IDLE);
endmodule
