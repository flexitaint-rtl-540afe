// tpc: the Taint Propagation Cache.
//
// The cache memoizes a policy's rule: for a key {opcode, source-1 taint,
// source-2 taint, memory taint}, it holds the result taint and a bit that
// says whether the combination raises a taint exception. It is direct
// mapped, with 128 entries by default, so one lookup takes one cycle. The
// index is the key folded to 7 bits by XOR of 7-bit chunks. The published
// design gives the 7-bit fold, the entry contents and the size, but not the
// fold function, so the XOR is this design's choice. Each entry stores its
// full key as its tag, which makes a hit exact for any fold.
//
// The software miss handler fills the cache through the fill port, much as
// a TLB is filled. flash_clr invalidates every entry in one cycle. It is
// pulsed whenever the handler-address register is written, so entries of
// an old policy are never used.
//
// Timing: the lookup port is combinational. A fill or flash clear takes
// effect at the next rising edge, and flash clear wins over a same-cycle
// fill. There is a single lookup port, as in the published design.
module tpc
  import ft_pkg::*;
#(
  parameter int unsigned ENTRIES = 128,
  localparam int unsigned IW     = $clog2(ENTRIES)
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     flash_clr,
  // lookup
  input  tpc_key_t lk_key,
  output logic     lk_hit,
  output taint_t   lk_taint,
  output logic     lk_exc,
  // fill from the miss handler
  input  logic     fill_en,
  input  tpc_key_t fill_key,
  input  taint_t   fill_taint,
  input  logic     fill_exc
);
  typedef struct packed {
    tpc_key_t key;
    taint_t   taint;
    logic     exc;
  } entry_t;

  logic [ENTRIES-1:0] valid;
  entry_t             ent [ENTRIES];

  function automatic logic [IW-1:0] idx_of(input tpc_key_t k);
    logic [TPC_IDX_W-1:0] f;
    f = tpc_fold(k);
    return IW'(f);
  endfunction

  logic [IW-1:0] lk_idx, fill_idx;
  assign lk_idx   = idx_of(lk_key);
  assign fill_idx = idx_of(fill_key);

  assign lk_hit   = valid[lk_idx] && ent[lk_idx].key == lk_key;
  assign lk_taint = ent[lk_idx].taint;
  assign lk_exc   = ent[lk_idx].exc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid <= '0;
    else if (flash_clr) valid <= '0;
    else if (fill_en) valid[fill_idx] <= 1'b1;
  end

  always_ff @(posedge clk)
    if (fill_en) ent[fill_idx] <= '{key: fill_key, taint: fill_taint, exc: fill_exc};
endmodule
