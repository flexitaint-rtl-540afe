// ft_pkg: types and constants shared by the taint-propagation engine.
//
// The engine sits behind the commit stage of an out-of-order core and
// handles one bundle of up to NLANES already-decoded, non-speculative
// instructions per cycle. Each instruction is described by an ft_instr_t:
// its opcode (or opcode class, 256 of them), up to two source registers,
// an optional destination register and whether it reads or writes the
// taint of a memory word. Taints are up to 16 bits wide; the live width is
// set at run time by the configuration register (0 turns the engine off).
//
// Sizes that follow the published design: 256 opcodes, 2-bit filter
// entries, 128-entry direct-mapped propagation cache indexed by a 7-bit
// fold of {opcode, source taints}, taints of up to 16 bits, 32 MIPS
// architectural registers, 4-wide commit, 32-bit addresses, one taint per
// 32-bit word. The field layout of the structs is this design's own.
package ft_pkg;

  localparam int unsigned NLANES    = 4;    // commit width (four-issue core)
  localparam int unsigned OPC_W     = 8;    // 256 opcodes
  localparam int unsigned MAXT      = 16;   // largest taint size, bits
  localparam int unsigned NREGS     = 32;   // architectural registers
  localparam int unsigned REG_W     = $clog2(NREGS);
  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned TAG_W     = 8;    // instruction id carried to commit
  localparam int unsigned TSIZE_W   = 5;    // FTCR taint-size field, 0..16
  localparam int unsigned KEY_W     = OPC_W + 3*MAXT; // TPC key
  localparam int unsigned TPC_IDX_W = 7;    // 128 entries

  typedef logic [MAXT-1:0]   taint_t;
  typedef logic [OPC_W-1:0]  opc_t;
  typedef logic [REG_W-1:0]  reg_t;
  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [KEY_W-1:0]  tpc_key_t;

  // Filter TPT entry encoding (published table of entry meanings).
  typedef enum logic [1:0] {
    FLT_TPC      = 2'b00,  // always look the TPC up
    FLT_ZERO     = 2'b01,  // all-zero sources give a zero taint
    FLT_ONECOPY  = 2'b10,  // a single non-zero source taint is copied
    FLT_RESERVED = 2'b11   // not defined; handled like FLT_TPC
  } filter_e;

  // One decoded instruction as delivered by the core's commit logic.
  typedef struct packed {
    logic             valid;
    logic [TAG_W-1:0] tag;      // id echoed at commit
    opc_t             opc;
    logic             rs1_en;   // first register source used
    reg_t             rs1;
    logic             rs2_en;   // second register source used
    reg_t             rs2;
    logic             rd_en;    // destination register taint is written
    reg_t             rd;
    logic             mem_rd;   // memory taint is a source (load)
    logic             mem_wr;   // memory taint is the result (store, taintm)
    logic             data_wr;  // also writes the data cache (store, not taintm)
    addr_t            addr;     // data address of the memory operand
  } ft_instr_t;

  typedef ft_instr_t [NLANES-1:0] bundle_t;

  // Per-cycle event counts, for performance counters and tests.
  typedef struct packed {
    logic [2:0] flt_zero;     // lanes resolved by the all-zero rule
    logic [2:0] flt_copy;     // lanes resolved by the single-source copy rule
    logic [2:0] tpc_hit;      // lanes resolved by a TPC hit (0 or 1)
    logic       tpc_miss;     // propagation stage waits for the miss handler
    logic [2:0] reg_fwd;      // same-cycle register taint forwards used
    logic [2:0] mem_fwd;      // memory taints forwarded from older stores
    logic       dep_stall;    // a lane waits for a same-cycle TPC result or port
    logic       tl1_stall;    // pre-commit stage waits for a TL1 fill
    logic       st_silent;    // a store committed with no taint write
    logic       st_write;     // a store committed with a taint write
    logic       st_retry;     // a store waits: DL1 or TL1 missed
    logic       tl1_inv;      // a coherence invalidation removed a TL1 line
  } ft_events_t;

  // Configuration register select.
  typedef enum logic [1:0] {
    CFG_TPCHR  = 2'd0,  // TPC miss handler address (kernel only)
    CFG_FTCR   = 2'd1,  // taint size 0..16
    CFG_MTBR   = 2'd2,  // memory taint array base
    CFG_FILTER = 2'd3   // one Filter TPT entry, selected by opcode
  } cfg_sel_e;

  // Fold a TPC key to its 7-bit index by XOR of 7-bit chunks.
  function automatic logic [TPC_IDX_W-1:0] tpc_fold(input tpc_key_t key);
    logic [TPC_IDX_W-1:0] f;
    f = '0;
    for (int unsigned i = 0; i < KEY_W; i += TPC_IDX_W)
      f ^= TPC_IDX_W'(key >> i);
    return f;
  endfunction

  // Mask selecting the live taint bits for a taint size.
  function automatic taint_t taint_mask(input logic [TSIZE_W-1:0] tsize);
    return (tsize >= TSIZE_W'(MAXT)) ? '1 : taint_t'((32'd1 << tsize) - 32'd1);
  endfunction

  // log2 of the storage slot per word: the taint size rounded up to a power
  // of two so that a slot never straddles a byte boundary it should not.
  function automatic logic [2:0] slot_log2(input logic [TSIZE_W-1:0] tsize);
    if (tsize <= 1)      return 3'd0;
    else if (tsize <= 2) return 3'd1;
    else if (tsize <= 4) return 3'd2;
    else if (tsize <= 8) return 3'd3;
    else                 return 3'd4;
  endfunction

endpackage
