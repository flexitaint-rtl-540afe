// flexitaint: a programmable taint-propagation engine placed behind an
// out-of-order core's commit stage.
//
// The engine keeps one taint (0 to 16 bits, set at run time) for every
// architectural register and for every 32-bit memory word. The memory taints
// form a packed array in ordinary memory and are cached in a small taint L1
// (TL1). Committed instructions pass, in order, through a four-stage
// pipeline (ft_pipeline). It reads the source taints, applies a cheap filter
// rule or looks up the Taint Propagation Cache (TPC), writes the result taint
// and then lets the instruction commit. The propagation policy is software:
// a TPC miss calls a handler at the address in TPCHR, and the handler fills
// the TPC entry. The core sends a taint prefetch for every load and store as
// soon as it knows the data address, so the pre-commit TL1 read normally
// hits.
//
// Blocks: ft_config (TPCHR, FTCR, MTBR, Filter TPT access), ft_pipeline (with
// TRF, Filter TPT and TPC inside), taint_l1, and a taint_index on the
// prefetch path.
//
// Interfaces, all synchronous to clk with an active-low asynchronous reset:
//   cfg_*      register access; writes are accepted only while the engine is
//              empty
//   in_*       committed bundles from the core (valid/ready)
//   pf_*       taint prefetch: the data address of a load or store
//   tpc_*      miss report to the core, which runs the handler; fill port
//   ld_taint_* a load's taint has been read, which ends its replay window
//   st_*       data-L1 write handshake for an atomic store commit
//   cm_*       instructions committed this cycle, with taint exception flags
//   inv_*      coherence invalidation of one taint line (by taint address),
//              as the data cache gets them for data lines
//   mem_*      the TL1's line port to the L2
// The block structure and sizes follow the published design. The port
// protocols are this design's own.
module flexitaint
  import ft_pkg::*;
#(
  parameter int unsigned W          = NLANES,
  parameter int unsigned TL1_BYTES  = 4096,
  parameter int unsigned TL1_WAYS   = 4,
  parameter int unsigned TL1_LINE   = 64,
  parameter int unsigned TL1_PORTS  = 2,
  localparam int unsigned LINE_BITS = TL1_LINE * 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration
  input  logic                      cfg_valid,
  output logic                      cfg_ready,
  input  logic                      cfg_we,
  input  cfg_sel_e                  cfg_sel,
  input  opc_t                      cfg_opc,
  input  addr_t                     cfg_wdata,
  input  logic                      cfg_kernel,
  output addr_t                     cfg_rdata,
  output logic                      cfg_err,
  // committed instructions
  input  logic                      in_valid,
  output logic                      in_ready,
  input  ft_instr_t [W-1:0]         in_bundle,
  // taint prefetch
  input  logic                      pf_valid,
  input  addr_t                     pf_addr,
  // TPC miss handler
  output logic                      tpc_miss,
  output tpc_key_t                  tpc_miss_key,
  output addr_t                     tpc_handler,
  input  logic                      tpc_fill_en,
  input  tpc_key_t                  tpc_fill_key,
  input  taint_t                    tpc_fill_taint,
  input  logic                      tpc_fill_exc,
  // load replay window
  output logic [W-1:0]              ld_taint_read,
  output logic [W-1:0][TAG_W-1:0]   ld_taint_tag,
  // data L1 store handshake
  output logic                      st_valid,
  output addr_t                     st_addr,
  input  logic                      st_dl1_hit,
  output logic                      st_dl1_we,
  // commit
  output logic [W-1:0]              cm_valid,
  output logic [W-1:0][TAG_W-1:0]   cm_tag,
  output taint_t [W-1:0]            cm_taint,
  output logic [W-1:0]              cm_exc,
  output ft_events_t                events,
  // coherence invalidation of a taint line
  input  logic                      inv_valid,
  input  addr_t                     inv_addr,
  output logic                      inv_ready,
  // TL1 line port to the L2
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_we,
  output addr_t                     mem_req_addr,
  output logic [LINE_BITS-1:0]      mem_req_wdata,
  input  logic                      mem_resp_valid,
  input  logic [LINE_BITS-1:0]      mem_resp_data,
  output logic                      tl1_busy
);
  addr_t              tpchr, mtbr;
  logic [TSIZE_W-1:0] tsize;
  logic               idle, flash_clr, filt_wr_en;
  opc_t               filt_wr_opc;
  filter_e            filt_wr_entry, filt_rd_entry;

  ft_config u_cfg (
    .clk, .rst_n, .idle,
    .cfg_valid, .cfg_ready, .cfg_we, .cfg_sel, .cfg_opc, .cfg_wdata,
    .cfg_kernel, .cfg_rdata, .cfg_err,
    .tpchr, .tsize, .mtbr, .tpc_flash_clr(flash_clr),
    .filt_wr_en, .filt_wr_opc, .filt_wr_entry, .filt_rd_entry
  );

  logic [TL1_PORTS-1:0]      rd_valid, rd_hit;
  addr_t [TL1_PORTS-1:0]     rd_addr;
  logic [TL1_PORTS-1:0][2:0] rd_bit;
  taint_t [TL1_PORTS-1:0]    rd_data;
  logic                      wr_valid, wr_en, wr_hit, inv_hit;
  addr_t                     wr_addr;
  logic [2:0]                wr_bit;
  taint_t                    wr_mask, wr_data;

  ft_pipeline #(.W(W), .NRD(TL1_PORTS)) u_pipe (
    .clk, .rst_n,
    .tsize, .mtbr, .tpchr, .tpc_flash_clr(flash_clr),
    .filt_wr_en, .filt_wr_opc, .filt_wr_entry,
    .filt_rd_opc(cfg_opc), .filt_rd_entry, .idle,
    .in_valid, .in_ready, .in_bundle,
    .tl1_rd_valid(rd_valid), .tl1_rd_addr(rd_addr), .tl1_rd_bit(rd_bit),
    .tl1_rd_hit(rd_hit), .tl1_rd_data(rd_data),
    .tl1_wr_valid(wr_valid), .tl1_wr_en(wr_en), .tl1_wr_addr(wr_addr),
    .tl1_wr_bit(wr_bit), .tl1_wr_mask(wr_mask), .tl1_wr_data(wr_data),
    .tl1_wr_hit(wr_hit), .tl1_inv(inv_valid && inv_ready && inv_hit),
    .tpc_miss, .tpc_miss_key, .tpc_handler,
    .tpc_fill_en, .tpc_fill_key, .tpc_fill_taint, .tpc_fill_exc,
    .ld_taint_read, .ld_taint_tag,
    .st_valid, .st_addr, .st_dl1_hit, .st_dl1_we,
    .cm_valid, .cm_tag, .cm_taint, .cm_exc, .events
  );

  // prefetch: data address to taint address; dropped while tainting is off
  addr_t      pf_taddr;
  logic [2:0] pf_tbit;
  taint_index u_pf_idx (
    .data_addr(pf_addr), .mtbr, .tsize,
    .taint_addr(pf_taddr), .taint_bit(pf_tbit)
  );

  taint_l1 #(
    .SIZE_BYTES(TL1_BYTES), .WAYS(TL1_WAYS), .LINE_BYTES(TL1_LINE), .NRD(TL1_PORTS)
  ) u_tl1 (
    .clk, .rst_n,
    .rd_valid, .rd_addr, .rd_bit, .rd_hit, .rd_data,
    .wr_valid, .wr_en, .wr_addr, .wr_bit, .wr_mask, .wr_data, .wr_hit,
    .pf_valid(pf_valid && tsize != '0), .pf_addr(pf_taddr),
    .inv_valid, .inv_addr, .inv_ready, .inv_hit,
    .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata),
    .resp_valid(mem_resp_valid), .resp_data(mem_resp_data),
    .busy(tl1_busy)
  );
endmodule
