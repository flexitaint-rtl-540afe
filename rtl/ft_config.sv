// ft_config: the engine's architectural control registers.
//
//   TPCHR  address of the software TPC miss handler. Writing it flash-clears
//          the TPC, so a policy change needs only this one write. A write is
//          honoured only in kernel mode; a user-mode write is refused and
//          reported on cfg_err.
//   FTCR   taint size, 0 to 16 bits. Zero turns taint propagation and the
//          taint cache off.
//   MTBR   virtual base address of the packed memory-taint array.
//   Filter one 2-bit Filter TPT entry per opcode, written through this port
//          and read back through filt_rd_entry (the table itself is
//          filter_tpt).
// Together these registers and the filter table are the process context that
// software saves and restores. The register set and its behaviour follow the
// published design.
//
// This design's own choices are the register port and the FTCR width. The
// port is a valid/ready handshake with a select, an opcode index for filter
// entries and a data word. A write is accepted only while the engine
// pipeline is empty (idle), so a mode or policy switch never lands in the
// middle of an instruction. An FTCR value above 16 is clamped to 16. The
// read data is combinational, and writes take effect at the rising edge.
// Reset clears every register, which leaves the engine off.
module ft_config
  import ft_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               idle,          // engine pipeline empty
  // software access
  input  logic               cfg_valid,
  output logic               cfg_ready,
  input  logic               cfg_we,
  input  cfg_sel_e           cfg_sel,
  input  opc_t               cfg_opc,
  input  addr_t              cfg_wdata,
  input  logic               cfg_kernel,
  output addr_t              cfg_rdata,
  output logic               cfg_err,       // refused user-mode TPCHR write
  // register values
  output addr_t              tpchr,
  output logic [TSIZE_W-1:0] tsize,
  output addr_t              mtbr,
  output logic               tpc_flash_clr,
  output logic               filt_wr_en,
  output opc_t               filt_wr_opc,
  output filter_e            filt_wr_entry,
  input  filter_e            filt_rd_entry  // entry at cfg_opc
);
  logic wr;
  assign cfg_ready = idle;
  assign wr        = cfg_valid && cfg_ready && cfg_we;
  assign cfg_err   = wr && cfg_sel == CFG_TPCHR && !cfg_kernel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tpchr <= '0;
      tsize <= '0;
      mtbr  <= '0;
    end else if (wr) begin
      unique case (cfg_sel)
        CFG_TPCHR: if (cfg_kernel) tpchr <= cfg_wdata;
        CFG_FTCR:  tsize <= (cfg_wdata > ADDR_W'(MAXT)) ? TSIZE_W'(MAXT)
                                                       : TSIZE_W'(cfg_wdata);
        CFG_MTBR:  mtbr  <= cfg_wdata;
        CFG_FILTER: ;
      endcase
    end
  end

  assign tpc_flash_clr = wr && cfg_sel == CFG_TPCHR && cfg_kernel;
  assign filt_wr_en    = wr && cfg_sel == CFG_FILTER;
  assign filt_wr_opc   = cfg_opc;
  assign filt_wr_entry = filter_e'(cfg_wdata[1:0]);

  always_comb begin
    unique case (cfg_sel)
      CFG_TPCHR:  cfg_rdata = tpchr;
      CFG_FTCR:   cfg_rdata = ADDR_W'(tsize);
      CFG_MTBR:   cfg_rdata = mtbr;
      default:    cfg_rdata = ADDR_W'(filt_rd_entry);
    endcase
  end
endmodule
