// tb_ft_config: self-checking test of the control registers. It checks
// reset values, read-back, the kernel-only rule for the handler register,
// the TPC flash-clear pulse on a handler write, FTCR clamping, filter-entry
// write strobes, and that writes wait while the engine is busy. Then 2000
// random accesses (any register, either mode, engine busy or idle) are
// checked cycle by cycle against a model of the registers.
module tb_ft_config;
  import ft_pkg::*;
  logic clk = 0, rst_n = 0;
  logic idle, cfg_valid, cfg_ready, cfg_we, cfg_kernel, cfg_err;
  cfg_sel_e cfg_sel;
  opc_t cfg_opc;
  addr_t cfg_wdata, cfg_rdata, tpchr, mtbr;
  logic [TSIZE_W-1:0] tsize;
  logic tpc_flash_clr, filt_wr_en;
  opc_t filt_wr_opc;
  filter_e filt_wr_entry, filt_rd_entry;
  int checks = 0, failures = 0;

  ft_config dut (.*);
  assign filt_rd_entry = filter_e'(cfg_opc[1:0]);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(input cfg_sel_e s, input addr_t d, input logic k, input opc_t o = '0);
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_sel = s; cfg_wdata = d; cfg_kernel = k; cfg_opc = o;
    #1;
    chk(tpc_flash_clr == (s == CFG_TPCHR && k && idle), "flash clear pulse");
    chk(cfg_err == (s == CFG_TPCHR && !k && idle), "user write refused");
    chk(filt_wr_en == (s == CFG_FILTER && idle), "filter strobe");
    @(posedge clk);
    #1 cfg_valid = 0; cfg_we = 0;
  endtask

  initial begin
    idle = 1; cfg_valid = 0; cfg_we = 0; cfg_sel = CFG_TPCHR; cfg_opc = '0;
    cfg_wdata = '0; cfg_kernel = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    #1 chk(tsize == 0 && tpchr == 0 && mtbr == 0, "reset values");
    wr(CFG_TPCHR, 32'h0040_1000, 1);
    chk(tpchr == 32'h0040_1000, "kernel TPCHR write");
    wr(CFG_TPCHR, 32'hdead_beef, 0);
    chk(tpchr == 32'h0040_1000, "user TPCHR write ignored");
    wr(CFG_MTBR, 32'h8000_0000, 0);
    chk(mtbr == 32'h8000_0000, "MTBR write");
    wr(CFG_FTCR, 32'd2, 0);
    chk(tsize == 2, "FTCR write");
    wr(CFG_FTCR, 32'd40, 0);
    chk(tsize == 16, "FTCR clamped to 16");
    @(negedge clk);
    cfg_sel = CFG_FILTER; cfg_opc = 8'd7; cfg_wdata = 32'd2; cfg_valid = 1; cfg_we = 1;
    #1 chk(filt_wr_en && filt_wr_opc == 8'd7 && filt_wr_entry == FLT_ONECOPY, "filter write fields");
    @(posedge clk); #1 cfg_valid = 0; cfg_we = 0;
    // read back
    cfg_sel = CFG_MTBR;  #1 chk(cfg_rdata == 32'h8000_0000, "MTBR read");
    cfg_sel = CFG_TPCHR; #1 chk(cfg_rdata == 32'h0040_1000, "TPCHR read");
    cfg_sel = CFG_FTCR;  #1 chk(cfg_rdata == 32'd16, "FTCR read");
    cfg_sel = CFG_FILTER; cfg_opc = 8'd6; #1 chk(cfg_rdata == 32'd2, "filter read");
    // busy engine: the write waits
    idle = 0;
    @(negedge clk);
    cfg_valid = 1; cfg_we = 1; cfg_sel = CFG_FTCR; cfg_wdata = 32'd1; cfg_kernel = 1;
    #1 chk(!cfg_ready, "not ready while busy");
    @(posedge clk); #1 chk(tsize == 16, "no write while busy");
    idle = 1;
    @(posedge clk); #1 chk(tsize == 1, "write once idle");
    cfg_valid = 0;
    // random accesses against a model of the registers
    begin
      addr_t m_tpchr, m_mtbr;
      logic [TSIZE_W-1:0] m_tsize;
      logic w;
      m_tpchr = tpchr; m_mtbr = mtbr; m_tsize = tsize;
      for (int n = 0; n < 2000; n++) begin
        @(negedge clk);
        idle = ($urandom_range(0, 3) != 0);
        cfg_valid = $urandom_range(0, 1); cfg_we = $urandom_range(0, 1);
        cfg_sel = cfg_sel_e'($urandom_range(0, 3)); cfg_kernel = $urandom_range(0, 1);
        cfg_opc = opc_t'($urandom);
        cfg_wdata = ($urandom_range(0, 1) != 0) ? addr_t'($urandom_range(0, 20)) : addr_t'($urandom);
        #1;
        w = cfg_valid && cfg_we && idle;
        chk(cfg_ready == idle, "ready follows idle");
        chk(tpc_flash_clr == (w && cfg_sel == CFG_TPCHR && cfg_kernel), "random flash clear");
        chk(cfg_err == (w && cfg_sel == CFG_TPCHR && !cfg_kernel), "random refusal");
        chk(filt_wr_en == (w && cfg_sel == CFG_FILTER) && filt_wr_opc == cfg_opc &&
            filt_wr_entry == filter_e'(cfg_wdata[1:0]), "random filter strobe");
        case (cfg_sel)
          CFG_TPCHR: chk(cfg_rdata == m_tpchr, "random TPCHR read");
          CFG_FTCR:  chk(cfg_rdata == 32'(m_tsize), "random FTCR read");
          CFG_MTBR:  chk(cfg_rdata == m_mtbr, "random MTBR read");
          default:   chk(cfg_rdata == 32'(cfg_opc[1:0]), "random filter read");
        endcase
        if (w) case (cfg_sel)
          CFG_TPCHR: if (cfg_kernel) m_tpchr = cfg_wdata;
          CFG_FTCR:  m_tsize = (cfg_wdata > 16) ? 5'd16 : 5'(cfg_wdata);
          CFG_MTBR:  m_mtbr = cfg_wdata;
          default: ;
        endcase
        @(posedge clk);
        #1 chk(tpchr == m_tpchr && tsize == m_tsize && mtbr == m_mtbr, "random register state");
      end
      cfg_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
