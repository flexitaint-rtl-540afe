// tb_filter_tpt: self-checking test of the Filter TPT. It checks the reset
// value (every entry 00) and then random writes against a reference table
// through all read ports.
module tb_filter_tpt;
  import ft_pkg::*;
  localparam int unsigned NOPC = 256, NRD = 5;
  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][7:0] rd_opc;
  filter_e [NRD-1:0]   rd_entry;
  logic                wr_en;
  logic [7:0]          wr_opc;
  filter_e             wr_entry;
  int checks = 0, failures = 0;
  filter_e ref_tbl [NOPC];

  filter_tpt #(.NOPC(NOPC), .NRD(NRD)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int o = 0; o < NOPC; o += NRD) begin
      for (int r = 0; r < NRD; r++) rd_opc[r] = 8'((o + r) % NOPC);
      #1;
      for (int r = 0; r < NRD; r++) begin
        checks++;
        if (rd_entry[r] !== ref_tbl[(o + r) % NOPC]) begin
          failures++;
          $display("FAIL opc %0d got %0d exp %0d", (o + r) % NOPC, rd_entry[r], ref_tbl[(o + r) % NOPC]);
        end
      end
    end
  endtask

  initial begin
    wr_en = 0; wr_opc = 0; wr_entry = FLT_TPC; rd_opc = '0;
    for (int i = 0; i < NOPC; i++) ref_tbl[i] = FLT_TPC;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check_all();
    for (int it = 0; it < 600; it++) begin
      @(negedge clk);
      wr_en    = 1;
      wr_opc   = 8'($urandom);
      wr_entry = filter_e'($urandom_range(0, 3));
      @(posedge clk);
      ref_tbl[wr_opc] = wr_entry;
      #1 wr_en = 0;
    end
    @(negedge clk);
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
