// tb_taint_regfile: self-checking test of the Taint Register File.
// Random writes on all write ports and random reads are compared with a
// reference array. It checks register 0 staying zero, youngest-writer
// priority among same-cycle writes, and same-cycle write-through to reads.
module tb_taint_regfile;
  localparam int unsigned NREGS = 32, W = 16, NRD = 8, NWR = 4, RW = 5;
  logic clk = 0, rst_n = 0;
  logic [NRD-1:0][RW-1:0] rd_idx;
  logic [NRD-1:0][W-1:0]  rd_data;
  logic [NWR-1:0]         wr_en;
  logic [NWR-1:0][RW-1:0] wr_idx;
  logic [NWR-1:0][W-1:0]  wr_data;
  int checks = 0, failures = 0;
  logic [W-1:0] ref_regs [NREGS];

  taint_regfile #(.NREGS(NREGS), .W(W), .NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_idx = '0; wr_en = '0; wr_idx = '0; wr_data = '0;
    for (int i = 0; i < NREGS; i++) ref_regs[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      @(negedge clk);
      for (int w = 0; w < NWR; w++) begin
        wr_en[w]   = 1'($urandom_range(0, 1));
        wr_idx[w]  = RW'($urandom_range(0, (it % 3 == 0) ? 3 : 31));
        wr_data[w] = W'($urandom);
      end
      for (int r = 0; r < NRD; r++) rd_idx[r] = RW'($urandom_range(0, (it % 3 == 0) ? 3 : 31));
      #1;
      for (int r = 0; r < NRD; r++) begin
        logic [W-1:0] exp;
        exp = ref_regs[rd_idx[r]];
        for (int w = 0; w < NWR; w++)
          if (wr_en[w] && wr_idx[w] == rd_idx[r]) exp = wr_data[w];
        if (rd_idx[r] == 0) exp = '0;
        checks++;
        if (rd_data[r] !== exp) begin
          failures++;
          $display("FAIL it=%0d port %0d reg %0d got %h exp %h", it, r, rd_idx[r], rd_data[r], exp);
        end
      end
      @(posedge clk);
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_idx[w] != 0) ref_regs[wr_idx[w]] = wr_data[w];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
