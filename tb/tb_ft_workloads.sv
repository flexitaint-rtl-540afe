// tb_ft_workloads: the evaluated policies on the evaluated taint L1 sizes.
//
// Four engines run side by side, each with its own taint L1 geometry: the
// default 4 KB with 64-byte lines, the 2 KB and 8 KB sizes of the size
// study, and 4 KB with 32-byte lines from the line-size study. Each engine
// runs 1-bit input tainting, 1-bit heap-pointer tracking and the 2-bit
// combined policy in turn (ft_workload_run). The random instruction streams
// are generated here, not taken from real programs, so the printed rates
// show how the mechanisms behave, not the published overheads. Each commit
// is checked against a reference model. The test ends when all four are
// done, or at the watchdog.
module tb_ft_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic [N-1:0] done;
  int chk [N];
  int fail [N];

  ft_workload_run #(.TL1_BYTES(4096), .TL1_LINE(64), .NAME("tl1_4k_64b")) u_4k (
    .clk, .done(done[0]), .checks(chk[0]), .failures(fail[0]));
  ft_workload_run #(.TL1_BYTES(2048), .TL1_LINE(64), .NAME("tl1_2k_64b")) u_2k (
    .clk, .done(done[1]), .checks(chk[1]), .failures(fail[1]));
  ft_workload_run #(.TL1_BYTES(8192), .TL1_LINE(64), .NAME("tl1_8k_64b")) u_8k (
    .clk, .done(done[2]), .checks(chk[2]), .failures(fail[2]));
  ft_workload_run #(.TL1_BYTES(4096), .TL1_LINE(32), .NAME("tl1_4k_32b")) u_32 (
    .clk, .done(done[3]), .checks(chk[3]), .failures(fail[3]));

  function automatic void report(input int extra);
    int c, f;
    c = 0; f = extra;
    for (int i = 0; i < N; i++) begin c += chk[i]; f += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
  endfunction

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    $display("FAIL watchdog");
    report(1);
    $finish;
  end

  initial begin
    wait (&done);
    @(posedge clk);
    report(0);
    $finish;
  end
endmodule
