// taint_regfile: the Taint Register File (TRF).
//
// Holds one taint per architectural register. Because the taint engine sits
// after commit, there is no renaming and only the architectural registers
// need a taint. Register 0 is hard-wired to a zero taint, as is the MIPS
// register it shadows. Both of these follow the published design.
//
// Interface: NRD combinational read ports and NWR write ports. Write ports
// are ordered by program order. When several write the same register in
// one cycle, the highest-numbered port wins. A read returns the value
// written in the same cycle, again taking the youngest writer. This
// write-through lets the first engine stage see the results the
// propagation stage produces in that cycle. Timing: writes take effect at
// the rising clock edge, and reset clears every taint. The port counts, the
// write-through and the reset value are this design's own choices.
module taint_regfile #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned W     = 16,
  parameter int unsigned NRD   = 8,
  parameter int unsigned NWR   = 4,
  localparam int unsigned RW   = $clog2(NREGS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NRD-1:0][RW-1:0] rd_idx,
  output logic [NRD-1:0][W-1:0]  rd_data,
  input  logic [NWR-1:0]         wr_en,
  input  logic [NWR-1:0][RW-1:0] wr_idx,
  input  logic [NWR-1:0][W-1:0]  wr_data
);
  logic [NREGS-1:0][W-1:0] regs;

  always_comb begin
    for (int unsigned r = 0; r < NRD; r++) begin
      rd_data[r] = regs[rd_idx[r]];
      for (int unsigned w = 0; w < NWR; w++)
        if (wr_en[w] && wr_idx[w] == rd_idx[r]) rd_data[r] = wr_data[w];
      if (rd_idx[r] == '0) rd_data[r] = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) regs <= '0;
    else begin
      for (int unsigned w = 0; w < NWR; w++)
        if (wr_en[w] && wr_idx[w] != '0) regs[wr_idx[w]] <= wr_data[w];
    end
  end
endmodule
