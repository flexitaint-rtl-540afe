// filter_tpt: the Filter Taint Propagation Table.
//
// The table has one 2-bit entry per opcode: 256 opcodes make 512 bits, with
// no tags. An entry tells the engine which common-case shortcut it may use
// for that opcode instead of a Taint Propagation Cache lookup:
//   00  always look the TPC up;
//   01  all-zero source taints give a zero result, otherwise use the TPC;
//   10  as 01, and a single non-zero source taint is copied to the result.
// This encoding follows the published design. Code 11 is not defined there,
// and this design treats it like 00. The table has NRD combinational read
// ports, one per commit lane, and one synchronous write port. Software
// writes the write port when it installs a policy or restores a context.
// Reset clears every entry to 00, so every opcode uses the TPC until
// software sets filter rules; that reset value is this design's choice.
module filter_tpt
  import ft_pkg::*;
#(
  parameter int unsigned NOPC = 256,
  parameter int unsigned NRD  = 4,
  localparam int unsigned OW  = $clog2(NOPC)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NRD-1:0][OW-1:0] rd_opc,
  output filter_e [NRD-1:0]      rd_entry,
  input  logic                   wr_en,
  input  logic [OW-1:0]          wr_opc,
  input  filter_e                wr_entry
);
  filter_e tbl [NOPC];

  always_comb
    for (int unsigned r = 0; r < NRD; r++) rd_entry[r] = tbl[rd_opc[r]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NOPC; i++) tbl[i] <= FLT_TPC;
    end else if (wr_en) begin
      tbl[wr_opc] <= wr_entry;
    end
  end
endmodule
