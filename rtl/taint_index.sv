// taint_index: turns a data address into the address of its taint.
//
// Memory taints live in a packed array in ordinary virtual memory. Its base
// address is held in the Memory Taint Base Register (MTBR), and it holds one
// taint per 32-bit data word. The published design specifies this layout.
// The taint of word w starts at bit w * S of the array, where the slot
// width S is the configured taint size rounded up to a power of two (1, 2,
// 4, 8 or 16 bits). The rounding is this design's choice: it keeps a slot
// inside one byte, or one aligned byte pair, and so inside one cache line.
// The outputs are the byte address of the slot and the bit position of
// the slot inside that byte. The block is purely combinational.
module taint_index
  import ft_pkg::*;
(
  input  addr_t                data_addr,
  input  addr_t                mtbr,
  input  logic [TSIZE_W-1:0]   tsize,
  output addr_t                taint_addr,
  output logic [2:0]           taint_bit
);
  logic [ADDR_W+3:0] bitoff;   // bit offset of the slot in the array
  always_comb begin
    bitoff     = (ADDR_W+4)'(data_addr[ADDR_W-1:2]) << slot_log2(tsize);
    taint_addr = mtbr + ADDR_W'(bitoff >> 3);
    taint_bit  = bitoff[2:0];
  end
endmodule
