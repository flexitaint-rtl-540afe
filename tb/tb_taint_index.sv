// tb_taint_index: self-checking test of the data-to-taint address mapping.
// Expected values follow from one taint slot per 32-bit word, slot width
// rounded up to a power of two: bit offset = (addr / 4) * slot, byte =
// MTBR + offset / 8, bit = offset mod 8.
module tb_taint_index;
  import ft_pkg::*;
  addr_t data_addr, mtbr, taint_addr;
  logic [TSIZE_W-1:0] tsize;
  logic [2:0] taint_bit;
  int checks = 0, failures = 0;

  taint_index dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      longint unsigned slot, off;
      data_addr = $urandom;
      mtbr      = $urandom;
      tsize     = TSIZE_W'($urandom_range(1, 16));
      slot = (tsize <= 1) ? 1 : (tsize <= 2) ? 2 : (tsize <= 4) ? 4 : (tsize <= 8) ? 8 : 16;
      off  = longint'(data_addr / 4) * slot;
      #1;
      checks++;
      if (taint_addr !== addr_t'(mtbr + addr_t'(off / 8)) || taint_bit !== 3'(off % 8)) begin
        failures++;
        $display("FAIL addr %h size %0d got %h.%0d", data_addr, tsize, taint_addr, taint_bit);
      end
    end
    // a worked case: 2-bit taints, 64 data bytes map to 4 taint bytes
    data_addr = 32'h0000_1040; mtbr = 32'h8000_0000; tsize = 2; #1;
    checks++;
    if (taint_addr !== 32'h8000_0104 || taint_bit !== 3'd0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
