// ft_tb_policy_pkg: the example propagation policies that the testbenches
// program into the engine, written as plain functions. The testbenches use
// them twice: as the software TPC miss handler, and as their own reference
// model.
//
// Three policies, as evaluated for this kind of engine:
//   POL_INPUT    1-bit input tainting: ALU results OR their sources, a load
//                ORs the address taint with the memory taint, a store ORs
//                the address and value taints, taintm0 marks memory as
//                input, and a jump through a tainted register raises an
//                exception.
//   POL_POINTER  1-bit heap-pointer tracking: add ORs and raises an
//                exception when both sources are pointers, sub XORs, a load
//                copies the memory taint, a store copies the value taint,
//                and taintr0 marks a fresh pointer.
//   POL_BOTH     2-bit: the left bit (bit 1) follows POL_INPUT and the right
//                bit (bit 0) follows POL_POINTER.
// filt_of gives the Filter TPT entry each policy allows: 10 where the
// single-source copy holds, 01 where only the all-zero rule holds, and 00
// for the taint-marking opcodes, which always need the TPC. Opcodes are MIPS
// primary/function codes where one exists. taintm0 and taintr0 take two
// codes that MIPS leaves unused.
package ft_tb_policy_pkg;
  import ft_pkg::*;

  localparam opc_t OP_ADD = 8'h20, OP_SUB = 8'h22, OP_AND = 8'h24, OP_LW = 8'h23,
                   OP_SW = 8'h2b, OP_JR = 8'h08, OP_TAINTM0 = 8'hf0, OP_TAINTR0 = 8'hf8;

  typedef enum int { POL_INPUT = 0, POL_POINTER = 1, POL_BOTH = 2 } pol_e;

  function automatic int unsigned pol_tsize(input pol_e p);
    return (p == POL_BOTH) ? 2 : 1;
  endfunction

  // input tainting on one bit: result and exception
  function automatic logic [1:0] pol_in(input opc_t o, input logic a, input logic b,
                                        input logic m);
    case (o)
      OP_LW:      return {1'b0, a | m};
      OP_TAINTM0: return 2'b01;
      OP_TAINTR0: return 2'b00;
      OP_JR:      return {a, 1'b0};
      default:    return {1'b0, a | b};
    endcase
  endfunction

  // heap-pointer tracking on one bit: result and exception
  function automatic logic [1:0] pol_ptr(input opc_t o, input logic a, input logic b,
                                         input logic m);
    case (o)
      OP_ADD:     return {a & b, a | b};
      OP_SUB:     return {1'b0, a ^ b};
      OP_LW:      return {1'b0, m};
      OP_SW:      return {1'b0, b};
      OP_TAINTM0: return 2'b00;
      OP_TAINTR0: return 2'b01;
      OP_JR:      return 2'b00;
      default:    return {1'b0, a | b};
    endcase
  endfunction

  // result taint (bits 15:0) and exception (bit 16)
  function automatic logic [16:0] policy(input pol_e p, input opc_t o, input taint_t t1,
                                         input taint_t t2, input taint_t tm);
    logic [1:0] i, q;
    case (p)
      POL_INPUT: begin
        i = pol_in(o, t1[0], t2[0], tm[0]);
        return {i[1], 15'b0, i[0]};
      end
      POL_POINTER: begin
        q = pol_ptr(o, t1[0], t2[0], tm[0]);
        return {q[1], 15'b0, q[0]};
      end
      default: begin
        i = pol_in(o, t1[1], t2[1], tm[1]);
        q = pol_ptr(o, t1[0], t2[0], tm[0]);
        return {i[1] | q[1], 14'b0, i[0], q[0]};
      end
    endcase
  endfunction

  function automatic filter_e filt_of(input pol_e p, input opc_t o);
    case (o)
      OP_ADD, OP_SUB, OP_AND: return FLT_ONECOPY;
      OP_LW, OP_SW:           return (p == POL_INPUT) ? FLT_ONECOPY : FLT_ZERO;
      OP_JR:                  return FLT_ZERO;
      default:                return FLT_TPC;
    endcase
  endfunction
endpackage
