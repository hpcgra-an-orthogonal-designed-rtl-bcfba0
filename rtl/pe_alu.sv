// pe_alu - the functional unit at the core of every processing element.
//
// A purely combinational unit with three DW-bit operands a, b, c and the
// operation set add, sub, mul, and, or, not, madd, addadd, subsub, addsub,
// mux and pass (cgra_pkg::alu_op_e). The ternary operations are
// madd = a*b+c, addadd = a+b+c, subsub = a-b-c and addsub = a+b-c; mux picks
// b when c is non-zero and a otherwise. Arithmetic wraps modulo 2**DW, so
// signed and unsigned operands give the same bits. Operations are named by
// the design it follows; the operand order of the ternary forms, the mux
// condition and the no-operation code are this design's choice.
//
// ISA is a per-PE mask: bit i enables operation code i. A disabled operation
// yields 0, and synthesis removes its hardware; this is how a heterogeneous
// array drops the multiplier from some PEs.
//
// Ports: op (operation), a, b, c (operands), y (result, same cycle).
module pe_alu
  import cgra_pkg::*;
#(
  parameter int          DW  = 16,
  parameter logic [15:0] ISA = ISA_ALL
) (
  input  alu_op_e        op,
  input  logic [DW-1:0]  a,
  input  logic [DW-1:0]  b,
  input  logic [DW-1:0]  c,
  output logic [DW-1:0]  y
);

  logic [DW-1:0] prod;
  assign prod = a * b;

  always_comb begin
    y = '0;
    if (ISA[op]) begin
      case (op)
        OP_ADD:    y = a + b;
        OP_SUB:    y = a - b;
        OP_MUL:    y = prod;
        OP_AND:    y = a & b;
        OP_OR:     y = a | b;
        OP_NOT:    y = ~a;
        OP_MADD:   y = prod + c;
        OP_ADDADD: y = a + b + c;
        OP_SUBSUB: y = a - b - c;
        OP_ADDSUB: y = a + b - c;
        OP_MUX:    y = (c != '0) ? b : a;
        OP_PASS:   y = a;
        default:   y = '0;
      endcase
    end
  end

endmodule
