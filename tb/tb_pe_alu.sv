// tb_pe_alu - self-checking test of the PE functional unit.
//
// Drives random operands through every operation code of a full-ISA ALU and
// of an ALU without multiplier, and compares the results with a reference
// computed here in 32-bit arithmetic and truncated to 16 bits. A disabled
// operation must give 0.
module tb_pe_alu;
  import cgra_pkg::*;

  localparam int DW = 16;

  alu_op_e       op;
  logic [DW-1:0] a, b, c, y_all, y_nomul;
  int checks = 0, failures = 0;

  pe_alu #(.DW(DW), .ISA(ISA_ALL))    dut_all   (.op(op), .a(a), .b(b), .c(c), .y(y_all));
  pe_alu #(.DW(DW), .ISA(ISA_NO_MUL)) dut_nomul (.op(op), .a(a), .b(b), .c(c), .y(y_nomul));

  function automatic logic [DW-1:0] ref_op(int o, int unsigned x, int unsigned y, int unsigned z);
    int unsigned r;
    case (o)
      1:  r = x + y;
      2:  r = x - y;
      3:  r = x * y;
      4:  r = x & y;
      5:  r = x | y;
      6:  r = ~x;
      7:  r = x * y + z;
      8:  r = x + y + z;
      9:  r = x - y - z;
      10: r = x + y - z;
      11: r = ((z & 32'hFFFF) != 0) ? y : x;
      12: r = x;
      default: r = 0;
    endcase
    return r[DW-1:0];
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 200; it++) begin
      for (int o = 0; o < 16; o++) begin
        logic [DW-1:0] exp_all, exp_nomul;
        op = alu_op_e'(o);
        a = DW'($urandom);
        b = DW'($urandom);
        c = (it % 4 == 0) ? '0 : DW'($urandom);
        #1;
        exp_all   = (o <= 12) ? ref_op(o, a, b, c) : '0;
        exp_nomul = (o == 3 || o == 7) ? '0 : exp_all;
        checks += 2;
        if (y_all !== exp_all) begin
          failures++;
          if (failures < 10) $display("op %0d a=%h b=%h c=%h: got %h expected %h", o, a, b, c, y_all, exp_all);
        end
        if (y_nomul !== exp_nomul) begin
          failures++;
          if (failures < 10) $display("no-mul op %0d: got %h expected %h", o, y_nomul, exp_nomul);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
