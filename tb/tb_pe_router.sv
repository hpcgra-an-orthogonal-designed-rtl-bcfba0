// tb_pe_router - self-checking test of the three PE routing styles.
//
// Three routers (no, one, full routing) with 4 neighbour inputs and 5
// outputs see the same random ALU value, inputs and selects each cycle. One
// clock later the outputs must hold: the ALU value (no routing); the single
// source named by sel[0] on every output (one routing); per output the source
// named by its own select (full routing). Selects outside 0..4 give 0.
module tb_pe_router;
  import cgra_pkg::*;

  localparam int DW = 16, NIN = 4, NOUT = 5;

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] alu;
  logic [DW-1:0] in [NIN];
  logic [3:0]    sel [NOUT];
  logic [DW-1:0] o_nr [NOUT], o_or [NOUT], o_fr [NOUT];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pe_router #(.DW(DW), .NIN(NIN), .NOUT(NOUT), .ROUTE(ROUTE_NONE)) u_nr (.clk, .rst_n, .alu, .in, .sel, .out(o_nr));
  pe_router #(.DW(DW), .NIN(NIN), .NOUT(NOUT), .ROUTE(ROUTE_ONE))  u_or (.clk, .rst_n, .alu, .in, .sel, .out(o_or));
  pe_router #(.DW(DW), .NIN(NIN), .NOUT(NOUT), .ROUTE(ROUTE_FULL)) u_fr (.clk, .rst_n, .alu, .in, .sel, .out(o_fr));

  function automatic logic [DW-1:0] src(logic [3:0] s, logic [DW-1:0] a, logic [DW-1:0] i [NIN]);
    if (s == 0) return a;
    if (s <= NIN) return i[s-1];
    return '0;
  endfunction

  task automatic check(string nm, int j, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s out %0d: got %h expected %h", nm, j, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] e_alu;
    logic [DW-1:0] e_in [NIN];
    logic [3:0]    e_sel [NOUT];
    alu = '0;
    for (int k = 0; k < NIN; k++) in[k] = '0;
    for (int j = 0; j < NOUT; j++) sel[j] = '0;
    repeat (2) @(posedge clk);
    // after reset all outputs are 0
    for (int j = 0; j < NOUT; j++) check("reset", j, o_fr[j], '0);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      alu = DW'($urandom);
      for (int k = 0; k < NIN; k++) in[k] = DW'($urandom);
      for (int j = 0; j < NOUT; j++) sel[j] = ($urandom % 8 == 0) ? 4'd7 : 4'($urandom % 5);
      e_alu = alu; e_in = in; e_sel = sel;
      @(posedge clk);
      #1;
      for (int j = 0; j < NOUT; j++) begin
        check("none", j, o_nr[j], e_alu);
        check("one",  j, o_or[j], src(e_sel[0], e_alu, e_in));
        check("full", j, o_fr[j], src(e_sel[j], e_alu, e_in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
