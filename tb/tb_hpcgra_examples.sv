// tb_hpcgra_examples - the two published 2x2 examples, run on hpcgra.
//
// 1. Vector sum c[i] = a[i] + b[i] on a homogeneous 2x2 mesh (PE ids 0 1 /
//    2 3), mapped instruction for instruction:
//      pass $0 $load            route $0 $alu $2
//      add  $2 #1 $load $0      route $2 $alu $3
//      pass $3 $2               route $3 $alu $store
//    a enters PE0 (in[0]) and b enters PE2 (in[1]) in the same cycle; the
//    sum leaves PE3 (out[1]) three cycles later.
// 2. The heterogeneous 2x2 mesh of the sample description, 16-bit:
//      PE0 input,  one routing,  queue 0, ops {sub, add}
//      PE1 output, full routing, queue 0, ops {or, and}
//      PE2 input,  no routing,   queue 2, ops {madd}
//      PE3 output, one routing,  queue 2, ops {mux, not}
//    configured as PE0: t = a - K0; PE1: out[0] = t & K1;
//    PE2: m = b(delayed 1) * t + K2; PE3: out[1] = ~m. Expected
//    out[0](t) = (in[0](t-2) - K0) & K1 and
//    out[1](t) = ~(in[1](t-3) * (in[0](t-3) - K0) + K2).
//    PE2 is then given "add", which is outside its operation set: its result
//    becomes 0, so out[1] must read ~0.
module tb_hpcgra_examples;
  import cgra_pkg::*;

  localparam int DW = 16, IDW = 2, H = 8;
  localparam logic [DW-1:0] K0 = 16'h0011, K1 = 16'h0FF0, K2 = 16'h0303;
  localparam logic [3:0] N = 4'd0, E = 4'd1, S = 4'd2, W = 4'd3;

  localparam route_e      FIG_ROUTE [4] = '{ROUTE_ONE, ROUTE_FULL, ROUTE_NONE, ROUTE_ONE};
  localparam int          FIG_EQ    [4] = '{0, 0, 2, 2};
  localparam logic [15:0] FIG_ISA   [4] = '{
    (16'd1 << OP_SUB) | (16'd1 << OP_ADD),
    (16'd1 << OP_OR)  | (16'd1 << OP_AND),
    (16'd1 << OP_MADD),
    (16'd1 << OP_MUX) | (16'd1 << OP_NOT)};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sum = 0, n_het = 0, n_isa = 0;

  logic            valid;
  logic [IDW-1:0]  id;
  pe_cfg_t         word;
  logic [DW-1:0]   cnst;
  logic [DW-1:0]   in_d [2];
  logic [DW-1:0]   o_sum [2], o_het [2];

  hpcgra #(.ROWS(2), .COLS(2), .DW(DW), .PATTERN(PAT_MESH), .ROUTE(ROUTE_FULL), .EQ_DEPTH(2))
    u_sum (.clk, .rst_n, .cfg_valid(valid), .cfg_id(id), .cfg_word(word), .cfg_const(cnst),
           .in_data(in_d), .out_data(o_sum));

  hpcgra #(.ROWS(2), .COLS(2), .DW(DW), .PATTERN(PAT_MESH),
           .PE_ROUTE(FIG_ROUTE), .PE_EQ(FIG_EQ), .PE_ISA(FIG_ISA))
    u_het (.clk, .rst_n, .cfg_valid(valid), .cfg_id(id), .cfg_word(word), .cfg_const(cnst),
           .in_data(in_d), .out_data(o_het));

  logic [DW-1:0] hist [H][2];
  bit chk_sum = 0, chk_het = 0, isa_off = 0;

  task automatic check(string nm, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 15) $display("%0t %s: got %h expected %h", $time, nm, got, exp);
    end
  endtask

  function automatic pe_cfg_t mk(alu_op_e op, logic [3:0] s0, logic [2:0] d0,
                                 logic [3:0] s1, logic [2:0] d1, logic [3:0] s2);
    pe_cfg_t w;
    w = '0;
    w.op = op;
    w.src[0] = s0; w.dly[0] = d0;
    w.src[1] = s1; w.dly[1] = d1;
    w.src[2] = s2;
    return w;
  endfunction

  // both arrays see the same configuration word
  task automatic send(int pe, pe_cfg_t w, logic [DW-1:0] k);
    @(negedge clk);
    valid = 1; id = IDW'(pe); word = w; cnst = k;
    @(negedge clk);
    valid = 0;
  endtask

  task automatic cycle();
    logic [DW-1:0] t2, t3;
    @(negedge clk);
    for (int i = H - 1; i > 0; i--) hist[i] = hist[i-1];
    for (int r = 0; r < 2; r++) in_d[r] = DW'($urandom);
    hist[0] = in_d;
    if (chk_sum) begin
      check("vector sum", o_sum[1], hist[3][0] + hist[3][1]);
      n_sum++;
    end
    if (chk_het) begin
      t2 = hist[2][0] - K0;
      t3 = hist[3][0] - K0;
      check("sample PE1", o_het[0], t2 & K1);
      check("sample PE3", o_het[1], isa_off ? ~16'h0 : ~DW'(32'(hist[3][1]) * 32'(t3) + 32'(K2)));
      if (isa_off) n_isa++; else n_het++;
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
    pe_cfg_t w;
    valid = 0; id = '0; word = '0; cnst = '0;
    in_d[0] = '0; in_d[1] = '0;
    for (int i = 0; i < H; i++) begin hist[i][0] = '0; hist[i][1] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- example 1: vector sum (both arrays receive it; only u_sum is checked)
    w = mk(OP_PASS, SRC_LOAD, 0, 0, 0, 0); w.route[S] = RSEL_ALU;          send(0, w, '0);
    w = mk(OP_ADD, SRC_LOAD, 1, N, 0, 0);  w.route[E] = RSEL_ALU;          send(2, w, '0);
    w = mk(OP_PASS, W, 0, 0, 0, 0);        w.route[STORE_SLOT] = RSEL_ALU; send(3, w, '0);
    repeat (H + 4) cycle();
    chk_sum = 1;
    repeat (60) cycle();
    chk_sum = 0;

    // ---- example 2: the heterogeneous sample array (u_sum is reconfigured too
    // but no longer checked)
    w = mk(OP_SUB, SRC_LOAD, 0, SRC_CONST, 0, 0);          w.route[0] = RSEL_ALU;          send(0, w, K0);
    w = mk(OP_AND, W, 0, SRC_CONST, 0, 0);                 w.route[STORE_SLOT] = RSEL_ALU; send(1, w, K1);
    w = mk(OP_MADD, SRC_LOAD, 1, N, 0, SRC_CONST);                                         send(2, w, K2);
    w = mk(OP_NOT, W, 0, 0, 0, 0);                         w.route[0] = RSEL_ALU;          send(3, w, '0);
    repeat (H + 4) cycle();
    chk_het = 1;
    repeat (60) cycle();

    // PE2 asked for an operation it does not have
    chk_het = 0;
    w = mk(OP_ADD, SRC_LOAD, 1, N, 0, 0);
    send(2, w, '0);
    repeat (H + 4) cycle();
    isa_off = 1; chk_het = 1;
    repeat (30) cycle();

    checks++;
    if (n_sum == 0 || n_het == 0 || n_isa == 0) begin
      failures++;
      $display("example not exercised");
    end
    $display("vector-sum results=%0d sample-array results=%0d missing-operation results=%0d", n_sum, n_het, n_isa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
