// tb_hpcgra_sweep - one kernel on every evaluated array configuration.
//
// Twelve 3x4 arrays cover the four neighbour patterns times the three
// routing styles; their queue depths rotate through 0, 2 and 4 so that every
// routing style meets every depth. All receive the same configuration, which
// works whatever the routing style because every PE sends its ALU result to
// all its outputs:
//   PE(0,0) pass load            -> south
//   PE(1,0) add  load #1, north  -> east
//   PE(1,1), PE(1,2) pass west   -> east
//   PE(1,3) pass west            -> store (out[1])
// With a queue the two operands of the add are aligned and
// out[1](t) = in[0](t-5) + in[1](t-5). Without a queue (depth 0) the
// requested delay cannot be applied: the add then sees the north operand one
// cycle late, out[1](t) = in[0](t-5) + in[1](t-4), which is the delay
// mismatch the queues exist to remove.
module tb_hpcgra_sweep;
  import cgra_pkg::*;

  localparam int R = 3, C = 4, DW = 16, IDW = 4, H = 16, NCFG = 12;
  localparam logic [3:0] N = 4'd0, W = 4'd3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_run [NCFG];

  logic           valid;
  logic [IDW-1:0] id;
  pe_cfg_t        word;
  logic [DW-1:0]  cnst;
  logic [DW-1:0]  in_d [R];
  logic [DW-1:0]  outs [NCFG][R];

  function automatic int eq_of(int g);
    return ((g + g / 3) % 3) * 2;
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    hpcgra #(.ROWS(R), .COLS(C), .DW(DW), .PATTERN(pattern_e'(g / 3)), .ROUTE(route_e'(g % 3)),
             .EQ_DEPTH(((g + g / 3) % 3) * 2))
      u_dut (.clk, .rst_n, .cfg_valid(valid), .cfg_id(id), .cfg_word(word), .cfg_const(cnst),
             .in_data(in_d), .out_data(outs[g]));
  end

  logic [DW-1:0] hist [H][R];
  bit chk = 0;

  function automatic pe_cfg_t mk(alu_op_e op, logic [3:0] s0, logic [2:0] d0, logic [3:0] s1);
    pe_cfg_t w;
    w = '0;
    w.op = op;
    w.src[0] = s0; w.dly[0] = d0;
    w.src[1] = s1;
    return w;
  endfunction

  task automatic send(int pe, pe_cfg_t w);
    @(negedge clk);
    valid = 1; id = IDW'(pe); word = w; cnst = '0;
    @(negedge clk);
    valid = 0;
  endtask

  task automatic cycle();
    @(negedge clk);
    for (int i = H - 1; i > 0; i--) hist[i] = hist[i-1];
    for (int r = 0; r < R; r++) in_d[r] = DW'($urandom);
    hist[0] = in_d;
    if (chk)
      for (int g = 0; g < NCFG; g++) begin
        logic [DW-1:0] e;
        e = (eq_of(g) == 0) ? hist[C+1][0] + hist[C][1] : hist[C+1][0] + hist[C+1][1];
        checks++;
        n_run[g]++;
        if (outs[g][1] !== e) begin
          failures++;
          if (failures < 15)
            $display("pattern %0d route %0d queue %0d: got %h expected %h", g / 3, g % 3, eq_of(g), outs[g][1], e);
        end
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
    valid = 0; id = '0; word = '0; cnst = '0;
    for (int g = 0; g < NCFG; g++) n_run[g] = 0;
    for (int r = 0; r < R; r++) in_d[r] = '0;
    for (int i = 0; i < H; i++) for (int r = 0; r < R; r++) hist[i][r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    send(0 * C + 0, mk(OP_PASS, SRC_LOAD, 0, 0));
    send(1 * C + 0, mk(OP_ADD, SRC_LOAD, 1, N));
    for (int c = 1; c < C; c++) send(1 * C + c, mk(OP_PASS, W, 0, 0));
    repeat (H + R + C) cycle();
    chk = 1;
    repeat (80) cycle();

    checks++;
    for (int g = 0; g < NCFG; g++)
      if (n_run[g] == 0) begin
        failures++;
        $display("configuration %0d never ran", g);
        break;
      end
    $display("configurations run: %0d patterns x 3 routing styles, queue depths 0/2/4", NCFG / 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
