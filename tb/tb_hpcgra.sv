// tb_hpcgra - end-to-end test of the CGRA top level.
//
// Main array: hpcgra with every parameter at its default (9x9, 16-bit, mesh,
// full routing, queues of depth 2). All 81 PEs are configured through the
// configuration bus, one word per cycle, with two kernels; the rest are
// no-ops:
//   row 0/1  vector sum c = a + b. PE(0,0) passes its external input south;
//            PE(1,0) adds it to its own external input delayed one cycle by
//            the elastic queue; PEs (1,1)..(1,7) route the sum east without
//            computing; PE(1,8) passes it to its external output.
//            Expected out[1](t) = in[0](t-10) + in[1](t-10).
//   row 3    c = a*a + K1 - K2. PE(3,0) computes madd with its constant
//            register, PE(3,1) subtracts its constant, then route-through and
//            store as above. Expected out[3](t) = in[3](t-9)^2 + K1 - K2.
// While both kernels stream random data, PE(1,0) alone is rewritten from add
// to sub (partial reconfiguration); row 3 must keep producing correct
// results throughout, and row 1 must then give in[1] - in[0]. The number of
// edges a word needs to reach the far-corner PE is measured (ROWS + COLS).
//
// Pattern arrays: four 5x6 arrays (mesh/full routing, one-hop/one routing,
// diagonal/no routing with half the PEs lacking a multiplier, hexagonal/full
// routing). Every PE is set to output first id+1 and then (id+1)^2 from its
// constant register; each neighbour input of every PE must then carry the
// value of the PE that the pattern makes its neighbour in that slot, or 0 at
// the array edge, and a PE without multiplier must send 0.
//
// Each mechanism (elastic delay, route-through, constant operand, store,
// partial reconfiguration, each pattern and routing style, removed
// multiplier) is counted; one that never occurred counts as a failure.
module tb_hpcgra;
  import cgra_pkg::*;

  localparam int R = 9, C = 9, DW = 16, IDW = 7;
  localparam int PR = 5, PC = 6, PIDW = 5;
  localparam int H = 32;
  localparam logic [DW-1:0] K1 = 16'h1234, K2 = 16'h0042;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_delay = 0, n_route = 0, n_const = 0, n_store = 0, n_reconf = 0, n_other_row_during_reconf = 0;
  int n_pat [4] = '{0, 0, 0, 0};
  int n_nomul = 0;

  // ------------------------------------------------------------ main DUT
  logic            m_valid;
  logic [IDW-1:0]  m_id;
  pe_cfg_t         m_word;
  logic [DW-1:0]   m_const;
  logic [DW-1:0]   m_in  [R];
  logic [DW-1:0]   m_out [R];

  hpcgra dut (
    .clk, .rst_n, .cfg_valid(m_valid), .cfg_id(m_id), .cfg_word(m_word),
    .cfg_const(m_const), .in_data(m_in), .out_data(m_out));

  // --------------------------------------------------------- pattern DUTs
  logic            p_valid;
  logic [PIDW-1:0] p_id;
  pe_cfg_t         p_word;
  logic [DW-1:0]   p_const;
  logic [DW-1:0]   p_in [PR];
  logic [DW-1:0]   o_mesh [PR], o_hop [PR], o_diag [PR], o_hex [PR];

  hpcgra #(.ROWS(PR), .COLS(PC), .DW(DW), .PATTERN(PAT_MESH), .ROUTE(ROUTE_FULL), .EQ_DEPTH(2))
    d_mesh (.clk, .rst_n, .cfg_valid(p_valid), .cfg_id(p_id), .cfg_word(p_word), .cfg_const(p_const), .in_data(p_in), .out_data(o_mesh));
  hpcgra #(.ROWS(PR), .COLS(PC), .DW(DW), .PATTERN(PAT_ONE_HOP), .ROUTE(ROUTE_ONE), .EQ_DEPTH(0))
    d_hop (.clk, .rst_n, .cfg_valid(p_valid), .cfg_id(p_id), .cfg_word(p_word), .cfg_const(p_const), .in_data(p_in), .out_data(o_hop));
  hpcgra #(.ROWS(PR), .COLS(PC), .DW(DW), .PATTERN(PAT_DIAGONAL), .ROUTE(ROUTE_NONE), .EQ_DEPTH(4), .HALF_MUL(1'b1))
    d_diag (.clk, .rst_n, .cfg_valid(p_valid), .cfg_id(p_id), .cfg_word(p_word), .cfg_const(p_const), .in_data(p_in), .out_data(o_diag));
  hpcgra #(.ROWS(PR), .COLS(PC), .DW(DW), .PATTERN(PAT_HEXAGONAL), .ROUTE(ROUTE_FULL), .EQ_DEPTH(2))
    d_hex (.clk, .rst_n, .cfg_valid(p_valid), .cfg_id(p_id), .cfg_word(p_word), .cfg_const(p_const), .in_data(p_in), .out_data(o_hex));

  // ------------------------------------------------------------- helpers
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

  localparam logic [3:0] N = 4'd0, E = 4'd1, S = 4'd2, W = 4'd3;
  // route select naming neighbour input slot k
  function automatic logic [3:0] from_in(logic [3:0] k);
    return k + 4'd1;
  endfunction

  // configuration word for each main-array PE
  function automatic pe_cfg_t main_cfg(int r, int c, output logic [DW-1:0] k);
    pe_cfg_t w;
    w = '0;
    k = '0;
    if (r == 0 && c == 0) begin
      w = mk(OP_PASS, SRC_LOAD, 0, 0, 0, 0);
      w.route[S] = RSEL_ALU;
    end else if ((r == 1 || r == 3) && c == C - 1) begin
      w = mk(OP_PASS, W, 0, 0, 0, 0);
      w.route[STORE_SLOT] = RSEL_ALU;
    end else if (r == 1 && c == 0) begin
      w = mk(OP_ADD, SRC_LOAD, 1, N, 0, 0);          // add $id #1 $load $north
      w.route[E] = RSEL_ALU;
    end else if (r == 3 && c == 0) begin
      w = mk(OP_MADD, SRC_LOAD, 0, SRC_LOAD, 0, SRC_CONST);
      w.route[E] = RSEL_ALU;
      k = K1;
    end else if (r == 3 && c == 1) begin
      w = mk(OP_SUB, W, 0, SRC_CONST, 0, 0);
      w.route[E] = RSEL_ALU;
      k = K2;
    end else if (r == 1 || (r == 3 && c >= 2)) begin
      w.route[E] = from_in(W);                       // route-through west -> east
    end
    return w;
  endfunction

  // ------------------------------------------------------ stimulus history
  logic [DW-1:0] hist [H][R];
  bit row1_sub = 0;
  bit row1_chk = 0, row3_chk = 0;
  bit reconf_window = 0;

  task automatic cycle();
    @(negedge clk);
    for (int i = H - 1; i > 0; i--) hist[i] = hist[i-1];
    for (int r = 0; r < R; r++) m_in[r] = DW'($urandom);
    hist[0] = m_in;
    if (row1_chk) begin
      check("row1", m_out[1], row1_sub ? hist[C+1][1] - hist[C+1][0] : hist[C+1][0] + hist[C+1][1]);
      n_delay++; n_route++; n_store++;
    end
    if (row3_chk) begin
      check("row3", m_out[3], DW'(32'(hist[C][3]) * 32'(hist[C][3])) + K1 - K2);
      n_const++;
      if (reconf_window) n_other_row_during_reconf++;
    end
  endtask

  // ---------------------------------------------------- pattern reference
  function automatic int nslots(int p);
    return (p == 0) ? 4 : (p == 2) ? 8 : 6;
  endfunction

  // neighbour of (r, c) in slot k of pattern p: returns 0 if off-array
  function automatic bit nbr(int p, int r, int c, int k, output int rr, output int cc);
    int dr, dc;
    int tdr [4] = '{-1, 0, 1, 0};
    int tdc [4] = '{0, 1, 0, -1};
    if (k < 4) begin dr = tdr[k]; dc = tdc[k]; end
    else if (p == 1) begin dr = 0; dc = (k == 4) ? 2 : -2; end
    else if (p == 2) begin
      case (k) 4: begin dr = -1; dc = 1; end 5: begin dr = -1; dc = -1; end
               6: begin dr = 1; dc = 1; end default: begin dr = 1; dc = -1; end endcase
    end else begin
      dr = (k == 4) ? -1 : 1;
      dc = (r % 2 == 0) ? -1 : 1;
    end
    rr = r + dr; cc = c + dc;
    return rr >= 0 && rr < PR && cc >= 0 && cc < PC;
  endfunction

  function automatic logic [DW-1:0] pe_val(int p, int r, int c, bit mul);
    int id;
    id = r * PC + c + 1;
    if (!mul) return DW'(id);
    if (p == 2 && ((r + c) % 2 == 1)) return '0;   // no multiplier here
    return DW'(id * id);
  endfunction

  `define CHECK_LINKS(P, INST, MUL) \
    for (int r = 0; r < PR; r++) \
      for (int c = 0; c < PC; c++) \
        for (int k = 0; k < nslots(P); k++) begin \
          int rr, cc; \
          logic [DW-1:0] e; \
          e = nbr(P, r, c, k, rr, cc) ? pe_val(P, rr, cc, MUL) : '0; \
          check($sformatf("pattern %0d link (%0d,%0d) slot %0d", P, r, c, k), INST.lnk_in[r][c][k], e); \
          if (e != 0) n_pat[P]++; \
          if (MUL && P == 2 && e == 0 && nbr(P, r, c, k, rr, cc)) n_nomul++; \
        end

  task automatic pattern_test(bit mul);
    for (int id = 0; id < PR * PC; id++) begin
      @(negedge clk);
      p_valid = 1; p_id = PIDW'(id);
      p_word = mul ? mk(OP_MUL, SRC_CONST, 0, SRC_CONST, 0, 0) : mk(OP_PASS, SRC_CONST, 0, 0, 0, 0);
      p_const = DW'(id + 1);
    end
    @(negedge clk);
    p_valid = 0;
    repeat (PR + PC + 2) @(negedge clk);
    `CHECK_LINKS(0, d_mesh, mul)
    `CHECK_LINKS(1, d_hop, mul)
    `CHECK_LINKS(2, d_diag, mul)
    `CHECK_LINKS(3, d_hex, mul)
  endtask

  // ---------------------------------------------------------------- main
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cfg_cycles, lat;
    pe_cfg_t old_cfg;
    m_valid = 0; m_id = '0; m_word = '0; m_const = '0;
    p_valid = 0; p_id = '0; p_word = '0; p_const = '0;
    for (int r = 0; r < R; r++) m_in[r] = '0;
    for (int r = 0; r < PR; r++) p_in[r] = '0;
    for (int i = 0; i < H; i++) for (int r = 0; r < R; r++) hist[i][r] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // full configuration: one word per PE per cycle
    cfg_cycles = 0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        logic [DW-1:0] k;
        @(negedge clk);
        m_valid = 1; m_id = IDW'(r * C + c);
        m_word = main_cfg(r, c, k);
        m_const = k;
        cfg_cycles++;
      end
    @(negedge clk);
    m_valid = 0;
    checks++;
    if (cfg_cycles != R * C) begin failures++; $display("configuration took %0d cycles", cfg_cycles); end

    // wait for the bus to drain and the pipelines to fill
    repeat (R + C + H) cycle();
    row1_chk = 1; row3_chk = 1;
    repeat (100) cycle();

    // partial reconfiguration of PE(1,0) while everything runs
    begin
      pe_cfg_t w;
      w = mk(OP_SUB, SRC_LOAD, 1, N, 0, 0);
      w.route[E] = RSEL_ALU;
      row1_chk = 0; reconf_window = 1;
      // word is presented just after a falling edge, held for one cycle
      m_valid = 1; m_id = IDW'(1 * C + 0); m_word = w; m_const = '0;
      cycle();
      m_valid = 0;
      row1_sub = 1;
      n_reconf++;
      repeat (R + C + H) cycle();
      reconf_window = 0;
      row1_chk = 1;
      repeat (100) cycle();
    end

    // configuration latency to the far corner PE (ROWS + COLS edges)
    old_cfg = dut.g_row[R-1].g_col[C-1].u_pe.cfg_q;
    @(negedge clk);
    m_valid = 1; m_id = IDW'(R * C - 1); m_word = mk(OP_PASS, W, 0, 0, 0, 0); m_const = '0;
    m_word.route[STORE_SLOT] = from_in(N);
    lat = 0;
    @(posedge clk); lat++;
    #1 m_valid = 0;
    while (dut.g_row[R-1].g_col[C-1].u_pe.cfg_q == old_cfg && lat < 100) begin
      @(posedge clk); lat++;
      #1;
    end
    checks++;
    if (lat != R + C) begin failures++; $display("corner configured after %0d edges, expected %0d", lat, R + C); end

    // interconnect patterns, routing styles, removed multipliers
    pattern_test(0);
    pattern_test(1);

    // every mechanism must have occurred
    checks++;
    if (n_delay == 0 || n_route == 0 || n_const == 0 || n_store == 0 || n_reconf == 0 ||
        n_other_row_during_reconf == 0 || n_pat[0] == 0 || n_pat[1] == 0 || n_pat[2] == 0 ||
        n_pat[3] == 0 || n_nomul == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("mechanisms: elastic-delay=%0d route-through=%0d constant=%0d store=%0d reconfig=%0d rows-running-during-reconfig=%0d",
             n_delay, n_route, n_const, n_store, n_reconf, n_other_row_during_reconf);
    $display("links checked: mesh=%0d one-hop=%0d diagonal=%0d hexagonal=%0d, no-multiplier PEs seen=%0d, corner latency=%0d",
             n_pat[0], n_pat[1], n_pat[2], n_pat[3], n_nomul, lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
