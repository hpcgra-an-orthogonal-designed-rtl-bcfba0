// tb_hpcgra_full - the CGRA top level at its default size, one complete run.
//
// The main-array part of tb_hpcgra on its own, with no other instance, so the
// top is simulated with every parameter at its default.
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
// Each mechanism (elastic delay, route-through, constant operand, store,
// partial reconfiguration) is counted; one that never occurred counts as a failure.
module tb_hpcgra_full;
  import cgra_pkg::*;

  localparam int R = 9, C = 9, DW = 16, IDW = 7;
  localparam int H = 32;
  localparam logic [DW-1:0] K1 = 16'h1234, K2 = 16'h0042;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_delay = 0, n_route = 0, n_const = 0, n_store = 0, n_reconf = 0, n_other_row_during_reconf = 0;

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
    for (int r = 0; r < R; r++) m_in[r] = '0;
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


    // every mechanism must have occurred
    checks++;
    if (n_delay == 0 || n_route == 0 || n_const == 0 || n_store == 0 || n_reconf == 0 ||
        n_other_row_during_reconf == 0) begin
      failures++;
      $display("mechanism not exercised");
    end
    $display("mechanisms: elastic-delay=%0d route-through=%0d constant=%0d store=%0d reconfig=%0d rows-running-during-reconfig=%0d",
             n_delay, n_route, n_const, n_store, n_reconf, n_other_row_during_reconf);
    $display("corner latency=%0d", lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
