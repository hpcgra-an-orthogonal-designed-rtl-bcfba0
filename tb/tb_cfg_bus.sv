// tb_cfg_bus - self-checking test of the pipelined configuration bus.
//
// Sends a distinct word every cycle into a 5x7 bus and checks that the
// register beside PE (r, c) holds, at every cycle, the word that entered
// r + c + 1 edges earlier: down column 0 and along each row in parallel.
// It also checks the worst case: the corner register receives a word after
// ROWS + COLS - 1 edges.
module tb_cfg_bus;
  localparam int ROWS = 5, COLS = 7, W = 16;

  logic clk = 0, rst_n = 0;
  logic [W-1:0] cfg_in;
  logic [W-1:0] node [ROWS][COLS];
  logic [W-1:0] hist [32];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_bus #(.ROWS(ROWS), .COLS(COLS), .W(W)) dut (.clk, .rst_n, .cfg_in, .node);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_seen;
    cfg_in = '0;
    for (int i = 0; i < 32; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    first_seen = -1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      cfg_in = W'(t + 1);
      // hist[k] = word that entered k edges before the coming edge
      for (int i = 31; i > 0; i--) hist[i] = hist[i-1];
      hist[0] = cfg_in;
      @(posedge clk);
      #1;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) begin
          checks++;
          if (node[r][c] !== hist[r + c]) begin
            failures++;
            if (failures < 10) $display("t=%0d node(%0d,%0d)=%h expected %h", t, r, c, node[r][c], hist[r + c]);
          end
        end
      if (first_seen < 0 && node[ROWS-1][COLS-1] == W'(1)) first_seen = t + 1;
    end
    checks++;
    if (first_seen != ROWS + COLS - 1) begin
      failures++;
      $display("corner reached after %0d edges, expected %0d", first_seen, ROWS + COLS - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
