// tb_elastic_queue - self-checking test of the programmable operand delay.
//
// Feeds a random stream through queues of depth 0, 2 and 4 and, for every
// delay setting 0..7, checks that the output equals the input from
// min(dly, DEPTH) cycles earlier (a history kept by the testbench).
module tb_elastic_queue;
  localparam int DW = 16;

  logic clk = 0, rst_n = 0;
  logic [2:0]    dly;
  logic [DW-1:0] d, q0, q2, q4;
  logic [DW-1:0] hist [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  elastic_queue #(.DW(DW), .DEPTH(0), .DLY_W(3)) u0 (.clk, .rst_n, .dly, .d, .q(q0));
  elastic_queue #(.DW(DW), .DEPTH(2), .DLY_W(3)) u2 (.clk, .rst_n, .dly, .d, .q(q2));
  elastic_queue #(.DW(DW), .DEPTH(4), .DLY_W(3)) u4 (.clk, .rst_n, .dly, .d, .q(q4));

  task automatic check(string nm, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s dly=%0d: got %h expected %h", nm, dly, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0; dly = '0;
    for (int i = 0; i < 16; i++) hist[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 8; s++) begin
      dly = 3'(s);
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        d = DW'($urandom);
        for (int i = 15; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = d;
        #1;
        // the queues have seen the same stream for 40+ cycles at this dly
        if (t >= 5) begin
          check("depth0", q0, hist[0]);
          check("depth2", q2, hist[(s < 2) ? s : 2]);
          check("depth4", q4, hist[(s < 4) ? s : 4]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
