// elastic_queue - programmable delay line in front of one ALU operand.
//
// Paths that reach a PE through different numbers of registered hops arrive
// at different times; each ALU operand therefore passes through a queue whose
// delay is set at configuration time, so that the operands of one operation
// line up again. DEPTH is the largest delay the hardware holds (0 removes the
// queue); the configured delay dly (0..DEPTH) selects a tap of a DEPTH-stage
// shift register, dly = 0 being the direct, unregistered path. A dly above
// DEPTH is treated as DEPTH.
//
// The queue is a fixed-latency delay line that shifts every cycle; the design
// it follows calls it an elastic queue with a programmable size, and the
// shift-register realisation and the clamping of oversize delays are this
// design's choice.
//
// Timing: q(t) = d(t - dly). The shift register is cleared by rst_n.
module elastic_queue #(
  parameter int DW    = 16,
  parameter int DEPTH = 2,
  parameter int DLY_W = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DLY_W-1:0] dly,
  input  logic [DW-1:0]    d,
  output logic [DW-1:0]    q
);

  if (DEPTH == 0) begin : g_none
    assign q = d;
  end else begin : g_queue
    logic [DW-1:0] sr [DEPTH];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end

    always_comb begin
      if (dly == '0)                q = d;
      else if (int'(dly) >= DEPTH)  q = sr[DEPTH-1];
      else                          q = sr[int'(dly) - 1];
    end
  end

endmodule
