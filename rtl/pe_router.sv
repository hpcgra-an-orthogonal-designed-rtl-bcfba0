// pe_router - the routing layer of a processing element.
//
// Sends the ALU result, or any of the PE's neighbour inputs, to the PE's
// outputs (one per neighbour slot plus, as the last output, the external
// "store" port). Three styles, fixed by the ROUTE parameter:
//   ROUTE_NONE  every output carries the ALU result;
//   ROUTE_ONE   a single multiplexer picks the ALU result or one input, and
//               its output drives every output (sel[0] is its select);
//   ROUTE_FULL  a crossbar: output j picks its own source with sel[j].
// A select of 0 is the ALU result, k+1 is neighbour input k; a select that
// names no input gives 0.
//
// Every output is registered: a value crosses one PE boundary per clock, so
// route-through paths are pipelined and no configuration can close a
// combinational loop between PEs. The three styles follow the design this
// RTL is written from; the output registers are this design's choice, made
// to agree with its vector-sum example (see the PE description).
//
// Timing: out(t+1) = selected source at t. Cleared by rst_n.
module pe_router
  import cgra_pkg::*;
#(
  parameter int     DW    = 16,
  parameter int     NIN   = 4,
  parameter int     NOUT  = 5,
  parameter route_e ROUTE = ROUTE_FULL
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [DW-1:0]        alu,
  input  logic [DW-1:0]        in   [NIN],
  input  logic [3:0]           sel  [NOUT],
  output logic [DW-1:0]        out  [NOUT]
);

  function automatic logic [DW-1:0] pick(logic [3:0] s, logic [DW-1:0] a,
                                         logic [DW-1:0] i [NIN]);
    if (s == RSEL_ALU) return a;
    for (int k = 0; k < NIN; k++)
      if (int'(s) == k + 1) return i[k];
    return '0;
  endfunction

  logic [DW-1:0] nxt [NOUT];

  always_comb begin
    for (int j = 0; j < NOUT; j++) begin
      case (ROUTE)
        ROUTE_NONE: nxt[j] = alu;
        ROUTE_ONE:  nxt[j] = pick(sel[0], alu, in);
        default:    nxt[j] = pick(sel[j], alu, in);
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NOUT; j++) out[j] <= '0;
    end else begin
      for (int j = 0; j < NOUT; j++) out[j] <= nxt[j];
    end
  end

endmodule
