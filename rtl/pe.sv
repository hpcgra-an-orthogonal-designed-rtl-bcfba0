// pe - one processing element (PE) of the CGRA: the wrapper that stacks
// configuration, routing and elastic queues around an ALU.
//
// Data path, for each of the three ALU operands a, b, c:
//   source select  -> elastic_queue (0..EQ_DEPTH cycles) -> pe_alu
// A source is a neighbour input slot, the external input ("load", input PEs
// only) or the PE's constant register. The ALU result and the neighbour
// inputs then go through pe_router, whose registered outputs feed the
// neighbours and, for output PEs, the external output ("store").
//
// Timing: a value on a neighbour input or on ext_in reaches the PE's outputs
// one clock later plus the configured queue delay of the operand it uses; a
// route-through (output fed by a neighbour input) also takes one clock. This
// reproduces the published vector-sum schedule, where PE0's "pass" of the
// external input arrives at PE2 one cycle after PE2's own external input, so
// PE2 delays its "load" operand by one cycle.
//
// Configuration: the PE watches the configuration-bus register next to it and
// loads cfg_word and cfg_const into its configuration registers when
// cfg_valid is set and cfg_id equals its own ID. Each PE can thus be
// reconfigured on its own while the rest of the array keeps running. After
// reset the PE is a no-operation whose outputs carry 0.
//
// Following the design this RTL is written from: the operation set, the
// operand sources (neighbours, load, constant), the queues before the ALU,
// the three routing styles, per-PE configuration by ID. This design's own
// choices: the configuration word layout (cgra_pkg::pe_cfg_t), three operands
// per ALU, the registered router outputs and the reset values.
module pe
  import cgra_pkg::*;
#(
  parameter int          DW        = 16,
  parameter int          NIN       = 4,
  parameter bit          IS_INPUT  = 1'b0,
  parameter bit          IS_OUTPUT = 1'b0,
  parameter route_e      ROUTE     = ROUTE_FULL,
  parameter int          EQ_DEPTH  = 2,
  parameter logic [15:0] ISA       = ISA_ALL,
  parameter int          ID_W      = 7,
  parameter int          ID        = 0
) (
  input  logic            clk,
  input  logic            rst_n,
  // configuration bus register beside this PE
  input  logic            cfg_valid,
  input  logic [ID_W-1:0] cfg_id,
  input  pe_cfg_t         cfg_word,
  input  logic [DW-1:0]   cfg_const,
  // neighbour links, one per slot
  input  logic [DW-1:0]   nb_in  [NIN],
  output logic [DW-1:0]   nb_out [NIN],
  // external data ("load" / "store")
  input  logic [DW-1:0]   ext_in,
  output logic [DW-1:0]   ext_out
);

  localparam int NOUT = NIN + (IS_OUTPUT ? 1 : 0);

  pe_cfg_t       cfg_q;
  logic [DW-1:0] const_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q   <= '0;
      const_q <= '0;
    end else if (cfg_valid && cfg_id == ID_W'(ID)) begin
      cfg_q   <= cfg_word;
      const_q <= cfg_const;
    end
  end

  // ---------------------------------------------------- operand selection
  logic [DW-1:0] opnd_src [NOPS];
  logic [DW-1:0] opnd     [NOPS];

  always_comb begin
    for (int o = 0; o < NOPS; o++) begin
      opnd_src[o] = '0;
      if (cfg_q.src[o] == SRC_LOAD)       opnd_src[o] = IS_INPUT ? ext_in : '0;
      else if (cfg_q.src[o] == SRC_CONST) opnd_src[o] = const_q;
      else
        for (int k = 0; k < NIN; k++)
          if (int'(cfg_q.src[o]) == k) opnd_src[o] = nb_in[k];
    end
  end

  for (genvar o = 0; o < NOPS; o++) begin : g_eq
    elastic_queue #(.DW(DW), .DEPTH(EQ_DEPTH), .DLY_W(DLY_W)) u_eq (
      .clk   (clk),
      .rst_n (rst_n),
      .dly   (cfg_q.dly[o]),
      .d     (opnd_src[o]),
      .q     (opnd[o])
    );
  end

  // ------------------------------------------------------------------ ALU
  logic [DW-1:0] alu_y;

  pe_alu #(.DW(DW), .ISA(ISA)) u_alu (
    .op (cfg_q.op),
    .a  (opnd[0]),
    .b  (opnd[1]),
    .c  (opnd[2]),
    .y  (alu_y)
  );

  // -------------------------------------------------------------- routing
  logic [3:0]    rsel [NOUT];
  logic [DW-1:0] rout [NOUT];

  always_comb begin
    for (int j = 0; j < NIN; j++) rsel[j] = cfg_q.route[j];
    if (IS_OUTPUT) rsel[NOUT-1] = cfg_q.route[STORE_SLOT];
  end

  pe_router #(.DW(DW), .NIN(NIN), .NOUT(NOUT), .ROUTE(ROUTE)) u_router (
    .clk   (clk),
    .rst_n (rst_n),
    .alu   (alu_y),
    .in    (nb_in),
    .sel   (rsel),
    .out   (rout)
  );

  always_comb begin
    for (int j = 0; j < NIN; j++) nb_out[j] = rout[j];
    ext_out = IS_OUTPUT ? rout[NOUT-1] : '0;
  end

endmodule
