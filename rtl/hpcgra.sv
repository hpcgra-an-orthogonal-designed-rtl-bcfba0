// hpcgra - top level of a coarse-grained reconfigurable array (CGRA).
//
// A ROWS x COLS grid of processing elements (pe), each an ALU wrapped in
// elastic operand queues, a router and configuration registers, joined by one
// of four neighbour patterns and configured through a pipelined bus
// (cfg_bus). The axes are independent: pattern, routing style, queue depth,
// data width and array size are separate parameters, and the same PE wrapper
// serves every combination.
//
// Interconnect (PATTERN): each PE has one registered output and one input
// per neighbour slot (cgra_pkg::slot_dr/slot_dc):
//   PAT_MESH       N, E, S, W
//   PAT_ONE_HOP    N, E, S, W, two columns east, two columns west
//   PAT_DIAGONAL   N, E, S, W and the four diagonals
//   PAT_HEXAGONAL  N, E, S, W and two diagonals whose side alternates with
//                  the row parity (an offset-row honeycomb)
// Links that would leave the array are tied to 0.
//
// External data: the PEs of column 0 are input PEs (in_data[r] is the "load"
// source of PE (r, 0)); the PEs of the last column are output PEs
// (out_data[r] is the "store" output of PE (r, COLS-1)).
//
// Configuration: a word {cfg_valid, cfg_id, cfg_word, cfg_const} presented on
// the cfg_* ports is written, r + c + 2 clock edges later, into PE
// r*COLS + c if cfg_id names it; one word may be sent every cycle, so a full
// array takes ROWS*COLS cycles plus at most ROWS + COLS edges of pipeline, and
// a single PE can be rewritten while the others run. An assertion flags a
// valid word whose cfg_id lies outside the array.
//
// Heterogeneous arrays: ROUTE, EQ_DEPTH and an all-operations ISA are the
// defaults of the per-PE arrays PE_ROUTE, PE_EQ and PE_ISA (indexed by PE id),
// which may be overridden to give each PE its own routing style, queue depth
// and operation set. HALF_MUL = 1 further removes the multiplier (mul, madd)
// from every PE with odd r + c, a checkerboard in which half the PEs multiply.
//
// What follows the design this RTL is written from: the four patterns, the
// three routing styles, the elastic queues, input PEs in the first and output
// PEs in the last column, the row/column configuration pipeline and the
// default 9x9 array of 16-bit data. This design's own choices: the neighbour
// slots of one-hop (six neighbours) and hexagonal, the configuration word,
// the default pattern (mesh), routing (full) and queue depth (2).
module hpcgra
  import cgra_pkg::*;
#(
  parameter int       ROWS     = 9,
  parameter int       COLS     = 9,
  parameter int       DW       = 16,
  parameter pattern_e PATTERN  = PAT_MESH,
  parameter route_e   ROUTE    = ROUTE_FULL,
  parameter int       EQ_DEPTH = 2,
  parameter bit       HALF_MUL = 1'b0,
  // per-PE overrides, indexed by PE id r*COLS+c (heterogeneous arrays)
  parameter route_e      PE_ROUTE [ROWS*COLS] = '{default: ROUTE},
  parameter int          PE_EQ    [ROWS*COLS] = '{default: EQ_DEPTH},
  parameter logic [15:0] PE_ISA   [ROWS*COLS] = '{default: ISA_ALL},
  localparam int      ID_W     = (ROWS * COLS > 1) ? $clog2(ROWS * COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            cfg_valid,
  input  logic [ID_W-1:0] cfg_id,
  input  pe_cfg_t         cfg_word,
  input  logic [DW-1:0]   cfg_const,
  input  logic [DW-1:0]   in_data  [ROWS],
  output logic [DW-1:0]   out_data [ROWS]
);

  localparam int NSLOT = num_slots(PATTERN);
  localparam int BUS_W = 1 + ID_W + $bits(pe_cfg_t) + DW;

  typedef struct packed {
    logic            valid;
    logic [ID_W-1:0] id;
    pe_cfg_t         word;
    logic [DW-1:0]   cnst;
  } bus_word_t;

  // ------------------------------------------------------ configuration bus
  bus_word_t       bus_in;
  logic [BUS_W-1:0] node [ROWS][COLS];

  assign bus_in = '{valid: cfg_valid, id: cfg_id, word: cfg_word, cnst: cfg_const};

  cfg_bus #(.ROWS(ROWS), .COLS(COLS), .W(BUS_W)) u_cfg_bus (
    .clk    (clk),
    .rst_n  (rst_n),
    .cfg_in (bus_in),
    .node   (node)
  );

  // A configuration word must name a PE of this array.
  a_cfg_id_in_range: assert property (@(posedge clk)
    cfg_valid |-> int'(cfg_id) < ROWS * COLS)
    else $error("configuration word for PE %0d, array has %0d PEs", cfg_id, ROWS * COLS);

  // -------------------------------------------------------- PEs and links
  logic [DW-1:0] lnk_out [ROWS][COLS][NSLOT];
  logic [DW-1:0] lnk_in  [ROWS][COLS][NSLOT];
  logic [DW-1:0] ext_out [ROWS][COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      bus_word_t bw;
      assign bw = bus_word_t'(node[r][c]);

      for (genvar k = 0; k < NSLOT; k++) begin : g_link
        localparam int R2 = r + slot_dr(PATTERN, k);
        localparam int C2 = c + slot_dc(PATTERN, k, r);
        localparam int BK = back_slot(PATTERN, k, r);
        if (R2 >= 0 && R2 < ROWS && C2 >= 0 && C2 < COLS && BK >= 0) begin : g_on
          assign lnk_in[r][c][k] = lnk_out[R2][C2][BK];
        end else begin : g_off
          assign lnk_in[r][c][k] = '0;
        end
      end

      localparam int          ID     = r * COLS + c;
      localparam logic [15:0] ISA_RC = (HALF_MUL && ((r + c) % 2 == 1)) ? (PE_ISA[ID] & ISA_NO_MUL)
                                                                        : PE_ISA[ID];

      pe #(
        .DW        (DW),
        .NIN       (NSLOT),
        .IS_INPUT  (c == 0),
        .IS_OUTPUT (c == COLS - 1),
        .ROUTE     (PE_ROUTE[ID]),
        .EQ_DEPTH  (PE_EQ[ID]),
        .ISA       (ISA_RC),
        .ID_W      (ID_W),
        .ID        (ID)
      ) u_pe (
        .clk       (clk),
        .rst_n     (rst_n),
        .cfg_valid (bw.valid),
        .cfg_id    (bw.id),
        .cfg_word  (bw.word),
        .cfg_const (bw.cnst),
        .nb_in     (lnk_in[r][c]),
        .nb_out    (lnk_out[r][c]),
        .ext_in    ((c == 0) ? in_data[r] : '0),
        .ext_out   (ext_out[r][c])
      );
    end
    assign out_data[r] = ext_out[r][COLS-1];
  end

endmodule
