// cgra_pkg - types and constants shared by the CGRA array and its processing
// elements (PEs).
//
// The array is built from identical layers around each PE: an ALU, elastic
// (programmable-delay) queues in front of the ALU operands, a router that sends
// the ALU result or any neighbour input to the PE outputs, the neighbour
// interconnect, and a pipelined configuration bus. This package holds:
//   * the ALU operation set (the twelve operations "add" ... "pass" plus a
//     no-operation code, which is this design's own addition),
//   * the four interconnection patterns (mesh, one-hop, diagonal, hexagonal)
//     and the per-slot neighbour offsets that define them,
//   * the three PE routing styles (no routing, one routing, full routing),
//   * the per-PE configuration word written over the configuration bus.
// Field widths of the configuration word are fixed at the largest size any
// pattern needs (8 neighbour slots plus the external "store" output), so the
// same word format serves every array. The encodings are this design's choice.
package cgra_pkg;

  // ---------------------------------------------------------------- ALU ops
  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,   // result 0 (PE unused)
    OP_ADD    = 4'd1,   // a + b
    OP_SUB    = 4'd2,   // a - b
    OP_MUL    = 4'd3,   // a * b (low DW bits)
    OP_AND    = 4'd4,   // a & b
    OP_OR     = 4'd5,   // a | b
    OP_NOT    = 4'd6,   // ~a
    OP_MADD   = 4'd7,   // a * b + c
    OP_ADDADD = 4'd8,   // a + b + c
    OP_SUBSUB = 4'd9,   // a - b - c
    OP_ADDSUB = 4'd10,  // a + b - c
    OP_MUX    = 4'd11,  // (c != 0) ? b : a
    OP_PASS   = 4'd12   // a
  } alu_op_e;

  // Bit i of an ISA mask enables operation code i in a PE's ALU.
  localparam logic [15:0] ISA_ALL    = 16'h1FFF;
  localparam logic [15:0] ISA_NO_MUL = ISA_ALL & ~((16'd1 << OP_MUL) | (16'd1 << OP_MADD));

  // ------------------------------------------------- interconnect patterns
  typedef enum logic [1:0] {
    PAT_MESH      = 2'd0,
    PAT_ONE_HOP   = 2'd1,
    PAT_DIAGONAL  = 2'd2,
    PAT_HEXAGONAL = 2'd3
  } pattern_e;

  // --------------------------------------------------------- routing style
  typedef enum logic [1:0] {
    ROUTE_NONE = 2'd0,   // ALU result to every output
    ROUTE_ONE  = 2'd1,   // one multiplexer (ALU or any input) to every output
    ROUTE_FULL = 2'd2    // crossbar: every output picks its own source
  } route_e;

  localparam int MAX_NB   = 8;            // neighbour slots of the widest pattern
  localparam int MAX_OUT  = MAX_NB + 1;   // neighbour outputs + external store
  localparam int NOPS     = 3;            // ALU operands a, b, c
  localparam int DLY_W    = 3;            // elastic-queue delay field, 0..7 cycles

  // Operand source select: 0..MAX_NB-1 = neighbour input slot,
  // SRC_LOAD = external input ("load"), SRC_CONST = constant register.
  localparam logic [3:0] SRC_LOAD  = 4'd14;
  localparam logic [3:0] SRC_CONST = 4'd15;

  // Route select for one output: RSEL_ALU = ALU result, k+1 = neighbour input k.
  localparam logic [3:0] RSEL_ALU = 4'd0;

  // Output slot of the external "store" port in the route field.
  localparam int STORE_SLOT = MAX_NB;

  // Per-PE configuration, one word per PE. For ROUTE_ONE only route[0] is used.
  typedef struct packed {
    alu_op_e                         op;
    logic [NOPS-1:0][3:0]            src;
    logic [NOPS-1:0][DLY_W-1:0]      dly;
    logic [MAX_OUT-1:0][3:0]         route;
  } pe_cfg_t;

  // Number of neighbour slots of a pattern.
  function automatic int num_slots(pattern_e pat);
    case (pat)
      PAT_MESH:      return 4;
      PAT_ONE_HOP:   return 6;
      PAT_DIAGONAL:  return 8;
      default:       return 6;
    endcase
  endfunction

  // Row offset of neighbour slot k (row 0 is the top).
  // Slots 0..3 are always north, east, south, west.
  function automatic int slot_dr(pattern_e pat, int k);
    case (k)
      0: return -1;
      1: return 0;
      2: return 1;
      3: return 0;
      default: ;
    endcase
    case (pat)
      PAT_ONE_HOP:  return 0;                          // 4: two east, 5: two west
      PAT_DIAGONAL: return (k == 4 || k == 5) ? -1 : 1; // 4 NE, 5 NW, 6 SE, 7 SW
      PAT_HEXAGONAL: return (k == 4) ? -1 : 1;         // 4 up-diagonal, 5 down-diagonal
      default:      return 0;
    endcase
  endfunction

  // Column offset of neighbour slot k for a PE in row r.
  function automatic int slot_dc(pattern_e pat, int k, int r);
    case (k)
      0: return 0;
      1: return 1;
      2: return 0;
      3: return -1;
      default: ;
    endcase
    case (pat)
      PAT_ONE_HOP:   return (k == 4) ? 2 : -2;
      PAT_DIAGONAL:  return (k == 4 || k == 6) ? 1 : -1;
      // offset-row hexagonal grid: even rows lean west, odd rows lean east
      PAT_HEXAGONAL: return (r % 2 == 0) ? -1 : 1;
      default:       return 0;
    endcase
  endfunction

  // Slot of the neighbour at (r+dr, c+dc) that points back to (r, c);
  // -1 if none.
  function automatic int back_slot(pattern_e pat, int k, int r);
    int dr, dc, r2;
    dr = slot_dr(pat, k);
    dc = slot_dc(pat, k, r);
    r2 = r + dr;
    for (int j = 0; j < num_slots(pat); j++)
      if (slot_dr(pat, j) == -dr && slot_dc(pat, j, r2) == -dc) return j;
    return -1;
  endfunction

endpackage
