// tb_pe - self-checking test of one processing element.
//
// A PE with 4 neighbour slots, external input and output, full routing and
// queues of depth 2 receives random data every cycle and a sequence of random
// configurations (operation, operand sources neighbour/load/constant, queue
// delays 0..3, per-output route selects). The testbench keeps the input
// history and computes each output independently: operand o is the chosen
// source min(dly, 2) cycles back, the ALU result follows the operation list,
// and every output shows, one cycle later, the ALU result or the neighbour
// input its select names. Words addressed to another PE id must be ignored.
module tb_pe;
  import cgra_pkg::*;

  localparam int DW = 16, NIN = 4, ID_W = 4, MYID = 5, EQ = 2, H = 8;

  logic clk = 0, rst_n = 0;
  logic            cfg_valid;
  logic [ID_W-1:0] cfg_id;
  pe_cfg_t         cfg_word;
  logic [DW-1:0]   cfg_const;
  logic [DW-1:0]   nb_in [NIN];
  logic [DW-1:0]   nb_out [NIN];
  logic [DW-1:0]   ext_in, ext_out;
  int checks = 0, failures = 0;

  // history: index 0 = current cycle, k = k cycles earlier
  logic [DW-1:0] h_nb [H][NIN];
  logic [DW-1:0] h_ext [H];

  pe_cfg_t       cur;
  logic [DW-1:0] cur_const;

  always #5 clk = ~clk;

  pe #(.DW(DW), .NIN(NIN), .IS_INPUT(1'b1), .IS_OUTPUT(1'b1), .ROUTE(ROUTE_FULL),
       .EQ_DEPTH(EQ), .ISA(ISA_ALL), .ID_W(ID_W), .ID(MYID)) dut (
    .clk, .rst_n, .cfg_valid, .cfg_id, .cfg_word, .cfg_const,
    .nb_in, .nb_out, .ext_in, .ext_out);

  function automatic logic [DW-1:0] ref_alu(alu_op_e o, logic [DW-1:0] x, logic [DW-1:0] y, logic [DW-1:0] z);
    case (o)
      OP_ADD:    return x + y;
      OP_SUB:    return x - y;
      OP_MUL:    return DW'(32'(x) * 32'(y));
      OP_AND:    return x & y;
      OP_OR:     return x | y;
      OP_NOT:    return ~x;
      OP_MADD:   return DW'(32'(x) * 32'(y) + 32'(z));
      OP_ADDADD: return x + y + z;
      OP_SUBSUB: return x - y - z;
      OP_ADDSUB: return x + y - z;
      OP_MUX:    return (z != 0) ? y : x;
      OP_PASS:   return x;
      default:   return '0;
    endcase
  endfunction

  // value of operand o, `back` cycles before the current cycle
  function automatic logic [DW-1:0] operand(int o, int back);
    int d;
    d = (int'(cur.dly[o]) > EQ) ? EQ : int'(cur.dly[o]);
    if (cur.src[o] == SRC_LOAD)  return h_ext[back + d];
    if (cur.src[o] == SRC_CONST) return cur_const;
    if (cur.src[o] < NIN)        return h_nb[back + d][cur.src[o]];
    return '0;
  endfunction

  function automatic logic [DW-1:0] route_val(logic [3:0] s, int back);
    logic [DW-1:0] alu;
    alu = ref_alu(cur.op, operand(0, back), operand(1, back), operand(2, back));
    if (s == RSEL_ALU) return alu;
    if (s <= NIN)      return h_nb[back][s-1];
    return '0;
  endfunction

  task automatic check(string nm, logic [DW-1:0] got, logic [DW-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s op=%0d: got %h expected %h", $time, nm, cur.op, got, exp);
    end
  endtask

  function automatic pe_cfg_t random_cfg();
    pe_cfg_t w;
    w.op = alu_op_e'($urandom % 13);
    for (int o = 0; o < NOPS; o++) begin
      case ($urandom % 6)
        0: w.src[o] = SRC_LOAD;
        1: w.src[o] = SRC_CONST;
        default: w.src[o] = 4'($urandom % NIN);
      endcase
      w.dly[o] = 3'($urandom % 4);
    end
    for (int j = 0; j < MAX_OUT; j++) w.route[j] = 4'($urandom % (NIN + 1));
    return w;
  endfunction

  // one cycle of random data; checks outputs against the previous cycle
  task automatic step(bit do_check);
    @(negedge clk);
    for (int i = H-1; i > 0; i--) begin
      h_ext[i] = h_ext[i-1];
      h_nb[i]  = h_nb[i-1];
    end
    ext_in = DW'($urandom);
    for (int k = 0; k < NIN; k++) nb_in[k] = DW'($urandom);
    h_ext[0] = ext_in;
    h_nb[0]  = nb_in;
    if (do_check) begin
      for (int j = 0; j < NIN; j++) check("nb_out", nb_out[j], route_val(cur.route[j], 1));
      check("ext_out", ext_out, route_val(cur.route[STORE_SLOT], 1));
    end
  endtask

  task automatic send_cfg(logic [ID_W-1:0] id, pe_cfg_t w, logic [DW-1:0] k);
    @(negedge clk);
    cfg_valid = 1'b1; cfg_id = id; cfg_word = w; cfg_const = k;
    @(negedge clk);
    cfg_valid = 1'b0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_valid = 0; cfg_id = '0; cfg_word = '0; cfg_const = '0;
    ext_in = '0;
    for (int k = 0; k < NIN; k++) nb_in[k] = '0;
    for (int i = 0; i < H; i++) begin
      h_ext[i] = '0;
      for (int k = 0; k < NIN; k++) h_nb[i][k] = '0;
    end
    cur = '0; cur_const = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // reset state: no-op, all outputs 0
    repeat (4) step(1);
    for (int n = 0; n < 60; n++) begin
      pe_cfg_t w;
      logic [DW-1:0] k;
      w = random_cfg();
      k = ($urandom % 3 == 0) ? '0 : DW'($urandom);
      if (n % 7 == 3) begin
        // addressed elsewhere: must not change the PE
        send_cfg(ID_W'(MYID + 1), w, k);
      end else begin
        send_cfg(ID_W'(MYID), w, k);
        cur = w; cur_const = k;
      end
      repeat (H) step(0);
      repeat (25) step(1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
