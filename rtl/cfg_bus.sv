// cfg_bus - pipelined configuration bus that reaches every PE of the array.
//
// One register sits beside each PE (r, c). The word entering at cfg_in goes
// down column 0 and, from each register of column 0, along its row at the
// same time, so rows and columns are traversed in parallel: the register of
// PE (r, c) holds a word r + c + 1 clock edges after it entered. A new word
// may enter every cycle, so configuring all ROWS*COLS PEs takes ROWS*COLS
// cycles plus the pipeline depth, and one PE in the far corner is reached
// after ROWS + COLS - 1 edges. The register layout follows the design this
// RTL is written from; the bus carries an opaque W-bit word whose meaning
// (valid bit, target PE id, configuration) is set by the array top.
//
// Ports: cfg_in (word entering), node (the register next to each PE, read by
// that PE). Registers are cleared by rst_n.
module cfg_bus #(
  parameter int ROWS = 9,
  parameter int COLS = 9,
  parameter int W    = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [W-1:0]  cfg_in,
  output logic [W-1:0]  node [ROWS][COLS]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++) node[r][c] <= '0;
    end else begin
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < COLS; c++)
          if (c > 0)      node[r][c] <= node[r][c-1];
          else if (r > 0) node[r][c] <= node[r-1][c];
          else            node[r][c] <= cfg_in;
    end
  end

endmodule
