// mem_cell_array: rectangular memory cell array of P rows by Q columns of W-bit words
// with a single read/write port.
//
// A location is selected by a row address, which drives one of the P row select lines,
// and a column address, which drives one of the Q column select lines. Switching the row
// select line costs far more energy than switching a column select line, which is why
// the layout blocks try to keep consecutive accesses in the same row. The array keeps
// the last selected row in active_row so that the row switching can be observed.
//
// Timing: one access per cycle when en is high. A write (we = 1) stores wdata at the end
// of the cycle. A read returns the word on rdata one cycle later (registered output);
// rdata holds its value while en is low. The cell contents are not reset.
// Own choices: synchronous read with one cycle latency, write without read-through
// (rdata is not updated by a write).
module mem_cell_array #(
  parameter  int P     = 31250,
  parameter  int Q     = 32,
  parameter  int W     = 16,
  localparam int ROW_W = (P <= 2) ? 1 : $clog2(P),
  localparam int COL_W = (Q <= 2) ? 1 : $clog2(Q)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             we,
  input  logic [ROW_W-1:0] row,
  input  logic [COL_W-1:0] col,
  input  logic [W-1:0]     wdata,
  output logic [W-1:0]     rdata,
  output logic [ROW_W-1:0] active_row
);

  logic [W-1:0] cells [P][Q];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) cells[row][col] <= wdata;
      else    rdata           <= cells[row][col];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  active_row <= '0;
    else if (en) active_row <= row;
  end

endmodule
