// row_transition_counter: counts switching events of a memory's row select lines.
//
// The row transition count (RTC) is the energy metric of the layout method: the number
// of consecutive access pairs to one memory port whose rows differ. The block remembers
// the row of the previous access; an access to another row raises row_switch for that
// cycle and increments count. The first access after reset or clear has no predecessor
// and is not counted, so a sequence of N accesses gives at most N-1 transitions. Counting
// row transitions as the energy figure follows the layout method; building the count as
// a hardware monitor, the first-access rule and the saturation are this design's own.
//
// Interface: access marks a cycle holding an access to row `row`. clear (synchronous)
// zeroes the count and forgets the previous row. count saturates at its maximum.
// Timing: row_switch is combinational from access/row; count updates at the clock edge.
module row_transition_counter #(
  parameter int ROW_W = 15,
  parameter int CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             access,
  input  logic [ROW_W-1:0] row,
  output logic             row_switch,
  output logic [CNT_W-1:0] count
);

  logic             have_prev;
  logic [ROW_W-1:0] prev_row;

  assign row_switch = access && have_prev && (row != prev_row);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      prev_row  <= '0;
      count     <= '0;
    end else if (clear) begin
      have_prev <= 1'b0;
      prev_row  <= '0;
      count     <= '0;
    end else if (access) begin
      have_prev <= 1'b1;
      prev_row  <= row;
      if (row_switch && count != '1) count <= count + 1'b1;
    end
  end

endmodule
