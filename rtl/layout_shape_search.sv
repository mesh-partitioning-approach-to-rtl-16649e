// layout_shape_search: exhaustive search for the rectangle shape of least row switching.
//
// Every rectangle m x n with m*n = Q (one per divisor m of Q) is a candidate partition
// of the array into memory rows. The search runs all candidates side by side on the
// same stream of symbolic accesses (y, x): each candidate has its own tile_addr_gen,
// which gives the memory row the access would touch under that shape, and its own
// row_transition_counter. After the stream has passed, the candidate with the lowest
// row transition count is the layout to use. The number of candidates depends only on
// Q, not on the array size (6 for Q = 32).
//
// The rows of every candidate are numbered with rectangles in row major order; the
// order of rectangles or of elements inside a full rectangle does not change which
// accesses share a row, so it does not change the count.
// Candidate s has width shape_w[s]: candidates run from the widest (s = 0, m = Q, n = 1,
// which is the row major layout of a Q-column memory when Q divides k) to the narrowest.
// On a tie the lower index wins, so row major is preferred as the simpler address
// generator; among other shapes the wider one wins (an own choice).
//
// Interface: clear restarts all counts; access with (y, x) feeds one access of an array
// of side k_size. rtc[s] is the count of candidate s; best_* name the winner and are
// combinational from the counts. Timing: one access per cycle, counts updated at the
// clock edge.
module layout_shape_search
  import layout_pkg::*;
#(
  parameter  int K_MAX = 1000,
  parameter  int Q     = 32,
  parameter  int CNT_W = 32,
  localparam int NS    = num_shapes(Q),
  localparam int KS_W  = $clog2(K_MAX + 1),
  localparam int IX_W  = idx_w(K_MAX),
  localparam int ROW_W = idx_w(max_rows_all_shapes(K_MAX, Q)),
  localparam int SH_W  = $clog2(Q + 1),
  localparam int SI_W  = idx_w(NS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             access,
  input  logic [KS_W-1:0]  k_size,
  input  logic [IX_W-1:0]  y,
  input  logic [IX_W-1:0]  x,
  output logic [CNT_W-1:0] rtc     [NS],
  output logic [SH_W-1:0]  shape_w [NS],
  output logic [SH_W-1:0]  shape_h [NS],
  output logic [SI_W-1:0]  best_idx,
  output logic [SH_W-1:0]  best_w,
  output logic [SH_W-1:0]  best_h,
  output logic [CNT_W-1:0] best_rtc
);

  for (genvar s = 0; s < NS; s++) begin : g_shape
    localparam int M  = shape_width(Q, s);
    localparam int N  = Q / M;
    localparam int PS = rows_needed(K_MAX, M, N);
    localparam int RW = idx_w(PS);

    logic [RW-1:0] row;

    tile_addr_gen #(
      .K_MAX     (K_MAX),
      .Q         (Q),
      .RECT_W    (M),
      .RECT_H    (N),
      .RECT_ORDER(ORDER_ROW_MAJOR),
      .ELEM_ORDER(ORDER_ROW_MAJOR),
      .P         (PS)
    ) u_agen (
      .k_size  (k_size),
      .y       (y),
      .x       (x),
      .row     (row),
      .col     (),
      .addr    (),
      .in_range()
    );

    row_transition_counter #(
      .ROW_W(ROW_W),
      .CNT_W(CNT_W)
    ) u_rtc (
      .clk       (clk),
      .rst_n     (rst_n),
      .clear     (clear),
      .access    (access),
      .row       (ROW_W'(row)),
      .row_switch(),
      .count     (rtc[s])
    );

    assign shape_w[s] = SH_W'(M);
    assign shape_h[s] = SH_W'(N);
  end

  always_comb begin
    best_idx = '0;
    best_rtc = rtc[0];
    for (int s = 1; s < NS; s++) begin
      if (rtc[s] < best_rtc) begin
        best_idx = SI_W'(s);
        best_rtc = rtc[s];
      end
    end
    best_w = shape_w[best_idx];
    best_h = shape_h[best_idx];
  end

endmodule
