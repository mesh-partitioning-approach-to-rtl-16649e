// tile_addr_gen: address generator for the rectangle (tile based) data layout.
//
// The K x K array index space is cut into rectangles RECT_W wide (x) and RECT_H tall (y)
// with RECT_W*RECT_H <= Q, and every rectangle is stored in one memory row of Q columns,
// so that accesses that stay inside a rectangle never switch the row select line.
// For an element (y, x):
//   by = y / RECT_H, bx = x / RECT_W          rectangle coordinates
//   oy = y % RECT_H, ox = x % RECT_W          position inside the rectangle
//   row = by*RW + bx   (rectangles row major)     RW = ceil(k/RECT_W)
//       = bx*RH + by   (rectangles column major)  RH = ceil(k/RECT_H)
//   col = oy*RECT_W + ox (elements row major) or ox*RECT_H + oy (elements column major)
// Rectangles cut by the right or bottom edge of the array (peripheral rectangles) keep
// their own row but store their elements row major: col = oy*wd + ox with wd the clipped
// width. When RECT_W and RECT_H both divide k and RECT_W*RECT_H = Q, the flat address
// row*Q + col of the "rectangles row major, elements column major" variant equals
//   y*k + x*RECT_H - (k-1)*(y mod RECT_H).
//
// The rectangle shape and the two orders are parameters, as an address generator is
// synthesized for one layout. The array side k is an input (up to K_MAX) so that one
// instance serves every array size up to K_MAX. Own choices: one rectangle per memory row
// also for peripheral rectangles, row major order inside peripheral rectangles.
//
// Interface: purely combinational. k_size, y, x in; row, col, addr (= row*Q + col) and
// in_range (y < k_size and x < k_size) out.
module tile_addr_gen
  import layout_pkg::*;
#(
  parameter int     K_MAX      = 1000,
  parameter int     Q          = 32,
  parameter int     RECT_W     = 8,
  parameter int     RECT_H     = 4,
  parameter order_e RECT_ORDER = ORDER_ROW_MAJOR,
  parameter order_e ELEM_ORDER = ORDER_ROW_MAJOR,
  parameter int     P          = rows_needed(K_MAX, RECT_W, RECT_H),
  localparam int    KS_W       = $clog2(K_MAX + 1),
  localparam int    IX_W       = idx_w(K_MAX),
  localparam int    ROW_W      = idx_w(P),
  localparam int    COL_W      = idx_w(Q),
  localparam int    ADDR_W     = idx_w(P * Q)
) (
  input  logic [KS_W-1:0]   k_size,
  input  logic [IX_W-1:0]   y,
  input  logic [IX_W-1:0]   x,
  output logic [ROW_W-1:0]  row,
  output logic [COL_W-1:0]  col,
  output logic [ADDR_W-1:0] addr,
  output logic              in_range
);

  if (RECT_W * RECT_H > Q) begin : g_bad_shape
    $error("tile_addr_gen: rectangle %0d x %0d does not fit a row of %0d columns", RECT_W, RECT_H, Q);
  end
  if (rows_needed(K_MAX, RECT_W, RECT_H) > P) begin : g_bad_rows
    $error("tile_addr_gen: %0d rows are too few for a %0d x %0d array", P, K_MAX, K_MAX);
  end

  logic [31:0] k, yy, xx, by, bx, oy, ox, rw, rh, wd, ht, rect_idx, offset;

  always_comb begin
    k  = 32'(k_size);
    yy = 32'(y);
    xx = 32'(x);
    by = yy / RECT_H;
    oy = yy % RECT_H;
    bx = xx / RECT_W;
    ox = xx % RECT_W;
    rw = (k + RECT_W - 1) / RECT_W;
    rh = (k + RECT_H - 1) / RECT_H;
    // clipped extent of the rectangle holding (y, x)
    wd = (bx == rw - 1) ? k - bx * RECT_W : 32'(RECT_W);
    ht = (by == rh - 1) ? k - by * RECT_H : 32'(RECT_H);

    if (RECT_ORDER == ORDER_ROW_MAJOR) rect_idx = by * rw + bx;
    else                               rect_idx = bx * rh + by;

    if (wd != RECT_W || ht != RECT_H) offset = oy * wd + ox;        // peripheral rectangle
    else if (ELEM_ORDER == ORDER_ROW_MAJOR) offset = oy * RECT_W + ox;
    else                                    offset = ox * RECT_H + oy;

    row      = ROW_W'(rect_idx);
    col      = COL_W'(offset);
    addr     = ADDR_W'(rect_idx * Q + offset);
    in_range = (yy < k) && (xx < k);
  end

endmodule
