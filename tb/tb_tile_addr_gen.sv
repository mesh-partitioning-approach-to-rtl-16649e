// tb_tile_addr_gen: self-checking test of the tile layout address generator.
//
// Four instances cover the four orders (rectangles row/column major x elements row/column
// major) of a 4 x 2 rectangle in an 8-column memory. For several array sides k, some of
// them leaving peripheral rectangles, every (y, x) is compared with a reference layout
// built by enumeration: rectangles are visited in their order and given rows 0, 1, 2...,
// and the elements of each rectangle are visited in their order and given columns
// 0, 1, 2... The closed form y*k + x*n - (k-1)*(y mod n) is checked where n divides k
// and the rectangles tile the array exactly. A fifth instance checks the 2 x 2 shape of
// the 4 x 4 example.
module tb_tile_addr_gen;
  import layout_pkg::*;

  localparam int K_MAX = 12;
  localparam int Q     = 8;
  localparam int RW_   = 4;
  localparam int RH_   = 2;
  localparam int P     = rows_needed(K_MAX, RW_, RH_);

  int checks = 0, failures = 0;

  logic [3:0] k_size;
  logic [3:0] y, x;
  logic [4:0] row [4];
  logic [2:0] col [4];
  logic [7:0] addr[4];
  logic       inr [4];

  for (genvar v = 0; v < 4; v++) begin : g_dut
    tile_addr_gen #(
      .K_MAX     (K_MAX),
      .Q         (Q),
      .RECT_W    (RW_),
      .RECT_H    (RH_),
      .RECT_ORDER(order_e'(v / 2)),
      .ELEM_ORDER(order_e'(v % 2)),
      .P         (P)
    ) dut (
      .k_size(k_size), .y(y), .x(x),
      .row(row[v]), .col(col[v]), .addr(addr[v]), .in_range(inr[v])
    );
  end

  // 2 x 2 rectangles in a 4-column memory, elements column major
  logic [2:0] k4;
  logic [1:0] y4, x4;
  logic [1:0] row4;
  logic [1:0] col4;
  logic [3:0] addr4;
  logic       inr4;
  tile_addr_gen #(
    .K_MAX(4), .Q(4), .RECT_W(2), .RECT_H(2),
    .RECT_ORDER(ORDER_ROW_MAJOR), .ELEM_ORDER(ORDER_COL_MAJOR), .P(4)
  ) dut4 (
    .k_size(k4), .y(y4), .x(x4), .row(row4), .col(col4), .addr(addr4), .in_range(inr4)
  );

  int exp_row [K_MAX][K_MAX];
  int exp_col [K_MAX][K_MAX];

  // reference layout by enumeration
  task automatic build_ref(input int k, input int ro, input int eo);
    int nbx, nby, r, c, bx, by, x0, y0, wd, ht;
    nbx = (k + RW_ - 1) / RW_;
    nby = (k + RH_ - 1) / RH_;
    r = 0;
    for (int a = 0; a < nbx * nby; a++) begin
      if (ro == 0) begin by = a / nbx; bx = a % nbx; end
      else         begin bx = a / nby; by = a % nby; end
      x0 = bx * RW_; y0 = by * RH_;
      wd = (x0 + RW_ <= k) ? RW_ : k - x0;
      ht = (y0 + RH_ <= k) ? RH_ : k - y0;
      c = 0;
      if (eo == 1 && wd == RW_ && ht == RH_) begin
        for (int xx = 0; xx < wd; xx++)
          for (int yy = 0; yy < ht; yy++) begin exp_row[y0+yy][x0+xx] = r; exp_col[y0+yy][x0+xx] = c; c++; end
      end else begin
        for (int yy = 0; yy < ht; yy++)
          for (int xx = 0; xx < wd; xx++) begin exp_row[y0+yy][x0+xx] = r; exp_col[y0+yy][x0+xx] = c; c++; end
      end
      r++;
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int ks[5] = '{12, 11, 9, 8, 5};
    foreach (ks[t]) begin
      for (int v = 0; v < 4; v++) begin
        build_ref(ks[t], v / 2, v % 2);
        k_size = 4'(ks[t]);
        for (int yy = 0; yy < ks[t]; yy++)
          for (int xx = 0; xx < ks[t]; xx++) begin
            y = 4'(yy); x = 4'(xx);
            #1;
            checks++;
            if (int'(row[v]) != exp_row[yy][xx] || int'(col[v]) != exp_col[yy][xx] ||
                int'(addr[v]) != exp_row[yy][xx] * Q + exp_col[yy][xx] || !inr[v]) begin
              failures++;
              if (failures < 10)
                $display("FAIL k=%0d variant=%0d (y=%0d,x=%0d): row %0d col %0d, expected %0d %0d",
                         ks[t], v, yy, xx, row[v], col[v], exp_row[yy][xx], exp_col[yy][xx]);
            end
            // closed form of "rectangles row major, elements column major"
            if (v == 1 && ks[t] % RW_ == 0 && ks[t] % RH_ == 0) begin
              checks++;
              if (int'(addr[v]) != yy * ks[t] + xx * RH_ - (ks[t] - 1) * (yy % RH_)) failures++;
            end
          end
        // out of range flag
        y = 4'(ks[t]); x = 0; #1;
        checks++;
        if (inr[v]) failures++;
      end
    end
    // 4 x 4 array, 2 x 2 rectangles: the closed form with k = 4, n = 2
    k4 = 3'd4;
    for (int yy = 0; yy < 4; yy++)
      for (int xx = 0; xx < 4; xx++) begin
        y4 = 2'(yy); x4 = 2'(xx); #1;
        checks++;
        if (int'(addr4) != yy * 4 + xx * 2 - 3 * (yy % 2) ||
            int'(row4) != (yy / 2) * 2 + xx / 2) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
