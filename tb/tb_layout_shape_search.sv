// tb_layout_shape_search: self-checking test of the exhaustive rectangle-shape search.
//
// Feeds the symbolic access sequence of the compress kernel (generated here in program
// order, with or without the two-register reuse layer) and compares the row transition
// count of every candidate shape with independently computed values:
//  - 4 x 4 array, 4-column memory: shapes 4x1, 2x2, 1x4 give 15, 15, 29 without reuse,
//    and the row major 4x1 shape wins the tie; with reuse 15, 9, 17 and 2x2 wins;
//  - 32-column memory, arrays of side 10 and 100 (peripheral rectangles included),
//    with the counts of the six shapes 32x1 ... 1x32 computed by a separate model;
//  - 34-column memory, array of side 40: shapes 34x1, 17x2, 2x17, 1x34.
// Also checks the shape table and that clear restarts the counts.
module tb_layout_shape_search;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  // small instance: K_MAX = 4, Q = 4
  logic        a_clear = 0, a_access = 0;
  logic [2:0]  a_k = 3'd4;
  logic [1:0]  a_y = 0, a_x = 0;
  logic [31:0] a_rtc [3];
  logic [2:0]  a_w [3], a_h [3];
  logic [1:0]  a_best;
  logic [2:0]  a_bw, a_bh;
  logic [31:0] a_brtc;

  layout_shape_search #(.K_MAX(4), .Q(4)) dut_a (
    .clk(clk), .rst_n(rst_n), .clear(a_clear), .access(a_access), .k_size(a_k),
    .y(a_y), .x(a_x), .rtc(a_rtc), .shape_w(a_w), .shape_h(a_h),
    .best_idx(a_best), .best_w(a_bw), .best_h(a_bh), .best_rtc(a_brtc)
  );

  // large instance: K_MAX = 100, Q = 32
  logic        b_clear = 0, b_access = 0;
  logic [6:0]  b_k = 0;
  logic [6:0]  b_y = 0, b_x = 0;
  logic [31:0] b_rtc [6];
  logic [5:0]  b_w [6], b_h [6];
  logic [2:0]  b_best;
  logic [5:0]  b_bw, b_bh;
  logic [31:0] b_brtc;

  layout_shape_search #(.K_MAX(100), .Q(32)) dut_b (
    .clk(clk), .rst_n(rst_n), .clear(b_clear), .access(b_access), .k_size(b_k),
    .y(b_y), .x(b_x), .rtc(b_rtc), .shape_w(b_w), .shape_h(b_h),
    .best_idx(b_best), .best_w(b_bw), .best_h(b_bh), .best_rtc(b_brtc)
  );

  // 34-column instance: K_MAX = 40, Q = 34 (shapes 34x1, 17x2, 2x17, 1x34)
  logic        c_clear = 0, c_access = 0;
  logic [5:0]  c_k = 0;
  logic [5:0]  c_y = 0, c_x = 0;
  logic [31:0] c_rtc [4];
  logic [5:0]  c_w [4], c_h [4];
  logic [1:0]  c_best;
  logic [5:0]  c_bw, c_bh;
  logic [31:0] c_brtc;

  layout_shape_search #(.K_MAX(40), .Q(34)) dut_c (
    .clk(clk), .rst_n(rst_n), .clear(c_clear), .access(c_access), .k_size(c_k),
    .y(c_y), .x(c_x), .rtc(c_rtc), .shape_w(c_w), .shape_h(c_h),
    .best_idx(c_best), .best_w(c_bw), .best_h(c_bh), .best_rtc(c_brtc)
  );

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    run_c(40, 0, '{3119, 1697, 2377, 4639}, 1);
    run_c(40, 1, '{3041, 1541, 895, 1675}, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sy[$], sx[$];

  // symbolic access sequence of the compress kernel
  task automatic gen(input int k, input bit mh);
    sy.delete(); sx.delete();
    for (int i = 1; i < k; i++)
      for (int j = 1; j < k; j++) begin
        if (mh && j > 1) begin
          sy.push_back(i - 1); sx.push_back(j);
          sy.push_back(i);     sx.push_back(j);
          sy.push_back(i);     sx.push_back(j);
        end else begin
          sy.push_back(i - 1); sx.push_back(j - 1);
          sy.push_back(i - 1); sx.push_back(j);
          sy.push_back(i);     sx.push_back(j - 1);
          sy.push_back(i);     sx.push_back(j);
          sy.push_back(i);     sx.push_back(j);
        end
      end
  endtask

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run_a(input bit mh, input int e0, input int e1, input int e2, input int ebest);
    gen(4, mh);
    @(negedge clk); a_clear = 1; @(negedge clk); a_clear = 0;
    foreach (sy[n]) begin
      a_access = 1; a_y = 2'(sy[n]); a_x = 2'(sx[n]);
      @(negedge clk);
    end
    a_access = 0;
    chk(int'(a_rtc[0]), e0, "4x4 shape 4x1");
    chk(int'(a_rtc[1]), e1, "4x4 shape 2x2");
    chk(int'(a_rtc[2]), e2, "4x4 shape 1x4");
    chk(int'(a_best), ebest, "4x4 best index");
    chk(int'(a_brtc), (ebest == 0) ? e0 : (ebest == 1) ? e1 : e2, "4x4 best count");
  endtask

  task automatic run_b(input int k, input bit mh, input int e[6], input int ebest);
    gen(k, mh);
    @(negedge clk); b_clear = 1; @(negedge clk); b_clear = 0;
    b_k = 7'(k);
    foreach (sy[n]) begin
      b_access = 1; b_y = 7'(sy[n]); b_x = 7'(sx[n]);
      @(negedge clk);
      b_access = (n % 7 == 3) ? 1'b0 : 1'b1;   // an idle cycle now and then
      if (!b_access) @(negedge clk);
    end
    b_access = 0;
    for (int s = 0; s < 6; s++) chk(int'(b_rtc[s]), e[s], $sformatf("k=%0d mh=%0d shape %0d", k, mh, s));
    chk(int'(b_best), ebest, "best index");
    chk(int'(b_bw), 32 >> ebest, "best width");
    chk(int'(b_bh), 1 << ebest, "best height");
  endtask

  task automatic run_c(input int k, input bit mh, input int e[4], input int ebest);
    gen(k, mh);
    @(negedge clk); c_clear = 1; @(negedge clk); c_clear = 0;
    c_k = 6'(k);
    foreach (sy[n]) begin
      c_access = 1; c_y = 6'(sy[n]); c_x = 6'(sx[n]);
      @(negedge clk);
    end
    c_access = 0;
    for (int s = 0; s < 4; s++) chk(int'(c_rtc[s]), e[s], $sformatf("q=34 k=%0d mh=%0d shape %0d", k, mh, s));
    chk(int'(c_best), ebest, "q=34 best index");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // shape tables
    chk(int'(a_w[0]), 4, "shape 0 width");  chk(int'(a_h[0]), 1, "shape 0 height");
    chk(int'(a_w[1]), 2, "shape 1 width");  chk(int'(a_h[1]), 2, "shape 1 height");
    chk(int'(a_w[2]), 1, "shape 2 width");  chk(int'(a_h[2]), 4, "shape 2 height");
    for (int s = 0; s < 6; s++) begin
      chk(int'(b_w[s]), 32 >> s, "32-column shape width");
      chk(int'(b_h[s]), 1 << s, "32-column shape height");
    end
    chk(int'(c_w[0]), 34, "34-column shape 0");  chk(int'(c_w[1]), 17, "34-column shape 1");
    chk(int'(c_w[2]), 2, "34-column shape 2");   chk(int'(c_h[3]), 34, "34-column shape 3");
    run_a(0, 15, 15, 29, 0);
    run_a(1, 15, 9, 17, 1);
    run_a(0, 15, 15, 29, 0);   // after clear the counts start again
    run_b(10, 0, '{153, 68, 67, 77, 116, 251}, 2);
    run_b(10, 1, '{153, 68, 49, 41, 44, 107}, 3);
    run_b(100, 0, '{20195, 11239, 8102, 9302, 15539, 29795}, 2);
    run_b(100, 1, '{19601, 10051, 5726, 4550, 5837, 10391}, 3);
    run_c(40, 0, '{3119, 1697, 2377, 4639}, 1);
    run_c(40, 1, '{3041, 1541, 895, 1675}, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
