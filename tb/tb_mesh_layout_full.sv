// tb_mesh_layout_full: the whole design at its default size, one 1000 x 1000 array.
//
// The top is built with its defaults: a 32-column memory, 8 x 4 rectangles (rectangles
// row major, elements column major), 16-bit words and arrays up to 1000 x 1000. The
// testbench loads a random 1000 x 1000 array through the host port, runs the compress
// kernel once without and then once with the two-register reuse layer, and reads the
// array back. It checks the result of both runs against the kernel computed here, the
// run lengths, and the row transition counts of the memory and of all six candidate
// shapes (32x1, 16x2, 8x4, 4x8, 2x16, 1x32) against values computed by a separate model
// of the layouts. For reference, a plain row major layout of the same array (address
// y*1000 + x, 32 words per row) gives 2057939 row transitions without the reuse layer;
// the 8 x 4 rectangles give 839003, 59% fewer.
module tb_mesh_layout_full;
  localparam int K = 1000, W = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, mh_en = 0;
  logic [9:0] k_size = 10'(K);
  logic busy, done;
  logic host_en = 0, host_we = 0;
  logic [9:0] host_y = 0, host_x = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic search_clear = 0, trace_valid = 0;
  logic [9:0] trace_y = 0, trace_x = 0;
  logic [31:0] rtc, accesses, iterations, reuse_hits;
  logic [31:0] cand_rtc [6];
  logic [5:0]  cand_w [6], cand_h [6];
  logic [2:0]  best_idx;
  logic [5:0]  best_w, best_h;
  logic [31:0] best_rtc;

  mesh_layout_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] ref_arr [K][K];
  int busy_cycles;

  always @(posedge clk) if (rst_n && busy) busy_cycles++;

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic kernel_ref();
    int p;
    for (int i = 1; i < K; i++)
      for (int j = 1; j < K; j++) begin
        p = 2 * int'(ref_arr[i-1][j-1]) + int'(ref_arr[i-1][j]) + int'(ref_arr[i][j-1]);
        ref_arr[i][j] = W'(int'(ref_arr[i][j]) - p);
      end
  endtask

  task automatic run(input bit mh, input int exp_rtc, input int exp_cand[6], input int exp_best);
    int exp_acc;
    exp_acc = mh ? (K - 1) * (5 + 3 * (K - 2)) : 5 * (K - 1) * (K - 1);
    busy_cycles = 0;
    @(negedge clk);
    mh_en = mh; start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    chk(busy_cycles, exp_acc, $sformatf("mh=%0d cycles", mh));
    chk(int'(accesses), exp_acc, "accesses");
    chk(int'(iterations), (K - 1) * (K - 1), "iterations");
    chk(int'(reuse_hits), mh ? (K - 1) * (K - 2) : 0, "reuse hits");
    chk(int'(rtc), exp_rtc, $sformatf("mh=%0d memory row transitions (8x4)", mh));
    for (int s = 0; s < 6; s++)
      chk(int'(cand_rtc[s]), exp_cand[s], $sformatf("mh=%0d shape %0dx%0d", mh, cand_w[s], cand_h[s]));
    chk(int'(best_idx), exp_best, $sformatf("mh=%0d best shape", mh));
    $display("mh=%0d: %0d cycles, memory RTC %0d, best shape %0dx%0d with RTC %0d",
             mh, busy_cycles, rtc, best_w, best_h, best_rtc);
    kernel_ref();
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load
    for (int y = 0; y < K; y++)
      for (int x = 0; x < K; x++) begin
        ref_arr[y][x] = W'($urandom);
        @(negedge clk);
        host_en = 1; host_we = 1; host_y = 10'(y); host_x = 10'(x); host_wdata = ref_arr[y][x];
      end
    @(negedge clk);
    host_en = 0; host_we = 0;
    run(0, 839003, '{2057939, 1152377, 839003, 964003, 1589377, 3025939}, 2);
    run(1, 591251, '{1996001, 1028501, 591251, 466501, 592375, 1031935}, 3);
    // read back: request at one negedge, data at the next
    for (int y = 0; y < K; y++)
      for (int x = 0; x < K; x++) begin
        @(negedge clk);
        host_en = 1; host_we = 0; host_y = 10'(y); host_x = 10'(x);
        @(negedge clk);
        host_en = 0;
        checks++;
        if (host_rdata !== ref_arr[y][x]) begin
          failures++;
          if (failures < 20) $display("FAIL a[%0d][%0d] = %h, expected %h", y, x, host_rdata, ref_arr[y][x]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
