// tb_mesh_layout_top: end-to-end test of the compress kernel on the tile-laid-out memory.
//
// Built with 2 x 2 rectangles in a 4-column memory (rectangles row major, elements column
// major) and arrays up to 12 x 12. For every run the testbench loads a random array
// through the host port, runs the kernel, reads the array back and checks
//  - the result against the kernel computed in the testbench,
//  - the run length (one access per busy cycle) and the access/iteration/reuse counters,
//  - the row transition count of the memory against a model of the built layout,
//  - the row transition count of every candidate shape of the search and the winner.
// The 4 x 4 run reproduces the worked example: 1x4 rectangles give 29 row transitions,
// 2x2 and 4x1 give 15, and the row major 4x1 wins the tie. The testbench also feeds a
// column-wise access trace through the trace port.
// It counts how often each mechanism occurred: runs with and without the reuse layer,
// iterations served by the reuse registers, row switches, accesses to peripheral
// rectangles, host accesses, trace-fed searches and a search tie won by row major.
module tb_mesh_layout_top;
  import layout_pkg::*;

  localparam int K_MAX = 12, Q = 4, W = 16, RW_ = 2, RH_ = 2;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, mh_en = 0;
  logic [3:0] k_size = 0;
  logic busy, done;
  logic host_en = 0, host_we = 0;
  logic [3:0] host_y = 0, host_x = 0;
  logic [W-1:0] host_wdata = 0, host_rdata;
  logic search_clear = 0, trace_valid = 0;
  logic [3:0] trace_y = 0, trace_x = 0;
  logic [31:0] rtc, accesses, iterations, reuse_hits;
  logic [31:0] cand_rtc [3];
  logic [2:0]  cand_w [3], cand_h [3];
  logic [1:0]  best_idx;
  logic [2:0]  best_w, best_h;
  logic [31:0] best_rtc;

  mesh_layout_top #(
    .K_MAX(K_MAX), .Q(Q), .W(W), .RECT_W(RW_), .RECT_H(RH_),
    .RECT_ORDER(ORDER_ROW_MAJOR), .ELEM_ORDER(ORDER_COL_MAJOR)
  ) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_run_plain, n_run_reuse, n_reuse_hits, n_row_switch, n_periph, n_host, n_trace, n_tie;
  int busy_cycles, cur_k;

  always @(posedge clk) begin
    if (rst_n && busy) begin
      busy_cycles++;
    end
    if (rst_n && host_en) n_host++;
  end

  logic [W-1:0] ref_arr [K_MAX][K_MAX];
  int sy[$], sx[$];

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  // row transitions of a symbolic sequence under m x n rectangles, one per row
  function automatic int model_rtc(input int k, input int m, input int n);
    int cnt, r, pr;
    cnt = 0;
    foreach (sy[i]) begin
      r = (sy[i] / n) * ((k + m - 1) / m) + sx[i] / m;
      if (i > 0 && r != pr) cnt++;
      pr = r;
    end
    return cnt;
  endfunction

  task automatic host_write(input int y, input int x, input logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_we = 1; host_y = 4'(y); host_x = 4'(x); host_wdata = d;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input int y, input int x, output logic [W-1:0] d);
    @(negedge clk);
    host_en = 1; host_we = 0; host_y = 4'(y); host_x = 4'(x);
    @(negedge clk);
    host_en = 0;
    d = host_rdata;
  endtask

  task automatic run(input int k, input bit mh);
    int p, exp_acc, exp_hits;
    logic [W-1:0] d;
    k_size = 4'(k);
    cur_k = k;
    for (int y = 0; y < k; y++)
      for (int x = 0; x < k; x++) begin
        ref_arr[y][x] = W'($urandom);
        host_write(y, x, ref_arr[y][x]);
      end
    sy.delete(); sx.delete();
    exp_hits = 0;
    for (int i = 1; i < k; i++)
      for (int j = 1; j < k; j++) begin
        p = 2 * int'(ref_arr[i-1][j-1]) + int'(ref_arr[i-1][j]) + int'(ref_arr[i][j-1]);
        ref_arr[i][j] = W'(int'(ref_arr[i][j]) - p);
        if (mh && j > 1) begin
          exp_hits++;
          sy.push_back(i - 1); sx.push_back(j);
          sy.push_back(i); sx.push_back(j);
          sy.push_back(i); sx.push_back(j);
        end else begin
          sy.push_back(i - 1); sx.push_back(j - 1);
          sy.push_back(i - 1); sx.push_back(j);
          sy.push_back(i); sx.push_back(j - 1);
          sy.push_back(i); sx.push_back(j);
          sy.push_back(i); sx.push_back(j);
        end
      end
    exp_acc = sy.size();
    foreach (sy[n])
      if ((sy[n] / RH_ + 1) * RH_ > k || (sx[n] / RW_ + 1) * RW_ > k) n_periph++;
    busy_cycles = 0;
    @(negedge clk);
    mh_en = mh; start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    chk(busy_cycles, exp_acc, $sformatf("k=%0d mh=%0d busy cycles", k, mh));
    chk(int'(accesses), exp_acc, "accesses");
    chk(int'(iterations), (k - 1) * (k - 1), "iterations");
    chk(int'(reuse_hits), exp_hits, "reuse hits");
    chk(int'(rtc), model_rtc(k, RW_, RH_), $sformatf("k=%0d mh=%0d memory row transitions", k, mh));
    for (int s = 0; s < 3; s++)
      chk(int'(cand_rtc[s]), model_rtc(k, 4 >> s, 1 << s), $sformatf("k=%0d mh=%0d shape %0d", k, mh, s));
    if (mh) n_run_reuse++; else n_run_plain++;
    n_reuse_hits += int'(reuse_hits);
    n_row_switch += int'(rtc);
    for (int y = 0; y < k; y++)
      for (int x = 0; x < k; x++) begin
        host_read(y, x, d);
        chk(int'(d), int'(ref_arr[y][x]), $sformatf("k=%0d mh=%0d a[%0d][%0d]", k, mh, y, x));
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;

    // worked example: 4 x 4 array, 4 columns, no reuse layer
    run(4, 0);
    chk(int'(cand_rtc[0]), 15, "example 4x1");
    chk(int'(cand_rtc[1]), 15, "example 2x2");
    chk(int'(cand_rtc[2]), 29, "example 1x4");
    chk(int'(rtc), 15, "example memory (2x2)");
    chk(int'(best_idx), 0, "example winner index");
    chk(int'(best_w), 4, "example winner width");
    chk(int'(best_h), 1, "example winner height");
    if (best_idx == 0 && cand_rtc[0] == cand_rtc[1]) n_tie++;

    // same array with the reuse layer
    run(4, 1);
    chk(int'(rtc), 9, "4x4 with reuse, memory (2x2)");
    chk(int'(best_idx), 1, "4x4 with reuse winner");

    // arrays with peripheral rectangles and the largest array
    run(11, 0);
    run(11, 1);
    run(12, 1);
    run(7, 0);

    // trace port: column-wise walk of a 6 x 6 array
    k_size = 4'd6;
    sy.delete(); sx.delete();
    @(negedge clk); search_clear = 1; @(negedge clk); search_clear = 0;
    for (int x = 0; x < 6; x++)
      for (int y = 0; y < 6; y++) begin
        sy.push_back(y); sx.push_back(x);
        trace_valid = 1; trace_y = 4'(y); trace_x = 4'(x);
        @(negedge clk);
      end
    trace_valid = 0;
    for (int s = 0; s < 3; s++)
      chk(int'(cand_rtc[s]), model_rtc(6, 4 >> s, 1 << s), $sformatf("trace shape %0d", s));
    chk(int'(best_idx), 2, "trace winner (1x4)");
    n_trace++;

    $display("mechanisms: plain runs %0d, reuse runs %0d, reuse hits %0d, row switches %0d, peripheral accesses %0d, host accesses %0d, trace searches %0d, row major ties %0d",
             n_run_plain, n_run_reuse, n_reuse_hits, n_row_switch, n_periph, n_host, n_trace, n_tie);
    chk(int'(n_run_plain > 0), 1, "a run without reuse happened");
    chk(int'(n_run_reuse > 0), 1, "a run with reuse happened");
    chk(int'(n_reuse_hits > 0), 1, "reuse registers served iterations");
    chk(int'(n_row_switch > 0), 1, "row switches happened");
    chk(int'(n_periph > 0), 1, "peripheral rectangles were accessed");
    chk(int'(n_host > 0), 1, "host accesses happened");
    chk(int'(n_trace > 0), 1, "a trace-fed search happened");
    chk(int'(n_tie > 0), 1, "a tie was won by row major");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
