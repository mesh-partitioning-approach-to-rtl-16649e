// tb_compress_sweep: the compress workload over the evaluated array sizes.
//
// The top at its default size (32-column memory, 8 x 4 rectangles, arrays up to
// 1000 x 1000) runs the compress kernel for every array side k = 10, 20, ..., 1000, once
// without and once with the two-register reuse layer. For every run the testbench
// counts the row transitions a plain row major layout would cause on the same accesses
// (address y*k + x, 32 words per row) and takes from the design the count of the best
// of the six rectangle shapes. It checks
//  - the memory's own count against the search's count for the built 8 x 4 shape,
//  - the winner against every candidate, and spot values against a separate model,
//  - the run length against the kernel's access count,
// and prints the average reduction over all sizes of
//  - the best shape against row major, no reuse layer          (model: 58.06%),
//  - row major with the reuse layer against row major without  (model:  3.05%),
//  - the best shape with the reuse layer against row major without (model: 76.52%),
// failing if an average is more than 0.01 points from the model.
module tb_compress_sweep;
  localparam int KSTEP = 10, KLAST = 1000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, mh_en = 0;
  logic [9:0] k_size = 0;
  logic busy, done;
  logic host_en = 0, host_we = 0;
  logic [9:0] host_y = 0, host_x = 0;
  logic [15:0] host_wdata = 0, host_rdata;
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
    repeat (300_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // row major reference count, observed on the engine's symbolic accesses
  int  cur_k, rm_cnt, busy_cycles;
  int  prev_row, row_now;
  bit  have_prev;

  always @(posedge clk) begin
    if (rst_n && busy) begin
      busy_cycles++;
      if (dut.e_en) begin
        row_now = (int'(dut.e_y) * cur_k + int'(dut.e_x)) / 32;
        if (have_prev && row_now != prev_row) rm_cnt++;
        prev_row  = row_now;
        have_prev = 1;
      end
    end
  end

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int k, input bit mh, output int rm, output int best);
    cur_k = k; rm_cnt = 0; have_prev = 0; busy_cycles = 0;
    k_size = 10'(k);
    @(negedge clk);
    mh_en = mh; start = 1;
    @(negedge clk);
    start = 0;
    while (busy) @(negedge clk);
    chk(busy_cycles, mh ? (k - 1) * (5 + 3 * (k - 2)) : 5 * (k - 1) * (k - 1), $sformatf("k=%0d mh=%0d cycles", k, mh));
    chk(int'(rtc), int'(cand_rtc[2]), $sformatf("k=%0d mh=%0d memory count vs 8x4 candidate", k, mh));
    for (int s = 0; s < 6; s++) begin
      checks++;
      if (best_rtc > cand_rtc[s]) failures++;
    end
    rm = rm_cnt;
    best = int'(best_rtc);
  endtask

  task automatic avg_chk(input real got, input real exp, input string what);
    checks++;
    $display("%s: %6.2f%% (model %6.2f%%)", what, got, exp);
    if (got - exp > 0.01 || exp - got > 0.01) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    int rm0, b0, rm1, b1, n;
    real s_mesh, s_rm_mh, s_mesh_mh;
    repeat (2) @(posedge clk);
    rst_n = 1;
    s_mesh = 0; s_rm_mh = 0; s_mesh_mh = 0; n = 0;
    for (int k = KSTEP; k <= KLAST; k += KSTEP) begin
      run(k, 0, rm0, b0);
      if (k == 10)   begin chk(rm0, 45, "k=10 row major");        chk(b0, 67, "k=10 best"); end
      if (k == 100)  begin chk(rm0, 20195, "k=100 row major");    chk(b0, 8102, "k=100 best"); end
      if (k == 500)  begin chk(rm0, 513470, "k=500 row major");   chk(b0, 209252, "k=500 best"); end
      if (k == 1000) begin chk(rm0, 2057939, "k=1000 row major"); chk(b0, 839003, "k=1000 best"); end
      run(k, 1, rm1, b1);
      if (k == 100)  begin chk(rm1, 19601, "k=100 row major, reuse"); chk(b1, 4550, "k=100 best, reuse"); end
      if (k == 1000) begin chk(rm1, 1996001, "k=1000 row major, reuse"); chk(b1, 466501, "k=1000 best, reuse"); end
      s_mesh    += 1.0 - real'(b0) / real'(rm0);
      s_rm_mh   += 1.0 - real'(rm1) / real'(rm0);
      s_mesh_mh += 1.0 - real'(b1) / real'(rm0);
      n++;
    end
    avg_chk(100.0 * s_mesh / n, 58.06, "best shape vs row major");
    avg_chk(100.0 * s_rm_mh / n, 3.05, "row major with reuse vs row major");
    avg_chk(100.0 * s_mesh_mh / n, 76.52, "best shape with reuse vs row major");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
