// tb_compress_engine: self-checking test of the compress kernel controller.
//
// The engine runs against a memory model in the testbench (a k x k array indexed by
// the symbolic address, read data one cycle after the request). For several array sides,
// with and without the reuse layer, the testbench checks
//  - the final array against the kernel computed directly in the testbench,
//  - every access (read/write, y, x) against the sequence the kernel's program order
//    gives: five accesses per iteration, or three after the first iteration of a row
//    when the reuse layer is on,
//  - the run length: one access per busy cycle, (k-1)^2 * 5 or (k-1)*(5 + 3*(k-2)),
//  - the access, iteration and reuse counters.
module tb_compress_engine;
  localparam int K_MAX = 12;
  localparam int W     = 16;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, mh_en = 0;
  logic [3:0] k_size = 0;
  logic busy, done;
  logic mem_en, mem_we;
  logic [3:0] mem_y, mem_x;
  logic [W-1:0] mem_wdata, mem_rdata;
  logic [31:0] accesses, iterations, reuse_hits;

  compress_engine #(.K_MAX(K_MAX), .W(W)) dut (.*);

  always #5 clk = ~clk;

  logic [W-1:0] mem     [K_MAX][K_MAX];
  logic [W-1:0] ref_arr [K_MAX][K_MAX];

  // memory model
  always_ff @(posedge clk) begin
    if (mem_en) begin
      if (mem_we) mem[mem_y][mem_x] <= mem_wdata;
      else        mem_rdata         <= mem[mem_y][mem_x];
    end
  end

  // expected access sequence
  int exp_we[$], exp_y[$], exp_x[$];
  int seen, busy_cycles;

  always @(posedge clk) begin
    if (rst_n && busy) busy_cycles++;
    if (rst_n && mem_en) begin
      checks++;
      if (seen >= exp_we.size() ||
          int'(mem_we) != exp_we[seen] || int'(mem_y) != exp_y[seen] || int'(mem_x) != exp_x[seen]) begin
        failures++;
        if (failures < 10) $display("FAIL access %0d: we=%0d y=%0d x=%0d", seen, mem_we, mem_y, mem_x);
      end
      seen++;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic push(input int we, input int y, input int x);
    exp_we.push_back(we); exp_y.push_back(y); exp_x.push_back(x);
  endtask

  task automatic run(input int k, input bit mh);
    int exp_cycles, exp_hits, p;
    exp_we.delete(); exp_y.delete(); exp_x.delete();
    for (int y = 0; y < k; y++)
      for (int x = 0; x < k; x++) begin
        mem[y][x] = W'($urandom);
        ref_arr[y][x] = mem[y][x];
      end
    exp_hits = 0;
    for (int i = 1; i < k; i++)
      for (int j = 1; j < k; j++) begin
        p = 2 * int'(ref_arr[i-1][j-1]) + int'(ref_arr[i-1][j]) + int'(ref_arr[i][j-1]);
        ref_arr[i][j] = W'(int'(ref_arr[i][j]) - p);
        if (mh && j > 1) begin
          exp_hits++;
          push(0, i - 1, j); push(0, i, j); push(1, i, j);
        end else begin
          push(0, i - 1, j - 1); push(0, i - 1, j); push(0, i, j - 1); push(0, i, j); push(1, i, j);
        end
      end
    exp_cycles = (k < 2) ? 0 : (mh ? (k - 1) * (5 + 3 * (k - 2)) : 5 * (k - 1) * (k - 1));
    seen = 0; busy_cycles = 0;
    @(negedge clk);
    k_size = 4'(k); mh_en = mh; start = 1;
    @(negedge clk);
    start = 0; k_size = 0; mh_en = !mh;   // latched at start
    while (!done && busy) @(negedge clk);
    if (!done) @(negedge clk);
    checks++;
    if (busy_cycles != exp_cycles) begin
      failures++; $display("FAIL k=%0d mh=%0d: %0d busy cycles, expected %0d", k, mh, busy_cycles, exp_cycles);
    end
    checks++;
    if (seen != exp_we.size() || int'(accesses) != exp_we.size()) begin
      failures++; $display("FAIL k=%0d mh=%0d: %0d accesses (counter %0d), expected %0d", k, mh, seen, accesses, exp_we.size());
    end
    checks++;
    if (int'(iterations) != ((k < 2) ? 0 : (k - 1) * (k - 1)) || int'(reuse_hits) != exp_hits) begin
      failures++; $display("FAIL k=%0d mh=%0d: iterations %0d reuse_hits %0d", k, mh, iterations, reuse_hits);
    end
    @(negedge clk);
    for (int y = 0; y < k; y++)
      for (int x = 0; x < k; x++) begin
        checks++;
        if (mem[y][x] !== ref_arr[y][x]) begin
          failures++;
          if (failures < 20) $display("FAIL k=%0d mh=%0d a[%0d][%0d]=%h expected %h", k, mh, y, x, mem[y][x], ref_arr[y][x]);
        end
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(4, 0);
    run(4, 1);
    run(2, 1);
    run(1, 0);
    run(7, 0);
    run(7, 1);
    run(12, 1);
    run(12, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
