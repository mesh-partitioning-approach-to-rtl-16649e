// tb_mem_cell_array: self-checking test of the single-port memory cell array.
//
// Fills a small 8 x 4 array of bytes with random words, reads every location back
// (read data one cycle after the request), checks that rdata holds while the port is
// idle, that a write does not disturb rdata, that active_row follows the last access,
// and that overwriting one word leaves its neighbours unchanged.
module tb_mem_cell_array;
  localparam int P = 8, Q = 4, W = 8;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic en = 0, we = 0;
  logic [2:0] row = 0;
  logic [1:0] col = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [2:0] active_row;
  logic [W-1:0] ref_mem [P][Q];

  mem_cell_array #(.P(P), .Q(Q), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic access(input logic w, input int r, input int c, input logic [W-1:0] d);
    en <= 1; we <= w; row <= 3'(r); col <= 2'(c); wdata <= d;
    @(posedge clk);
    en <= 0; we <= 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int r = 0; r < P; r++)
      for (int c = 0; c < Q; c++) begin
        ref_mem[r][c] = W'($urandom);
        access(1, r, c, ref_mem[r][c]);
        #1 check(W'(active_row), W'(r), "active_row after write");
      end
    for (int r = P - 1; r >= 0; r--)
      for (int c = 0; c < Q; c++) begin
        access(0, r, c, 0);
        #1 check(rdata, ref_mem[r][c], "read data");
        check(W'(active_row), W'(r), "active_row after read");
      end
    // rdata holds while idle and across a write
    repeat (3) @(posedge clk);
    #1 check(rdata, ref_mem[0][Q-1], "rdata held while idle");
    access(1, 5, 2, 8'h5a);
    ref_mem[5][2] = 8'h5a;
    #1 check(rdata, ref_mem[0][Q-1], "rdata held across a write");
    for (int c = 0; c < Q; c++) begin
      access(0, 5, c, 0);
      #1 check(rdata, ref_mem[5][c], "row 5 after overwrite");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
