// tb_compress_datapath: self-checking test of the compress kernel arithmetic.
//
// Random and corner-case words; the expected values are computed with 32-bit integers
// and reduced modulo 2**16: pred = 2*ul + u + l, result = c - pred.
module tb_compress_datapath;
  int checks = 0, failures = 0;
  logic [15:0] ul, u, l, c, pred, result;

  compress_datapath #(.W(16)) dut (.*);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b, input int d, input int e);
    int p, r;
    ul = 16'(a); u = 16'(b); l = 16'(d); c = 16'(e);
    #1;
    p = (2 * a + b + d) & 32'hffff;
    r = (e - p) & 32'hffff;
    checks++;
    if (int'(pred) != p || int'(result) != r) begin
      failures++;
      $display("FAIL %0d %0d %0d %0d: pred %0d result %0d, expected %0d %0d", a, b, d, e, pred, result, p, r);
    end
  endtask

  initial begin
    one(0, 0, 0, 0);
    one(1, 0, 0, 0);
    one(0, 1, 0, 0);
    one(0, 0, 1, 0);
    one(10, 20, 30, 100);
    one(65535, 65535, 65535, 0);
    for (int n = 0; n < 1000; n++)
      one($urandom_range(0, 65535), $urandom_range(0, 65535), $urandom_range(0, 65535), $urandom_range(0, 65535));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
