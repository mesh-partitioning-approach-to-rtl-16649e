// tb_reuse_buffer: self-checking test of the two-register reuse layer.
//
// Random capture/flush sequences against a reference: capture loads both words and sets
// valid, flush clears valid (and wins over capture), otherwise everything holds.
module tb_reuse_buffer;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic flush = 0, capture = 0;
  logic [15:0] up_in = 0, left_in = 0, ul, l;
  logic valid;
  logic [15:0] r_ul, r_l;
  bit r_valid;

  reuse_buffer #(.W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 checks++;
    if (valid !== 1'b0) failures++;
    rst_n <= 1;
    r_valid = 0;
    for (int n = 0; n < 500; n++) begin
      flush   <= ($urandom_range(0, 4) == 0);
      capture <= ($urandom_range(0, 1) == 0);
      up_in   <= 16'($urandom);
      left_in <= 16'($urandom);
      @(posedge clk);
      if (flush) r_valid = 0;
      else if (capture) begin r_valid = 1; r_ul = up_in; r_l = left_in; end
      #1;
      checks++;
      if (valid !== r_valid || (r_valid && (ul !== r_ul || l !== r_l))) begin
        failures++;
        $display("FAIL step %0d: valid %0b ul %h l %h, expected %0b %h %h", n, valid, ul, l, r_valid, r_ul, r_l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
