// tb_row_transition_counter: self-checking test of the row transition counter.
//
// Drives random access sequences with idle cycles in between, mostly staying in a few
// rows, and compares count and row_switch with a reference that compares each access's
// row with the row of the previous access. Also checks that clear forgets the previous
// row (the first access after it is not a transition) and that the count saturates.
module tb_row_transition_counter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic clear = 0, access = 0;
  logic [3:0] row = 0;
  logic row_switch;
  logic [3:0] count;   // narrow counter to reach saturation

  row_transition_counter #(.ROW_W(4), .CNT_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ref_cnt;
  int prev;
  bit have_prev;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int run = 0; run < 20; run++) begin
      clear <= 1;
      @(posedge clk);
      clear <= 0;
      ref_cnt = 0; have_prev = 0;
      for (int n = 0; n < 40; n++) begin
        access <= ($urandom_range(0, 3) != 0);
        row    <= 4'($urandom_range(0, 2) + (run % 3));
        #1;
        checks++;
        if (row_switch !== (access && have_prev && int'(row) != prev)) begin
          failures++;
          $display("FAIL row_switch run %0d step %0d", run, n);
        end
        if (access) begin
          if (have_prev && int'(row) != prev && ref_cnt < 15) ref_cnt++;
          have_prev = 1; prev = int'(row);
        end
        @(posedge clk);
        #1;
        checks++;
        if (int'(count) != ref_cnt) begin
          failures++;
          $display("FAIL count run %0d step %0d: %0d expected %0d", run, n, count, ref_cnt);
        end
      end
      access <= 0;
    end
    // alternating rows: every access after the first is a transition, count saturates
    clear <= 1; @(posedge clk); clear <= 0;
    for (int n = 0; n < 20; n++) begin
      access <= 1; row <= 4'(n % 2);
      @(posedge clk);
    end
    access <= 0;
    #1 checks++;
    if (count !== 4'hf) begin failures++; $display("FAIL no saturation: %0d", count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
