// reuse_buffer: register-level memory hierarchy layer of the compress kernel.
//
// When the kernel's 2x2 access window moves one step right, two of its four elements
// were used by the previous iteration: a[i-1][j] becomes the next upper-left element
// and the freshly written a[i][j] becomes the next left element. Holding those two words
// in registers saves two of the five memory accesses of every iteration after the first
// of a row, which also removes their row transitions.
//
// Interface: at the end of an iteration capture stores up_in (a[i-1][j]) and left_in
// (the new a[i][j]) and sets valid. flush clears valid, used when a row of the array
// starts and the registers hold nothing of use. flush wins over capture.
// ul and l present the held words for the next iteration; they are meaningful only while
// valid is high. Timing: registers updated at the clock edge, outputs straight from them.
// The two registers and what they hold follow the method's memory hierarchy; the valid
// flag and clearing it at each new row are this design's own.
module reuse_buffer #(
  parameter int W = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         flush,
  input  logic         capture,
  input  logic [W-1:0] up_in,
  input  logic [W-1:0] left_in,
  output logic [W-1:0] ul,
  output logic [W-1:0] l,
  output logic         valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ul    <= '0;
      l     <= '0;
      valid <= 1'b0;
    end else if (flush) begin
      valid <= 1'b0;
    end else if (capture) begin
      ul    <= up_in;
      l     <= left_in;
      valid <= 1'b1;
    end
  end

endmodule
