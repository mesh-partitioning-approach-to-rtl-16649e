// compress_datapath: arithmetic of one inner iteration of the "compress" kernel.
//
// The kernel predicts every element from its upper-left, upper and left neighbours and
// replaces it by the prediction error:
//   pred      = 2*a[i-1][j-1] + a[i-1][j] + a[i][j-1]
//   a[i][j]  <= a[i][j] - pred
// Inputs ul, u, l, c are a[i-1][j-1], a[i-1][j], a[i][j-1] and a[i][j]; result is the
// new a[i][j]. Words are W-bit two's complement and all arithmetic wraps modulo 2**W
// (an own choice: the kernel gives no word width).
// Timing: purely combinational.
module compress_datapath #(
  parameter int W = 16
) (
  input  logic [W-1:0] ul,
  input  logic [W-1:0] u,
  input  logic [W-1:0] l,
  input  logic [W-1:0] c,
  output logic [W-1:0] pred,
  output logic [W-1:0] result
);

  always_comb begin
    pred   = W'({ul, 1'b0}) + u + l;
    result = c - pred;
  end

endmodule
