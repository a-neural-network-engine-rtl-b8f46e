// lzc: leading-zero count of a W-bit word, combinational. An all-zero word
// gives W. Helper of the scaling logic.
module lzc #(
  parameter int unsigned W  = 25,
  localparam int unsigned CW = $clog2(W + 1)
) (
  input  logic [W-1:0]  x,
  output logic [CW-1:0] cnt
);
  always_comb begin
    cnt = CW'(W);
    for (int i = 0; i < W; i++)
      if (x[i]) cnt = CW'(W - 1 - i);
  end
endmodule
