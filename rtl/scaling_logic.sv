// scaling_logic: first step of the two-step scaling. When 'en' is high it
// takes the twelve 25-bit accumulators of a finished vector of neurons,
// finds the smallest leading-zero count among the strictly positive ones
// (negative values are ignored: ReLU sets them to zero), and derives the
// vector's shift as ACC_W - lzc - DATA_W, so that the largest positive value
// just fits in 8 unsigned bits. Each lane's result is zero when its
// accumulator is not positive (ReLU), else the accumulator shifted right by
// that amount. The 96-bit result and the 5-bit shift are registered and are
// valid in the cycle after 'en', when they are stored. The method follows
// the engine description; clamping the shift at zero when every value
// already fits, and truncation instead of rounding, are this
// implementation's choices.
module scaling_logic
  import nne_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  acc_t               acc [LANES],
  output vec_t               res_vec,
  output logic [SHIFT_W-1:0] res_shift
);

  localparam int unsigned CW = $clog2(ACC_W + 1);

  logic [CW-1:0]      lz [LANES];
  logic [CW-1:0]      lz_min;
  logic [SHIFT_W-1:0] shift;
  vec_t               res;

  for (genvar i = 0; i < LANES; i++) begin : g_lzc
    lzc #(.W(ACC_W)) u_lzc (.x(acc[i]), .cnt(lz[i]));
  end

  always_comb begin
    lz_min = CW'(ACC_W);
    for (int i = 0; i < LANES; i++)
      if (acc[i] > 0 && lz[i] < lz_min) lz_min = lz[i];
    if (lz_min >= CW'(ACC_W - DATA_W)) shift = '0;
    else                                shift = SHIFT_W'(CW'(ACC_W - DATA_W) - lz_min);
    for (int i = 0; i < LANES; i++) begin
      acc_t s;
      s = acc[i] >>> shift;
      res[i*DATA_W +: DATA_W] = (acc[i] > 0) ? s[DATA_W-1:0] : '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_vec   <= '0;
      res_shift <= '0;
    end else if (en) begin
      res_vec   <= res;
      res_shift <= shift;
    end
  end

endmodule
