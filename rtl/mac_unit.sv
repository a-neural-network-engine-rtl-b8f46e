// mac_unit: twelve multiply-accumulate lanes working in parallel on one
// broadcast input element (input stationary) and twelve weights, one per
// output neuron, accumulating into twelve 25-bit registers (output
// stationary). 'preload' loads the twelve biases of the next vector of
// neurons, which also clears the accumulators: each signed 8-bit bias is
// sign-extended, shifted left by bias_lshift and arithmetically right by
// accu_shift, the shifts the inputs of this layer have already undergone
// in earlier layers. 'mac_en' adds act * w_vec[lane] to every lane.
// Both act in the cycle they are asserted; acc shows the registers.
// Lanes, accumulator width and bias preloading follow the engine
// description; the bias left alignment value and wrap-around on overflow
// are this implementation's choices.
module mac_unit
  import nne_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   preload,
  input  vec_t                   bias_vec,
  input  logic [ACCU_SH_W-1:0]   accu_shift,
  input  logic [3:0]             bias_lshift,
  input  logic                   mac_en,
  input  logic signed [DATA_W:0] act,
  input  vec_t                   w_vec,
  output acc_t                   acc [LANES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES; i++) acc[i] <= '0;
    end else if (preload) begin
      for (int i = 0; i < LANES; i++) begin
        acc_t b;
        b = ACC_W'($signed(bias_vec[i*DATA_W +: DATA_W]));
        b = b <<< bias_lshift;
        acc[i] <= b >>> accu_shift;
      end
    end else if (mac_en) begin
      for (int i = 0; i < LANES; i++)
        acc[i] <= acc[i] + ACC_W'(act * $signed(w_vec[i*DATA_W +: DATA_W]));
    end
  end

  a_one_op: assert property (@(posedge clk) !(preload && mac_en));

endmodule
