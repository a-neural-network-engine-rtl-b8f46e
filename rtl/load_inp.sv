// load_inp: the input loader with its inp_fifo. A 96-bit vector of LANES
// 8-bit inputs is loaded in one cycle ('load'); on the way in every element
// is shifted right by inp_shift, the missing shifts of that vector relative
// to the largest shift of the previous layer (second step of the two-step
// scaling). Each 'pop' advances the FIFO by one element; 'act' is the
// current element widened to 9 bits, zero-extended for the unsigned ReLU
// outputs of a previous layer or sign-extended when signed_in is set (signed
// network inputs of the first layer). Element 0 (bits 7:0) comes first.
// The FIFO-with-shift follows the engine description; the element order and
// the signed-input option are this implementation's choices.
module load_inp
  import nne_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  vec_t                   vec_in,
  input  logic [INP_SHIFT_W-1:0] inp_shift,
  input  logic                   signed_in,
  input  logic                   pop,
  output logic signed [DATA_W:0] act
);

  logic [DATA_W-1:0] fifo [LANES];
  logic              sgn_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LANES; i++) fifo[i] <= '0;
      sgn_q <= 1'b0;
    end else if (load) begin
      for (int i = 0; i < LANES; i++) begin
        if (signed_in)
          fifo[i] <= DATA_W'($signed(vec_in[i*DATA_W +: DATA_W]) >>> inp_shift);
        else
          fifo[i] <= vec_in[i*DATA_W +: DATA_W] >> inp_shift;
      end
      sgn_q <= signed_in;
    end else if (pop) begin
      for (int i = 0; i < LANES-1; i++) fifo[i] <= fifo[i+1];
      fifo[LANES-1] <= '0;
    end
  end

  assign act = sgn_q ? {fifo[0][DATA_W-1], fifo[0]} : {1'b0, fifo[0]};

  a_no_load_and_pop: assert property (@(posedge clk) !(load && pop));

endmodule
