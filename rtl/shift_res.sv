// shift_res: bookkeeping for the two-step scaling. Two shift buffers of
// SBUF_DEPTH 5-bit entries take turns: the one being written collects the
// shift of every output vector of the current layer (wr_en) and tracks the
// largest of them; the other holds the shifts of the previous layer. For the
// input vector rd_idx of the current layer, inp_shift is the previous
// layer's largest shift minus that vector's own shift (second step),
// saturated to the 3-bit inp_shift width, and zero in the first layer, whose
// inputs were never scaled. 'layer_end' swaps the roles of the buffers and
// adds the finished layer's largest shift to accu_shift (the accu_val
// logic), which aligns the biases of the next layer. 'clear' starts a new
// inference. host_shift reads the previous-layer buffer, which after the
// last layer holds the per-vector shifts of the network's outputs.
// inp_shift is combinational from rd_idx; all updates take effect at the
// clock edge. Saturation of the shift difference and of accu_shift, and the
// buffer depth, are this implementation's choices.
module shift_res
  import nne_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   first_layer,
  input  logic                   wr_en,
  input  logic [SBUF_IDX_W-1:0]  wr_idx,
  input  logic [SHIFT_W-1:0]     wr_shift,
  input  logic [SBUF_IDX_W-1:0]  rd_idx,
  output logic [INP_SHIFT_W-1:0] inp_shift,
  input  logic                   layer_end,
  output logic [ACCU_SH_W-1:0]   accu_shift,
  output logic [SHIFT_W-1:0]     prev_max,
  input  logic [SBUF_IDX_W-1:0]  host_idx,
  output logic [SHIFT_W-1:0]     host_shift
);

  logic [SHIFT_W-1:0] buff [2][SBUF_DEPTH];   // shift_buff_0, shift_buff_1
  logic               wsel;                   // buffer written in this layer
  logic [SHIFT_W-1:0] cur_max;
  logic [SHIFT_W-1:0] extra;
  logic [ACCU_SH_W:0] accu_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < SBUF_DEPTH; i++) buff[b][i] <= '0;
      wsel       <= 1'b0;
      cur_max    <= '0;
      prev_max   <= '0;
      accu_shift <= '0;
    end else if (clear) begin
      wsel       <= 1'b0;
      cur_max    <= '0;
      prev_max   <= '0;
      accu_shift <= '0;
    end else begin
      if (wr_en) begin
        buff[wsel][wr_idx] <= wr_shift;
        if (wr_shift > cur_max) cur_max <= wr_shift;
      end
      if (layer_end) begin
        wsel       <= !wsel;
        prev_max   <= cur_max;
        cur_max    <= '0;
        accu_shift <= accu_sum[ACCU_SH_W] ? '1 : accu_sum[ACCU_SH_W-1:0];
      end
    end
  end

  assign accu_sum = {1'b0, accu_shift} + (ACCU_SH_W+1)'(cur_max);

  always_comb begin
    extra = prev_max - buff[!wsel][rd_idx];
    if (first_layer)                          inp_shift = '0;
    else if (extra > SHIFT_W'((1 << INP_SHIFT_W) - 1)) inp_shift = '1;
    else                                      inp_shift = INP_SHIFT_W'(extra);
  end

  assign host_shift = buff[!wsel][host_idx];

  a_no_write_at_swap: assert property (@(posedge clk) !(wr_en && layer_end));

endmodule
