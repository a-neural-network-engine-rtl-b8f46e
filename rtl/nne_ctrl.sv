// nne_ctrl: the engine's finite state machine. An inference runs layer by
// layer; a layer is one init cycle (latch the layer's sizes), then for each
// vector of 12 output neurons: one bias read, and for each of the layer's
// input vectors one input read followed by twelve weight reads (one weight
// vector per input element, twelve neurons per weight vector), then one
// drain cycle for the last multiply-accumulate, one scaling cycle and one
// store cycle; and finally one layer-end cycle in which buffer and block
// roles swap. The memory is busy in every cycle except init, drain, scaling
// and layer end, so an inference takes
//   2*N + sum over layers of out_vecs * (13*in_vecs + 4)
// cycles, the engine's deterministic cycle count. The controller only
// issues requests; data return one cycle later and are steered by the
// datapath from ctl.rd_kind. 'start' is taken in the idle state when at
// least one layer is configured; busy is high from the first init cycle to
// the last layer-end cycle; done pulses for one cycle after it. Layer sizes
// must be at least one vector. The state sequence is this implementation's
// way of meeting the cycle count the engine description gives.
module nne_ctrl
  import nne_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [LAYER_W:0]      num_layers,
  input  logic [IN_VECS_W-1:0]  cfg_in_vecs,
  input  logic [OUT_VECS_W-1:0] cfg_out_vecs,
  output logic [LAYER_W-1:0]    layer_idx,
  output logic [IN_VECS_W-1:0]  in_vecs,
  output logic [OUT_VECS_W-1:0] out_vecs,
  output nne_ctl_t              ctl,
  output logic                  mem_en,
  output logic                  mem_we,
  output logic                  busy,
  output logic                  done
);

  typedef enum logic [3:0] {
    S_IDLE, S_LINIT, S_BIAS, S_INP, S_WGT, S_DRAIN, S_SCALE, S_WRITE, S_LEND
  } state_e;

  state_e                state;
  logic [LAYER_W:0]      layer_q;
  logic [SBUF_IDX_W-1:0] grp_q;
  logic [IN_VECS_W-1:0]  in_q;
  logic [3:0]            w_q;
  logic                  last_layer;

  assign layer_idx  = layer_q[LAYER_W-1:0];
  assign last_layer = (layer_q + 1'b1 == num_layers);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      layer_q  <= '0;
      grp_q    <= '0;
      in_q     <= '0;
      w_q      <= '0;
      in_vecs  <= '0;
      out_vecs <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE:
          if (start && num_layers != '0) begin
            layer_q <= '0;
            state   <= S_LINIT;
          end
        S_LINIT: begin
          in_vecs  <= cfg_in_vecs;
          out_vecs <= cfg_out_vecs;
          grp_q    <= '0;
          state    <= S_BIAS;
        end
        S_BIAS: begin
          in_q  <= '0;
          state <= S_INP;
        end
        S_INP: begin
          w_q   <= '0;
          state <= S_WGT;
        end
        S_WGT: begin
          w_q <= w_q + 1'b1;
          if (w_q == 4'(LANES - 1)) begin
            if (in_q == in_vecs - 1'b1) state <= S_DRAIN;
            else begin
              in_q  <= in_q + 1'b1;
              state <= S_INP;
            end
          end
        end
        S_DRAIN: state <= S_SCALE;
        S_SCALE: state <= S_WRITE;
        S_WRITE: begin
          if (OUT_VECS_W'(grp_q) == out_vecs - 1'b1) state <= S_LEND;
          else begin
            grp_q <= grp_q + 1'b1;
            state <= S_BIAS;
          end
        end
        S_LEND: begin
          layer_q <= layer_q + 1'b1;
          if (last_layer) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else state <= S_LINIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ctl             = '0;
    ctl.run_start   = (state == S_IDLE) && start && num_layers != '0;
    ctl.layer_start = (state == S_LINIT);
    ctl.layer_end   = (state == S_LEND);
    ctl.group_start = (state == S_BIAS);
    ctl.scale       = (state == S_SCALE);
    ctl.mem_write   = (state == S_WRITE);
    unique case (state)
      S_BIAS:  ctl.rd_kind = RD_BIAS;
      S_INP:   ctl.rd_kind = RD_INP;
      S_WGT:   ctl.rd_kind = RD_WGT;
      default: ctl.rd_kind = RD_NONE;
    endcase
    ctl.in_idx      = in_q;
    ctl.grp_idx     = grp_q;
    ctl.first_layer = (layer_q == '0);
  end

  assign mem_en = (ctl.rd_kind != RD_NONE) || ctl.mem_write;
  assign mem_we = ctl.mem_write;
  assign busy   = (state != S_IDLE);

endmodule
