// nne_top: a neural network engine for fully-connected ReLU networks with
// 8-bit weights, biases and activations, meant as a small co-processor of
// a DSP. Twelve multiply-accumulate lanes compute a vector of twelve
// neurons at a time: each input element read once is used for twelve
// neurons (input stationary), and each neuron stays in its accumulator until
// it is finished (output stationary). Results are brought back to 8 bits by
// the two-step scaling: every result vector is shifted just enough for its
// largest positive value to fit (scaling_logic), and when the vectors are
// read back as inputs of the next layer each is shifted by what it lacks
// against the largest shift of its layer (shift_res, load_inp), so that a
// whole layer ends up at one scale without re-reading any result. Biases of
// later layers are shifted by the scale their inputs have accumulated.
//
// Memory (nne_memory): one 96-bit vector per 13-bit address, seven
// instances. The weight area holds, per vector of 12 neurons, a bias vector
// followed by 12*in_vecs weight vectors (weight vector j holds input element
// j's weights of the 12 neurons); block_0 and block_1 hold activations and
// swap roles after every layer, the network's inputs being in block_0.
//
// Host interface: configuration registers (cfg_*, see nne_pkg for the map),
// a memory port usable while busy is low (host_*, read data one cycle after
// the request), start, busy and a one-cycle done. After done the outputs are
// in block_1 if the layer count is odd, block_0 if even; output vector v
// stands for the real-valued outputs times 2^-(res_accu_shift + res_shift)
// with res_shift read at res_shift_idx = v. bank_wake shows the memory
// instances switched on.
//
// Timing: an inference takes 2*N + sum(out_vecs*(13*in_vecs + 4)) cycles,
// with the memory busy in all but 2 + 3*out_vecs cycles per layer. The
// datapath structure follows the engine description; the host interface,
// the bias alignment value and the memory instance size are this
// implementation's choices.
module nne_top
  import nne_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [5:0]            cfg_addr,
  input  logic [15:0]           cfg_wdata,
  output logic [15:0]           cfg_rdata,
  input  logic                  host_en,
  input  logic                  host_we,
  input  addr_t                 host_addr,
  input  vec_t                  host_wdata,
  output vec_t                  host_rdata,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [ACCU_SH_W-1:0]  res_accu_shift,
  input  logic [SBUF_IDX_W-1:0] res_shift_idx,
  output logic [SHIFT_W-1:0]    res_shift,
  output logic [NUM_BANKS-1:0]  bank_wake
);

  nne_cfg_t              cfg;
  logic [LAYER_W-1:0]    layer_idx;
  logic [IN_VECS_W-1:0]  cfg_in_vecs, in_vecs;
  logic [OUT_VECS_W-1:0] cfg_out_vecs, out_vecs;
  nne_ctl_t              ctl;
  logic                  eng_en, eng_we;
  addr_t                 eng_addr, in_base, out_base, w_layer_start;
  logic                  mem_en, mem_we;
  addr_t                 mem_addr;
  vec_t                  mem_wdata, mem_rdata;

  // requests issued in one cycle are served by the data of the next
  rd_kind_e              rd_kind_q;
  logic [IN_VECS_W-1:0]  in_idx_q;

  logic [INP_SHIFT_W-1:0] inp_shift;
  logic [ACCU_SH_W-1:0]   accu_shift;
  logic [SHIFT_W-1:0]     prev_max;
  logic signed [DATA_W:0] act;
  acc_t                   acc [LANES];
  vec_t                   res_vec;
  logic [SHIFT_W-1:0]     vec_shift;

  nne_config u_config (
    .clk, .rst_n, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .layer_idx, .cfg,
    .layer_in_vecs  (cfg_in_vecs),
    .layer_out_vecs (cfg_out_vecs)
  );

  nne_ctrl u_ctrl (
    .clk, .rst_n, .start,
    .num_layers   (cfg.num_layers),
    .cfg_in_vecs, .cfg_out_vecs,
    .layer_idx, .in_vecs, .out_vecs, .ctl,
    .mem_en       (eng_en),
    .mem_we       (eng_we),
    .busy, .done
  );

  addr_gen u_addr (
    .clk, .rst_n, .ctl,
    .w_base    (cfg.w_base),
    .blk0_base (cfg.blk0_base),
    .blk1_base (cfg.blk1_base),
    .mem_addr  (eng_addr),
    .in_base, .out_base, .w_layer_start
  );

  mem_pwr_ctrl u_pwr (
    .busy, .in_base, .in_vecs, .out_base, .out_vecs,
    .w_start (w_layer_start),
    .bank_wake
  );

  // the host owns the memory while the engine is idle
  always_comb begin
    if (busy) begin
      mem_en    = eng_en;
      mem_we    = eng_we;
      mem_addr  = eng_addr;
      mem_wdata = res_vec;
    end else begin
      mem_en    = host_en;
      mem_we    = host_we;
      mem_addr  = host_addr;
      mem_wdata = host_wdata;
    end
  end

  nne_memory u_mem (
    .clk,
    .en    (mem_en),
    .we    (mem_we),
    .addr  (mem_addr),
    .wdata (mem_wdata),
    .rdata (mem_rdata),
    .bank_wake
  );

  assign host_rdata = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_kind_q <= RD_NONE;
      in_idx_q  <= '0;
    end else begin
      rd_kind_q <= ctl.rd_kind;
      in_idx_q  <= ctl.in_idx;
    end
  end

  load_inp u_load_inp (
    .clk, .rst_n,
    .load      (rd_kind_q == RD_INP),
    .vec_in    (mem_rdata),
    .inp_shift,
    .signed_in (ctl.first_layer && cfg.first_signed),
    .pop       (rd_kind_q == RD_WGT),
    .act
  );

  mac_unit u_mac (
    .clk, .rst_n,
    .preload     (rd_kind_q == RD_BIAS),
    .bias_vec    (mem_rdata),
    .accu_shift,
    .bias_lshift (cfg.bias_lshift),
    .mac_en      (rd_kind_q == RD_WGT),
    .act,
    .w_vec       (mem_rdata),
    .acc
  );

  scaling_logic u_scale (
    .clk, .rst_n,
    .en        (ctl.scale),
    .acc,
    .res_vec,
    .res_shift (vec_shift)
  );

  shift_res u_shift_res (
    .clk, .rst_n,
    .clear       (ctl.run_start),
    .first_layer (ctl.first_layer),
    .wr_en       (ctl.mem_write),
    .wr_idx      (ctl.grp_idx),
    .wr_shift    (vec_shift),
    .rd_idx      (in_idx_q[SBUF_IDX_W-1:0]),
    .inp_shift,
    .layer_end   (ctl.layer_end),
    .accu_shift,
    .prev_max,
    .host_idx    (res_shift_idx),
    .host_shift  (res_shift)
  );

  assign res_accu_shift = accu_shift - ACCU_SH_W'(prev_max);

  a_host_idle: assert property (@(posedge clk) !(busy && host_en));

endmodule
