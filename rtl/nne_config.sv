// nne_config: the engine's configuration registers, written and read by the
// host over a simple register bus (cfg_we/cfg_addr/cfg_wdata, cfg_rdata
// combinational). It holds the number of layers, the start addresses of
// the weight area and of the two activation blocks, the bias alignment and
// whether the first layer's inputs are signed (cfg), and for every layer the
// number of 12-element input vectors and of 12-neuron output vectors, of
// which the layer layer_idx is presented to the controller. Writes take
// effect at the clock edge. That such a register module exists follows the
// engine description; the register map and field widths are this
// implementation's choices (see nne_pkg).
module nne_config
  import nne_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  cfg_we,
  input  logic [5:0]            cfg_addr,
  input  logic [15:0]           cfg_wdata,
  output logic [15:0]           cfg_rdata,
  input  logic [LAYER_W-1:0]    layer_idx,
  output nne_cfg_t              cfg,
  output logic [IN_VECS_W-1:0]  layer_in_vecs,
  output logic [OUT_VECS_W-1:0] layer_out_vecs
);

  logic [IN_VECS_W-1:0]  in_vecs  [MAX_LAYERS];
  logic [OUT_VECS_W-1:0] out_vecs [MAX_LAYERS];

  // layer registers occupy CFG_LAYER0 .. CFG_LAYER0 + 2*MAX_LAYERS - 1
  function automatic logic is_layer_reg(input logic [5:0] a);
    return a >= CFG_LAYER0 && a < CFG_LAYER0 + 6'(2 * MAX_LAYERS);
  endfunction

  logic [5:0]         loff;
  logic [LAYER_W-1:0] lsel;
  assign loff = cfg_addr - CFG_LAYER0;
  assign lsel = loff[LAYER_W:1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg <= '0;
      for (int l = 0; l < MAX_LAYERS; l++) begin
        in_vecs[l]  <= '0;
        out_vecs[l] <= '0;
      end
    end else if (cfg_we) begin
      unique case (cfg_addr)
        CFG_NUM_LAYERS: cfg.num_layers <= cfg_wdata[LAYER_W:0];
        CFG_W_BASE:     cfg.w_base     <= cfg_wdata[ADDR_W-1:0];
        CFG_BLK0_BASE:  cfg.blk0_base  <= cfg_wdata[ADDR_W-1:0];
        CFG_BLK1_BASE:  cfg.blk1_base  <= cfg_wdata[ADDR_W-1:0];
        CFG_MODE: begin
          cfg.bias_lshift  <= cfg_wdata[3:0];
          cfg.first_signed <= cfg_wdata[4];
        end
        default:
          if (is_layer_reg(cfg_addr)) begin
            if (loff[0]) out_vecs[lsel] <= cfg_wdata[OUT_VECS_W-1:0];
            else         in_vecs[lsel]  <= cfg_wdata[IN_VECS_W-1:0];
          end
      endcase
    end
  end

  always_comb begin
    cfg_rdata = '0;
    unique case (cfg_addr)
      CFG_NUM_LAYERS: cfg_rdata = 16'(cfg.num_layers);
      CFG_W_BASE:     cfg_rdata = 16'(cfg.w_base);
      CFG_BLK0_BASE:  cfg_rdata = 16'(cfg.blk0_base);
      CFG_BLK1_BASE:  cfg_rdata = 16'(cfg.blk1_base);
      CFG_MODE:       cfg_rdata = {11'b0, cfg.first_signed, cfg.bias_lshift};
      default:
        if (is_layer_reg(cfg_addr))
          cfg_rdata = loff[0] ? 16'(out_vecs[lsel]) : 16'(in_vecs[lsel]);
    endcase
  end

  assign layer_in_vecs  = in_vecs[layer_idx];
  assign layer_out_vecs = out_vecs[layer_idx];

endmodule
