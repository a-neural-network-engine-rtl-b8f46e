// tb_nne_config: writes random values to every register, including the
// per-layer sizes of all layers, then checks the read-back, the
// configuration outputs and the sizes presented for each layer index.
module tb_nne_config;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic cfg_we = 1'b0;
  logic [5:0] cfg_addr = '0;
  logic [15:0] cfg_wdata = '0, cfg_rdata;
  logic [LAYER_W-1:0] layer_idx = '0;
  nne_cfg_t cfg;
  logic [IN_VECS_W-1:0] layer_in_vecs;
  logic [OUT_VECS_W-1:0] layer_out_vecs;
  int checks = 0, failures = 0;

  nne_config dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic wr(input int a, input int d);
    @(negedge clk); cfg_we = 1; cfg_addr = 6'(a); cfg_wdata = 16'(d);
    @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int nl, wb, b0, b1, md;
    int iv [MAX_LAYERS], ov [MAX_LAYERS];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 10; k++) begin
      nl = $urandom_range(1, MAX_LAYERS); wb = $urandom_range(0, 8191);
      b0 = $urandom_range(0, 8191); b1 = $urandom_range(0, 8191); md = $urandom_range(0, 31);
      wr(CFG_NUM_LAYERS, nl); wr(CFG_W_BASE, wb); wr(CFG_BLK0_BASE, b0); wr(CFG_BLK1_BASE, b1); wr(CFG_MODE, md);
      for (int l = 0; l < MAX_LAYERS; l++) begin
        iv[l] = $urandom_range(1, 63); ov[l] = $urandom_range(1, SBUF_DEPTH);
        wr(int'(CFG_LAYER0) + 2*l, iv[l]); wr(int'(CFG_LAYER0) + 2*l + 1, ov[l]);
      end
      wr(6'h3f, 16'hffff);   // unmapped register: no effect
      chk(int'(cfg.num_layers) == nl && int'(cfg.w_base) == wb && int'(cfg.blk0_base) == b0
          && int'(cfg.blk1_base) == b1 && int'(cfg.bias_lshift) == (md & 15) && cfg.first_signed == md[4], "cfg outputs");
      @(negedge clk);
      cfg_addr = CFG_NUM_LAYERS; #1 chk(int'(cfg_rdata) == nl, "read num_layers");
      cfg_addr = CFG_W_BASE;     #1 chk(int'(cfg_rdata) == wb, "read w_base");
      cfg_addr = CFG_BLK0_BASE;  #1 chk(int'(cfg_rdata) == b0, "read blk0");
      cfg_addr = CFG_BLK1_BASE;  #1 chk(int'(cfg_rdata) == b1, "read blk1");
      cfg_addr = CFG_MODE;       #1 chk(int'(cfg_rdata) == md, "read mode");
      for (int l = 0; l < MAX_LAYERS; l++) begin
        layer_idx = LAYER_W'(l);
        cfg_addr = 6'(int'(CFG_LAYER0) + 2*l);     #1 chk(int'(cfg_rdata) == iv[l], "read in_vecs");
        cfg_addr = 6'(int'(CFG_LAYER0) + 2*l + 1); #1 chk(int'(cfg_rdata) == ov[l], "read out_vecs");
        chk(int'(layer_in_vecs) == iv[l] && int'(layer_out_vecs) == ov[l], $sformatf("layer %0d sizes", l));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
