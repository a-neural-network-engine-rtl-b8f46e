// tb_nne_top: end-to-end test of the engine at its default sizes. It loads a
// network through the host memory port, configures it, runs it and checks
// every stored activation of the last two layers, the per-vector and total
// output shifts, the cycle count 2*N + sum(out_vecs*(13*in_vecs+4)), and the
// numbers of memory loads and stores, against a reference model written
// here from the arithmetic the engine is meant to perform (ReLU, per-vector
// power-of-two scaling to 8 bits, missing shifts applied to the next layer's
// inputs, biases scaled by the shifts of earlier layers).
// Run 1 is the keyword-spotting network 250x144x144x144x12 with random
// signed inputs and weights (7332 cycles, 7213 loads, 37 stores); run 2 a
// small 30x20x40x5 network with unsigned inputs, other block addresses and
// all-zero weights in every second vector of neurons, so that some vectors
// need no shift and the next layer's missing shift saturates. Each mechanism of the
// design (bias alignment, per-vector shift, missing-shift realignment and
// its saturation, ReLU, clamped zero shift, block and buffer swaps, memory
// instances switched off) is counted and must occur.
module tb_nne_top;
  import nne_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;

  logic                  cfg_we = 1'b0;
  logic [5:0]            cfg_addr = '0;
  logic [15:0]           cfg_wdata = '0;
  logic [15:0]           cfg_rdata;
  logic                  host_en = 1'b0, host_we = 1'b0;
  addr_t                 host_addr = '0;
  vec_t                  host_wdata = '0, host_rdata;
  logic                  start = 1'b0, busy, done;
  logic [ACCU_SH_W-1:0]  res_accu_shift;
  logic [SBUF_IDX_W-1:0] res_shift_idx = '0;
  logic [SHIFT_W-1:0]    res_shift;
  logic [NUM_BANKS-1:0]  bank_wake;

  nne_top dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int n_bias_align = 0, n_vec_shift = 0, n_zero_shift = 0, n_inp_shift = 0,
      n_inp_sat = 0, n_relu = 0, n_swap = 0, n_bank_off = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- memory image and reference model ----------------
  logic [VEC_W-1:0] img [1 << ADDR_W];

  function automatic int sbyte(input logic [VEC_W-1:0] v, input int i);
    return int'($signed(v[i*8 +: 8]));
  endfunction
  function automatic int ubyte(input logic [VEC_W-1:0] v, input int i);
    return int'(v[i*8 +: 8]);
  endfunction
  function automatic int nbits(input int v);   // bits of a positive value
    int n = 0;
    while (v > 0) begin n++; v = v >> 1; end
    return n;
  endfunction

  int exp_out [][];        // reference outputs per layer, per element
  int exp_vshift [][];     // reference per-vector shift per layer
  int exp_accu_final;

  // runs the reference model over the image as the host laid it out
  task automatic reference(input int nl, input int inv[], input int outv[], input int wbase,
                           input int b0, input int b1, input bit sgn, input int lsh);
    int x [];
    int prev_vs [];
    int prev_max = 0, accu = 0;
    int wa = wbase;
    exp_out = new[nl];
    exp_vshift = new[nl];
    // inputs from block_0
    x = new[inv[0]*LANES];
    for (int i = 0; i < inv[0]*LANES; i++)
      x[i] = sgn ? sbyte(img[b0 + i/LANES], i%LANES) : ubyte(img[b0 + i/LANES], i%LANES);
    for (int l = 0; l < nl; l++) begin
      int y [];
      int vs [];
      int cur_max = 0;
      y  = new[outv[l]*LANES];
      vs = new[outv[l]];
      // second scaling step on this layer's inputs
      if (l > 0) begin
        for (int v = 0; v < inv[l]; v++) begin
          int s = prev_max - prev_vs[v];
          if (s > 7) begin s = 7; n_inp_sat++; end
          if (s > 0) n_inp_shift++;
          for (int e = 0; e < LANES; e++) x[v*LANES+e] = x[v*LANES+e] >> s;
        end
      end
      for (int g = 0; g < outv[l]; g++) begin
        int acc [LANES];
        int mx = 0, sh;
        for (int n = 0; n < LANES; n++) begin
          int b = sbyte(img[wa], n) * (1 << lsh);
          acc[n] = (accu > 30) ? (b < 0 ? -1 : 0) : (b >>> accu);
          if (accu > 0 && b != 0) n_bias_align++;
        end
        wa++;
        for (int v = 0; v < inv[l]; v++)
          for (int e = 0; e < LANES; e++) begin
            for (int n = 0; n < LANES; n++)
              acc[n] += x[v*LANES+e] * sbyte(img[wa], n);
            wa++;
          end
        for (int n = 0; n < LANES; n++) if (acc[n] > mx) mx = acc[n];
        sh = nbits(mx) > 8 ? nbits(mx) - 8 : 0;
        if (sh > 0) n_vec_shift++; else n_zero_shift++;
        vs[g] = sh;
        if (sh > cur_max) cur_max = sh;
        for (int n = 0; n < LANES; n++) begin
          if (acc[n] <= 0) begin
            y[g*LANES+n] = 0;
            if (acc[n] < 0) n_relu++;
          end else y[g*LANES+n] = (acc[n] >> sh) & 255;
        end
      end
      exp_out[l] = y;
      exp_vshift[l] = vs;
      if (l < nl-1) begin
        accu = accu + cur_max;
        if (accu > 63) accu = 63;
      end
      exp_accu_final = accu;
      prev_max = cur_max;
      prev_vs = vs;
      x = y;
    end
  endtask

  // ---------------- host side ----------------
  task automatic cfg_write(input logic [5:0] a, input int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_addr = a; cfg_wdata = 16'(d);
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic host_write(input int a, input vec_t d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b1; host_addr = addr_t'(a); host_wdata = d;
    @(negedge clk);
    host_en = 1'b0; host_we = 1'b0;
  endtask

  task automatic host_read(input int a, output vec_t d);
    @(negedge clk);
    host_en = 1'b1; host_we = 1'b0; host_addr = addr_t'(a);
    @(negedge clk);
    host_en = 1'b0;
    d = host_rdata;
  endtask

  function automatic logic [7:0] rnd_byte(input int lo, input int hi);
    return 8'(lo + int'($urandom_range(0, hi - lo)));
  endfunction

  // builds a network: a_n[l] real inputs, o_n[l] real outputs per layer
  task automatic run_net(input int nl, input int a_n[], input int o_n[], input int wbase,
                         input int b0, input int b1, input bit sgn, input int lsh,
                         input int wmag, input bit zero_odd, input int expect_cycles);
    int inv [], outv [];
    int wa = wbase;
    int cycles = 0, loads = 0, stores = 0, exp_cyc = 2*nl, exp_ld = 0, exp_st = 0;
    int last_blk;
    vec_t d;
    inv = new[nl]; outv = new[nl];
    for (int l = 0; l < nl; l++) begin
      inv[l]  = (a_n[l] + LANES - 1) / LANES;
      outv[l] = (o_n[l] + LANES - 1) / LANES;
      exp_cyc += outv[l] * (13*inv[l] + 4);
      exp_ld  += outv[l] * (13*inv[l] + 1);
      exp_st  += outv[l];
    end
    // inputs, zero padded
    for (int v = 0; v < inv[0]; v++) begin
      d = '0;
      for (int e = 0; e < LANES; e++)
        if (v*LANES+e < a_n[0])
          d[e*8 +: 8] = sgn ? rnd_byte(-128, 127) : rnd_byte(0, 255);
      img[b0+v] = d;
    end
    // per vector of neurons: bias vector, then weight vector per input element
    for (int l = 0; l < nl; l++)
      for (int g = 0; g < outv[l]; g++) begin
        d = '0;
        for (int n = 0; n < LANES; n++)
          if (g*LANES+n < o_n[l]) d[n*8 +: 8] = rnd_byte(-128, 127);
        img[wa++] = d;
        for (int i = 0; i < inv[l]*LANES; i++) begin
          d = '0;
          for (int n = 0; n < LANES; n++)
            if (g*LANES+n < o_n[l] && i < a_n[l] && !(zero_odd && g % 2 == 1))
              d[n*8 +: 8] = rnd_byte(-wmag, wmag);
          img[wa++] = d;
        end
      end
    reference(nl, inv, outv, wbase, b0, b1, sgn, lsh);
    for (int a = wbase; a < wa; a++) host_write(a, img[a]);
    for (int v = 0; v < inv[0]; v++) host_write(b0+v, img[b0+v]);
    cfg_write(CFG_NUM_LAYERS, nl);
    cfg_write(CFG_W_BASE, wbase);
    cfg_write(CFG_BLK0_BASE, b0);
    cfg_write(CFG_BLK1_BASE, b1);
    cfg_write(CFG_MODE, {27'b0, sgn, 4'(lsh)});
    for (int l = 0; l < nl; l++) begin
      cfg_write(CFG_LAYER0 + 6'(2*l), inv[l]);
      cfg_write(CFG_LAYER0 + 6'(2*l+1), outv[l]);
    end
    @(negedge clk);
    cfg_addr = CFG_W_BASE;
    #1 check(cfg_rdata == 16'(wbase), "config read-back");
    // run
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) begin
      @(posedge clk);
      if (busy) begin
        cycles++;
        if (dut.mem_en && !dut.mem_we) loads++;
        if (dut.mem_en &&  dut.mem_we) stores++;
        if (bank_wake != '1) n_bank_off++;
        if (dut.ctl.layer_end) n_swap++;
      end
    end
    $display("run: %0d layers, %0d cycles (expected %0d), %0d loads, %0d stores", nl, cycles, exp_cyc, loads, stores);
    check(cycles == exp_cyc, "cycle count formula");
    if (expect_cycles > 0) check(cycles == expect_cycles, "cycle count of the document's network");
    check(loads == exp_ld && stores == exp_st, "memory loads and stores");
    @(negedge clk);
    // outputs of the last layer, and of the one before it in the other block
    last_blk = (nl % 2) ? b1 : b0;
    for (int k = 0; k < 2 && k < nl; k++) begin
      int l = nl - 1 - k;
      int blk = (k == 0) ? last_blk : ((nl % 2) ? b0 : b1);
      for (int v = 0; v < outv[l]; v++) begin
        host_read(blk + v, d);
        for (int n = 0; n < LANES; n++)
          check(ubyte(d, n) == exp_out[l][v*LANES+n],
                $sformatf("layer %0d vector %0d lane %0d: got %0d expected %0d", l, v, n, ubyte(d, n), exp_out[l][v*LANES+n]));
      end
    end
    for (int v = 0; v < outv[nl-1]; v++) begin
      res_shift_idx = SBUF_IDX_W'(v);
      #1 check(int'(res_shift) == exp_vshift[nl-1][v], "per-vector output shift");
    end
    check(int'(res_accu_shift) == exp_accu_final, $sformatf("total output shift %0d expected %0d", res_accu_shift, exp_accu_final));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // keyword-spotting network: 250x144x144x144x12, Eq. (2) gives 7332 cycles
    run_net(4, '{250, 144, 144, 144}, '{144, 144, 144, 12}, 0, 6661, 6682, 1'b1, 4, 127, 1'b0, 7332);
    // small network, unsigned inputs, small weights
    run_net(3, '{30, 20, 40}, '{20, 40, 5}, 100, 2048, 1000, 1'b0, 0, 127, 1'b1, 0);
    $display("mechanisms: bias_align=%0d vec_shift=%0d zero_shift=%0d inp_shift=%0d inp_sat=%0d relu=%0d swap=%0d bank_off=%0d",
             n_bias_align, n_vec_shift, n_zero_shift, n_inp_shift, n_inp_sat, n_relu, n_swap, n_bank_off);
    check(n_bias_align > 0, "bias alignment occurred");
    check(n_vec_shift > 0, "per-vector shift occurred");
    check(n_zero_shift > 0, "zero per-vector shift occurred");
    check(n_inp_shift > 0, "missing-shift realignment occurred");
    check(n_inp_sat > 0, "missing-shift saturation occurred");
    check(n_relu > 0, "ReLU occurred");
    check(n_swap > 0, "block and buffer swap occurred");
    check(n_bank_off > 0, "memory instance switched off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
