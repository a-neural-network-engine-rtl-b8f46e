// tb_nne_ctrl: runs the controller over random layer configurations and
// compares, cycle by cycle, its strobes with the schedule built here: per
// layer one init cycle; per vector of neurons one bias read, per input
// vector one input read and twelve weight reads, then drain, scaling and
// store; one layer-end cycle. Also checks the total cycle count
// 2*N + sum(out_vecs*(13*in_vecs+4)), the one-cycle done pulse and busy.
module tb_nne_ctrl;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic start = 1'b0;
  logic [LAYER_W:0] num_layers = '0;
  logic [IN_VECS_W-1:0] cfg_in_vecs, in_vecs;
  logic [OUT_VECS_W-1:0] cfg_out_vecs, out_vecs;
  logic [LAYER_W-1:0] layer_idx;
  nne_ctl_t ctl;
  logic mem_en, mem_we, busy, done;
  int checks = 0, failures = 0;
  int iv [MAX_LAYERS], ov [MAX_LAYERS];

  assign cfg_in_vecs  = IN_VECS_W'(iv[layer_idx]);
  assign cfg_out_vecs = OUT_VECS_W'(ov[layer_idx]);

  nne_ctrl dut (.*);

  // expected strobes of one cycle: {layer_start, layer_end, group_start, rd_kind, scale, mem_write}
  typedef struct packed {
    logic ls, le, gs;
    rd_kind_e rk;
    logic sc, wr;
    logic [SBUF_IDX_W-1:0] g;
  } exp_t;
  exp_t q [$];

  task automatic push(input logic ls, le, gs, input rd_kind_e rk, input logic sc, wr, input int g);
    exp_t e;
    e.ls = ls; e.le = le; e.gs = gs; e.rk = rk; e.sc = sc; e.wr = wr; e.g = SBUF_IDX_W'(g);
    q.push_back(e);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 8; run++) begin
      automatic int nl = $urandom_range(1, MAX_LAYERS);
      automatic int cyc = 0, exp_cyc = 2*nl;
      q.delete();
      for (int l = 0; l < MAX_LAYERS; l++) begin
        iv[l] = $urandom_range(1, 6); ov[l] = $urandom_range(1, SBUF_DEPTH);
      end
      for (int l = 0; l < nl; l++) begin
        exp_cyc += ov[l] * (13*iv[l] + 4);
        push(1, 0, 0, RD_NONE, 0, 0, 0);
        for (int g = 0; g < ov[l]; g++) begin
          push(0, 0, 1, RD_BIAS, 0, 0, g);
          for (int v = 0; v < iv[l]; v++) begin
            push(0, 0, 0, RD_INP, 0, 0, g);
            repeat (12) push(0, 0, 0, RD_WGT, 0, 0, g);
          end
          push(0, 0, 0, RD_NONE, 0, 0, g);
          push(0, 0, 0, RD_NONE, 1, 0, g);
          push(0, 0, 0, RD_NONE, 0, 1, g);
        end
        push(0, 1, 0, RD_NONE, 0, 0, 0);
      end
      num_layers = (LAYER_W+1)'(nl);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (busy) begin
        automatic exp_t e = q.pop_front();
        cyc++;
        if (ctl.layer_start != e.ls || ctl.layer_end != e.le || ctl.group_start != e.gs || ctl.rd_kind != e.rk
            || ctl.scale != e.sc || ctl.mem_write != e.wr || (e.wr && ctl.grp_idx != e.g)
            || mem_en != (e.rk != RD_NONE || e.wr) || mem_we != e.wr) begin
          failures++;
          $display("FAIL run %0d cycle %0d", run, cyc);
        end
        checks++;
        @(negedge clk);
        if (!busy) begin
          checks++;
          if (!done) begin failures++; $display("FAIL no done"); end
        end
      end
      @(negedge clk);
      checks++;
      if (done) begin failures++; $display("FAIL done longer than one cycle"); end
      checks++;
      if (cyc != exp_cyc || q.size() != 0) begin
        failures++;
        $display("FAIL run %0d: %0d cycles, expected %0d", run, cyc, exp_cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
