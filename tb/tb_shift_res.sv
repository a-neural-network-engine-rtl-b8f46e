// tb_shift_res: runs several layers of random per-vector shifts through the
// two shift buffers and checks, for every input vector of the following
// layer, the missing shift (largest previous shift minus the vector's own,
// saturated to 7, zero in the first layer), the accumulated shift after each
// layer and the host read-back of the previous layer's shifts.
module tb_shift_res;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic clear = 1'b0, first_layer = 1'b0, wr_en = 1'b0, layer_end = 1'b0;
  logic [SBUF_IDX_W-1:0] wr_idx = '0, rd_idx = '0, host_idx = '0;
  logic [SHIFT_W-1:0] wr_shift = '0, prev_max, host_shift;
  logic [INP_SHIFT_W-1:0] inp_shift;
  logic [ACCU_SH_W-1:0] accu_shift;
  int checks = 0, failures = 0;

  shift_res dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    int prev [SBUF_DEPTH];
    int pmax, accu, nprev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 6; run++) begin
      @(negedge clk); clear = 1; @(negedge clk); clear = 0;
      pmax = 0; accu = 0; nprev = 0;
      for (int l = 0; l < 6; l++) begin
        automatic int n = $urandom_range(1, SBUF_DEPTH);
        automatic int cur [SBUF_DEPTH];
        automatic int cmax = 0;
        first_layer = (l == 0);
        // inputs of this layer: previous layer's vectors
        for (int v = 0; v < nprev; v++) begin
          automatic int e = (l == 0) ? 0 : ((pmax - prev[v]) > 7 ? 7 : pmax - prev[v]);
          rd_idx = SBUF_IDX_W'(v);
          #1 chk(int'(inp_shift) == e, $sformatf("run %0d layer %0d vector %0d inp_shift %0d exp %0d", run, l, v, inp_shift, e));
          host_idx = SBUF_IDX_W'(v);
          #1 chk(int'(host_shift) == prev[v], "host read-back");
        end
        for (int g = 0; g < n; g++) begin
          cur[g] = (run == 5) ? 31 : ((g % 5 == 0) ? $urandom_range(0, 16) : $urandom_range(8, 12));
          if (cur[g] > cmax) cmax = cur[g];
          @(negedge clk); wr_en = 1; wr_idx = SBUF_IDX_W'(g); wr_shift = SHIFT_W'(cur[g]);
        end
        @(negedge clk); wr_en = 0; layer_end = 1;
        @(negedge clk); layer_end = 0;
        accu = accu + cmax; if (accu > 63) accu = 63;
        chk(int'(accu_shift) == accu, $sformatf("accu_shift %0d exp %0d", accu_shift, accu));
        chk(int'(prev_max) == cmax, "layer maximum");
        prev = cur; pmax = cmax; nprev = n;
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
