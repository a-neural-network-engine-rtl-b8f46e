// tb_addr_gen: drives the address generators with the strobe sequence of a
// multi-layer run (as the controller issues it) and checks every memory
// address: bias and weight reads walk the weight area without gaps, input
// reads restart at the read block for every vector of neurons, stores walk
// the write block, and the blocks swap roles after every layer.
module tb_addr_gen;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  nne_ctl_t ctl = '0;
  addr_t w_base = '0, blk0_base = '0, blk1_base = '0;
  addr_t mem_addr, in_base, out_base, w_layer_start;
  int checks = 0, failures = 0;

  addr_gen dut (.*);

  task automatic step(input rd_kind_e rk, input logic wr, input int exp_addr);
    ctl.rd_kind = rk; ctl.mem_write = wr;
    ctl.group_start = (rk == RD_BIAS);
    #1;
    checks++;
    if (int'(mem_addr) != exp_addr) begin
      failures++;
      $display("FAIL kind %0d addr %0d expected %0d", rk, mem_addr, exp_addr);
    end
    @(negedge clk);
    ctl = '0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 4; run++) begin
      automatic int wa = $urandom_range(0, 3000);
      automatic int b0 = $urandom_range(4000, 5000), b1 = $urandom_range(6000, 7000);
      automatic int nl = $urandom_range(1, 5);
      w_base = addr_t'(wa); blk0_base = addr_t'(b0); blk1_base = addr_t'(b1);
      @(negedge clk);
      ctl.run_start = 1; @(negedge clk); ctl = '0;
      for (int l = 0; l < nl; l++) begin
        automatic int iv = $urandom_range(1, 4), ov = $urandom_range(1, 5);
        automatic int ib = (l % 2) ? b1 : b0, ob = (l % 2) ? b0 : b1;
        automatic int lstart = wa;
        ctl.layer_start = 1; @(negedge clk); ctl = '0;
        checks++;
        if (int'(in_base) != ib || int'(out_base) != ob || int'(w_layer_start) != lstart) begin
          failures++; $display("FAIL layer bases");
        end
        for (int g = 0; g < ov; g++) begin
          step(RD_BIAS, 0, wa++);
          for (int v = 0; v < iv; v++) begin
            step(RD_INP, 0, ib + v);
            repeat (12) step(RD_WGT, 0, wa++);
          end
          @(negedge clk); @(negedge clk);
          step(RD_NONE, 1, ob + g);
        end
        ctl.layer_end = 1; @(negedge clk); ctl = '0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
