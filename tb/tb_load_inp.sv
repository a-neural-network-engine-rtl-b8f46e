// tb_load_inp: loads random input vectors with every inp_shift value, both
// unsigned and signed, pops the twelve elements and compares each with the
// element shifted here (logical for unsigned, arithmetic for signed),
// widened to 9 bits.
module tb_load_inp;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic load = 1'b0, signed_in = 1'b0, pop = 1'b0;
  vec_t vec_in = '0;
  logic [INP_SHIFT_W-1:0] inp_shift = '0;
  logic signed [DATA_W:0] act;
  int checks = 0, failures = 0;

  load_inp dut (.*);

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 64; k++) begin
      automatic vec_t v = {$urandom, $urandom, $urandom};
      automatic int sh = k % 8;
      automatic bit sg = (k / 8) % 2;
      @(negedge clk); load = 1; vec_in = v; inp_shift = INP_SHIFT_W'(sh); signed_in = sg;
      @(negedge clk); load = 0;
      for (int e = 0; e < LANES; e++) begin
        automatic int x = sg ? int'($signed(v[e*8 +: 8])) : int'(v[e*8 +: 8]);
        automatic int expv = x >>> sh;
        checks++;
        if (int'(act) != expv) begin
          failures++;
          $display("FAIL k=%0d e=%0d got %0d exp %0d", k, e, act, expv);
        end
        pop = 1; @(negedge clk); pop = 0;
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
