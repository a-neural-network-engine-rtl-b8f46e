// tb_scaling_logic: applies accumulator vectors of random magnitudes (all
// negative, small, and up to the full 25-bit range) and compares the
// registered result vector and shift with values derived here from the bit
// length of the largest positive lane.
module tb_scaling_logic;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic en = 1'b0;
  acc_t acc [LANES];
  vec_t res_vec;
  logic [SHIFT_W-1:0] res_shift;
  int checks = 0, failures = 0;

  scaling_logic dut (.*);

  function automatic int nbits(input int v);
    int n = 0;
    while (v > 0) begin n++; v = v >> 1; end
    return n;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      automatic int mag = $urandom_range(1, 24);
      automatic int mx = 0, sh;
      for (int n = 0; n < LANES; n++) begin
        automatic int v = int'($urandom_range(0, (1 << mag) - 1));
        if (k % 7 == 0 || $urandom_range(0, 3) == 0) v = -v;
        acc[n] = ACC_W'(v);
        if (v > mx) mx = v;
      end
      sh = nbits(mx) > 8 ? nbits(mx) - 8 : 0;
      @(negedge clk); en = 1;
      @(negedge clk); en = 0;
      checks++;
      if (int'(res_shift) != sh) begin failures++; $display("FAIL shift got %0d exp %0d", res_shift, sh); end
      for (int n = 0; n < LANES; n++) begin
        automatic int a = int'(acc[n]);
        automatic int e = (a > 0) ? (a >> sh) : 0;
        checks++;
        if (int'(res_vec[n*8 +: 8]) != e) begin failures++; $display("FAIL lane %0d got %0d exp %0d", n, res_vec[n*8 +: 8], e); end
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
