// tb_mac_unit: preloads random biases with random alignment shifts, runs
// random numbers of multiply-accumulate steps with random 9-bit inputs and
// 8-bit weights, and compares all twelve accumulators with sums computed
// here, wrapped to 25 bits.
module tb_mac_unit;
  import nne_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = !clk;
  logic preload = 1'b0, mac_en = 1'b0;
  vec_t bias_vec = '0, w_vec = '0;
  logic [ACCU_SH_W-1:0] accu_shift = '0;
  logic [3:0] bias_lshift = '0;
  logic signed [DATA_W:0] act = '0;
  acc_t acc [LANES];
  int checks = 0, failures = 0;
  int model [LANES];

  mac_unit dut (.*);

  function automatic int wrap25(input longint v);
    logic [24:0] t = 25'(v);
    return int'($signed(t));
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      automatic int ls = $urandom_range(0, 15);
      automatic int as = (k % 5 == 0) ? $urandom_range(26, 40) : $urandom_range(0, 20);
      automatic int steps = $urandom_range(1, 300);
      bias_vec = {$urandom, $urandom, $urandom};
      @(negedge clk); preload = 1; bias_lshift = 4'(ls); accu_shift = ACCU_SH_W'(as);
      for (int n = 0; n < LANES; n++) begin
        automatic int b = int'($signed(bias_vec[n*8 +: 8])) * (1 << ls);
        model[n] = (as >= 31) ? (b < 0 ? -1 : 0) : (b >>> as);
      end
      @(negedge clk); preload = 0;
      for (int n = 0; n < LANES; n++) begin
        checks++;
        if (int'(acc[n]) != model[n]) begin failures++; $display("FAIL preload lane %0d", n); end
      end
      for (int s = 0; s < steps; s++) begin
        automatic int a = (k % 2) ? $urandom_range(0, 255) : int'($urandom_range(0, 255)) - 128;
        w_vec = {$urandom, $urandom, $urandom};
        act = 9'(a);
        mac_en = 1;
        for (int n = 0; n < LANES; n++)
          model[n] = wrap25(longint'(model[n]) + a * int'($signed(w_vec[n*8 +: 8])));
        @(negedge clk);
      end
      mac_en = 0;
      for (int n = 0; n < LANES; n++) begin
        checks++;
        if (int'(acc[n]) != model[n]) begin failures++; $display("FAIL k=%0d lane %0d got %0d exp %0d", k, n, acc[n], model[n]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
