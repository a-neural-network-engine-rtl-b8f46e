// tb_sram_sp: writes random words to random addresses of one memory
// instance, reads them back one cycle later and compares with a copy kept
// here; checks that contents survive a period switched off (sleep) and that
// rdata holds when not read.
module tb_sram_sp;
  localparam int DEPTH = 1024;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic sleep = 1'b0, cs = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [95:0] wdata = '0, rdata;
  logic [95:0] model [DEPTH];
  int checks = 0, failures = 0;

  sram_sp dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = {$urandom, $urandom, $urandom};
      @(negedge clk); cs = 1; we = 1; addr = 10'(i); wdata = model[i];
    end
    @(negedge clk); cs = 0; we = 0;
    sleep = 1; repeat (5) @(negedge clk); sleep = 0;
    for (int k = 0; k < 200; k++) begin
      automatic int a = $urandom_range(0, DEPTH-1);
      if ($urandom_range(0, 2) == 0) begin
        model[a] = {$urandom, $urandom, $urandom};
        @(negedge clk); cs = 1; we = 1; addr = 10'(a); wdata = model[a];
        @(negedge clk); cs = 0; we = 0;
      end else begin
        @(negedge clk); cs = 1; we = 0; addr = 10'(a);
        @(negedge clk); cs = 0;
        chk(rdata == model[a], $sformatf("read %0d", a));
        @(negedge clk);
        chk(rdata == model[a], "rdata holds");
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
