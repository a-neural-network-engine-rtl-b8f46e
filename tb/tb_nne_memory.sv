// tb_nne_memory: fills addresses spread over all seven instances, reads them
// back in random order with one cycle of latency, checks that an address
// past the last instance reads zero, and that an instance switched off keeps
// its contents while another one is used.
module tb_nne_memory;
  import nne_pkg::*;
  logic clk = 1'b0;
  always #5 clk = !clk;
  logic en = 1'b0, we = 1'b0;
  addr_t addr = '0;
  vec_t wdata = '0, rdata;
  logic [NUM_BANKS-1:0] bank_wake = '1;
  int checks = 0, failures = 0;
  vec_t model [int];
  int addrs [$];

  nne_memory dut (.*);

  task automatic chk(input bit ok, input string s);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", s); end
  endtask
  task automatic wr(input int a, input vec_t d);
    @(negedge clk); en = 1; we = 1; addr = addr_t'(a); wdata = d;
    @(negedge clk); en = 0; we = 0;
  endtask
  task automatic rd(input int a, output vec_t d);
    @(negedge clk); en = 1; we = 0; addr = addr_t'(a);
    @(negedge clk); en = 0; d = rdata;
  endtask

  initial begin
    vec_t d;
    for (int b = 0; b < NUM_BANKS; b++) begin
      addrs.push_back(b*BANK_DEPTH);
      addrs.push_back(b*BANK_DEPTH + BANK_DEPTH - 1);
      for (int k = 0; k < 6; k++) addrs.push_back(b*BANK_DEPTH + int'($urandom_range(1, BANK_DEPTH-2)));
    end
    foreach (addrs[i]) begin
      model[addrs[i]] = {$urandom, $urandom, $urandom};
      wr(addrs[i], model[addrs[i]]);
    end
    addrs.shuffle();
    foreach (addrs[i]) begin
      rd(addrs[i], d);
      chk(d == model[addrs[i]], $sformatf("read %0d", addrs[i]));
    end
    rd(NUM_BANKS*BANK_DEPTH, d);
    chk(d == '0, "unmapped address reads zero");
    // instance 2 off while instance 3 is written
    bank_wake = ~(NUM_BANKS'(1) << 2);
    wr(3*BANK_DEPTH + 5, 96'h5);
    model[3*BANK_DEPTH + 5] = 96'h5;
    bank_wake = '1;
    foreach (addrs[i]) begin
      rd(addrs[i], d);
      chk(d == model[addrs[i]], $sformatf("read after sleep %0d", addrs[i]));
    end
    rd(3*BANK_DEPTH + 5, d);
    chk(d == 96'h5, "write while another instance is off");
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
