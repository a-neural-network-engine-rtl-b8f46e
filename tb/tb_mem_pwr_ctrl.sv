// tb_mem_pwr_ctrl: for random layer bases and sizes, marks here the memory
// instance of every address the layer reads or writes and compares the set
// with bank_wake; checks that all instances are on while idle.
module tb_mem_pwr_ctrl;
  import nne_pkg::*;
  logic busy = 1'b0;
  addr_t in_base = '0, out_base = '0, w_start = '0;
  logic [IN_VECS_W-1:0] in_vecs = '0;
  logic [OUT_VECS_W-1:0] out_vecs = '0;
  logic [NUM_BANKS-1:0] bank_wake;
  int checks = 0, failures = 0;

  mem_pwr_ctrl dut (.*);

  initial begin
    for (int k = 0; k < 400; k++) begin
      automatic logic [NUM_BANKS-1:0] e = '0;
      automatic int iv = $urandom_range(1, 36), ov = $urandom_range(1, SBUF_DEPTH);
      automatic int wl = ov * (12*iv + 1);
      automatic int ib = $urandom_range(0, 7167 - iv), ob = $urandom_range(0, 7167 - ov);
      automatic int ws = $urandom_range(0, 7168 - wl);
      busy = (k % 10 != 0);
      in_base = addr_t'(ib); out_base = addr_t'(ob); w_start = addr_t'(ws);
      in_vecs = IN_VECS_W'(iv); out_vecs = OUT_VECS_W'(ov);
      for (int a = ib; a < ib + iv; a++) e[a / BANK_DEPTH] = 1'b1;
      for (int a = ob; a < ob + ov; a++) e[a / BANK_DEPTH] = 1'b1;
      for (int a = ws; a < ws + wl; a++) e[a / BANK_DEPTH] = 1'b1;
      if (!busy) e = '1;
      #1;
      checks++;
      if (bank_wake != e) begin
        failures++;
        $display("FAIL k=%0d got %b exp %b", k, bank_wake, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
