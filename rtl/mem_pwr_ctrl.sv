// mem_pwr_ctrl: decides which memory instances are switched on. While the
// engine is idle every instance is on, so the host can load weights and
// inputs and read results. While a layer runs only the instances that
// overlap the layer's input vectors, its result vectors or its bias and
// weight vectors are on; the others are off to save leakage. Purely
// combinational from the layer's bases and sizes, which are stable from the
// first memory access of a layer to its last. Switching instances on and off
// follows the engine description; this particular policy is this
// implementation's choice.
module mem_pwr_ctrl
#(
  parameter int unsigned NUM_BANKS  = nne_pkg::NUM_BANKS,
  parameter int unsigned BANK_DEPTH = nne_pkg::BANK_DEPTH
) (
  input  logic                  busy,
  input  nne_pkg::addr_t                 in_base,
  input  logic [nne_pkg::IN_VECS_W-1:0]  in_vecs,
  input  nne_pkg::addr_t                 out_base,
  input  logic [nne_pkg::OUT_VECS_W-1:0] out_vecs,
  input  nne_pkg::addr_t                 w_start,
  output logic [NUM_BANKS-1:0]  bank_wake
);

  localparam int unsigned BAW = $clog2(BANK_DEPTH);

  // last address of each region, computed one bit wider than the address
  logic [nne_pkg::ADDR_W:0] in_last, out_last, w_last;
  logic [nne_pkg::ADDR_W:0] w_len;

  always_comb begin
    // per vector of neurons: one bias vector and 12 weight vectors per input vector
    w_len    = (nne_pkg::ADDR_W+1)'(out_vecs) * ((nne_pkg::ADDR_W+1)'(in_vecs) * (nne_pkg::ADDR_W+1)'(nne_pkg::LANES) + 1'b1);
    in_last  = (nne_pkg::ADDR_W+1)'(in_base)  + (nne_pkg::ADDR_W+1)'(in_vecs)  - 1'b1;
    out_last = (nne_pkg::ADDR_W+1)'(out_base) + (nne_pkg::ADDR_W+1)'(out_vecs) - 1'b1;
    w_last   = (nne_pkg::ADDR_W+1)'(w_start)  + w_len - 1'b1;
    for (int b = 0; b < NUM_BANKS; b++) begin
      bank_wake[b] = !busy
        || ((int'(in_base) >> BAW) <= b && (int'(in_last) >> BAW) >= b)
        || ((int'(out_base) >> BAW) <= b && (int'(out_last) >> BAW) >= b)
        || ((int'(w_start) >> BAW) <= b && (int'(w_last) >> BAW) >= b);
    end
  end

endmodule
