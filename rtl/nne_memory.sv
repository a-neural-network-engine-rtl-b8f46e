// nne_memory: the engine memory, NUM_BANKS single-port instances of
// BANK_DEPTH 96-bit vectors behind one vector address. The upper address
// bits select the instance, so only one instance is active per access;
// unused instances are switched off through bank_wake. Reads return data one
// cycle after the request; an address beyond the last instance reads zero.
// Seven instances and a 13-bit address follow the engine description; the
// instance depth and the address decoding are this implementation's choice.
module nne_memory
#(
  parameter int unsigned NUM_BANKS  = nne_pkg::NUM_BANKS,
  parameter int unsigned BANK_DEPTH = nne_pkg::BANK_DEPTH,
  localparam int unsigned BAW = $clog2(BANK_DEPTH)
) (
  input  logic                 clk,
  input  logic                 en,
  input  logic                 we,
  input  nne_pkg::addr_t                addr,
  input  nne_pkg::vec_t                 wdata,
  output nne_pkg::vec_t                 rdata,
  input  logic [NUM_BANKS-1:0] bank_wake
);

  localparam int unsigned SELW = nne_pkg::ADDR_W - BAW;

  logic [SELW-1:0] sel, sel_q;
  logic            rd_q;
  nne_pkg::vec_t            bank_rdata [NUM_BANKS];

  assign sel = addr[nne_pkg::ADDR_W-1:BAW];

  for (genvar b = 0; b < NUM_BANKS; b++) begin : g_bank
    sram_sp #(.DEPTH(BANK_DEPTH), .WIDTH(nne_pkg::VEC_W)) u_sram (
      .clk   (clk),
      .sleep (!bank_wake[b]),
      .cs    (en && (sel == SELW'(b))),
      .we    (we),
      .addr  (addr[BAW-1:0]),
      .wdata (wdata),
      .rdata (bank_rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    rd_q  <= en && !we;
    sel_q <= sel;
  end

  always_comb begin
    rdata = '0;
    for (int b = 0; b < NUM_BANKS; b++)
      if (rd_q && sel_q == SELW'(b)) rdata = bank_rdata[b];
  end

endmodule
