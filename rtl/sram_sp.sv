// sram_sp: one single-port memory instance of the engine memory, DEPTH words
// of WIDTH bits, written as an array in place of a process SRAM macro.
// A read (cs=1, we=0) returns the word on rdata in the next cycle; a write
// (cs=1, we=1) stores wdata at the clock edge. 'sleep' stands for the
// instance being switched off to save leakage: it must not be accessed then,
// and here its contents are kept (weights must survive between inferences),
// which is this implementation's assumption. rdata holds its last value
// when the instance is not read.
module sram_sp #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 96,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             sleep,
  input  logic             cs,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (cs && !sleep) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end

  // an instance that is switched off must not be accessed
  a_no_access_asleep: assert property (@(posedge clk) !(cs && sleep));

endmodule
