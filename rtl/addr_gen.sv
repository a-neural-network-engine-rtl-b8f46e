// addr_gen: the address generators. The weight pointer starts at the weight
// area's base at the start of an inference and advances after every bias or
// weight vector read, straight through all layers (each vector of neurons
// has its bias vector first, then its weight vectors). The input pointer
// restarts at the read block's base for every vector of neurons and advances
// per input vector; the output pointer starts at the write block's base at
// the start of a layer and advances per stored result. The two activation
// blocks swap the read-inputs and write-results roles at every layer end;
// the first layer reads block_0. mem_addr is the combinational choice for
// the current request. w_layer_start keeps the weight address at which the
// current layer begins (for the memory power control). The sequencing
// follows the engine description; which block comes first is this
// implementation's choice.
module addr_gen
  import nne_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  nne_ctl_t ctl,
  input  addr_t    w_base,
  input  addr_t    blk0_base,
  input  addr_t    blk1_base,
  output addr_t    mem_addr,
  output addr_t    in_base,
  output addr_t    out_base,
  output addr_t    w_layer_start
);

  addr_t w_ptr, in_ptr, out_ptr;
  logic  role;   // 0: read block_0 / write block_1

  assign in_base  = role ? blk1_base : blk0_base;
  assign out_base = role ? blk0_base : blk1_base;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_ptr         <= '0;
      in_ptr        <= '0;
      out_ptr       <= '0;
      role          <= 1'b0;
      w_layer_start <= '0;
    end else begin
      if (ctl.run_start) begin
        w_ptr <= w_base;
        role  <= 1'b0;
      end
      if (ctl.layer_start) begin
        out_ptr       <= out_base;
        w_layer_start <= w_ptr;
      end
      if (ctl.layer_end) role <= !role;
      if (ctl.rd_kind == RD_BIAS || ctl.rd_kind == RD_WGT) w_ptr <= w_ptr + 1'b1;
      if (ctl.group_start)            in_ptr  <= in_base;
      else if (ctl.rd_kind == RD_INP) in_ptr  <= in_ptr + 1'b1;
      if (ctl.mem_write)              out_ptr <= out_ptr + 1'b1;
    end
  end

  always_comb begin
    unique case (1'b1)
      ctl.mem_write:            mem_addr = out_ptr;
      ctl.rd_kind == RD_INP:    mem_addr = in_ptr;
      default:                  mem_addr = w_ptr;
    endcase
  end

endmodule
