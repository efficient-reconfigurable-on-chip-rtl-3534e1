// align_regfile: per-module alignment offsets for the multi-slot read technique.
//
// For every module address (the value on bus_enable) it stores the position of
// the module's leftmost used bus socket modulo N, the number of interleaved
// read chains. The read port is asynchronous and addressed by the read
// address bus, so the alignment multiplexers are set in the same cycle as the
// read; the write port is synchronous and used by the host when it places a
// module. On the FPGA this is a small LUT-based dual-ported RAM, as the
// document suggests; entries are cleared by reset here (the document does not
// mention reset).
module align_regfile
  import recobus_pkg::*;
#(
  parameter int unsigned N     = 4,                       // interleaved read chains
  parameter int unsigned OFF_W = (N > 1) ? $clog2(N) : 1  // offset width
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  be_t              waddr,
  input  logic [OFF_W-1:0] wdata,
  input  be_t              raddr,
  output logic [OFF_W-1:0] rdata
);

  logic [OFF_W-1:0] mem [LUT_DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LUT_DEPTH); i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
