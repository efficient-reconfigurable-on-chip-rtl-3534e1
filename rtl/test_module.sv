// test_module: reconfigurable test slave of the bus demonstrator.
//
// A small piece of logic followed by an output register. Each write computes
// f(wr_data, wr_addr) and stores it byte-wise (byte_sel) into the result
// register; a write counter counts accepted writes. Reads return the result
// register when rd_addr[0] = 0 and the write counter when rd_addr[0] = 1. The
// function is fixed when the module is loaded (func), standing for the
// different partial bitstreams of adder, Boolean and permutation modules.
// irq is a "result pending" flag: set by a write, cleared by a read; a write in
// the same cycle as a read wins. rst is synchronous and active high (the
// slot's module_reset). dout is combinational from the registers and rd_addr.
// The kinds of function follow the demonstrator's description; the exact
// formulas, the counter, the byte enables and the interrupt are this design's.
module test_module
  import recobus_pkg::*;
#(
  parameter int unsigned B  = 32,
  parameter int unsigned AW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  func_e         func,
  input  logic          wr_en,
  input  logic [AW-1:0] wr_addr,
  input  logic [B-1:0]  wr_data,
  input  logic [B/8-1:0] byte_sel,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,
  output logic [B-1:0]  dout,
  output logic          irq
);

  logic [B-1:0] result, count, f;

  always_comb begin
    unique case (func)
      FUNC_ADD:  f = wr_data + B'(wr_addr);
      FUNC_XOR:  f = wr_data ^ ~B'(wr_addr);
      FUNC_PERM: for (int i = 0; i < int'(B); i++) f[i] = wr_data[B-1-i];
      default:   f = {wr_data[B-9:0], wr_data[B-1 -: 8]};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      result <= '0;
      count  <= '0;
      irq    <= 1'b0;
    end else begin
      if (wr_en) begin
        for (int b = 0; b < int'(B/8); b++)
          if (byte_sel[b]) result[b*8 +: 8] <= f[b*8 +: 8];
        count <= count + 1'b1;
        irq   <= 1'b1;
      end else if (rd_en) begin
        irq   <= 1'b0;
      end
    end
  end

  assign dout = rd_addr[0] ? count : result;

  // Only the lowest read address bit is decoded.
  logic unused;
  assign unused = ^rd_addr[AW-1:1];

endmodule
