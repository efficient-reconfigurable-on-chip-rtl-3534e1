// align_mux: alignment multiplexers in front of the master.
//
// The N interleaved read chains deliver sub-words in slot order modulo N. A
// module whose leftmost socket is at slot s puts its sub-word j on chain
// (s + j) mod N, so the master word is rebuilt as
//   word[j] = chain[(off + j) mod N],  off = s mod N,
// which lets modules start at any socket. Each output bit is an N:1
// multiplexer (two 4-input LUTs per bit for N = 4 in the document's count).
// Combinational.
module align_mux #(
  parameter int unsigned N     = 4,
  parameter int unsigned SLICE = 8,
  parameter int unsigned OFF_W = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0][SLICE-1:0] chains,   // chain c output at the master
  input  logic [OFF_W-1:0]        off,      // leftmost socket of the module, mod N
  output logic [N-1:0][SLICE-1:0] word      // sub-word j = bits j*SLICE +: SLICE
);

  always_comb begin
    for (int j = 0; j < int'(N); j++) begin
      word[j] = chains[(int'(off) + j) % int'(N)];
    end
  end

endmodule
