// tb_align_mux: alignment multiplexers for N = 4 chains of 8 bits. Builds the
// chain outputs that a module at a random start socket produces and checks
// that the word comes out in master order for every offset.
module tb_align_mux;
  localparam int N = 4, SLICE = 8;
  logic [N-1:0][SLICE-1:0] chains, word;
  logic [1:0] off;
  int checks = 0, failures = 0;

  align_mux #(.N(N), .SLICE(SLICE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [31:0] module_word;
      int start;
      module_word = $urandom;
      start = $urandom_range(31);
      // sub-word j sits in slot start + j, i.e. on chain (start + j) mod 4
      for (int j = 0; j < N; j++) chains[(start + j) % N] = module_word[j*SLICE +: SLICE];
      off = 2'(start % N);
      #1;
      checks++;
      if (word !== module_word) begin
        failures++;
        $display("FAIL start=%0d want %h got %h", start, module_word, word);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
