// tb_read_chain_stage: random check of one distributed read multiplexer stage
// against chain_out = chain_in OR (data_out AND sel).
module tb_read_chain_stage;
  localparam int W = 8;
  logic sel;
  logic [W-1:0] data_out, chain_in, chain_out, expect_out;
  int checks = 0, failures = 0;

  read_chain_stage #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      sel = 1'($urandom); data_out = W'($urandom); chain_in = W'($urandom);
      if (i % 3 == 0) chain_in = '0;   // end of chain: dummy 0
      #1;
      for (int b = 0; b < W; b++) expect_out[b] = chain_in[b] || (sel && data_out[b]);
      checks++;
      if (chain_out !== expect_out) begin
        failures++;
        $display("FAIL sel=%b d=%h c=%h got %h", sel, data_out, chain_in, chain_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
