// tb_brq_demux_stage: configuration and routing of a bus-request demux stage.
module tb_brq_demux_stage;
  logic clk = 0, pr_init = 0, cfg_en = 0, cfg_data = 0, bus_request = 0, chain_in = 0;
  logic chain_out, connected;
  int checks = 0, failures = 0;

  brq_demux_stage dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sweep(input bit conn);
    for (int v = 0; v < 4; v++) begin
      {bus_request, chain_in} = 2'(v); #1;
      check(chain_out == (conn ? bus_request : chain_in), $sformatf("route conn=%0d v=%0d", conn, v));
    end
  endtask

  initial begin
    @(negedge clk) pr_init = 1;
    @(negedge clk) pr_init = 0;
    check(connected == 0, "cleared by reconfiguration");
    sweep(0);
    // Data without enable is ignored.
    @(negedge clk) cfg_data = 1;
    @(negedge clk);
    check(connected == 0, "no write without enable");
    sweep(0);
    // Enabled write of 1 connects the module's request.
    @(negedge clk) cfg_en = 1;
    @(negedge clk) cfg_en = 0; cfg_data = 0;
    check(connected == 1, "connected after enabled write");
    sweep(1);
    // Enabled write of 0 disconnects again.
    @(negedge clk) cfg_en = 1;
    @(negedge clk) cfg_en = 0;
    check(connected == 0, "disconnected after write of 0");
    sweep(0);
    // Reconfiguration clears a connected stage.
    @(negedge clk) cfg_en = 1; cfg_data = 1;
    @(negedge clk) cfg_en = 0; pr_init = 1;
    @(negedge clk) pr_init = 0;
    check(connected == 0, "reconfiguration clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
