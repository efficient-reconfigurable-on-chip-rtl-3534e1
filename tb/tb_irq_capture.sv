// tb_irq_capture: time-multiplexed interrupt capture. A model of the slots
// answers the counter with the pending state of that interrupt number. Checks
// the counter sequence, that each line follows its source, and that the
// latency from a source change to its output flip-flop is at most M + 1 cycles
// and reaches M + 1 in the worst case.
module tb_irq_capture;
  import recobus_pkg::*;
  localparam int M = 15;
  logic clk = 0, rst_n = 0;
  logic irq_chain;
  be_t  irq_cnt;
  logic [M-1:0] irq_lines;
  logic [M-1:0] src = '0;
  int checks = 0, failures = 0, max_lat = 0;

  irq_capture #(.M(M)) dut (.*);
  always #5 clk = ~clk;
  assign irq_chain = (int'(irq_cnt) < M) ? src[irq_cnt] : 1'b0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // Counter walks 0..M-1 and wraps.
    for (int i = 0; i < 2 * M; i++) begin
      check(int'(irq_cnt) == i % M, "counter sequence");
      @(negedge clk);
    end
    // Latency measurements from every counter phase.
    for (int t = 0; t < 60; t++) begin
      int k, lat;
      bit target;
      k = $urandom_range(M - 1);
      repeat ($urandom_range(M)) @(negedge clk);
      target = !src[k];
      src[k] = target;
      lat = 0;
      while (irq_lines[k] != target && lat < 3 * M) begin @(negedge clk); lat++; end
      check(irq_lines[k] == target, "line follows source");
      check(lat <= M + 1, $sformatf("latency %0d <= M+1", lat));
      if (lat > max_lat) max_lat = lat;
    end
    // Worst case: source changes just after its number was sampled.
    while (int'(irq_cnt) != 4) @(negedge clk);
    @(negedge clk);
    src[4] = !src[4];
    begin
      int lat = 0;
      while (irq_lines[4] != src[4] && lat < 3 * M) begin @(negedge clk); lat++; end
      check(lat == M, $sformatf("worst-case phase latency %0d", lat));
      if (lat > max_lat) max_lat = lat;
    end
    check(max_lat <= M + 1 && max_lat >= M, "maximum latency near M + 1");
    // All lines equal their sources after a full round.
    src = M'($urandom);
    repeat (M + 1) @(negedge clk);
    check(irq_lines == src, "all lines captured");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
