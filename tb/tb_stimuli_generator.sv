// tb_stimuli_generator: the stimuli generator against an ideal bus (a test
// module answering one module address directly), unpipelined and pipelined.
// Checks the number of comparisons, zero errors on a correct bus, detected
// errors on a bus that corrupts one read, and the rate of one write plus one
// read per clock: a run of W words keeps the generator busy for W + 1 transfer cycles plus one
// closing cycle (+1 pipelined).
module tb_stimuli_generator;
  import recobus_pkg::*;
  localparam int B = 32, AW = 32;
  localparam be_t ADDR = 4'd6;

  logic clk = 0, rst_n = 0, start = 0;
  be_t mod_be = ADDR;
  func_e func = FUNC_ADD;
  logic [15:0] words = '0;
  logic [31:0] seed = 32'h1234_5678;
  int checks = 0, failures = 0;
  int corrupt = -1;   // index of the read whose data the bus corrupts

  // two generators: [0] unpipelined, [1] pipelined
  logic busy [2], done [2];
  logic [31:0] tests [2], errors [2];
  be_t rd_be [2], wr_be [2];
  logic [AW-1:0] rd_addr [2], wr_addr [2], q_rd_addr [2];
  logic bus_read [2], bus_write [2], q_read [2];
  logic [B-1:0] rd_data [2], wr_data [2], dout [2];
  logic [3:0] byte_sel [2];
  int nreads [2];

  always #5 clk = ~clk;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    stimuli_generator #(.B(B), .AW(AW), .PIPELINE(1'(g))) u_gen (
      .clk, .rst_n, .start, .mod_be, .func, .words, .seed,
      .busy(busy[g]), .done(done[g]), .tests(tests[g]), .errors(errors[g]),
      .rd_be(rd_be[g]), .rd_addr(rd_addr[g]), .bus_read(bus_read[g]), .rd_data(rd_data[g]),
      .wr_be(wr_be[g]), .wr_addr(wr_addr[g]), .wr_data(wr_data[g]),
      .byte_sel(byte_sel[g]), .bus_write(bus_write[g])
    );
    // ideal bus: module at ADDR, optional one-cycle read pipeline
    logic irq_unused;
    test_module #(.B(B), .AW(AW)) u_mod (
      .clk, .rst(start), .func,
      .wr_en(bus_write[g] && wr_be[g] == ADDR), .wr_addr(wr_addr[g]), .wr_data(wr_data[g]),
      .byte_sel(byte_sel[g]), .rd_en(1'b0), .rd_addr(g ? q_rd_addr[g] : rd_addr[g]),
      .dout(dout[g]), .irq(irq_unused)
    );
    always_ff @(posedge clk) begin
      q_rd_addr[g] <= rd_addr[g];
      q_read[g]    <= bus_read[g] && rd_be[g] == ADDR;
      if (start) nreads[g] <= 0;
      else if (g ? q_read[g] : (bus_read[g] && rd_be[g] == ADDR)) nreads[g] <= nreads[g] + 1;
    end
    logic sel_now;
    assign sel_now = g ? q_read[g] : (bus_read[g] && rd_be[g] == ADDR);
    assign rd_data[g] = sel_now ? (dout[g] ^ ((nreads[g] == corrupt) ? 32'h0000_0100 : 32'h0)) : '0;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input int w, input func_e f, input int bad);
    int cyc [2];
    cyc[0] = 0; cyc[1] = 0;
    corrupt = bad;
    @(negedge clk) start = 1; words = 16'(w); func = f; seed = $urandom;
    @(negedge clk) start = 0;
    while (busy[0] || busy[1]) begin
      for (int g = 0; g < 2; g++) if (busy[g]) cyc[g]++;
      @(negedge clk);
    end
    for (int g = 0; g < 2; g++) begin
      check(tests[g] == 32'(w), $sformatf("g%0d tests %0d", g, tests[g]));
      check(errors[g] == ((bad >= 0 && bad < w) ? 1 : 0), $sformatf("g%0d errors %0d (bad %0d)", g, errors[g], bad));
      check(cyc[g] == w + 2 + g, $sformatf("g%0d cycles %0d for %0d words", g, cyc[g], w));
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!busy[0] && !busy[1] && bus_read[0] == 0 && bus_write[0] == 0, "idle after reset");
    for (int f = 0; f < 4; f++) run(50 + f, func_e'(f), -1);
    run(40, FUNC_XOR, 17);
    run(40, FUNC_PERM, 0);
    run(1, FUNC_ADD, -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
