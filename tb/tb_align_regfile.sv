// tb_align_regfile: write/read of the alignment offset register file, reset
// clearing and asynchronous read.
module tb_align_regfile;
  import recobus_pkg::*;
  localparam int N = 4, OFF_W = 2;
  logic clk = 0, rst_n = 0, we = 0;
  be_t waddr = '0, raddr = '0;
  logic [OFF_W-1:0] wdata = '0, rdata;
  logic [OFF_W-1:0] model [16];
  int checks = 0, failures = 0;

  align_regfile #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 16; a++) begin raddr = be_t'(a); #1; check(rdata == 0, "cleared by reset"); end
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      we = 1'($urandom); waddr = be_t'($urandom); wdata = OFF_W'($urandom);
      raddr = be_t'($urandom); #1;
      check(rdata == model[raddr], $sformatf("read %0d", raddr));
      @(posedge clk);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk) we = 0;
    for (int a = 0; a < 16; a++) begin raddr = be_t'(a); #1; check(rdata == model[a], "final contents"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
