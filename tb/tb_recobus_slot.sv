// tb_recobus_slot: one resource slot. Reconfigures it, shifts in a select
// table (module address 5) and an interrupt table (interrupt number 2), then
// checks the read chain stage, the write and grant decoders, the interrupt
// multiplexer, the master-signal chain stage (driven only while granted) and
// the bus-request demultiplexer configuration.
module tb_recobus_slot;
  import recobus_pkg::*;
  localparam int SLICE = 8, NB = 4, MSLICE = 10;
  localparam be_t ADDR = 4'd5;
  localparam be_t IRQN = 4'd2;

  logic clk = 0, pr_init = 0, cfg_clk_en = 0, cfg_data = 0, cfg_irq_data = 0;
  logic brq_cfg_we = 0;
  logic [NB-1:0] brq_cfg_data = '0;
  be_t rd_be = BE_NONE, wr_be = BE_NONE, gnt_be = BE_NONE, irq_cnt = '0;
  logic bus_read = 0, bus_write = 0;
  logic [SLICE-1:0] rd_chain_in = '0, rd_chain_out, mod_dout = '0;
  logic irq_chain_in = 0, irq_chain_out, mod_irq = 0, mod_brq = 0;
  logic [NB-1:0] brq_chain_in = '0, brq_chain_out;
  logic [MSLICE-1:0] m_chain_in = '0, m_chain_out, mod_mout = '0;
  logic module_reset, module_select, module_read, module_write, module_grant;
  int checks = 0, failures = 0;

  recobus_slot #(.SLICE(SLICE), .NB(NB), .MASTER(1'b1), .MSLICE(MSLICE)) dut (.*);
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

  task automatic shift(input lut_t s, input lut_t q);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk); cfg_data = s[i]; cfg_irq_data = q[i]; cfg_clk_en = 1;
    end
    @(negedge clk) cfg_clk_en = 0;
  endtask

  initial begin
    @(negedge clk) pr_init = 1;
    @(negedge clk) pr_init = 0;
    check(module_reset, "reset after reconfiguration");
    rd_be = ADDR; bus_read = 1; wr_be = ADDR; bus_write = 1; gnt_be = ADDR; mod_dout = 8'hA5; #1;
    check(!module_read && !module_write && !module_grant, "nothing active in reset");
    check(rd_chain_out == rd_chain_in, "read chain passes in reset");
    m_chain_in = 10'h155; mod_mout = 10'h2AA; #1;
    check(m_chain_out == 10'h155, "master chain passes in reset");
    bus_read = 0; bus_write = 0;
    shift(lut_t'(1) << ADDR, lut_t'(1) << IRQN);
    check(!module_reset, "released");
    // read chain
    for (int t = 0; t < 100; t++) begin
      rd_be = be_t'($urandom); bus_read = 1'($urandom);
      rd_chain_in = SLICE'($urandom); mod_dout = SLICE'($urandom); #1;
      check(module_select == (rd_be == ADDR), "select decode");
      check(module_read == (bus_read && rd_be == ADDR), "read decode");
      check(rd_chain_out == (rd_chain_in | ((bus_read && rd_be == ADDR) ? mod_dout : '0)), "read chain");
      wr_be = be_t'($urandom); bus_write = 1'($urandom); gnt_be = be_t'($urandom); #1;
      check(module_write == (bus_write && wr_be == ADDR), "write decode");
      check(module_grant == (gnt_be == ADDR), "grant decode");
      m_chain_in = MSLICE'($urandom); mod_mout = MSLICE'($urandom); #1;
      check(m_chain_out == (m_chain_in | ((gnt_be == ADDR) ? mod_mout : '0)), "master chain");
      irq_cnt = be_t'($urandom); irq_chain_in = 1'($urandom); mod_irq = 1'($urandom); #1;
      check(irq_chain_out == ((irq_cnt == IRQN) ? mod_irq : irq_chain_in), "irq multiplexer");
    end
    // request demux: not configured, all chains pass
    brq_chain_in = 4'b1010; mod_brq = 1; #1;
    check(brq_chain_out == 4'b1010, "requests pass before configuration");
    // configuration write while another module is addressed: ignored
    @(negedge clk) rd_be = 4'd6; bus_read = 0; brq_cfg_we = 1; brq_cfg_data = 4'b0100;
    @(negedge clk) brq_cfg_we = 0; #1;
    check(brq_chain_out == 4'b1010, "other address does not configure");
    // configuration write for this module: chain 2 carries the request
    @(negedge clk) rd_be = ADDR; brq_cfg_we = 1; brq_cfg_data = 4'b0100;
    @(negedge clk) brq_cfg_we = 0; rd_be = BE_NONE;
    for (int v = 0; v < 2; v++) begin
      mod_brq = 1'(v); brq_chain_in = 4'b1111 ^ {4{1'(v)}}; #1;
      check(brq_chain_out == {brq_chain_in[3], mod_brq, brq_chain_in[1:0]}, "request on chain 2");
    end
    // a new reconfiguration resets everything
    @(negedge clk) pr_init = 1;
    @(negedge clk) pr_init = 0;
    brq_chain_in = 4'b0000; mod_brq = 1; #1;
    check(module_reset && brq_chain_out == 4'b0000, "reconfiguration clears slot");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
