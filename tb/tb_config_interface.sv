// tb_config_interface: captures the serial configuration stream and checks
// its order (table bit 15 first), its length (16 clock enables), busy and
// done timing, and that start is ignored while busy. A second instance with
// CASCADE = 1 drives a cascaded select generator: 17 clock enables, lock bit
// 0 first, and all 16 table bits (bit 15 included) end up in the table.
module tb_config_interface;
  import recobus_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  lut_t sel_table = '0, irq_table = '0;
  logic cfg_clk_en, cfg_data, cfg_irq_data, busy, done;
  int checks = 0, failures = 0;

  logic start_c = 0, pr_c = 0, rd_c = 0;
  lut_t tab_c = '0;
  be_t  be_c = '0;
  logic clk_en_c, data_c, irq_data_c, busy_c, done_c, reset_c, select_c, read_c;

  config_interface dut (.*);
  config_interface #(.CASCADE(1'b1)) dut_c (
    .clk, .rst_n, .start(start_c), .sel_table(tab_c), .irq_table(~tab_c),
    .cfg_clk_en(clk_en_c), .cfg_data(data_c), .cfg_irq_data(irq_data_c),
    .busy(busy_c), .done(done_c)
  );
  select_generator #(.CASCADE(1'b1)) sg_c (
    .clk, .pr_init(pr_c), .cfg_clk_en(clk_en_c), .cfg_data(data_c),
    .bus_enable(be_c), .bus_read(rd_c),
    .module_reset(reset_c), .module_select(select_c), .module_read(read_c)
  );
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!busy && !cfg_clk_en, "idle after reset");
    for (int t = 0; t < 10; t++) begin
      lut_t s_tab, i_tab, s_got, i_got;
      int n, cyc;
      s_tab = {1'b0, 15'($urandom)};
      i_tab = {1'b0, 15'($urandom)};
      @(negedge clk);
      sel_table = s_tab; irq_table = i_tab; start = 1;
      @(negedge clk) start = 0;
      sel_table = '1; irq_table = '1;   // changing inputs must not matter
      n = 0; cyc = 0;
      s_got = '0; i_got = '0;
      while (!done && cyc < 40) begin
        if (cfg_clk_en) begin
          // model of the select generator shift: new bit into entry 0
          s_got = {s_got[14:0], cfg_data};
          i_got = {i_got[14:0], cfg_irq_data};
          n++;
          if (n == 3) begin start = 1; end   // start while busy: ignored
        end
        @(negedge clk); start = 0;
        cyc++;
      end
      check(n == 16, $sformatf("16 config clocks (%0d)", n));
      check(cyc == 16, $sformatf("busy for 16 cycles (%0d)", cyc));
      check(s_got == s_tab, $sformatf("select table %h got %h", s_tab, s_got));
      check(i_got == i_tab, $sformatf("irq table %h got %h", i_tab, i_got));
      @(negedge clk);
      check(!busy && !done && !cfg_clk_en, "idle after done");
    end
    // Cascaded variant.
    for (int t = 0; t < 5; t++) begin
      logic [16:0] got;
      int n;
      @(negedge clk) pr_c = 1;
      @(negedge clk) pr_c = 0;
      tab_c = (t == 0) ? 16'h8000 : 16'($urandom) | 16'h8000;
      start_c = 1;
      @(negedge clk) start_c = 0;
      n = 0; got = '0;
      while (!done_c && n < 40) begin
        if (clk_en_c) begin got = {got[15:0], irq_data_c}; n++; end
        check(reset_c == (clk_en_c || n < 17), "cascade: reset until 17th shift");
        @(negedge clk);
      end
      check(n == 17, $sformatf("cascade: 17 config clocks (%0d)", n));
      check(got == {1'b0, ~tab_c}, $sformatf("cascade: irq stream %h", got));
      check(!reset_c, "cascade: generator released");
      for (int a = 0; a < 16; a++) begin
        be_c = be_t'(a); rd_c = 1; #1;
        check(read_c == tab_c[a], $sformatf("cascade: decode @%0d", a));
      end
      rd_c = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
