// tb_select_generator: self-checking test of the reconfigurable select generator.
// Checks: reset state after reconfiguration, lock after exactly 16 shifts, the
// single-module and multicast table examples (address 3; modules 1 and 2 with
// multicast address 4), the reserved address 4'hF, module_read gating, and
// that a locked table ignores further shifts. A second instance with the
// optional cascade flip-flop (CASCADE = 1) is checked for lock after exactly
// 17 shifts and for a usable address 4'hF.
module tb_select_generator;
  import recobus_pkg::*;

  logic clk = 0, pr_init = 0, cfg_clk_en = 0, cfg_data = 0, bus_read = 0;
  be_t  bus_enable = '0;
  logic module_reset, module_select, module_read;
  int checks = 0, failures = 0;

  logic c_reset, c_select, c_read;

  select_generator dut (.*);
  select_generator #(.CASCADE(1'b1)) dut_c (
    .clk, .pr_init, .cfg_clk_en, .cfg_data, .bus_enable, .bus_read,
    .module_reset(c_reset), .module_select(c_select), .module_read(c_read)
  );

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic reconfigure();
    @(negedge clk) pr_init = 1;
    @(negedge clk) pr_init = 0;
  endtask

  // Shift a table: entry 15 (the lock bit) first, entry 0 last.
  task automatic shift_table(input lut_t t);
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      check(module_reset == 1'b1, "reset held while shifting");
      cfg_data = t[i]; cfg_clk_en = 1;
    end
    @(negedge clk) cfg_clk_en = 0;
  endtask

  // Table from the document's string notation: leftmost character = entry 0.
  function automatic lut_t from_string(input string s);
    lut_t t = '0; int p = 0;
    for (int c = 0; c < s.len(); c++)
      if (s[c] == "0" || s[c] == "1") begin t[p] = (s[c] == "1"); p++; end
    return t;
  endfunction

  task automatic check_decode(input lut_t expect_tab, input string name);
    for (int a = 0; a < 16; a++) begin
      bus_enable = be_t'(a);
      bus_read = 1; #1;
      check(module_select == (a != 15 && expect_tab[a]), $sformatf("%s select @%0d", name, a));
      check(module_read   == (a != 15 && expect_tab[a]), $sformatf("%s read @%0d", name, a));
      bus_read = 0; #1;
      check(module_read == 1'b0, "no read without bus_read");
    end
  endtask

  initial begin
    reconfigure();
    check(module_reset == 1, "reset after reconfiguration");
    bus_enable = 4'd3; bus_read = 1; #1;
    check(module_read == 0, "no read while in reset");
    bus_read = 0;
    // Example: active only for bus_enable = 0011.
    shift_table(from_string("0001 0000 0000 0000"));
    check(module_reset == 0, "released after 16 shifts");
    check_decode(16'h0008, "single");
    // Locked: further shifts are ignored.
    for (int i = 0; i < 16; i++) begin @(negedge clk); cfg_data = 1; cfg_clk_en = 1; end
    @(negedge clk) cfg_clk_en = 0;
    check(module_reset == 0, "stays locked");
    check_decode(16'h0008, "locked");
    // Multicast example, module 1 (address 1 and multicast address 4).
    reconfigure();
    shift_table(from_string("0100 1000 0000 0000"));
    check_decode(16'h0012, "multicast m1");
    // Module 2 (address 2 and multicast 4).
    reconfigure();
    shift_table(from_string("0010 1000 0000 0000"));
    check_decode(16'h0014, "multicast m2");
    // Lock happens exactly at the 16th shift.
    reconfigure();
    for (int i = 0; i < 15; i++) begin @(negedge clk); cfg_data = 0; cfg_clk_en = 1; end
    @(negedge clk) cfg_clk_en = 0;
    check(module_reset == 1, "not released after 15 shifts");
    @(negedge clk) cfg_clk_en = 1;
    @(negedge clk) cfg_clk_en = 0;
    check(module_reset == 0, "released at shift 16");
    // Cascade flip-flop: lock bit, then table with addresses 0 and 15.
    reconfigure();
    check(c_reset == 1, "cascade: reset after reconfiguration");
    @(negedge clk) cfg_data = 0; cfg_clk_en = 1;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      check(c_reset == 1, "cascade: reset held for 17 shifts");
      cfg_data = ((16'h8001 >> i) & 1) != 0; cfg_clk_en = 1;
    end
    @(negedge clk) cfg_clk_en = 0;
    check(c_reset == 0, "cascade: released after 17 shifts");
    for (int a = 0; a < 16; a++) begin
      bus_enable = be_t'(a); bus_read = 1; #1;
      check(c_select == (a == 0 || a == 15), $sformatf("cascade select @%0d", a));
      check(c_read   == (a == 0 || a == 15), $sformatf("cascade read @%0d", a));
    end
    bus_read = 0;
    for (int i = 0; i < 17; i++) begin @(negedge clk); cfg_data = 1; cfg_clk_en = 1; end
    @(negedge clk) cfg_clk_en = 0;
    bus_enable = 4'd5; #1;
    check(c_reset == 0 && c_select == 0, "cascade: locked table ignores shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
