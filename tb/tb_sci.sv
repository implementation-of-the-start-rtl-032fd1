// tb_sci: self-checking testbench of the sBIU JBus interface.
//
// Random DataMotion and Compose requests are issued; a Ctrl model accepts
// them after a random delay. Checked: the DataMotion command format on
// JBusData ([1:13] aSRAM address, [16] direction, [17:29] sSRAM address,
// [30:31] size), that a command is held until DataMotionFree, that a
// write-direction DataMotion waits for the end of the data tenure, that a
// compose carries its address and data with ShTxCompose and MemQOut flags,
// that the buffers report full, and that two ready requests are served in
// alternating order. Every mechanism must happen at least once.
module tb_sci;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic dm_req = 0, dm_write = 0, data_done = 0, dm_avail, dm_done;
  bus_addr_t dm_bus_addr = '0;
  logic [1:0] dm_size = 0;
  sram_addr_t dm_tmp_addr = '0, cmp_addr = '0;
  logic cmp_req = 0, cmp_mq0 = 0, cmp_mq1 = 0, cmp_after_data = 0, cmp_avail, cmp_done;
  logic [31:0] cmp_data = 0;
  logic [1:0] cmp_mqop = 0;
  sram_addr_t jbus_addr;
  logic [0:31] jbus_data;
  logic shtx_compose, memqout0_compose, memqout1_compose, dm_valid;
  logic [1:0] mq_op;
  logic compose_free = 0, dm_free = 0, dm_complete = 0;

  sci dut (.*);

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"datamotion", "dm_hold", "dm_wait_data", "compose", "memqout", "full", "alternate"};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  initial begin #200000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic wait_for(ref logic s, input int lim, output int n);
    n = 0;
    while (!s && n < lim) begin @(posedge clk) #1; n++; end
  endtask

  int n, d;
  logic [0:12] t, s;
  string order;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    // DataMotion, read direction: on the JBus two cycles after the request
    for (int i = 0; i < 6; i++) begin
      t = 13'($urandom); s = 13'($urandom); d = $urandom_range(0, 4);
      dm_bus_addr = '0; dm_bus_addr[17:29] = s; dm_tmp_addr = t; dm_size = 2'(i % 3);
      dm_req = 1; dm_write = 0;
      @(posedge clk) #1 dm_req = 0;
      check(!dm_avail, "buffer full after a request");
      if (!dm_avail) saw("full");
      wait_for(dm_valid, 10, n);
      check(n == 1, $sformatf("DataMotion on the JBus after %0d cycles, expected 1", n));
      check(jbus_data[1:13] == s && jbus_data[16] == 1'b0 && jbus_data[17:29] == t &&
            jbus_data[30:31] == 2'(i % 3), "DataMotion format");
      repeat (d) begin @(posedge clk) #1; check(dm_valid && jbus_data[17:29] == t, "held until DataMotionFree"); end
      if (d > 0) saw("dm_hold");
      dm_free = 1; @(posedge clk) #1 dm_free = 0;
      check(!dm_valid, "released after DataMotionFree");
      saw("datamotion");
    end
    // write direction waits for the data tenure
    dm_req = 1; dm_write = 1; @(posedge clk) #1 dm_req = 0;
    repeat (5) begin @(posedge clk) #1; check(!dm_valid, "write DataMotion waits for data_done"); end
    data_done = 1; @(posedge clk) #1 data_done = 0;
    wait_for(dm_valid, 10, n);
    check(dm_valid && jbus_data[16] == 1'b1, "write DataMotion after the data tenure, into the aSRAM");
    if (dm_valid) saw("dm_wait_data");
    dm_free = 1; @(posedge clk) #1 dm_free = 0;
    // compose
    cmp_addr = 13'($urandom); cmp_data = $urandom; cmp_mq1 = 1; cmp_mqop = 2'b10; cmp_req = 1;
    @(posedge clk) #1 cmp_req = 0;
    wait_for(shtx_compose, 10, n);
    check(shtx_compose && jbus_addr == cmp_addr && jbus_data == cmp_data && memqout1_compose &&
          !memqout0_compose && mq_op == 2'b10, "compose on the JBus");
    if (shtx_compose) saw("compose");
    if (memqout1_compose) saw("memqout");
    compose_free = 1; #1 check(cmp_done, "cmp_done with ComposeFree");
    @(posedge clk) #1 compose_free = 0; cmp_mq1 = 0;
    // both ready: alternate (last served was a compose -> DataMotion first)
    dm_req = 1; dm_write = 0; cmp_req = 1;
    @(posedge clk) #1 dm_req = 0; cmp_req = 0;
    order = "";
    repeat (2) begin
      n = 0;
      while (!(dm_valid || shtx_compose) && n < 10) begin @(posedge clk) #1; n++; end
      if (dm_valid) begin order = {order, "D"}; dm_free = 1; end
      else if (shtx_compose) begin order = {order, "C"}; compose_free = 1; end
      @(posedge clk) #1 dm_free = 0; compose_free = 0;
    end
    check(order == "DC", $sformatf("alternating priority, got %s", order));
    if (order == "DC") saw("alternate");
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin failures++; $display("FAIL: mechanism %s never happened", mech_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
