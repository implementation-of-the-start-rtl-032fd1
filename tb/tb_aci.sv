// tb_aci: self-checking testbench of the aBIU KBus interface.
//
// Issues DataMotion requests, compose requests of the three kinds from the
// queue/state unit, aBM acknowledgment composes and Ctrl MemQIn requests; a
// Ctrl model accepts them. Checked: the DataMotion format in KBusData[0:31]
// ([16] = 0 for a transfer into the sSRAM), the strobe of each compose kind,
// that aBM and Ctrl composes use the MemQIn PPtr address and raise
// memqin_alloc, that they are held off while an address tenure is in
// progress, and that the queue/state unit's request has priority.
// Every mechanism must happen at least once.
module tb_aci;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic dm_req = 0, dm_write = 0, data_done = 0, addr_busy = 0, dm_avail, dm_done;
  bus_addr_t dm_bus_addr = '0;
  logic [1:0] dm_size = 0, cmp_kind = 0;
  sram_addr_t dm_tmp_addr = '0, cmp_addr = '0, memqin_addr = '0;
  logic cmp_req = 0, cmp_avail, cmp_done, memqin_alloc;
  logic [0:63] cmp_data = 0, abm_cmp_data = 0;
  logic abm_cmp_req = 0, abm_cmp_ack;
  sram_addr_t kbus_addr;
  logic [0:63] kbus_data;
  logic shtx_compose, mq_compose_read, mq_compose_write, mq_compose_ctrl, dm_valid;
  logic mq_ctrl_req = 0, compose_free = 0, dm_free = 0, dm_complete = 0;

  aci dut (.*);

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"datamotion", "mq_read", "mq_write", "plain", "abm", "ctrl", "busy_hold", "priority"};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  initial begin #200000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic accept_compose(output int n);
    n = 0;
    while (!(shtx_compose || mq_compose_read || mq_compose_write || mq_compose_ctrl) && n < 10) begin
      @(posedge clk) #1; n++;
    end
  endtask
  task automatic free_it;
    compose_free = 1; @(posedge clk) #1 compose_free = 0;
  endtask

  int n;
  logic [0:12] t, s;
  logic [0:63] d;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    // DataMotion of an aP write into the sSRAM
    t = 13'($urandom); s = 13'($urandom);
    dm_bus_addr[17:29] = s; dm_tmp_addr = t; dm_size = 2'd1; dm_write = 1; dm_req = 1;
    @(posedge clk) #1 dm_req = 0;
    data_done = 1; @(posedge clk) #1 data_done = 0;
    n = 0; while (!dm_valid && n < 10) begin @(posedge clk) #1; n++; end
    check(dm_valid && kbus_data[1:13] == t && kbus_data[16] == 1'b0 && kbus_data[17:29] == s &&
          kbus_data[30:31] == 2'd1 && kbus_data[32:63] == '0, "DataMotion format on the KBus");
    if (dm_valid) saw("datamotion");
    dm_free = 1; @(posedge clk) #1 dm_free = 0;
    // the three compose kinds from the queue/state unit
    for (int k = 0; k < 3; k++) begin
      cmp_addr = 13'($urandom); d = {$urandom, $urandom}; cmp_data = d; cmp_kind = 2'(k); cmp_req = 1;
      @(posedge clk) #1 cmp_req = 0;
      accept_compose(n);
      check(kbus_addr == cmp_addr && kbus_data == d, "compose address and data");
      check(k == 0 ? shtx_compose : (k == 1 ? mq_compose_read : mq_compose_write), "compose strobe");
      if (k == 0 && shtx_compose) saw("plain");
      if (k == 1 && mq_compose_read) saw("mq_read");
      if (k == 2 && mq_compose_write) saw("mq_write");
      free_it();
    end
    // aBM compose: held while an address tenure is in progress
    memqin_addr = 13'($urandom); d = {$urandom, $urandom}; abm_cmp_data = d;
    addr_busy = 1; abm_cmp_req = 1;
    repeat (4) begin @(posedge clk) #1; check(!abm_cmp_ack, "aBM compose held during an address tenure"); end
    saw("busy_hold");
    addr_busy = 0; #1;
    check(abm_cmp_ack && memqin_alloc, "aBM compose accepted and MemQIn slot allocated");
    @(posedge clk) #1 abm_cmp_req = 0;
    accept_compose(n);
    check(shtx_compose && kbus_addr == memqin_addr && kbus_data == d, "aBM compose at the MemQIn PPtr");
    if (shtx_compose) saw("abm");
    free_it();
    // Ctrl dummy compose
    mq_ctrl_req = 1; #1;
    check(memqin_alloc, "Ctrl request allocates a MemQIn slot");
    @(posedge clk) #1 mq_ctrl_req = 0;
    accept_compose(n);
    check(mq_compose_ctrl && kbus_addr == memqin_addr, "MemQInComposeCtrl with the MemQIn PPtr");
    if (mq_compose_ctrl) saw("ctrl");
    free_it();
    // queue/state request beats the aBM in the same cycle
    cmp_req = 1; cmp_kind = 2'd1; abm_cmp_req = 1; #1;
    check(!abm_cmp_ack, "aBM loses against the queue/state unit");
    @(posedge clk) #1 cmp_req = 0; abm_cmp_req = 0;
    accept_compose(n);
    check(mq_compose_read, "queue/state compose served");
    if (mq_compose_read) saw("priority");
    free_it();
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin failures++; $display("FAIL: mechanism %s never happened", mech_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
