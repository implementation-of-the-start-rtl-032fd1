// tb_sqs: self-checking testbench of the sBIU queue/state unit.
//
// Drives the current-transfer interface directly (address, direction, size,
// then one cycle each of AddressActive, AddressConfirm and the end of the data
// tenure) and answers the JBus compose and SCBus like Ctrl would. Checked:
// the sSRAM address for SRAM, aSRAM, ShTx and ShRx transfers, PPtr/CPtr
// advance, the SCBus PPtr write that waits for the data tenure, the retry
// while the SCBus buffer is busy, MemQIn polling after an ASBus update with
// the SABus copy of the CPtr, OnePoll replay, clSRAM update and a Config read
// composed into QConfigTmp. Every mechanism must happen at least once.
module tb_sqs;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  bus_addr_t cur_addr = '0;
  logic cur_read = 0, cur_write = 0, addr_active = 0, addr_confirm = 0, data_done = 0;
  logic [1:0] cur_size = 2'd1;
  sram_addr_t sram_addr, cmp_addr;
  logic sqs_retry, sqs_wait, cmp_req, cmp_mq0, cmp_mq1, cmp_after_data;
  logic [31:0] cmp_data;
  logic [1:0] cmp_mqop;
  logic cmp_avail = 1, cmp_done = 0;
  ctrl_req_t sc;
  logic sc_free = 1, sc_done = 0;
  logic [1:0] cs_addr = 0;
  nes_data_t cs_data = 0;
  logic cs_valid = 0;
  biu_req_t sa, as_req;
  nes_data_t sa_rdata = 7'd5, as_rdata;
  logic [0:4] rx_empty = '1;
  logic rx_late_ack, cls_latch;

  sqs dut (.*);

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"sram", "asram_tmp", "shtx", "scbus_after_data", "retry", "shrx_memqin",
                            "shrx_empty", "sabus_cptr", "onepoll", "cls", "config_read"};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  initial begin #100000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  sram_addr_t got;
  bit retried;
  ctrl_req_t sc_seen, sc_after;
  biu_req_t sa_seen;
  logic cmp_seen;
  logic [31:0] cmp_data_seen;
  // one transfer: sets cur_*, samples sram_addr/retry in AddressActive, confirms unless retried
  task automatic xfer(input bus_addr_t a, input bit rd, input logic [1:0] sz);
    @(posedge clk) #1;
    cur_addr = a; cur_read = rd; cur_write = !rd; cur_size = sz; addr_active = 1;
    #1 got = sram_addr; retried = sqs_retry;
    @(posedge clk) #1 addr_active = 0;
    @(posedge clk) #1;
    if (retried) return;
    addr_confirm = 1;
    #1 sa_seen = sa; cmp_seen = cmp_req; cmp_data_seen = cmp_data;
    @(posedge clk) #1 addr_confirm = 0;
    #1 sc_seen = sc;
    @(posedge clk) #1 data_done = 1;
    @(posedge clk) #1 data_done = 0;
    #1 sc_after = sc;
  endtask

  logic [0:12] w;
  bus_addr_t a;
  int ops;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 4; i++) begin
      w = 13'($urandom);
      a = '0; a[0:6] = 7'b0110000; a[17:29] = w;
      xfer(a, i % 2, 2'd1);
      check(got == w, "SRAM Space: sSRAM address from [17:29]");
      if (got == w) saw("sram");
    end
    a[16] = 1; xfer(a, 1, 2'd1);
    check(got == {12'hFF0, 1'b0}, "aSRAM access uses the temporary sSRAM word");
    if (got == {12'hFF0, 1'b0}) saw("asram_tmp");
    // ShTx PasT-0L: slot Base 5 (x8 words), PPtr 0 then 1; SCBus write after the data tenure
    a = '0; a[0:6] = 7'b0110110;
    ops = 0;
    xfer(a, 0, 2'd1);
    if (sc_seen.op == OP_NOP) ops++;
    if (sc_after.op == OP_WRITE && sc_after.data == 7'd1) ops++;
    check(got == word_addr(12'd40), "ShTx slot address");
    check(ops == 2, "SCBus PPtr write waits for the data tenure");
    if (got == word_addr(12'd40)) saw("shtx");
    if (ops == 2) saw("scbus_after_data");
    xfer(a, 0, 2'd1);
    check(got == word_addr(12'd41), "ShTx PPtr advanced");
    // SCBus busy: the next ShTx is retried
    sc_free = 0;
    xfer(a, 0, 2'd1);
    repeat (3) @(posedge clk);
    xfer(a, 0, 2'd1);
    check(retried, "retry while the SCBus buffer is busy");
    if (retried) saw("retry");
    sc_free = 1; repeat (3) @(posedge clk);
    // ShRx MemQIn poll, empty
    a = '0; a[0:6] = 7'b0110111; a[19] = 1;
    xfer(a, 1, 2'd1);
    check(got == word_addr(12'hFF3), "empty poll: EmptyMsgAddress");
    if (got == word_addr(12'hFF3)) saw("shrx_empty");
    // ASBus advances the MemQIn PPtr
    @(posedge clk) #1 as_req = '{addr: {1'b1, 3'b100, 1'b1, 1'b0, 3'b001, 1'b0}, wdata: 7'd1, op: OP_WRITE};
    @(posedge clk) #1 as_req = '{addr: '0, wdata: '0, op: OP_NOP};
    xfer(a, 1, 2'd1);
    check(got == word_addr(12'd32), "MemQIn poll reads the MemQIn slot");
    if (got == word_addr(12'd32)) saw("shrx_memqin");
    check(sa_seen.op == OP_WRITE && sa_seen.wdata == 7'd1, "aBIU copy of the MemQIn CPtr written over the SABus");
    if (sa_seen.op == OP_WRITE) saw("sabus_cptr");
    // OnePoll: two 4-byte reads of one message read the same slot
    @(posedge clk) #1 as_req = '{addr: {1'b1, 3'b100, 1'b1, 1'b0, 3'b001, 1'b0}, wdata: 7'd3, op: OP_WRITE};
    @(posedge clk) #1 as_req = '{addr: '0, wdata: '0, op: OP_NOP};
    xfer(a, 1, 2'd0);
    w = got;
    xfer(a, 1, 2'd0);
    check(got == w && got == word_addr(12'd33), "OnePoll: second half rereads the same slot");
    if (got == w) saw("onepoll");
    // clSRAM update: CLSLatch and a compose into MemQOut0
    a = '0; a[0:6] = 7'b0111000;
    fork
      xfer(a, 0, 2'd1);
      begin
        int n = 0;
        while (!cls_latch && n < 10) begin @(posedge clk) #1; n++; end
        check(cls_latch, "CLSLatch");
      end
    join
    check(cmp_seen, "clSRAM update command composed");
    if (cmp_seen) saw("cls");
    // Config read of sBIU state (MemQIn PPtr) composed into QConfigTmp
    a = '0; a[0:5] = 6'b011111; a[6] = 1; a[10:11] = 2'b01; a[7:9] = 3'b100; a[14] = 1;
    a[27:28] = 2'b00; a[15:16] = 2'b01; a[17] = 1'b0;  // NESAddress 1 01 100 1 0 001 0: MemQIn PPtr
    xfer(a, 1, 2'd1);
    check(cmp_seen && cmp_data_seen == 32'd3, $sformatf("Config read returns MemQIn PPtr (%0d)", cmp_data_seen));
    if (cmp_seen && cmp_data_seen == 32'd3) saw("config_read");
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin failures++; $display("FAIL: mechanism %s never happened", mech_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
