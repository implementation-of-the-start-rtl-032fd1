// tb_sbi: self-checking testbench of the sBIU bus-interface state machine.
//
// A bus-functional model drives sPBus transfers; the queue/state and Ctrl
// interface submodules are replaced by stub signals the test controls: the
// sSRAM address returned for a transfer, the retry and wait requests, the
// DataMotion buffer state and its completion. Checked: the 3-cycle TS-to-AACK
// latency, ARTRY in the cycle after AACK on a retry, one TA per beat (four
// for a burst, with the line-wrapped sSRAM address), the stall of an aSRAM
// read until DataMotionDone, a new TS held during a data tenure, and the
// Immediate Command strobes. Every mechanism must happen at least once.
module tb_sbi;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  bus_addr_t  sPBusAddress;
  logic       sPBusTransferStart, sPBusTransferBurst, sPBusDataBusBusy;
  logic [0:4] sPBusTransferType;
  logic [0:2] sPBusTransferSize;
  logic       sPBusAddressAck, sPBusAddressRetry, sPBusTransferAck, sp_int;
  logic [0:11] sSRAMAddress;
  logic       ssram_rd, ssram_oe;
  logic [1:0] ssram_ce;
  bus_addr_t  cur_addr;
  logic       cur_read, cur_write, addr_active, addr_confirm, data_done, dm_req;
  logic [1:0] cur_size;
  sram_addr_t sram_addr;
  logic       sqs_retry = 0, sqs_wait = 0, dm_avail = 1, dm_done = 0;
  logic       nes_reset, arctic_ack, clr_ctrl_dma, reset_dma, clear_approval, int_ap;

  sbi dut (
    .clk, .rst, .sp_addr(sPBusAddress), .sp_ts(sPBusTransferStart), .sp_tt(sPBusTransferType),
    .sp_tsiz(sPBusTransferSize), .sp_tbst(sPBusTransferBurst), .sp_dbb(sPBusDataBusBusy),
    .sp_hreset(1'b0), .sp_sreset(1'b0), .sp_aack(sPBusAddressAck), .sp_artry(sPBusAddressRetry),
    .sp_ta(sPBusTransferAck), .sp_int, .ssram_addr(sSRAMAddress), .ssram_rd, .ssram_oe, .ssram_ce,
    .cur_addr, .cur_read, .cur_write, .cur_size, .addr_active, .addr_confirm, .data_done, .dm_req,
    .sram_addr, .sqs_retry, .sqs_wait, .dm_avail, .dm_done,
    .nes_reset, .arctic_ack, .clr_ctrl_dma, .reset_dma, .clear_approval, .int_ap
  );
  // stub address generator: the address bits [17:29]
  assign sram_addr = cur_addr[17:29];

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"read", "write", "burst", "retry", "dm_stall", "immediate", "confirm"};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction

  // watchdog
  initial begin
    #2000000;
    $display("FAIL: watchdog");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin #500000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  int confirms = 0, dm_reqs = 0;
  always @(posedge clk) begin if (addr_confirm) confirms++; if (dm_req) dm_reqs++; end
  // ------------------------------------------------------------ sPBus BFM
  function automatic logic is_data(input logic [0:4] tt);
    return tt_is_read(tt) || tt_is_write(tt);
  endfunction
  localparam logic [0:4] TT_READ = 5'b01010, TT_WRITE = 5'b00010, TT_RWITM = 5'b01110;
  localparam logic [0:2] SZ4 = 3'b100, SZ8 = 3'b000, SZ32 = 3'b010;

  logic [0:11] sp_first_addr;
  task automatic sp_xfer(input bus_addr_t a, input logic [0:4] tt, input logic [0:2] tsiz,
                         input logic tbst, output bit retried, output int lat_aack, output int lat_ta,
                         output int beats);
    int n;
    retried = 0; lat_aack = -1; lat_ta = -1; beats = 0;
    @(posedge clk) #1;
    sPBusAddress = a; sPBusTransferType = tt; sPBusTransferSize = tsiz; sPBusTransferBurst = tbst;
    sPBusTransferStart = 1;
    @(posedge clk) #1;
    sPBusTransferStart = 0;
    n = 1;
    while (!sPBusAddressAck && n < 50) begin @(posedge clk) #1; n++; end
    lat_aack = n;
    @(posedge clk) #1; n++;
    if (sPBusAddressRetry) begin retried = 1; return; end
    if (!is_data(tt)) return;
    sPBusDataBusBusy = 1;
    while (beats < (tbst ? 4 : 1) && n < 400) begin
      @(posedge clk) #1; n++;
      if (sPBusTransferAck) begin
        if (beats == 0) begin lat_ta = n; sp_first_addr = sSRAMAddress; end
        beats++;
      end
    end
    sPBusDataBusBusy = 0;
  endtask


  bit r; int la, lt, nb, k;
  bus_addr_t a;
  logic [0:12] w;
  initial begin
    sPBusAddress = '0; sPBusTransferStart = 0; sPBusTransferType = '0; sPBusTransferSize = '0;
    sPBusTransferBurst = 0; sPBusDataBusBusy = 0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) begin
      w = 13'($urandom) & 13'h1FFE;
      a = '0; a[0:6] = 7'b0110000; a[17:29] = w;
      sp_xfer(a, (i % 2) ? TT_WRITE : TT_READ, SZ8, 0, r, la, lt, nb);
      check(!r && nb == 1, "single transfer completes");
      check(la == 3, $sformatf("AACK latency %0d, expected 3", la));
      check(sp_first_addr == w[0:11], "sSRAM address of the beat");
      if (nb == 1) saw((i % 2) ? "write" : "read");
    end
    confirms = 0;
    w = 13'h0036;
    a = '0; a[0:6] = 7'b0110000; a[17:29] = w;
    sp_xfer(a, TT_RWITM, SZ32, 1, r, la, lt, nb);
    check(nb == 4 && confirms == 1, "burst: four beats, one confirm");
    if (nb == 4) saw("burst");
    if (confirms == 1) saw("confirm");
    // retry requested by the queue/state unit
    sqs_retry = 1;
    sp_xfer(a, TT_READ, SZ8, 0, r, la, lt, nb);
    check(r && la == 3, "ARTRY in the cycle after AACK");
    if (r) saw("retry");
    sqs_retry = 0;
    // aSRAM read: waits for DataMotionDone, released 20 cycles later
    a = '0; a[0:6] = 7'b0110000; a[16] = 1;
    fork
      sp_xfer(a, TT_READ, SZ8, 0, r, la, lt, nb);
      begin
        k = 0;
        while (!dm_req && k < 20) begin @(posedge clk) #1; k++; end
        check(dm_req, "DataMotion requested");
        repeat (20) @(posedge clk);
        #1 dm_done = 1; @(posedge clk) #1 dm_done = 0;
      end
    join
    check(!r && nb == 1 && lt > 20, $sformatf("aSRAM read stalls until DataMotionDone (TA at %0d)", lt));
    if (lt > 20) saw("dm_stall");
    // Immediate Command: Reset DMA
    a = '0; a[0:6] = 7'b0111100; a[15:17] = IMM_CLR_DMAQ;
    fork
      sp_xfer(a, TT_WRITE, SZ8, 0, r, la, lt, nb);
      begin
        k = 0;
        while (!reset_dma && k < 30) begin @(posedge clk) #1; k++; end
        check(reset_dma && !nes_reset, "Clear DMA Queue strobe");
        if (reset_dma) saw("immediate");
      end
    join
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_names[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
