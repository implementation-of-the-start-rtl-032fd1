// tb_abi: self-checking testbench of the aBIU pipelined bus interface.
//
// A bus-functional model drives aPBus address tenures ahead of their data
// tenures; the queue/state submodule is replaced by stub signals (slave,
// capture, aSRAM address = address bits [17:29], retry). Checked: L2Hit
// claims, up to three outstanding transfers served in order with their own
// aSRAM addresses, the retry of a fourth, ARTRY on a requested retry, four TA
// for a burst, no TA for a snooped capture, the DataMotion stall of an sSRAM
// read and Immediate Command strobes. Every mechanism must happen.
module tb_abi;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  bus_addr_t  aPBusAddressIn;
  logic       aPBusTransferStartIn, aPBusTransferBurstIn, aPBusDataBusBusyIn, aPBusDataBusGrant;
  logic [0:4] aPBusTransferTypeIn;
  logic [0:2] aPBusTransferSizeIn, clSRAMData;
  logic       aPBusL2Hit, aPBusAddressRetryOut, aPBusTransferAck, ap_int;
  logic [0:11] aSRAMAddress;
  logic       asram_rd, asram_oe;
  logic [1:0] asram_ce;
  bus_addr_t  cur_addr;
  logic [0:4] cur_tt;
  logic [0:2] cur_cls;
  logic [1:0] cur_size;
  logic       cur_read, cur_write, addr_active, addr_confirm, addr_busy, data_done, dm_req;
  logic       aqs_retry = 0, aqs_capture = 0, aqs_wait = 0, dm_avail = 1, dm_done = 0;
  logic       slave_en = 1;
  logic       nes_reset, arctic_ack, clr_ctrl_dma, int_sp;

  abi dut (
    .clk, .rst, .ap_addr(aPBusAddressIn), .ap_ts(aPBusTransferStartIn), .ap_tt(aPBusTransferTypeIn),
    .ap_tsiz(aPBusTransferSizeIn), .ap_tbst(aPBusTransferBurstIn), .ap_dbb(aPBusDataBusBusyIn),
    .ap_dbg(aPBusDataBusGrant), .ap_hreset(1'b0), .ap_sreset(1'b0), .cls_data(clSRAMData),
    .ap_l2hit(aPBusL2Hit), .ap_artry(aPBusAddressRetryOut), .ap_ta(aPBusTransferAck), .ap_int,
    .asram_addr(aSRAMAddress), .asram_rd, .asram_oe, .asram_ce,
    .cur_addr, .cur_tt, .cur_cls, .cur_size, .cur_read, .cur_write,
    .addr_active, .addr_confirm, .addr_busy, .data_done, .dm_req,
    .sram_addr(cur_addr[17:29]), .aqs_retry, .aqs_slave(slave_en && cur_addr[0:2] == 3'b011),
    .aqs_capture, .aqs_sram_en(1'b1), .aqs_wait, .dm_avail, .dm_done,
    .abm_master_addr(1'b0), .abm_master_data(1'b0),
    .nes_reset, .arctic_ack, .clr_ctrl_dma, .int_sp
  );

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"claim", "pipeline3", "full_retry", "retry", "burst", "capture", "dm_stall", "immediate"};

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
  function automatic logic is_data(input logic [0:4] tt);
    return tt_is_read(tt) || tt_is_write(tt);
  endfunction
  localparam logic [0:4] TT_READ = 5'b01010, TT_WRITE = 5'b00010, TT_RWITM = 5'b01110;
  localparam logic [0:2] SZ4 = 3'b100, SZ8 = 3'b000, SZ32 = 3'b010;
  // ------------------------------------------------------------ aPBus BFM
  logic [0:11] ap_first_addr;
  logic ap_union_busy = 0;
  task automatic ap_addr(input bus_addr_t a, input logic [0:4] tt, input logic [0:2] tsiz,
                         input logic tbst, output bit retried, output bit claimed);
    retried = 0; claimed = 0;
    @(posedge clk) #1;
    aPBusAddressIn = a; aPBusTransferTypeIn = tt; aPBusTransferSizeIn = tsiz;
    aPBusTransferBurstIn = tbst; aPBusTransferStartIn = 1;
    clSRAMData = 3'($urandom);
    @(posedge clk) #1;
    aPBusTransferStartIn = 0;
    repeat (6) begin
      @(posedge clk) #1;
      if (aPBusL2Hit) claimed = 1;
      if (aPBusAddressRetryOut) retried = 1;
    end
  endtask
  task automatic ap_data(input bit claimed, input int nbeats, output int beats);
    int n = 0;
    beats = 0;
    @(posedge clk) #1;
    aPBusDataBusBusyIn = 1; aPBusDataBusGrant = 1;
    @(posedge clk) #1;
    aPBusDataBusGrant = 0;
    if (claimed) begin
      while (beats < nbeats && n < 400) begin
        @(posedge clk) #1; n++;
        if (aPBusTransferAck) begin
          if (beats == 0) ap_first_addr = aSRAMAddress;
          beats++;
        end
      end
    end else repeat (nbeats) @(posedge clk) #1;
    aPBusDataBusBusyIn = 0;
  endtask


  function automatic bus_addr_t ap_sram(input bit asram, input logic [0:12] w);
    bus_addr_t a = '0;
    a[0:6] = 7'b0110000; a[16] = asram; a[17:29] = w;
    return a;
  endfunction
  bit r, cl; int nb, k;
  logic [0:12] w [3];
  bus_addr_t a;
  initial begin
    aPBusAddressIn = '0; aPBusTransferStartIn = 0; aPBusTransferTypeIn = '0; aPBusTransferSizeIn = '0;
    aPBusTransferBurstIn = 0; aPBusDataBusBusyIn = 0; aPBusDataBusGrant = 0; clSRAMData = '0;
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int i = 0; i < 3; i++) begin
        w[i] = 13'($urandom) & 13'h1FFE;
        ap_addr(ap_sram(1, w[i]), TT_READ, SZ8, 0, r, cl);
        check(!r && cl, "address tenure claimed");
        if (cl) saw("claim");
      end
      ap_addr(ap_sram(1, 13'h0002), TT_READ, SZ8, 0, r, cl);
      check(r, "fourth outstanding transfer retried");
      if (r) saw("full_retry");
      k = 0;
      for (int i = 0; i < 3; i++) begin
        ap_data(1, 1, nb);
        check(nb == 1 && ap_first_addr == w[i][0:11], $sformatf("data %0d in order", i));
        if (nb == 1 && ap_first_addr == w[i][0:11]) k++;
      end
      if (k == 3) saw("pipeline3");
    end
    aqs_retry = 1;
    ap_addr(ap_sram(1, 13'h0010), TT_READ, SZ8, 0, r, cl);
    check(r, "requested retry gives ARTRY");
    if (r) saw("retry");
    aqs_retry = 0;
    ap_addr(ap_sram(1, 13'h0020), TT_WRITE, SZ32, 1, r, cl);
    ap_data(cl, 4, nb);
    check(!r && nb == 4, "burst: four TA");
    if (nb == 4) saw("burst");
    // snooped capture: no claim, no TA, aSRAM written
    slave_en = 0; aqs_capture = 1;
    a = '0; a[0:5] = 6'b000001;
    ap_addr(a, TT_WRITE, SZ8, 0, r, cl);
    check(!r && !cl, "capture: no claim");
    fork
      ap_data(0, 1, nb);
      begin
        k = 0;
        repeat (8) begin @(posedge clk) #1; if (asram_ce != 0) k++; if (aPBusTransferAck) k = -100; end
        check(k > 0, "capture writes the aSRAM without TA");
        if (k > 0) saw("capture");
      end
    join
    slave_en = 1; aqs_capture = 0;
    // sSRAM read: waits for DataMotionDone
    ap_addr(ap_sram(0, 13'h0100), TT_READ, SZ8, 0, r, cl);
    fork
      ap_data(cl, 1, nb);
      begin repeat (15) @(posedge clk); #1 dm_done = 1; @(posedge clk) #1 dm_done = 0; end
    join
    check(nb == 1, "sSRAM read completes after DataMotionDone");
    if (nb == 1) saw("dm_stall");
    a = '0; a[0:6] = 7'b0111100; a[15:17] = IMM_INT_SP;
    fork
      ap_addr(a, TT_WRITE, SZ8, 0, r, cl);
      begin k = 0; while (!int_sp && k < 20) begin @(posedge clk) #1; k++; end
        check(int_sp, "Interrupt sP strobe"); if (int_sp) saw("immediate"); end
    join
    ap_data(cl, 1, nb);
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
