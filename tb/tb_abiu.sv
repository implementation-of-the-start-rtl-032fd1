// tb_abiu: self-checking testbench of the aBIU on its own.
//
// A bus-functional model drives aPBus address tenures ahead of their data
// tenures (up to the pipeline depth), an arbiter/slave model serves the aBIU's
// own bus-master transfers, a Ctrl model answers the KBus and ACBus and
// issues NESBuffer commands, and the sBIU side is a stub: the SSResponse table
// is written over the SABus. Each sequence drives one mechanism (pipelining
// and the retry when full, DataMotion, NOTIFY, NotifyLock, the Approval
// Register sequence, aPBusLock, Snooped IGNORE, NES-Mastered transfers with a
// bus retry and Ack, DMA counting, clSRAM update) and checks its effect.
// Every mechanism must happen at least once. Random values come from $urandom.
module tb_abiu;
  import nes_pkg::*;

  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic sPBusInterrupt, aPBusInterrupt;
  bus_addr_t   sPBusAddress;
  logic        sPBusTransferStart;
  logic [0:4]  sPBusTransferType;
  logic [0:2]  sPBusTransferSize;
  logic        sPBusTransferBurst;
  logic        sPBusAddressAck;
  logic        sPBusAddressRetry;
  logic        sPBusDataBusBusy;
  logic        sPBusTransferAck;
  logic        sPBusHardReset;
  logic        sPBusSoftReset;
  logic [0:11] sSRAMAddress;
  logic        sSRAMReadWrite;
  logic        sSRAMOutputEnable;
  logic [1:0]  sSRAMChipEnable;
  sram_addr_t  JBusAddress;
  logic [0:31] JBusData;
  logic        sShTxCompose;
  logic        MemQOut0Compose;
  logic        MemQOut1Compose;
  logic [1:0]  MemQOutOp;
  logic        sComposeFree;
  logic        sDataMotionValid;
  logic        sDataMotionFree;
  logic        sDataMotionDone;
  ctrl_req_t   SCBus;
  logic        SCBusFree;
  logic        SCBusDone;
  logic [1:0]  CSBusAddress;
  nes_data_t   CSBusData;
  logic        CSBusValid;
  logic [0:4]  sRxEmpty;
  logic        sRxLateAck;
  logic        NESResetSP;
  logic        CLSLatch;
  logic        sClearCtrlDMA;
  bus_addr_t   aPBusAddressIn;
  bus_addr_t   aPBusAddressOut;
  logic        aPBusDriveAddress;
  logic        aPBusRequest;
  logic        aPBusGrant;
  logic        aPBusTransferStartIn;
  logic        aPBusTransferStartOut;
  logic [0:4]  aPBusTransferTypeIn;
  logic [0:4]  aPBusTransferTypeOut;
  logic [0:4]  aPBusAttrOut;
  logic [0:2]  aPBusTransferSizeIn;
  logic [0:2]  aPBusTransferSizeOut;
  logic        aPBusTransferBurstIn;
  logic        aPBusTransferBurstOut;
  logic        aPBusAddressBusBusyIn;
  logic        aPBusAddressBusBusy;
  logic        aPBusAddressAck;
  logic        aPBusL2Hit;
  logic        aPBusAddressRetryIn;
  logic        aPBusAddressRetryOut;
  logic        aPBusDataBusGrant;
  logic        aPBusDataBusBusyIn;
  logic        aPBusDataBusBusyOut;
  logic        aPBusTransferAckIn;
  logic        aPBusTransferAck;
  logic        aPBusHardReset;
  logic        aPBusSoftReset;
  logic [0:11] aSRAMAddress;
  logic        aSRAMReadWrite;
  logic        aSRAMOutputEnable;
  logic [1:0]  aSRAMChipEnable;
  sram_addr_t  KBusAddress;
  logic [0:63] KBusData;
  logic        aShTxCompose;
  logic        MemQInComposeRead;
  logic        MemQInComposeWrite;
  logic        MemQInCtrlReq;
  logic        MemQInComposeCtrl;
  logic        aComposeFree;
  logic        aDataMotionValid;
  logic        aDataMotionFree;
  logic        aDataMotionDone;
  ctrl_req_t   ACBus;
  logic        ACBusFree;
  logic        ACBusDone;
  logic [1:0]  CABusAddress;
  nes_data_t   CABusData;
  logic        CABusValid;
  logic [0:63] NESBufferOp;
  logic        NESBufferValid;
  logic        NESBufferFree;
  logic        NESBufferDone;
  logic [0:2]  clSRAMData;
  logic        clSRAMReadWrite;
  logic        clSRAMUpdate;
  logic        clSRAMDone;
  logic [0:4]  aRxEmpty;
  logic        aRxLateAck;
  logic        NESResetAP;
  logic        aClearCtrlDMA;
  response_t   LookupResponse;
  appr_state_t ApprovalState;
  logic        aPBusLock;
  logic        NotifyLock;

  biu_req_t  sa_bus, as_bus;
  nes_data_t sa_rdata, as_rdata;
  logic      reset_dma, clear_approval, int_ap, int_sp, sp_int, ap_int;
  abiu dut (
    .clk, .rst,
    .aPBusAddressIn(aPBusAddressIn),
    .aPBusAddressOut(aPBusAddressOut),
    .aPBusDriveAddress(aPBusDriveAddress),
    .aPBusRequest(aPBusRequest),
    .aPBusGrant(aPBusGrant),
    .aPBusTransferStartIn(aPBusTransferStartIn),
    .aPBusTransferStartOut(aPBusTransferStartOut),
    .aPBusTransferTypeIn(aPBusTransferTypeIn),
    .aPBusTransferTypeOut(aPBusTransferTypeOut),
    .aPBusAttrOut(aPBusAttrOut),
    .aPBusTransferSizeIn(aPBusTransferSizeIn),
    .aPBusTransferSizeOut(aPBusTransferSizeOut),
    .aPBusTransferBurstIn(aPBusTransferBurstIn),
    .aPBusTransferBurstOut(aPBusTransferBurstOut),
    .aPBusAddressBusBusyIn(aPBusAddressBusBusyIn),
    .aPBusAddressBusBusy(aPBusAddressBusBusy),
    .aPBusAddressAck(aPBusAddressAck),
    .aPBusL2Hit(aPBusL2Hit),
    .aPBusAddressRetryIn(aPBusAddressRetryIn),
    .aPBusAddressRetryOut(aPBusAddressRetryOut),
    .aPBusDataBusGrant(aPBusDataBusGrant),
    .aPBusDataBusBusyIn(aPBusDataBusBusyIn),
    .aPBusDataBusBusyOut(aPBusDataBusBusyOut),
    .aPBusTransferAckIn(aPBusTransferAckIn),
    .aPBusTransferAck(aPBusTransferAck),
    .aPBusHardReset(aPBusHardReset),
    .aPBusSoftReset(aPBusSoftReset),
    .aPBusInterrupt(ap_int),
    .aSRAMAddress(aSRAMAddress),
    .aSRAMReadWrite(aSRAMReadWrite),
    .aSRAMOutputEnable(aSRAMOutputEnable),
    .aSRAMChipEnable(aSRAMChipEnable),
    .KBusAddress(KBusAddress),
    .KBusData(KBusData),
    .ShTxCompose(aShTxCompose),
    .MemQInComposeRead(MemQInComposeRead),
    .MemQInComposeWrite(MemQInComposeWrite),
    .MemQInCtrlReq(MemQInCtrlReq),
    .MemQInComposeCtrl(MemQInComposeCtrl),
    .ComposeFree(aComposeFree),
    .DataMotionValid(aDataMotionValid),
    .DataMotionFree(aDataMotionFree),
    .DataMotionDone(aDataMotionDone),
    .ACBus(ACBus),
    .ACBusFree(ACBusFree),
    .ACBusDone(ACBusDone),
    .CABusAddress(CABusAddress),
    .CABusData(CABusData),
    .CABusValid(CABusValid),
    .SABus(sa_bus),
    .SABusRData(sa_rdata),
    .ASBus(as_bus),
    .ASBusRData(as_rdata),
    .NESBufferOp(NESBufferOp),
    .NESBufferValid(NESBufferValid),
    .NESBufferFree(NESBufferFree),
    .NESBufferDone(NESBufferDone),
    .clSRAMData(clSRAMData),
    .clSRAMReadWrite(clSRAMReadWrite),
    .clSRAMUpdate(clSRAMUpdate),
    .clSRAMDone(clSRAMDone),
    .RxEmpty(aRxEmpty),
    .RxLateAck(aRxLateAck),
    .NESResetAP(NESResetAP),
    .ResetDMA(reset_dma),
    .ClearApproval(clear_approval),
    .ClearCtrlDMA(aClearCtrlDMA),
    .InterruptSP(int_sp),
    .LookupResponse(LookupResponse),
    .ApprovalState(ApprovalState),
    .aPBusLock(aPBusLock),
    .NotifyLock(NotifyLock)
  );
  assign as_rdata = 7'd0;
  assign reset_dma = 1'b0;
  assign clear_approval = 1'b0;
  assign int_ap = 1'b0;
  task automatic sa_write(input nes_addr_t n, input nes_data_t d);
    @(posedge clk) #1;
    sa_bus = '{addr: n[2:11], wdata: d, op: OP_WRITE};
    @(posedge clk) #1;
    sa_bus = '{addr: n[2:11], wdata: '0, op: OP_READ};
    #1 check(sa_rdata == d, "SABus write reads back");
    @(posedge clk) #1;
    sa_bus = '{addr: '0, wdata: '0, op: OP_NOP};
  endtask

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"ap_read", "ap_burst_write", "ap_pipeline", "ap_full_retry", "ap_datamotion", "ap_notify", "ap_notify_lock_retry", "ap_approval_retry", "ap_approval_complete", "ap_bus_lock_retry", "ap_snoop_ignore", "abm_nes_mastered", "abm_retry", "abm_ack", "abm_dma_zero", "abm_cls_update"};

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

  // ------------------------------------------------------------ Ctrl model
  logic hold_s = 0, hold_a = 0;
  logic [3:0] dm_s_pipe = 0, dm_a_pipe = 0;
  assign sComposeFree    = sShTxCompose && !hold_s;
  assign sDataMotionFree = sDataMotionValid && !hold_s;
  assign aComposeFree    = (aShTxCompose || MemQInComposeRead || MemQInComposeWrite || MemQInComposeCtrl) && !hold_a;
  assign aDataMotionFree = aDataMotionValid && !hold_a;
  assign sDataMotionDone = dm_s_pipe[3];
  assign aDataMotionDone = dm_a_pipe[3];
  assign SCBusFree = SCBus.op != OP_NOP;
  assign ACBusFree = ACBus.op != OP_NOP;
  always_ff @(posedge clk) begin
    dm_s_pipe <= {dm_s_pipe[2:0], sDataMotionFree};
    dm_a_pipe <= {dm_a_pipe[2:0], aDataMotionFree};
    SCBusDone <= SCBusFree;
    ACBusDone <= ACBusFree;
  end
  int s_composes = 0, a_mq_read = 0, a_mq_write = 0, a_plain = 0, a_dm = 0, sc_writes = 0;
  logic [0:31] last_jbus;
  logic [0:63] last_kbus;
  always @(posedge clk) begin
    if (sComposeFree) begin s_composes++; last_jbus <= JBusData; end
    if (aComposeFree) begin last_kbus <= KBusData; end
    if (aComposeFree && MemQInComposeRead) a_mq_read++;
    if (aComposeFree && MemQInComposeWrite) a_mq_write++;
    if (aComposeFree && aShTxCompose) a_plain++;
    if (aDataMotionFree) a_dm++;
    if (SCBus.op == OP_WRITE) sc_writes++;
  end

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

  // ------------------------------------------------------------ arbiter / slave for aBM transfers
  bit abm_retry_once = 0;
  int abm_ts_seen = 0, abm_ta_given = 0;
  initial begin
    aPBusGrant = 0; aPBusAddressAck = 0; aPBusAddressRetryIn = 0; aPBusTransferAckIn = 0;
    aPBusAddressBusBusyIn = 0;
    forever begin
      @(posedge clk) #1;
      aPBusGrant = aPBusRequest && !ap_union_busy;
      if (aPBusTransferStartOut) begin
        int nb;
        bit retry_now;
        abm_ts_seen++;
        nb = aPBusTransferBurstOut ? 4 : 1;
        aPBusGrant = 0;
        @(posedge clk) #1; aPBusAddressAck = 1;
        @(posedge clk) #1; aPBusAddressAck = 0;
        retry_now = abm_retry_once; abm_retry_once = 0;
        aPBusAddressRetryIn = retry_now;
        @(posedge clk) #1; aPBusAddressRetryIn = 0;
        if (!retry_now && is_data(aPBusTransferTypeOut)) begin
          aPBusDataBusGrant = 1;
          @(posedge clk) #1; aPBusDataBusGrant = 0;
          repeat (3) @(posedge clk);
          #1;
          repeat (nb) begin
            aPBusTransferAckIn = 1; abm_ta_given++;
            @(posedge clk) #1;
          end
          aPBusTransferAckIn = 0;
        end
      end
    end
  end

  // ------------------------------------------------------------ address builders
  function automatic bus_addr_t sp_sram(input bit asram, input logic [0:12] w);
    bus_addr_t a = '0;
    a[0:6] = 7'b0110000; a[16] = asram; a[17:29] = w;
    return a;
  endfunction
  function automatic bus_addr_t cfg_addr(input nes_addr_t n, input nes_data_t d, input bit upd);
    bus_addr_t a = '0;
    a[0:5] = 6'b011111; a[6] = n[0]; a[10:11] = n[1:2]; a[7:9] = n[3:5]; a[14] = n[6];
    a[27:28] = n[7:8]; a[15:16] = n[9:10]; a[17] = n[11]; a[19:25] = d; a[26] = upd;
    return a;
  endfunction
  function automatic nes_addr_t ssresp_nes(input logic [0:4] tt);
    return {4'b1100, 3'b101, tt};
  endfunction
  function automatic bus_addr_t ap_sram(input bit asram, input logic [0:12] w);
    bus_addr_t a = '0;
    a[0:6] = 7'b0110000; a[16] = asram; a[17:29] = w;
    return a;
  endfunction
  function automatic bus_addr_t serviced(input logic [0:24] off);
    bus_addr_t a = '0;
    a[0:6] = 7'b0010000; a[7:31] = off; a[27:31] = '0;
    return a;
  endfunction

  task automatic nes_cmd(input logic [0:63] op);
    int n = 0;
    while (!NESBufferFree && n < 200) begin @(posedge clk) #1; n++; end
    NESBufferOp = op; NESBufferValid = 1;
    @(posedge clk) #1;
    NESBufferValid = 0;
  endtask
  task automatic wait_done(output bit done);
    int n = 0;
    done = 0;
    while (n < 300) begin
      @(posedge clk) #1; n++;
      if (NESBufferDone) begin done = 1; return; end
    end
  endtask
  function automatic logic [0:63] misc_cmd(input appr_cmd_t c, input logic [0:9] sa, input bit cls, input bit ack);
    logic [0:63] op = '0;
    op[14:16] = 3'b101; op[17] = ack; op[18] = cls; op[47:49] = c; op[50:59] = sa;
    return op;
  endfunction

  // ------------------------------------------------------------ test sequence
  bit r, cl, done;
  int la, lt, nb, nb2, nb3, cnt0, cnt0b;
  bus_addr_t a1, a2, a3;
  logic [0:12] w;
  logic [0:63] op;

  initial begin
    sPBusAddress = '0; sPBusTransferStart = 0; sPBusTransferType = '0; sPBusTransferSize = '0;
    sPBusTransferBurst = 0; sPBusDataBusBusy = 0; sPBusHardReset = 0; sPBusSoftReset = 0;
    CSBusAddress = '0; CSBusData = '0; CSBusValid = 0; sRxEmpty = '1; aRxEmpty = '1;
    aPBusAddressIn = '0; aPBusTransferStartIn = 0; aPBusTransferTypeIn = '0;
    aPBusTransferSizeIn = '0; aPBusTransferBurstIn = 0; aPBusDataBusGrant = 0;
    aPBusDataBusBusyIn = 0; aPBusHardReset = 0; aPBusSoftReset = 0;
    MemQInCtrlReq = 0; CABusAddress = '0; CABusData = '0; CABusValid = 0;
    NESBufferOp = '0; NESBufferValid = 0; clSRAMData = '0;
    repeat (4) @(posedge clk);
    #1 rst = 0;
    repeat (2) @(posedge clk);
    sa_bus = '{addr: '0, wdata: '0, op: OP_NOP};
    sa_write(ssresp_nes(TT_READ), 7'd2);
    sa_write(ssresp_nes(TT_WRITE), 7'd1);
    // ---- aP read of the aSRAM
    w = 13'($urandom) & 13'h0FFE;
    ap_addr(ap_sram(1, w), TT_READ, SZ8, 0, r, cl);
    check(!r && cl, "aP aSRAM read claimed");
    ap_data(cl, 1, nb);
    check(nb == 1 && ap_first_addr == w[0:11], "aP read: one beat at the addressed word");
    if (nb == 1) saw("ap_read");

    // ---- aP burst write
    ap_addr(ap_sram(1, 13'h0040), TT_WRITE, SZ32, 1, r, cl);
    ap_data(cl, 4, nb);
    check(!r && nb == 4, "aP burst write: four beats");
    if (nb == 4) saw("ap_burst_write");

    // ---- aP pipeline: three address tenures ahead of their data, a fourth is retried
    a1 = ap_sram(1, 13'h0010); a2 = ap_sram(1, 13'h0020); a3 = ap_sram(1, 13'h0030);
    ap_addr(a1, TT_READ, SZ8, 0, r, cl);  check(!r && cl, "pipelined 1 accepted");
    ap_addr(a2, TT_READ, SZ8, 0, r, cl);  check(!r && cl, "pipelined 2 accepted");
    ap_addr(a3, TT_READ, SZ8, 0, r, cl);  check(!r && cl, "pipelined 3 accepted");
    ap_addr(ap_sram(1, 13'h0050), TT_READ, SZ8, 0, r, cl);
    check(r, "fourth outstanding transfer retried");
    if (r) saw("ap_full_retry");
    ap_data(1, 1, nb);  check(nb == 1 && ap_first_addr == 12'h008, $sformatf("pipelined data 1 in order (%0d beats at %h)", nb, ap_first_addr));
    ap_data(1, 1, nb2); check(nb2 == 1 && ap_first_addr == 12'h010, "pipelined data 2 in order");
    ap_data(1, 1, nb3); check(nb3 == 1 && ap_first_addr == 12'h018, "pipelined data 3 in order");
    if (nb + nb2 + nb3 == 3) saw("ap_pipeline");

    // ---- aP access of the sSRAM: DataMotion on the KBus
    cnt0 = a_dm;
    ap_addr(ap_sram(0, 13'h0444), TT_READ, SZ8, 0, r, cl);
    ap_data(cl, 1, nb);
    check(!r && nb == 1 && a_dm == cnt0 + 1, "aP sSRAM read via DataMotion");
    if (a_dm == cnt0 + 1) saw("ap_datamotion");

    // ---- Serviced write with NOTIFY: completes, MemQInComposeWrite, sBIU MemQIn PPtr advances
    cnt0 = a_mq_write;
    ap_addr(serviced(25'($urandom)), TT_WRITE, SZ8, 0, r, cl);
    ap_data(cl, 1, nb);
    repeat (4) @(posedge clk);
    check(!r && cl && nb == 1, "notified Serviced write completes");
    check(a_mq_write == cnt0 + 1, "MemQInComposeWrite issued");
    if (a_mq_write == cnt0 + 1) saw("ap_notify");
    check(as_bus.op == OP_NOP, "ASBus idle after the notification");

    // ---- NotifyLock: notification retried
    nes_cmd(misc_cmd(AC_LOCK_NOTIFY, '0, 0, 0)); wait_done(done);
    check(done && NotifyLock, "Lock Notification command");
    ap_addr(serviced(25'h100), TT_WRITE, SZ8, 0, r, cl);
    check(r, "notification retried under NotifyLock");
    if (r) saw("ap_notify_lock_retry");
    nes_cmd(misc_cmd(AC_UNLOCK_NOTIFY, '0, 0, 0)); wait_done(done);
    check(!NotifyLock, "Unlock Notification command");

    // ---- APPROVE: FREE -> retry + request (PENDING); READY -> complete at ApprSRAMAddress
    cnt0 = a_mq_read;
    a1 = serviced(25'h012340);
    ap_addr(a1, TT_READ, SZ8, 0, r, cl);
    repeat (3) @(posedge clk);
    check(r && ApprovalState == APPR_PENDING, "approval: first attempt retried, register PENDING");
    check(a_mq_read == cnt0 + 1, "approval request composed into MemQIn");
    ap_addr(a1, TT_READ, SZ8, 0, r, cl);
    check(r, "approval: PENDING retries");
    if (r) saw("ap_approval_retry");
    nes_cmd(misc_cmd(AC_READY, 10'h155, 0, 0)); wait_done(done);
    check(ApprovalState == APPR_READY, "ApprCommand READY");
    ap_addr(serviced(25'h045600), TT_READ, SZ8, 0, r, cl);
    check(r, "approval: READY with another address retries");
    ap_addr(a1, TT_READ, SZ8, 0, r, cl);
    check(!r && cl, "approval: READY with the same address completes");
    ap_data(cl, 1, nb);
    check(nb == 1 && ap_first_addr == {10'h155, 2'b00}, $sformatf("approved read at ApprSRAMAddress (%h)", ap_first_addr));
    check(ApprovalState == APPR_FREE, "approval register FREE again");
    if (!r && nb == 1) saw("ap_approval_complete");

    // ---- aPBusLock: every transfer retried
    nes_cmd(misc_cmd(AC_TOGGLE_LOCK, '0, 0, 0)); wait_done(done);
    check(aPBusLock, "aPBusLock set");
    ap_addr(ap_sram(1, 13'h0002), TT_READ, SZ8, 0, r, cl);
    check(r, "transfer retried under aPBusLock");
    if (r) saw("ap_bus_lock_retry");
    nes_cmd(misc_cmd(AC_TOGGLE_LOCK, '0, 0, 0)); wait_done(done);
    check(!aPBusLock, "aPBusLock cleared");

    // ---- Snooped read, HAL table IGNORE: the aBIU neither claims nor retries
    a1 = '0; a1[0:5] = 6'b000001; a1[6:26] = 21'($urandom);
    ap_addr(a1, TT_READ, SZ8, 0, r, cl);
    check(!r && !cl, "snooped IGNORE: no claim, no retry");
    ap_data(0, 1, nb);
    if (!r && !cl) saw("ap_snoop_ignore");

    // ---- NES-Mastered write with Ack; the first address tenure is retried by the bus
    cnt0 = a_plain;
    op = '0; op[14:16] = 3'b100; op[17] = 1; op[4:13] = 10'h0AB; op[18:22] = TT_WRITE;
    op[29:31] = SZ8; op[32:61] = 30'($urandom); op[62:63] = 2'd1;
    abm_retry_once = 1;
    cnt0b = abm_ts_seen;
    nes_cmd(op); wait_done(done);
    repeat (4) @(posedge clk);
    check(done, "NES-Mastered command completes");
    check(abm_ts_seen == cnt0b + 2, $sformatf("retried address tenure is repeated (%0d TS)", abm_ts_seen - cnt0b));
    check(a_plain == cnt0 + 1 && last_kbus[28] == 1'b1 && last_kbus[0:27] == op[0:27], "Ack composed into MemQIn with bit 28 set");
    if (done) saw("abm_nes_mastered");
    if (abm_ts_seen == cnt0b + 2) saw("abm_retry");
    if (a_plain == cnt0 + 1) saw("abm_ack");

    // ---- DMA Receive (channel 3, one pending) then DMARx-Mastered write: special ack at zero
    cnt0 = a_plain;
    op = '0; op[14:16] = 3'b000; op[11:13] = 3'd3; op[48:63] = 16'd1;
    nes_cmd(op); wait_done(done);
    op = '0; op[14:16] = 3'b001; op[11:13] = 3'd3; op[18:22] = TT_WRITE; op[29:31] = SZ8;
    op[32:61] = 30'($urandom); op[62:63] = 2'd1;
    nes_cmd(op); wait_done(done);
    repeat (4) @(posedge clk);
    check(done && a_plain == cnt0 + 1 && last_kbus[1] == 1'b1, "DMA channel reaching zero sends the special acknowledgment");
    if (a_plain == cnt0 + 1) saw("abm_dma_zero");

    // ---- clSRAM update
    fork
      begin nes_cmd(misc_cmd(AC_NOP, '0, 1, 0)); wait_done(done); end
      begin
        int k = 0;
        while (!(clSRAMUpdate && clSRAMDone) && k < 60) begin @(posedge clk) #1; k++; end
        check(clSRAMUpdate && clSRAMDone && clSRAMReadWrite, "clSRAM update strobes");
        if (clSRAMUpdate) saw("abm_cls_update");
      end
    join

    // ---- every mechanism must have happened
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin
        failures++;
        $display("FAIL: mechanism %s never happened", mech_names[i]);
      end
    end
    foreach (mech[m]) $display("mechanism %s: %0d", m, mech[m]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
