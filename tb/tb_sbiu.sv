// tb_sbiu: self-checking testbench of the sBIU on its own.
//
// A bus-functional model drives sPBus transfers one at a time; a Ctrl model
// answers the JBus and SCBus; the aBIU side is a stub that returns a fixed
// value (2) for SABus reads and writes the sBIU MemQIn producer pointer over
// the ASBus. Each sequence drives one mechanism (single and burst transfers,
// retry on a full DataMotion buffer, the stall of an aSRAM read, ShTx, MemQOut
// compose, Config access, ShRx polling, Immediate Commands) and checks its
// effect, including the three-cycle TS-to-AACK latency of this design.
// Every mechanism must happen at least once. Random values come from $urandom.
module tb_sbiu;
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
  sbiu dut (
    .clk, .rst,
    .sPBusAddress(sPBusAddress),
    .sPBusTransferStart(sPBusTransferStart),
    .sPBusTransferType(sPBusTransferType),
    .sPBusTransferSize(sPBusTransferSize),
    .sPBusTransferBurst(sPBusTransferBurst),
    .sPBusAddressAck(sPBusAddressAck),
    .sPBusAddressRetry(sPBusAddressRetry),
    .sPBusDataBusBusy(sPBusDataBusBusy),
    .sPBusTransferAck(sPBusTransferAck),
    .sPBusHardReset(sPBusHardReset),
    .sPBusSoftReset(sPBusSoftReset),
    .sPBusInterrupt(sp_int),
    .sSRAMAddress(sSRAMAddress),
    .sSRAMReadWrite(sSRAMReadWrite),
    .sSRAMOutputEnable(sSRAMOutputEnable),
    .sSRAMChipEnable(sSRAMChipEnable),
    .JBusAddress(JBusAddress),
    .JBusData(JBusData),
    .ShTxCompose(sShTxCompose),
    .MemQOut0Compose(MemQOut0Compose),
    .MemQOut1Compose(MemQOut1Compose),
    .MemQOutOp(MemQOutOp),
    .ComposeFree(sComposeFree),
    .DataMotionValid(sDataMotionValid),
    .DataMotionFree(sDataMotionFree),
    .DataMotionDone(sDataMotionDone),
    .SCBus(SCBus),
    .SCBusFree(SCBusFree),
    .SCBusDone(SCBusDone),
    .CSBusAddress(CSBusAddress),
    .CSBusData(CSBusData),
    .CSBusValid(CSBusValid),
    .SABus(sa_bus),
    .SABusRData(sa_rdata),
    .ASBus(as_bus),
    .ASBusRData(as_rdata),
    .RxEmpty(sRxEmpty),
    .RxLateAck(sRxLateAck),
    .NESResetSP(NESResetSP),
    .CLSLatch(CLSLatch),
    .ResetDMA(reset_dma),
    .ClearApproval(clear_approval),
    .ClearCtrlDMA(sClearCtrlDMA),
    .InterruptAP(int_ap)
  );
  assign sa_rdata = 7'd2;
  initial as_bus = '{addr: '0, wdata: '0, op: OP_NOP};
  assign aPBusInterrupt = int_ap;

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"sp_read", "sp_write", "sp_burst", "sp_retry", "sp_stall", "sp_memqout_compose", "sp_scbus", "sp_config_write_abiu", "sp_config_read_abiu", "sp_shrx_empty", "sp_shrx_memqin", "sp_immediate"};

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
    // ---- sP single read of the sSRAM: AACK 3 cycles after TS, one TA at the addressed word
    w = 13'($urandom) & 13'h1FFE;
    sp_xfer(sp_sram(0, w), TT_READ, SZ8, 0, r, la, lt, nb);
    check(!r && nb == 1, "sP read completes with one beat");
    check(la == 3, $sformatf("sP AACK latency %0d, expected 3", la));
    check(sp_first_addr == w[0:11], "sP read sSRAM address");
    if (!r && nb == 1) saw("sp_read");

    // ---- sP single write
    w = 13'($urandom) & 13'h1FFE;
    sp_xfer(sp_sram(0, w), TT_WRITE, SZ8, 0, r, la, lt, nb);
    check(!r && nb == 1, "sP write completes");
    if (!r && nb == 1) saw("sp_write");

    // ---- sP burst read: four beats, address wraps within the line
    w = 13'($urandom) & 13'h1FFE;
    sp_xfer(sp_sram(0, w), TT_RWITM, SZ32, 1, r, la, lt, nb);
    check(!r && nb == 4, $sformatf("sP burst gives 4 beats (%0d)", nb));
    if (nb == 4) saw("sp_burst");

    // ---- sP write into the aSRAM while Ctrl holds the KBus/JBus: DataMotion stays queued
    hold_s = 1;
    sp_xfer(sp_sram(1, 13'h0100), TT_WRITE, SZ8, 0, r, la, lt, nb);
    check(!r && nb == 1, "sP aSRAM write completes into the temporary word");
    sp_xfer(sp_sram(1, 13'h0200), TT_WRITE, SZ8, 0, r, la, lt, nb);
    check(r, "second aSRAM access retried while the DataMotion buffer is full");
    if (r) saw("sp_retry");
    hold_s = 0;
    repeat (4) @(posedge clk);

    // ---- sP aSRAM read: data tenure waits for DataMotionDone
    sp_xfer(sp_sram(1, 13'h0300), TT_READ, SZ8, 0, r, la, lt, nb);
    check(!r && nb == 1, "sP aSRAM read completes");
    check(lt > 8, $sformatf("sP aSRAM read stalls for the DataMotion (TA at %0d)", lt));
    if (!r && lt > 8) saw("sp_stall");

    // ---- sP ShTx (PasT-0L) 8-byte write: PPtr write to Ctrl over the SCBus after the data
    cnt0 = sc_writes;
    sp_xfer({7'b0110110, 25'b0}, TT_WRITE, SZ8, 0, r, la, lt, nb);
    repeat (4) @(posedge clk);
    check(!r && sc_writes == cnt0 + 1, "ShTx write updates the Ctrl PPtr over the SCBus");
    if (sc_writes == cnt0 + 1) saw("sp_scbus");

    // ---- sP Special ShTx into MemQOut0: a MemQOut compose on the JBus
    cnt0 = s_composes;
    a1 = '0; a1[0:2] = 3'b010; a1[4] = 1; a1[15:16] = 2'b11;
    sp_xfer(a1, TT_WRITE, SZ8, 0, r, la, lt, nb);
    repeat (4) @(posedge clk);
    check(!r && s_composes == cnt0 + 1, "MemQOut compose issued");
    if (s_composes == cnt0 + 1) saw("sp_memqout_compose");

    // ---- sP Config write of the aBIU SSResponse table (read type -> APPROVE, write type -> NOTIFY)
    sp_xfer(cfg_addr(ssresp_nes(TT_READ), 7'd2, 1), TT_WRITE, SZ8, 0, r, la, lt, nb);
    sp_xfer(cfg_addr(ssresp_nes(TT_WRITE), 7'd1, 1), TT_WRITE, SZ8, 0, r, la, lt, nb);
    check(!r, "Config writes complete");
    if (!r) saw("sp_config_write_abiu");
    // read it back: the value is composed into QConfigTmp
    sp_xfer(cfg_addr(ssresp_nes(TT_READ), 7'd0, 0), TT_READ, SZ8, 0, r, la, lt, nb);
    check(!r && nb == 1 && last_jbus == 32'd2, $sformatf("Config read of SSResponse returns APPROVE (%0d)", last_jbus));
    if (!r && last_jbus == 32'd2) saw("sp_config_read_abiu");

    // ---- sP ShRx poll of MemQIn with nothing received: EmptyMsgAddress
    a1 = '0; a1[0:6] = 7'b0110111; a1[19] = 1;
    sp_xfer(a1, TT_READ, SZ8, 0, r, la, lt, nb);
    check(sp_first_addr == 12'hFF3, $sformatf("empty poll reads EmptyMsgAddress (%h)", sp_first_addr));
    if (sp_first_addr == 12'hFF3) saw("sp_shrx_empty");

    // ---- sP Immediate Command: interrupt the aP
    a1 = '0; a1[0:6] = 7'b0111100; a1[15:17] = IMM_INT_AP;
    fork
      sp_xfer(a1, TT_WRITE, SZ8, 0, r, la, lt, nb);
      begin
        int k = 0;
        while (!aPBusInterrupt && k < 30) begin @(posedge clk) #1; k++; end
        check(aPBusInterrupt, "Immediate Command interrupts the aP");
        if (aPBusInterrupt) saw("sp_immediate");
      end
    join

    // ---- the aBIU advances the sBIU MemQIn producer pointer over the ASBus
    @(posedge clk) #1;
    as_bus = '{addr: {1'b1, 3'b100, 1'b1, 1'b0, 3'b001, 1'b0}, wdata: 7'd1, op: OP_WRITE};
    @(posedge clk) #1;
    check(as_rdata == 7'd1, "ASBus write and read back of MemQIn PPtr");
    as_bus = '{addr: '0, wdata: '0, op: OP_NOP};
    a1 = '0; a1[0:6] = 7'b0110111; a1[19] = 1;
    sp_xfer(a1, TT_READ, SZ8, 0, r, la, lt, nb);
    check(sp_first_addr != 12'hFF3, "sP ShRx finds the MemQIn message");
    if (sp_first_addr != 12'hFF3) saw("sp_shrx_memqin");
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
