// sbiu: sP Bus Interface Unit of the NES Core.
//
// The sBIU answers the service processor's (sP's) 60X bus transfers to the
// NES address spaces: plain sSRAM/aSRAM access, queue-pointer and
// configuration access, short-message transmit (ShTx, Special ShTx) and
// receive polling (ShRx), clSRAM update requests and Immediate Commands.
// It controls the sP-side port of the dual-ported sSRAM (the data itself moves
// between the sPBus and the SRAM, never through the sBIU) and asks NES Ctrl for
// IBus work over the JBus and for Ctrl state over the SCBus. The aBIU reaches
// sBIU state over the ASBus; the sBIU reaches aBIU state over the SABus.
//
// Three submodules:
//   sbi  bus-interface state machine (address x data phase), sSRAM control,
//        Immediate Command decode
//   sqs  sSRAM address generation and all sBIU queue/system state
//   sci  JBus requests (one DataMotion and one Compose buffer)
// Port names are the interface-table signal names. All pins are active high;
// sSRAMRead/Write is 1 for a read. The SABus/ASBus and SCBus are carried as
// packed structs (address, data, op); their op codes are nes_pkg::state_op_t.
// Timing: sPBus inputs are registered, outputs are registered (see sbi); the
// SABus is driven, and ASBus reads are answered, combinationally.
module sbiu
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // sPBus
  input  bus_addr_t   sPBusAddress,
  input  logic        sPBusTransferStart,
  input  logic [0:4]  sPBusTransferType,
  input  logic [0:2]  sPBusTransferSize,
  input  logic        sPBusTransferBurst,
  output logic        sPBusAddressAck,
  output logic        sPBusAddressRetry,
  input  logic        sPBusDataBusBusy,
  output logic        sPBusTransferAck,
  input  logic        sPBusHardReset,
  input  logic        sPBusSoftReset,
  output logic        sPBusInterrupt,
  // sSRAM sP port
  output logic [0:11] sSRAMAddress,
  output logic        sSRAMReadWrite,
  output logic        sSRAMOutputEnable,
  output logic [1:0]  sSRAMChipEnable,
  // JBus
  output sram_addr_t  JBusAddress,
  output logic [0:31] JBusData,
  output logic        ShTxCompose,
  output logic        MemQOut0Compose,
  output logic        MemQOut1Compose,
  output logic [1:0]  MemQOutOp,
  input  logic        ComposeFree,
  output logic        DataMotionValid,
  input  logic        DataMotionFree,
  input  logic        DataMotionDone,
  // Ctrl state interface
  output ctrl_req_t   SCBus,
  input  logic        SCBusFree,
  input  logic        SCBusDone,
  input  logic [1:0]  CSBusAddress,
  input  nes_data_t   CSBusData,
  input  logic        CSBusValid,
  // aBIU interface
  output biu_req_t    SABus,
  input  nes_data_t   SABusRData,
  input  biu_req_t    ASBus,
  output nes_data_t   ASBusRData,
  // miscellaneous
  input  logic [0:4]  RxEmpty,
  output logic        RxLateAck,
  output logic        NESResetSP,
  output logic        CLSLatch,
  output logic        ResetDMA,
  output logic        ClearApproval,
  output logic        ClearCtrlDMA,
  output logic        InterruptAP
);

  bus_addr_t  cur_addr;
  logic       cur_read, cur_write;
  logic [1:0] cur_size;
  logic       addr_active, addr_confirm, data_done, dm_req;
  sram_addr_t sram_addr;
  logic       sqs_retry, sqs_wait, dm_avail, dm_done;
  logic       cmp_req, cmp_mq0, cmp_mq1, cmp_after_data, cmp_avail, cmp_done;
  sram_addr_t cmp_addr;
  logic [31:0] cmp_data;
  logic [1:0] cmp_mqop;
  logic       arctic_ack, qs_late_ack;

  sbi u_sbi (
    .clk, .rst,
    .sp_addr(sPBusAddress), .sp_ts(sPBusTransferStart), .sp_tt(sPBusTransferType),
    .sp_tsiz(sPBusTransferSize), .sp_tbst(sPBusTransferBurst), .sp_dbb(sPBusDataBusBusy),
    .sp_hreset(sPBusHardReset), .sp_sreset(sPBusSoftReset),
    .sp_aack(sPBusAddressAck), .sp_artry(sPBusAddressRetry), .sp_ta(sPBusTransferAck),
    .sp_int(sPBusInterrupt),
    .ssram_addr(sSRAMAddress), .ssram_rd(sSRAMReadWrite), .ssram_oe(sSRAMOutputEnable),
    .ssram_ce(sSRAMChipEnable),
    .cur_addr, .cur_read, .cur_write, .cur_size, .addr_active, .addr_confirm, .data_done,
    .dm_req, .sram_addr, .sqs_retry, .sqs_wait, .dm_avail, .dm_done,
    .nes_reset(NESResetSP), .arctic_ack, .clr_ctrl_dma(ClearCtrlDMA), .reset_dma(ResetDMA),
    .clear_approval(ClearApproval), .int_ap(InterruptAP)
  );

  sqs u_sqs (
    .clk, .rst,
    .cur_addr, .cur_read, .cur_write, .cur_size, .addr_active, .addr_confirm, .data_done,
    .sram_addr, .sqs_retry, .sqs_wait,
    .cmp_req, .cmp_addr, .cmp_data, .cmp_mq0, .cmp_mq1, .cmp_mqop, .cmp_after_data,
    .cmp_avail, .cmp_done,
    .sc(SCBus), .sc_free(SCBusFree), .sc_done(SCBusDone),
    .cs_addr(CSBusAddress), .cs_data(CSBusData), .cs_valid(CSBusValid),
    .sa(SABus), .sa_rdata(SABusRData), .as_req(ASBus), .as_rdata(ASBusRData),
    .rx_empty(RxEmpty), .rx_late_ack(qs_late_ack), .cls_latch(CLSLatch)
  );

  sci u_sci (
    .clk, .rst,
    .dm_req, .dm_bus_addr(cur_addr), .dm_write(cur_write), .dm_size(cur_size),
    .dm_tmp_addr(sram_addr), .data_done, .dm_avail, .dm_done,
    .cmp_req, .cmp_addr, .cmp_data, .cmp_mq0, .cmp_mq1, .cmp_mqop, .cmp_after_data,
    .cmp_avail, .cmp_done,
    .jbus_addr(JBusAddress), .jbus_data(JBusData), .shtx_compose(ShTxCompose),
    .memqout0_compose(MemQOut0Compose), .memqout1_compose(MemQOut1Compose),
    .mq_op(MemQOutOp), .compose_free(ComposeFree), .dm_valid(DataMotionValid),
    .dm_free(DataMotionFree), .dm_complete(DataMotionDone)
  );

  // late acknowledgment from a ShRx read or from the Arctic Ack command
  assign RxLateAck = qs_late_ack || arctic_ack;

endmodule
