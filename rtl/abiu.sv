// abiu: aP Bus Interface Unit of the NES Core.
//
// The aBIU answers the application processor's (aP's) and the Union memory
// controller's 60X transfers to the NES address spaces (SRAM, QPtr, ShTx, ShRx,
// Immediate, Config, and the Serviced and Snooped spaces that let the NES
// watch and control accesses to ordinary memory), controls the aP-side port of
// the dual-ported aSRAM, asks NES Ctrl for data motion and composes over the
// KBus and for Ctrl state over the ACBus, and masters aPBus transfers on
// behalf of NES Ctrl (NESBuffer commands).
//
// Four submodules:
//   abi  pipelined bus interface (up to three outstanding transfers), aSRAM
//        control, Immediate Command decode
//   aqs  aSRAM address generation, queues, response tables, Approval Register,
//        locks
//   aci  KBus requests (one DataMotion and one Compose buffer)
//   abm  bus master for NESBuffer commands
// Port names follow the interface tables. The 60X pins the tables mark I/O are
// split into an input (...In, the bus as observed), an output and, where the
// aBIU drives them only while mastering, an output enable (aPBusDriveAddress
// for the address-tenure signals, aBMMasterData for DBB). Two inputs that the
// tables list as outputs only are added because the bus master must observe
// them: aPBusAddressBusBusyIn and aPBusTransferAckIn. aSRAM control comes from
// abi, or from abm while abm masters a data tenure (aBMMasterData).
// RxEmpty[4] has no receive queue on the aP side and is not used. All pins are
// active high. Timing: aPBus inputs are registered, outputs registered.
module abiu
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // aPBus
  input  bus_addr_t   aPBusAddressIn,
  output bus_addr_t   aPBusAddressOut,
  output logic        aPBusDriveAddress,
  output logic        aPBusRequest,
  input  logic        aPBusGrant,
  input  logic        aPBusTransferStartIn,
  output logic        aPBusTransferStartOut,
  input  logic [0:4]  aPBusTransferTypeIn,
  output logic [0:4]  aPBusTransferTypeOut,
  output logic [0:4]  aPBusAttrOut,          // TransferCode0, Global, CacheInhibit, WriteThrough, Shared
  input  logic [0:2]  aPBusTransferSizeIn,
  output logic [0:2]  aPBusTransferSizeOut,
  input  logic        aPBusTransferBurstIn,
  output logic        aPBusTransferBurstOut,
  input  logic        aPBusAddressBusBusyIn,
  output logic        aPBusAddressBusBusy,
  input  logic        aPBusAddressAck,
  output logic        aPBusL2Hit,
  input  logic        aPBusAddressRetryIn,
  output logic        aPBusAddressRetryOut,
  input  logic        aPBusDataBusGrant,
  input  logic        aPBusDataBusBusyIn,
  output logic        aPBusDataBusBusyOut,
  input  logic        aPBusTransferAckIn,
  output logic        aPBusTransferAck,
  input  logic        aPBusHardReset,
  input  logic        aPBusSoftReset,
  output logic        aPBusInterrupt,
  // aSRAM aP port
  output logic [0:11] aSRAMAddress,
  output logic        aSRAMReadWrite,
  output logic        aSRAMOutputEnable,
  output logic [1:0]  aSRAMChipEnable,
  // KBus
  output sram_addr_t  KBusAddress,
  output logic [0:63] KBusData,
  output logic        ShTxCompose,
  output logic        MemQInComposeRead,
  output logic        MemQInComposeWrite,
  input  logic        MemQInCtrlReq,
  output logic        MemQInComposeCtrl,
  input  logic        ComposeFree,
  output logic        DataMotionValid,
  input  logic        DataMotionFree,
  input  logic        DataMotionDone,
  // Ctrl state interface
  output ctrl_req_t   ACBus,
  input  logic        ACBusFree,
  input  logic        ACBusDone,
  input  logic [1:0]  CABusAddress,
  input  nes_data_t   CABusData,
  input  logic        CABusValid,
  // sBIU interface
  input  biu_req_t    SABus,
  output nes_data_t   SABusRData,
  output biu_req_t    ASBus,
  input  nes_data_t   ASBusRData,
  // NESBuffer
  input  logic [0:63] NESBufferOp,
  input  logic        NESBufferValid,
  output logic        NESBufferFree,
  output logic        NESBufferDone,
  // clSRAM
  input  logic [0:2]  clSRAMData,
  output logic        clSRAMReadWrite,
  output logic        clSRAMUpdate,
  output logic        clSRAMDone,
  // miscellaneous
  input  logic [0:4]  RxEmpty,
  output logic        RxLateAck,
  output logic        NESResetAP,
  input  logic        ResetDMA,
  input  logic        ClearApproval,
  output logic        ClearCtrlDMA,
  output logic        InterruptSP,
  // observation
  output response_t   LookupResponse,
  output appr_state_t ApprovalState,
  output logic        aPBusLock,
  output logic        NotifyLock
);

  bus_addr_t  cur_addr;
  logic [0:4] cur_tt;
  logic [0:2] cur_cls;
  logic [1:0] cur_size;
  logic       cur_read, cur_write, addr_active, addr_confirm, addr_busy, data_done, dm_req;
  sram_addr_t sram_addr, memqin_addr, dmaq_addr, cmp_addr;
  logic       aqs_retry, aqs_slave, aqs_capture, aqs_sram_en, aqs_wait;
  logic       dm_avail, dm_done, cmp_req, cmp_avail, cmp_done, memqin_alloc;
  logic [0:63] cmp_data, abm_cmp_data;
  logic [1:0] cmp_kind;
  logic       abm_cmp_req, abm_cmp_ack;
  logic       master_addr, master_data;
  logic       appr_update, cls_update, dmaq_inc;
  appr_cmd_t  appr_cmd;
  logic [0:9] appr_sram_new;
  logic       arctic_ack, qs_late_ack, ap_int;

  logic [0:11] bi_asram_addr, bm_asram_addr;
  logic        bi_asram_rd, bm_asram_rd, bi_asram_oe, bm_asram_oe;
  logic [1:0]  bi_asram_ce, bm_asram_ce;

  abi u_abi (
    .clk, .rst,
    .ap_addr(aPBusAddressIn), .ap_ts(aPBusTransferStartIn), .ap_tt(aPBusTransferTypeIn),
    .ap_tsiz(aPBusTransferSizeIn), .ap_tbst(aPBusTransferBurstIn), .ap_dbb(aPBusDataBusBusyIn),
    .ap_dbg(aPBusDataBusGrant), .ap_hreset(aPBusHardReset), .ap_sreset(aPBusSoftReset),
    .cls_data(clSRAMData),
    .ap_l2hit(aPBusL2Hit), .ap_artry(aPBusAddressRetryOut), .ap_ta(aPBusTransferAck), .ap_int,
    .asram_addr(bi_asram_addr), .asram_rd(bi_asram_rd), .asram_oe(bi_asram_oe), .asram_ce(bi_asram_ce),
    .cur_addr, .cur_tt, .cur_cls, .cur_size, .cur_read, .cur_write,
    .addr_active, .addr_confirm, .addr_busy, .data_done, .dm_req,
    .sram_addr, .aqs_retry, .aqs_slave, .aqs_capture, .aqs_sram_en, .aqs_wait,
    .dm_avail, .dm_done, .abm_master_addr(master_addr), .abm_master_data(master_data),
    .nes_reset(NESResetAP), .arctic_ack, .clr_ctrl_dma(ClearCtrlDMA), .int_sp(InterruptSP)
  );

  aqs u_aqs (
    .clk, .rst,
    .cur_addr, .cur_tt, .cur_cls, .cur_size, .cur_read, .cur_write,
    .addr_active, .addr_confirm, .data_done,
    .sram_addr, .aqs_retry, .aqs_slave, .aqs_capture, .aqs_sram_en, .aqs_wait,
    .lookup_response(LookupResponse),
    .cmp_req, .cmp_addr, .cmp_data, .cmp_kind, .cmp_avail, .cmp_done, .memqin_addr, .memqin_alloc,
    .ac(ACBus), .ac_free(ACBusFree), .ac_done(ACBusDone),
    .ca_addr(CABusAddress), .ca_data(CABusData), .ca_valid(CABusValid),
    .as_req(ASBus), .as_rdata(ASBusRData), .sa_req(SABus), .sa_rdata(SABusRData),
    .appr_update, .appr_cmd, .appr_sram_new, .cls_update, .dmaq_inc, .dmaq_addr,
    .reset_dma(ResetDMA), .clear_approval(ClearApproval), .rx_empty(RxEmpty[0:3]),
    .rx_late_ack(qs_late_ack), .ap_bus_lock(aPBusLock), .notify_lock(NotifyLock),
    .appr_state(ApprovalState)
  );

  aci u_aci (
    .clk, .rst,
    .dm_req, .dm_bus_addr(cur_addr), .dm_write(cur_write), .dm_size(cur_size),
    .dm_tmp_addr(sram_addr), .data_done, .addr_busy, .dm_avail, .dm_done,
    .cmp_req, .cmp_addr, .cmp_data, .cmp_kind, .cmp_avail, .cmp_done, .memqin_addr, .memqin_alloc,
    .abm_cmp_req, .abm_cmp_data, .abm_cmp_ack,
    .kbus_addr(KBusAddress), .kbus_data(KBusData), .shtx_compose(ShTxCompose),
    .mq_compose_read(MemQInComposeRead), .mq_compose_write(MemQInComposeWrite),
    .mq_ctrl_req(MemQInCtrlReq), .mq_compose_ctrl(MemQInComposeCtrl),
    .compose_free(ComposeFree), .dm_valid(DataMotionValid), .dm_free(DataMotionFree),
    .dm_complete(DataMotionDone)
  );

  abm u_abm (
    .clk, .rst,
    .nesbuf_op(NESBufferOp), .nesbuf_valid(NESBufferValid), .nesbuf_free(NESBufferFree),
    .nesbuf_done(NESBufferDone),
    .ap_breq(aPBusRequest), .ap_bg(aPBusGrant), .ap_abb_i(aPBusAddressBusBusyIn),
    .ap_aack(aPBusAddressAck), .ap_artry(aPBusAddressRetryIn), .ap_dbg(aPBusDataBusGrant),
    .ap_ta_i(aPBusTransferAckIn),
    .ap_ts_o(aPBusTransferStartOut), .ap_addr_o(aPBusAddressOut), .ap_tt_o(aPBusTransferTypeOut),
    .ap_tsiz_o(aPBusTransferSizeOut), .ap_tbst_o(aPBusTransferBurstOut), .ap_attr_o(aPBusAttrOut),
    .ap_abb_o(aPBusAddressBusBusy), .ap_dbb_o(aPBusDataBusBusyOut),
    .master_addr, .master_data,
    .asram_addr(bm_asram_addr), .asram_rd(bm_asram_rd), .asram_oe(bm_asram_oe), .asram_ce(bm_asram_ce),
    .appr_update, .appr_cmd, .appr_sram_new, .cls_update, .dmaq_inc, .dmaq_addr,
    .cls_sram_update(clSRAMUpdate), .cls_sram_write(clSRAMReadWrite), .cls_sram_done(clSRAMDone),
    .cmp_req(abm_cmp_req), .cmp_data(abm_cmp_data), .cmp_ack(abm_cmp_ack)
  );

  assign aPBusDriveAddress = master_addr;
  assign aPBusInterrupt    = ap_int;
  assign RxLateAck         = qs_late_ack || arctic_ack;

  // aSRAM aP port: the bus master owns it during its own data tenure
  assign aSRAMAddress      = master_data ? bm_asram_addr : bi_asram_addr;
  assign aSRAMReadWrite    = master_data ? bm_asram_rd   : bi_asram_rd;
  assign aSRAMOutputEnable = master_data ? bm_asram_oe   : bi_asram_oe;
  assign aSRAMChipEnable   = master_data ? bm_asram_ce   : bi_asram_ce;

endmodule
