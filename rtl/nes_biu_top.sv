// nes_biu_top: the two Bus Interface Units of the StarT-Voyager NES Core.
//
// The sBIU connects the service processor's 60X bus (sPBus) and the aBIU the
// application processor's 60X bus (aPBus) to the NES: each controls its
// processor's port of a dual-ported SRAM (sSRAM, aSRAM), decodes its
// processor's transfers to the NES address spaces and asks NES Ctrl for work
// (JBus/KBus and SCBus/ACBus). This module instantiates both and connects them
// to each other:
//   SABus / SABusRData   sBIU reads and writes aBIU state
//   ASBus / ASBusRData   aBIU reads and writes sBIU state (including the sBIU
//                        copy of the MemQIn producer pointer)
//   ResetDMA, ClearApproval   Immediate Commands from the sP acting in the aBIU
//   interrupts            sBIU InterruptAP is or-ed into aPBusInterrupt, aBIU
//                        InterruptSP into sPBusInterrupt
// Everything else is a port. Signals that both BIUs have under the same name
// are prefixed s (sBIU) or a (aBIU): sShTxCompose, aShTxCompose, sRxEmpty, ...
// Ports are plain vectors and the packed structs of nes_pkg (state buses).
// Timing: see sbiu and abiu; the cross connections add no registers, so an
// SABus or ASBus read is answered in the cycle it is made.
module nes_biu_top
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  output logic        sPBusInterrupt,
  output logic        aPBusInterrupt,
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
  output logic [0:11] sSRAMAddress,
  output logic        sSRAMReadWrite,
  output logic        sSRAMOutputEnable,
  output logic [1:0]  sSRAMChipEnable,
  output sram_addr_t  JBusAddress,
  output logic [0:31] JBusData,
  output logic        sShTxCompose,
  output logic        MemQOut0Compose,
  output logic        MemQOut1Compose,
  output logic [1:0]  MemQOutOp,
  input  logic        sComposeFree,
  output logic        sDataMotionValid,
  input  logic        sDataMotionFree,
  input  logic        sDataMotionDone,
  output ctrl_req_t   SCBus,
  input  logic        SCBusFree,
  input  logic        SCBusDone,
  input  logic [1:0]  CSBusAddress,
  input  nes_data_t   CSBusData,
  input  logic        CSBusValid,
  input  logic [0:4]  sRxEmpty,
  output logic        sRxLateAck,
  output logic        NESResetSP,
  output logic        CLSLatch,
  output logic        sClearCtrlDMA,
  input  bus_addr_t   aPBusAddressIn,
  output bus_addr_t   aPBusAddressOut,
  output logic        aPBusDriveAddress,
  output logic        aPBusRequest,
  input  logic        aPBusGrant,
  input  logic        aPBusTransferStartIn,
  output logic        aPBusTransferStartOut,
  input  logic [0:4]  aPBusTransferTypeIn,
  output logic [0:4]  aPBusTransferTypeOut,
  output logic [0:4]  aPBusAttrOut,
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
  output logic [0:11] aSRAMAddress,
  output logic        aSRAMReadWrite,
  output logic        aSRAMOutputEnable,
  output logic [1:0]  aSRAMChipEnable,
  output sram_addr_t  KBusAddress,
  output logic [0:63] KBusData,
  output logic        aShTxCompose,
  output logic        MemQInComposeRead,
  output logic        MemQInComposeWrite,
  input  logic        MemQInCtrlReq,
  output logic        MemQInComposeCtrl,
  input  logic        aComposeFree,
  output logic        aDataMotionValid,
  input  logic        aDataMotionFree,
  input  logic        aDataMotionDone,
  output ctrl_req_t   ACBus,
  input  logic        ACBusFree,
  input  logic        ACBusDone,
  input  logic [1:0]  CABusAddress,
  input  nes_data_t   CABusData,
  input  logic        CABusValid,
  input  logic [0:63] NESBufferOp,
  input  logic        NESBufferValid,
  output logic        NESBufferFree,
  output logic        NESBufferDone,
  input  logic [0:2]  clSRAMData,
  output logic        clSRAMReadWrite,
  output logic        clSRAMUpdate,
  output logic        clSRAMDone,
  input  logic [0:4]  aRxEmpty,
  output logic        aRxLateAck,
  output logic        NESResetAP,
  output logic        aClearCtrlDMA,
  output response_t   LookupResponse,
  output appr_state_t ApprovalState,
  output logic        aPBusLock,
  output logic        NotifyLock
);

  biu_req_t  sa_bus, as_bus;
  nes_data_t sa_rdata, as_rdata;
  logic      reset_dma, clear_approval, int_ap, int_sp, sp_int, ap_int;

  sbiu u_sbiu (
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

  abiu u_abiu (
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

  assign sPBusInterrupt = sp_int || int_sp;
  assign aPBusInterrupt = ap_int || int_ap;

endmodule
