// aqs: aBIU Queue/State. Turns the current aPBus transfer into an aSRAM
// address, a bus response and the state changes and requests it implies, and
// holds all aBIU-visible state.
//
// State: receive queues VasR-2L, VasR-2H, VasR-3L, VasR-3H, DMARxDataQ and the
// aBIU copy of the MemQIn consumer pointer (CPtr, PPtr, Base, Bound, LateAck
// each); transmit queues PasT-2L, PasT-2H, PasT-3L, PasT-3H, MemQIn and
// MemQDataIn (PPtr, Base, Bound, 32bCompose); OnePoll?/OnePollAddress; the
// ABIULocks register (aPBusLock, NotifyLock); the SSResponse table (one 2-bit
// response per supported transfer type) and the HALResponse table (per
// transfer type and 3-bit clSRAM state); the Approval Register (state,
// captured bus address, ApprSRAMAddress). NESAddress layout as in the sBIU:
// Comm Groups 010/011 are PasT/VasR-2/3, 110 is MemQIn (Tx low), MemQDataIn
// (Tx high) and the MemQIn CPtr copy (Rx low), 111 Rx low is the DMARxDataQ.
//
// Per space (aPBusAddress[0:6]):
//   SRAM        [16]=1: aSRAM address [17:29]; [16]=0: aSRAMTmp and a DataMotion
//   QPtr, ShTx, ShRx, Config, Immediate: as in the sBIU, with ACBus/CABus to
//               Ctrl and ASBus to the sBIU
//   Serviced    response = SSResponse[TT]; the aBIU is always the slave
//   Snooped     response = HALResponse[TT, clSRAMData]; the aBIU only drives
//               the bus for an approved transfer
//   IGNORE   Serviced: complete, reads return MissPattern; Snooped: nothing
//   NOTIFY   retry if NotifyLock; otherwise compose a MemQInComposeRead/Write
//            message at the MemQIn PPtr, advance MemQIn PPtr here and in the
//            sBIU (ASBus); write data goes to the MemQDataIn slot
//   APPROVE  Approval Register FREE: retry, capture the address, go PENDING,
//            compose an approval request into MemQIn; PENDING, LOCKED or READY
//            with another address: retry; READY with the same address: the
//            transfer completes at ApprSRAMAddress and the register goes FREE
//   RETRY    retry
// aPBusLock retries every transfer on the bus; a clSRAM update in progress
// retries Snooped transfers. A compose that finds the buffer busy retries.
// MemQIn messages (64-bit KBusData): [0:31] bus address, [32] 1 for an
// approval request, [59:63] TT. aBM and Ctrl composes into MemQIn advance the
// MemQIn PPtr when aci accepts them (memqin_alloc).
// Timing: the decode outputs are combinational on abi's current transfer; the
// approval request is made while abi is in AddressActive (the transfer is
// retried), everything else changes on the clock after addr_confirm or
// data_done. The PasT PPtr ACBus write waits for the next DataRelease.
// A Config access to the Overflow group (Ctrl EPRAM, Comm Group 101) reads the
// static OverflowStatus word, which Ctrl maintains.
// The responses and their actions, the tables, the Approval Register and the
// locks follow the description; static addresses, the message format, the
// table row order and reset values are this design's choices.
module aqs
  import nes_pkg::*;
#(
  parameter logic [11:0] ASRAM_TMP      = 12'hFF0,
  parameter logic [11:0] QCONFIG_TMP    = 12'hFF1,
  parameter logic [11:0] MISS_PATTERN   = 12'hFF2,
  parameter logic [11:0] EMPTY_MSG_ADDR = 12'hFF3,
  parameter logic [11:0] OVERFLOW_STATUS = 12'hFF4,
  parameter logic [11:0] QPTR_TMP       = 12'hFE0,  // + Comm Group (8 words)
  parameter logic [11:0] CONT_BASE      = 12'hFE8   // + poll result index (8 words)
)(
  input  logic        clk,
  input  logic        rst,
  // current transfer from abi
  input  bus_addr_t   cur_addr,
  input  logic [0:4]  cur_tt,
  input  logic [0:2]  cur_cls,
  input  logic [1:0]  cur_size,
  input  logic        cur_read,
  input  logic        cur_write,
  input  logic        addr_active,
  input  logic        addr_confirm,
  input  logic        data_done,
  output sram_addr_t  sram_addr,
  output logic        aqs_retry,
  output logic        aqs_slave,
  output logic        aqs_capture,
  output logic        aqs_sram_en,
  output logic        aqs_wait,
  output response_t   lookup_response,
  // compose requests to aci
  output logic        cmp_req,
  output sram_addr_t  cmp_addr,
  output logic [0:63] cmp_data,
  output logic [1:0]  cmp_kind,       // 0 plain, 1 MemQIn read, 2 MemQIn write
  input  logic        cmp_avail,
  input  logic        cmp_done,
  output sram_addr_t  memqin_addr,
  input  logic        memqin_alloc,
  // ACBus (to Ctrl) and CABus (from Ctrl)
  output ctrl_req_t   ac,
  input  logic        ac_free,
  input  logic        ac_done,
  input  logic [1:0]  ca_addr,
  input  nes_data_t   ca_data,
  input  logic        ca_valid,
  // ASBus (to sBIU) and SABus (from sBIU)
  output biu_req_t    as_req,
  input  nes_data_t   as_rdata,
  input  biu_req_t    sa_req,
  output nes_data_t   sa_rdata,
  // aBM
  input  logic        appr_update,
  input  appr_cmd_t   appr_cmd,
  input  logic [0:9]  appr_sram_new,
  input  logic        cls_update,
  input  logic        dmaq_inc,
  output sram_addr_t  dmaq_addr,
  // misc
  input  logic        reset_dma,
  input  logic        clear_approval,
  input  logic [0:3]  rx_empty,      // PcpR-2L, PcpR-2H, PcpR-3L, PcpR-3H
  output logic        rx_late_ack,
  output logic        ap_bus_lock,
  output logic        notify_lock,
  output appr_state_t appr_state
);

  localparam int NRX = 6;
  localparam int NTX = 6;
  localparam int RX_DMAQ   = 4;
  localparam int RX_MQCOPY = 5;
  localparam int TX_MEMQIN = 4;
  localparam int TX_MQDATA = 5;
  localparam int NROW = 11;

  // ------------------------------------------------------------ state
  ptr_t   rx_cptr [NRX];
  ptr_t   rx_pptr [NRX];
  base_t  rx_base [NRX];
  bound_t rx_bound[NRX];
  logic   rx_lack [NRX];
  ptr_t   tx_pptr [NTX];
  base_t  tx_base [NTX];
  bound_t tx_bound[NTX];
  logic   tx_c32  [NTX];
  logic       onepoll_f;
  sram_addr_t onepoll_addr;
  response_t  ssresp [NROW];
  response_t  hal    [8*NROW];
  bus_addr_t  appr_addr;
  logic [0:9] appr_sram;

  // ------------------------------------------------------------ state access
  function automatic int rx_index(input nes_addr_t n);
    if (n[3:5] == 3'b010) return n[7] ? 1 : 0;
    if (n[3:5] == 3'b011) return n[7] ? 3 : 2;
    if (n[3:5] == 3'b111 && !n[7]) return RX_DMAQ;
    if (n[3:5] == 3'b110 && !n[7]) return RX_MQCOPY;
    return -1;
  endfunction
  function automatic int tx_index(input nes_addr_t n);
    if (n[3:5] == 3'b010) return n[7] ? 1 : 0;
    if (n[3:5] == 3'b011) return n[7] ? 3 : 2;
    if (n[3:5] == 3'b110) return n[7] ? TX_MQDATA : TX_MEMQIN;
    return -1;
  endfunction
  function automatic int row_of(input logic [0:4] tt);
    logic [3:0] r;
    r = tt_row(tt);
    return (r < 4'(NROW)) ? int'(r) : -1;
  endfunction

  function automatic nes_data_t state_read(input nes_addr_t n);
    int q, r;
    nes_data_t d;
    d = '0;
    r = row_of(n[7:11]);
    if (n[0] && n[1:2] == 2'b01) begin
      if (n[6]) begin
        q = rx_index(n);
        if (q >= 0) begin
          case (n[8:10])
            3'b000:  d = nes_data_t'(rx_cptr[q]);
            3'b001:  d = nes_data_t'(rx_pptr[q]);
            3'b010:  d = rx_base[q][8:2];
            3'b011:  d = {rx_base[q][1:0], rx_bound[q]};
            3'b100:  d = nes_data_t'(rx_lack[q]);
            default: d = '0;
          endcase
        end
      end else begin
        q = tx_index(n);
        if (q >= 0) begin
          case (n[8:10])
            3'b000:  d = nes_data_t'(tx_pptr[q]);
            3'b010:  d = tx_base[q][8:2];
            3'b011:  d = {tx_base[q][1:0], tx_bound[q]};
            3'b100:  d = nes_data_t'(tx_c32[q]);
            default: d = '0;
          endcase
        end
      end
    end else if (n[0:3] == 4'b1100 && n[4:7] == 4'b1000) begin
      case (n[8:11])
        4'd0:    d = {onepoll_f, onepoll_addr[0:5]};
        4'd1:    d = onepoll_addr[6:12];
        4'd2:    d = {5'b0, ap_bus_lock, notify_lock};
        default: d = '0;
      endcase
    end else if (n[0:3] == 4'b1100 && n[4:6] == 3'b101) begin
      if (r >= 0) d = nes_data_t'(ssresp[r]);
    end else if (n[0:3] == 4'b1101) begin
      if (r >= 0) d = nes_data_t'(hal[int'(n[4:6])*NROW + r]);
    end
    return d;
  endfunction

  function automatic nes_addr_t biu_nes(input logic [0:9] a);
    return {1'b1, !a[0], a};
  endfunction

  assign sa_rdata  = state_read(biu_nes(sa_req.addr));
  assign dmaq_addr = slot_addr(rx_base[RX_DMAQ], rx_cptr[RX_DMAQ]);
  assign memqin_addr = slot_addr(tx_base[TX_MEMQIN], tx_pptr[TX_MEMQIN]);

  // ------------------------------------------------------------ decode
  space_t    space;
  nes_addr_t nes;
  nes_data_t ndata;
  logic      upd;
  assign space = decode_ap_space(cur_addr[0:6]);
  assign nes   = nes_addr_from_bus(cur_addr);
  assign ndata = cur_addr[19:25];
  assign upd   = cur_addr[26];

  // ShTx queue: PasT-2/3 by [7], low/high by [28]
  int txq;
  assign txq = (cur_addr[7] ? 2 : 0) + (cur_addr[28] ? 1 : 0);
  logic tx_space, tx_whole, tx_c32_go;
  assign tx_space  = (space == SPC_SHTX) && cur_write;
  assign tx_whole  = (cur_size != 2'd0) || cur_addr[29];
  assign tx_c32_go = tx_c32[txq] && cur_size == 2'd0 && cur_addr[29];

  // ShRx poll: VasR-2H, PcpR-2H, VasR-3H, PcpR-3H, VasR-2L, PcpR-2L, VasR-3L, PcpR-3L
  logic [7:0] poll, nonempty, hit;
  logic       hi, lo;
  assign hi = cur_addr[27];
  assign lo = cur_addr[28];
  assign poll = {cur_addr[18] & lo, cur_addr[17] & lo, cur_addr[16] & lo, cur_addr[15] & lo,
                 cur_addr[18] & hi, cur_addr[17] & hi, cur_addr[16] & hi, cur_addr[15] & hi};
  assign nonempty = {!rx_empty[2], rx_cptr[2] != rx_pptr[2], !rx_empty[0], rx_cptr[0] != rx_pptr[0],
                     !rx_empty[3], rx_cptr[3] != rx_pptr[3], !rx_empty[1], rx_cptr[1] != rx_pptr[1]};
  assign hit = poll & nonempty;

  int sel, rxq;
  always_comb begin
    sel = -1;
    for (int i = 7; i >= 0; i--) if (hit[i]) sel = i;
    case (sel)
      0: rxq = 1;
      2: rxq = 3;
      4: rxq = 0;
      6: rxq = 2;
      default: rxq = -1;
    endcase
  end
  logic rx_space, rx_replay, rx_take;
  assign rx_space  = (space == SPC_SHRX) && cur_read;
  assign rx_replay = rx_space && cur_size == 2'd0 && onepoll_f;
  assign rx_take   = rx_space && !rx_replay && rxq >= 0;

  sram_addr_t rx_addr;
  always_comb begin
    if (rx_replay)      rx_addr = onepoll_addr;
    else if (rxq >= 0)  rx_addr = slot_addr(rx_base[rxq], rx_cptr[rxq]);
    else if (sel >= 0)  rx_addr = word_addr(CONT_BASE + 12'(sel));
    else                rx_addr = word_addr(EMPTY_MSG_ADDR);
  end

  // Config Access targets
  logic cfg, cfg_ctrl, cfg_ep, cfg_abiu, cfg_sbiu;
  assign cfg      = (space == SPC_CONFIG);
  assign cfg_ctrl = !nes[0];
  assign cfg_ep   = cfg_ctrl && nes[1:2] == 2'b00;
  assign cfg_abiu = nes[0] && nes_is_abiu(nes);
  assign cfg_sbiu = nes[0] && !nes_is_abiu(nes);

  // ------------------------------------------------------------ Serviced / Snooped response
  logic serviced, snooped;
  assign serviced = (space == SPC_SERVICED);
  assign snooped  = (space == SPC_SNOOPED);
  int row;
  assign row = row_of(cur_tt);
  always_comb begin
    lookup_response = RSP_IGNORE;
    if (row >= 0) lookup_response = serviced ? ssresp[row] : hal[int'(cur_cls)*NROW + row];
  end

  logic ss, appr_match, rsp_notify, rsp_approved, appr_request, rsp_retry;
  assign ss           = serviced || snooped;
  assign appr_match   = (appr_state == APPR_READY) && (appr_addr == cur_addr);
  assign rsp_notify   = ss && lookup_response == RSP_NOTIFY && !notify_lock;
  assign rsp_approved = ss && lookup_response == RSP_APPROVE && appr_match;
  assign appr_request = ss && lookup_response == RSP_APPROVE && appr_state == APPR_FREE;
  assign rsp_retry    = ss && ((lookup_response == RSP_RETRY) ||
                               (lookup_response == RSP_NOTIFY && notify_lock) ||
                               (lookup_response == RSP_APPROVE && !appr_match));

  logic nes_space;
  assign nes_space = !(space == SPC_NONE || ss);
  assign aqs_slave   = nes_space || serviced || rsp_approved;
  assign aqs_capture = snooped && rsp_notify && cur_write;
  always_comb begin
    unique case (space)
      SPC_SRAM:     aqs_sram_en = 1'b1;
      SPC_QPTR,
      SPC_SHRX,
      SPC_CONFIG:   aqs_sram_en = cur_read;
      SPC_SHTX:     aqs_sram_en = cur_write;
      SPC_SERVICED: aqs_sram_en = cur_read || rsp_approved || rsp_notify;
      SPC_SNOOPED:  aqs_sram_en = rsp_approved || aqs_capture;
      default:      aqs_sram_en = 1'b0;
    endcase
  end

  // ------------------------------------------------------------ aSRAM address mux
  always_comb begin
    unique case (space)
      SPC_SRAM:   sram_addr = cur_addr[16] ? cur_addr[17:29] : word_addr(ASRAM_TMP);
      SPC_QPTR:   sram_addr = word_addr(QPTR_TMP + 12'(cur_addr[7:9]));
      SPC_SHTX:   sram_addr = slot_addr(tx_base[txq], tx_pptr[txq]);
      SPC_SHRX:   sram_addr = rx_addr;
      SPC_CONFIG: sram_addr = cfg_ep ? (nes[3:5] == 3'b101 ? word_addr(OVERFLOW_STATUS)
                                                          : word_addr(QPTR_TMP + 12'(nes[3:5])))
                                     : word_addr(QCONFIG_TMP);
      SPC_SERVICED,
      SPC_SNOOPED: begin
        if (rsp_approved)                  sram_addr = word_addr({appr_sram, 2'b00});
        else if (rsp_notify && cur_write)  sram_addr = slot_addr(tx_base[TX_MQDATA], tx_pptr[TX_MQDATA]);
        else                               sram_addr = word_addr(MISS_PATTERN);
      end
      default:    sram_addr = '0;
    endcase
  end

  // ------------------------------------------------------------ requests
  logic need_ac, need_cmp;
  ctrl_req_t ac_new;
  logic      ac_new_after;
  always_comb begin
    need_ac      = 1'b0;
    ac_new       = '{addr: '0, data: '0, op: OP_NOP};
    ac_new_after = 1'b0;
    if (space == SPC_QPTR && upd) begin
      need_ac = 1'b1;
      ac_new  = '{addr: nes[1:11], data: ndata, op: OP_WRITE};
    end else if (cfg && cfg_ctrl && (upd || (cur_read && !cfg_ep))) begin
      need_ac = 1'b1;
      ac_new  = '{addr: nes[1:11], data: ndata,
                  op: (upd && cur_read && !cfg_ep) ? OP_RW : (upd ? OP_WRITE : OP_READ)};
    end else if (tx_space && tx_whole) begin
      need_ac      = 1'b1;
      ac_new_after = 1'b1;
      ac_new       = '{addr: {2'b01, 2'b01, txq[1], 1'b0, txq[0], 3'b000, 1'b0},
                       data: nes_data_t'(ptr_next(tx_pptr[txq], tx_bound[txq])), op: OP_WRITE};
    end else if (rx_take) begin
      need_ac = 1'b1;
      ac_new  = '{addr: {2'b01, 2'b01, rxq[1], 1'b1, rxq[0], 3'b000, 1'b0},
                  data: nes_data_t'(ptr_next(rx_cptr[rxq], rx_bound[rxq])), op: OP_WRITE};
    end
  end

  logic cfg_rd_biu;
  assign cfg_rd_biu = cfg && cur_read && nes[0];
  assign need_cmp   = (tx_space && tx_c32_go) || cfg_rd_biu || rsp_notify || appr_request;

  ctrl_req_t ac_q;
  logic      ac_v, ac_wait, ac_rd_wait;
  assign ac = (ac_v && !ac_wait) ? ac_q : '{addr: '0, data: '0, op: OP_NOP};

  logic lock_retry, cls_retry;
  assign lock_retry = ap_bus_lock;
  assign cls_retry  = snooped && cls_update;
  assign aqs_retry  = addr_active && (lock_retry || cls_retry || rsp_retry ||
                                      (need_ac && ac_v) || (need_cmp && !cmp_avail));

  // MemQIn message of a notification or approval request
  logic [0:63] mq_msg;
  assign mq_msg = {cur_addr, appr_request, 26'b0, cur_tt};

  logic take_appr, take_notify;
  assign take_appr   = addr_active && appr_request && cmp_avail && !lock_retry && !cls_retry;
  assign take_notify = addr_confirm && rsp_notify;

  always_comb begin
    cmp_req  = 1'b0;
    cmp_addr = '0;
    cmp_data = '0;
    cmp_kind = 2'd0;
    if (take_appr || take_notify) begin
      cmp_req  = 1'b1;
      cmp_addr = memqin_addr;
      cmp_data = mq_msg;
      cmp_kind = cur_write ? 2'd2 : 2'd1;
    end else if (addr_confirm && tx_space && tx_c32_go) begin
      cmp_req  = 1'b1;
      cmp_addr = slot_addr(tx_base[txq], tx_pptr[txq]);
      cmp_data = {cur_addr, 32'b0};
    end else if (addr_confirm && cfg_rd_biu) begin
      cmp_req  = 1'b1;
      cmp_addr = word_addr(QCONFIG_TMP);
      cmp_data = 64'(cfg_abiu ? state_read(nes) : as_rdata);
    end
  end

  // MemQIn PPtr advances on every MemQIn compose; the sBIU copy follows over the ASBus
  logic mq_inc;
  ptr_t mq_next;
  assign mq_inc  = take_appr || take_notify || memqin_alloc;
  assign mq_next = ptr_next(tx_pptr[TX_MEMQIN], tx_bound[TX_MEMQIN]);
  always_comb begin
    as_req = '{addr: '0, wdata: '0, op: OP_NOP};
    if (addr_confirm && cfg && cfg_sbiu && (cur_read || upd)) begin
      as_req = '{addr: nes[2:11], wdata: ndata,
                 op: (cur_read && upd) ? OP_RW : (upd ? OP_WRITE : OP_READ)};
    end else if (mq_inc) begin
      // sBIU MemQIn producer pointer: Comm Group 100, Rx, low, PPtr
      as_req = '{addr: {1'b1, 3'b100, 1'b1, 1'b0, 3'b001, 1'b0},
                 wdata: nes_data_t'(mq_next), op: OP_WRITE};
    end
  end

  logic cmp_rd_wait;
  assign aqs_wait = ac_rd_wait || cmp_rd_wait;

  // ------------------------------------------------------------ sequential
  logic      own_v;
  nes_addr_t own_a;
  nes_data_t own_d;
  logic      wr_en;
  nes_addr_t wr_a;
  nes_data_t wr_d;
  always_comb begin
    wr_en = 1'b0; wr_a = own_a; wr_d = own_d;
    if (sa_req.op == OP_WRITE || sa_req.op == OP_RW) begin
      wr_en = 1'b1; wr_a = biu_nes(sa_req.addr); wr_d = sa_req.wdata;
    end else if (own_v) begin
      wr_en = 1'b1;
    end
  end
  int wr_row;
  assign wr_row = row_of(wr_a[7:11]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NRX; i++) begin
        rx_cptr[i] <= '0; rx_pptr[i] <= '0; rx_base[i] <= base_t'(16 + i); rx_bound[i] <= '1; rx_lack[i] <= 1'b0;
      end
      for (int i = 0; i < NTX; i++) begin
        tx_pptr[i] <= '0; tx_base[i] <= base_t'(16 + NRX + i); tx_bound[i] <= '1; tx_c32[i] <= 1'b0;
      end
      onepoll_f <= 1'b0; onepoll_addr <= '0;
      for (int i = 0; i < NROW; i++) ssresp[i] <= RSP_IGNORE;
      for (int i = 0; i < 8*NROW; i++) hal[i] <= RSP_IGNORE;
      appr_state <= APPR_FREE; appr_addr <= '0; appr_sram <= '0;
      ap_bus_lock <= 1'b0; notify_lock <= 1'b0;
      own_v <= 1'b0; own_a <= '0; own_d <= '0;
      ac_q <= '{addr: '0, data: '0, op: OP_NOP}; ac_v <= 1'b0; ac_wait <= 1'b0; ac_rd_wait <= 1'b0;
      cmp_rd_wait <= 1'b0; rx_late_ack <= 1'b0;
    end else begin
      rx_late_ack <= 1'b0;

      if (ac_v && !ac_wait && ac_free) ac_v <= 1'b0;
      if (data_done) ac_wait <= 1'b0;
      if (ac_done) ac_rd_wait <= 1'b0;
      if (cmp_done) cmp_rd_wait <= 1'b0;
      if (own_v && !(sa_req.op == OP_WRITE || sa_req.op == OP_RW)) own_v <= 1'b0;

      if (mq_inc) tx_pptr[TX_MEMQIN] <= mq_next;

      // approval request on a transfer that is being retried
      if (take_appr) begin
        appr_state <= APPR_PENDING;
        appr_addr  <= cur_addr;
      end

      if (addr_confirm) begin
        if (need_ac) begin
          ac_q <= ac_new; ac_v <= 1'b1; ac_wait <= ac_new_after;
          if (ac_new.op == OP_READ || ac_new.op == OP_RW) ac_rd_wait <= 1'b1;
        end
        if (cfg_rd_biu) cmp_rd_wait <= 1'b1;
        if (cfg && cfg_abiu && upd) begin
          own_v <= 1'b1; own_a <= nes; own_d <= ndata;
        end
        if (tx_space && tx_whole) tx_pptr[txq] <= ptr_next(tx_pptr[txq], tx_bound[txq]);
        if (rx_space && cur_size == 2'd0) begin
          onepoll_f <= !onepoll_f;
          if (!onepoll_f) onepoll_addr <= rx_addr;
        end
        if (rx_take) begin
          rx_cptr[rxq] <= ptr_next(rx_cptr[rxq], rx_bound[rxq]);
          if (rx_lack[rxq]) rx_late_ack <= 1'b1;
        end
        if (rsp_notify && cur_write)
          tx_pptr[TX_MQDATA] <= ptr_next(tx_pptr[TX_MQDATA], tx_bound[TX_MQDATA]);
        if (rsp_approved) appr_state <= APPR_FREE;
        if (space == SPC_IMM && cur_addr[15:17] == IMM_CLR_APPR) appr_state <= APPR_FREE;
        if (space == SPC_IMM && cur_addr[15:17] == IMM_CLR_DMAQ) rx_cptr[RX_DMAQ] <= '0;
      end

      // aBM: DMARxDataQ consumption and approval commands
      if (dmaq_inc) rx_cptr[RX_DMAQ] <= ptr_next(rx_cptr[RX_DMAQ], rx_bound[RX_DMAQ]);
      if (appr_update) begin
        unique case (appr_cmd)
          AC_READY:         begin appr_state <= APPR_READY; appr_sram <= appr_sram_new; end
          AC_LOCKED:        appr_state <= APPR_LOCKED;
          AC_RESET_DMAQ:    rx_cptr[RX_DMAQ] <= '0;
          AC_FREE:          appr_state <= APPR_FREE;
          AC_NOP:           ;
          AC_LOCK_NOTIFY:   notify_lock <= 1'b1;
          AC_TOGGLE_LOCK:   ap_bus_lock <= !ap_bus_lock;
          AC_UNLOCK_NOTIFY: notify_lock <= 1'b0;
          default: ;
        endcase
      end
      if (reset_dma) rx_cptr[RX_DMAQ] <= '0;
      if (clear_approval) appr_state <= APPR_FREE;

      // BIU-path state write (SABus first, else the buffered own update)
      if (wr_en) begin
        if (wr_a[0] && wr_a[1:2] == 2'b01) begin
          if (wr_a[6] && rx_index(wr_a) >= 0) begin
            case (wr_a[8:10])
              3'b000: rx_cptr[rx_index(wr_a)] <= ptr_t'(wr_d);
              3'b001: rx_pptr[rx_index(wr_a)] <= ptr_t'(wr_d);
              3'b010: rx_base[rx_index(wr_a)][8:2] <= wr_d;
              3'b011: {rx_base[rx_index(wr_a)][1:0], rx_bound[rx_index(wr_a)]} <= wr_d;
              3'b100: rx_lack[rx_index(wr_a)] <= wr_d[6];
              default: ;
            endcase
          end else if (!wr_a[6] && tx_index(wr_a) >= 0) begin
            case (wr_a[8:10])
              3'b000: tx_pptr[tx_index(wr_a)] <= ptr_t'(wr_d);
              3'b010: tx_base[tx_index(wr_a)][8:2] <= wr_d;
              3'b011: {tx_base[tx_index(wr_a)][1:0], tx_bound[tx_index(wr_a)]} <= wr_d;
              3'b100: tx_c32[tx_index(wr_a)] <= wr_d[6];
              default: ;
            endcase
          end
        end else if (wr_a[0:3] == 4'b1100 && wr_a[4:7] == 4'b1000) begin
          case (wr_a[8:11])
            4'd0: {onepoll_f, onepoll_addr[0:5]} <= wr_d;
            4'd1: onepoll_addr[6:12] <= wr_d;
            4'd2: {ap_bus_lock, notify_lock} <= wr_d[5:6];
            default: ;
          endcase
        end else if (wr_a[0:3] == 4'b1100 && wr_a[4:6] == 3'b101) begin
          if (wr_row >= 0) ssresp[wr_row] <= response_t'(wr_d[5:6]);
        end else if (wr_a[0:3] == 4'b1101) begin
          if (wr_row >= 0) hal[int'(wr_a[4:6])*NROW + wr_row] <= response_t'(wr_d[5:6]);
        end
      end

      // Ctrl updates of the VasR-2/3 producer pointers (CABus), applied last
      if (ca_valid) rx_pptr[{1'b0, ca_addr}] <= ptr_t'(ca_data);
    end
  end

  a_ac_no_overrun: assert property (@(posedge clk) disable iff (rst)
                     addr_confirm && need_ac |-> !ac_v || (ac_free && !ac_wait));

endmodule
