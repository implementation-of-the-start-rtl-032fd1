// sqs: sBIU Queue/State. Turns the current sPBus transfer into an sSRAM
// address and into the state changes and requests it implies, and holds all
// sBIU-visible state.
//
// State: five short receive queues (VasR-0L, VasR-0H, VasR-1L, VasR-1H,
// MemQIn), each CPtr, PPtr, Base, Bound, LateAck; six short transmit queues
// (PasT-0L, PasT-0H, PasT-1L, PasT-1H, MemQOut0, MemQOut1), each PPtr, Base,
// Bound, 32bCompose; the system registers OnePoll? and OnePollAddress. Every
// item has a NESAddress ([0]=1 BIU, [1:2]=01 queue / 10 system register,
// [3:5] Comm Group, [6] Rx, [7] high priority, [8:10] register).
//
// Address generation runs for every space in parallel and a mux picks the
// result for the decoded space (sbi latches it in AddressRelease):
//   SRAM Space     the address in [17:29], or aSRAMTmp for an aSRAM access
//   QPtr Space     QPtrTmp + Comm Group; Update -> SCBus write
//   ShTx / Special ShTx   slot Base/PPtr of the queue; PPtr advances when the
//                  address is confirmed; for PasT queues the Ctrl PPtr is
//                  written over the SCBus after the data tenure; a 4-byte write
//                  to the odd word of a 32bCompose queue also composes the bus
//                  address into the even word over the JBus; MemQOut queues
//                  compose with MemQOut0/1Compose and MemQOutOp instead
//   ShRx Space     poll vector AND non-empty vector -> static priority
//                  encoder; a VasR/MemQIn hit reads slot Base/CPtr and advances
//                  CPtr (Ctrl copy over the SCBus, aBIU copy over the SABus),
//                  raising RxLateAck if LateAck is set; PcpR/Overflow hits read
//                  a static continuation address, no hit reads EmptyMsgAddress.
//                  A 4-byte read alternates through OnePoll?/OnePollAddress so
//                  that the second half of a message rereads the same slot.
//   clSRAM Update  CLSLatch, plus a clSRAM-update command composed into the
//                  selected MemQOut queue
//   Config Access  sBIU state is read into QConfigTmp over the JBus, aBIU state
//                  first over the SABus, Ctrl state by an SCBus read; the data
//                  tenure waits (sqs_wait) until that write is done. Updates go
//                  to sBIU state, the SABus or the SCBus.
// Conflicts (SCBus buffer or JBus compose buffer busy) raise sqs_retry while
// sbi is in AddressActive. Updates from the aBIU (ASBus) take priority over the
// sBIU's own; the own update is then held one cycle. Ctrl writes the VasR PPtrs
// over the CSBus and is applied last, so its value wins a same-cycle clash.
// Timing: sram_addr, sqs_retry and SABus/ASBus reads are combinational;
// everything else changes on the clock after addr_confirm or data_done.
// The behaviour per space follows the queue/state description; the static
// addresses, the slot arithmetic and the RxEmpty bit order are this design's.
module sqs
  import nes_pkg::*;
#(
  parameter logic [11:0] ASRAM_TMP       = 12'hFF0,
  parameter logic [11:0] QCONFIG_TMP     = 12'hFF1,
  parameter logic [11:0] OVERFLOW_STATUS = 12'hFF2,
  parameter logic [11:0] EMPTY_MSG_ADDR  = 12'hFF3,
  parameter logic [11:0] QPTR_TMP        = 12'hFE0,  // + Comm Group (8 words)
  parameter logic [11:0] CONT_BASE       = 12'hFE8   // + poll result index (10 words)
)(
  input  logic        clk,
  input  logic        rst,
  // current transfer from sbi
  input  bus_addr_t   cur_addr,
  input  logic        cur_read,
  input  logic        cur_write,
  input  logic [1:0]  cur_size,
  input  logic        addr_active,
  input  logic        addr_confirm,
  input  logic        data_done,
  output sram_addr_t  sram_addr,
  output logic        sqs_retry,
  output logic        sqs_wait,
  // compose requests to sci
  output logic        cmp_req,
  output sram_addr_t  cmp_addr,
  output logic [31:0] cmp_data,
  output logic        cmp_mq0,
  output logic        cmp_mq1,
  output logic [1:0]  cmp_mqop,
  output logic        cmp_after_data,
  input  logic        cmp_avail,
  input  logic        cmp_done,
  // SCBus (to Ctrl) and CSBus (from Ctrl)
  output ctrl_req_t   sc,
  input  logic        sc_free,
  input  logic        sc_done,
  input  logic [1:0]  cs_addr,
  input  nes_data_t   cs_data,
  input  logic        cs_valid,
  // SABus (to aBIU) and ASBus (from aBIU)
  output biu_req_t    sa,
  input  nes_data_t   sa_rdata,
  input  biu_req_t    as_req,
  output nes_data_t   as_rdata,
  // misc
  input  logic [0:4]  rx_empty,     // PcpR-0L, PcpR-0H, PcpR-1L, PcpR-1H, Overflow
  output logic        rx_late_ack,
  output logic        cls_latch
);

  localparam int NRX = 5;
  localparam int NTX = 6;
  localparam int RX_MEMQIN = 4;

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

  // ------------------------------------------------------------ state access
  // Queue index of a NESAddress, -1 if it names no sBIU queue.
  function automatic int rx_index(input nes_addr_t n);
    if (n[3:5] == 3'b000) return n[7] ? 1 : 0;
    if (n[3:5] == 3'b001) return n[7] ? 3 : 2;
    if (n[3:5] == 3'b100 && !n[7]) return RX_MEMQIN;
    return -1;
  endfunction
  function automatic int tx_index(input nes_addr_t n);
    if (n[3:5] == 3'b000) return n[7] ? 1 : 0;
    if (n[3:5] == 3'b001) return n[7] ? 3 : 2;
    if (n[3:5] == 3'b100) return n[7] ? 5 : 4;
    return -1;
  endfunction

  function automatic nes_data_t state_read(input nes_addr_t n);
    int q;
    nes_data_t d;
    d = '0;
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
    end else if (n[0:3] == 4'b1100 && n[5:7] == 3'b000) begin
      if (n[8:11] == 4'd0) d = {onepoll_f, onepoll_addr[0:5]};
      else if (n[8:11] == 4'd1) d = onepoll_addr[6:12];
    end
    return d;
  endfunction

  function automatic nes_addr_t biu_nes(input logic [0:9] a);
    return {1'b1, !a[0], a};
  endfunction

  assign as_rdata = state_read(biu_nes(as_req.addr));

  // ------------------------------------------------------------ decode
  space_t    space;
  nes_addr_t nes;
  nes_data_t ndata;
  logic      upd;
  assign space = decode_sp_space(cur_addr[0:6]);
  assign nes   = nes_addr_from_bus(cur_addr);
  assign ndata = cur_addr[19:25];
  assign upd   = cur_addr[26];

  // transmit queue of ShTx / Special ShTx
  logic tx_is_memqout;
  int   txq;
  always_comb begin
    tx_is_memqout = 1'b0;
    if (space == SPC_SPECIAL_SHTX) begin
      if (cur_addr[4]) begin
        tx_is_memqout = 1'b1;
        txq = cur_addr[28] ? 5 : 4;
      end else begin
        txq = (cur_addr[3] ? 2 : 0) + (cur_addr[28] ? 1 : 0);
      end
    end else begin
      txq = (cur_addr[7] ? 2 : 0) + (cur_addr[28] ? 1 : 0);
    end
  end
  logic tx_space, tx_whole, tx_c32_go;
  assign tx_space  = (space == SPC_SHTX || space == SPC_SPECIAL_SHTX) && cur_write;
  assign tx_whole  = (cur_size != 2'd0) || cur_addr[29];
  assign tx_c32_go = tx_c32[txq] && cur_size == 2'd0 && cur_addr[29];

  // ShRx poll: priority order VasR-0H, PcpR-0H, VasR-1H, MemQIn, Overflow,
  // PcpR-1H, VasR-0L, PcpR-0L, VasR-1L, PcpR-1L
  logic [9:0] poll, nonempty, hit;
  logic       hi, lo;
  assign hi = cur_addr[27];
  assign lo = cur_addr[28];
  assign poll = {cur_addr[18] & lo,   // 9 PcpR-1L
                 cur_addr[17] & lo,   // 8 VasR-1L
                 cur_addr[16] & lo,   // 7 PcpR-0L
                 cur_addr[15] & lo,   // 6 VasR-0L
                 cur_addr[18] & hi,   // 5 PcpR-1H
                 cur_addr[20],        // 4 Overflow
                 cur_addr[19],        // 3 MemQIn
                 cur_addr[17] & hi,   // 2 VasR-1H
                 cur_addr[16] & hi,   // 1 PcpR-0H
                 cur_addr[15] & hi};  // 0 VasR-0H
  assign nonempty = {!rx_empty[2], rx_cptr[2] != rx_pptr[2], !rx_empty[0], rx_cptr[0] != rx_pptr[0],
                     !rx_empty[3], !rx_empty[4], rx_cptr[4] != rx_pptr[4],
                     rx_cptr[3] != rx_pptr[3], !rx_empty[1], rx_cptr[1] != rx_pptr[1]};
  assign hit = poll & nonempty;

  int  sel;        // priority-encoded poll result, -1: none
  int  rxq;        // receive queue read, -1: static address
  always_comb begin
    sel = -1;
    for (int i = 9; i >= 0; i--) if (hit[i]) sel = i;
    case (sel)
      0: rxq = 1;
      2: rxq = 3;
      3: rxq = RX_MEMQIN;
      6: rxq = 0;
      8: rxq = 2;
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
  logic cfg, cfg_ctrl, cfg_ep, cfg_sbiu, cfg_abiu;
  assign cfg      = (space == SPC_CONFIG);
  assign cfg_ctrl = !nes[0];
  assign cfg_ep   = cfg_ctrl && nes[1:2] == 2'b00;
  assign cfg_sbiu = nes[0] && !nes_is_abiu(nes);
  assign cfg_abiu = nes[0] && nes_is_abiu(nes);

  // ------------------------------------------------------------ sSRAM address mux
  always_comb begin
    unique case (space)
      SPC_SRAM:   sram_addr = cur_addr[16] ? word_addr(ASRAM_TMP) : cur_addr[17:29];
      SPC_QPTR:   sram_addr = word_addr(QPTR_TMP + 12'(cur_addr[7:9]));
      SPC_SHTX,
      SPC_SPECIAL_SHTX: sram_addr = slot_addr(tx_base[txq], tx_pptr[txq]);
      SPC_SHRX:   sram_addr = rx_addr;
      SPC_CONFIG: sram_addr = cfg_ep ? (nes[3:5] == 3'b101 ? word_addr(OVERFLOW_STATUS)
                                                          : word_addr(QPTR_TMP + 12'(nes[3:5])))
                                     : word_addr(QCONFIG_TMP);
      default:    sram_addr = '0;
    endcase
  end

  // ------------------------------------------------------------ requests
  logic need_sc, need_cmp;
  ctrl_req_t sc_new;
  logic      sc_new_after;
  always_comb begin
    need_sc      = 1'b0;
    sc_new       = '{addr: '0, data: '0, op: OP_NOP};
    sc_new_after = 1'b0;
    if (space == SPC_QPTR && upd) begin
      need_sc = 1'b1;
      sc_new  = '{addr: nes[1:11], data: ndata, op: OP_WRITE};
    end else if (cfg && cfg_ctrl && (upd || (cur_read && !cfg_ep))) begin
      need_sc = 1'b1;
      sc_new  = '{addr: nes[1:11], data: ndata,
                  op: (upd && cur_read && !cfg_ep) ? OP_RW : (upd ? OP_WRITE : OP_READ)};
    end else if (tx_space && !tx_is_memqout && tx_whole) begin
      // Ctrl PasT PPtr, written once the message is in the sSRAM
      need_sc      = 1'b1;
      sc_new_after = 1'b1;
      sc_new       = '{addr: {2'b01, 2'b00, txq[1], 1'b0, txq[0], 3'b000, 1'b0},
                       data: nes_data_t'(ptr_next(tx_pptr[txq], tx_bound[txq])), op: OP_WRITE};
    end else if (rx_take && rxq != RX_MEMQIN) begin
      need_sc = 1'b1;
      sc_new  = '{addr: {2'b01, 2'b00, rxq[1], 1'b1, rxq[0], 3'b000, 1'b0},
                  data: nes_data_t'(ptr_next(rx_cptr[rxq], rx_bound[rxq])), op: OP_WRITE};
    end
  end

  logic cfg_rd_biu;
  assign cfg_rd_biu = cfg && cur_read && nes[0];
  assign need_cmp = (tx_space && (tx_c32_go || tx_is_memqout)) || space == SPC_CLS || cfg_rd_biu;

  // SCBus buffer
  ctrl_req_t sc_q;
  logic      sc_v, sc_wait, sc_rd_wait;
  assign sc = (sc_v && !sc_wait) ? sc_q : '{addr: '0, data: '0, op: OP_NOP};

  assign sqs_retry = addr_active && ((need_sc && sc_v) || (need_cmp && !cmp_avail));

  // compose request (issued with addr_confirm)
  logic [0:31] cls_cmd;
  assign cls_cmd = {14'b0, 3'b101, cur_addr[27], 1'b1, 13'b0};
  always_comb begin
    cmp_req        = 1'b0;
    cmp_addr       = '0;
    cmp_data       = '0;
    cmp_mq0        = 1'b0;
    cmp_mq1        = 1'b0;
    cmp_mqop       = 2'b00;
    cmp_after_data = 1'b0;
    if (addr_confirm) begin
      if (tx_space && tx_is_memqout) begin
        cmp_req        = 1'b1;
        cmp_addr       = slot_addr(tx_base[txq], tx_pptr[txq]);
        cmp_data       = cur_addr;
        cmp_mq0        = (txq == 4);
        cmp_mq1        = (txq == 5);
        cmp_mqop       = memqout_op({cur_addr[3], cur_addr[15:16]});
        cmp_after_data = 1'b1;
      end else if (tx_space && tx_c32_go) begin
        cmp_req  = 1'b1;
        cmp_addr = slot_addr(tx_base[txq], tx_pptr[txq]);
        cmp_data = cur_addr;
      end else if (space == SPC_CLS) begin
        cmp_req        = 1'b1;
        cmp_addr       = slot_addr(tx_base[cur_addr[28] ? 5 : 4], tx_pptr[cur_addr[28] ? 5 : 4]);
        cmp_data       = cls_cmd;
        cmp_mq0        = !cur_addr[28];
        cmp_mq1        = cur_addr[28];
        cmp_after_data = 1'b1;
      end else if (cfg_rd_biu) begin
        cmp_req  = 1'b1;
        cmp_addr = word_addr(QCONFIG_TMP);
        cmp_data = 32'(cfg_sbiu ? state_read(nes) : sa_rdata);
      end
    end
  end

  // SABus: aBIU state access at confirm
  always_comb begin
    sa = '{addr: '0, wdata: '0, op: OP_NOP};
    if (addr_confirm && cfg && cfg_abiu && (cur_read || upd)) begin
      sa = '{addr: nes[2:11], wdata: ndata,
             op: (cur_read && upd) ? OP_RW : (upd ? OP_WRITE : OP_READ)};
    end else if (addr_confirm && rx_take && rxq == RX_MEMQIN) begin
      // aBIU copy of the MemQIn consumer pointer (Comm Group 110, Rx, CPtr)
      sa = '{addr: {1'b1, 3'b110, 1'b1, 1'b0, 3'b000, 1'b0},
             wdata: nes_data_t'(ptr_next(rx_cptr[RX_MEMQIN], rx_bound[RX_MEMQIN])), op: OP_WRITE};
    end
  end

  // data tenure of a Config read waits for the state to reach QConfigTmp
  logic cmp_rd_wait;
  assign sqs_wait = sc_rd_wait || cmp_rd_wait;

  // ------------------------------------------------------------ sequential
  logic      own_v;
  nes_addr_t own_a;
  nes_data_t own_d;

  logic      wr_en;
  nes_addr_t wr_a;
  nes_data_t wr_d;
  always_comb begin
    wr_en = 1'b0; wr_a = own_a; wr_d = own_d;
    if (as_req.op == OP_WRITE || as_req.op == OP_RW) begin
      wr_en = 1'b1; wr_a = biu_nes(as_req.addr); wr_d = as_req.wdata;
    end else if (own_v) begin
      wr_en = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NRX; i++) begin
        rx_cptr[i] <= '0; rx_pptr[i] <= '0; rx_base[i] <= base_t'(i); rx_bound[i] <= '1; rx_lack[i] <= 1'b0;
      end
      for (int i = 0; i < NTX; i++) begin
        tx_pptr[i] <= '0; tx_base[i] <= base_t'(NRX + i); tx_bound[i] <= '1; tx_c32[i] <= 1'b0;
      end
      onepoll_f <= 1'b0; onepoll_addr <= '0;
      own_v <= 1'b0; own_a <= '0; own_d <= '0;
      sc_q <= '{addr: '0, data: '0, op: OP_NOP}; sc_v <= 1'b0; sc_wait <= 1'b0; sc_rd_wait <= 1'b0;
      cmp_rd_wait <= 1'b0;
      rx_late_ack <= 1'b0; cls_latch <= 1'b0;
    end else begin
      rx_late_ack <= 1'b0;
      cls_latch   <= 1'b0;

      // SCBus buffer
      if (sc_v && !sc_wait && sc_free) sc_v <= 1'b0;
      if (data_done) sc_wait <= 1'b0;
      if (sc_done) sc_rd_wait <= 1'b0;
      if (cmp_done) cmp_rd_wait <= 1'b0;

      // own update buffered behind an ASBus write
      if (own_v && !(as_req.op == OP_WRITE || as_req.op == OP_RW)) own_v <= 1'b0;

      if (addr_confirm) begin
        if (need_sc) begin
          sc_q <= sc_new; sc_v <= 1'b1; sc_wait <= sc_new_after;
          if (sc_new.op == OP_READ || sc_new.op == OP_RW) sc_rd_wait <= 1'b1;
        end
        if (cfg_rd_biu) cmp_rd_wait <= 1'b1;
        if (cfg && cfg_sbiu && upd) begin
          own_v <= 1'b1; own_a <= nes; own_d <= ndata;
        end
        if (tx_space && tx_whole)
          tx_pptr[txq] <= ptr_next(tx_pptr[txq], tx_bound[txq]);
        if (space == SPC_CLS) begin
          cls_latch <= 1'b1;
          tx_pptr[cur_addr[28] ? 5 : 4] <= ptr_next(tx_pptr[cur_addr[28] ? 5 : 4],
                                                   tx_bound[cur_addr[28] ? 5 : 4]);
        end
        if (rx_space && cur_size == 2'd0) begin
          onepoll_f <= !onepoll_f;
          if (!onepoll_f) onepoll_addr <= rx_addr;
        end
        if (rx_take) begin
          rx_cptr[rxq] <= ptr_next(rx_cptr[rxq], rx_bound[rxq]);
          if (rx_lack[rxq]) rx_late_ack <= 1'b1;
        end
      end

      // BIU-path state write (ASBus first, else the buffered own update)
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
        end else if (wr_a[0:3] == 4'b1100 && wr_a[5:7] == 3'b000) begin
          if (wr_a[8:11] == 4'd0) {onepoll_f, onepoll_addr[0:5]} <= wr_d;
          else if (wr_a[8:11] == 4'd1) onepoll_addr[6:12] <= wr_d;
        end
      end

      // Ctrl updates of the VasR producer pointers (CSBus), applied last
      if (cs_valid) rx_pptr[{1'b0, cs_addr}] <= ptr_t'(cs_data);
    end
  end

  // an SCBus request is never overwritten while it waits
  a_sc_no_overrun: assert property (@(posedge clk) disable iff (rst)
                     addr_confirm && need_sc |-> !sc_v || (sc_free && !sc_wait));

endmodule
