// aci: aBIU Ctrl Interface. Owns the KBus, the 64-bit path by which the aBIU
// asks NES Ctrl to move data between the sSRAM and the aSRAM (DataMotion) or to
// write a word into an SRAM (Compose).
//
// One DataMotion buffer and one Compose buffer. The DataMotion buffer takes
// abi's request when an aP access to the sSRAM is confirmed; for a bus write it
// waits for the end of the data tenure (data_done). The Compose buffer takes,
// in this order of priority,
//   aqs   32bCompose, Config reads into QConfigTmp, and MemQIn notification /
//         approval messages (MemQInComposeRead / MemQInComposeWrite)
//   aBM   MemQIn acknowledgments (aBMComposeReq; aBM data at the MemQIn PPtr)
//   Ctrl  MemQInCtrlReq: MemQInComposeCtrl with the MemQIn PPtr on KBusAddress
// aBM and Ctrl requests are taken only while abi has no address tenure in
// progress, so that a compose aqs has checked for is never lost; memqin_alloc
// tells aqs to advance the MemQIn PPtr for them. A ready buffer stays on the
// KBus until Ctrl answers DataMotionFree / ComposeFree; when both are ready the
// kind not served last goes first.
// KBus formats: DataMotion on KBusData[0:31]: [1:13] aSRAM address, [16]
// direction (1 = into the aSRAM), [17:29] sSRAM address, [30:31] size (0: 4B,
// 1: 8B, 2: 32B); [32:63] zero. A compose places the SRAM address on
// KBusAddress and the data on KBusData with one of ShTxCompose (plain and aBM
// composes), MemQInComposeRead, MemQInComposeWrite or MemQInComposeCtrl.
// The buffers, the strobes and the MemQInCtrlReq handshake follow the
// interface description; the priority order and the use of ShTxCompose for
// aBM messages are this design's choices.
module aci
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // DataMotion request from abi
  input  logic        dm_req,
  input  bus_addr_t   dm_bus_addr,
  input  logic        dm_write,
  input  logic [1:0]  dm_size,
  input  sram_addr_t  dm_tmp_addr,
  input  logic        data_done,
  input  logic        addr_busy,
  output logic        dm_avail,
  output logic        dm_done,
  // compose from aqs
  input  logic        cmp_req,
  input  sram_addr_t  cmp_addr,
  input  logic [0:63] cmp_data,
  input  logic [1:0]  cmp_kind,
  output logic        cmp_avail,
  output logic        cmp_done,
  input  sram_addr_t  memqin_addr,
  output logic        memqin_alloc,
  // compose from aBM
  input  logic        abm_cmp_req,
  input  logic [0:63] abm_cmp_data,
  output logic        abm_cmp_ack,
  // KBus
  output sram_addr_t  kbus_addr,
  output logic [0:63] kbus_data,
  output logic        shtx_compose,
  output logic        mq_compose_read,
  output logic        mq_compose_write,
  input  logic        mq_ctrl_req,
  output logic        mq_compose_ctrl,
  input  logic        compose_free,
  output logic        dm_valid,
  input  logic        dm_free,
  input  logic        dm_complete
);

  typedef enum logic [1:0] {K_PLAIN, K_MQREAD, K_MQWRITE, K_CTRL} kind_t;

  logic        dmb_v, dmb_wait;
  logic [0:31] dmb_cmd;
  logic        cb_v;
  kind_t       cb_kind;
  sram_addr_t  cb_addr;
  logic [0:63] cb_data;

  typedef enum logic [1:0] {SEL_NONE, SEL_DM, SEL_CMP} sel_t;
  sel_t sel;
  logic last_dm;

  logic dm_ready;
  assign dm_ready = dmb_v && !dmb_wait;

  assign dm_avail  = !dmb_v;
  assign cmp_avail = !cb_v;
  assign dm_done   = dm_complete;
  assign cmp_done  = (sel == SEL_CMP) && compose_free;

  logic take_abm, take_ctrl;
  assign take_abm     = !cb_v && !cmp_req && !addr_busy && abm_cmp_req;
  assign take_ctrl    = !cb_v && !cmp_req && !addr_busy && !abm_cmp_req && mq_ctrl_req;
  assign abm_cmp_ack  = take_abm;
  assign memqin_alloc = take_abm || take_ctrl;

  always_ff @(posedge clk) begin
    if (rst) begin
      dmb_v <= 1'b0; dmb_wait <= 1'b0; dmb_cmd <= '0;
      cb_v <= 1'b0; cb_kind <= K_PLAIN; cb_addr <= '0; cb_data <= '0;
      sel <= SEL_NONE; last_dm <= 1'b0;
    end else begin
      if (data_done) dmb_wait <= 1'b0;
      if (dm_req && !dmb_v) begin
        dmb_v    <= 1'b1;
        dmb_wait <= dm_write;
        dmb_cmd  <= {1'b0, dm_tmp_addr, 2'b00, !dm_write, dm_bus_addr[17:29], dm_size};
      end
      if (!cb_v) begin
        if (cmp_req) begin
          cb_v <= 1'b1; cb_kind <= kind_t'(cmp_kind); cb_addr <= cmp_addr; cb_data <= cmp_data;
        end else if (take_abm) begin
          cb_v <= 1'b1; cb_kind <= K_PLAIN; cb_addr <= memqin_addr; cb_data <= abm_cmp_data;
        end else if (take_ctrl) begin
          cb_v <= 1'b1; cb_kind <= K_CTRL; cb_addr <= memqin_addr; cb_data <= '0;
        end
      end
      unique case (sel)
        SEL_NONE: begin
          if (dm_ready && (!cb_v || !last_dm)) sel <= SEL_DM;
          else if (cb_v) sel <= SEL_CMP;
        end
        SEL_DM: if (dm_free) begin
          dmb_v <= 1'b0; sel <= SEL_NONE; last_dm <= 1'b1;
        end
        SEL_CMP: if (compose_free) begin
          cb_v <= 1'b0; sel <= SEL_NONE; last_dm <= 1'b0;
        end
        default: sel <= SEL_NONE;
      endcase
    end
  end

  always_comb begin
    kbus_addr        = '0;
    kbus_data        = '0;
    shtx_compose     = 1'b0;
    mq_compose_read  = 1'b0;
    mq_compose_write = 1'b0;
    mq_compose_ctrl  = 1'b0;
    dm_valid         = 1'b0;
    if (sel == SEL_DM) begin
      kbus_data = {dmb_cmd, 32'b0};
      dm_valid  = 1'b1;
    end else if (sel == SEL_CMP) begin
      kbus_addr        = cb_addr;
      kbus_data        = cb_data;
      shtx_compose     = (cb_kind == K_PLAIN);
      mq_compose_read  = (cb_kind == K_MQREAD);
      mq_compose_write = (cb_kind == K_MQWRITE);
      mq_compose_ctrl  = (cb_kind == K_CTRL);
    end
  end

  a_dm_hold: assert property (@(posedge clk) disable iff (rst)
               dm_valid && !dm_free |=> dm_valid && $stable(kbus_data));
  a_one_cmd: assert property (@(posedge clk) disable iff (rst)
               !(dm_valid && (shtx_compose || mq_compose_read || mq_compose_write || mq_compose_ctrl)));

endmodule
