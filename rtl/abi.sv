// abi: aBIU Bus Interface. Slave and snooper on the aPBus, controller of the
// aP-side aSRAM port while the aBIU is not mastering the bus.
//
// The Union memory controller pipelines 60X address tenures, so this machine
// lets up to PIPE_DEPTH (3) transfers be outstanding: transfers whose address
// tenure is over but whose data tenure is not. Their registers form a circular
// queue. An address pointer x names the entry the address half works on, a
// data pointer y the entry the data half works on, and each half has its own
// sub-state, so the full state is AxDy with the address sub-state
// (Empty, Active, Release, Confirm) crossed with the data sub-state (Empty,
// Setup, Active, Release):
//   Active   decode; assert aPBusL2Hit to claim the transfer when the aBIU is
//            its slave; DataMotion and retry conditions are computed by aqs
//   Release  ARTRY window: retry on a resource conflict, a Serviced/Snooped
//            response, aPBusLock or a full pipeline; latch the aSRAM address
//   Confirm  tell aqs/aci the address stands; Immediate Commands fire;
//            entry x is queued for its data tenure and x advances
//   data     Setup waits for the confirm, a DataMotion (sSRAM read) or a
//            state write (Config read); Active gives one beat or four, with
//            TA only when the aBIU is the slave (a snooped capture writes the
//            aSRAM silently); Release retires entry y and advances y.
// A data tenure starts on the rising edge of DBB (or DBG) while the oldest
// queued entry waits for it. A full pipeline retries new transfers. The aBI
// ignores the bus while the aBM masters its address tenure, and hands the
// aSRAM to the aBM while the aBM masters its data tenure.
// Every aPBus input is registered before use and every output is registered.
// What follows the bus-interface description: the pipelined AxDy structure,
// the sub-states and their events, the depth of three. This design's choices:
// the automatic Active -> Release -> Confirm sequence (the Union's AACK is
// assumed one cycle after TS), retrying when full, active-high pins.
module abi
  import nes_pkg::*;
#(
  parameter int PIPE_DEPTH = 3
)(
  input  logic        clk,
  input  logic        rst,
  // aPBus (inputs as seen on the bus)
  input  bus_addr_t   ap_addr,
  input  logic        ap_ts,
  input  logic [0:4]  ap_tt,
  input  logic [0:2]  ap_tsiz,
  input  logic        ap_tbst,
  input  logic        ap_dbb,
  input  logic        ap_dbg,
  input  logic        ap_hreset,
  input  logic        ap_sreset,
  input  logic [0:2]  cls_data,
  output logic        ap_l2hit,
  output logic        ap_artry,
  output logic        ap_ta,
  output logic        ap_int,
  // aSRAM aP port
  output logic [0:11] asram_addr,
  output logic        asram_rd,
  output logic        asram_oe,
  output logic [1:0]  asram_ce,
  // current address tenure, to aqs / aci
  output bus_addr_t   cur_addr,
  output logic [0:4]  cur_tt,
  output logic [0:2]  cur_cls,
  output logic [1:0]  cur_size,
  output logic        cur_read,
  output logic        cur_write,
  output logic        addr_active,
  output logic        addr_confirm,
  output logic        addr_busy,
  output logic        data_done,
  output logic        dm_req,
  // from aqs / aci / abm
  input  sram_addr_t  sram_addr,
  input  logic        aqs_retry,
  input  logic        aqs_slave,     // aBIU is the slave of the transfer
  input  logic        aqs_capture,   // snooped write captured into the aSRAM
  input  logic        aqs_sram_en,   // data tenure reads or writes the aSRAM
  input  logic        aqs_wait,
  input  logic        dm_avail,
  input  logic        dm_done,
  input  logic        abm_master_addr,
  input  logic        abm_master_data,
  // Immediate Commands and resets
  output logic        nes_reset,
  output logic        arctic_ack,
  output logic        clr_ctrl_dma,
  output logic        int_sp
);

  typedef enum logic [1:0] {A_E, A_A, A_R, A_C} astate_t;
  typedef enum logic [1:0] {D_E, D_S, D_A, D_R} dstate_t;
  localparam int PW = $clog2(PIPE_DEPTH);

  typedef struct packed {
    logic       read;
    logic       burst;
    logic       slave;
    logic       sram_en;
    logic       dm_wait;
    sram_addr_t sram;
  } entry_t;

  entry_t          q [PIPE_DEPTH];
  logic [PW-1:0]   xp, yp;
  logic [PW:0]     count;       // entries waiting for / in their data tenure
  astate_t         ast;
  dstate_t         dst;

  // registered inputs
  bus_addr_t  addr_q;
  logic       ts_q, tbst_q, dbb_q, dbb_qq, dbg_q, hreset_q, sreset_q;
  logic [0:4] tt_q;
  logic [0:2] tsiz_q, cls_q;

  logic [0:2] cur_tsiz;
  logic       cur_tbst;
  logic       retry_q, has_data_q;
  logic [1:0] beat;
  sram_addr_t dptr;
  logic       dbb_seen;

  space_t cur_space;
  assign cur_space = decode_ap_space(cur_addr[0:6]);
  assign cur_read  = tt_is_read(cur_tt);
  assign cur_write = tt_is_write(cur_tt);
  assign cur_size  = cur_tbst ? 2'd2 : (cur_tsiz == 3'b100 ? 2'd0 : 2'd1);

  logic is_ssram;
  assign is_ssram = (cur_space == SPC_SRAM) && !cur_addr[16];

  logic full;
  assign full = (count == (PW+1)'(PIPE_DEPTH));

  assign addr_active  = (ast == A_A);
  assign addr_confirm = (ast == A_C);
  assign addr_busy    = (ast != A_E);
  assign dm_req       = (ast == A_C) && is_ssram && has_data_q;

  logic dbb_rise;
  assign dbb_rise = (dbb_q && !dbb_qq) || dbg_q;

  // data half: the oldest queued entry (y) runs once its tenure starts
  logic head_valid;
  assign head_valid = (count != '0);

  logic last_beat;
  assign last_beat = !q[yp].burst || beat == 2'd3;

  assign data_done = (dst == D_R);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr_q <= '0; ts_q <= 1'b0; tbst_q <= 1'b0; dbb_q <= 1'b0; dbb_qq <= 1'b0; dbg_q <= 1'b0;
      hreset_q <= 1'b0; sreset_q <= 1'b0; tt_q <= '0; tsiz_q <= '0; cls_q <= '0;
    end else begin
      addr_q <= ap_addr; ts_q <= ap_ts && !abm_master_addr; tbst_q <= ap_tbst;
      dbb_q <= ap_dbb; dbb_qq <= dbb_q; dbg_q <= ap_dbg && !abm_master_data;
      hreset_q <= ap_hreset; sreset_q <= ap_sreset;
      tt_q <= ap_tt; tsiz_q <= ap_tsiz; cls_q <= cls_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ast <= A_E; dst <= D_E; xp <= '0; yp <= '0; count <= '0;
      cur_addr <= '0; cur_tt <= '0; cur_tsiz <= '0; cur_tbst <= 1'b0; cur_cls <= '0;
      retry_q <= 1'b0; has_data_q <= 1'b0;
      beat <= '0; dptr <= '0; dbb_seen <= 1'b0;
      for (int i = 0; i < PIPE_DEPTH; i++) q[i] <= '0;
    end else begin
      // ---------------- address half (entry xp)
      unique case (ast)
        A_E: if (ts_q) begin
          cur_addr <= addr_q; cur_tt <= tt_q; cur_tsiz <= tsiz_q; cur_tbst <= tbst_q;
          ast <= A_A;
        end
        A_A: begin
          cur_cls    <= cls_q;
          has_data_q <= (cur_read || cur_write) && (aqs_slave || aqs_capture);
          retry_q    <= aqs_retry || full || (is_ssram && (cur_read || cur_write) && !dm_avail);
          ast        <= A_R;
        end
        A_R: begin
          // a retried transfer never touches the queue (entry xp may still be in use)
          if (!retry_q) begin
            q[xp].read    <= cur_read;
            q[xp].burst   <= cur_tbst;
            q[xp].slave   <= aqs_slave;
            q[xp].sram_en <= aqs_sram_en;
            q[xp].dm_wait <= is_ssram && cur_read;
            q[xp].sram    <= (cur_tbst && cur_write) ? {sram_addr[0:9], 2'b00, sram_addr[12]} : sram_addr;
          end
          ast <= retry_q ? A_E : A_C;
        end
        A_C: begin
          ast <= A_E;
          if (has_data_q) xp <= (xp == PW'(PIPE_DEPTH-1)) ? '0 : xp + PW'(1);
        end
        default: ast <= A_E;
      endcase

      // DataMotion into the temporary aSRAM location completes
      if (dm_done) for (int i = 0; i < PIPE_DEPTH; i++) q[i].dm_wait <= 1'b0;

      // ---------------- data half (entry yp)
      if (dbb_rise && dst == D_E && !(head_valid && !abm_master_data)) dbb_seen <= 1'b1;
      unique case (dst)
        D_E: if (head_valid && (dbb_rise || dbb_seen) && !abm_master_data) begin
          dbb_seen <= 1'b0;
          beat     <= '0;
          dptr     <= q[yp].sram;
          dst      <= (q[yp].read || q[yp].dm_wait || aqs_wait) ? D_S : D_A;
        end
        D_S: if (!q[yp].dm_wait && !aqs_wait) dst <= D_A;
        D_A: begin
          beat <= beat + 2'd1;
          dptr[10:11] <= dptr[10:11] + 2'd1;
          if (last_beat) dst <= D_R;
        end
        D_R: begin
          dst <= D_E;
          yp  <= (yp == PW'(PIPE_DEPTH-1)) ? '0 : yp + PW'(1);
        end
        default: dst <= D_E;
      endcase

      // outstanding count: +1 when a data-carrying address is confirmed, -1 at DataRelease
      count <= count + ((ast == A_C && has_data_q) ? (PW+1)'(1) : '0)
                     - ((dst == D_R) ? (PW+1)'(1) : '0);
    end
  end

  // ------------------------------------------------------------ registered outputs
  always_ff @(posedge clk) begin
    if (rst) begin
      ap_l2hit <= 1'b0; ap_artry <= 1'b0; ap_ta <= 1'b0; ap_int <= 1'b0;
      asram_addr <= '0; asram_rd <= 1'b1; asram_oe <= 1'b0; asram_ce <= '0;
      nes_reset <= 1'b0; arctic_ack <= 1'b0; clr_ctrl_dma <= 1'b0; int_sp <= 1'b0;
    end else begin
      ap_l2hit <= (ast == A_A) && aqs_slave;
      ap_artry <= (ast == A_R) && retry_q;
      ap_ta    <= (dst == D_A) && q[yp].slave;
      asram_addr <= dptr[0:11];
      asram_rd   <= q[yp].read;
      asram_oe   <= q[yp].sram_en && q[yp].read && (dst == D_S || dst == D_A);
      asram_ce   <= (q[yp].sram_en && (dst == D_A || (dst == D_S && q[yp].read)))
                    ? (dptr[12] ? 2'b10 : 2'b01) : 2'b00;
      nes_reset    <= hreset_q || sreset_q ||
                      (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_NES_RESET);
      arctic_ack   <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_ARCTIC_ACK);
      clr_ctrl_dma <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_CLR_CTRLDMA);
      ap_int       <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_INT_AP);
      int_sp       <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_INT_SP);
    end
  end

  // the pipeline never holds more than PIPE_DEPTH transfers
  a_depth: assert property (@(posedge clk) disable iff (rst) count <= (PW+1)'(PIPE_DEPTH));

endmodule
