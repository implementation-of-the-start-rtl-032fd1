// sbi: sBIU Bus Interface. 60X bus slave on the sPBus and controller of the
// sSRAM's sP-side port.
//
// The sPBus is split-phase: an address tenure (TS ... AACK, then the ARTRY
// window) and a data tenure (DBB ... TA). The MPC105 memory controller on this
// bus never lets an address tenure complete while an earlier data tenure is
// still open, so the state machine is a product of a six-state address half
// and a four-state data half (AEDE ... AHDR):
//   address: Empty -> Active (decode, AACK) -> Release (ARTRY window, latch
//            the sSRAM address) -> Confirm (no retry: state changes may now
//            happen, Immediate Commands fire) -> Pending (data owed) / Empty;
//            a new TS seen while data is still owed goes to Hold and waits.
//   data:    Empty -> Setup (reads, or a write that must wait for the
//            address to be confirmed, a DataMotion or a state read) ->
//            Active (one beat, or four for a burst, TA per beat) -> Release.
// A data tenure starts on the rising edge of DBB. A retry in Release cancels
// the data half as well. An aSRAM access (SRAM
// Space, bit [16] set) goes through a temporary sSRAM location: a read waits in
// DataSetup for the DataMotion into it to finish; a write's DataMotion out of
// it is released by sci after the data tenure (data_done).
//
// Every sPBus input is registered before use and every sPBus/sSRAM output is
// registered, so a bus signal is seen one cycle late and driven one cycle after
// the state that produces it. Burst reads run critical word first, wrapping in
// the 4-word line; burst writes start at word zero of the line.
// Port timing: addr_active is high in AddressActive, addr_confirm for the one
// AddressConfirm cycle of an un-retried transfer, data_done for the
// DataRelease cycle.
// The state structure and the events of each state follow the bus-interface
// description; the active-high polarity of all pins, the 4B/8B/32B size
// decode and the retry path Release -> Empty are this design's choices.
module sbi
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // sPBus
  input  bus_addr_t   sp_addr,
  input  logic        sp_ts,
  input  logic [0:4]  sp_tt,
  input  logic [0:2]  sp_tsiz,
  input  logic        sp_tbst,
  input  logic        sp_dbb,
  input  logic        sp_hreset,
  input  logic        sp_sreset,
  output logic        sp_aack,
  output logic        sp_artry,
  output logic        sp_ta,
  output logic        sp_int,
  // sSRAM sP port
  output logic [0:11] ssram_addr,
  output logic        ssram_rd,      // 1 = read, 0 = write
  output logic        ssram_oe,
  output logic [1:0]  ssram_ce,
  // current transfer, to sqs and sci
  output bus_addr_t   cur_addr,
  output logic        cur_read,
  output logic        cur_write,
  output logic [1:0]  cur_size,      // 0: 4B, 1: 8B, 2: 32B burst
  output logic        addr_active,
  output logic        addr_confirm,
  output logic        data_done,
  output logic        dm_req,
  // from sqs / sci
  input  sram_addr_t  sram_addr,
  input  logic        sqs_retry,
  input  logic        sqs_wait,
  input  logic        dm_avail,
  input  logic        dm_done,
  // Immediate Commands and resets
  output logic        nes_reset,
  output logic        arctic_ack,
  output logic        clr_ctrl_dma,
  output logic        reset_dma,
  output logic        clear_approval,
  output logic        int_ap
);

  typedef enum logic [2:0] {A_E, A_A, A_R, A_C, A_P, A_H} astate_t;
  typedef enum logic [1:0] {D_E, D_S, D_A, D_R} dstate_t;

  astate_t ast;
  dstate_t dst;

  // registered bus inputs
  bus_addr_t  addr_q;
  logic       ts_q, tbst_q, dbb_q, dbb_qq, hreset_q, sreset_q;
  logic [0:4] tt_q;
  logic [0:2] tsiz_q;

  // held new transfer (seen during a pending data tenure)
  bus_addr_t  hold_addr;
  logic [0:4] hold_tt;
  logic [0:2] hold_tsiz;
  logic       hold_tbst;

  logic [0:4] cur_tt;
  logic [0:2] cur_tsiz;
  logic       cur_tbst;
  space_t     cur_space;
  logic       retry_q;       // retry decided in AddressActive
  logic       confirmed;     // address of the data tenure is confirmed
  logic       dm_wait;       // read waiting for DataMotion into sSRAM
  logic       dbb_seen;
  logic       sram_en;       // data tenure touches the sSRAM
  sram_addr_t dptr;          // latched sSRAM address
  logic [1:0] beat;

  function automatic logic serviced(input bus_addr_t a, input logic [0:4] tt);
    return decode_sp_space(a[0:6]) != SPC_NONE && (tt_is_read(tt) || tt_is_write(tt));
  endfunction

  assign cur_space = decode_sp_space(cur_addr[0:6]);
  assign cur_read  = tt_is_read(cur_tt);
  assign cur_write = tt_is_write(cur_tt);
  assign cur_size  = cur_tbst ? 2'd2 : (cur_tsiz == 3'b100 ? 2'd0 : 2'd1);

  logic is_asram;
  assign is_asram = (cur_space == SPC_SRAM) && cur_addr[16];

  logic new_ts;
  assign new_ts = ts_q && serviced(addr_q, tt_q);

  logic last_beat;
  assign last_beat = !cur_tbst || (beat == 2'd3);

  logic dbb_rise;
  assign dbb_rise = dbb_q && !dbb_qq;

  logic data_start;
  assign data_start = (dst == D_E) && (dbb_rise || dbb_seen) &&
                      (ast == A_R || ast == A_C || ast == A_P) && !(ast == A_R && retry_q);

  logic data_go;     // DataSetup may advance
  assign data_go = confirmed && !dm_wait && !sqs_wait;

  logic data_fin;
  assign data_fin = (dst == D_R);

  assign addr_active  = (ast == A_A);
  assign addr_confirm = (ast == A_C);
  assign data_done    = data_fin;
  assign dm_req       = (ast == A_C) && is_asram;

  always_ff @(posedge clk) begin
    if (rst) begin
      ts_q <= 1'b0; tbst_q <= 1'b0; dbb_q <= 1'b0; dbb_qq <= 1'b0; hreset_q <= 1'b0; sreset_q <= 1'b0;
      addr_q <= '0; tt_q <= '0; tsiz_q <= '0;
    end else begin
      ts_q <= sp_ts; tbst_q <= sp_tbst; dbb_q <= sp_dbb; dbb_qq <= dbb_q;
      hreset_q <= sp_hreset; sreset_q <= sp_sreset;
      addr_q <= sp_addr; tt_q <= sp_tt; tsiz_q <= sp_tsiz;
    end
  end

  // ------------------------------------------------------------ FSM
  always_ff @(posedge clk) begin
    if (rst) begin
      ast <= A_E; dst <= D_E;
      cur_addr <= '0; cur_tt <= '0; cur_tsiz <= '0; cur_tbst <= 1'b0;
      hold_addr <= '0; hold_tt <= '0; hold_tsiz <= '0; hold_tbst <= 1'b0;
      retry_q <= 1'b0; confirmed <= 1'b0; dm_wait <= 1'b0; dbb_seen <= 1'b0;
      sram_en <= 1'b0; dptr <= '0; beat <= '0;
    end else begin
      // ---------------- address half
      unique case (ast)
        A_E: if (new_ts) begin
          cur_addr <= addr_q; cur_tt <= tt_q; cur_tsiz <= tsiz_q; cur_tbst <= tbst_q;
          ast <= A_A;
        end
        A_A: begin
          retry_q <= sqs_retry || (is_asram && !dm_avail);
          ast     <= A_R;
        end
        A_R: begin
          // sSRAM address and data-phase constraints are latched here
          dptr    <= cur_tbst ? (cur_write ? {sram_addr[0:9], 2'b00, sram_addr[12]} : sram_addr)
                              : sram_addr;
          sram_en <= !(cur_write && (cur_space inside {SPC_QPTR, SPC_CONFIG, SPC_SHRX})) &&
                     !(cur_space inside {SPC_CLS, SPC_IMM});
          dm_wait <= is_asram && cur_read;
          ast     <= retry_q ? A_E : A_C;
        end
        A_C: begin
          confirmed <= 1'b1;
          ast       <= A_P;
        end
        A_P: begin
          if (data_fin && new_ts) begin
            cur_addr <= addr_q; cur_tt <= tt_q; cur_tsiz <= tsiz_q; cur_tbst <= tbst_q;
            ast <= A_A;
          end else if (data_fin) begin
            ast <= A_E;
          end else if (new_ts) begin
            hold_addr <= addr_q; hold_tt <= tt_q; hold_tsiz <= tsiz_q; hold_tbst <= tbst_q;
            ast <= A_H;
          end
        end
        A_H: if (data_fin) begin
          cur_addr <= hold_addr; cur_tt <= hold_tt; cur_tsiz <= hold_tsiz; cur_tbst <= hold_tbst;
          ast <= A_A;
        end
        default: ast <= A_E;
      endcase

      if (dm_done) dm_wait <= 1'b0;

      // remember a data-bus-busy that arrived before the data half can start
      if (ast == A_A || ast == A_E) dbb_seen <= 1'b0;
      else if (dbb_rise && dst == D_E) dbb_seen <= 1'b1;

      // ---------------- data half
      unique case (dst)
        D_E: if (data_start) begin
          beat     <= '0;
          dbb_seen <= 1'b0;
          dst      <= (cur_read || ast != A_P || sqs_wait) ? D_S : D_A;
        end
        D_S: begin
          if (ast == A_R && retry_q) dst <= D_E;
          else if (data_go) dst <= D_A;
        end
        D_A: begin
          beat <= beat + 2'd1;
          dptr[10:11] <= dptr[10:11] + 2'd1;
          if (last_beat) dst <= D_R;
        end
        D_R: begin
          dst       <= D_E;
          confirmed <= 1'b0;
        end
        default: dst <= D_E;
      endcase
    end
  end

  // ------------------------------------------------------------ registered outputs
  always_ff @(posedge clk) begin
    if (rst) begin
      sp_aack <= 1'b0; sp_artry <= 1'b0; sp_ta <= 1'b0; sp_int <= 1'b0;
      ssram_addr <= '0; ssram_rd <= 1'b1; ssram_oe <= 1'b0; ssram_ce <= '0;
      nes_reset <= 1'b0; arctic_ack <= 1'b0; clr_ctrl_dma <= 1'b0;
      reset_dma <= 1'b0; clear_approval <= 1'b0; int_ap <= 1'b0;
    end else begin
      sp_aack  <= (ast == A_A);
      sp_artry <= (ast == A_R) && retry_q;
      sp_ta    <= (dst == D_A);
      ssram_addr <= dptr[0:11];
      ssram_rd   <= !cur_write;
      ssram_oe   <= sram_en && cur_read && (dst == D_S || dst == D_A);
      ssram_ce   <= (sram_en && (dst == D_A || (dst == D_S && cur_read)))
                    ? (dptr[12] ? 2'b10 : 2'b01) : 2'b00;
      // Immediate Commands fire in AddressConfirm
      nes_reset      <= hreset_q || sreset_q ||
                        (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_NES_RESET);
      arctic_ack     <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_ARCTIC_ACK);
      clr_ctrl_dma   <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_CLR_CTRLDMA);
      reset_dma      <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_CLR_DMAQ);
      clear_approval <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_CLR_APPR);
      int_ap         <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_INT_AP);
      sp_int         <= (ast == A_C && cur_space == SPC_IMM && cur_addr[15:17] == IMM_INT_SP);
    end
  end

  // a data beat is only given for a confirmed address tenure
  a_ta_needs_addr: assert property (@(posedge clk) disable iff (rst)
                     (dst == D_A) |-> (confirmed && (ast == A_P || ast == A_H)));

endmodule
