// abm: aBIU Bus Master. Executes the commands NES Ctrl places in the
// NESBuffer: it masters aPBus transfers for the NES and performs the aBIU-local
// commands.
//
// NESBufferOp[0:63]; the command type is [14:16]:
//   100 NES-Mastered   aPBus transfer; [4:13] aSRAM address (cache-line
//                      index), [18:31] aPBus control, [32:61] aPBusAddress[0:29],
//                      [62:63] size (0: 4B, 1: 8B, 2: 32B burst)
//   001 DMARx-Mastered aPBus write with data from the DMARxDataQ slot at its
//                      CPtr; [11:13] DMA channel; DMAPending[channel] counts down
//                      and a special acknowledgment is sent when it reaches 0
//   000 DMA Receive    [11:13] channel, DMAPending[channel] := [48:63]
//   101 Misc           [18] clSRAM update (one clFIFO entry written into the
//                      clSRAM), [47:49] ApprCommand with [50:59] the new
//                      ApprSRAMAddress, executed by aqs
// Common fields: [0] DMAIncrement advances the DMARxDataQ CPtr; [17] Ack
// composes the command itself, with bit [28] set, into MemQIn (a DMA channel
// reaching zero sets bit [1] as well).
// aPBus control field [18:31]: [18:22] TT, [23] TC0, [24] GBL, [25] CI,
// [26] WT, [27] SHD, [28] acknowledgment marker, [29:31] TSIZ.
//
// The state is AxDy (address sub-state x, data sub-state y):
//   address  Empty, Request (bus request until BG with ABB free), Active (TS
//            for one cycle, ABB until AACK), Confirm (ARTRY sampled: back to
//            Request on a retry), Pending (data tenure of this transfer), Hold
//            (Pending with the next command already latched)
//   data     Empty (wait for DBG), Active (DBB; one aSRAM word per TA),
//            Complete (acknowledgment, DMAPending, DMAIncrement, ApprCommand,
//            clSRAM update; waits for the compose to be accepted)
// The Hold -> Request path lets the next bus command request the bus as soon
// as the previous data tenure is complete. Non-bus commands go from Empty
// straight to data Complete. NESBufferFree is high while the command register
// can take a command; NESBufferDone pulses when a command completes.
// aPBus inputs are registered before use; the outputs are registered.
// Follows the description: command formats and field positions, the state
// names and sub-states, the DMAPending counters and special acknowledgment.
// This design's choices: the aPBus control field layout, the size encoding,
// one outstanding bus transfer, and the acknowledgment message contents.
module abm
  import nes_pkg::*;
#(
  parameter int NUM_DMA = 8,
  parameter int DMA_W   = 16
)(
  input  logic        clk,
  input  logic        rst,
  // NESBuffer
  input  logic [0:63] nesbuf_op,
  input  logic        nesbuf_valid,
  output logic        nesbuf_free,
  output logic        nesbuf_done,
  // aPBus master
  output logic        ap_breq,
  input  logic        ap_bg,
  input  logic        ap_abb_i,
  input  logic        ap_aack,
  input  logic        ap_artry,
  input  logic        ap_dbg,
  input  logic        ap_ta_i,
  output logic        ap_ts_o,
  output bus_addr_t   ap_addr_o,
  output logic [0:4]  ap_tt_o,
  output logic [0:2]  ap_tsiz_o,
  output logic        ap_tbst_o,
  output logic [0:4]  ap_attr_o,     // TC0, GBL, CI, WT, SHD
  output logic        ap_abb_o,
  output logic        ap_dbb_o,
  output logic        master_addr,
  output logic        master_data,
  // aSRAM aP port while mastering data
  output logic [0:11] asram_addr,
  output logic        asram_rd,
  output logic        asram_oe,
  output logic [1:0]  asram_ce,
  // aqs
  output logic        appr_update,
  output appr_cmd_t   appr_cmd,
  output logic [0:9]  appr_sram_new,
  output logic        cls_update,
  output logic        dmaq_inc,
  input  sram_addr_t  dmaq_addr,
  // clFIFO / clSRAM
  output logic        cls_sram_update,
  output logic        cls_sram_write,
  output logic        cls_sram_done,
  // MemQIn acknowledgment through aci
  output logic        cmp_req,
  output logic [0:63] cmp_data,
  input  logic        cmp_ack
);

  typedef enum logic [2:0] {A_E, A_R, A_A, A_C, A_P, A_H} astate_t;
  typedef enum logic [1:0] {D_E, D_A, D_C} dstate_t;
  localparam int CW = $clog2(NUM_DMA);

  astate_t ast;
  dstate_t dst;
  logic [0:63] cmd_a, cmd_d;
  logic        cmd_a_v, cmd_d_v;
  logic [DMA_W-1:0] dma_pend [NUM_DMA];

  // registered inputs
  logic bg_q, abb_q, aack_q, artry_q, dbg_q, ta_q;

  function automatic logic is_bus(input logic [0:63] c);
    return c[14:16] == 3'b100 || c[14:16] == 3'b001;
  endfunction
  function automatic logic has_data(input logic [0:63] c);
    return tt_is_read(c[18:22]) || tt_is_write(c[18:22]);
  endfunction

  logic [1:0]  beat;
  logic [1:0]  last_beat;
  assign last_beat = (cmd_d[62:63] == 2'd2) ? 2'd3 : 2'd0;

  logic        dc_first, dc_need_cmp, dc_zero;
  logic [CW-1:0] ch_d;
  assign ch_d = CW'(cmd_d[11:13]);

  logic data_complete;
  assign data_complete = (dst == D_C) && !dc_first && !(dc_need_cmp && !cmp_ack);

  assign nesbuf_free = !cmd_a_v;
  assign cmp_req     = (dst == D_C) && !dc_first && dc_need_cmp;
  assign cmp_data    = {cmd_d[0], dc_zero, cmd_d[2:27], 1'b1, cmd_d[29:63]};

  always_ff @(posedge clk) begin
    if (rst) begin
      bg_q <= 1'b0; abb_q <= 1'b0; aack_q <= 1'b0; artry_q <= 1'b0; dbg_q <= 1'b0; ta_q <= 1'b0;
    end else begin
      bg_q <= ap_bg; abb_q <= ap_abb_i; aack_q <= ap_aack; artry_q <= ap_artry;
      dbg_q <= ap_dbg; ta_q <= ap_ta_i;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ast <= A_E; dst <= D_E; cmd_a <= '0; cmd_d <= '0; cmd_a_v <= 1'b0; cmd_d_v <= 1'b0;
      beat <= '0; dc_first <= 1'b0; dc_need_cmp <= 1'b0; dc_zero <= 1'b0;
      for (int i = 0; i < NUM_DMA; i++) dma_pend[i] <= '0;
      appr_update <= 1'b0; appr_cmd <= AC_NOP; appr_sram_new <= '0;
      cls_update <= 1'b0; dmaq_inc <= 1'b0; nesbuf_done <= 1'b0;
      cls_sram_update <= 1'b0; cls_sram_write <= 1'b0; cls_sram_done <= 1'b0;
    end else begin
      appr_update <= 1'b0; dmaq_inc <= 1'b0; nesbuf_done <= 1'b0;
      cls_sram_update <= 1'b0; cls_sram_write <= 1'b0; cls_sram_done <= 1'b0;
      cls_update <= 1'b0;

      if (nesbuf_valid && !cmd_a_v) begin
        cmd_a <= nesbuf_op; cmd_a_v <= 1'b1;
      end

      // ---------------- address half
      unique case (ast)
        A_E: if (cmd_a_v && dst == D_E && !cmd_d_v) begin
          if (is_bus(cmd_a)) ast <= A_R;
          else begin
            cmd_d <= cmd_a; cmd_d_v <= 1'b1; cmd_a_v <= 1'b0;
            dst <= D_C; dc_first <= 1'b1;
          end
        end
        A_R: if (bg_q && !abb_q) ast <= A_A;
        A_A: if (aack_q) ast <= A_C;
        A_C: begin
          if (artry_q) ast <= A_R;
          else begin
            cmd_d <= cmd_a; cmd_d_v <= 1'b1; cmd_a_v <= 1'b0; beat <= '0;
            if (has_data(cmd_a)) begin
              ast <= A_P;
            end else begin
              ast <= A_P; dst <= D_C; dc_first <= 1'b1;
            end
          end
        end
        A_P: begin
          if (data_complete) ast <= A_E;
          else if (cmd_a_v) ast <= A_H;
        end
        A_H: if (data_complete) ast <= is_bus(cmd_a) ? A_R : A_E;
        default: ast <= A_E;
      endcase

      // ---------------- data half
      unique case (dst)
        D_E: if (cmd_d_v && ast == A_P && dbg_q) dst <= D_A;
        D_A: if (ta_q) begin
          beat <= beat + 2'd1;
          if (beat == last_beat) begin dst <= D_C; dc_first <= 1'b1; end
        end
        D_C: begin
          if (dc_first) begin
            // command effects, once
            dc_first    <= 1'b0;
            dc_zero     <= 1'b0;
            dc_need_cmp <= cmd_d[17];
            if (cmd_d[0]) dmaq_inc <= 1'b1;
            unique case (cmd_d[14:16])
              3'b001: begin
                dma_pend[ch_d] <= dma_pend[ch_d] - DMA_W'(1);
                if (dma_pend[ch_d] == DMA_W'(1)) begin dc_zero <= 1'b1; dc_need_cmp <= 1'b1; end
                if (!cmd_d[0]) dmaq_inc <= 1'b1;
              end
              3'b000: dma_pend[ch_d] <= cmd_d[48:63];
              3'b101: begin
                appr_update   <= 1'b1;
                appr_cmd      <= appr_cmd_t'(cmd_d[47:49]);
                appr_sram_new <= cmd_d[50:59];
                if (cmd_d[18]) begin
                  cls_update <= 1'b1; cls_sram_update <= 1'b1; cls_sram_write <= 1'b1;
                  cls_sram_done <= 1'b1;
                end
              end
              default: ;
            endcase
          end else if (!(dc_need_cmp && !cmp_ack)) begin
            dst <= D_E; cmd_d_v <= 1'b0; nesbuf_done <= 1'b1; dc_need_cmp <= 1'b0;
          end
        end
        default: dst <= D_E;
      endcase
    end
  end

  // ------------------------------------------------------------ registered outputs
  logic wr_tx;   // bus write: data out of the aSRAM
  assign wr_tx = tt_is_write(cmd_d[18:22]);
  sram_addr_t src;
  assign src = (cmd_d[14:16] == 3'b001) ? dmaq_addr : word_addr({cmd_d[4:13], 2'b00});

  always_ff @(posedge clk) begin
    if (rst) begin
      ap_breq <= 1'b0; ap_ts_o <= 1'b0; ap_addr_o <= '0; ap_tt_o <= '0; ap_tsiz_o <= '0;
      ap_tbst_o <= 1'b0; ap_attr_o <= '0; ap_abb_o <= 1'b0; ap_dbb_o <= 1'b0;
      master_addr <= 1'b0; master_data <= 1'b0;
      asram_addr <= '0; asram_rd <= 1'b1; asram_oe <= 1'b0; asram_ce <= '0;
    end else begin
      ap_breq     <= (ast == A_R) && !(bg_q && !abb_q);
      ap_ts_o     <= (ast == A_R) && bg_q && !abb_q;
      ap_abb_o    <= (ast == A_R && bg_q && !abb_q) || (ast == A_A && !aack_q);
      master_addr <= (ast == A_R && bg_q && !abb_q) || ast == A_A || ast == A_C;
      if (ast == A_R) begin
        ap_addr_o <= {cmd_a[32:61], 2'b00};
        ap_tt_o   <= cmd_a[18:22];
        ap_attr_o <= cmd_a[23:27];
        ap_tsiz_o <= cmd_a[29:31];
        ap_tbst_o <= (cmd_a[62:63] == 2'd2);
      end
      ap_dbb_o    <= (dst == D_E && cmd_d_v && ast == A_P && dbg_q) || (dst == D_A && !(ta_q && beat == last_beat));
      master_data <= (dst == D_E && cmd_d_v && ast == A_P && dbg_q) || dst == D_A;
      asram_addr  <= {src[0:9], src[10:11] + beat + ((dst == D_A && ta_q) ? 2'd1 : 2'd0)};
      asram_rd    <= wr_tx;
      asram_oe    <= (dst == D_A || dst == D_E) && wr_tx && master_data;
      asram_ce    <= (dst == D_A) ? (src[12] ? 2'b10 : 2'b01) : 2'b00;
    end
  end

  // the data half only runs for the transfer whose address tenure completed
  a_data_after_addr: assert property (@(posedge clk) disable iff (rst)
                       (dst == D_A) |-> (ast == A_P || ast == A_H));

endmodule
