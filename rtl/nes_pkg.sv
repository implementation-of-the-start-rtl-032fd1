// nes_pkg: types, constants and decode functions shared by the sP and aP bus
// interface units (sBIU, aBIU) of the NES Core.
//
// Bit numbering follows the PowerPC/60X convention used by all of the bus
// formats: bit 0 is the most significant bit. Vectors that carry such a
// format are therefore declared with ascending ranges, e.g. logic [0:31], so
// that a field written [17:28] in the format tables is addr[17:28] here.
//
// What is fixed by the bus formats: the address-space decode of bits [0:6]
// (sP and aP tables), the field positions of every space, the NESAddress
// layout, the Approval Register states and ApprCommand codes, the Immediate
// Command codes and the MemQOutOp mapping. This design's own choices: the
// numeric encodings of enums the formats leave open (state-bus operations,
// Serviced/Snooped responses, approval states), which 60X transfer types
// count as read-like and write-like, and the mapping of the 11 supported
// transfer types onto response-table rows.
package nes_pkg;

  // ---------------------------------------------------------------- widths
  localparam int BUS_AW   = 32;  // 60X address bus
  localparam int SRAM_AW  = 13;  // internal SRAM address: [0:11] 8-byte word, [12] chip select
  localparam int NES_AW   = 12;  // NESAddress
  localparam int NES_DW   = 7;   // NESData: every NESAddress holds up to 7 bits
  localparam int PTR_W    = 5;   // queue pointer (same width as Bound)
  localparam int BASE_W   = 9;   // queue Base (Base[0:6] and Base[7:8])
  localparam int BOUND_W  = 5;

  typedef logic [0:BUS_AW-1]  bus_addr_t;
  typedef logic [0:SRAM_AW-1] sram_addr_t;
  typedef logic [0:NES_AW-1]  nes_addr_t;
  typedef logic [0:NES_DW-1]  nes_data_t;
  typedef logic [PTR_W-1:0]   ptr_t;
  typedef logic [BASE_W-1:0]  base_t;
  typedef logic [BOUND_W-1:0] bound_t;

  // Operation code of the SCBus, ACBus, SABus and ASBus.
  typedef enum logic [1:0] {
    OP_NOP   = 2'b00,
    OP_READ  = 2'b01,
    OP_WRITE = 2'b10,
    OP_RW    = 2'b11
  } state_op_t;

  // BIU-to-BIU state access (SABus / ASBus): 10-bit address = NESAddress[2:11].
  typedef struct packed {
    logic [0:9] addr;
    nes_data_t  wdata;
    state_op_t  op;
  } biu_req_t;

  // BIU-to-Ctrl state access (SCBus / ACBus): 11-bit address = NESAddress[1:11].
  typedef struct packed {
    logic [0:10] addr;
    nes_data_t   data;
    state_op_t   op;
  } ctrl_req_t;

  // ---------------------------------------------------------- address spaces
  typedef enum logic [3:0] {
    SPC_NONE,
    SPC_SRAM,
    SPC_QPTR,
    SPC_SHTX,
    SPC_SHRX,
    SPC_SPECIAL_SHTX,
    SPC_CLS,
    SPC_IMM,
    SPC_CONFIG,
    SPC_SNOOPED,
    SPC_SERVICED
  } space_t;

  // sP address space, decoded from sPBusAddress[0:6].
  function automatic space_t decode_sp_space(input logic [0:6] a);
    casez (a)
      7'b010????: return SPC_SPECIAL_SHTX;
      7'b01100??: return SPC_SRAM;
      7'b011010?: return SPC_QPTR;
      7'b0110110: return SPC_SHTX;
      7'b0110111: return SPC_SHRX;
      7'b01110??: return SPC_CLS;
      7'b011110?: return SPC_IMM;
      7'b011111?: return SPC_CONFIG;
      default:    return SPC_NONE;
    endcase
  endfunction

  // aP address space, decoded from aPBusAddress[0:6].
  function automatic space_t decode_ap_space(input logic [0:6] a);
    casez (a)
      7'b000001?: return SPC_SNOOPED;
      7'b001????: return SPC_SERVICED;
      7'b010????: return SPC_SERVICED;
      7'b01100??: return SPC_SRAM;
      7'b011010?: return SPC_QPTR;
      7'b0110110: return SPC_SHTX;
      7'b0110111: return SPC_SHRX;
      7'b011110?: return SPC_IMM;
      7'b011111?: return SPC_CONFIG;
      default:    return SPC_NONE;
    endcase
  endfunction

  // ---------------------------------------------------------- transfer types
  // 60X TT[0:4]: TT[3]=1 with TT[4]=0 marks a transfer with a data tenure,
  // TT[1] then separates reads (1) from writes (0).
  function automatic logic tt_is_read(input logic [0:4] tt);
    return tt[1] && tt[3] && !tt[4];
  endfunction
  function automatic logic tt_is_write(input logic [0:4] tt);
    return !tt[1] && tt[3] && !tt[4];
  endfunction

  // The 11 transfer types the response tables cover, in table-row order:
  // clean, flush, sync, kill, eieio, write-with-flush, write-with-kill,
  // read, read-with-intent-to-modify, write-with-flush-atomic, read-atomic.
  localparam int NUM_TT = 11;
  function automatic logic [3:0] tt_row(input logic [0:4] tt);
    case (tt)
      5'b00000: return 4'd0;
      5'b00100: return 4'd1;
      5'b01000: return 4'd2;
      5'b01100: return 4'd3;
      5'b10000: return 4'd4;
      5'b00010: return 4'd5;
      5'b00110: return 4'd6;
      5'b01010: return 4'd7;
      5'b01110: return 4'd8;
      5'b10010: return 4'd9;
      5'b11010: return 4'd10;
      default:  return 4'd15;  // not covered: treated as IGNORE
    endcase
  endfunction

  // Serviced / Snooped Space response.
  typedef enum logic [1:0] {
    RSP_IGNORE  = 2'd0,
    RSP_NOTIFY  = 2'd1,
    RSP_APPROVE = 2'd2,
    RSP_RETRY   = 2'd3
  } response_t;

  // Approval Register state.
  typedef enum logic [1:0] {
    APPR_FREE    = 2'd0,
    APPR_PENDING = 2'd1,
    APPR_READY   = 2'd2,
    APPR_LOCKED  = 2'd3
  } appr_state_t;

  // ApprCommand, NESBufferOp[47:49].
  typedef enum logic [2:0] {
    AC_READY       = 3'b000,
    AC_LOCKED      = 3'b001,
    AC_RESET_DMAQ  = 3'b010,
    AC_FREE        = 3'b011,
    AC_NOP         = 3'b100,
    AC_LOCK_NOTIFY = 3'b101,
    AC_TOGGLE_LOCK = 3'b110,
    AC_UNLOCK_NOTIFY = 3'b111
  } appr_cmd_t;

  // Immediate Command, address bits [15:17].
  typedef enum logic [2:0] {
    IMM_NES_RESET   = 3'b000,
    IMM_UNUSED      = 3'b001,
    IMM_ARCTIC_ACK  = 3'b010,
    IMM_CLR_CTRLDMA = 3'b011,
    IMM_CLR_DMAQ    = 3'b100,
    IMM_CLR_APPR    = 3'b101,
    IMM_INT_AP      = 3'b110,
    IMM_INT_SP      = 3'b111
  } imm_cmd_t;

  // ------------------------------------------------------------- NESAddress
  // NESAddress as encoded in QPtr and Config Access Space addresses:
  // [0]=a[6], [1:2]=a[10:11], [3:5]=a[7:9], [6]=a[14], [7:8]=a[27:28],
  // [9:10]=a[15:16], [11]=a[17].
  function automatic nes_addr_t nes_addr_from_bus(input bus_addr_t a);
    nes_addr_t n;
    n[0]    = a[6];
    n[1:2]  = a[10:11];
    n[3:5]  = a[7:9];
    n[6]    = a[14];
    n[7:8]  = a[27:28];
    n[9:10] = a[15:16];
    n[11]   = a[17];
    return n;
  endfunction

  // BIU state that lives in the aBIU: NESAddress[4]=1, and the HALResponse
  // table ([1:3]=101).
  function automatic logic nes_is_abiu(input nes_addr_t n);
    return n[4] || (n[1:3] == 3'b101);
  endfunction

  // MemQOutOp from Special ShTx address bits [3,15:16].
  function automatic logic [1:0] memqout_op(input logic [0:2] f);
    case (f)
      3'b000:  return 2'b01;  // DMA Receive
      3'b001:  return 2'b01;  // NES-Mastered Op
      3'b010:  return 2'b10;  // DMA Read/Send
      3'b011:  return 2'b11;  // DataMotion Command
      default: return 2'b00;  // Message Launch
    endcase
  endfunction

  // SRAM address of 8-byte word w in chip 0.
  function automatic sram_addr_t word_addr(input logic [11:0] w);
    return {w, 1'b0};
  endfunction

  // Queue slot address: Base selects an 8-word-aligned region, the pointer
  // indexes 8-byte words from there (chip 0).
  function automatic sram_addr_t slot_addr(input base_t base, input ptr_t p);
    return word_addr({base, 3'b000} + 12'(p));
  endfunction

  // Circular pointer increment: zero instead of passing Bound.
  function automatic ptr_t ptr_next(input ptr_t p, input bound_t bound);
    return (p == ptr_t'(bound)) ? '0 : p + ptr_t'(1);
  endfunction

endpackage
