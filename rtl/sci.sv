// sci: sBIU Ctrl Interface. Owns the JBus, the 32-bit path by which the sBIU
// asks NES Ctrl to move data between the aSRAM and the sSRAM (DataMotion) or to
// write a word into an SRAM (Compose).
//
// There is one buffer for each kind of request. A DataMotion request comes
// from sbi when an aSRAM access is confirmed; a Compose request comes from
// sqs. A request may be marked to wait for the end of the current data tenure
// (data_done): a DataMotion out of the temporary sSRAM location after an aSRAM
// write, or a MemQOut/clSRAM compose that must follow the data it describes.
// A ready buffer is put on the JBus and held there until Ctrl answers with
// DataMotionFree or ComposeFree; the buffer is then emptied. When both buffers
// are ready the kind that was not served last goes first. Because each buffer
// holds one request, dm_avail / cmp_avail tell the other submodules whether a
// new request would fit; they retry the bus transfer when it would not.
//
// JBus formats: DataMotion on JBusData is [1:13] aSRAM address, [16] direction
// (1 = into the aSRAM), [17:29] sSRAM address, [30:31] size (0: 4B, 1: 8B,
// 2: 32B). A compose places the SRAM address on JBusAddress and the data on
// JBusData with ShTxCompose high; MemQOut0/1Compose and MemQOutOp qualify a
// MemQOut compose. dm_done relays DataMotionDone; cmp_done is the cycle in which
// ComposeFree retires a compose. The buffer structure, the alternating priority
// and the DataMotion format follow the interface description; using
// ShTxCompose as the strobe of every compose is this design's choice.
module sci
  import nes_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // DataMotion request from sbi
  input  logic        dm_req,
  input  bus_addr_t   dm_bus_addr,
  input  logic        dm_write,       // bus write: sSRAM temp -> aSRAM, after the data tenure
  input  logic [1:0]  dm_size,
  input  sram_addr_t  dm_tmp_addr,
  input  logic        data_done,
  output logic        dm_avail,
  output logic        dm_done,
  // Compose request from sqs
  input  logic        cmp_req,
  input  sram_addr_t  cmp_addr,
  input  logic [31:0] cmp_data,
  input  logic        cmp_mq0,
  input  logic        cmp_mq1,
  input  logic [1:0]  cmp_mqop,
  input  logic        cmp_after_data,
  output logic        cmp_avail,
  output logic        cmp_done,
  // JBus
  output sram_addr_t  jbus_addr,
  output logic [0:31] jbus_data,
  output logic        shtx_compose,
  output logic        memqout0_compose,
  output logic        memqout1_compose,
  output logic [1:0]  mq_op,
  input  logic        compose_free,
  output logic        dm_valid,
  input  logic        dm_free,
  input  logic        dm_complete
);

  // DataMotion buffer
  logic        dmb_v, dmb_wait;
  logic [0:31] dmb_cmd;
  // Compose buffer
  logic        cb_v, cb_wait, cb_mq0, cb_mq1;
  sram_addr_t  cb_addr;
  logic [31:0] cb_data;
  logic [1:0]  cb_op;

  typedef enum logic [1:0] {SEL_NONE, SEL_DM, SEL_CMP} sel_t;
  sel_t sel;
  logic last_dm;   // the last request served was a DataMotion

  logic dm_ready, cb_ready;
  assign dm_ready = dmb_v && !dmb_wait;
  assign cb_ready = cb_v && !cb_wait;

  assign dm_avail  = !dmb_v;
  assign cmp_avail = !cb_v;
  assign dm_done   = dm_complete;
  assign cmp_done  = (sel == SEL_CMP) && compose_free;

  always_ff @(posedge clk) begin
    if (rst) begin
      dmb_v <= 1'b0; dmb_wait <= 1'b0; dmb_cmd <= '0;
      cb_v <= 1'b0; cb_wait <= 1'b0; cb_mq0 <= 1'b0; cb_mq1 <= 1'b0;
      cb_addr <= '0; cb_data <= '0; cb_op <= '0;
      sel <= SEL_NONE; last_dm <= 1'b0;
    end else begin
      if (data_done) begin
        dmb_wait <= 1'b0;
        cb_wait  <= 1'b0;
      end
      if (dm_req && !dmb_v) begin
        dmb_v    <= 1'b1;
        dmb_wait <= dm_write;
        dmb_cmd  <= {1'b0, dm_bus_addr[17:29], 2'b00, dm_write, dm_tmp_addr, dm_size};
      end
      if (cmp_req && !cb_v) begin
        cb_v    <= 1'b1;
        cb_wait <= cmp_after_data;
        cb_addr <= cmp_addr;
        cb_data <= cmp_data;
        cb_mq0  <= cmp_mq0;
        cb_mq1  <= cmp_mq1;
        cb_op   <= cmp_mqop;
      end
      unique case (sel)
        SEL_NONE: begin
          if (dm_ready && (!cb_ready || !last_dm)) sel <= SEL_DM;
          else if (cb_ready) sel <= SEL_CMP;
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
    jbus_addr        = '0;
    jbus_data        = '0;
    shtx_compose     = 1'b0;
    memqout0_compose = 1'b0;
    memqout1_compose = 1'b0;
    mq_op       = 2'b00;
    dm_valid         = 1'b0;
    if (sel == SEL_DM) begin
      jbus_data = dmb_cmd;
      dm_valid  = 1'b1;
    end else if (sel == SEL_CMP) begin
      jbus_addr        = cb_addr;
      jbus_data        = cb_data;
      shtx_compose     = 1'b1;
      memqout0_compose = cb_mq0;
      memqout1_compose = cb_mq1;
      mq_op       = cb_op;
    end
  end

  // a command stays on the JBus until Ctrl takes it
  a_dm_hold: assert property (@(posedge clk) disable iff (rst)
               dm_valid && !dm_free |=> dm_valid && $stable(jbus_data));
  a_one_cmd: assert property (@(posedge clk) disable iff (rst) !(dm_valid && shtx_compose));

endmodule
