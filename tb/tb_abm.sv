// tb_abm: self-checking testbench of the aBIU bus master.
//
// NESBuffer commands with random addresses and data are issued; an
// arbiter/slave model grants the bus, acknowledges the address tenure (and
// retries it once on request), grants the data bus and gives one TA per beat.
// Checked: the address, transfer type and size driven for NES-Mastered and
// DMARx-Mastered commands, one or four beats, the repetition of a retried
// address tenure, the Ack message (the command with bit 28 set), DMAPending
// counting and the special acknowledgment at zero, DMAIncrement, ApprCommand
// relay, the clSRAM update strobes and NESBufferDone. Every mechanism must
// happen at least once.
module tb_abm;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  logic [0:63] NESBufferOp = '0;
  logic NESBufferValid = 0, NESBufferFree, NESBufferDone;
  logic aPBusRequest, aPBusGrant, aPBusAddressBusBusyIn, aPBusAddressAck, aPBusAddressRetryIn;
  logic aPBusDataBusGrant, aPBusTransferAckIn, aPBusTransferStartOut, aPBusTransferBurstOut;
  bus_addr_t aPBusAddressOut;
  logic [0:4] aPBusTransferTypeOut, attr;
  logic [0:2] aPBusTransferSizeOut;
  logic abb_o, dbb_o, master_addr, master_data;
  logic [0:11] asram_addr;
  logic asram_rd, asram_oe;
  logic [1:0] asram_ce;
  logic appr_update, cls_update, dmaq_inc, cls_sram_update, cls_sram_write, cls_sram_done;
  appr_cmd_t appr_cmd;
  logic [0:9] appr_sram_new;
  sram_addr_t dmaq_addr = 13'h0a80;
  logic cmp_req, cmp_ack;
  logic [0:63] cmp_data;
  assign cmp_ack = cmp_req;

  abm dut (
    .clk, .rst, .nesbuf_op(NESBufferOp), .nesbuf_valid(NESBufferValid), .nesbuf_free(NESBufferFree),
    .nesbuf_done(NESBufferDone), .ap_breq(aPBusRequest), .ap_bg(aPBusGrant), .ap_abb_i(aPBusAddressBusBusyIn),
    .ap_aack(aPBusAddressAck), .ap_artry(aPBusAddressRetryIn), .ap_dbg(aPBusDataBusGrant),
    .ap_ta_i(aPBusTransferAckIn), .ap_ts_o(aPBusTransferStartOut), .ap_addr_o(aPBusAddressOut),
    .ap_tt_o(aPBusTransferTypeOut), .ap_tsiz_o(aPBusTransferSizeOut), .ap_tbst_o(aPBusTransferBurstOut),
    .ap_attr_o(attr), .ap_abb_o(abb_o), .ap_dbb_o(dbb_o), .master_addr, .master_data,
    .asram_addr, .asram_rd, .asram_oe, .asram_ce,
    .appr_update, .appr_cmd, .appr_sram_new, .cls_update, .dmaq_inc, .dmaq_addr,
    .cls_sram_update, .cls_sram_write, .cls_sram_done, .cmp_req, .cmp_data, .cmp_ack
  );

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"nes_mastered", "burst", "bus_retry", "ack", "dma_receive", "dma_zero",
                            "dma_increment", "appr_cmd", "cls_update"};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  initial begin #500000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  function automatic logic is_data(input logic [0:4] tt);
    return tt_is_read(tt) || tt_is_write(tt);
  endfunction
  localparam logic [0:4] TT_READ = 5'b01010, TT_WRITE = 5'b00010;
  localparam logic [0:2] SZ8 = 3'b000, SZ32 = 3'b010;
  bus_addr_t ts_addr;
  logic [0:4] ts_tt;
  always @(posedge clk) if (aPBusTransferStartOut) begin ts_addr <= aPBusAddressOut; ts_tt <= aPBusTransferTypeOut; end
  int msgs = 0, incs = 0;
  logic [0:63] last_msg;
  always @(posedge clk) begin
    if (cmp_req) begin msgs++; last_msg <= cmp_data; end
    if (dmaq_inc) incs++;
  end
  // ------------------------------------------------------------ arbiter / slave for aBM transfers
  bit abm_retry_once = 0;
  int abm_ts_seen = 0, abm_ta_given = 0;
  initial begin
    aPBusGrant = 0; aPBusAddressAck = 0; aPBusAddressRetryIn = 0; aPBusTransferAckIn = 0;
    aPBusAddressBusBusyIn = 0;
    forever begin
      @(posedge clk) #1;
      aPBusGrant = aPBusRequest;
      if (aPBusTransferStartOut) begin
        int nb;
        bit retry_now;
        abm_ts_seen++;
        nb = aPBusTransferBurstOut ? 4 : 1;
        aPBusGrant = 0;
        @(posedge clk) #1; aPBusAddressAck = 1;
        @(posedge clk) #1; aPBusAddressAck = 0;
        retry_now = abm_retry_once; abm_retry_once = 0;
        aPBusAddressRetryIn = retry_now;
        @(posedge clk) #1; aPBusAddressRetryIn = 0;
        if (!retry_now && is_data(aPBusTransferTypeOut)) begin
          aPBusDataBusGrant = 1;
          @(posedge clk) #1; aPBusDataBusGrant = 0;
          repeat (3) @(posedge clk);
          #1;
          repeat (nb) begin
            aPBusTransferAckIn = 1; abm_ta_given++;
            @(posedge clk) #1;
          end
          aPBusTransferAckIn = 0;
        end
      end
    end
  end


  task automatic nes_cmd(input logic [0:63] op, output bit done);
    int n = 0;
    while (!NESBufferFree && n < 200) begin @(posedge clk) #1; n++; end
    NESBufferOp = op; NESBufferValid = 1;
    @(posedge clk) #1 NESBufferValid = 0;
    done = 0; n = 0;
    while (n < 300) begin @(posedge clk) #1; n++; if (NESBufferDone) begin done = 1; break; end end
  endtask

  bit done; int ts0, ta0, m0, i0;
  logic [0:63] op;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    for (int k = 0; k < 6; k++) begin
      op = '0; op[14:16] = 3'b100; op[4:13] = 10'($urandom); op[18:22] = (k % 2) ? TT_READ : TT_WRITE;
      op[29:31] = (k >= 4) ? SZ32 : SZ8; op[32:61] = 30'($urandom); op[62:63] = (k >= 4) ? 2'd2 : 2'd1;
      op[17] = (k == 2); op[0] = (k == 3);
      abm_retry_once = (k == 1);
      ts0 = abm_ts_seen; ta0 = abm_ta_given; m0 = msgs; i0 = incs;
      nes_cmd(op, done);
      repeat (2) @(posedge clk);
      check(done, "NES-Mastered command done");
      check(ts_addr == {op[32:61], 2'b00} && ts_tt == op[18:22], "address and type driven");
      check(abm_ta_given - ta0 == ((k >= 4) ? 4 : 1), "beats");
      if (done) saw("nes_mastered");
      if (k >= 4 && abm_ta_given - ta0 == 4) saw("burst");
      if (k == 1) begin check(abm_ts_seen - ts0 == 2, "retried address tenure repeated"); if (abm_ts_seen - ts0 == 2) saw("bus_retry"); end
      else check(abm_ts_seen - ts0 == 1, "one address tenure");
      if (k == 2) begin
        check(msgs == m0 + 1 && last_msg[28] && last_msg[0:27] == op[0:27] && last_msg[29:63] == op[29:63], "Ack message");
        if (msgs == m0 + 1) saw("ack");
      end else check(msgs == m0, "no message without Ack");
      if (k == 3) begin check(incs == i0 + 1, "DMAIncrement"); if (incs == i0 + 1) saw("dma_increment"); end
    end
    // DMA Receive: channel c, count 2; two DMARx-Mastered writes; special ack at zero
    op = '0; op[14:16] = 3'b000; op[11:13] = 3'($urandom); op[48:63] = 16'd2;
    nes_cmd(op, done); check(done, "DMA Receive done"); if (done) saw("dma_receive");
    op[14:16] = 3'b001; op[18:22] = TT_WRITE; op[29:31] = SZ8; op[62:63] = 2'd1; op[32:61] = 30'($urandom);
    op[48:63] = '0;
    m0 = msgs;
    nes_cmd(op, done); repeat (2) @(posedge clk);
    check(done && msgs == m0, "first DMARx write: no acknowledgment");
    nes_cmd(op, done); repeat (2) @(posedge clk);
    check(done && msgs == m0 + 1 && last_msg[1], "second DMARx write: special acknowledgment");
    if (msgs == m0 + 1) saw("dma_zero");
    // Misc: ApprCommand READY with an address; clSRAM update
    op = '0; op[14:16] = 3'b101; op[47:49] = AC_READY; op[50:59] = 10'($urandom); op[18] = 1;
    fork
      nes_cmd(op, done);
      begin
        int n = 0;
        while (!appr_update && n < 30) begin @(posedge clk) #1; n++; end
        check(appr_update && appr_cmd == AC_READY && appr_sram_new == op[50:59], "ApprCommand relayed");
        check(cls_update && cls_sram_update && cls_sram_write && cls_sram_done, "clSRAM update strobes");
        if (appr_update) saw("appr_cmd");
        if (cls_sram_update) saw("cls_update");
      end
    join
    check(done, "Misc command done");
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin failures++; $display("FAIL: mechanism %s never happened", mech_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
