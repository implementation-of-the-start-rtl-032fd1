// tb_aqs: self-checking testbench of the aBIU queue/state unit.
//
// Drives the current-transfer interface directly (address, type, clSRAM
// state, then AddressActive, AddressConfirm and the end of the data tenure),
// writes the response tables over the SABus and issues ApprCommands as the
// bus master would. Checked: aSRAM addresses (SRAM Space, MissPattern,
// MemQDataIn slot, ApprSRAMAddress), the Serviced IGNORE / NOTIFY / APPROVE /
// RETRY actions with their MemQIn composes and the ASBus update of the sBIU
// MemQIn PPtr, the Approval Register sequence, NotifyLock, aPBusLock, the
// Snooped HALResponse lookup by clSRAM state, the retry during a clSRAM
// update, VasR polling after a CABus update and the OverflowStatus word of a
// Config read. Every mechanism must happen.
module tb_aqs;
  import nes_pkg::*;
  logic clk = 0, rst = 1;
  always #5 clk = !clk;
  bus_addr_t cur_addr = '0;
  logic [0:4] cur_tt = '0;
  logic [0:2] cur_cls = '0;
  logic [1:0] cur_size = 2'd1;
  logic cur_read = 0, cur_write = 0, addr_active = 0, addr_confirm = 0, data_done = 0;
  sram_addr_t sram_addr, cmp_addr, memqin_addr, dmaq_addr;
  logic aqs_retry, aqs_slave, aqs_capture, aqs_sram_en, aqs_wait;
  response_t lookup_response;
  logic cmp_req;
  logic [0:63] cmp_data;
  logic [1:0] cmp_kind;
  logic cmp_avail = 1, cmp_done = 0, memqin_alloc = 0;
  ctrl_req_t ac;
  logic ac_free = 1, ac_done = 0;
  logic [1:0] ca_addr = 0;
  nes_data_t ca_data = 0;
  logic ca_valid = 0;
  biu_req_t as_req, sa_req = '{addr: '0, wdata: '0, op: OP_NOP};
  nes_data_t as_rdata = 0, sa_rdata;
  logic appr_update = 0, cls_update = 0, dmaq_inc = 0, reset_dma = 0, clear_approval = 0;
  appr_cmd_t appr_cmd = AC_NOP;
  logic [0:9] appr_sram_new = '0;
  logic [0:3] rx_empty = '1;
  logic rx_late_ack, ap_bus_lock, notify_lock;
  appr_state_t appr_state;

  aqs dut (.*);

  int checks = 0, failures = 0;
  int mech [string];
  string mech_names [$] = '{"sram", "ignore_miss", "notify", "notify_lock", "approve_request",
    "approve_retry", "approve_complete", "rsp_retry", "bus_lock", "hal_lookup", "cls_retry", "shrx_vasr", "overflow"};
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (t=%0t)", what, $time); end
  endtask
  function automatic void saw(input string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  initial begin #100000; $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  localparam logic [0:4] TT_READ = 5'b01010, TT_WRITE = 5'b00010;
  sram_addr_t got;
  bit retried, slave, capt, creq_a, creq_c;
  logic [1:0] kind_c;
  biu_req_t as_c;
  task automatic xfer(input bus_addr_t a, input logic [0:4] tt, input logic [0:2] cls);
    @(posedge clk) #1;
    cur_addr = a; cur_tt = tt; cur_cls = cls; cur_read = tt_is_read(tt); cur_write = tt_is_write(tt);
    addr_active = 1;
    #1 retried = aqs_retry; slave = aqs_slave; capt = aqs_capture; creq_a = cmp_req;
    @(posedge clk) #1 addr_active = 0;
    #1 got = sram_addr;
    @(posedge clk) #1;
    creq_c = 0;
    if (retried) return;
    addr_confirm = 1;
    #1 creq_c = cmp_req; kind_c = cmp_kind; as_c = as_req;
    @(posedge clk) #1 addr_confirm = 0;
    @(posedge clk) #1 data_done = 1;
    @(posedge clk) #1 data_done = 0;
  endtask
  task automatic sa_write(input nes_addr_t n, input nes_data_t d);
    @(posedge clk) #1 sa_req = '{addr: n[2:11], wdata: d, op: OP_WRITE};
    @(posedge clk) #1 sa_req = '{addr: n[2:11], wdata: '0, op: OP_READ};
    #1 check(sa_rdata == d, "SABus table write reads back");
    @(posedge clk) #1 sa_req = '{addr: '0, wdata: '0, op: OP_NOP};
  endtask
  task automatic appr(input appr_cmd_t c, input logic [0:9] sa);
    @(posedge clk) #1 appr_update = 1; appr_cmd = c; appr_sram_new = sa;
    @(posedge clk) #1 appr_update = 0;
  endtask
  function automatic bus_addr_t serviced(input logic [0:19] off);
    bus_addr_t a = '0;
    a[0:6] = 7'b0010000; a[7:26] = off;
    return a;
  endfunction

  logic [0:12] w;
  bus_addr_t a, b;
  initial begin
    repeat (3) @(posedge clk); #1 rst = 0;
    // aSRAM direct
    w = 13'($urandom);
    a = '0; a[0:6] = 7'b0110000; a[16] = 1; a[17:29] = w;
    xfer(a, TT_READ, 0);
    check(got == w && slave && !retried, "SRAM Space aSRAM address");
    if (got == w) saw("sram");
    // Serviced IGNORE read: slave, MissPattern
    xfer(serviced(20'($urandom)), TT_READ, 0);
    check(!retried && slave && got == word_addr(12'hFF2), "IGNORE: completes at MissPattern");
    if (got == word_addr(12'hFF2)) saw("ignore_miss");
    // NOTIFY for writes
    sa_write({4'b1100, 3'b101, TT_WRITE}, 7'd1);
    xfer(serviced(20'($urandom)), TT_WRITE, 0);
    check(!retried && slave && got == word_addr(12'(8 * (16 + 6 + 5))), "NOTIFY write to the MemQDataIn slot");
    check(creq_c && kind_c == 2'd2, "MemQInComposeWrite requested");
    check(as_c.op == OP_WRITE && as_c.wdata == 7'd1, "sBIU MemQIn PPtr updated over the ASBus");
    if (creq_c && kind_c == 2'd2) saw("notify");
    appr(AC_LOCK_NOTIFY, '0);
    xfer(serviced(20'h1), TT_WRITE, 0);
    check(retried && notify_lock, "NOTIFY retried under NotifyLock");
    if (retried) saw("notify_lock");
    appr(AC_UNLOCK_NOTIFY, '0);
    // APPROVE for reads
    sa_write({4'b1100, 3'b101, TT_READ}, 7'd2);
    a = serviced(20'($urandom));
    xfer(a, TT_READ, 0);
    check(retried && creq_a && appr_state == APPR_PENDING, "APPROVE on FREE: retry, request, PENDING");
    if (retried && creq_a) saw("approve_request");
    xfer(a, TT_READ, 0);
    check(retried && !creq_a, "PENDING retries without a new request");
    appr(AC_READY, 10'h2AA);
    b = a; b[20] = !b[20];
    xfer(b, TT_READ, 0);
    check(retried, "READY with another address retries");
    if (retried) saw("approve_retry");
    xfer(a, TT_READ, 0);
    check(!retried && slave && got == word_addr({10'h2AA, 2'b00}) && appr_state == APPR_FREE,
          "READY with the same address completes at ApprSRAMAddress, register FREE");
    if (!retried) saw("approve_complete");
    // RETRY response
    sa_write({4'b1100, 3'b101, 5'b01110}, 7'd3);
    xfer(serviced(20'h5), 5'b01110, 0);
    check(retried && !creq_a, "RETRY response");
    if (retried) saw("rsp_retry");
    // aPBusLock
    appr(AC_TOGGLE_LOCK, '0);
    a = '0; a[0:6] = 7'b0110000; a[16] = 1;
    xfer(a, TT_READ, 0);
    check(retried && ap_bus_lock, "aPBusLock retries every transfer");
    if (retried) saw("bus_lock");
    appr(AC_TOGGLE_LOCK, '0);
    // Snooped: HALResponse[clSRAM state 5, read] = RETRY, others IGNORE
    sa_write({4'b1101, 3'b101, TT_READ}, 7'd3);
    a = '0; a[0:5] = 6'b000001; a[6:26] = 21'($urandom);
    xfer(a, TT_READ, 3'd5);
    check(retried, "HALResponse RETRY for clSRAM state 5");
    xfer(a, TT_READ, 3'd2);
    check(!retried && !slave && !capt, "HALResponse IGNORE for clSRAM state 2");
    if (!retried) saw("hal_lookup");
    cls_update = 1;
    xfer(a, TT_READ, 3'd2);
    check(retried, "Snooped transfer retried during a clSRAM update");
    if (retried) saw("cls_retry");
    cls_update = 0;
    // VasR-2H: Ctrl advances the PPtr over the CABus, the aP poll reads the slot
    @(posedge clk) #1 ca_valid = 1; ca_addr = 2'd1; ca_data = 7'd1;
    @(posedge clk) #1 ca_valid = 0;
    a = '0; a[0:6] = 7'b0110111; a[15] = 1; a[27] = 1;
    xfer(a, TT_READ, 0);
    check(got == word_addr(12'(8 * 17)), "VasR-2H poll reads its slot");
    if (got == word_addr(12'(8 * 17))) saw("shrx_vasr");
    // Config read of the Overflow group (Ctrl EPRAM, Comm Group 101): OverflowStatus word
    a = '0; a[0:5] = 6'b011111; a[7:9] = 3'b101;
    xfer(a, TT_READ, 0);
    check(!retried && got == word_addr(12'hFF4), "Overflow group reads OverflowStatus");
    if (got == word_addr(12'hFF4)) saw("overflow");
    foreach (mech_names[i]) begin
      checks++;
      if (!mech.exists(mech_names[i])) begin failures++; $display("FAIL: mechanism %s never happened", mech_names[i]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
