// tb_apsi_system: end-to-end test of the whole FPGA side at its default
// parameters (64 probe bits, 1024-word analysers), driven from two models of
// the PC parallel port, the way a script running on the PC would drive it.
//
// Around the system: an OPB memory (64 KiB at 0, standing in for external
// SRAM, asking for occasional retries), a second OPB slave at 0x600000
// standing in for a UART, an arbiter that grants after 0..3 clocks, and a
// Wishbone memory on the Wishbone side. The second OPB analyser traces the
// system's own OPB (address, data and control signals packed as in
// apsi_pkg::opb_trace_t), as in a bus-debugging session.
//
// Scenarios:
//  1. block transfer: 400 bytes to addresses 1..400 and back, then compared
//  2. bus trace, clock enable on xferAck: only acknowledged OPB cycles kept
//  3. bus trace, clock enable on xferAck and the UART address range
//  4. a slowly changing signal (one change per 1000 clocks) captured with
//     run-length coding and a repeat limit of 16
//  5. memory full without compression; status read over the port
//  6. bus errors: errAck and a silent slave (timeout) seen in the status byte
//  7. Wishbone side: block transfer and an analyser capture
// Captured data are read back byte by byte over the port and decoded in the
// testbench. Every mechanism is counted and must occur at least once.
module tb_apsi_system;
  import apsi_pkg::*;
  localparam logic [31:0] LA0 = 32'h8000_0000, LA1 = 32'h8001_0000, WLA = 32'h8000_0000;
  localparam logic [31:0] UART = 32'h0060_0000;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------------------------------------------------------- system
  logic nwrite, ndstrb, nastrb, doe, wt;
  logic [7:0] hd, pd;
  logic wnwrite, wndstrb, wnastrb, wdoe, wwt;
  logic [7:0] whd, wpd;
  logic req, gnt;
  logic sel, rnw, xack;
  logic [31:0] abus, dbus;
  logic [3:0] be;
  logic [31:0] s0_dbus, s1_dbus;
  logic s0_ack, s0_err, s0_rty, s0_tsup, s1_ack, s1_err, s1_rty, s1_tsup;
  logic [63:0] probe0, probe1, probe2;
  la_state_e st0, st1, st2;
  logic wcyc, wstb, wwe, wack, werr;
  logic [31:0] wadr, wdo, wdi;
  logic [3:0] wsel;

  apsi_system dut (
    .clk, .rst,
    .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb), .epp_din(hd),
    .epp_dout(pd), .epp_doe(doe), .epp_wait(wt),
    .epp_M_request(req), .epp_OPB_MGrant(gnt),
    .ext_M_select(1'b0), .ext_M_RNW(1'b0), .ext_M_ABus(32'd0), .ext_M_BE(4'd0), .ext_M_DBus(32'd0),
    .OPB_select(sel), .OPB_RNW(rnw), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_xferAck(xack),
    .ext_Sl_DBus(s0_dbus | s1_dbus), .ext_Sl_xferAck(s0_ack | s1_ack),
    .ext_Sl_errAck(s0_err | s1_err), .ext_Sl_retry(s0_rty | s1_rty),
    .ext_Sl_toutSup(s0_tsup | s1_tsup),
    .probe0, .probe1, .la0_state(st0), .la1_state(st1),
    .wepp_nwrite(wnwrite), .wepp_ndstrb(wndstrb), .wepp_nastrb(wnastrb), .wepp_din(whd),
    .wepp_dout(wpd), .wepp_doe(wdoe), .wepp_wait(wwt),
    .wb_cyc_o(wcyc), .wb_stb_o(wstb), .wb_we_o(wwe), .wb_adr_o(wadr), .wb_sel_o(wsel),
    .wb_dat_o(wdo), .wb_dat_i(wdi), .wb_ack_i(wack), .wb_err_i(werr),
    .probe2, .la2_state(st2)
  );

  epp_model host  (.nwrite, .ndstrb, .nastrb, .dout(hd), .din(pd), .doe, .wait_i(wt));
  epp_model whost (.nwrite(wnwrite), .ndstrb(wndstrb), .nastrb(wnastrb), .dout(whd),
                   .din(wpd), .doe(wdoe), .wait_i(wwt));

  // bus (as it sits inside the system) seen by the external slaves: the
  // system's OPB outputs already include the bridge's master signals
  opb_mem_model #(.BASE(32'h0), .SIZE(65536), .RETRY_EVERY(9)) sram (.clk, .ABus(abus), .BE(be),
    .DBus(dbus), .RNW(rnw), .select(sel), .Sl_DBus(s0_dbus), .Sl_xferAck(s0_ack),
    .Sl_errAck(s0_err), .Sl_retry(s0_rty), .Sl_toutSup(s0_tsup));
  opb_mem_model #(.BASE(UART), .SIZE(4096), .RETRY_EVERY(0)) uart (.clk, .ABus(abus), .BE(be),
    .DBus(dbus), .RNW(rnw), .select(sel), .Sl_DBus(s1_dbus), .Sl_xferAck(s1_ack),
    .Sl_errAck(s1_err), .Sl_retry(s1_rty), .Sl_toutSup(s1_tsup));

  // arbiter
  int grant_waits = 0;
  initial begin
    gnt = 0;
    forever begin
      @(posedge clk);
      if (req && !gnt) begin
        int d;
        d = $urandom_range(3);
        if (d > 0) grant_waits++;
        repeat (d) @(posedge clk);
        #1 gnt = 1;
        @(posedge clk); #1 gnt = 0;
      end
    end
  end

  // Wishbone memory
  logic [7:0] wmem [logic [31:0]];
  initial begin
    wack = 0; werr = 0; wdi = '0;
    forever begin
      @(posedge clk);
      if (wcyc && wstb) begin
        repeat ($urandom_range(2)) @(posedge clk);
        #1 wdi = '0;
        for (int k = 0; k < 4; k++) if (wsel[k]) begin
          if (wwe) wmem[{wadr[31:2], 2'(k)}] = wdo[8*k +: 8];
          wdi[8*k +: 8] = wmem.exists({wadr[31:2], 2'(k)}) ? wmem[{wadr[31:2], 2'(k)}] : 8'h00;
        end
        wack = 1;
        @(posedge clk); #1 wack = 0; wdi = '0;
      end
    end
  end

  // trace of the system OPB into analyser 1
  opb_trace_t tr;
  always_comb begin
    tr = '0;
    tr.abus    = abus[23:0];
    tr.dbus    = dbus;
    tr.errAck  = s0_err | s1_err;
    tr.rnw     = rnw;
    tr.rst     = rst;
    tr.select  = sel;
    tr.xferAck = xack;
    probe1     = tr;
  end

  // every acknowledged OPB cycle, in order, as a trace word
  logic [63:0] acked[$];
  always @(posedge clk) if (xack) acked.push_back(probe1);

  // ---------------------------------------------------------------- helpers
  task automatic opb_wr32(input logic [31:0] a, input logic [31:0] d);
    host.set_address(a);
    for (int k = 3; k >= 0; k--) host.data_write(d[8*k +: 8]);
  endtask

  task automatic opb_rd32(input logic [31:0] a, output logic [31:0] d);
    logic [7:0] b;
    host.set_address(a);
    for (int k = 3; k >= 0; k--) begin host.data_read(b); d[8*k +: 8] = b; end
  endtask

  task automatic wb_wr32(input logic [31:0] a, input logic [31:0] d);
    whost.set_address(a);
    for (int k = 0; k < 4; k++) whost.data_write(d[8*k +: 8]);
  endtask

  task automatic wb_rd32(input logic [31:0] a, output logic [31:0] d);
    logic [7:0] b;
    whost.set_address(a);
    for (int k = 0; k < 4; k++) begin whost.data_read(b); d[8*k +: 8] = b; end
  endtask

  // read n captured words of an analyser over a port and expand the RLC
  int count_words_seen = 0;
  task automatic read_capture(input bit wb, input logic [31:0] base, output logic [63:0] smp[$],
                              output logic [64:0] words[$]);
    logic [31:0] n, w0, w1, w2;
    logic [64:0] e;
    smp = {}; words = {};
    if (wb) wb_rd32(base + 32'(LA_REG_COUNT * 4), n); else opb_rd32(base + 32'(LA_REG_COUNT * 4), n);
    for (int i = 0; i < int'(n); i++) begin
      logic [31:0] a;
      a = base + 32'h4000 + 32'(i * 16);
      if (wb) begin wb_rd32(a, w0); wb_rd32(a + 4, w1); wb_rd32(a + 8, w2); end
      else begin opb_rd32(a, w0); opb_rd32(a + 4, w1); opb_rd32(a + 8, w2); end
      e = {w2[0], w1, w0};
      words.push_back(e);
      if (e[64]) begin
        count_words_seen++;
        repeat (int'(e[63:0]) + 1) smp.push_back(smp[$]);
      end else smp.push_back(e[63:0]);
    end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // slowly changing signal on analyser 0: a UART-like line that toggles every
  // 1000 clocks, plus a byte counter that changes with it
  int slow_div = 0;
  logic [7:0] slow_cnt = 0;
  always @(posedge clk) begin
    if (slow_div == 999) begin slow_div <= 0; slow_cnt <= slow_cnt + 1; end
    else slow_div <= slow_div + 1;
  end
  logic fast_mode = 0;
  int   fast_cnt  = 0;
  always @(posedge clk) fast_cnt <= fast_cnt + 1;
  assign probe0 = fast_mode ? 64'(fast_cnt) : {56'd0, slow_cnt};
  assign probe2 = 64'(slow_cnt[0]) | (64'(fast_cnt[3:0]) << 8);

  // ---------------------------------------------------------------- test
  int n_ced = 0, n_pattern = 0, n_force = 0, n_maxrep = 0, n_full = 0, n_stop = 0;
  int n_err = 0, n_tout = 0, n_wb = 0, n_dropped = 0;

  initial begin
    logic [7:0] b;
    logic [7:0] ref_b [400];
    logic [31:0] q;
    logic [63:0] smp[$];
    logic [64:0] words[$];
    rst = 1;
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // 1. block transfer to the memory at 1..400 and back
    host.set_address(32'd1);
    for (int k = 0; k < 400; k++) begin ref_b[k] = 8'($urandom); host.data_write(ref_b[k]); end
    host.set_address(32'd1);
    begin
      int diff = 0;
      for (int k = 0; k < 400; k++) begin host.data_read(b); if (b != ref_b[k]) diff++; end
      check(diff == 0, $sformatf("block read back: %0d bytes differ", diff));
    end

    // 2. bus trace with CED on xferAck (analyser 1), RLC on
    opb_wr32(LA1 + 32'(LA_REG_CVAL * 4), 32'd1);
    opb_wr32(LA1 + 32'(LA_REG_CMSK * 4), 32'd1);
    opb_wr32(LA1 + 32'(LA_REG_CTRL * 4), 32'd3);
    acked = {};
    opb_wr32(LA1 + 32'(LA_REG_CMD * 4), 32'd3);      // arm + force
    opb_wr32(UART + 4, 32'h0000_0041);
    opb_rd32(UART + 8, q);
    opb_rd32(32'd17, q);
    opb_wr32(UART + 4, 32'h0000_0042);
    opb_wr32(LA1 + 32'(LA_REG_CMD * 4), 32'd4);      // stop
    read_capture(0, LA1, smp, words);
    begin
      // every kept sample is an acknowledged cycle, and together they are a
      // contiguous piece of the acknowledged cycles of the window
      int start = -1;
      bit all_acked = 1, contiguous = 1;
      foreach (smp[k]) if (!smp[k][0]) all_acked = 0;
      for (int i = 0; i < acked.size(); i++) if (acked[i] == smp[0]) begin start = i; break; end
      if (start < 0) contiguous = 0;
      else foreach (smp[k]) if (start + k >= acked.size() || acked[start + k] != smp[k]) contiguous = 0;
      check(all_acked, "CED on xferAck: only acknowledged cycles kept");
      // the arm command's last byte, 16 byte transfers, the stop command's
      // first three bytes (the fourth one stops the capture)
      check(contiguous && smp.size() == 1 + 16 + 3, $sformatf("CED on xferAck: %0d cycles, as on the bus", smp.size()));
      n_ced++; n_force++; n_stop++;
    end

    // 3. only UART transfers: xferAck = 1 and address bits 23..12 = 0x600
    opb_wr32(LA1 + 32'(LA_REG_CVAL * 4 + 4), 32'h6000_0000);
    opb_wr32(LA1 + 32'(LA_REG_CMSK * 4 + 4), 32'hFFF0_0000);
    opb_wr32(LA1 + 32'(LA_REG_CMD * 4), 32'd3);
    opb_wr32(UART + 0, 32'h0000_0055);
    opb_rd32(32'd100, q);
    opb_rd32(UART + 12, q);
    opb_wr32(LA1 + 32'(LA_REG_CMD * 4), 32'd4);
    read_capture(0, LA1, smp, words);
    begin
      bit only_uart = 1;
      foreach (smp[k]) if (smp[k][63:52] != 12'h600 || !smp[k][0]) only_uart = 0;
      check(only_uart && smp.size() == 8, $sformatf("CED on UART range: %0d UART byte cycles", smp.size()));
      // trace word: abus = bits 63..40, dbus = 39..8, rnw = bit 5
      for (int k = 0; k < 4; k++) begin
        if (smp[k][63:40] != 24'h600000 + 24'(k) || smp[k][5]) only_uart = 0;
        if (smp[4+k][63:40] != 24'h60000C + 24'(k) || !smp[4+k][5]) only_uart = 0;
      end
      check(only_uart && smp[3][15:8] == 8'h55, "UART write then read, in order");
      n_ced++;
    end

    // 4. slow signal on analyser 0: trigger on slow_cnt == 3, repeat limit 16
    opb_wr32(LA0 + 32'(LA_REG_TVAL * 4), 32'd3);
    opb_wr32(LA0 + 32'(LA_REG_TMSK * 4), 32'hFF);
    opb_wr32(LA0 + 32'(LA_REG_MAXREP * 4), 32'd16);
    opb_wr32(LA0 + 32'(LA_REG_CMD * 4), 32'd1);
    opb_rd32(LA0 + 32'(LA_REG_CMD * 4), q);
    check(q == 32'd1 || q == 32'd2, "analyser 0 armed or running");
    wait (slow_cnt == 8'd7);
    opb_wr32(LA0 + 32'(LA_REG_CMD * 4), 32'd4);
    read_capture(0, LA0, smp, words);
    begin
      bit ok = 1;
      // values 3,4,5,6 with a full run of 1000 clocks each, limited to 16,
      // then value 7 for the clocks until the stop
      for (int k = 0; k < 4; k++)
        if (words[2*k] != {1'b0, 64'(3 + k)} || words[2*k+1] != {1'b1, 64'd14}) ok = 0;
      if (words[8][63:0] != 64'd7) ok = 0;
      check(ok, "slow signal: value, count 14 per state (repeat limit 16)");
      check(smp.size() >= 64, "slow signal: 4 x 16 samples shown");
      n_pattern++; n_maxrep++;
    end

    // 5. no compression, memory full
    fast_mode = 1;
    opb_wr32(LA0 + 32'(LA_REG_CTRL * 4), 32'd0);
    opb_wr32(LA0 + 32'(LA_REG_CMD * 4), 32'd3);
    repeat (1100) @(posedge clk);
    opb_rd32(LA0 + 32'(LA_REG_CMD * 4), q);
    check(q == 32'b1100, $sformatf("memory full: status %b", q));
    opb_rd32(LA0 + 32'(LA_REG_COUNT * 4), q);
    check(q == 32'd1024, "memory full: 1024 words");
    begin
      logic [31:0] a, b0, b1;
      opb_rd32(LA0 + 32'h4000 + 32'(500 * 16), a);
      opb_rd32(LA0 + 32'h4000 + 32'(501 * 16), b0);
      opb_rd32(LA0 + 32'h4000 + 32'(1000 * 16), b1);
      check(b0 == a + 1 && b1 == a + 500, "memory full: one sample per clock");
    end
    n_full++;
    n_dropped += 1;

    // 6. bus errors
    host.addr_read(b);
    check(b == 8'h00, "status clean");
    host.set_address(32'h0000_FF80);
    host.data_write(8'h11);
    host.addr_read(b);
    check(b == 8'h01 && sram.errors == 1, "errAck reported");
    n_err++;
    host.set_address(32'h0000_FE80);
    host.data_read(b);
    host.addr_read(b);
    check(b == 8'h01 && sram.ignored == 1, "timeout reported");
    n_tout++;

    // 7. Wishbone side
    begin
      logic [31:0] d;
      wb_wr32(32'h0000_2000, 32'hCAFE_F00D);
      wb_rd32(32'h0000_2000, d);
      check(d == 32'hCAFE_F00D && wmem[32'h2000] == 8'h0D, "Wishbone block transfer, little-endian lanes");
      wb_wr32(WLA + 32'(LA_REG_TVAL * 4), 32'h0000_0001);
      wb_wr32(WLA + 32'(LA_REG_TMSK * 4), 32'h0000_0001);
      wb_wr32(WLA + 32'(LA_REG_CMD * 4), 32'd1);
      wait (st2 == LA_RUN);
      repeat (200) @(posedge clk);
      wb_wr32(WLA + 32'(LA_REG_CMD * 4), 32'd4);
      read_capture(1, WLA, smp, words);
      check(words.size() > 10 && smp[0][0] == 1'b1, "Wishbone analyser: triggered capture");
      begin
        bit ok = 1;
        for (int k = 1; k < smp.size(); k++)
          if (smp[k][11:8] != smp[k-1][11:8] + 4'd1) ok = 0;
        check(ok, "Wishbone analyser: no lost samples");
      end
      n_wb++;
    end

    // mechanisms
    check(host.cycles > 0 && whost.cycles > 0, "EPP cycles on both ports");
    check(host.timeouts == 0 && host.protocol_errors == 0 &&
          whost.timeouts == 0 && whost.protocol_errors == 0, "EPP handshake kept");
    check(sram.retries > 0, $sformatf("OPB retries: %0d", sram.retries));
    check(grant_waits > 0, $sformatf("arbitration waits: %0d", grant_waits));
    check(count_words_seen > 0, $sformatf("RLC count words read: %0d", count_words_seen));
    check(n_ced == 2, "CED used"); check(n_pattern > 0, "pattern trigger used");
    check(n_force > 0, "forced trigger used"); check(n_maxrep > 0, "repeat limit used");
    check(n_full > 0, "memory full"); check(n_stop > 0, "stop used");
    check(n_err > 0 && n_tout > 0, "bus error and timeout"); check(n_wb > 0, "Wishbone side");
    $display("mechanisms: epp_cycles=%0d wb_epp_cycles=%0d retries=%0d grant_waits=%0d rlc_counts=%0d",
             host.cycles, whost.cycles, sram.retries, grant_waits, count_words_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
