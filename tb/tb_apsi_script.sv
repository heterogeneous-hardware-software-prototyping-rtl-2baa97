// tb_apsi_script: runs the whole system (default parameters) from a recorded
// PC command stream instead of from testbench code. The stream in
// tb/apsi_test_script.hex is the byte-level form of a small memory test
// script: set the bus address to 1, write 64 bytes, set the address to 1
// again, read the 64 bytes back, read the status byte. The byte at address a
// is (7*a + 3) mod 256. The port model replays the stream (epp_model.play)
// and collects every byte read; the testbench then compares the replies with
// the pattern and with the OPB memory's contents, and checks that the status
// byte shows no failed transfer. An OPB memory stands in for the board's
// SRAM and asks for a retry now and then; the arbiter grants after 0..3
// clocks. The Wishbone side and the analysers are left idle.
module tb_apsi_script;
  import apsi_pkg::*;
  localparam int N = 64;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic nwrite, ndstrb, nastrb, doe, wt;
  logic [7:0] hd, pd;
  logic wnwrite, wndstrb, wnastrb, wdoe, wwt;
  logic [7:0] wpd;
  logic req, gnt;
  logic sel, rnw, xack;
  logic [31:0] abus, dbus;
  logic [3:0] be;
  logic [31:0] s0_dbus;
  logic s0_ack, s0_err, s0_rty, s0_tsup;
  la_state_e st0, st1, st2;
  logic wcyc, wstb, wwe;
  logic [31:0] wadr, wdo;
  logic [3:0] wsel;

  assign wnwrite = 1'b1;
  assign wndstrb = 1'b1;
  assign wnastrb = 1'b1;

  apsi_system dut (
    .clk, .rst,
    .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb), .epp_din(hd),
    .epp_dout(pd), .epp_doe(doe), .epp_wait(wt),
    .epp_M_request(req), .epp_OPB_MGrant(gnt),
    .ext_M_select(1'b0), .ext_M_RNW(1'b0), .ext_M_ABus(32'd0), .ext_M_BE(4'd0), .ext_M_DBus(32'd0),
    .OPB_select(sel), .OPB_RNW(rnw), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus),
    .OPB_xferAck(xack),
    .ext_Sl_DBus(s0_dbus), .ext_Sl_xferAck(s0_ack), .ext_Sl_errAck(s0_err),
    .ext_Sl_retry(s0_rty), .ext_Sl_toutSup(s0_tsup),
    .probe0(64'd0), .probe1(64'd0), .la0_state(st0), .la1_state(st1),
    .wepp_nwrite(wnwrite), .wepp_ndstrb(wndstrb), .wepp_nastrb(wnastrb), .wepp_din(8'd0),
    .wepp_dout(wpd), .wepp_doe(wdoe), .wepp_wait(wwt),
    .wb_cyc_o(wcyc), .wb_stb_o(wstb), .wb_we_o(wwe), .wb_adr_o(wadr), .wb_sel_o(wsel),
    .wb_dat_o(wdo), .wb_dat_i(32'd0), .wb_ack_i(1'b0), .wb_err_i(1'b0),
    .probe2(64'd0), .la2_state(st2)
  );

  epp_model host (.nwrite, .ndstrb, .nastrb, .dout(hd), .din(pd), .doe, .wait_i(wt));

  opb_mem_model #(.BASE(32'h0), .SIZE(65536), .RETRY_EVERY(7)) sram (.clk, .ABus(abus), .BE(be),
    .DBus(dbus), .RNW(rnw), .select(sel), .Sl_DBus(s0_dbus), .Sl_xferAck(s0_ack),
    .Sl_errAck(s0_err), .Sl_retry(s0_rty), .Sl_toutSup(s0_tsup));

  initial begin
    gnt = 0;
    forever begin
      @(posedge clk);
      if (req && !gnt) begin
        repeat ($urandom_range(3)) @(posedge clk);
        #1 gnt = 1;
        @(posedge clk); #1 gnt = 0;
      end
    end
  end

  function automatic logic [7:0] pattern(input int a);
    return 8'((7 * a + 3) % 256);
  endfunction

  initial begin
    rst = 1'b1;
    repeat (5) @(posedge clk);
    #1 rst = 1'b0;
    repeat (5) @(posedge clk);
    host.play("tb/apsi_test_script.hex");
    check(host.replies.size() == N + 1, $sformatf("%0d replies, expected %0d",
                                                  host.replies.size(), N + 1));
    if (host.replies.size() == N + 1) begin
      for (int a = 1; a <= N; a++)
        check(host.replies[a-1] == pattern(a),
              $sformatf("address %0d read %02h, expected %02h", a, host.replies[a-1], pattern(a)));
      check(host.replies[N] == 8'h00, $sformatf("status byte %02h", host.replies[N]));
    end
    for (int a = 1; a <= N; a++)
      check(sram.mem.exists(32'(a)) && sram.mem[32'(a)] == pattern(a), $sformatf("memory byte %0d", a));
    check(host.timeouts == 0 && host.protocol_errors == 0, "port handshake");
    check(host.cycles == 4 + N + 4 + N + 1, $sformatf("%0d port cycles", host.cycles));
    check(sram.retries > 0, "no retry occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
