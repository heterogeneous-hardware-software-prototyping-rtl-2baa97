// tb_opb_epp: self-checking test of the EPP-to-OPB bridge. The host model
// plays the PC; a behavioural OPB memory slave, a simple arbiter with random
// grant delay and an OR-combined bus surround the bridge. Checks: a block
// written byte by byte reads back unchanged and lands at the right OPB byte
// lanes, retries are repeated, errAck and a silent slave (bus timeout after
// 16 cycles) end the transfer with an error seen in the status byte, select
// follows a grant, and M_* outputs are zero when the bridge is idle.
module tb_opb_epp;
  logic clk = 1'b0;
  always #10 clk = ~clk;
  logic rst;
  logic nwrite, ndstrb, nastrb, doe, wait_o;
  logic [7:0] hdata, pdata;
  logic M_request, M_select, M_RNW, MGrant;
  logic [31:0] M_ABus, M_DBus, Sl_DBus, OPB_DBus;
  logic [3:0] M_BE;
  logic xferAck, errAck, retry, toutSup;
  int checks = 0, failures = 0;

  epp_model host (.nwrite, .ndstrb, .nastrb, .dout(hdata), .din(pdata), .doe, .wait_i(wait_o));

  opb_epp dut (.OPB_Clk(clk), .OPB_Rst(rst),
    .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb), .epp_din(hdata),
    .epp_dout(pdata), .epp_doe(doe), .epp_wait(wait_o),
    .M_request, .M_select, .M_RNW, .M_ABus, .M_BE, .M_DBus,
    .OPB_MGrant(MGrant), .OPB_DBus, .OPB_xferAck(xferAck), .OPB_errAck(errAck),
    .OPB_retry(retry), .OPB_toutSup(toutSup));

  opb_mem_model #(.BASE(32'h0), .SIZE(65536)) slave (.clk, .ABus(M_ABus), .BE(M_BE),
    .DBus(M_DBus), .RNW(M_RNW), .select(M_select), .Sl_DBus, .Sl_xferAck(xferAck),
    .Sl_errAck(errAck), .Sl_retry(retry), .Sl_toutSup(toutSup));

  assign OPB_DBus = M_DBus | Sl_DBus;

  // arbiter: grant a pending request after 0..3 cycles, for one cycle
  int grants = 0, timeouts_seen = 0;
  initial begin
    MGrant = 0;
    forever begin
      @(posedge clk);
      if (M_request && !MGrant) begin
        repeat ($urandom_range(3)) @(posedge clk);
        #1 MGrant = 1; grants++;
        @(posedge clk); #1 MGrant = 0;
      end
    end
  end

  // idle outputs must be zero; count silent-slave transfers ended by the bridge
  int idle_errors = 0, sel_len = 0;
  always @(posedge clk) begin
    if (!M_select && (M_ABus != 0 || M_BE != 0 || M_DBus != 0 || M_RNW)) idle_errors++;
    sel_len = M_select ? sel_len + 1 : 0;
    if (sel_len == 16 && !xferAck) timeouts_seen++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    logic [7:0] ref_b [400];
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    // write 400 bytes from address 1, read them back (a block transfer)
    host.set_address(32'd1);
    for (int k = 0; k < 400; k++) begin
      ref_b[k] = 8'($urandom);
      host.data_write(ref_b[k]);
    end
    host.set_address(32'd1);
    for (int k = 0; k < 400; k++) begin
      host.data_read(b);
      check(b == ref_b[k], $sformatf("byte %0d read back", k + 1));
    end
    check(slave.mem[32'd1] == ref_b[0] && slave.mem[32'd400] == ref_b[399], "bytes stored at their OPB addresses");
    check(slave.lane_errors == 0, "byte enable matches the address lane");
    check(slave.retries > 10, $sformatf("retries exercised (%0d)", slave.retries));
    host.addr_read(b);
    check(b == 8'h00, "no error after retried transfers");
    // errAck region
    host.set_address(32'h0000_FF10);
    host.data_read(b);
    check(b == 8'hFF, "errAck read returns FF");
    host.addr_read(b);
    check(b == 8'h01, "errAck reported in status");
    // silent region: timeout
    host.set_address(32'h0000_FE00);
    host.data_write(8'h12);
    host.addr_read(b);
    check(b == 8'h01, "timeout reported in status");
    check(slave.ignored == 1 && timeouts_seen == 1, "transfer ended by the bridge's timeout");
    check(!M_select, "bus released after timeout");
    check(idle_errors == 0, "M_* outputs zero while idle");
    check(host.timeouts == 0 && host.protocol_errors == 0, "EPP handshake kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
