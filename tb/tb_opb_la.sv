// tb_opb_la: self-checking test of the OPB analyser at its default size
// (64 probe bits, 1024-word memory), through a behavioural OPB master.
// Checks: acknowledge on the third clock edge after select, Sl_DBus zero
// outside the acknowledge, no answer outside the address window, byte-enabled
// register writes, the INFO word, a pattern-triggered run-length coded
// capture read back through the three 32-bit slices of each 65-bit entry, and
// a capture without compression that fills all 1024 words at one sample per
// clock and sets the done and full status bits.
module tb_opb_la;
  import apsi_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam logic [31:0] MEMB = BASE + 32'h4000;  // memory half of the 32 KiB window
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, select, rnw, ack;
  logic [31:0] abus, dbus_m, dbus_s;
  logic [3:0] be;
  logic [63:0] probe;
  la_state_e la_state;
  int checks = 0, failures = 0;

  opb_la dut (.OPB_Clk(clk), .OPB_Rst(rst), .OPB_ABus(abus), .OPB_BE(be), .OPB_DBus(dbus_m),
    .OPB_RNW(rnw), .OPB_select(select), .Sl_DBus(dbus_s), .Sl_xferAck(ack), .probe, .la_state);

  int dbus_leaks = 0;
  always @(posedge clk) if (!ack && dbus_s != 0) dbus_leaks++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one OPB transfer; returns the read data and the number of edges to ack
  task automatic xfer(input logic [31:0] a, input bit r, input logic [31:0] d,
                      input logic [3:0] b, output logic [31:0] q, output int lat);
    abus = a; rnw = r; dbus_m = r ? '0 : d; be = b; select = 1;
    lat = 0; q = '0;
    do begin
      @(posedge clk);
      lat++;
    end while (!ack && lat < 20);
    q = dbus_s;
    #1 select = 0; abus = '0; rnw = 0; dbus_m = '0; be = '0;
    @(posedge clk); #1;
  endtask

  task automatic wr(input int unsigned idx, input logic [31:0] d, input logic [3:0] b = 4'hF);
    logic [31:0] q; int lat;
    xfer(BASE + 32'(idx * 4), 0, d, b, q, lat);
    check(lat == 3, $sformatf("write ack latency %0d", lat));
  endtask

  task automatic rd(input logic [31:0] a, output logic [31:0] q);
    int lat;
    xfer(a, 1, '0, 4'hF, q, lat);
    check(lat == 3, $sformatf("read ack latency %0d", lat));
  endtask

  task automatic rd_entry(input int unsigned e, output logic [64:0] v);
    logic [31:0] s0, s1, s2;
    rd(MEMB + 32'(e * 16), s0);
    rd(MEMB + 32'(e * 16 + 4), s1);
    rd(MEMB + 32'(e * 16 + 8), s2);
    v = {s2[0], s1, s0};
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q;
    logic [64:0] v;
    int lat;
    rst = 1; select = 0; rnw = 0; abus = '0; dbus_m = '0; be = '0; probe = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    rd(BASE + 32'(LA_REG_INFO * 4), q);
    check(q == {16'd10, 16'd64}, $sformatf("INFO %h", q));
    wr(LA_REG_MAXREP, 32'h1111_1111);
    wr(LA_REG_MAXREP, 32'h0000_9900, 4'b0010);
    rd(BASE + 32'(LA_REG_MAXREP * 4), q);
    check(q == 32'h1111_9911, "byte-enabled write");
    wr(LA_REG_MAXREP, 0);
    // outside the window: nobody answers
    xfer(BASE + 32'h8000, 1, '0, 4'hF, q, lat);
    check(lat == 20, "no answer outside the window");

    // trigger when the address field (bits 63..40) is 600008
    wr(LA_REG_TVAL + 1, 32'h6000_0800);
    wr(LA_REG_TMSK + 1, 32'hFFFF_FF00);
    wr(LA_REG_CMD, 1);
    check(la_state == LA_ARMED, "armed");
    probe = 64'h0001_8000_0000_0001; repeat (4) @(posedge clk);
    #1 probe = 64'h6000_0800_0000_0005; repeat (3) @(posedge clk);
    #1 probe = 64'h6000_0000_0000_00FE; @(posedge clk);
    #1 probe = 64'h0001_9000_0000_0000; repeat (3) @(posedge clk);
    #1;
    wr(LA_REG_CMD, 4);
    check(la_state == LA_DONE, "done after stop");
    // the probe is registered, so each value is sampled one clock late and
    // the stop edge takes no sample: 600008.. x3, 600000.. x1, 000190.. x2
    rd(BASE + 32'(LA_REG_COUNT * 4), q);
    check(q == 5, $sformatf("5 words captured (%0d)", q));
    rd_entry(0, v); check(v == {1'b0, 64'h6000_0800_0000_0005}, "entry 0 = trigger value");
    rd_entry(1, v); check(v == {1'b1, 64'd1}, "entry 1 = count 3");
    rd_entry(2, v); check(v == {1'b0, 64'h6000_0000_0000_00FE}, "entry 2");
    rd_entry(3, v); check(v == {1'b0, 64'h0001_9000_0000_0000}, "entry 3");
    rd_entry(4, v); check(v == {1'b1, 64'd0}, "entry 4 = count 2");

    // no compression, forced trigger: fill the memory
    wr(LA_REG_CTRL, 0);
    wr(LA_REG_CMD, 3);
    for (int k = 0; k < 1100; k++) begin
      probe = 64'(k) << 20; @(posedge clk); #1;
    end
    rd(BASE + 32'(LA_REG_CMD * 4), q);
    check(q == 32'b1100, $sformatf("status done+full (%b)", q));
    rd(BASE + 32'(LA_REG_COUNT * 4), q);
    check(q == 1024, "1024 words");
    begin
      logic [64:0] first, lastw;
      // the first entries hold the probe value present while the arm
      // command completed; from there on the probe counts up every clock
      rd_entry(100, first);
      rd_entry(1023, lastw);
      check(lastw - first == (65'd923 << 20), "one sample per clock, no gaps");
    end
    check(dbus_leaks == 0, "Sl_DBus zero outside acknowledge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
