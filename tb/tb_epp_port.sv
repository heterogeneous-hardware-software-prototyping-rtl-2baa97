// tb_epp_port: self-checking test of the EPP front end. The host model plays
// address and data cycles; a behavioural bus responder with random latency
// holds a byte memory and answers with an error above address 0xF000.
// Checks: four address writes build the 32-bit address, data writes and reads
// reach the right bytes, the address increments after every data cycle, the
// status read reports an error once and clears it, and the EPP handshake is
// kept (no timeouts, data driven on reads only).
module tb_epp_port;
  logic clk = 1'b0;
  always #10 clk = ~clk;   // 50 MHz
  logic rst;
  logic nwrite, ndstrb, nastrb, doe, wait_o;
  logic [7:0] hdata, pdata;
  logic bus_req, bus_we, bus_done, bus_err;
  logic [31:0] bus_addr;
  logic [7:0] bus_wdata, bus_rdata;
  int checks = 0, failures = 0;

  epp_model host (.nwrite, .ndstrb, .nastrb, .dout(hdata), .din(pdata), .doe, .wait_i(wait_o));

  epp_port dut (.clk, .rst, .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb),
    .epp_din(hdata), .epp_dout(pdata), .epp_doe(doe), .epp_wait(wait_o),
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_done, .bus_rdata, .bus_err);

  // bus responder
  logic [7:0] mem [logic [31:0]];
  int bus_ops = 0;
  initial begin
    bus_done = 0; bus_err = 0; bus_rdata = '0;
    forever begin
      @(posedge clk);
      if (bus_req && !bus_done) begin
        repeat ($urandom_range(6)) @(posedge clk);
        #1;
        bus_err = bus_addr >= 32'hF000;
        if (bus_we) mem[bus_addr] = bus_wdata;
        bus_rdata = mem.exists(bus_addr) ? mem[bus_addr] : 8'hEE;
        bus_done = 1;
        bus_ops++;
        @(posedge clk); #1;
        bus_done = 0;
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] b;
    logic [7:0] ref_mem [256];
    rst = 1;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    host.set_address(32'h1234_5678);
    #100;
    check(dut.bus_addr == 32'h1234_5678, "address from four address writes");
    // block write then block read, like a file transfer
    host.set_address(32'h0000_0100);
    for (int k = 0; k < 64; k++) begin
      ref_mem[k] = 8'($urandom);
      host.data_write(ref_mem[k]);
    end
    check(dut.bus_addr == 32'h140, "address incremented 64 times");
    host.set_address(32'h0000_0100);
    for (int k = 0; k < 64; k++) begin
      host.data_read(b);
      check(b == ref_mem[k], $sformatf("read back byte %0d", k));
    end
    check(mem[32'h100] == ref_mem[0] && mem[32'h13F] == ref_mem[63], "bytes at their addresses");
    // status: no error yet, then an error, cleared by reading it
    host.addr_read(b);
    check(b == 8'h00, "status clean");
    host.set_address(32'h0000_F000);
    host.data_write(8'h55);
    host.addr_read(b);
    check(b == 8'h01, "status reports bus error");
    host.addr_read(b);
    check(b == 8'h00, "status error cleared by the read");
    check(host.timeouts == 0 && host.protocol_errors == 0, "EPP handshake kept");
    check(bus_ops == 129, $sformatf("one bus access per data cycle (%0d)", bus_ops));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
