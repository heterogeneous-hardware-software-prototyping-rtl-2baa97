// tb_epp: self-checking test of the Wishbone version of the parallel-port
// bridge. The host model plays the PC; a behavioural Wishbone memory slave
// with random wait states answers, with err_i in 0xFF00..0xFFFF and no answer
// at all in 0xFE00..0xFEFF. Checks: a 400-byte block written from address 1
// reads back, bytes use little-endian lanes (sel_o bit = address offset),
// errors and the timeout are reported in the status byte, cyc/stb are
// released after each access, and the EPP handshake is kept.
module tb_epp;
  logic clk = 1'b0;
  always #10 clk = ~clk;
  logic rst;
  logic nwrite, ndstrb, nastrb, doe, wait_o;
  logic [7:0] hdata, pdata;
  logic cyc, stb, we, ack, err;
  logic [31:0] adr, dat_m, dat_s;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  epp_model host (.nwrite, .ndstrb, .nastrb, .dout(hdata), .din(pdata), .doe, .wait_i(wait_o));

  epp dut (.clk_i(clk), .rst_i(rst),
    .epp_nwrite(nwrite), .epp_ndstrb(ndstrb), .epp_nastrb(nastrb), .epp_din(hdata),
    .epp_dout(pdata), .epp_doe(doe), .epp_wait(wait_o),
    .cyc_o(cyc), .stb_o(stb), .we_o(we), .adr_o(adr), .sel_o(sel), .dat_o(dat_m),
    .dat_i(dat_s), .ack_i(ack), .err_i(err));

  // Wishbone memory slave
  logic [7:0] mem [logic [31:0]];
  int lane_errors = 0, silent = 0, accesses = 0;
  initial begin
    ack = 0; err = 0; dat_s = '0;
    forever begin
      @(posedge clk);
      if (cyc && stb) begin
        if (adr >= 32'hFE00 && adr < 32'hFF00) begin
          silent++;
          while (cyc) @(posedge clk);
        end else begin
          repeat ($urandom_range(4)) @(posedge clk);
          #1;
          if (sel != (4'b0001 << adr[1:0])) lane_errors++;
          dat_s = '0;
          for (int k = 0; k < 4; k++) begin
            logic [31:0] a;
            a = {adr[31:2], 2'(k)};
            if (sel[k]) begin
              if (we) mem[a] = dat_m[8*k +: 8];
              dat_s[8*k +: 8] = mem.exists(a) ? mem[a] : 8'h5A;
            end
          end
          if (adr >= 32'hFF00) err = 1; else ack = 1;
          accesses++;
          @(posedge clk); #1;
          ack = 0; err = 0; dat_s = '0;
          check_release();
        end
      end
    end
  end

  int release_errors = 0;
  task automatic check_release();
    if (cyc || stb) release_errors++;
  endtask

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
    check(mem[32'd1] == ref_b[0] && mem[32'd400] == ref_b[399], "bytes stored at their addresses");
    check(lane_errors == 0, "sel_o matches the address lane");
    check(release_errors == 0, "cyc/stb released after the acknowledge");
    host.addr_read(b);
    check(b == 8'h00, "status clean");
    host.set_address(32'h0000_FF20);
    host.data_write(8'h77);
    host.addr_read(b);
    check(b == 8'h01, "err_i reported in status");
    host.set_address(32'h0000_FE20);
    host.data_read(b);
    check(b == 8'hFF && silent == 1, "missing slave: timeout returns FF");
    host.addr_read(b);
    check(b == 8'h01, "timeout reported in status");
    check(!cyc, "bus released after timeout");
    check(host.timeouts == 0 && host.protocol_errors == 0, "EPP handshake kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
