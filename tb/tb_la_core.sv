// tb_la_core: self-checking test of the bus-independent analyser core, with a
// 40-bit probe (41-bit memory entries read as two 32-bit slices) and a 32-word
// memory. Drives the register port directly and checks: register write/read
// back with byte enables, the INFO word, a pattern trigger followed by
// run-length coded capture (expected words worked out by hand), forced
// trigger with the CED keeping only matching samples, the repeat limit, one
// sample per clock without compression, memory full, the status bits, and the
// two-clock delay from probe to memory.
module tb_la_core;
  import apsi_pkg::*;
  localparam int unsigned W = 40, DEPTH = 32;
  localparam int unsigned RA_W = 7;           // 5 address bits + 1 slice bit + 1
  localparam logic [RA_W-1:0] MEM = 7'h40;    // memory half of the window

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, reg_wr, reg_rd;
  logic [RA_W-1:0] reg_addr;
  logic [3:0] reg_be;
  logic [31:0] reg_wdata, reg_rdata;
  logic [W-1:0] probe;
  la_state_e state;
  int checks = 0, failures = 0;

  la_core #(.PROBE_W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .probe, .reg_addr, .reg_wr,
    .reg_be, .reg_wdata, .reg_rd, .reg_rdata, .state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %t", what, $time); end
  endtask

  task automatic wr(input int unsigned idx, input logic [31:0] d, input logic [3:0] be = 4'hF);
    reg_addr = RA_W'(idx); reg_wdata = d; reg_be = be; reg_wr = 1'b1;
    @(posedge clk); #1 reg_wr = 1'b0;
  endtask

  task automatic rd(input logic [RA_W-1:0] a, output logic [31:0] d);
    reg_addr = a; reg_rd = 1'b1;
    @(posedge clk); #1 reg_rd = 1'b0;
    d = reg_rdata;
  endtask

  // one memory entry, as 41 bits
  task automatic rd_entry(input int unsigned e, output logic [W:0] v);
    logic [31:0] lo, hi;
    rd(MEM | RA_W'(e << 1), lo);
    rd(MEM | RA_W'((e << 1) | 1), hi);
    v = {hi[W-32:0], lo};
  endtask

  // value word and count word of the memory format
  function automatic logic [W:0] vw(input logic [W-1:0] v); return {1'b0, v}; endfunction
  function automatic logic [W:0] cw(input int unsigned n); return {1'b1, W'(n - 2)}; endfunction

  task automatic expect_words(input logic [W:0] exp[$], input string name);
    logic [31:0] cnt;
    logic [W:0] got;
    bit ok = 1;
    rd(RA_W'(LA_REG_COUNT), cnt);
    check(cnt == 32'(exp.size()), $sformatf("%s: %0d words, expected %0d", name, cnt, exp.size()));
    foreach (exp[k]) begin
      rd_entry(k, got);
      if (got != exp[k]) begin
        ok = 0; $display("  %s word %0d = %h expected %h", name, k, got, exp[k]);
      end
    end
    check(ok, {name, ": memory contents"});
  endtask

  task automatic play(input logic [W-1:0] s[$]);
    foreach (s[k]) begin probe = s[k]; @(posedge clk); #1; end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [W-1:0] s[$];
    logic [W:0] e[$];
    rst = 1; reg_wr = 0; reg_rd = 0; reg_addr = '0; reg_be = '0; reg_wdata = '0; probe = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;

    // registers
    rd(RA_W'(LA_REG_INFO), d);
    check(d == {16'd5, 16'd40}, $sformatf("INFO gives probe width and log2 depth %h", d));
    wr(LA_REG_MAXREP, 32'h1234_5678);
    wr(LA_REG_MAXREP, 32'hAAAA_AAAA, 4'b0100);
    rd(RA_W'(LA_REG_MAXREP), d);
    check(d == 32'h12AA_5678, "byte-enabled write of MAX_REP");
    wr(LA_REG_TVAL + 1, 32'h0000_00C3);
    rd(RA_W'(LA_REG_TVAL + 1), d);
    check(d == 32'hC3, "upper slice of TRIG_VALUE");
    rd(RA_W'(LA_REG_CTRL), d);
    check(d == 32'd1, "RLC on, CED off after reset");
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'd0 && state == LA_IDLE, "idle after reset");
    wr(LA_REG_MAXREP, 0);

    // pattern trigger on bits 39..32 = C3, RLC capture, stop
    wr(LA_REG_TVAL, 0); wr(LA_REG_TMSK, 0); wr(LA_REG_TMSK + 1, 32'hFF);
    wr(LA_REG_CMD, 1);
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'd1, "status armed");
    s = {40'h00_0000_0001, 40'h11_0000_0002, 40'hC3_0000_0010, 40'hC3_0000_0010,
         40'hC3_0000_0010, 40'h00_0000_0007, 40'h00_0000_0007, 40'h00_0000_0008};
    play(s);
    probe = 40'h00_0000_0008;
    repeat (3) @(posedge clk);
    #1;
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'd2, "status capturing");
    wr(LA_REG_CMD, 4);
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'd4, "status done after stop");
    // trigger sample C3..10 is kept, earlier ones are not; the final 08 ran
    // for the 1 sample of s plus the samples until the stop reached the core
    e = {vw(40'hC3_0000_0010), cw(3), vw(40'h7), cw(2), vw(40'h8)};
    begin
      logic [W:0] last_cnt;
      logic [31:0] cnt;
      rd(RA_W'(LA_REG_COUNT), cnt);
      check(cnt == 6, "pattern trigger: 6 words");
      for (int k = 0; k < 5; k++) begin
        rd_entry(k, last_cnt);
        check(last_cnt == e[k], $sformatf("pattern trigger: word %0d = %h", k, last_cnt));
      end
      rd_entry(5, last_cnt);
      check(last_cnt[W] == 1'b1 && last_cnt[W-1:0] >= 2, "pattern trigger: repeat count of the last state");
    end

    // forced trigger, CED keeps bit0 = 1 samples only, RLC off
    wr(LA_REG_CTRL, 32'd2);
    wr(LA_REG_CVAL, 32'd1); wr(LA_REG_CMSK, 32'd1);
    wr(LA_REG_CMD, 1);
    repeat (4) @(posedge clk);
    #1;
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'd1, "armed, no pattern match (trigger wants C3)");
    probe = 40'h2;
    wr(LA_REG_CMD, 2);
    s = {40'h2, 40'h3, 40'h4, 40'h5, 40'h5, 40'h6, 40'h9};
    play(s);
    probe = 40'h2;
    repeat (2) @(posedge clk);
    #1;
    wr(LA_REG_CMD, 4);
    e = {vw(40'h3), vw(40'h5), vw(40'h5), vw(40'h9)};
    expect_words(e, "CED");

    // repeat limit 3, RLC on, CED off
    wr(LA_REG_CTRL, 32'd1);
    wr(LA_REG_MAXREP, 3);
    probe = 40'hA;
    wr(LA_REG_CMD, 3);                        // arm and force in one write
    s = {40'hA, 40'hA, 40'hA, 40'hA, 40'hA, 40'hA, 40'hB, 40'hB, 40'hC};
    play(s);
    probe = 40'hC;
    repeat (3) @(posedge clk);
    #1;
    wr(LA_REG_CMD, 4);
    e = {vw(40'hA), cw(3), vw(40'hB), cw(2), vw(40'hC), cw(3)};
    expect_words(e, "repeat limit");
    wr(LA_REG_MAXREP, 0);

    // no compression: one word per clock, memory full, two-clock delay
    wr(LA_REG_CTRL, 32'd0);
    probe = 40'd100;
    wr(LA_REG_CMD, 3);
    // arm+force: capture starts with the sample present at the write's edge,
    // which reaches the memory two clocks later
    for (int k = 0; k < 40; k++) begin probe = 40'(101 + k); @(posedge clk); #1; end
    rd(RA_W'(LA_REG_CMD), d);
    check(d == 32'b1100, "done and full after 32 words");
    begin
      logic [W:0] first, lastw;
      rd_entry(0, first);
      rd_entry(31, lastw);
      check(first == vw(40'd100), $sformatf("first stored sample %0d", first));
      check(lastw == vw(40'd131), "one sample per clock, no gaps");
    end
    rd(RA_W'(LA_REG_COUNT), d);
    check(d == 32, "32 words used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
