// tb_wb_la: self-checking test of the Wishbone analyser at its default size,
// through a behavioural Wishbone master. Checks: hit_o decoding, ack on the
// third edge after cyc/stb, byte selects on register writes, and a capture
// with the clock enable logic keeping only samples whose low bit (a bus
// acknowledge, say) is 1, with run-length coding switched on, read back
// through the memory window.
module tb_wb_la;
  import apsi_pkg::*;
  localparam logic [31:0] BASE = 32'h8000_0000;
  localparam logic [31:0] MEMB = BASE + 32'h4000;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst, cyc, stb, we, ack, hit;
  logic [31:0] adr, dat_m, dat_s;
  logic [3:0] sel;
  logic [63:0] probe;
  la_state_e la_state;
  int checks = 0, failures = 0;

  wb_la dut (.clk_i(clk), .rst_i(rst), .cyc_i(cyc), .stb_i(stb), .we_i(we), .adr_i(adr),
    .sel_i(sel), .dat_i(dat_m), .dat_o(dat_s), .ack_o(ack), .hit_o(hit), .probe, .la_state);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input logic [31:0] a, input bit w, input logic [31:0] d,
                      input logic [3:0] s, output logic [31:0] q);
    int lat = 0;
    adr = a; we = w; dat_m = d; sel = s; cyc = 1; stb = 1;
    do begin @(posedge clk); lat++; end while (!ack && lat < 20);
    check(lat == 3, $sformatf("ack latency %0d at %h", lat, a));
    q = dat_s;
    #1 cyc = 0; stb = 0; we = 0;
    @(posedge clk); #1;
  endtask

  task automatic wr(input int unsigned idx, input logic [31:0] d, input logic [3:0] s = 4'hF);
    logic [31:0] q;
    xfer(BASE + 32'(idx * 4), 1, d, s, q);
  endtask

  task automatic rd_entry(input int unsigned e, output logic [64:0] v);
    logic [31:0] s0, s1, s2;
    xfer(MEMB + 32'(e * 16), 0, '0, 4'hF, s0);
    xfer(MEMB + 32'(e * 16 + 4), 0, '0, 4'hF, s1);
    xfer(MEMB + 32'(e * 16 + 8), 0, '0, 4'hF, s2);
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
    logic [63:0] seq [12];
    rst = 1; cyc = 0; stb = 0; we = 0; adr = '0; dat_m = '0; sel = '0; probe = '0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    adr = 32'h8000_7FFC; #1 check(hit, "hit inside the window");
    adr = 32'h8000_8000; #1 check(!hit, "no hit outside the window");
    wr(LA_REG_CVAL, 32'hFFFF_FFFF);
    wr(LA_REG_CVAL, 32'h0000_0000, 4'b0001);
    xfer(BASE + 32'(LA_REG_CVAL * 4), 0, '0, 4'hF, q);
    check(q == 32'hFFFF_FF00, "byte select on write");
    wr(LA_REG_CVAL, 32'd1);
    wr(LA_REG_CMSK, 32'd1);
    wr(LA_REG_CTRL, 32'd3);          // RLC and CED on
    wr(LA_REG_CMD, 3);               // arm and force
    // bit 0 marks the samples to keep
    seq = '{64'h10, 64'h21, 64'h21, 64'h30, 64'h21, 64'h40, 64'h51, 64'h51, 64'h51,
            64'h60, 64'h70, 64'h80};
    foreach (seq[k]) begin probe = seq[k]; @(posedge clk); #1; end
    probe = 64'h0;
    repeat (2) @(posedge clk);
    #1;
    wr(LA_REG_CMD, 4);
    xfer(BASE + 32'(LA_REG_COUNT * 4), 0, '0, 4'hF, q);
    // kept: 21 21 21 51 51 51 -> 21, count 3 (three in a row once the
    // unkept samples are gone), 51, count 3
    check(q == 4, $sformatf("4 words (%0d)", q));
    rd_entry(0, v); check(v == {1'b0, 64'h21}, "entry 0");
    rd_entry(1, v); check(v == {1'b1, 64'd1}, "entry 1");
    rd_entry(2, v); check(v == {1'b0, 64'h51}, "entry 2");
    rd_entry(3, v); check(v == {1'b1, 64'd1}, "entry 3");
    check(la_state == LA_DONE, "done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
