// tb_la_rlc: self-checking test of the run-length encoder.
//
// A reference encoder written from the word format alone (group equal
// neighbouring samples, keep at most max_rep of them, split runs the counter
// cannot hold, emit a value word plus a count word of n-2 for n >= 2) gives
// the expected memory image, which is compared word by word with what the
// encoder wrote. Covered: the worked example 1,2,2,3,3,3,4,4,4,4 ->
// 01 02 80 03 81 04 82, one sample per clock, write latency of one clock,
// random streams with gaps and repeat limits, counter overflow, memory-full
// and the uncompressed mode.
module tb_la_rlc;
  localparam int unsigned W = 7;
  localparam int unsigned DEPTH_BIG = 512;
  localparam int unsigned DEPTH_SMALL = 16;
  localparam int unsigned CHUNK = (1 << W) - 1;  // longest run one count holds

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // two encoders: a large one for random streams, a small one for "full"
  logic          clear, en;
  logic [31:0]   max_rep;
  logic          in_valid;
  logic [W-1:0]  in_data;
  logic          we_b, we_s, full_b, full_s;
  logic [8:0]    waddr_b;
  logic [3:0]    waddr_s;
  logic [W:0]    wdata_b, wdata_s;
  logic [9:0]    cnt_b;
  logic [4:0]    cnt_s;

  la_rlc #(.PROBE_W(W), .DEPTH(DEPTH_BIG)) dut_b (
    .clk, .rst, .clear, .en, .max_rep, .in_valid, .in_data,
    .we(we_b), .waddr(waddr_b), .wdata(wdata_b), .word_count(cnt_b), .full(full_b));
  la_rlc #(.PROBE_W(W), .DEPTH(DEPTH_SMALL)) dut_s (
    .clk, .rst, .clear, .en, .max_rep, .in_valid, .in_data,
    .we(we_s), .waddr(waddr_s), .wdata(wdata_s), .word_count(cnt_s), .full(full_s));

  logic [W:0] mem_b [DEPTH_BIG];
  logic [W:0] mem_s [DEPTH_SMALL];
  int writes_b;
  always @(posedge clk) begin
    if (we_b) begin mem_b[waddr_b] <= wdata_b; writes_b++; end
    if (we_s) mem_s[waddr_s] <= wdata_s;
  end

  // reference encoder
  function automatic void ref_encode(input logic [W-1:0] s[$], input int unsigned mr,
                                     input bit rlc, ref logic [W:0] words[$]);
    int i = 0;
    words = {};
    while (i < s.size()) begin
      int n = 1;
      int keep;
      if (!rlc) begin
        words.push_back({1'b0, s[i]});
        i++;
        continue;
      end
      while (i + n < s.size() && s[i+n] == s[i]) n++;
      // runs longer than the counter are cut into chunks, each a new run
      for (int left = n; left > 0; left -= CHUNK) begin
        int len = (left > CHUNK) ? CHUNK : left;
        keep = (mr != 0 && len > mr) ? mr : len;
        words.push_back({1'b0, s[i]});
        if (keep >= 2) words.push_back({1'b1, W'(keep - 2)});
      end
      i += n;
    end
  endfunction

  task automatic do_clear();
    @(posedge clk); #1 clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
  endtask

  task automatic feed(input logic [W-1:0] s[$], input int gap_pct);
    foreach (s[k]) begin
      while ($urandom_range(99) < gap_pct) begin
        in_valid = 1'b0;
        @(posedge clk); #1;
      end
      in_valid = 1'b1;
      in_data  = s[k];
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    @(posedge clk); #1;
    @(posedge clk); #1;
  endtask

  task automatic compare_big(input logic [W-1:0] s[$], input int unsigned mr, input bit rlc,
                             input string name);
    logic [W:0] exp[$];
    bit ok = 1;
    ref_encode(s, mr, rlc, exp);
    check(cnt_b == 10'(exp.size()), $sformatf("%s: word count %0d, expected %0d", name, cnt_b, exp.size()));
    foreach (exp[k]) if (mem_b[k] !== exp[k]) begin
      ok = 0;
      $display("  %s word %0d = %h, expected %h", name, k, mem_b[k], exp[k]);
    end
    check(ok, $sformatf("%s: memory image", name));
    check(!full_b, $sformatf("%s: no overflow", name));
  endtask

  initial begin
    #2_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] s[$];
    rst = 1'b1; clear = 1'b0; en = 1'b1; max_rep = 0; in_valid = 1'b0; in_data = '0;
    writes_b = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    // 1. worked example, one sample per clock
    s = {7'd1, 7'd2, 7'd2, 7'd3, 7'd3, 7'd3, 7'd4, 7'd4, 7'd4, 7'd4};
    do_clear();
    writes_b = 0;
    foreach (s[k]) begin
      in_valid = 1'b1; in_data = s[k];
      @(posedge clk);
      // the write for this sample appears in the next clock
      #1;
      check(we_b == 1'b1, $sformatf("example: write one clock after sample %0d", k));
    end
    in_valid = 1'b0;
    @(posedge clk); #1;
    check(writes_b == 10, "example: one memory write per sample");
    check(cnt_b == 10'd7, "example: 7 words");
    check({mem_b[0], mem_b[1], mem_b[2], mem_b[3], mem_b[4], mem_b[5], mem_b[6]} ==
          {8'h01, 8'h02, 8'h80, 8'h03, 8'h81, 8'h04, 8'h82}, "example: 01 02 80 03 81 04 82");

    // 2. random streams with gaps, repeat limits and a counter overflow
    for (int t = 0; t < 12; t++) begin
      int unsigned mr;
      int unsigned opts[5] = '{0, 1, 2, 3, 5};
      mr = opts[t % 5];
      s = {};
      for (int k = 0; k < 120; k++) begin
        logic [W-1:0] v;
        int rl;
        v  = W'($urandom_range(3));
        rl = $urandom_range(7);
        repeat (rl) s.push_back(v);
      end
      if (t == 0) repeat (300) s.push_back(7'h55);  // longer than one count holds
      max_rep = mr;
      do_clear();
      feed(s, (t % 3) * 20);
      compare_big(s, mr, 1'b1, $sformatf("random %0d (max_rep %0d)", t, mr));
    end

    // 3. uncompressed mode
    en = 1'b0; max_rep = 0;
    s = {};
    for (int k = 0; k < 40; k++) s.push_back(W'($urandom_range(1)));
    do_clear();
    feed(s, 10);
    compare_big(s, 0, 1'b0, "RLC off");
    en = 1'b1;

    // 4. memory full: 20 different values into 16 words
    s = {};
    for (int k = 0; k < 20; k++) s.push_back(W'(k + 1));
    do_clear();
    feed(s, 0);
    check(full_s, "small: full after 16 values");
    check(cnt_s == 5'd16, "small: 16 words used");
    begin
      bit ok = 1;
      for (int k = 0; k < 16; k++) if (mem_s[k] != {1'b0, W'(k + 1)}) ok = 0;
      check(ok, "small: first 16 values kept");
    end
    // 5. full with an open count word: 14 values then a repeated value
    s = {};
    for (int k = 0; k < 14; k++) s.push_back(W'(k + 1));
    s.push_back(7'd9); s.push_back(7'd9); s.push_back(7'd9); s.push_back(7'd10);
    do_clear();
    check(!full_s && cnt_s == 0, "clear empties the encoder");
    feed(s, 0);
    check(cnt_s == 5'd16 && mem_s[15] == 8'h81, "small: count word in the last slot");
    check(full_s, "small: value after the last count word overflows");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
