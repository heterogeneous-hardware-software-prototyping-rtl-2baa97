// tb_la_ced: self-checking test of the clock enable logic. Random probe,
// value and mask words at the default width are checked against a bit-by-bit
// reference; near-miss cases (one masked bit wrong, one unmasked bit wrong)
// are forced so both outcomes are seen often.
module tb_la_ced;
  localparam int unsigned W = 64;
  logic en, sample_en;
  logic [W-1:0] probe, value, mask;
  int checks = 0, failures = 0;

  la_ced #(.PROBE_W(W)) dut (.en, .probe, .value, .mask, .sample_en);

  function automatic bit ref_match(input logic [W-1:0] p, v, m);
    for (int i = 0; i < W; i++) if (m[i] && (p[i] != v[i])) return 0;
    return 1;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hits = 0, misses = 0;
    for (int t = 0; t < 2000; t++) begin
      en    = (t % 7) != 0;
      value = {$urandom, $urandom};
      mask  = {$urandom, $urandom} & {$urandom, $urandom};
      probe = value ^ ({$urandom, $urandom} & ~mask);  // matches
      if (t % 3 == 1) probe[$urandom_range(W-1)] ^= 1'b1;      // maybe a miss
      if (t % 5 == 2) probe = {$urandom, $urandom};
      #1;
      checks++;
      if (sample_en != (!en || ref_match(probe, value, mask))) begin
        failures++;
        $display("FAIL: t=%0d en=%b probe=%h value=%h mask=%h got %b", t, en, probe, value, mask, sample_en);
      end
      if (sample_en) hits++; else misses++;
    end
    checks++;
    if (hits < 100 || misses < 100) begin
      failures++;
      $display("FAIL: too few hits (%0d) or misses (%0d)", hits, misses);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
