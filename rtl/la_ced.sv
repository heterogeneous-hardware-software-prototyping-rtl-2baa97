// la_ced: Clock Enable logic for captured Data (CED) of the LA_RCS analyser.
//
// A sample of the probed signals is passed on to the capture memory only on
// clock edges where the probe matches a programmed pattern: every probe bit
// whose mask bit is 1 must equal the corresponding value bit, bits with mask 0
// are "don't care". With the CED switched off every clock edge is a capture
// edge. Typical use is capturing only edges where a bus acknowledge is active,
// or only bus cycles whose address falls in one device's range.
//
// Interface: en (CED on), probe, value, mask; sample_en is the result.
// Timing: purely combinational, the caller registers the probe.
// The value/mask comparison follows the described CED; the bitwise mask
// format is this design's choice.
module la_ced #(
  parameter int unsigned PROBE_W = 64
) (
  input  logic               en,
  input  logic [PROBE_W-1:0] probe,
  input  logic [PROBE_W-1:0] value,
  input  logic [PROBE_W-1:0] mask,
  output logic               sample_en
);
  always_comb begin
    sample_en = !en || (((probe ^ value) & mask) == '0);
  end
endmodule
