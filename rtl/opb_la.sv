// opb_la: LA_RCS logic analyser with its control interface as an OPB slave.
//
// The analyser (la_core) captures PROBE_W signals of the design under test;
// the PC, through the parallel-port bridge or any other OPB master, sets the
// trigger and clock-enable patterns, arms the analyser and reads the captured
// memory back. Several independent analysers can share one OPB, each with its
// own base address.
//
// The slave answers every access whose address lies in its window of
// 2**(la_core.RA_W+2) bytes starting at C_BASEADDR (which must be aligned to
// the window size). An access is decoded in the first cycle of M_select, the
// register or memory is read in the next one, and Sl_xferAck is given (with
// the read data on Sl_DBus) in the third; Sl_DBus is zero at all other times
// so it can be OR-combined onto the OPB. Byte enables are honoured on writes;
// reads return the whole 32-bit word.
// The slave's timing and decoding are this design's choices.
module opb_la
  import apsi_pkg::*;
#(
  parameter int unsigned  PROBE_W    = 64,
  parameter int unsigned  DEPTH      = 1024,
  parameter logic [31:0]  C_BASEADDR = 32'h8000_0000,
  localparam int unsigned EW         = (PROBE_W + 1 + 31) / 32,
  localparam int unsigned SW         = (EW > 1) ? $clog2(EW) : 0,
  localparam int unsigned AW         = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RA_W       = AW + SW + 1
) (
  input  logic               OPB_Clk,
  input  logic               OPB_Rst,
  input  logic [31:0]        OPB_ABus,
  input  logic [3:0]         OPB_BE,
  input  logic [31:0]        OPB_DBus,
  input  logic               OPB_RNW,
  input  logic               OPB_select,
  output logic [31:0]        Sl_DBus,
  output logic               Sl_xferAck,
  input  logic [PROBE_W-1:0] probe,
  output la_state_e          la_state
);
  localparam logic [31:0] WIN_MASK = ~((32'd1 << (RA_W + 2)) - 32'd1);

  logic              hit, start, busy_q, ack_q;
  logic [31:0]       dbus_q, reg_rdata;

  always_comb begin
    hit   = (OPB_ABus & WIN_MASK) == (C_BASEADDR & WIN_MASK);
    start = OPB_select && hit && !busy_q && !ack_q;
  end

  la_core #(.PROBE_W(PROBE_W), .DEPTH(DEPTH)) u_core (
    .clk(OPB_Clk), .rst(OPB_Rst), .probe,
    .reg_addr(OPB_ABus[RA_W+1:2]),
    .reg_wr(start && !OPB_RNW), .reg_be(OPB_BE), .reg_wdata(OPB_DBus),
    .reg_rd(start && OPB_RNW), .reg_rdata,
    .state(la_state)
  );

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      busy_q <= 1'b0;
      ack_q  <= 1'b0;
      dbus_q <= '0;
    end else begin
      busy_q <= start;
      ack_q  <= busy_q;
      dbus_q <= (busy_q && OPB_RNW) ? reg_rdata : '0;
    end
  end

  always_comb begin
    Sl_xferAck = ack_q;
    Sl_DBus    = ack_q ? dbus_q : '0;
  end
endmodule
