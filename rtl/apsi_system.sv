// apsi_system: FPGA side of the APSI PC-controlled prototyping system.
//
// A PC drives the board through its parallel port in EPP mode. Inside the
// FPGA, the bridge opb_epp turns the PC's byte cycles into OPB transfers, so
// the PC can load and read memories, exercise peripherals and control two
// independent LA_RCS internal logic analysers (opb_la) that sit on the same
// OPB, each tracing its own PROBE_W-bit group of design signals. The OPB is the
// usual OR-combined bus: every master and slave drives zeros when inactive.
// The rest of the system (processor, memory controller, peripherals under
// test, the OPB arbiter) is outside this module and connects through the
// external master, slave and arbitration ports.
//
// Beside it stands the Wishbone flavour of the same idea: a second parallel
// port, the Wishbone bridge epp, one Wishbone LA_RCS (wb_la) and an external
// Wishbone slave port that receives every access outside the analyser window.
//
// Address map: OPB analysers at LA0_BASE and LA1_BASE, Wishbone analyser at
// WB_LA_BASE, each with a window of 2**(la_core.RA_W+2) bytes (32 KiB at the
// default sizes); everything else goes to the external slave ports.
// One clock (clk) and one synchronous active-high reset (rst) for all logic.
// Two analysers on one bus and the bridge as the only PC link follow the
// described example systems; the address map and external ports are this
// design's choices.
module apsi_system
  import apsi_pkg::*;
#(
  parameter int unsigned PROBE_W    = 64,
  parameter int unsigned DEPTH      = 1024,
  parameter logic [31:0] LA0_BASE   = 32'h8000_0000,
  parameter logic [31:0] LA1_BASE   = 32'h8001_0000,
  parameter logic [31:0] WB_LA_BASE = 32'h8000_0000
) (
  input  logic               clk,
  input  logic               rst,
  // parallel port of the OPB system
  input  logic               epp_nwrite,
  input  logic               epp_ndstrb,
  input  logic               epp_nastrb,
  input  logic [7:0]         epp_din,
  output logic [7:0]         epp_dout,
  output logic               epp_doe,
  output logic               epp_wait,
  // OPB arbitration for the bridge (arbiter outside)
  output logic               epp_M_request,
  input  logic               epp_OPB_MGrant,
  // other OPB masters, already OR-combined (zero when idle)
  input  logic               ext_M_select,
  input  logic               ext_M_RNW,
  input  logic [31:0]        ext_M_ABus,
  input  logic [3:0]         ext_M_BE,
  input  logic [31:0]        ext_M_DBus,
  // the OPB as seen by slaves and masters
  output logic               OPB_select,
  output logic               OPB_RNW,
  output logic [31:0]        OPB_ABus,
  output logic [3:0]         OPB_BE,
  output logic [31:0]        OPB_DBus,
  output logic               OPB_xferAck,
  // other OPB slaves, already OR-combined (zero when idle)
  input  logic [31:0]        ext_Sl_DBus,
  input  logic               ext_Sl_xferAck,
  input  logic               ext_Sl_errAck,
  input  logic               ext_Sl_retry,
  input  logic               ext_Sl_toutSup,
  // traced signals of the two OPB analysers
  input  logic [PROBE_W-1:0] probe0,
  input  logic [PROBE_W-1:0] probe1,
  output la_state_e          la0_state,
  output la_state_e          la1_state,
  // parallel port of the Wishbone system
  input  logic               wepp_nwrite,
  input  logic               wepp_ndstrb,
  input  logic               wepp_nastrb,
  input  logic [7:0]         wepp_din,
  output logic [7:0]         wepp_dout,
  output logic               wepp_doe,
  output logic               wepp_wait,
  // external Wishbone slave
  output logic               wb_cyc_o,
  output logic               wb_stb_o,
  output logic               wb_we_o,
  output logic [31:0]        wb_adr_o,
  output logic [3:0]         wb_sel_o,
  output logic [31:0]        wb_dat_o,
  input  logic [31:0]        wb_dat_i,
  input  logic               wb_ack_i,
  input  logic               wb_err_i,
  // traced signals of the Wishbone analyser
  input  logic [PROBE_W-1:0] probe2,
  output la_state_e          la2_state
);
  // ------------------------------------------------------------ OPB system
  logic        m_select, m_rnw;
  logic [31:0] m_abus, m_dbus;
  logic [3:0]  m_be;
  logic [31:0] la0_dbus, la1_dbus;
  logic        la0_ack, la1_ack;

  always_comb begin
    OPB_select  = m_select | ext_M_select;
    OPB_RNW     = m_rnw    | ext_M_RNW;
    OPB_ABus    = m_abus   | ext_M_ABus;
    OPB_BE      = m_be     | ext_M_BE;
    OPB_DBus    = m_dbus   | ext_M_DBus | la0_dbus | la1_dbus | ext_Sl_DBus;
    OPB_xferAck = la0_ack  | la1_ack    | ext_Sl_xferAck;
  end

  opb_epp u_opb_epp (
    .OPB_Clk(clk), .OPB_Rst(rst),
    .epp_nwrite, .epp_ndstrb, .epp_nastrb, .epp_din, .epp_dout, .epp_doe, .epp_wait,
    .M_request(epp_M_request), .M_select(m_select), .M_RNW(m_rnw),
    .M_ABus(m_abus), .M_BE(m_be), .M_DBus(m_dbus),
    .OPB_MGrant(epp_OPB_MGrant), .OPB_DBus, .OPB_xferAck,
    .OPB_errAck(ext_Sl_errAck), .OPB_retry(ext_Sl_retry), .OPB_toutSup(ext_Sl_toutSup)
  );

  opb_la #(.PROBE_W(PROBE_W), .DEPTH(DEPTH), .C_BASEADDR(LA0_BASE)) u_la0 (
    .OPB_Clk(clk), .OPB_Rst(rst),
    .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW, .OPB_select,
    .Sl_DBus(la0_dbus), .Sl_xferAck(la0_ack),
    .probe(probe0), .la_state(la0_state)
  );

  opb_la #(.PROBE_W(PROBE_W), .DEPTH(DEPTH), .C_BASEADDR(LA1_BASE)) u_la1 (
    .OPB_Clk(clk), .OPB_Rst(rst),
    .OPB_ABus, .OPB_BE, .OPB_DBus, .OPB_RNW, .OPB_select,
    .Sl_DBus(la1_dbus), .Sl_xferAck(la1_ack),
    .probe(probe1), .la_state(la1_state)
  );

  // ------------------------------------------------------- Wishbone system
  logic        w_cyc, w_stb, w_we, w_ack, w_err, la2_hit, la2_ack;
  logic [31:0] w_adr, w_dat_m, w_dat_s, la2_dat;
  logic [3:0]  w_sel;

  epp u_epp (
    .clk_i(clk), .rst_i(rst),
    .epp_nwrite(wepp_nwrite), .epp_ndstrb(wepp_ndstrb), .epp_nastrb(wepp_nastrb),
    .epp_din(wepp_din), .epp_dout(wepp_dout), .epp_doe(wepp_doe), .epp_wait(wepp_wait),
    .cyc_o(w_cyc), .stb_o(w_stb), .we_o(w_we), .adr_o(w_adr), .sel_o(w_sel),
    .dat_o(w_dat_m), .dat_i(w_dat_s), .ack_i(w_ack), .err_i(w_err)
  );

  wb_la #(.PROBE_W(PROBE_W), .DEPTH(DEPTH), .C_BASEADDR(WB_LA_BASE)) u_la2 (
    .clk_i(clk), .rst_i(rst),
    .cyc_i(w_cyc), .stb_i(w_stb), .we_i(w_we), .adr_i(w_adr), .sel_i(w_sel),
    .dat_i(w_dat_m), .dat_o(la2_dat), .ack_o(la2_ack), .hit_o(la2_hit),
    .probe(probe2), .la_state(la2_state)
  );

  always_comb begin
    wb_cyc_o = w_cyc && !la2_hit;
    wb_stb_o = w_stb && !la2_hit;
    wb_we_o  = w_we;
    wb_adr_o = w_adr;
    wb_sel_o = w_sel;
    wb_dat_o = w_dat_m;
    w_dat_s  = la2_hit ? la2_dat : wb_dat_i;
    w_ack    = la2_hit ? la2_ack : wb_ack_i;
    w_err    = !la2_hit && wb_err_i;
  end
endmodule
