// wb_la: LA_RCS logic analyser with its control interface as a Wishbone slave.
//
// Same analyser as opb_la (see la_core for the registers and memory layout),
// for systems built around the Wishbone bus and the Wishbone bridge epp. The
// slave decodes its window of 2**(la_core.RA_W+2) bytes at C_BASEADDR itself;
// an access (cyc_i and stb_i) is decoded in its first cycle and acknowledged
// two cycles later, with the read data on dat_o during ack_o. sel_i selects
// the written bytes; reads return the whole word.
// The slave's timing and decoding are this design's choices.
module wb_la
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
  input  logic               clk_i,
  input  logic               rst_i,
  input  logic               cyc_i,
  input  logic               stb_i,
  input  logic               we_i,
  input  logic [31:0]        adr_i,
  input  logic [3:0]         sel_i,
  input  logic [31:0]        dat_i,
  output logic [31:0]        dat_o,
  output logic               ack_o,
  output logic               hit_o,
  input  logic [PROBE_W-1:0] probe,
  output la_state_e          la_state
);
  localparam logic [31:0] WIN_MASK = ~((32'd1 << (RA_W + 2)) - 32'd1);

  logic        start, busy_q, ack_q;
  logic [31:0] reg_rdata;

  always_comb begin
    hit_o = (adr_i & WIN_MASK) == (C_BASEADDR & WIN_MASK);
    start = cyc_i && stb_i && hit_o && !busy_q && !ack_q;
  end

  la_core #(.PROBE_W(PROBE_W), .DEPTH(DEPTH)) u_core (
    .clk(clk_i), .rst(rst_i), .probe,
    .reg_addr(adr_i[RA_W+1:2]),
    .reg_wr(start && we_i), .reg_be(sel_i), .reg_wdata(dat_i),
    .reg_rd(start && !we_i), .reg_rdata,
    .state(la_state)
  );

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      busy_q <= 1'b0;
      ack_q  <= 1'b0;
      dat_o  <= '0;
    end else begin
      busy_q <= start;
      ack_q  <= busy_q;
      dat_o  <= busy_q ? reg_rdata : '0;
    end
  end

  always_comb ack_o = ack_q;
endmodule
