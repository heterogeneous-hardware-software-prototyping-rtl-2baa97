// epp: Wishbone version of the parallel-port bridge. It behaves like opb_epp
// but is a Wishbone (classic, single-cycle handshake) master.
//
// Each EPP data cycle (see epp_port) becomes one Wishbone byte access: cyc_o
// and stb_o are raised together with the address, one select bit, direction
// and, for writes, the byte on its lane, and held until the slave answers with
// ack_i or err_i. If no answer comes within TIMEOUT cycles the access is
// abandoned as an error so that a missing slave cannot hang the PC. Byte lanes
// are little-endian (offset 0 = bits 7..0, sel_o[0]).
// Timing: cyc/stb from the cycle after the EPP cycle is decoded; done in the
// cycle after the acknowledge.
// The bridge's existence and role are those of the described system; the
// Wishbone sequence and the timeout are this design's choices.
module epp
  import apsi_pkg::*;
#(
  parameter int unsigned TIMEOUT = 16
) (
  input  logic        clk_i,
  input  logic        rst_i,
  // parallel port, EPP mode
  input  logic        epp_nwrite,
  input  logic        epp_ndstrb,
  input  logic        epp_nastrb,
  input  logic [7:0]  epp_din,
  output logic [7:0]  epp_dout,
  output logic        epp_doe,
  output logic        epp_wait,
  // Wishbone master
  output logic        cyc_o,
  output logic        stb_o,
  output logic        we_o,
  output logic [31:0] adr_o,
  output logic [3:0]  sel_o,
  output logic [31:0] dat_o,
  input  logic [31:0] dat_i,
  input  logic        ack_i,
  input  logic        err_i
);
  typedef enum logic [1:0] {W_IDLE, W_XFER, W_DONE} wstate_e;

  logic        bus_req, bus_we, bus_done, bus_err;
  logic [31:0] bus_addr;
  logic [7:0]  bus_wdata, bus_rdata;
  wstate_e     st;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;

  epp_port u_epp (
    .clk(clk_i), .rst(rst_i),
    .epp_nwrite, .epp_ndstrb, .epp_nastrb, .epp_din, .epp_dout, .epp_doe, .epp_wait,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_done, .bus_rdata, .bus_err
  );

  always_comb begin
    bus_done = (st == W_DONE);
    cyc_o    = (st == W_XFER);
    stb_o    = cyc_o;
    we_o     = cyc_o && bus_we;
    adr_o    = bus_addr;
    sel_o    = wb_sel(bus_addr[1:0]);
    dat_o    = wb_lane_put(bus_addr[1:0], bus_wdata);
  end

  always_ff @(posedge clk_i) begin
    if (rst_i) begin
      st        <= W_IDLE;
      tcnt      <= '0;
      bus_rdata <= '0;
      bus_err   <= 1'b0;
    end else begin
      unique case (st)
        W_IDLE: if (bus_req) begin
          st   <= W_XFER;
          tcnt <= '0;
        end
        W_XFER: begin
          tcnt <= tcnt + 1'b1;
          if (ack_i) begin
            bus_rdata <= wb_lane_get(bus_addr[1:0], dat_i);
            bus_err   <= 1'b0;
            st        <= W_DONE;
          end else if (err_i || (32'(tcnt) >= TIMEOUT - 1)) begin
            bus_rdata <= 8'hFF;
            bus_err   <= 1'b1;
            st        <= W_DONE;
          end
        end
        default: st <= W_IDLE;
      endcase
    end
  end

  // Wishbone rule: an acknowledge only answers a strobe.
  a_ack_needs_stb: assert property (@(posedge clk_i) disable iff (rst_i) ack_i |-> stb_o);
endmodule
