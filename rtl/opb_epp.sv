// opb_epp: bridge from the PC parallel port (EPP mode) to the On-chip
// Peripheral Bus (OPB). It is an OPB master, so the PC can read and write
// every OPB slave (memories, peripherals, the LA_RCS analysers) without a
// processor in the system, or test a peripheral in place of the processor.
//
// Each EPP data cycle becomes one OPB byte transfer (see epp_port for the EPP
// side). The master requests the bus (M_request) and, once OPB_MGrant has
// been seen, drives M_select with the address, byte enable, direction and, for
// writes, the byte on its lane, until the slave answers with OPB_xferAck or
// OPB_errAck. OPB_retry makes it release select and arbitrate again. If no
// answer comes within TIMEOUT cycles and no slave asserts OPB_toutSup, the
// transfer is abandoned as an error (the OPB bus timeout). All M_* outputs are
// zero outside the master's own transfer, as the OR-combined OPB requires.
// Byte lanes follow the OPB big-endian convention (offset 0 = bits 31..24,
// enabled by M_BE[3]).
// Timing: request in the cycle after the EPP cycle is decoded; select from
// the cycle after the grant; done in the cycle after the acknowledge.
// The bridge's role and name are those of the described system; the transfer
// sequence is the usual OPB master protocol, chosen here.
module opb_epp
  import apsi_pkg::*;
#(
  parameter int unsigned TIMEOUT = OPB_TIMEOUT_CYCLES
) (
  input  logic        OPB_Clk,
  input  logic        OPB_Rst,
  // parallel port, EPP mode
  input  logic        epp_nwrite,
  input  logic        epp_ndstrb,
  input  logic        epp_nastrb,
  input  logic [7:0]  epp_din,
  output logic [7:0]  epp_dout,
  output logic        epp_doe,
  output logic        epp_wait,
  // OPB master
  output logic        M_request,
  output logic        M_select,
  output logic        M_RNW,
  output logic [31:0] M_ABus,
  output logic [3:0]  M_BE,
  output logic [31:0] M_DBus,
  input  logic        OPB_MGrant,
  input  logic [31:0] OPB_DBus,
  input  logic        OPB_xferAck,
  input  logic        OPB_errAck,
  input  logic        OPB_retry,
  input  logic        OPB_toutSup
);
  typedef enum logic [1:0] {M_IDLE, M_REQ, M_XFER, M_DONE} mstate_e;

  logic        bus_req, bus_we, bus_done, bus_err;
  logic [31:0] bus_addr;
  logic [7:0]  bus_wdata, bus_rdata;
  mstate_e     st;
  logic [$clog2(TIMEOUT+1)-1:0] tcnt;

  epp_port u_epp (
    .clk(OPB_Clk), .rst(OPB_Rst),
    .epp_nwrite, .epp_ndstrb, .epp_nastrb, .epp_din, .epp_dout, .epp_doe, .epp_wait,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_done, .bus_rdata, .bus_err
  );

  always_comb begin
    bus_done  = (st == M_DONE);
    M_request = (st == M_REQ);
    M_select  = (st == M_XFER);
    M_RNW     = M_select && !bus_we;
    M_ABus    = M_select ? bus_addr : '0;
    M_BE      = M_select ? opb_be(bus_addr[1:0]) : '0;
    M_DBus    = (M_select && bus_we) ? opb_lane_put(bus_addr[1:0], bus_wdata) : '0;
  end

  always_ff @(posedge OPB_Clk) begin
    if (OPB_Rst) begin
      st        <= M_IDLE;
      tcnt      <= '0;
      bus_rdata <= '0;
      bus_err   <= 1'b0;
    end else begin
      unique case (st)
        M_IDLE: if (bus_req) st <= M_REQ;
        M_REQ: if (OPB_MGrant) begin
          st   <= M_XFER;
          tcnt <= '0;
        end
        M_XFER: begin
          tcnt <= tcnt + 1'b1;
          if (OPB_xferAck) begin
            bus_rdata <= opb_lane_get(bus_addr[1:0], OPB_DBus);
            bus_err   <= 1'b0;
            st        <= M_DONE;
          end else if (OPB_errAck || (!OPB_toutSup && (32'(tcnt) >= TIMEOUT - 1))) begin
            bus_rdata <= 8'hFF;
            bus_err   <= 1'b1;
            st        <= M_DONE;
          end else if (OPB_retry) begin
            st <= M_REQ;
          end
        end
        default: st <= M_IDLE;  // M_DONE: one-cycle completion to epp_port
      endcase
    end
  end

  // OPB rule: a master drives select only while it owns the bus.
  a_select_after_grant: assert property (@(posedge OPB_Clk) disable iff (OPB_Rst)
    $rose(M_select) |-> $past(OPB_MGrant));
endmodule
