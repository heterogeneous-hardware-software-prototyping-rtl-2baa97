// epp_port: peripheral side of a PC parallel port in EPP mode, shared by the
// OPB bridge (opb_epp) and the Wishbone bridge (epp).
//
// The PC drives four kinds of EPP cycles. A cycle starts when the PC pulls
// the address strobe (nastrb) or the data strobe (ndstrb) low, with nwrite
// telling its direction; the peripheral answers by raising wait once the
// cycle is done (and, for a read, once the data is on the port), and drops
// wait again after the PC has released the strobe.
//   address write : shifts the byte into the 32-bit bus address from the
//                   right, so four address writes (most significant byte
//                   first) set a full address
//   address read  : returns the bridge status: bit0 = a bus transfer ended in
//                   an error since the last status read (cleared by the read)
//   data write    : one bus byte write to the current address
//   data read     : one bus byte read from the current address
// After every data cycle the address is incremented, so a block of bytes is
// moved with one address set-up followed by data cycles only.
//
// The strobes and nwrite are asynchronous and pass through two-flop
// synchronisers; the data byte is sampled in the same clock in which the
// synchronised strobe is seen low, at least two clocks after the PC set it.
// Bus side: bus_req stays high until the one-cycle bus_done; bus_we, bus_addr
// and bus_wdata are stable meanwhile; bus_rdata and bus_err are valid with
// bus_done.
// The three cycle kinds (address write, data write, data read) are those of
// the described bridge; the address register, auto-increment and the status
// byte are this design's choices.
module epp_port
  import apsi_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  // parallel port, EPP mode
  input  logic        epp_nwrite,
  input  logic        epp_ndstrb,
  input  logic        epp_nastrb,
  input  logic [7:0]  epp_din,
  output logic [7:0]  epp_dout,
  output logic        epp_doe,
  output logic        epp_wait,
  // bus master side
  output logic        bus_req,
  output logic        bus_we,
  output logic [31:0] bus_addr,
  output logic [7:0]  bus_wdata,
  input  logic        bus_done,
  input  logic [7:0]  bus_rdata,
  input  logic        bus_err
);
  typedef enum logic [1:0] {S_IDLE, S_BUS, S_ACK} state_e;

  state_e     st;
  logic [1:0] ds_sync, as_sync, wr_sync;
  logic       ds_low, as_low, is_write;
  logic       err_flag;
  epp_cycle_e cyc;

  always_ff @(posedge clk) begin
    if (rst) begin
      ds_sync <= 2'b11;
      as_sync <= 2'b11;
      wr_sync <= 2'b11;
    end else begin
      ds_sync <= {ds_sync[0], epp_ndstrb};
      as_sync <= {as_sync[0], epp_nastrb};
      wr_sync <= {wr_sync[0], epp_nwrite};
    end
  end

  always_comb begin
    ds_low   = !ds_sync[1];
    as_low   = !as_sync[1];
    is_write = !wr_sync[1];
    unique case ({ds_low, is_write})
      2'b00:   cyc = EPP_ADDR_RD;
      2'b01:   cyc = EPP_ADDR_WR;
      2'b10:   cyc = EPP_DATA_RD;
      default: cyc = EPP_DATA_WR;
    endcase
    bus_req = (st == S_BUS);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= S_IDLE;
      bus_addr  <= '0;
      bus_we    <= 1'b0;
      bus_wdata <= '0;
      epp_dout  <= '0;
      epp_doe   <= 1'b0;
      epp_wait  <= 1'b0;
      err_flag  <= 1'b0;
    end else begin
      unique case (st)
        S_IDLE: if (ds_low || as_low) begin
          unique case (cyc)
            EPP_ADDR_WR: begin
              bus_addr <= {bus_addr[23:0], epp_din};
              st       <= S_ACK;
            end
            EPP_ADDR_RD: begin
              epp_dout <= {7'd0, err_flag};
              epp_doe  <= 1'b1;
              err_flag <= 1'b0;
              st       <= S_ACK;
            end
            EPP_DATA_WR: begin
              bus_we    <= 1'b1;
              bus_wdata <= epp_din;
              st        <= S_BUS;
            end
            default: begin
              bus_we <= 1'b0;
              st     <= S_BUS;
            end
          endcase
        end
        S_BUS: if (bus_done) begin
          if (!bus_we) begin
            epp_dout <= bus_rdata;
            epp_doe  <= 1'b1;
          end
          if (bus_err) err_flag <= 1'b1;
          bus_addr <= bus_addr + 32'd1;
          st       <= S_ACK;
        end
        default: begin  // S_ACK: hold wait high until the PC releases the strobe
          epp_wait <= 1'b1;
          if (!ds_low && !as_low) begin
            epp_wait <= 1'b0;
            epp_doe  <= 1'b0;
            st       <= S_IDLE;
          end
        end
      endcase
    end
  end
endmodule
