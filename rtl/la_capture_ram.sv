// la_capture_ram: capture memory of the LA_RCS analyser, the FPGA BlockRAM
// that holds the encoded samples until they are read out by the PC.
//
// Simple dual-port RAM: one write port driven by the run-length encoder and one
// read port for the control interface, both on the same clock. The read is
// synchronous (data one cycle after the address), as in a BlockRAM; a read
// of the address being written returns the old contents.
// Interface: we/waddr/wdata, raddr/rdata. DEPTH words of WIDTH bits.
// The memory sits inside the FPGA as described; depth and width are
// parameters chosen by this design.
module la_capture_ram #(
  parameter int unsigned WIDTH = 65,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
