// epp_model: behavioural model of the PC parallel port in EPP mode, for
// testbenches. It plays the host side of the four EPP cycles through tasks,
// the way the PC-side script interpreter would through the real port:
//   addr_write(b), addr_read(b), data_write(b), data_read(b)
// Each cycle waits for wait low, sets nwrite and (for writes) the data,
// pulls the strobe low after a set-up time, waits for wait high, samples the
// data on a read, releases the strobe and waits for wait low again. A cycle
// that is not answered within T_TIMEOUT ns is abandoned and counted in
// timeouts. The model also checks that the peripheral drives the data lines
// during read cycles only. Simulation only (delays).
//
// play(path) replays a recorded command stream, the byte-level form a PC
// script reduces to: one command per line of a hex file, 12 bits each,
//   bits 11..8 = 1 address byte write, 2 data byte write, 3 data byte read,
//                4 address (status) read, 0 end of stream
//   bits  7..0 = the byte to write (ignored for reads)
// Every byte read is appended to the queue replies, in order, which is what
// the PC side then takes as the port's answers.
module epp_model #(
  parameter int unsigned T_SETUP   = 30,     // ns, data/nwrite to strobe
  parameter int unsigned T_TIMEOUT = 20000   // ns
) (
  output logic       nwrite,
  output logic       ndstrb,
  output logic       nastrb,
  output logic [7:0] dout,
  input  logic [7:0] din,
  input  logic       doe,
  input  logic       wait_i
);
  int cycles   = 0;
  int timeouts = 0;
  int protocol_errors = 0;
  logic [7:0] replies[$];
  localparam int MAX_CMDS = 4096;

  initial begin
    nwrite = 1'b1;
    ndstrb = 1'b1;
    nastrb = 1'b1;
    dout   = '0;
  end

  task automatic wait_level(input logic lvl, output bit ok);
    int t = 0;
    ok = 1;
    while (wait_i !== lvl) begin
      #1;
      t++;
      if (t > T_TIMEOUT) begin ok = 0; return; end
    end
  endtask

  task automatic cycle(input bit is_addr, input bit is_write, input logic [7:0] wb,
                       output logic [7:0] rb);
    bit ok;
    rb = '0;
    wait_level(1'b0, ok);
    if (!ok) begin timeouts++; return; end
    nwrite = !is_write;
    dout   = is_write ? wb : 8'h00;
    #(T_SETUP);
    if (is_addr) nastrb = 1'b0; else ndstrb = 1'b0;
    wait_level(1'b1, ok);
    if (!ok) timeouts++;
    #5;
    rb = din;
    if (doe !== !is_write) protocol_errors++;
    nastrb = 1'b1;
    ndstrb = 1'b1;
    wait_level(1'b0, ok);
    if (!ok) timeouts++;
    #5;
    nwrite = 1'b1;
    cycles++;
  endtask

  task automatic addr_write(input logic [7:0] b);
    logic [7:0] dummy;
    cycle(1'b1, 1'b1, b, dummy);
  endtask

  task automatic addr_read(output logic [7:0] b);
    cycle(1'b1, 1'b0, 8'h00, b);
  endtask

  task automatic data_write(input logic [7:0] b);
    logic [7:0] dummy;
    cycle(1'b0, 1'b1, b, dummy);
  endtask

  task automatic data_read(output logic [7:0] b);
    cycle(1'b0, 1'b0, 8'h00, b);
  endtask

  task automatic play(input string path);
    logic [11:0] cmd [MAX_CMDS];
    logic [7:0]  b;
    for (int i = 0; i < MAX_CMDS; i++) cmd[i] = '0;
    $readmemh(path, cmd);
    for (int i = 0; i < MAX_CMDS && cmd[i][11:8] != 4'd0; i++) begin
      case (cmd[i][11:8])
        4'd1:    addr_write(cmd[i][7:0]);
        4'd2:    data_write(cmd[i][7:0]);
        4'd3:    begin data_read(b); replies.push_back(b); end
        4'd4:    begin addr_read(b); replies.push_back(b); end
        default: protocol_errors++;
      endcase
    end
  endtask

  // four address cycles, most significant byte first
  task automatic set_address(input logic [31:0] a);
    for (int k = 3; k >= 0; k--) addr_write(a[8*k +: 8]);
  endtask
endmodule
