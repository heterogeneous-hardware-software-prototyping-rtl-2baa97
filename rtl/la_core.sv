// la_core: LA_RCS internal logic state analyser, independent of the system bus.
//
// The analyser samples PROBE_W design signals on every clock edge, waits for a
// trigger, and stores the samples it is allowed to keep in an on-chip capture
// memory, from where the PC reads them afterwards over the control interface.
// Two features stretch the small memory: the clock enable logic (CED) keeps
// only samples that match a programmed pattern, and run-length coding (RLC)
// stores a repeated state once plus a repeat count. Both can be switched on
// independently.
//
// Data path: probe -> register -> trigger sequencer (capture window) -> CED
// (sample enable) -> RLC encoder -> capture RAM. Samples enter the memory two
// clocks after they are on the probe input, at up to one per clock.
//
// Control interface: a simple synchronous register port, wrapped by opb_la
// (OPB) and wb_la (Wishbone). reg_addr is a 32-bit word address inside the
// analyser window of 2**RA_W words; the lower half holds the registers listed
// in apsi_pkg, the upper half the capture memory. Memory entry e is at word
// offsets e*STRIDE .. e*STRIDE+STRIDE-1 of the upper half, least significant
// 32-bit slice first; bit PROBE_W of the entry is the RLC flag. reg_wr writes
// reg_wdata under the byte enables reg_be (bit k = bits 8k+7..8k) in the same
// clock; reg_rd returns reg_rdata one clock later.
// The control registers, command encoding and memory layout are this design's
// choices; what the analyser does follows the described LA_RCS.
// The trigger sequencer's one-clock 'fired' pulse is left open here: the
// state it leads to is already visible in the status register.
module la_core
  import apsi_pkg::*;
#(
  parameter int unsigned PROBE_W = 64,
  parameter int unsigned DEPTH   = 1024,
  localparam int unsigned NPW    = (PROBE_W + 31) / 32,        // words per pattern
  localparam int unsigned EW     = (PROBE_W + 1 + 31) / 32,    // words per entry
  localparam int unsigned SW     = (EW > 1) ? $clog2(EW) : 0,  // log2 entry stride
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RA_W   = AW + SW + 1                 // word address width
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [PROBE_W-1:0] probe,
  input  logic [RA_W-1:0]    reg_addr,
  input  logic               reg_wr,
  input  logic [3:0]         reg_be,
  input  logic [31:0]        reg_wdata,
  input  logic               reg_rd,
  output logic [31:0]        reg_rdata,
  output la_state_e          state
);
  // ---------------------------------------------------------------- registers
  logic [NPW*32-1:0] tval, tmsk, cval, cmsk;
  logic              rlc_en, ced_en;
  logic [31:0]       max_rep;
  logic              cmd_arm, cmd_force, cmd_stop;

  logic              is_mem;
  logic [5:0]        widx;
  always_comb begin
    is_mem = reg_addr[RA_W-1];
    widx   = (32'(reg_addr[RA_W-2:0]) < 32'd64) ? 6'(reg_addr[RA_W-2:0]) : 6'd63;
  end

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] be);
    for (int k = 0; k < 4; k++) if (be[k]) old[8*k +: 8] = nw[8*k +: 8];
    return old;
  endfunction

  always_comb begin
    cmd_arm   = reg_wr && !is_mem && (widx == 6'(LA_REG_CMD)) && reg_be[0] && reg_wdata[0];
    cmd_force = reg_wr && !is_mem && (widx == 6'(LA_REG_CMD)) && reg_be[0] && reg_wdata[1];
    cmd_stop  = reg_wr && !is_mem && (widx == 6'(LA_REG_CMD)) && reg_be[0] && reg_wdata[2];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      tval <= '0; tmsk <= '0; cval <= '0; cmsk <= '0;
      rlc_en <= 1'b1; ced_en <= 1'b0; max_rep <= '0;
    end else if (reg_wr && !is_mem) begin
      if (widx == 6'(LA_REG_CTRL) && reg_be[0]) begin
        rlc_en <= reg_wdata[0];
        ced_en <= reg_wdata[1];
      end
      if (widx == 6'(LA_REG_MAXREP)) max_rep <= merge(max_rep, reg_wdata, reg_be);
      for (int w = 0; w < NPW; w++) begin
        if (widx == 6'(LA_REG_TVAL + w)) tval[32*w +: 32] <= merge(tval[32*w +: 32], reg_wdata, reg_be);
        if (widx == 6'(LA_REG_TMSK + w)) tmsk[32*w +: 32] <= merge(tmsk[32*w +: 32], reg_wdata, reg_be);
        if (widx == 6'(LA_REG_CVAL + w)) cval[32*w +: 32] <= merge(cval[32*w +: 32], reg_wdata, reg_be);
        if (widx == 6'(LA_REG_CMSK + w)) cmsk[32*w +: 32] <= merge(cmsk[32*w +: 32], reg_wdata, reg_be);
      end
    end
  end

  // ---------------------------------------------------------------- data path
  logic [PROBE_W-1:0] probe_q;
  logic               window, ced_ok, full;
  logic               we;
  logic [AW-1:0]      waddr, raddr;
  logic [PROBE_W:0]   wdata, rdata;
  logic [AW:0]        word_count;

  always_ff @(posedge clk) probe_q <= probe;

  la_trigger #(.PROBE_W(PROBE_W)) u_trigger (
    .clk, .rst, .arm(cmd_arm), .force_trig(cmd_force), .stop(cmd_stop), .full,
    .probe(probe_q), .value(tval[PROBE_W-1:0]), .mask(tmsk[PROBE_W-1:0]),
    .state, .window, .fired()
  );

  la_ced #(.PROBE_W(PROBE_W)) u_ced (
    .en(ced_en), .probe(probe_q), .value(cval[PROBE_W-1:0]), .mask(cmsk[PROBE_W-1:0]),
    .sample_en(ced_ok)
  );

  la_rlc #(.PROBE_W(PROBE_W), .DEPTH(DEPTH)) u_rlc (
    .clk, .rst, .clear(cmd_arm), .en(rlc_en), .max_rep,
    .in_valid(window && ced_ok), .in_data(probe_q),
    .we, .waddr, .wdata, .word_count, .full
  );

  always_comb raddr = AW'(reg_addr[RA_W-2:0] >> SW);

  la_capture_ram #(.WIDTH(PROBE_W + 1), .DEPTH(DEPTH)) u_ram (
    .clk, .we, .waddr, .wdata, .raddr, .rdata
  );

  // ---------------------------------------------------------------- read back
  logic              rd_mem_q;
  logic [31:0]       rd_reg_q;
  logic [SW:0]       rd_slice_q;
  logic [EW*32-1:0]  entry;

  always_ff @(posedge clk) begin
    rd_mem_q   <= is_mem;
    rd_slice_q <= (SW+1)'(reg_addr[RA_W-2:0] & ((RA_W-1)'(1 << SW) - 1'b1));
    rd_reg_q   <= '0;
    if (reg_rd && !is_mem) begin
      if (widx == 6'(LA_REG_CTRL))   rd_reg_q <= {30'd0, ced_en, rlc_en};
      if (widx == 6'(LA_REG_CMD))    rd_reg_q <= {28'd0, full, state == LA_DONE,
                                                  state == LA_RUN, state == LA_ARMED};
      if (widx == 6'(LA_REG_MAXREP)) rd_reg_q <= max_rep;
      if (widx == 6'(LA_REG_COUNT))  rd_reg_q <= 32'(word_count);
      if (widx == 6'(LA_REG_INFO))   rd_reg_q <= {16'(AW), 16'(PROBE_W)};
      for (int w = 0; w < NPW; w++) begin
        if (widx == 6'(LA_REG_TVAL + w)) rd_reg_q <= tval[32*w +: 32];
        if (widx == 6'(LA_REG_TMSK + w)) rd_reg_q <= tmsk[32*w +: 32];
        if (widx == 6'(LA_REG_CVAL + w)) rd_reg_q <= cval[32*w +: 32];
        if (widx == 6'(LA_REG_CMSK + w)) rd_reg_q <= cmsk[32*w +: 32];
      end
    end
  end

  always_comb begin
    entry     = (EW*32)'(rdata);
    reg_rdata = rd_reg_q;
    if (rd_mem_q) begin
      reg_rdata = '0;
      for (int w = 0; w < EW; w++)
        if (rd_slice_q == (SW+1)'(w)) reg_rdata = entry[32*w +: 32];
    end
  end
endmodule
