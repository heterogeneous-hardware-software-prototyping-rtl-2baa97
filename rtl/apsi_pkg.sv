// apsi_pkg: types and constants shared by the parallel-port bridges and the
// LA_RCS logic analyser.
//
// Byte lanes: the OPB side follows the IBM (big-endian) convention, so the
// byte at address offset 0 is on bits [31:24] of a 32-bit bus and is enabled
// by be[3]. The Wishbone side uses the usual little-endian convention, offset
// 0 on bits [7:0] and sel[0]. Both bus widths are 32 bits.
//
// A lint pass over this package alone reports its constants as unused; they
// are used by la_core, opb_epp and the testbenches.
//
// LA_RCS register map (word offsets from the analyser base address, lower
// half of its address window; the capture memory fills the upper half):
//   0  CTRL       rw  bit0 RLC enable, bit1 CED enable
//   1  CMD/STATUS w : bit0 arm, bit1 force trigger, bit2 stop
//                 r : bit0 armed, bit1 capturing, bit2 done, bit3 memory full
//   2  MAX_REP    rw  largest number of times one state is recorded (0 = no limit)
//   3  WORD_COUNT r   number of capture-memory words holding data
//   4  INFO       r   [15:0] probe width, [31:16] log2 of the memory depth
//   8..15  TRIG_VALUE   16..23 TRIG_MASK   24..31 CED_VALUE   32..39 CED_MASK
//          (32-bit slices of the probe-wide patterns, least significant first)
package apsi_pkg;

  // Kind of bus access requested by the EPP front end.
  typedef enum logic [1:0] {
    EPP_ADDR_WR = 2'd0,  // address byte write (handled inside the front end)
    EPP_ADDR_RD = 2'd1,  // address byte read: returns the bridge status
    EPP_DATA_WR = 2'd2,  // data byte write: one bus byte write
    EPP_DATA_RD = 2'd3   // data byte read: one bus byte read
  } epp_cycle_e;

  // Capture sequencer state of the analyser.
  typedef enum logic [1:0] {
    LA_IDLE  = 2'd0,
    LA_ARMED = 2'd1,
    LA_RUN   = 2'd2,
    LA_DONE  = 2'd3
  } la_state_e;

  // Register word indices.
  localparam int unsigned LA_REG_CTRL   = 0;
  localparam int unsigned LA_REG_CMD    = 1;
  localparam int unsigned LA_REG_MAXREP = 2;
  localparam int unsigned LA_REG_COUNT  = 3;
  localparam int unsigned LA_REG_INFO   = 4;
  localparam int unsigned LA_REG_TVAL   = 8;
  localparam int unsigned LA_REG_TMSK   = 16;
  localparam int unsigned LA_REG_CVAL   = 24;
  localparam int unsigned LA_REG_CMSK   = 32;

  // OPB arbitration timeout, in cycles, of the OPB specification.
  localparam int unsigned OPB_TIMEOUT_CYCLES = 16;

  // A 64-bit probe word holding the OPB signals of a bus trace: the low 24
  // address bits, the data bus and eight control signals.
  typedef struct packed {
    logic [23:0] abus;
    logic [31:0] dbus;
    logic        busLock;
    logic        errAck;
    logic        rnw;
    logic        rst;
    logic        select;
    logic        seqAddr;
    logic        timeout;
    logic        xferAck;
  } opb_trace_t;

  // Byte lane helpers, OPB (big-endian) convention.
  function automatic logic [3:0] opb_be(input logic [1:0] offs);
    return 4'b1000 >> offs;
  endfunction

  function automatic logic [31:0] opb_lane_put(input logic [1:0] offs, input logic [7:0] b);
    return {b, 24'd0} >> (8 * offs);
  endfunction

  function automatic logic [7:0] opb_lane_get(input logic [1:0] offs, input logic [31:0] d);
    return 8'((d << (8 * offs)) >> 24);
  endfunction

  // Byte lane helpers, Wishbone (little-endian) convention.
  function automatic logic [3:0] wb_sel(input logic [1:0] offs);
    return 4'b0001 << offs;
  endfunction

  function automatic logic [31:0] wb_lane_put(input logic [1:0] offs, input logic [7:0] b);
    return {24'd0, b} << (8 * offs);
  endfunction

  function automatic logic [7:0] wb_lane_get(input logic [1:0] offs, input logic [31:0] d);
    return 8'(d >> (8 * offs));
  endfunction

endpackage
