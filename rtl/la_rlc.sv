// la_rlc: Run-Length Coding (RLC) encoder of the LA_RCS analyser.
//
// Each capture-memory word is PROBE_W+1 bits wide. The most significant bit
// tells what the word holds: 0 = a probe value, 1 = a repeat count for the
// value word just before it. A state seen n >= 2 times in a row is stored as
// its value word followed by one count word holding n-2; a state seen once is
// a lone value word. The sequence 1,2,2,3,3,3,4,4,4,4 on 7 probe bits becomes
// 01 02 80 03 81 04 82 (hex).
//
// How it works: the encoder keeps the last stored value and the run length.
// The first repeat of a value opens a count word at the next free address;
// further repeats overwrite that same word with the increased count, so each
// sample costs at most one memory write and the encoder takes one sample per
// clock. When the value changes, the count word is committed and the new value
// goes to the following address.
//
// Repeat limit: max_rep (0 = no limit) is the largest number of times one
// state is recorded; further identical samples are dropped, so a long idle
// state does not fill the waveform. When the run counter itself is exhausted
// (CNT_W bits) a new run is started with a fresh value word, losing nothing.
// With en = 0 every sample is written as a value word (no compression).
//
// Interface: clear (one-cycle pulse) empties the memory; in_valid/in_data is
// one sample; we/waddr/wdata drive the capture RAM; word_count is the number
// of words holding data; full goes (and stays) high when a sample could not be
// stored for lack of space.
// Timing: the memory write for a sample is issued one clock after the sample.
// The word format and the example follow the described RLC. The in-place
// count update, the reading of the repeat limit and the counter overflow rule
// are this design's choices.
module la_rlc #(
  parameter int unsigned PROBE_W = 64,
  parameter int unsigned DEPTH   = 1024,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CNT_W  = (PROBE_W < 32) ? PROBE_W : 32
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               clear,
  input  logic               en,
  input  logic [31:0]        max_rep,
  input  logic               in_valid,
  input  logic [PROBE_W-1:0] in_data,
  output logic               we,
  output logic [AW-1:0]      waddr,
  output logic [PROBE_W:0]   wdata,
  output logic [AW:0]        word_count,
  output logic               full
);
  logic               first;      // nothing stored since clear
  logic [PROBE_W-1:0] last;       // last stored value
  logic [CNT_W-1:0]   rep;        // occurrences of last in the current run
  logic               have_cnt;   // a count word is open at wr_addr
  logic [AW:0]        wr_addr;    // next free address (count slot if have_cnt)

  // Decisions for the current sample.
  logic        new_run, limited;
  logic [AW:0] val_addr;
  logic [31:0] rep32;

  always_comb begin
    rep32    = 32'(rep);
    new_run  = first || (in_data != last) || (rep == '1);
    limited  = (max_rep != 32'd0) && (rep32 >= max_rep);
    val_addr = have_cnt ? wr_addr + 1'b1 : wr_addr;
    word_count = wr_addr + (AW+1)'(have_cnt);
  end

  always_ff @(posedge clk) begin
    if (rst || clear) begin
      first    <= 1'b1;
      last     <= '0;
      rep      <= '0;
      have_cnt <= 1'b0;
      wr_addr  <= '0;
      full     <= 1'b0;
      we       <= 1'b0;
      waddr    <= '0;
      wdata    <= '0;
    end else begin
      we <= 1'b0;
      if (in_valid && !full) begin
        if (!en) begin
          if (wr_addr >= (AW+1)'(DEPTH)) begin
            full <= 1'b1;
          end else begin
            we      <= 1'b1;
            waddr   <= AW'(wr_addr);
            wdata   <= {1'b0, in_data};
            wr_addr <= wr_addr + 1'b1;
          end
        end else if (new_run) begin
          if (val_addr >= (AW+1)'(DEPTH)) begin
            full <= 1'b1;
          end else begin
            we       <= 1'b1;
            waddr    <= AW'(val_addr);
            wdata    <= {1'b0, in_data};
            wr_addr  <= val_addr + 1'b1;
            have_cnt <= 1'b0;
            rep      <= CNT_W'(1);
            last     <= in_data;
            first    <= 1'b0;
          end
        end else if (!limited) begin
          if (!have_cnt && (wr_addr >= (AW+1)'(DEPTH))) begin
            full <= 1'b1;
          end else begin
            we       <= 1'b1;
            waddr    <= AW'(wr_addr);
            wdata    <= {1'b1, PROBE_W'(rep - 1'b1)};
            have_cnt <= 1'b1;
            rep      <= rep + 1'b1;
          end
        end
      end
    end
  end
endmodule
