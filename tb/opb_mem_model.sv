// opb_mem_model: behavioural OPB slave for testbenches, standing in for an
// external memory behind an OPB memory controller. It answers in its window
// BASE..BASE+SIZE-1 with a random latency, stores bytes by the OPB
// big-endian lanes (address offset 0 = bits 31..24 = BE[3]) and drives
// Sl_DBus only while it acknowledges. For testing a master it can also:
//   ask for a retry on the first attempt of an access (every RETRY_EVERY-th),
//   answer with errAck in the top 256 bytes of its window,
//   and stay silent (no ack) in the window ERR_NONE .. +255, so the master's
//   timeout is exercised. Counters report what happened.
module opb_mem_model #(
  parameter logic [31:0] BASE        = 32'h0000_0000,
  parameter int unsigned SIZE        = 65536,
  parameter int unsigned RETRY_EVERY = 7,
  parameter int unsigned MAX_WAIT    = 5
) (
  input  logic        clk,
  input  logic [31:0] ABus,
  input  logic [3:0]  BE,
  input  logic [31:0] DBus,
  input  logic        RNW,
  input  logic        select,
  output logic [31:0] Sl_DBus,
  output logic        Sl_xferAck,
  output logic        Sl_errAck,
  output logic        Sl_retry,
  output logic        Sl_toutSup
);
  logic [7:0] mem [logic [31:0]];
  int accesses = 0, retries = 0, errors = 0, ignored = 0, lane_errors = 0;
  bit retried_last = 0;

  initial begin
    Sl_DBus = '0; Sl_xferAck = 0; Sl_errAck = 0; Sl_retry = 0; Sl_toutSup = 0;
    forever begin
      @(posedge clk);
      if (select && ABus >= BASE && ABus < BASE + SIZE) begin
        logic [31:0] off;
        off = ABus - BASE;
        if (off >= SIZE - 512 && off < SIZE - 256) begin
          // silent region: never answer, let the master time out
          ignored++;
          while (select) @(posedge clk);
        end else if (!retried_last && RETRY_EVERY != 0 && (accesses % RETRY_EVERY) == 3) begin
          #1 Sl_retry = 1;
          retries++;
          retried_last = 1;
          @(posedge clk); #1 Sl_retry = 0;
          @(posedge clk);
        end else begin
          logic [31:0] word;
          word = '0;
          retried_last = 0;
          repeat ($urandom_range(MAX_WAIT)) @(posedge clk);
          #1;
          if (BE != (4'b1000 >> ABus[1:0])) lane_errors++;
          for (int k = 0; k < 4; k++) begin
            logic [31:0] a;
            a = {ABus[31:2], 2'(k)};
            if (BE[3-k]) begin
              if (!RNW) mem[a] = DBus[31-8*k -: 8];
              word[31-8*k -: 8] = mem.exists(a) ? mem[a] : 8'hA5;
            end
          end
          if (off >= SIZE - 256) begin
            Sl_errAck = 1;
            errors++;
          end else begin
            Sl_xferAck = 1;
            if (RNW) Sl_DBus = word;
          end
          accesses++;
          @(posedge clk); #1;
          Sl_xferAck = 0; Sl_errAck = 0; Sl_DBus = '0;
          while (select) @(posedge clk);
        end
      end
    end
  end
endmodule
