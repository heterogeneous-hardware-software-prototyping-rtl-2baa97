// tb_la_capture_ram: self-checking test of the capture memory. Random writes
// and reads on both ports at once at the default size; every read is compared,
// one clock after its address, with a shadow copy kept by the testbench
// (read-before-write when both ports hit the same word).
module tb_la_capture_ram;
  localparam int unsigned WIDTH = 65, DEPTH = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic we;
  logic [9:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  la_capture_ram #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] expect_q;
    we = 1'b1;
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      waddr = 10'(a); wdata = {1'(a), $urandom, $urandom}; raddr = '0;
      shadow[a] = wdata;
      @(posedge clk); #1;
    end
    for (int t = 0; t < 3000; t++) begin
      we = $urandom_range(1) == 1;
      waddr = 10'($urandom_range(DEPTH-1));
      raddr = (t % 4 == 0) ? waddr : 10'($urandom_range(DEPTH-1));
      wdata = {1'($urandom), $urandom, $urandom};
      expect_q = shadow[raddr];
      if (we) shadow[waddr] = wdata;
      @(posedge clk); #1;
      checks++;
      if (rdata != expect_q) begin
        failures++;
        $display("FAIL: read %0d got %h expected %h", raddr, rdata, expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
