// tb_zs_bitstream_bram: fills the RAM, then checks one-cycle read latency
// and data for random addresses, including back-to-back reads.
module tb_zs_bitstream_bram;
  import zs_pkg::*;
  localparam int unsigned DEPTH = 1024;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr = '0, raddr = '0;
  logic [PKT_W-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;

  zs_bitstream_bram dut (.clk, .we, .waddr, .wdata, .re, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic logic [15:0] pat(int a);
    return 16'(a * 40503 + 7);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = pat(a);
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 500; n++) begin
      int a;
      a = $urandom % DEPTH;
      re = 1; raddr = 10'(a);
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== pat(a)) begin
        failures++; $display("addr %0d: got %h want %h", a, rdata, pat(a));
      end
      @(negedge clk);
      re = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
