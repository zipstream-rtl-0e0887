// tb_zs_lut_rom: writes every entry of the four partition pages with a pattern, then checks the
// same-cycle (asynchronous) read of each address in random order.
module tb_zs_lut_rom;
  import zs_pkg::*;
  logic clk = 0, we = 0;
  localparam int unsigned DEPTH = LUT_DEPTH * 4;
  logic [8:0] waddr = '0, raddr = '0;
  lut_entry_t wdata = '0, rdata;
  int checks = 0, failures = 0;

  zs_lut_rom dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  function automatic lut_entry_t pat(int a);
    return lut_entry_t'((a * 37 + 11) & 13'h1FFF);
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = 9'(a); wdata = pat(a);
    end
    @(negedge clk);
    we = 0;
    for (int n = 0; n < 300; n++) begin
      int a;
      a = $urandom % DEPTH;
      raddr = 9'(a);
      #1;
      checks++;
      if (rdata !== pat(a)) begin
        failures++; $display("addr %0d: got %h want %h", a, rdata, pat(a));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
