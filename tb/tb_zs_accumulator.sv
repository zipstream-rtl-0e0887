// tb_zs_accumulator: feeds random code lengths and checks REG C and the
// overflow flag against a running bit count modulo the packet width.
module tb_zs_accumulator;
  import zs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, en = 0;
  logic [LEN_W-1:0] len = '0;
  logic [ACC_W-1:0] regc;
  logic overflow;
  int checks = 0, failures = 0, model = 0, overflows = 0;

  zs_accumulator dut (.clk, .rst_n, .clear, .en, .len, .regc, .overflow);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      en    = ($urandom % 4) != 0;
      len   = LEN_W'(1 + $urandom % MAX_CODE);
      clear = (n == 500);
      #1;
      checks++;
      if (overflow !== (en && (model + int'(len) >= PKT_W))) begin
        failures++; $display("overflow mismatch at %0d", n);
      end
      if (overflow) overflows++;
      @(posedge clk);
      if (clear) model = 0;
      else if (en) model = (model + int'(len)) % PKT_W;
      #1;
      checks++;
      if (regc !== ACC_W'(model)) begin
        failures++; $display("regc %0d want %0d", regc, model);
      end
    end
    checks++;
    if (overflows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
