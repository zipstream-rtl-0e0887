// tb_zs_barrel_shifter: checks the window shift against a bit-by-bit model
// for every shift amount 0..31 on random windows.
module tb_zs_barrel_shifter;
  import zs_pkg::*;
  logic [WIN_W-1:0]    window;
  logic [SHIFT_W-1:0]  shift;
  logic [MAX_CODE-1:0] bits, expect_bits;
  int checks = 0, failures = 0;

  zs_barrel_shifter dut (.window, .shift, .bits);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200; n++) begin
      window = {$urandom, $urandom};
      shift  = SHIFT_W'(n % 32);
      #1;
      for (int b = 0; b < MAX_CODE; b++) begin
        int src;
        src = WIN_W - 1 - int'(shift) - b;
        expect_bits[MAX_CODE-1-b] = (src >= 0) ? window[src] : 1'b0;
      end
      checks++;
      if (bits !== expect_bits) begin
        failures++;
        $display("shift %0d window %h: got %h want %h", shift, window, bits, expect_bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
