// tb_zs_packet_regs: streams numbered packets with random gaps and random
// advance requests; checks that the window always shows two consecutive
// packets in order, REG A the older one.
module tb_zs_packet_regs;
  import zs_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0;
  logic [PKT_W-1:0] pkt_data;
  logic pkt_valid = 0, pkt_ready, advance = 0;
  logic [WIN_W-1:0] window;
  logic window_valid;
  int checks = 0, failures = 0;
  int next_send = 0, head = 0, advances = 0;
  logic fire = 0, adv = 0;

  zs_packet_regs dut (.clk, .rst_n, .clear, .pkt_data, .pkt_valid, .pkt_ready,
                      .advance, .window, .window_valid);

  always #5 clk = ~clk;
  assign pkt_data = PKT_W'(16'h1000 + next_send);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      // book-keeping for the edge just passed
      if (fire) next_send++;
      if (adv) begin head++; advances++; end
      pkt_valid = ($urandom % 3) != 0;
      advance   = window_valid && ($urandom % 2);
      #1;
      if (window_valid) begin
        checks++;
        if (window !== {PKT_W'(16'h1000 + head), PKT_W'(16'h1000 + head + 1)}) begin
          failures++;
          $display("window %h want packets %0d,%0d", window, head, head + 1);
        end
      end
      fire = pkt_valid && pkt_ready;
      adv  = advance;
    end
    checks++;
    if (advances < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
