// zs_packet_regs: REG A and REG B of the Huffman decoder.
//
// REG A holds the packet being decoded and REG B the packet after it; the
// concatenation {REG A, REG B} is the barrel shifter's input window. When the
// accumulator overflows (a code word crossed into the next packet) `advance`
// moves REG B into REG A and loads the next input packet into REG B, as the
// published decoder does. This version also fills REG B before the first
// decode (a one-packet prefetch), so a code word that spans two packets is
// always wholly inside the window; that prefetch and the valid/ready packet
// handshake are this design's choices.
//
// Timing: pkt_ready is combinational in `advance` and the register flags; a
// packet is taken on the clock edge where pkt_valid && pkt_ready.
module zs_packet_regs
  import zs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [PKT_W-1:0] pkt_data,
  input  logic             pkt_valid,
  output logic             pkt_ready,
  input  logic             advance,
  output logic [WIN_W-1:0] window,
  output logic             window_valid
);

  logic [PKT_W-1:0] reg_a, reg_b;
  logic             va, vb;
  logic             shift_chain;

  // Move B into A when A is consumed (advance) or still empty.
  assign shift_chain  = advance || !va;
  assign pkt_ready    = !clear && (shift_chain || !vb);
  assign window       = {reg_a, reg_b};
  assign window_valid = va && vb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_a <= '0;
      reg_b <= '0;
      va    <= 1'b0;
      vb    <= 1'b0;
    end else if (clear) begin
      va <= 1'b0;
      vb <= 1'b0;
    end else if (shift_chain) begin
      reg_a <= reg_b;
      va    <= vb;
      if (pkt_valid) reg_b <= pkt_data;
      vb    <= pkt_valid;
    end else if (!vb && pkt_valid) begin
      reg_b <= pkt_data;
      vb    <= 1'b1;
    end
  end

  // advance is only legal while the window is full.
  a_advance_full: assert property (@(posedge clk) disable iff (!rst_n)
                                   advance |-> window_valid);

endmodule
