// zs_accumulator: the ACCUMULATOR and REG C of the Huffman decoder.
//
// REG C counts the decoded bits of the packet in REG A. Each decoded code word
// adds its length. When the sum reaches the packet width the accumulator
// "overflows": the code word ended in (or at the end of) the next packet, the
// packet registers must advance, and REG C keeps the sum minus PKT_W. REG C is
// 16 bits wide as in the published design, though it never exceeds PKT_W-1.
//
// Timing: `overflow` is combinational from REG C, en and len; REG C updates on
// the clock edge where en is high. `clear` returns REG C to 0.
module zs_accumulator
  import zs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             en,
  input  logic [LEN_W-1:0] len,
  output logic [ACC_W-1:0] regc,
  output logic             overflow
);

  logic [ACC_W:0] sum;

  always_comb begin
    sum      = {1'b0, regc} + (ACC_W+1)'(len);
    overflow = en && (sum >= (ACC_W+1)'(PKT_W));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       regc <= '0;
    else if (clear)   regc <= '0;
    else if (en)      regc <= overflow ? ACC_W'(sum - (ACC_W+1)'(PKT_W)) : sum[ACC_W-1:0];
  end

  a_regc_in_packet: assert property (@(posedge clk) disable iff (!rst_n)
                                     regc < ACC_W'(PKT_W));

endmodule
