// zs_run_len_decoder: expands run-length symbols and packs 32-bit words.
//
// Each input symbol carries a flag. A literal (flag 0) contributes its 8-bit
// value; a run (flag 1) contributes `value` zero bytes. Bytes are packed into
// 32-bit bitstream words, first byte in the most significant position. A
// literal takes one clock; a run is expanded at up to four zero bytes per
// clock, so a long run of zeros leaves at one word per clock. The flag test
// and zero expansion follow the published decoder; word packing, byte order
// and the handshakes are this design's choices.
//
// Interface: sym_* in and word_* out are valid/ready streams; the output word
// sits in a register (word_valid is registered). `push` is high in the cycle a
// word is formed. While `enable` is low no new symbol is accepted (a run
// already started still completes). `clear` drops any partial word.
module zs_run_len_decoder
  import zs_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              enable,
  input  rle_sym_t          sym,
  input  logic              sym_valid,
  output logic              sym_ready,
  output logic [WORD_W-1:0] word,
  output logic              word_valid,
  input  logic              word_ready,
  output logic              push,
  output logic              run_active   // a run symbol is being expanded
);

  localparam int unsigned FILL_W = $clog2(BPW) + 1;

  logic [WORD_W-1:0] acc_q,  acc_d;    // packed bytes, newest in the LSBs
  logic [FILL_W-1:0] fill_q, fill_d;   // bytes in acc_q (0..BPW-1)
  logic [SYM_W-1:0]  rem_q,  rem_d;    // zero bytes still owed by a run
  logic              can_go;

  assign can_go     = !word_valid || word_ready;
  assign sym_ready  = can_go && enable && (rem_q == '0) && !clear;
  assign run_active = (rem_q != '0);

  always_comb begin
    logic [SYM_W-1:0]  zeros;   // zero bytes to add this clock
    logic [SYM_W-1:0]  space;
    acc_d  = acc_q;
    fill_d = fill_q;
    rem_d  = rem_q;
    push   = 1'b0;
    space  = SYM_W'(BPW) - SYM_W'(fill_q);
    zeros  = '0;
    if (can_go && !clear) begin
      if (rem_q != '0) begin
        zeros = (rem_q < space) ? rem_q : space;
        rem_d = rem_q - zeros;
      end else if (sym_valid && enable && sym.run) begin
        zeros = (sym.value < space) ? sym.value : space;
        rem_d = sym.value - zeros;
      end else if (sym_valid && enable) begin
        acc_d  = {acc_q[WORD_W-SYM_W-1:0], sym.value};
        fill_d = fill_q + 1'b1;
      end
      if (zeros != '0) begin
        acc_d  = acc_q << (SYM_W * 32'(zeros));
        fill_d = fill_q + FILL_W'(zeros);
      end
      if (fill_d == FILL_W'(BPW)) begin
        push   = 1'b1;
        fill_d = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q      <= '0;
      fill_q     <= '0;
      rem_q      <= '0;
      word       <= '0;
      word_valid <= 1'b0;
    end else if (clear) begin
      fill_q     <= '0;
      rem_q      <= '0;
      word_valid <= 1'b0;
    end else begin
      acc_q  <= acc_d;
      fill_q <= fill_d;
      rem_q  <= rem_d;
      if (push) begin
        word       <= acc_d;
        word_valid <= 1'b1;
      end else if (word_ready) begin
        word_valid <= 1'b0;
      end
    end
  end

endmodule
