// tb_zs_reconfig_controller: drives the controller with an external
// bitstream stream, a stand-in decompressor that streams a known black-box
// bitstream, and the ICAP model with random busy cycles. Three requests: a
// clean external bitstream (result OK, nothing else loaded), a corrupted one
// (CRC error, black box loaded, result RECOVERED), and a corrupted one with a
// corrupted black box (result FAILED). The ICAP's word log is compared with
// the expected sequence of loads, and the decompressor must be started on the
// requested partition.
module tb_zs_reconfig_controller;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic req = 0;
  logic [1:0] req_part = '0, dec_part;
  logic [31:0] req_len = '0;
  logic busy, done, recovering;
  rc_result_t result;
  logic ext_start, ext_valid, ext_ready;
  logic [31:0] ext_data;
  logic dec_start, dec_valid, dec_last, dec_ready;
  logic [31:0] dec_data;
  logic [31:0] icap_data;
  logic icap_write, icap_last, icap_busy, icap_done, icap_crc_err;
  int checks = 0, failures = 0;

  word_q_t ext_img, bb_img, expect_log;
  int ei = -1, di = -1;
  logic [1:0] want_part = '0;
  logic ext_gap = 0, dec_gap = 0;

  zs_reconfig_controller dut (.clk, .rst_n, .req, .req_part, .req_len, .busy, .done, .result,
    .ext_start, .ext_data, .ext_valid, .ext_ready,
    .dec_start, .dec_part, .dec_data, .dec_valid, .dec_last, .dec_error (1'b0), .dec_ready,
    .icap_data, .icap_write, .icap_last, .icap_busy, .icap_done, .icap_crc_err, .recovering);

  zs_icap_model u_icap (.clk, .rst_n, .icap_data, .icap_write, .icap_last,
                        .icap_busy, .icap_done, .icap_crc_err);

  always #5 clk = ~clk;

  // External memory and decompressor stand-ins: word streams with gaps.
  assign ext_valid = (ei >= 0) && (ei < ext_img.size()) && !ext_gap;
  assign ext_data  = ext_valid ? ext_img[ei] : 32'h0;
  assign dec_valid = (di >= 0) && (di < bb_img.size()) && !dec_gap;
  assign dec_data  = dec_valid ? bb_img[di] : 32'h0;
  assign dec_last  = dec_valid && (di == bb_img.size() - 1);

  always @(posedge clk) begin
    if (ext_start) ei <= 0;
    else if (ext_valid && ext_ready) ei <= ei + 1;
    if (dec_start) begin
      di <= 0;
      checks++;
      if (dec_part !== want_part) begin failures++; $display("dec_part %0d want %0d", dec_part, want_part); end
    end
    else if (dec_valid && dec_ready) di <= di + 1;
    // a source holds an offered word until it is taken
    ext_gap <= (($urandom % 5) == 0) && !(ext_valid && !ext_ready);
    dec_gap <= (($urandom % 5) == 0) && !(dec_valid && !dec_ready);
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic request(int p, word_q_t ext, word_q_t bb, rc_result_t want, bit bb_used);
    int cyc = 0;
    want_part = 2'(p);
    ext_img = ext; bb_img = bb;
    foreach (ext[i]) expect_log.push_back(ext[i]);
    if (bb_used) foreach (bb[i]) expect_log.push_back(bb[i]);
    @(negedge clk); req = 1; req_len = ext.size(); req_part = 2'(p);
    @(negedge clk); req = 0; req_part = 2'(p + 1);
    while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
    checks++;
    if (result !== want) begin failures++; $display("result %s want %s", result.name(), want.name()); end
    checks++;
    if (u_icap.log.size() != expect_log.size()) begin
      failures++; $display("ICAP got %0d words, want %0d", u_icap.log.size(), expect_log.size());
    end else foreach (expect_log[i]) begin
      checks++;
      if (u_icap.log[i] !== expect_log[i]) begin failures++; $display("ICAP word %0d wrong", i); end
    end
    repeat (5) @(negedge clk);
  endtask

  initial begin
    word_q_t good, bad, bb, bbad;
    good = gen_bitstream(2, 1);
    bad  = good; bad[20] ^= 32'h0000_0400;
    bb   = gen_bitstream(1, 9);
    bbad = bb;   bbad[15] ^= 32'h0001_0000;
    u_icap.busy_pct = 20;
    repeat (2) @(posedge clk);
    rst_n = 1;
    request(0, good, bb,   RES_OK,        0);
    request(2, bad,  bb,   RES_RECOVERED, 1);
    request(3, bad,  bbad, RES_FAILED,    1);
    request(1, bad,  bb,   RES_RECOVERED, 1);
    checks++;
    if (u_icap.busy_stalls == 0 || u_icap.crc_errors != 4) begin
      failures++; $display("stalls %0d crc errors %0d", u_icap.busy_stalls, u_icap.crc_errors);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
