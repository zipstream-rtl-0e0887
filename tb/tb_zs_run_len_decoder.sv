// tb_zs_run_len_decoder: random literal and zero-run symbols go in; the
// expected byte stream, packed four bytes to a word (first byte most
// significant), is compared with the words that come out under random
// back-pressure. A second pass without back-pressure checks the clock count
// against the reference model (a literal per clock, up to four zero bytes
// per clock).
module tb_zs_run_len_decoder;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, enable = 1;
  rle_sym_t sym;
  logic sym_valid = 0, sym_ready;
  logic [WORD_W-1:0] word;
  logic word_valid, word_ready = 0, push, run_active;
  int checks = 0, failures = 0, runs = 0, literals = 0;

  zs_run_len_decoder dut (.clk, .rst_n, .clear, .enable, .sym, .sym_valid, .sym_ready,
                          .word, .word_valid, .word_ready, .push, .run_active);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int n, bit stalls, output int cycles);
    sym_q_t s;
    word_q_t want;
    logic [7:0] bytes [$];
    int si = 0, wi = 0, cyc = 0;
    for (int i = 0; i < n || bytes.size() % 4 != 0; i++) begin
      if ($urandom % 3 == 0) begin
        int len;
        len = 1 + $urandom % 40;
        s.push_back({1'b1, 8'(len)});
        repeat (len) bytes.push_back(8'h00);
      end else begin
        logic [7:0] v;
        v = 8'($urandom);
        s.push_back({1'b0, v});
        bytes.push_back(v);
      end
    end
    for (int i = 0; i < bytes.size(); i += 4)
      want.push_back({bytes[i], bytes[i+1], bytes[i+2], bytes[i+3]});
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (wi < want.size() && cyc < 50 * n) begin
      logic acc, out;
      sym_valid  = si < s.size();
      sym        = (si < s.size()) ? rle_sym_t'(s[si]) : '0;
      word_ready = stalls ? (($urandom % 3) != 0) : 1'b1;
      #1;
      acc = sym_valid && sym_ready;
      out = word_valid && word_ready;
      if (out) begin
        checks++;
        if (word !== want[wi]) begin
          failures++; $display("word %0d: got %h want %h", wi, word, want[wi]);
        end
        wi++;
      end
      if (acc) begin
        if (sym.run) runs++; else literals++;
      end
      @(negedge clk);
      if (acc) si++;
      cyc++;
    end
    checks++;
    if (wi != want.size()) begin failures++; $display("got %0d of %0d words", wi, want.size()); end
    sym_valid = 0;
    cycles = cyc;
    // the output register adds one clock
    if (!stalls) begin
      checks++;
      if (cyc != decode_cycles(s) + 1) begin
        failures++; $display("took %0d clocks, model %0d", cyc, decode_cycles(s) + 1);
      end
    end
  endtask

  initial begin
    int c;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(300, 1, c);
    run(300, 0, c);
    checks++;
    if (runs == 0 || literals == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
