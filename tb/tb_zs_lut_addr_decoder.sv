// tb_zs_lut_addr_decoder: loads the group table of two code shapes (the
// 15-symbol example table and the 95-symbol growing shape), presents every
// code word followed by random bits, and checks that the address points at a
// LUT entry (built by the reference model) holding that code's symbol and
// length, and that the group is the capped leading-ones count.
module tb_zs_lut_addr_decoder;
  import zs_pkg::*;
  import zs_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0, cfg_gmax_we = 0;
  logic [1:0] cfg_part = '0, part = '0;
  logic [GRP_W-1:0] cfg_idx = '0, cfg_gmax = '0;
  group_desc_t cfg_desc = '0;
  logic [MAX_CODE-1:0] bits = '0;
  logic [LUT_AW-1:0] addr;
  logic [GRP_W-1:0] group;
  int checks = 0, failures = 0;

  zs_lut_addr_decoder dut (.clk, .rst_n, .cfg_part, .part, .cfg_we, .cfg_idx, .cfg_desc, .cfg_gmax_we,
                           .cfg_gmax, .bits, .addr, .group);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic table_t make(bit growing);
    table_t t;
    sym_q_t syms;
    if (growing) t.codes = shape_growing(t.gmax);
    else         t.codes = shape_example(t.gmax);
    for (int r = 0; r < t.codes.size(); r++) syms.push_back(9'(r));
    build_tables(t, syms);
    return t;
  endfunction

  task automatic load(int p, bit growing);
    table_t t = make(growing);
    for (int g = 0; g < NGROUPS; g++) begin
      @(negedge clk);
      cfg_we = 1; cfg_part = 2'(p); cfg_idx = GRP_W'(g); cfg_desc = t.groups[g];
    end
    @(negedge clk);
    cfg_we = 0; cfg_gmax_we = 1; cfg_gmax = GRP_W'(t.gmax);
    @(negedge clk);
    cfg_gmax_we = 0;
  endtask

  // partition p holds the example table (growing = 0) or the growing one
  task automatic run_shape(int p, bit growing);
    table_t t = make(growing);
    part = 2'(p);
    for (int rep = 0; rep < 4; rep++)
      foreach (t.codes[r]) begin
        int unsigned lo = lead_ones(t.codes[r]);
        logic [MAX_CODE-1:0] tail = MAX_CODE'($urandom);
        bits = MAX_CODE'(t.codes[r].bits << (MAX_CODE - t.codes[r].len)) |
               (tail >> t.codes[r].len);
        #1;
        checks++;
        if (t.lut[addr].sym !== 9'(r) || t.lut[addr].len !== LEN_W'(t.codes[r].len)) begin
          failures++;
          $display("code %0d (len %0d) bits %b: addr %0d holds sym %0d len %0d",
                   r, t.codes[r].len, bits, addr, t.lut[addr].sym, t.lut[addr].len);
        end
        checks++;
        if (lo < t.gmax && group !== GRP_W'(lo)) begin
          failures++; $display("code %0d group %0d want %0d", r, group, lo);
        end
        @(negedge clk);
      end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    load(1, 0);
    load(2, 1);
    load(3, 0);
    load(0, 1);
    run_shape(1, 0);
    run_shape(2, 1);
    run_shape(3, 0);
    run_shape(0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
