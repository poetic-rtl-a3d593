// tb_molecule_cfg: self-checking test of the 76-bit molecule configuration
// register. It checks the parallel load and read-back of the three 32-bit
// words, the serial shift through all 71 data bits with nothing bypassed,
// the 54-bit chain when the mode and "other" blocks are bypassed (bits read
// back serially in order), the runtime LUT write and the write priority.
// Expected values come from a reference model kept in the testbench.
module tb_molecule_cfg;
  import poetic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, sh_en = 1'b0, sh_in = 1'b0, lut_we = 1'b0;
  logic [1:0] wr_word = '0, rd_word = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic sh_out;
  logic [15:0] lut_d = '0;
  logic [75:0] cfg, ref_cfg;
  int checks = 0, failures = 0;

  molecule_cfg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Reference: list of shiftable positions, bypass bits excluded.
  function automatic void ref_shift(input logic bit_in, output logic bit_out);
    int pos[$];
    logic [75:0] n;
    logic c;
    int lo[5]  = '{0, 17, 32, 57, 61};
    int hi[5]  = '{15, 30, 55, 59, 74};
    int byp[5] = '{16, 31, 56, 60, 75};
    for (int b = 0; b < 5; b++)
      if (!ref_cfg[byp[b]])
        for (int p = lo[b]; p <= hi[b]; p++) pos.push_back(p);
    n = ref_cfg;
    c = bit_in;
    foreach (pos[k]) begin
      n[pos[k]] = c;
      c = ref_cfg[pos[k]];
    end
    bit_out = c;
    ref_cfg = n;
  endfunction

  task automatic write_word(input int w, input logic [31:0] d);
    @(negedge clk);
    wr_en = 1'b1; wr_word = 2'(w); wr_data = d;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    logic [75:0] v;
    logic exp_out;
    logic [53:0] stored;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(cfg == '0, "reset value");

    // Parallel load and read-back.
    for (int t = 0; t < 20; t++) begin
      v = {$urandom, $urandom, $urandom};
      v[16] = 1'b0; v[31] = 1'b0; v[56] = 1'b0; v[60] = 1'b0; v[75] = 1'b0;
      write_word(0, v[31:0]);
      write_word(1, v[63:32]);
      write_word(2, {20'hFFFFF, v[75:64]});
      check(cfg == v, "parallel load");
      for (int w = 0; w < 3; w++) begin
        rd_word = 2'(w);
        #1;
        check(rd_data == (w == 0 ? v[31:0] : w == 1 ? v[63:32] : {20'd0, v[75:64]}),
              "read-back word");
      end
    end

    // Serial shift, nothing bypassed: 71 bits per pass.
    ref_cfg = cfg;
    for (int t = 0; t < 150; t++) begin
      @(negedge clk);
      sh_en = 1'b1; sh_in = 1'($urandom);
      #1;
      ref_shift(sh_in, exp_out);
      check(sh_out == exp_out, "serial out (no bypass)");
      @(negedge clk);
      sh_en = 1'b0;
      check(cfg == ref_cfg, "serial shift (no bypass)");
    end

    // Bypass the mode and "other" blocks: 54-bit storage chain.
    v = {$urandom, $urandom, $urandom};
    v[16] = 1'b0; v[31] = 1'b0; v[56] = 1'b0; v[60] = 1'b1; v[75] = 1'b1;
    write_word(0, v[31:0]); write_word(1, v[63:32]); write_word(2, {20'd0, v[75:64]});
    ref_cfg = v;
    stored = {$urandom, $urandom};
    for (int k = 0; k < 54; k++) begin
      @(negedge clk);
      sh_en = 1'b1; sh_in = stored[k];
      #1;
      ref_shift(sh_in, exp_out);
      @(negedge clk);
      sh_en = 1'b0;
    end
    check(cfg == ref_cfg, "54-bit chain contents");
    check(cfg[75:57] == v[75:57], "bypassed blocks untouched");
    // Read the 54 stored bits back serially, first in first out.
    for (int k = 0; k < 54; k++) begin
      @(negedge clk);
      sh_en = 1'b1; sh_in = 1'b0;
      #1;
      check(sh_out == stored[k], "54-bit storage read-back");
      @(negedge clk);
      sh_en = 1'b0;
    end

    // Bypass only the LUT: a bit enters at input-select bit 0.
    v[16] = 1'b1; v[60] = 1'b0; v[75] = 1'b0;
    write_word(0, v[31:0]); write_word(1, v[63:32]); write_word(2, {20'd0, v[75:64]});
    @(negedge clk);
    sh_en = 1'b1; sh_in = ~v[17];
    @(negedge clk);
    sh_en = 1'b0;
    check(cfg[15:0] == v[15:0] && cfg[17] == ~v[17] && cfg[18] == v[17],
          "LUT bypass");

    // Runtime LUT write, and priority of a parallel write over it.
    @(negedge clk);
    lut_we = 1'b1; lut_d = 16'hBEEF;
    @(negedge clk);
    check(cfg[15:0] == 16'hBEEF, "runtime LUT write");
    wr_en = 1'b1; wr_word = 2'd0; wr_data = 32'h1234_5678; lut_d = 16'h0F0F;
    @(negedge clk);
    wr_en = 1'b0; lut_we = 1'b0;
    check(cfg[31:0] == 32'h1234_5678, "parallel write wins over LUT write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
