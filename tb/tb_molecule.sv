// tb_molecule: self-checking test of one molecule in each of its eight
// modes. The molecule is configured through its 32-bit bus; its neighbour
// lines, carry, routing and reconfiguration links are driven by the
// testbench, and every output is compared with values computed here from
// the mode definitions (4-LUT, 3-LUT with carry, Comm compare, Shift
// memory, Input, Output, Trigger period of 16, Configure), plus the
// flip-flop, the switch box and a chained serial reconfiguration.
module tb_molecule;
  import poetic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0;
  logic [1:0] wr_word = '0, rd_word = '0;
  logic [31:0] wr_data = '0, rd_data;
  logic [3:0][1:0] line_in = '0, line_out;
  logic carry_in = 1'b0, carry_out;
  logic [3:0] rcfg_in_en = '0, rcfg_in_dat = '0, rcfg_out_en, rcfg_out_dat;
  logic is_src, is_tgt, route_out, route_in = 1'b0, out1;
  logic [ID_W-1:0] id;
  int checks = 0, failures = 0;

  molecule dut (.*);

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

  // Configuration fields -> 76-bit vector, following the documented layout.
  function automatic logic [75:0] mk(input logic [15:0] lut, input logic [13:0] sel,
                                     input logic [23:0] sb, input logic [2:0] mode,
                                     input logic [13:0] oth);
    logic [75:0] v = '0;
    v[15:0] = lut; v[30:17] = sel; v[55:32] = sb; v[59:57] = mode; v[74:61] = oth;
    return v;
  endfunction

  task automatic load(input logic [75:0] v);
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_word = 2'(w);
      wr_data = (w == 0) ? v[31:0] : (w == 1) ? v[63:32] : {20'd0, v[75:64]};
    end
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  // LUT input i from incoming line index src[i]; lines are {side, line}.
  localparam logic [13:0] SEL_STD = {1'b0, 1'b0, 3'd6, 3'd4, 3'd2, 3'd0}; // a3=w0 a2=s0 a1=e0 a0=n0
  logic [3:0] a;
  assign a = {line_in[3][0], line_in[2][0], line_in[1][0], line_in[0][0]};

  initial begin
    logic [15:0] lut, seen;
    logic [7:0] pat;
    logic prev;
    int t0, per;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // 4-LUT, combinational output.
    lut = 16'($urandom);
    load(mk(lut, SEL_STD, '0, MODE_LUT4, '0));
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      line_in = 8'($urandom);
      #1;
      check(out1 == lut[a], "4-LUT output");
      check(!is_src && !is_tgt && carry_out == 1'b0, "4-LUT side outputs");
    end
    // 4-LUT through the flip-flop (use_dff), initial value from dff_init.
    load(mk(lut, SEL_STD, '0, MODE_LUT4, 14'b11));
    check(out1 == 1'b1, "dff_init loaded by configuration write");
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      line_in = 8'($urandom);
      #1;
      prev = lut[a];
      @(negedge clk);
      check(out1 == prev, "registered output is last cycle's LUT value");
    end

    // 3-LUT: f1 from LUT[7:0], carry to the south from LUT[15:8]; input 2
    // from the north carry.
    lut = 16'($urandom);
    load(mk(lut, {1'b0, 1'b1, 3'd6, 3'd4, 3'd2, 3'd0}, '0, MODE_LUT3, '0));
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      line_in = 8'($urandom); carry_in = 1'($urandom);
      #1;
      check(out1 == lut[{1'b0, carry_in, a[1:0]}], "3-LUT first output");
      check(carry_out == lut[{1'b1, carry_in, a[1:0]}], "3-LUT carry to south");
    end
    carry_in = 1'b0;

    // Comm: XNOR of {sr, a0} in LUT[7:0], pattern in LUT[15:8], a3 rotates.
    pat = 8'($urandom);
    lut = {pat, 8'b1010_0101};  // index {sr,a1,a0}: 1 when a0 == sr (a1 = 0)
    line_in = '0;
    load(mk(lut, SEL_STD, '0, MODE_COMM, '0));
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      line_in = '0;
      line_in[0][0] = pat[7 - (k % 8)];   // serial data on a0
      line_in[3][0] = 1'b1;               // a3: shift
      #1;
      check(out1 == 1'b1, "Comm: serial input matches stored word");
    end
    @(negedge clk);
    line_in = '0; line_in[0][0] = ~pat[7];
    #1;
    check(out1 == 1'b0, "Comm: mismatch detected");

    // Shift memory: a1 = shift, a0 = data, output = LUT[15].
    load(mk(16'h0, SEL_STD, '0, MODE_SHIFT, '0));
    seen = 16'($urandom);
    for (int k = 15; k >= 0; k--) begin
      @(negedge clk);
      line_in = '0; line_in[1][0] = 1'b1; line_in[0][0] = seen[k];
    end
    @(negedge clk);
    line_in = '0;                          // hold
    rd_word = 2'd0;
    repeat (3) @(negedge clk);
    check(rd_data[15:0] == seen, "Shift memory holds the word when a1 = 0");
    line_in[1][0] = 1'b1;
    for (int k = 15; k >= 0; k--) begin
      check(out1 == seen[k], "Shift memory serial output");
      @(negedge clk);
    end
    line_in = '0;

    // Input mode: output follows the routing plane, LUT is the identifier.
    load(mk(16'hA5C3, SEL_STD, '0, MODE_INPUT, '0));
    check(is_tgt && !is_src && id == 16'hA5C3, "Input mode flags and identifier");
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      route_in = 1'($urandom);
      #1;
      check(out1 == route_in, "Input mode output");
    end

    // Output mode: a0 offered to the routing plane.
    load(mk(16'h1234, SEL_STD, '0, MODE_OUTPUT, '0));
    check(is_src && !is_tgt && id == 16'h1234, "Output mode flags and identifier");
    for (int t = 0; t < 10; t++) begin
      @(negedge clk);
      line_in = 8'($urandom);
      #1;
      check(route_out == a[0], "Output mode value to routing plane");
    end

    // Trigger mode: 0...01 gives one pulse every 16 cycles.
    load(mk(16'h0001, SEL_STD, '0, MODE_TRIGGER, '0));
    t0 = -1; per = 0;
    for (int t = 0; t < 64; t++) begin
      @(negedge clk);
      if (out1) begin
        if (t0 >= 0) begin
          check(t - t0 == 16, "Trigger period of 16 cycles");
          per++;
        end
        t0 = t;
      end
    end
    check(per == 3, "Trigger pulses seen");

    // Configure mode toward the east (cfg_dir = 1): a1 enable, a0 data.
    load(mk(16'h0, SEL_STD, '0, MODE_CONFIG, {9'd0, 1'b0, 2'd1, 2'b00}));
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      line_in = 8'($urandom);
      #1;
      check(rcfg_out_en == {2'b00, a[1], 1'b0} && rcfg_out_dat == {2'b00, a[0], 1'b0},
            "Configure mode drives the east neighbour");
    end
    line_in = '0;

    // Switch box: north line 0 <- out1, east line 1 <- west line 1,
    // south line 0 <- f2 (3-LUT), west line 0 <- north line 0.
    lut = 16'($urandom);
    begin
      logic [23:0] sb = '0;
      sb[(0*2+0)*3 +: 3] = 3'd6;        // N0 <- out1
      sb[(1*2+1)*3 +: 3] = 3'd5;        // E1: others N,S,W -> 5 = W line 1
      sb[(2*2+0)*3 +: 3] = 3'd7;        // S0 <- f2
      sb[(3*2+0)*3 +: 3] = 3'd0;        // W0: others N,E,S -> 0 = N line 0
      load(mk(lut, SEL_STD, sb, MODE_LUT3, '0));
    end
    for (int t = 0; t < 30; t++) begin
      @(negedge clk);
      line_in = 8'($urandom);
      #1;
      check(line_out[0][0] == lut[{1'b0, a[2:0]}], "switch box N0 = out1");
      check(line_out[1][1] == line_in[3][1], "switch box E1 = W1");
      check(line_out[2][0] == lut[{1'b1, a[2:0]}], "switch box S0 = f2");
      check(line_out[3][0] == line_in[0][0], "switch box W0 = N0");
    end
    line_in = '0;

    // Serial reconfiguration from the west with cfg_chain: bits leaving go
    // out to the east. Bypass mode and other, so 54 bits circulate.
    begin
      logic [75:0] v;
      logic [53:0] st;
      v = mk(16'($urandom), 14'($urandom), 24'($urandom), MODE_LUT4, {9'd0, 1'b1, 2'd0, 2'b00});
      v[60] = 1'b1; v[75] = 1'b1;
      load(v);
      st = {$urandom, $urandom};
      for (int k = 0; k < 108; k++) begin
        @(negedge clk);
        rcfg_in_en = 4'b1000; rcfg_in_dat = {(k < 54) ? st[k] : 1'b0, 3'b000};
        #1;
        check(rcfg_out_en == 4'b0010, "chain forwards east");
        if (k >= 54) check(rcfg_out_dat[1] == st[k-54], "54 stored bits come out in order");
      end
      @(negedge clk);
      rcfg_in_en = '0;
      rd_word = 2'd2;
      #1;
      check(rd_data[11:0] == v[75:64], "bypassed blocks keep their value");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
