// tb_poetic_chip: end-to-end test of the chip at its default size (8 x 18
// molecules), configured only through the 32-bit configuration bus and the
// organic-bus edges, as the environment subsystem would. Row 0 is south.
//
// Part 1, an application with dynamic routing (configured while the routing
// is held in restart, then released):
//   (0,0)  4-LUT: west edge line 0 XOR south edge line 0, sent east
//   (0,1)  Output, identifier 1001, fed by (0,0)
//   (7,0)  Input needing 1001, sent out on the west edge (row 7, line 0)
//   (7,17) Input needing 1001, sent out on the east edge (row 7, line 1)
//   (5,9)  Output, identifier 1001 too: eliminated, as (0,1) is master
//   (3,3)  Input needing 7777, which no source has: unreachable
// Part 2, the other molecule modes on the west column and the south row:
//   Shift memory (4,0), Trigger (5,0), Comm (6,0), 3-LUT with carry and
//   flip-flop (0,15), Configure (3,0) reconfiguring (3,1), which chains the
//   overflow into (3,2).
// Part 3, routing-resource exhaustion: after a restart, net A (0,10)->(0,12)
// takes the straight links, so net B (0,11)->(0,13) must detour.
// Each mechanism is counted; one that never happens counts as a failure.
module tb_poetic_chip;
  import poetic_pkg::*;

  localparam int R = 8, C = 18, N = R * C, AW = $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic cfg_we = 1'b0;
  logic [AW-1:0] cfg_addr = '0;
  logic [1:0] cfg_word = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata;
  logic route_restart = 1'b0, route_busy;
  logic [1:0] n_line_in [C], n_line_out [C], s_line_in [C], s_line_out [C];
  logic [1:0] e_line_in [R], e_line_out [R], w_line_in [R], w_line_out [R];
  logic [C-1:0] n_carry_in = '0, s_carry_out;
  logic [N-1:0] mol_out, mol_routed, route_master;
  logic [3:0] route_links [N];
  int checks = 0, failures = 0;

  // mechanism counters
  int m_cfg_write = 0, m_readback = 0, m_lut4 = 0, m_lut3_carry = 0, m_dff = 0;
  int m_comm = 0, m_shift = 0, m_input = 0, m_output = 0, m_trigger = 0;
  int m_configure = 0, m_chain = 0, m_src_master = 0, m_tgt_master = 0;
  int m_address = 0, m_eliminate = 0, m_multi_target = 0, m_detour = 0;
  int m_unreachable = 0, m_restart = 0;

  poetic_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic int ix(input int r, input int c);
    return r * C + c;
  endfunction

  // Sources of part 1 and 3, to tell source masters from target masters.
  function automatic logic is_source_site(input int i);
    return i == ix(0, 1) || i == ix(5, 9) || i == ix(0, 10) || i == ix(0, 11);
  endfunction

  always @(posedge clk) begin
    if (rst_n && |route_master && $past(route_master) == '0) begin
      m_address++;
      for (int i = 0; i < N; i++)
        if (route_master[i]) begin
          if (is_source_site(i)) m_src_master++;
          else m_tgt_master++;
        end
    end
  end

  function automatic logic [75:0] mk(input logic [15:0] lut, input logic [13:0] sel,
                                     input logic [23:0] sb, input logic [2:0] mode,
                                     input logic [13:0] oth);
    logic [75:0] v = '0;
    v[15:0] = lut; v[30:17] = sel; v[55:32] = sb; v[59:57] = mode; v[74:61] = oth;
    return v;
  endfunction

  // LUT inputs from incoming lines: 0 N0 1 N1 2 E0 3 E1 4 S0 5 S1 6 W0 7 W1
  function automatic logic [13:0] sel4(input int s0, input int s1, input int s2, input int s3);
    return {1'b0, 1'b0, 3'(s3), 3'(s2), 3'(s1), 3'(s0)};
  endfunction

  // Switch-box setting: line k of side s driven by out1.
  function automatic logic [23:0] sb_out1(input int s, input int k);
    logic [23:0] sb = '0;
    sb[(s * 2 + k) * 3 +: 3] = 3'd6;
    return sb;
  endfunction

  task automatic load(input int r, input int c, input logic [75:0] v);
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = AW'(ix(r, c)); cfg_word = 2'(w);
      cfg_wdata = (w == 0) ? v[31:0] : (w == 1) ? v[63:32] : {20'd0, v[75:64]};
      m_cfg_write++;
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic read_cfg(input int r, input int c, output logic [75:0] v);
    cfg_addr = AW'(ix(r, c));
    for (int w = 0; w < 3; w++) begin
      cfg_word = 2'(w);
      #1;
      if (w == 0) v[31:0] = cfg_rdata;
      else if (w == 1) v[63:32] = cfg_rdata;
      else v[75:64] = cfg_rdata[11:0];
    end
    m_readback++;
  endtask

  task automatic wait_idle;
    int quiet = 0;
    while (quiet < 3) begin
      @(negedge clk);
      quiet = route_busy ? 0 : quiet + 1;
    end
  endtask

  function automatic int links_total;
    int n = 0;
    for (int i = 0; i < N; i++) n += $countones(route_links[i]);
    return n;
  endfunction

  initial begin
    logic [75:0] v, rb, v31;
    logic [15:0] word;
    logic [7:0] pat;
    logic [69:0] bits;
    logic prev;
    int t0, per, links_before;
    for (int i = 0; i < C; i++) begin n_line_in[i] = '0; s_line_in[i] = '0; end
    for (int i = 0; i < R; i++) begin e_line_in[i] = '0; w_line_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Configuration read-back at the last address.
    v = mk(16'($urandom), 14'($urandom), 24'o66666666, MODE_LUT4, 14'($urandom));
    load(7, 17, v);
    read_cfg(7, 17, rb);
    check(rb == v, "read-back of molecule 143");

    // ---------------- Part 1 ----------------
    route_restart = 1'b1;
    load(0, 0, mk(16'h6666, sel4(6, 4, 4, 4), sb_out1(1, 0), MODE_LUT4, '0));
    load(0, 1, mk(16'h1001, sel4(6, 6, 6, 6), '0, MODE_OUTPUT, '0));
    load(7, 0, mk(16'h1001, sel4(0, 0, 0, 0), sb_out1(3, 0), MODE_INPUT, '0));
    load(7, 17, mk(16'h1001, sel4(0, 0, 0, 0), sb_out1(1, 1), MODE_INPUT, '0));
    load(5, 9, mk(16'h1001, sel4(0, 0, 0, 0), '0, MODE_OUTPUT, '0));
    load(3, 3, mk(16'h7777, sel4(0, 0, 0, 0), '0, MODE_INPUT, '0));
    @(negedge clk);
    route_restart = 1'b0;
    m_restart++;
    wait_idle();
    check(mol_routed[ix(7, 0)] && mol_routed[ix(7, 17)], "both targets routed");
    if (mol_routed[ix(7, 0)] && mol_routed[ix(7, 17)]) m_multi_target++;
    check(route_links[ix(5, 9)] == 4'b0000, "duplicate source left unconnected");
    if (route_links[ix(5, 9)] == 4'b0000) m_eliminate++;
    check(!mol_routed[ix(3, 3)], "target without source stays unrouted");
    if (!mol_routed[ix(3, 3)]) m_unreachable++;
    for (int t = 0; t < 24; t++) begin
      @(negedge clk);
      w_line_in[0] = 2'($urandom); s_line_in[0] = 2'($urandom);
      #1;
      check(w_line_out[7][0] == (w_line_in[0][0] ^ s_line_in[0][0]), "XOR delivered to (7,0)");
      check(e_line_out[7][1] == (w_line_in[0][0] ^ s_line_in[0][0]), "XOR delivered to (7,17)");
      m_lut4++; m_output++; m_input++;
    end

    // ---------------- Part 2 ----------------
    // Shift memory at (4,0): a0 = W0 data, a1 = W1 shift; out1 to west line 0.
    load(4, 0, mk(16'h0, sel4(6, 7, 6, 6), sb_out1(3, 0), MODE_SHIFT, '0));
    word = 16'($urandom);
    for (int k = 15; k >= 0; k--) begin
      @(negedge clk);
      w_line_in[4] = {1'b1, word[k]};
    end
    @(negedge clk);
    w_line_in[4] = 2'b10;
    for (int k = 15; k >= 0; k--) begin
      check(w_line_out[4][0] == word[k], "shift memory returns the stored word");
      m_shift++;
      @(negedge clk);
    end
    w_line_in[4] = 2'b00;

    // Trigger at (5,0): 0...01 gives a pulse every 16 cycles on west line 0.
    load(5, 0, mk(16'h0001, sel4(6, 6, 6, 6), sb_out1(3, 0), MODE_TRIGGER, '0));
    t0 = -1; per = 0;
    for (int t = 0; t < 70; t++) begin
      @(negedge clk);
      if (w_line_out[5][0]) begin
        if (t0 >= 0) begin
          check(t - t0 == 16, "trigger period");
          m_trigger++;
        end
        t0 = t;
      end
    end

    // Comm at (6,0): compare west line 0 with the stored byte, W1 = shift.
    pat = 8'($urandom);
    w_line_in[6] = 2'b00;
    load(6, 0, mk({pat, 8'b1010_0101}, sel4(6, 0, 0, 7), sb_out1(3, 0), MODE_COMM, '0));
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      w_line_in[6] = {1'b1, pat[7 - (k % 8)]};
      #1;
      check(w_line_out[6][0] == 1'b1, "Comm match");
      m_comm++;
    end
    @(negedge clk);
    w_line_in[6] = {1'b0, ~pat[7]};
    #1;
    check(w_line_out[6][0] == 1'b0, "Comm mismatch");
    w_line_in[6] = 2'b00;

    // 3-LUT with carry at (0,15): f1 = S0 ^ S1 through the flip-flop on
    // south line 0, carry = S0 & S1 to the south edge.
    load(0, 15, mk(16'h8024, sel4(4, 5, 4, 4), sb_out1(2, 0), MODE_LUT3, 14'b01));
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      s_line_in[15] = 2'($urandom);
      #1;
      prev = s_line_in[15][0] ^ s_line_in[15][1];
      check(s_carry_out[15] == (s_line_in[15][0] & s_line_in[15][1]), "carry out");
      m_lut3_carry++;
      @(negedge clk);
      check(s_line_out[15][0] == prev, "registered first output");
      m_dff++;
    end

    // Configure (3,0) -> (3,1) [switch box, mode, other bypassed, chain]
    // -> (3,2). The switch boxes keep their reset setting, which passes only
    // lines from the north, so the bits shifted in cannot close a loop.
    v31 = mk(16'($urandom), 14'($urandom), '0, MODE_LUT4, {9'd0, 1'b1, 2'd0, 2'b00});
    v31[56] = 1'b1; v31[60] = 1'b1; v31[75] = 1'b1;
    load(3, 1, v31);
    v = mk(16'h0, 14'($urandom), '0, MODE_LUT4, '0);
    v[31] = 1'b1; v[56] = 1'b1; v[60] = 1'b1; v[75] = 1'b1;   // only the LUT shifts
    load(3, 2, v);
    w_line_in[3] = 2'b00;
    load(3, 0, mk(16'h0, sel4(6, 7, 6, 6), '0, MODE_CONFIG, {9'd0, 1'b0, 2'd1, 2'b00}));
    bits = {$urandom, $urandom, $urandom};
    for (int k = 0; k < 46; k++) begin
      @(negedge clk);
      w_line_in[3] = {1'b1, bits[k]};
      m_configure++;
    end
    @(negedge clk);
    w_line_in[3] = 2'b00;
    read_cfg(3, 1, rb);
    begin
      logic [29:0] exp30;
      for (int j = 0; j < 30; j++) exp30[j] = bits[45 - j];
      check({rb[30:17], rb[15:0]} == exp30, "partial reconfiguration of (3,1)");
      check(rb[75:31] == v31[75:31] && rb[16] == v31[16], "bypassed blocks kept");
    end
    read_cfg(3, 2, rb);
    begin
      logic [15:0] exp16;
      for (int j = 0; j < 16; j++) exp16[j] = bits[15 - j];
      check(rb[15:0] == exp16, "chained reconfiguration of (3,2)");
      if (rb[15:0] == exp16) m_chain++;
    end

    // ---------------- Part 3 ----------------
    route_restart = 1'b1;
    load(0, 1, mk(16'h0, sel4(0, 0, 0, 0), '0, MODE_LUT4, '0));
    load(7, 0, mk(16'h0, sel4(0, 0, 0, 0), '0, MODE_LUT4, '0));
    load(7, 17, mk(16'h0, sel4(0, 0, 0, 0), '0, MODE_LUT4, '0));
    load(5, 9, mk(16'h0, sel4(0, 0, 0, 0), '0, MODE_LUT4, '0));
    load(3, 3, mk(16'h0, sel4(0, 0, 0, 0), '0, MODE_LUT4, '0));
    // net A: (0,10) -> (0,12), net B: (0,11) -> (0,13); data from the south edge,
    // delivered to the south edge.
    load(0, 10, mk(16'h00AA, sel4(4, 4, 4, 4), '0, MODE_OUTPUT, '0));
    load(0, 11, mk(16'h00BB, sel4(4, 4, 4, 4), '0, MODE_OUTPUT, '0));
    load(0, 12, mk(16'h00AA, sel4(0, 0, 0, 0), sb_out1(2, 0), MODE_INPUT, '0));
    load(0, 13, mk(16'h00BB, sel4(0, 0, 0, 0), sb_out1(2, 0), MODE_INPUT, '0));
    @(negedge clk);
    route_restart = 1'b0;
    m_restart++;
    #1;
    check(links_total() == 0, "restart clears every path");
    wait_idle();
    check(mol_routed[ix(0, 12)] && mol_routed[ix(0, 13)], "both nets routed");
    check(links_total() == 2 + 4, "net A straight (2 links), net B detours (4 links)");
    if (route_links[ix(0, 11)][DIR_N] && route_links[ix(0, 11)][DIR_E]) m_detour++;
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      s_line_in[10] = 2'($urandom); s_line_in[11] = 2'($urandom);
      #1;
      check(s_line_out[12][0] == s_line_in[10][0], "net A data");
      check(s_line_out[13][0] == s_line_in[11][0], "net B data");
    end

    // Every mechanism must have happened.
    check(m_cfg_write > 0, "mechanism: configuration write");
    check(m_readback > 0, "mechanism: configuration read-back");
    check(m_lut4 > 0, "mechanism: 4-LUT mode");
    check(m_lut3_carry > 0, "mechanism: 3-LUT mode with carry");
    check(m_dff > 0, "mechanism: flip-flop output");
    check(m_comm > 0, "mechanism: Comm mode");
    check(m_shift > 0, "mechanism: Shift memory mode");
    check(m_input > 0, "mechanism: Input mode");
    check(m_output > 0, "mechanism: Output mode");
    check(m_trigger > 0, "mechanism: Trigger mode");
    check(m_configure > 0, "mechanism: Configure mode");
    check(m_chain > 0, "mechanism: chained partial reconfiguration");
    check(m_address > 0, "mechanism: master election and address broadcast");
    check(m_src_master > 0, "mechanism: source master");
    check(m_tgt_master > 0, "mechanism: target master");
    check(m_eliminate > 0, "mechanism: duplicate source eliminated");
    check(m_multi_target > 0, "mechanism: several targets on one net");
    check(m_detour > 0, "mechanism: detour around used links");
    check(m_unreachable > 0, "mechanism: unreachable target");
    check(m_restart > 0, "mechanism: routing restart");
    $display("cfg_write=%0d readback=%0d lut4=%0d lut3_carry=%0d dff=%0d comm=%0d shift=%0d",
             m_cfg_write, m_readback, m_lut4, m_lut3_carry, m_dff, m_comm, m_shift);
    $display("input=%0d output=%0d trigger=%0d configure=%0d chain=%0d processes=%0d",
             m_input, m_output, m_trigger, m_configure, m_chain, m_address);
    $display("src_master=%0d tgt_master=%0d eliminate=%0d multi_target=%0d detour=%0d unreachable=%0d restart=%0d",
             m_src_master, m_tgt_master, m_eliminate, m_multi_target, m_detour, m_unreachable, m_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
