// tb_organic_subsystem: self-checking test of a 3 x 4 organic array. The
// testbench configures molecules over the 32-bit bus and checks:
//  - configuration read-back;
//  - a small application: an XOR in molecule (0,0) fed from the west and
//    south edges, passed through the switch box to an Output-mode molecule
//    (0,1), routed by the routing plane to an Input-mode molecule (2,3) with
//    the same identifier and sent out on the east edge;
//  - a 3-LUT carry leaving the south edge;
//  - partial reconfiguration: a Configure-mode molecule (1,0) shifts 70 bits
//    into (1,1), whose mode and "other" blocks are bypassed and which chains
//    the 16 bits that overflow into (1,2);
//  - a routing restart, after which the same path is built again.
module tb_organic_subsystem;
  import poetic_pkg::*;

  localparam int R = 3, C = 4, N = R * C, AW = $clog2(N);

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

  organic_subsystem #(.ROWS(R), .COLS(C)) dut (.*);

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

  function automatic logic [75:0] mk(input logic [15:0] lut, input logic [13:0] sel,
                                     input logic [23:0] sb, input logic [2:0] mode,
                                     input logic [13:0] oth);
    logic [75:0] v = '0;
    v[15:0] = lut; v[30:17] = sel; v[55:32] = sb; v[59:57] = mode; v[74:61] = oth;
    return v;
  endfunction

  function automatic logic [13:0] sel4(input int s0, input int s1, input int s2, input int s3);
    return {1'b0, 1'b0, 3'(s3), 3'(s2), 3'(s1), 3'(s0)};
  endfunction

  task automatic load(input int r, input int c, input logic [75:0] v);
    for (int w = 0; w < 3; w++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_addr = AW'(r * C + c); cfg_word = 2'(w);
      cfg_wdata = (w == 0) ? v[31:0] : (w == 1) ? v[63:32] : {20'd0, v[75:64]};
    end
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  task automatic read_cfg(input int r, input int c, output logic [75:0] v);
    cfg_addr = AW'(r * C + c);
    for (int w = 0; w < 3; w++) begin
      cfg_word = 2'(w);
      #1;
      if (w == 0) v[31:0] = cfg_rdata;
      else if (w == 1) v[63:32] = cfg_rdata;
      else v[75:64] = cfg_rdata[11:0];
    end
  endtask

  task automatic wait_idle;
    int quiet = 0;
    while (quiet < 3) begin
      @(negedge clk);
      quiet = route_busy ? 0 : quiet + 1;
    end
  endtask

  initial begin
    logic [75:0] v, rb, v11;
    logic [69:0] bits;
    logic [23:0] sb;
    for (int i = 0; i < C; i++) begin n_line_in[i] = '0; s_line_in[i] = '0; end
    for (int i = 0; i < R; i++) begin e_line_in[i] = '0; w_line_in[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // Read-back of a configuration word set.
    // (switch box lines all driven by out1, so no loop through neighbours)
    v = mk(16'($urandom), 14'($urandom), 24'o66666666, MODE_LUT4, 14'($urandom));
    load(2, 1, v);
    read_cfg(2, 1, rb);
    check(rb == v, "configuration read-back");
    load(2, 1, '0);

    // (0,0): XOR of a0 = west line 0 (index 6) and a1 = south line 0 (index 4),
    // out1 sent east on line 0.
    sb = '0; sb[(1*2+0)*3 +: 3] = 3'd6;
    load(0, 0, mk(16'h6666, sel4(6, 4, 4, 4), sb, MODE_LUT4, '0));
    // (0,1): Output mode, identifier C0DE, a0 = west line 0.
    load(0, 1, mk(16'hC0DE, sel4(6, 6, 6, 6), '0, MODE_OUTPUT, '0));
    // (2,3): Input mode needing C0DE, out1 sent east on line 1.
    sb = '0; sb[(1*2+1)*3 +: 3] = 3'd6;
    load(2, 3, mk(16'hC0DE, sel4(0, 0, 0, 0), sb, MODE_INPUT, '0));
    wait_idle();
    check(mol_routed[2 * C + 3], "Input molecule routed");
    for (int t = 0; t < 16; t++) begin
      @(negedge clk);
      w_line_in[0] = 2'($urandom); s_line_in[0] = 2'($urandom);
      #1;
      check(e_line_out[2][1] == (w_line_in[0][0] ^ s_line_in[0][0]),
            "XOR result carried across the routing plane");
    end

    // (0,3): 3-LUT, carry = south line 0 AND south line 1.
    load(0, 3, mk(16'h8800, sel4(4, 5, 4, 4), '0, MODE_LUT3, '0));
    for (int t = 0; t < 12; t++) begin
      @(negedge clk);
      s_line_in[3] = 2'($urandom);
      #1;
      check(s_carry_out[3] == (s_line_in[3][0] & s_line_in[3][1]), "carry leaves the south edge");
    end

    // Partial reconfiguration (1,0) -> (1,1) -> (1,2).
    v11 = mk(16'($urandom), 14'($urandom), 24'($urandom), MODE_LUT4, {9'd0, 1'b1, 2'd0, 2'b00});
    v11[60] = 1'b1; v11[75] = 1'b1;          // bypass mode and other
    load(1, 1, v11);
    // (1,2): every block but the LUT bypassed, so of all the bits chained
    // into it only the last 16 stay, in its LUT; its switch box only passes
    // lines from the north, so (1,1)'s shifting switch box cannot close a
    // loop through it.
    v = mk(16'h0000, 14'($urandom), '0, MODE_LUT4, '0);
    v[31] = 1'b1; v[56] = 1'b1; v[60] = 1'b1; v[75] = 1'b1;
    load(1, 2, v);
    // Configure mode toward the east: a0 = west line 0, a1 = west line 1.
    load(1, 0, mk(16'h0, sel4(6, 7, 6, 6), '0, MODE_CONFIG, {9'd0, 1'b0, 2'd1, 2'b00}));
    bits = {$urandom, $urandom, $urandom};
    for (int k = 0; k < 70; k++) begin
      @(negedge clk);
      w_line_in[1] = {1'b1, bits[k]};
    end
    @(negedge clk);
    w_line_in[1] = 2'b00;
    read_cfg(1, 1, rb);
    // (1,1) keeps the last 54 bits: bit 69 at LUT[0], bit 16 at switch box top.
    begin
      logic [53:0] exp54;
      for (int j = 0; j < 54; j++) exp54[j] = bits[69 - j];
      check({rb[55:32], rb[30:17], rb[15:0]} == exp54, "54 bits shifted into (1,1)");
      check(rb[75:56] == v11[75:56] && rb[16] == v11[16] && rb[31] == v11[31],
            "bypassed blocks of (1,1) unchanged");
    end
    read_cfg(1, 2, rb);
    begin
      logic [15:0] exp16;
      for (int j = 0; j < 16; j++) exp16[j] = bits[15 - j];
      check(rb[15:0] == exp16, "16 overflow bits chained into (1,2)");
      check(rb[75:16] == v[75:16], "bypassed blocks of (1,2) unchanged");
    end

    // Routing restart: the path is rebuilt and works again.
    @(negedge clk);
    route_restart = 1'b1;
    @(negedge clk);
    route_restart = 1'b0;
    #1;
    check(!mol_routed[2 * C + 3], "restart clears the route");
    wait_idle();
    check(mol_routed[2 * C + 3], "route rebuilt after restart");
    for (int t = 0; t < 8; t++) begin
      @(negedge clk);
      w_line_in[0] = 2'($urandom); s_line_in[0] = 2'($urandom);
      #1;
      check(e_line_out[2][1] == (w_line_in[0][0] ^ s_line_in[0][0]), "data after restart");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
