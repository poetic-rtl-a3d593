// tb_tissue: four full-size chips tiled as a 2 x 2 tissue.
//
// Chips A (south-west), B (south-east), C (north-west) and D (north-east) are
// joined edge to edge through their organic-bus ports: the two neighbour
// lines of every edge molecule and the carry chain from a northern chip into
// the southern one. The outer edges are tied low, except the line the test
// drives into A's west edge. Each chip is configured over its own
// configuration bus, as separate environment subsystems would do.
//
// Checks:
//   1. A signal entering A at row 0 crosses A and B eastwards on line 0,
//      turns north in B's last column, climbs through B into D and is
//      inverted by a 4-LUT at D's north-east corner molecule, which drives
//      D's north edge. The result is compared each cycle with the driven
//      value, so the path from chip to chip is combinational.
//   2. A 3-LUT molecule in C's bottom row sends a constant carry into A's top
//      row, where a 4-LUT molecule takes its input 2 from the carry.
//   3. Routing runs inside each chip: an Output and an Input with the same
//      identifier in chip B are connected, while a target in chip D whose
//      source exists only in chip B stays unconnected (the routing layer
//      stops at a chip edge).
module tb_tissue;
  import poetic_pkg::*;

  localparam int R = 8, C = 18, N = R * C;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic       cfg_we [4];
  logic [7:0] cfg_addr [4];
  logic [1:0] cfg_word [4];
  logic [31:0] cfg_wdata [4], cfg_rdata [4];
  logic       route_restart [4], route_busy [4];
  logic [1:0] n_li [4][C], n_lo [4][C], s_li [4][C], s_lo [4][C];
  logic [1:0] e_li [4][R], e_lo [4][R], w_li [4][R], w_lo [4][R];
  logic [C-1:0] n_ci [4], s_co [4];
  logic [N-1:0] mol_out [4], mol_routed [4], route_master [4];
  logic [3:0] route_links [4][N];
  logic       drive;

  localparam int A = 0, B = 1, CC = 2, D = 3;
  localparam int SN = 0, SE = 1;   // sides used in switch-box fields

  for (genvar k = 0; k < 4; k++) begin : g_chip
    poetic_chip u_chip (
      .clk, .rst_n,
      .cfg_we(cfg_we[k]), .cfg_addr(cfg_addr[k]), .cfg_word(cfg_word[k]),
      .cfg_wdata(cfg_wdata[k]), .cfg_rdata(cfg_rdata[k]),
      .route_restart(route_restart[k]), .route_busy(route_busy[k]),
      .n_line_in(n_li[k]), .n_line_out(n_lo[k]), .s_line_in(s_li[k]), .s_line_out(s_lo[k]),
      .e_line_in(e_li[k]), .e_line_out(e_lo[k]), .w_line_in(w_li[k]), .w_line_out(w_lo[k]),
      .n_carry_in(n_ci[k]), .s_carry_out(s_co[k]),
      .mol_out(mol_out[k]), .mol_routed(mol_routed[k]),
      .route_master(route_master[k]), .route_links(route_links[k])
    );
  end

  // Organic bus between the four chips; outer edges tied low.
  always_comb begin
    for (int c = 0; c < C; c++) begin
      s_li[CC][c] = n_lo[A][c];   n_li[A][c] = s_lo[CC][c];
      s_li[D][c]  = n_lo[B][c];   n_li[B][c] = s_lo[D][c];
      s_li[A][c]  = '0;           s_li[B][c] = '0;
      n_li[CC][c] = '0;           n_li[D][c] = '0;
    end
    for (int r = 0; r < R; r++) begin
      w_li[B][r] = e_lo[A][r];    e_li[A][r] = w_lo[B][r];
      w_li[D][r] = e_lo[CC][r];   e_li[CC][r] = w_lo[D][r];
      w_li[A][r] = '0;            w_li[CC][r] = '0;
      e_li[B][r] = '0;            e_li[D][r] = '0;
    end
    w_li[A][0][0] = drive;
    n_ci[A] = s_co[CC];  n_ci[B] = s_co[D];
    n_ci[CC] = '0;       n_ci[D] = '0;
  end

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

  task automatic wr(input int chip, input int r, input int c, input int word, input logic [31:0] data);
    @(negedge clk);
    cfg_we[chip] = 1'b1; cfg_addr[chip] = 8'(r * C + c);
    cfg_word[chip] = 2'(word); cfg_wdata[chip] = data;
    @(negedge clk);
    cfg_we[chip] = 1'b0;
  endtask

  // Whole configuration of one molecule (bypass bits clear).
  task automatic cfgm(input int chip, input int r, input int c, input logic [15:0] lut,
                      input logic [13:0] sel, input logic [23:0] sb, input mode_e mode,
                      input logic [13:0] oth);
    logic [75:0] v;
    v = '0;
    v[BYP_LUT-1:LUT_LO] = lut;  v[BYP_SEL-1:SEL_LO] = sel;
    v[BYP_SB-1:SB_LO] = sb;     v[BYP_MODE-1:MODE_LO] = mode;
    v[BYP_OTH-1:OTH_LO] = oth;
    wr(chip, r, c, 0, v[31:0]);
    wr(chip, r, c, 1, v[63:32]);
    wr(chip, r, c, 2, {20'd0, v[75:64]});
  endtask

  // Switch-box field for outgoing line (side, k) with selector v.
  function automatic logic [23:0] sbf(input int side, input int k, input int v);
    logic [23:0] f;
    f = 24'(v);
    return f << ((side * 2 + k) * 3);
  endfunction

  // Input-select: LUT input i takes incoming line l.
  function automatic logic [13:0] insel(input int i, input int l);
    logic [13:0] f;
    f = 14'(l);
    return f << (i * 3);
  endfunction

  initial begin
    int routed_b;
    drive = 1'b0;
    for (int k = 0; k < 4; k++) begin
      cfg_we[k] = 1'b0; cfg_addr[k] = '0; cfg_word[k] = '0; cfg_wdata[k] = '0;
      route_restart[k] = 1'b1;   // hold routing until everything is configured
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // 1. East along row 0 of A and B on line 0 (E0 <- W0, selector 4), north
    // at B(0,17) (N0 <- W0, selector 4), up column 17 of B and D (N0 <- S0,
    // selector 2), inverted at D(7,17) and sent out on its N0 (selector 6).
    for (int c = 0; c < C; c++) cfgm(A, 0, c, '0, '0, sbf(SE, 0, 4), MODE_LUT4, '0);
    for (int c = 0; c < C - 1; c++) cfgm(B, 0, c, '0, '0, sbf(SE, 0, 4), MODE_LUT4, '0);
    cfgm(B, 0, C - 1, '0, '0, sbf(SN, 0, 4), MODE_LUT4, '0);
    for (int r = 1; r < R; r++) cfgm(B, r, C - 1, '0, '0, sbf(SN, 0, 2), MODE_LUT4, '0);
    for (int r = 0; r < R - 1; r++) cfgm(D, r, C - 1, '0, '0, sbf(SN, 0, 2), MODE_LUT4, '0);
    cfgm(D, R - 1, C - 1, 16'h5555, insel(0, 4), sbf(SN, 0, 6), MODE_LUT4, '0);
    for (int t = 0; t < 40; t++) begin
      @(negedge clk);
      drive = 1'($urandom);
      #1;
      check(n_lo[D][C-1][0] == !drive, "inverted signal leaves D after crossing A, B and D");
      check(e_lo[A][0][0] == drive, "signal crosses the A/B edge");
      check(n_lo[B][C-1][0] == drive, "signal crosses the B/D edge");
    end

    // 2. Carry from C(0,5) (3-LUT, second half all ones) into A(7,5), whose
    // 4-LUT copies input 2 (the carry).
    check(mol_out[A][7*C+5] == 1'b0, "no carry before C is configured");
    cfgm(A, R - 1, 5, 16'hF0F0, 14'(1) << 12, '0, MODE_LUT4, '0);
    check(mol_out[A][7*C+5] == 1'b0, "carry input low while C is at reset");
    cfgm(CC, 0, 5, 16'hFF00, '0, '0, MODE_LUT3, '0);
    #1;
    check(s_co[CC][5] == 1'b1, "carry leaves C at its south edge");
    check(mol_out[A][7*C+5] == 1'b1, "carry from C reaches A");

    // 3. Routing per chip: Output 0x2222 at B(4,4) and Input 0x2222 at
    // B(4,8); Input 0x2222 at D(1,1) has no source in D.
    cfgm(B, 4, 4, 16'h2222, '0, '0, MODE_OUTPUT, '0);
    cfgm(B, 4, 8, 16'h2222, '0, '0, MODE_INPUT, '0);
    cfgm(D, 1, 1, 16'h2222, '0, '0, MODE_INPUT, '0);
    @(negedge clk);
    for (int k = 0; k < 4; k++) route_restart[k] = 1'b0;
    repeat (400) @(negedge clk);
    routed_b = mol_routed[B][4*C+8];
    check(routed_b == 1, "Input in B connected to the Output in B");
    check(mol_routed[D][1*C+1] == 1'b0, "Input in D not connected across the chip edge");
    check(!route_busy[B] && !route_busy[D], "routing finished in every chip");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
