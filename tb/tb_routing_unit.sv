// tb_routing_unit: self-checking test of a single routing unit, with the
// testbench playing the rest of the routing plane on the four sides.
//  A. The unit is an unconnected source with no request below or to the
//     west: it must become master in one cycle, send its identifier MSB
//     first over exactly 16 cycles, announce a source master in one cycle,
//     start the wave on its four free links, stop it when a target is found
//     elsewhere, reserve the link a back-trace token arrives on, and then
//     drive that link with its molecule's value and stop requesting.
//  B. After a restart, the unit is a target that sees a request from the
//     south: it must not become master, must recognise the broadcast
//     identifier, be reached by the wave, report the find, send its token
//     to its parent and deliver the parent's data to its molecule.
//  C. A target whose identifier differs is reached but reports nothing.
module tb_routing_unit;
  import poetic_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic mol_is_src = 1'b0, mol_is_tgt = 1'b0, mol_val = 1'b0, mol_in;
  logic [ID_W-1:0] mol_id = '0;
  logic [3:0][NCH-1:0] bc_in = '0, bc_out;
  logic [3:0] wave_in = '0, wave_out, bt_in = '0, bt_out, dat_in = '0, dat_out;
  logic [2:0] phase;
  logic is_master, mol_conn;
  logic [3:0] link_used;
  int checks = 0, failures = 0;

  routing_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (phase %0d)", what, phase);
    end
  endtask

  function automatic logic all_dirs(input int ch);
    return bc_out[0][ch] && bc_out[1][ch] && bc_out[2][ch] && bc_out[3][ch];
  endfunction

  task automatic step;
    @(negedge clk);
  endtask

  initial begin
    int addr_cycles;
    logic [ID_W-1:0] tid;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;

    // ---------------- A: source master ----------------
    mol_is_src = 1'b1; mol_id = 16'hB2C5;
    #1;
    check(phase == 3'd0 && all_dirs(CH_REQ), "A: request broadcast in every direction");
    step;
    check(is_master, "A: master after one cycle");
    addr_cycles = 0;
    for (int k = ID_W - 1; k >= 0; k--) begin
      check(phase == 3'd1, "A: address phase");
      check(all_dirs(CH_ADDR) == mol_id[k], "A: address bit, MSB first");
      addr_cycles++;
      step;
    end
    check(addr_cycles == ID_W, "A: address phase lasts n cycles");
    check(phase == 3'd2 && all_dirs(CH_MSRC), "A: elimination announces a source master");
    step;
    check(phase == 3'd3 && wave_out == 4'b1111 && all_dirs(CH_GROW), "A: wave leaves on all free links");
    step;
    check(wave_out == 4'b0000, "A: wave leaves the source once");
    bc_in[DIR_E][CH_GROW] = 1'b1;          // wave growing further east
    step;
    bc_in[DIR_E][CH_GROW] = 1'b0;
    bc_in[DIR_E][CH_FOUND] = 1'b1;         // a target was reached
    #1;
    check(phase == 3'd3, "A: still expanding when the target is found");
    step;
    bc_in[DIR_E][CH_FOUND] = 1'b0;
    check(phase == 3'd4, "A: back-trace phase");
    bc_in[DIR_E][CH_BUSY] = 1'b1; bt_in[DIR_E] = 1'b1;   // token from the east child
    step;
    bc_in[DIR_E][CH_BUSY] = 1'b0; bt_in[DIR_E] = 1'b0;
    check(link_used == 4'b0010, "A: east link reserved");
    check(bt_out == 4'b0000, "A: token stops at the source");
    step;
    check(phase == 3'd5, "A: finish");
    step;
    check(phase == 3'd0 && !is_master, "A: back to idle");
    for (int t = 0; t < 8; t++) begin
      mol_val = 1'($urandom);
      dat_in = 4'($urandom);
      #1;
      check(dat_out == {2'b00, mol_val, 1'b0}, "A: east link carries the source value");
      check(bc_out[0][CH_REQ] == 1'b0, "A: no new request once routed");
      step;
    end

    // ---------------- B: target, not master ----------------
    restart = 1'b1;
    step;
    restart = 1'b0;
    check(link_used == 4'b0000, "B: restart frees the links");
    mol_is_src = 1'b0; mol_is_tgt = 1'b1; tid = 16'h0F3C; mol_id = tid;
    bc_in[DIR_S][CH_REQ] = 1'b1;           // a request from a lower row
    step;
    bc_in[DIR_S][CH_REQ] = 1'b0;
    check(!is_master && phase == 3'd1, "B: lower request wins the election");
    for (int k = ID_W - 1; k >= 0; k--) begin
      bc_in[DIR_S][CH_ADDR] = tid[k];
      #1;
      check(bc_out[DIR_N][CH_ADDR] == tid[k], "B: address from the south travels north");
      check(!bc_out[DIR_S][CH_ADDR] && !bc_out[DIR_E][CH_ADDR] && !bc_out[DIR_W][CH_ADDR],
            "B: address from the south goes nowhere else");
      step;
    end
    bc_in[DIR_S][CH_ADDR] = 1'b0;
    bc_in[DIR_S][CH_MSRC] = 1'b1;
    step;
    bc_in[DIR_S][CH_MSRC] = 1'b0;
    check(phase == 3'd3 && wave_out == 4'b0000, "B: target does not start the wave");
    bc_in[DIR_S][CH_GROW] = 1'b1; wave_in[DIR_S] = 1'b1;
    step;
    bc_in[DIR_S][CH_GROW] = 1'b0; wave_in[DIR_S] = 1'b0;
    #1;
    check(all_dirs(CH_FOUND), "B: target reports it was reached");
    step;
    check(phase == 3'd4 && bt_out == 4'b0100, "B: token goes to the southern parent");
    check(mol_conn, "B: molecule input connected");
    step;
    check(bt_out == 4'b0000, "B: token sent once");
    step;
    step;
    check(phase == 3'd0, "B: back to idle");
    for (int t = 0; t < 8; t++) begin
      dat_in = 4'($urandom);
      #1;
      check(mol_in == dat_in[DIR_S], "B: molecule receives the south link");
      step;
    end

    // ---------------- C: non-matching target ----------------
    restart = 1'b1;
    step;
    restart = 1'b0;
    mol_id = 16'h1111;
    bc_in[DIR_W][CH_REQ] = 1'b1;
    step;
    bc_in[DIR_W][CH_REQ] = 1'b0;
    check(!is_master, "C: request from the west wins the election");
    for (int k = ID_W - 1; k >= 0; k--) begin
      bc_in[DIR_W][CH_ADDR] = tid[k];
      step;
    end
    bc_in[DIR_W][CH_ADDR] = 1'b0;
    bc_in[DIR_W][CH_MSRC] = 1'b1;
    step;
    bc_in[DIR_W][CH_MSRC] = 1'b0;
    bc_in[DIR_W][CH_GROW] = 1'b1; wave_in[DIR_W] = 1'b1;
    step;
    bc_in[DIR_W][CH_GROW] = 1'b0; wave_in[DIR_W] = 1'b0;
    #1;
    check(!bc_out[0][CH_FOUND], "C: other identifier is not a target");
    check(wave_out == 4'b1111 && all_dirs(CH_GROW), "C: reached unit relays the wave");
    step;
    check(phase == 3'd3 && !all_dirs(CH_GROW), "C: wavefront empty");
    step;
    check(phase == 3'd5, "C: wave dies out, process ends");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
