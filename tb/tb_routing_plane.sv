// tb_routing_plane: self-checking test of the dynamic routing plane on a
// 4 x 6 array. The testbench places sources and targets (identifiers as a
// molecule in Output or Input mode would present them) and checks:
//  1. a single source-target pair: the target is connected exactly
//     1 + 16 + 1 + D + 1 cycles after the request (election, address,
//     elimination, D wave steps, find), the path uses D links (shortest,
//     D = Manhattan distance) and carries the source's value;
//  2. one source and three targets, routed in three processes (target
//     masters take turns) with later paths avoiding links already in use;
//  3. two sources with the same identifier and a source master: the other
//     source is eliminated even though it is nearer;
//  4. a target master with two matching sources: the nearer one is used;
//  5. a target whose source does not exist: the process ends, nothing is
//     connected and the plane goes idle.
module tb_routing_plane;
  import poetic_pkg::*;

  localparam int R = 4, C = 6, N = R * C;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [N-1:0] mol_is_src = '0, mol_is_tgt = '0, mol_val = '0;
  logic [ID_W-1:0] mol_id [N];
  logic [N-1:0] mol_in, mol_conn, master;
  logic [3:0] link_used [N];
  logic busy;
  int checks = 0, failures = 0;
  int n_src_master = 0, n_tgt_master = 0, n_processes = 0;

  routing_plane #(.ROWS(R), .COLS(C)) dut (
    .clk, .rst_n, .restart, .mol_is_src, .mol_is_tgt, .mol_id, .mol_val,
    .mol_in, .mol_conn, .master, .link_used, .busy
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Count routing processes and who led them.
  always @(posedge clk) begin
    if (rst_n && |master && $past(master) == '0) begin
      n_processes++;
      for (int i = 0; i < N; i++) if (master[i]) begin
        if (mol_is_src[i]) n_src_master++;
        else n_tgt_master++;
      end
    end
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

  task automatic clear_all;
    mol_is_src = '0; mol_is_tgt = '0; mol_val = '0;
    foreach (mol_id[i]) mol_id[i] = '0;
    @(negedge clk);
    restart = 1'b1;
    @(negedge clk);
    restart = 1'b0;
  endtask

  task automatic wait_idle;
    int quiet = 0;
    while (quiet < 3) begin
      @(negedge clk);
      quiet = busy ? 0 : quiet + 1;
    end
  endtask

  function automatic int links_total;
    int n = 0;
    for (int i = 0; i < N; i++) n += $countones(link_used[i]);
    return n;
  endfunction

  // Toggle a source value and check that a target follows it.
  task automatic check_data(input int s, input int t, input string what);
    for (int k = 0; k < 6; k++) begin
      mol_val[s] = 1'($urandom);
      #1;
      check(mol_in[t] == mol_val[s], what);
    end
  endtask

  initial begin
    int t_start, t_conn, s, t;
    foreach (mol_id[i]) mol_id[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. single pair (0,0) -> (3,5), D = 8
    s = ix(0, 0); t = ix(3, 5);
    mol_is_src[s] = 1'b1; mol_id[s] = 16'h00A1;
    mol_is_tgt[t] = 1'b1; mol_id[t] = 16'h00A1;
    t_start = $time / 10;
    while (!mol_conn[t]) @(negedge clk);
    t_conn = $time / 10;
    check(t_conn - t_start == 1 + ID_W + 1 + 8 + 1, "1: phase timing and shortest wave");
    wait_idle();
    check(links_total() == 8, "1: path of Manhattan length");
    check_data(s, t, "1: data follows the path");

    // 2. one source, three targets
    clear_all();
    s = ix(1, 1);
    mol_is_src[s] = 1'b1; mol_id[s] = 16'h0001;
    mol_is_tgt[ix(3, 4)] = 1'b1; mol_id[ix(3, 4)] = 16'h0001;
    mol_is_tgt[ix(0, 5)] = 1'b1; mol_id[ix(0, 5)] = 16'h0001;
    mol_is_tgt[ix(2, 0)] = 1'b1; mol_id[ix(2, 0)] = 16'h0001;
    wait_idle();
    check(mol_conn[ix(3, 4)] && mol_conn[ix(0, 5)] && mol_conn[ix(2, 0)], "2: all targets routed");
    check_data(s, ix(3, 4), "2: data to (3,4)");
    check_data(s, ix(0, 5), "2: data to (0,5)");
    check_data(s, ix(2, 0), "2: data to (2,0)");

    // 3. two sources with the same identifier, source master
    clear_all();
    mol_is_src[ix(0, 2)] = 1'b1; mol_id[ix(0, 2)] = 16'h0007;
    mol_is_src[ix(3, 3)] = 1'b1; mol_id[ix(3, 3)] = 16'h0007;
    mol_is_tgt[ix(3, 0)] = 1'b1; mol_id[ix(3, 0)] = 16'h0007;
    wait_idle();
    check(mol_conn[ix(3, 0)], "3: target routed");
    check(links_total() == 5, "3: path from the master source (length 5)");
    mol_val[ix(3, 3)] = 1'b0;
    check_data(ix(0, 2), ix(3, 0), "3: data from the master source");

    // 4. target master, two matching sources: nearer one wins
    clear_all();
    mol_is_tgt[ix(0, 0)] = 1'b1; mol_id[ix(0, 0)] = 16'h0009;
    mol_is_src[ix(0, 4)] = 1'b1; mol_id[ix(0, 4)] = 16'h0009;
    mol_is_src[ix(3, 0)] = 1'b1; mol_id[ix(3, 0)] = 16'h0009;
    wait_idle();
    check(mol_conn[ix(0, 0)] && links_total() == 3, "4: shortest of two sources");
    mol_val[ix(0, 4)] = 1'b0;
    check_data(ix(3, 0), ix(0, 0), "4: data from the nearer source");

    // 5. target without a source
    clear_all();
    mol_is_tgt[ix(2, 2)] = 1'b1; mol_id[ix(2, 2)] = 16'h0055;
    wait_idle();
    check(!mol_conn[ix(2, 2)] && links_total() == 0, "5: nothing connected");
    repeat (30) @(negedge clk);
    check(!busy, "5: plane stays idle");

    check(n_src_master > 0, "source master seen");
    check(n_tgt_master > 0, "target master seen");
    check(n_processes >= 8, "routing processes run");
    $display("processes=%0d source_masters=%0d target_masters=%0d",
             n_processes, n_src_master, n_tgt_master);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
