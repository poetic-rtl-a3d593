// tb_routing_dense: a densely connected routing workload on the full-size
// routing plane (8 x 18). Eight sources and eight targets are packed into a
// 4 x 4 block of units in a checkerboard, each target needing a different
// source placed away from it. All sixteen request at once. The test checks
// that every target ends up connected, that each receives exactly its own
// source's value while all sources toggle independently, that no link is
// shared by two nets (each net is driven separately) and that the routing
// finishes within a bounded number of cycles.
module tb_routing_dense;
  import poetic_pkg::*;

  localparam int R = 8, C = 18, N = R * C;

  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [N-1:0] mol_is_src = '0, mol_is_tgt = '0, mol_val = '0;
  logic [ID_W-1:0] mol_id [N];
  logic [N-1:0] mol_in, mol_conn, master;
  logic [3:0] link_used [N];
  logic busy;
  int checks = 0, failures = 0;
  int src_at [8], tgt_at [8];

  routing_plane dut (
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

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int ns = 0, nt = 0, cycles = 0, links = 0, idle = 0;
    foreach (mol_id[i]) mol_id[i] = '0;
    // 4 x 4 block at rows 2..5, columns 7..10, checkerboard of sources and
    // targets; target k needs source (k + 3) mod 8.
    for (int r = 2; r < 6; r++)
      for (int c = 7; c < 11; c++)
        if (((r + c) % 2) == 0) src_at[ns++] = r * C + c;
        else tgt_at[nt++] = r * C + c;
    for (int k = 0; k < 8; k++) begin
      mol_is_src[src_at[k]] = 1'b1; mol_id[src_at[k]] = 16'h0100 + 16'(k);
      mol_is_tgt[tgt_at[k]] = 1'b1; mol_id[tgt_at[k]] = 16'h0100 + 16'((k + 3) % 8);
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // busy drops for one cycle between two routing processes, so wait until
    // the plane has been idle for a few cycles in a row
    while (idle < 4) begin
      @(negedge clk);
      cycles++;
      idle = busy ? 0 : idle + 1;
    end
    cycles -= 4;
    for (int i = 0; i < N; i++) links += $countones(link_used[i]);
    $display("routing finished after %0d cycles, %0d links used", cycles, links);
    check(cycles < 2000, "routing finishes");
    for (int k = 0; k < 8; k++) check(mol_conn[tgt_at[k]], "target connected");
    for (int t = 0; t < 32; t++) begin
      @(negedge clk);
      for (int k = 0; k < 8; k++) mol_val[src_at[k]] = 1'($urandom);
      #1;
      for (int k = 0; k < 8; k++)
        check(mol_in[tgt_at[k]] == mol_val[src_at[(k + 3) % 8]], "target receives its own source");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
