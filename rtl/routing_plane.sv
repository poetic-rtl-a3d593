// routing_plane: the dynamic routing layer of the organic subsystem, a
// ROWS x COLS mesh of routing units.
//
// Unit (r, c) has index r*COLS + c; row 0 is the southern row and column 0
// the western one, so the master election picks the lowest row first and,
// within it, the westernmost requester. Each unit is wired to its four
// neighbours with the broadcast network, the wave and back-trace links and
// the data links; everything arriving at the array edge is tied to zero, so
// one plane routes within its own array. The broadcast network is a tree for
// every origin (horizontal travel along the origin's row, then vertical
// travel in every column), so it has no combinational loop even though the
// tools see one through the packed arrays; the data links form loops only if
// a path did, and the back-trace builds trees, never cycles.
//
// Interface: per-unit molecule signals are flat arrays indexed by unit.
// restart clears every established path and starts the routing of the whole
// array again. busy is high while any routing process is in progress.
// An assertion checks that the election never yields two masters.
module routing_plane
  import poetic_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 18
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  logic [ROWS*COLS-1:0]  mol_is_src,
  input  logic [ROWS*COLS-1:0]  mol_is_tgt,
  input  logic [ID_W-1:0]       mol_id  [ROWS*COLS],
  input  logic [ROWS*COLS-1:0]  mol_val,
  output logic [ROWS*COLS-1:0]  mol_in,
  output logic [ROWS*COLS-1:0]  mol_conn,
  output logic [ROWS*COLS-1:0]  master,
  output logic [3:0]            link_used [ROWS*COLS],
  output logic                  busy
);

  localparam int unsigned N = ROWS * COLS;

  logic [3:0][NCH-1:0] bc_o  [N];
  logic [3:0][NCH-1:0] bc_i  [N];
  logic [3:0]          wv_o  [N];
  logic [3:0]          wv_i  [N];
  logic [3:0]          bt_o  [N];
  logic [3:0]          bt_i  [N];
  logic [3:0]          dt_o  [N];
  logic [3:0]          dt_i  [N];
  logic [2:0]          phase [N];
  logic [N-1:0]        active;

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      localparam int I  = r * int'(COLS) + c;
      localparam int IN = (r + 1) * int'(COLS) + c;
      localparam int IS = (r - 1) * int'(COLS) + c;
      localparam int IE = I + 1;
      localparam int IW = I - 1;

      if (r < int'(ROWS) - 1) begin : g_n
        assign bc_i[I][DIR_N] = bc_o[IN][DIR_S];
        assign wv_i[I][DIR_N] = wv_o[IN][DIR_S];
        assign bt_i[I][DIR_N] = bt_o[IN][DIR_S];
        assign dt_i[I][DIR_N] = dt_o[IN][DIR_S];
      end else begin : g_n_edge
        assign bc_i[I][DIR_N] = '0;
        assign wv_i[I][DIR_N] = 1'b0;
        assign bt_i[I][DIR_N] = 1'b0;
        assign dt_i[I][DIR_N] = 1'b0;
      end
      if (r > 0) begin : g_s
        assign bc_i[I][DIR_S] = bc_o[IS][DIR_N];
        assign wv_i[I][DIR_S] = wv_o[IS][DIR_N];
        assign bt_i[I][DIR_S] = bt_o[IS][DIR_N];
        assign dt_i[I][DIR_S] = dt_o[IS][DIR_N];
      end else begin : g_s_edge
        assign bc_i[I][DIR_S] = '0;
        assign wv_i[I][DIR_S] = 1'b0;
        assign bt_i[I][DIR_S] = 1'b0;
        assign dt_i[I][DIR_S] = 1'b0;
      end
      if (c < int'(COLS) - 1) begin : g_e
        assign bc_i[I][DIR_E] = bc_o[IE][DIR_W];
        assign wv_i[I][DIR_E] = wv_o[IE][DIR_W];
        assign bt_i[I][DIR_E] = bt_o[IE][DIR_W];
        assign dt_i[I][DIR_E] = dt_o[IE][DIR_W];
      end else begin : g_e_edge
        assign bc_i[I][DIR_E] = '0;
        assign wv_i[I][DIR_E] = 1'b0;
        assign bt_i[I][DIR_E] = 1'b0;
        assign dt_i[I][DIR_E] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign bc_i[I][DIR_W] = bc_o[IW][DIR_E];
        assign wv_i[I][DIR_W] = wv_o[IW][DIR_E];
        assign bt_i[I][DIR_W] = bt_o[IW][DIR_E];
        assign dt_i[I][DIR_W] = dt_o[IW][DIR_E];
      end else begin : g_w_edge
        assign bc_i[I][DIR_W] = '0;
        assign wv_i[I][DIR_W] = 1'b0;
        assign bt_i[I][DIR_W] = 1'b0;
        assign dt_i[I][DIR_W] = 1'b0;
      end

      routing_unit u_ru (
        .clk, .rst_n, .restart,
        .mol_is_src (mol_is_src[I]),
        .mol_is_tgt (mol_is_tgt[I]),
        .mol_id     (mol_id[I]),
        .mol_val    (mol_val[I]),
        .mol_in     (mol_in[I]),
        .bc_in      (bc_i[I]),
        .bc_out     (bc_o[I]),
        .wave_in    (wv_i[I]),
        .wave_out   (wv_o[I]),
        .bt_in      (bt_i[I]),
        .bt_out     (bt_o[I]),
        .dat_in     (dt_i[I]),
        .dat_out    (dt_o[I]),
        .phase      (phase[I]),
        .is_master  (master[I]),
        .link_used  (link_used[I]),
        .mol_conn   (mol_conn[I])
      );
      assign active[I] = (phase[I] != 3'd0);
    end
  end

  assign busy = |active;

  // The election must never produce two masters.
  a_one_master: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(master))
    else $error("routing_plane: more than one master");

endmodule
