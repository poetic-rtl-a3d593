// organic_subsystem: the two-layer organic array of a POEtic chip.
//
// The upper layer is a ROWS x COLS array of molecules, each wired to its four
// neighbours by two lines per side plus the carry (north to south) and the
// serial-reconfiguration links. The lower layer is the routing plane, one
// routing unit under each molecule, which connects Output-mode molecules to
// Input-mode molecules with matching identifiers at run time.
//
// Molecule (r, c) has index r*COLS + c; row 0 is the southern row. The
// parallel configuration bus writes one 32-bit word (cfg_word 0..2) of the
// molecule cfg_addr per cycle when cfg_we is high; cfg_rdata returns that
// word of the same molecule, combinationally. Neighbour lines and carries at
// the array edges are ports, so that chips can be tiled into a larger array
// (the organic bus); the serial-reconfiguration links and the routing plane
// stop at the edge of the chip, which is this design's choice.
//
// The molecule lines form a configurable mesh: like any FPGA fabric it has
// combinational loops in the netlist, and a configuration must not close one.
module organic_subsystem
  import poetic_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 18,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned AW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration bus
  input  logic               cfg_we,
  input  logic [AW-1:0]      cfg_addr,
  input  logic [1:0]         cfg_word,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // routing
  input  logic               route_restart,
  output logic               route_busy,
  // organic bus: neighbour lines at the array edges
  input  logic [1:0]         n_line_in  [COLS],
  output logic [1:0]         n_line_out [COLS],
  input  logic [1:0]         s_line_in  [COLS],
  output logic [1:0]         s_line_out [COLS],
  input  logic [1:0]         e_line_in  [ROWS],
  output logic [1:0]         e_line_out [ROWS],
  input  logic [1:0]         w_line_in  [ROWS],
  output logic [1:0]         w_line_out [ROWS],
  input  logic [COLS-1:0]    n_carry_in,
  output logic [COLS-1:0]    s_carry_out,
  // observation
  output logic [N-1:0]       mol_out,
  output logic [N-1:0]       mol_routed,
  output logic [N-1:0]       route_master,
  output logic [3:0]         route_links [N]
);

  logic [3:0][1:0] li [N];
  logic [3:0][1:0] lo [N];
  logic [N-1:0]    ci, co;
  logic [3:0]      re_i [N];
  logic [3:0]      rd_i [N];
  logic [3:0]      re_o [N];
  logic [3:0]      rd_o [N];
  logic [31:0]     rdata [N];
  logic [N-1:0]    is_src, is_tgt, r_out, r_in;
  logic [ID_W-1:0] ids [N];

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      localparam int I  = r * int'(COLS) + c;
      localparam int IN = (r + 1) * int'(COLS) + c;
      localparam int IS = (r - 1) * int'(COLS) + c;

      if (r < int'(ROWS) - 1) begin : g_n
        assign li[I][DIR_N] = lo[IN][DIR_S];
        assign ci[I]        = co[IN];
        assign re_i[I][DIR_N] = re_o[IN][DIR_S];
        assign rd_i[I][DIR_N] = rd_o[IN][DIR_S];
      end else begin : g_n_edge
        assign li[I][DIR_N] = n_line_in[c];
        assign n_line_out[c] = lo[I][DIR_N];
        assign ci[I]        = n_carry_in[c];
        assign re_i[I][DIR_N] = 1'b0;
        assign rd_i[I][DIR_N] = 1'b0;
      end
      if (r > 0) begin : g_s
        assign li[I][DIR_S] = lo[IS][DIR_N];
        assign re_i[I][DIR_S] = re_o[IS][DIR_N];
        assign rd_i[I][DIR_S] = rd_o[IS][DIR_N];
      end else begin : g_s_edge
        assign li[I][DIR_S] = s_line_in[c];
        assign s_line_out[c] = lo[I][DIR_S];
        assign s_carry_out[c] = co[I];
        assign re_i[I][DIR_S] = 1'b0;
        assign rd_i[I][DIR_S] = 1'b0;
      end
      if (c < int'(COLS) - 1) begin : g_e
        assign li[I][DIR_E] = lo[I+1][DIR_W];
        assign re_i[I][DIR_E] = re_o[I+1][DIR_W];
        assign rd_i[I][DIR_E] = rd_o[I+1][DIR_W];
      end else begin : g_e_edge
        assign li[I][DIR_E] = e_line_in[r];
        assign e_line_out[r] = lo[I][DIR_E];
        assign re_i[I][DIR_E] = 1'b0;
        assign rd_i[I][DIR_E] = 1'b0;
      end
      if (c > 0) begin : g_w
        assign li[I][DIR_W] = lo[I-1][DIR_E];
        assign re_i[I][DIR_W] = re_o[I-1][DIR_E];
        assign rd_i[I][DIR_W] = rd_o[I-1][DIR_E];
      end else begin : g_w_edge
        assign li[I][DIR_W] = w_line_in[r];
        assign w_line_out[r] = lo[I][DIR_W];
        assign re_i[I][DIR_W] = 1'b0;
        assign rd_i[I][DIR_W] = 1'b0;
      end

      molecule u_mol (
        .clk, .rst_n,
        .wr_en        (cfg_we && (cfg_addr == AW'(I))),
        .wr_word      (cfg_word),
        .wr_data      (cfg_wdata),
        .rd_word      (cfg_word),
        .rd_data      (rdata[I]),
        .line_in      (li[I]),
        .line_out     (lo[I]),
        .carry_in     (ci[I]),
        .carry_out    (co[I]),
        .rcfg_in_en   (re_i[I]),
        .rcfg_in_dat  (rd_i[I]),
        .rcfg_out_en  (re_o[I]),
        .rcfg_out_dat (rd_o[I]),
        .is_src       (is_src[I]),
        .is_tgt       (is_tgt[I]),
        .id           (ids[I]),
        .route_out    (r_out[I]),
        .route_in     (r_in[I]),
        .out1         (mol_out[I])
      );
    end
  end

  routing_plane #(.ROWS(ROWS), .COLS(COLS)) u_route (
    .clk, .rst_n,
    .restart    (route_restart),
    .mol_is_src (is_src),
    .mol_is_tgt (is_tgt),
    .mol_id     (ids),
    .mol_val    (r_out),
    .mol_in     (r_in),
    .mol_conn   (mol_routed),
    .master     (route_master),
    .link_used  (route_links),
    .busy       (route_busy)
  );

  always_comb begin
    cfg_rdata = '0;
    for (int i = 0; i < int'(N); i++)
      if (cfg_addr == AW'(i)) cfg_rdata = rdata[i];
  end

endmodule
