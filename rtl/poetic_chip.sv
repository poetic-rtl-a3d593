// poetic_chip: top level of a POEtic device.
//
// A POEtic chip joins an environment subsystem (a 32-bit processor on an
// AMBA-based system bus with its peripherals), a system interface for tiling
// several chips into one tissue, and the organic subsystem: a ROWS x COLS
// array of molecules (default 8 x 18 = 144, as on the fabricated chip) over a
// dynamic routing plane. This top holds the organic subsystem. The
// processor, bus, peripherals and interface bus are outside it: the 32-bit
// parallel configuration bus the processor uses to write the molecules'
// configuration words, the routing restart and status, and the organic bus
// (the neighbour lines and carries at the four array edges) are ports.
//
// Configuration: with cfg_we high, cfg_wdata is written on the rising clock
// edge into word cfg_word (0..2) of molecule cfg_addr (= row*COLS + col,
// row 0 south). cfg_rdata shows that word combinationally.
module poetic_chip
  import poetic_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 18,
  localparam int unsigned N   = ROWS * COLS,
  localparam int unsigned AW  = (N > 1) ? $clog2(N) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // configuration bus from the environment subsystem
  input  logic               cfg_we,
  input  logic [AW-1:0]      cfg_addr,
  input  logic [1:0]         cfg_word,
  input  logic [31:0]        cfg_wdata,
  output logic [31:0]        cfg_rdata,
  // dynamic routing control and status
  input  logic               route_restart,
  output logic               route_busy,
  // organic bus
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
  // observation of the molecules and of the routing plane
  output logic [N-1:0]       mol_out,
  output logic [N-1:0]       mol_routed,
  output logic [N-1:0]       route_master,
  output logic [3:0]         route_links [N]
);

  organic_subsystem #(.ROWS(ROWS), .COLS(COLS)) u_organic (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_word, .cfg_wdata, .cfg_rdata,
    .route_restart, .route_busy,
    .n_line_in, .n_line_out, .s_line_in, .s_line_out,
    .e_line_in, .e_line_out, .w_line_in, .w_line_out,
    .n_carry_in, .s_carry_out,
    .mol_out, .mol_routed, .route_master, .route_links
  );

endmodule
