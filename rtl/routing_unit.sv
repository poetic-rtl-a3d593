// routing_unit: one cell of the POEtic dynamic routing layer.
//
// Each routing unit sits under one molecule. A molecule in Output mode is a
// source whose identifier is its LUT; one in Input mode is a target whose
// LUT holds the identifier of the source it needs. The units connect sources
// to targets at run time, with no central controller: every unit runs the
// same state machine, kept in step by a broadcast network, and the routing
// goes through four phases.
//
//  1. Master election (1 cycle). Every unconnected source or target raises a
//     request on the broadcast network. The network follows the propagation
//     pattern of the architecture (a signal coming from the north goes on
//     south, from the south goes on north, from the east goes west, north
//     and south, from the west goes east, north and south; a unit's own
//     signal goes all four ways), so the request seen arriving from the
//     south is the OR of all rows below and the one arriving from the west
//     the OR of the same row to the west. A requester with neither is the
//     bottom-left one and becomes master; no other unit can.
//  2. Address broadcast (ID_W cycles). The master sends, MSB first, its own
//     identifier (source) or the identifier it needs (target). Every other
//     unit compares it bit by bit with its molecule's identifier.
//  3. Elimination (1 cycle). The master tells every unit whether it is a
//     source. If so, the master is the only source and every unconnected
//     matching target takes part. If the master is a target, it is the only
//     target and every matching source takes part.
//  4. Shortest path. A breadth-first wave leaves the sources (and, after the
//     first path, every unit already carrying the net), one unit per cycle
//     along output links that no earlier path uses; each unit remembers the
//     side it was first reached from (priority N, E, S, W). When the wave
//     reaches targets, each of them sends a token back along the recorded
//     sides; every unit the token crosses reserves its output link toward the
//     child and switches it to its own input, until the token meets a unit
//     already on the net. The wave then restarts for the remaining targets.
//     The phase ends when no target is left or the wave dies out.
// The master, and every target or source that got connected, no longer
// requests; restart clears all paths and flags so the whole organism is
// routed again.
//
// The four phases, their order and their lengths (1 cycle, n cycles,
// 1 cycle) and the Fig. 6 pattern follow the architecture. The one-track
// link per direction, the token back-trace, the handling of several targets
// reached in the same cycle and the "done" rule are this design's choices.
//
// Interface: bc_* is the broadcast network (NCH channels per side), wave_*
// the wave links, bt_* the back-trace links and dat_* the data links of the
// established paths; all indexed by side (0 N, 1 E, 2 S, 3 W). Outputs on
// bc_out and dat_out are combinational from the inputs, as the broadcast and
// the routed data are meant to cross the array within one clock. While
// rst_n is low the data links are held at 0, so random power-up switch
// settings cannot form a loop before the reset has cleared them.
//
// Circular-logic warnings: in an array, dat_out of one unit feeds dat_in of
// its neighbour and mol_val comes back from the molecule, which may itself
// depend on what mol_in delivers. Lint tools therefore report circular
// combinational logic on dat_in/dat_out and mol_val. The routing only builds
// tree-shaped paths from one source (every link is reserved by one net and
// points away from the source), so the routing layer never closes a loop by
// itself; a loop exists only if the molecule configuration feeds an Input
// molecule's value combinationally back into the Output molecule of the same
// net. The warnings stand for that reason.
module routing_unit
  import poetic_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     restart,
  // molecule above
  input  logic                     mol_is_src,
  input  logic                     mol_is_tgt,
  input  logic [ID_W-1:0]          mol_id,
  input  logic                     mol_val,
  output logic                     mol_in,
  // broadcast network
  input  logic [3:0][NCH-1:0]      bc_in,
  output logic [3:0][NCH-1:0]      bc_out,
  // breadth-first wave and back-trace
  input  logic [3:0]               wave_in,
  output logic [3:0]               wave_out,
  input  logic [3:0]               bt_in,
  output logic [3:0]               bt_out,
  // routed data
  input  logic [3:0]               dat_in,
  output logic [3:0]               dat_out,
  // status
  output logic [2:0]               phase,
  output logic                     is_master,
  output logic [3:0]               link_used,
  output logic                     mol_conn
);

  typedef enum logic [2:0] {
    R_IDLE   = 3'd0,
    R_ADDR   = 3'd1,
    R_ELIM   = 3'd2,
    R_EXPAND = 3'd3,
    R_BACK   = 3'd4,
    R_FINISH = 3'd5
  } rstate_e;

  rstate_e           state;
  logic [$clog2(ID_W)-1:0] bitcnt;
  logic              master, match, inv_src, inv_tgt, done;
  logic              reached, frontier, seed, tok, tdone, got_tok;
  logic [1:0]        parent, mol_sel;
  rsel_e             net_in;
  logic [3:0]        used;
  rsel_e [3:0]       sel;
  logic [NCH-1:0]    own, g;
  logic              req;
  logic              first_wave;
  logic [1:0]        first_dir;

  assign req = (mol_is_src || mol_is_tgt) && !done;

  // Own contributions to the broadcast channels.
  always_comb begin
    own           = '0;
    own[CH_REQ]   = (state == R_IDLE) && req;
    own[CH_ADDR]  = (state == R_ADDR) && master && mol_id[ID_W-1-int'(bitcnt)];
    own[CH_MSRC]  = (state == R_ELIM) && master && mol_is_src;
    own[CH_FOUND] = (state == R_EXPAND) && inv_tgt && reached && !tdone;
    own[CH_GROW]  = (state == R_EXPAND) && frontier;
    own[CH_BUSY]  = (state == R_BACK) && tok;
    own[CH_PEND]  = (state == R_BACK) && inv_tgt && !tdone;
  end

  // Broadcast forwarding pattern and global view.
  assign bc_out[DIR_N] = own | bc_in[DIR_S] | bc_in[DIR_E] | bc_in[DIR_W];
  assign bc_out[DIR_S] = own | bc_in[DIR_N] | bc_in[DIR_E] | bc_in[DIR_W];
  assign bc_out[DIR_W] = own | bc_in[DIR_E];
  assign bc_out[DIR_E] = own | bc_in[DIR_W];
  assign g = own | bc_in[DIR_N] | bc_in[DIR_E] | bc_in[DIR_S] | bc_in[DIR_W];

  // Wave offered to each neighbour through a free link.
  always_comb begin
    for (int d = 0; d < 4; d++)
      wave_out[d] = (state == R_EXPAND) && !g[CH_FOUND] && frontier && !used[d];
  end

  // First side the wave arrives from.
  always_comb begin
    first_wave = |wave_in;
    first_dir  = 2'd0;
    for (int d = 3; d >= 0; d--)
      if (wave_in[d]) first_dir = 2'(d);
  end

  // Back-trace token goes to the parent.
  always_comb begin
    bt_out = '0;
    if (state == R_BACK && tok) bt_out[parent] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_IDLE;
      bitcnt   <= '0;
      master   <= 1'b0;
      match    <= 1'b0;
      inv_src  <= 1'b0;
      inv_tgt  <= 1'b0;
      done     <= 1'b0;
      reached  <= 1'b0;
      frontier <= 1'b0;
      seed     <= 1'b0;
      tok      <= 1'b0;
      tdone    <= 1'b0;
      got_tok  <= 1'b0;
      parent   <= 2'd0;
      net_in   <= RSEL_MOL;
      used     <= '0;
      sel      <= {4{RSEL_MOL}};
      mol_sel  <= 2'd0;
      mol_conn <= 1'b0;
    end else if (restart) begin
      state    <= R_IDLE;
      master   <= 1'b0;
      inv_src  <= 1'b0;
      inv_tgt  <= 1'b0;
      done     <= 1'b0;
      reached  <= 1'b0;
      frontier <= 1'b0;
      seed     <= 1'b0;
      tok      <= 1'b0;
      tdone    <= 1'b0;
      got_tok  <= 1'b0;
      used     <= '0;
      mol_conn <= 1'b0;
    end else begin
      unique case (state)
        // Phase 1: master election, one cycle.
        R_IDLE: if (g[CH_REQ]) begin
          master <= req && !bc_in[DIR_S][CH_REQ] && !bc_in[DIR_W][CH_REQ];
          match  <= 1'b1;
          bitcnt <= '0;
          state  <= R_ADDR;
        end
        // Phase 2: serial address broadcast and compare, ID_W cycles.
        R_ADDR: begin
          if (g[CH_ADDR] != mol_id[ID_W-1-int'(bitcnt)]) match <= 1'b0;
          bitcnt <= bitcnt + 1'b1;
          if (int'(bitcnt) == ID_W-1) state <= R_ELIM;
        end
        // Phase 3: keep one source (source master) or one target.
        R_ELIM: begin
          if (g[CH_MSRC]) begin
            inv_src  <= master;
            inv_tgt  <= mol_is_tgt && match && !done && !master;
            seed     <= master;
            reached  <= master;
            frontier <= master;
          end else begin
            inv_src  <= mol_is_src && match && !master;
            inv_tgt  <= master;
            seed     <= mol_is_src && match && !master;
            reached  <= mol_is_src && match && !master;
            frontier <= mol_is_src && match && !master;
          end
          net_in <= RSEL_MOL;
          state  <= R_EXPAND;
        end
        // Phase 4a: breadth-first expansion.
        R_EXPAND: begin
          if (g[CH_FOUND]) begin
            if (inv_tgt && reached && !tdone) begin
              tdone    <= 1'b1;
              mol_conn <= 1'b1;
              mol_sel  <= seed ? net_in[1:0] : parent;
              if (!seed) begin
                seed   <= 1'b1;
                net_in <= rsel_e'({1'b0, parent});
                tok    <= 1'b1;
              end
            end
            state <= R_BACK;
          end else if (!g[CH_GROW]) begin
            state <= R_FINISH;
          end else begin
            if (!reached && first_wave) begin
              reached  <= 1'b1;
              frontier <= 1'b1;
              parent   <= first_dir;
            end else begin
              frontier <= 1'b0;
            end
          end
        end
        // Phase 4b: back-trace of the paths found.
        R_BACK: begin
          if (g[CH_BUSY]) begin
            tok <= 1'b0;
            for (int d = 0; d < 4; d++) begin
              if (bt_in[d]) begin
                used[d] <= 1'b1;
                sel[d]  <= seed ? net_in : rsel_e'({1'b0, parent});
              end
            end
            if (|bt_in) begin
              got_tok <= 1'b1;
              if (!seed) begin
                seed   <= 1'b1;
                net_in <= rsel_e'({1'b0, parent});
                tok    <= 1'b1;
              end
            end
          end else if (g[CH_PEND]) begin
            reached  <= seed;
            frontier <= seed;
            state    <= R_EXPAND;
          end else begin
            state <= R_FINISH;
          end
        end
        // End of the routing process: keep paths, clear per-process state.
        R_FINISH: begin
          if (master || tdone || (inv_src && got_tok)) done <= 1'b1;
          master   <= 1'b0;
          inv_src  <= 1'b0;
          inv_tgt  <= 1'b0;
          reached  <= 1'b0;
          frontier <= 1'b0;
          seed     <= 1'b0;
          tok      <= 1'b0;
          tdone    <= 1'b0;
          got_tok  <= 1'b0;
          state    <= R_IDLE;
        end
        default: state <= R_IDLE;
      endcase
    end
  end

  // Data switch of the established paths.
  always_comb begin
    for (int d = 0; d < 4; d++) begin
      if (!rst_n || !used[d])      dat_out[d] = 1'b0;
      else if (sel[d] == RSEL_MOL) dat_out[d] = mol_val;
      else                         dat_out[d] = dat_in[sel[d][1:0]];
    end
  end

  assign mol_in    = mol_conn ? dat_in[mol_sel] : 1'b0;
  assign phase     = state;
  assign is_master = master;
  assign link_used = used;

endmodule
