// poetic_pkg: types and constants shared by the POEtic organic subsystem.
//
// A molecule holds 76 configuration bits arranged as five blocks, each block
// followed by its bypass bit (the bypass bit tells a neighbour-driven serial
// reconfiguration to skip that block). The number of blocks, their order
// (LUT, input select, switch box, mode, other) and the total of 76 bits follow
// the architecture; the width of each block and the meaning of the individual
// bits inside the input-select, switch-box and "other" blocks are this
// design's choice. The widths are chosen so that the LUT, input-select and
// switch-box blocks together hold 54 bits, the amount a molecule can expose
// as serially accessible storage when its mode and "other" blocks are bypassed.
//
//   bit  15: 0  LUT contents (16)            also the routing identifier
//   bit      16 bypass LUT
//   bit  30:17  input select (14)
//   bit      31 bypass input select
//   bit  55:32  switch box (24)
//   bit      56 bypass switch box
//   bit  59:57  mode (3)
//   bit      60 bypass mode
//   bit  74:61  other (14)
//   bit      75 bypass other
//
// Parallel configuration uses three 32-bit words: word 0 = bits 31:0,
// word 1 = bits 63:32, word 2 = bits 75:64 in its low 12 bits.
package poetic_pkg;

  localparam int unsigned CFG_BITS  = 76;
  localparam int unsigned DATA_BITS = 71;   // configuration bits less the 5 bypass bits
  localparam int unsigned LUT_BITS  = 16;
  localparam int unsigned SEL_BITS  = 14;
  localparam int unsigned SB_BITS   = 24;
  localparam int unsigned MODE_BITS = 3;
  localparam int unsigned OTH_BITS  = 14;
  localparam int unsigned ID_W      = 16;   // routing identifier held in the LUT

  // Bit positions inside the 76-bit configuration vector.
  localparam int unsigned LUT_LO  = 0;
  localparam int unsigned BYP_LUT = 16;
  localparam int unsigned SEL_LO  = 17;
  localparam int unsigned BYP_SEL = 31;
  localparam int unsigned SB_LO   = 32;
  localparam int unsigned BYP_SB  = 56;
  localparam int unsigned MODE_LO = 57;
  localparam int unsigned BYP_MODE = 60;
  localparam int unsigned OTH_LO  = 61;
  localparam int unsigned BYP_OTH = 75;

  // The eight operational modes of a molecule.
  typedef enum logic [2:0] {
    MODE_LUT4    = 3'd0,
    MODE_LUT3    = 3'd1,
    MODE_COMM    = 3'd2,
    MODE_SHIFT   = 3'd3,
    MODE_INPUT   = 3'd4,
    MODE_OUTPUT  = 3'd5,
    MODE_TRIGGER = 3'd6,
    MODE_CONFIG  = 3'd7
  } mode_e;

  // Sides of a molecule or routing unit. Row 0 is the southern row.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Decoded "other" block.
  typedef struct packed {
    logic [8:0] spare;      // stored, no function (serially accessible storage)
    logic       cfg_chain;  // forward the bits shifted out of this molecule onward
    logic [1:0] cfg_dir;    // side a Configure-mode molecule reconfigures
    logic       dff_init;   // value loaded into the flip-flop by reset / parallel write
    logic       use_dff;    // first output taken from the flip-flop
  } other_t;

  // Decoded input-select block.
  typedef struct packed {
    logic       in3_q;      // LUT input 3 taken from the molecule's own flip-flop
    logic       in2_carry;  // LUT input 2 taken from the north neighbour's carry
    logic [3:0][2:0] src;   // per LUT input: which of the 8 incoming neighbour lines
  } insel_t;

  // Routing-unit switch selections: where an output link takes its value.
  typedef enum logic [2:0] {
    RSEL_N   = 3'd0,
    RSEL_E   = 3'd1,
    RSEL_S   = 3'd2,
    RSEL_W   = 3'd3,
    RSEL_MOL = 3'd4
  } rsel_e;

  // Channels of the routing plane's broadcast network (Fig. 6 pattern).
  localparam int unsigned CH_REQ   = 0;  // phase 1: routing request
  localparam int unsigned CH_ADDR  = 1;  // phase 2: serial address bit
  localparam int unsigned CH_MSRC  = 2;  // phase 3: master is a source
  localparam int unsigned CH_FOUND = 3;  // phase 4: a target was reached
  localparam int unsigned CH_GROW  = 4;  // phase 4: wavefront not empty
  localparam int unsigned CH_BUSY  = 5;  // phase 4: back-trace in progress
  localparam int unsigned CH_PEND  = 6;  // phase 4: involved targets still open
  localparam int unsigned NCH      = 7;

  function automatic logic [1:0] opposite(input logic [1:0] d);
    return d ^ 2'd2;
  endfunction

endpackage
