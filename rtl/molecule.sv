// molecule: the basic programmable element of the POEtic organic subsystem.
//
// A molecule is a 16-bit look-up table and a D flip-flop, configured by a
// 76-bit register (molecule_cfg). It talks to its four neighbours through a
// switch box with two lines per side, and to the routing layer underneath
// through route_in/route_out. Its four LUT inputs a[3:0] are each taken from
// one of the eight incoming neighbour lines (input 2 may instead take the
// north neighbour's carry, input 3 the molecule's own flip-flop).
//
// Modes (the eight modes and their roles follow the architecture; which LUT
// inputs act as data, shift or control lines is this design's choice):
//   4-LUT      f1 = LUT[a3 a2 a1 a0]
//   3-LUT      f1 = LUT[0 a2 a1 a0], f2 = LUT[1 a2 a1 a0]; f2 is the second
//              output and is sent as carry to the south neighbour
//   Comm       LUT[7:0] is a 3-input LUT on {sr, a1, a0}, where sr = LUT[15]
//              is the output of the 8-bit shift register LUT[15:8]; the
//              register rotates by one when a3 = 1. With the XNOR table it
//              compares the serial input a0 with the stored word.
//   Shift      LUT[15:0] is a 16-bit shift register: a1 = shift, a0 = data
//              in; f1 = LUT[15]
//   Input      f1 is the value delivered by the routing layer (route_in);
//              LUT holds the identifier of the source this input needs
//   Output     f1 = a0 and a0 is offered to the routing layer (route_out);
//              LUT holds this output's identifier
//   Trigger    the 16-bit register rotates every clock; loaded with 0...01
//              it gives one pulse on f1 every 16 cycles
//   Configure  a1 is the configuration shift enable and a0 the serial bit;
//              both are sent to the neighbour on side cfg_dir, which shifts
//              them into its configuration (skipping bypassed blocks)
// The first output is f1, or the flip-flop (q <= f1 every clock) when
// use_dff is set. The flip-flop resets to 0 and takes dff_init on every
// configuration-bus write. A molecule that is being reconfigured serially by
// a neighbour and has cfg_chain set passes the bits leaving its own register
// on to the neighbour opposite the side they came from, so configurations
// can be chained. The switch box drives each of the 8 outgoing lines from one
// of the 6 lines arriving on the other three sides, f1 (out1) or f2.
//
// Timing: all outputs are combinational from the inputs and the registers;
// the LUT, flip-flop and configuration change on the rising clock edge.
// While rst_n is low every output toward a neighbour is held at 0, so an
// arbitrary power-up configuration cannot close an oscillating loop through
// the array before the reset has cleared it (this design's choice).
//
// Circular-logic warnings: the switch box, the LUT inputs and the serial
// reconfiguration links are combinational from line_in/rcfg_in to
// line_out/rcfg_out, as in any LUT fabric, so a lint tool looking at an array
// of molecules reports circular combinational logic on line_in, the LUT input
// selection and sh_en/sh_in/sh_side/sh_out. The paths only close into a real
// loop when a configuration routes a signal back to where it came from; that
// is a property of the configuration, not of the hardware, and must be
// avoided by whoever configures the array (a registered loop through the
// flip-flop is fine). The netlist cannot break them without changing the
// behaviour of the fabric, so the warnings stand.
module molecule
  import poetic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // configuration bus
  input  logic                 wr_en,
  input  logic [1:0]           wr_word,
  input  logic [31:0]          wr_data,
  input  logic [1:0]           rd_word,
  output logic [31:0]          rd_data,
  // neighbour lines, indexed [side][line]; side: 0 N, 1 E, 2 S, 3 W
  input  logic [3:0][1:0]      line_in,
  output logic [3:0][1:0]      line_out,
  input  logic                 carry_in,   // from the north neighbour
  output logic                 carry_out,  // to the south neighbour
  // serial reconfiguration links, indexed by side
  input  logic [3:0]           rcfg_in_en,
  input  logic [3:0]           rcfg_in_dat,
  output logic [3:0]           rcfg_out_en,
  output logic [3:0]           rcfg_out_dat,
  // routing layer
  output logic                 is_src,
  output logic                 is_tgt,
  output logic [ID_W-1:0]      id,
  output logic                 route_out,
  input  logic                 route_in,
  // first output, for observation
  output logic                 out1
);

  logic [CFG_BITS-1:0] cfg;
  logic [LUT_BITS-1:0] lut, lut_d;
  logic                lut_we;
  insel_t              sel;
  logic [SB_BITS-1:0]  sb;
  mode_e               mode;
  other_t              oth;
  logic [7:0]          lines;
  logic [3:0]          a;
  logic                f1, f2, q;
  logic                sh_en, sh_in, sh_out;
  logic [1:0]          sh_side;

  assign lut  = cfg[BYP_LUT-1:LUT_LO];
  assign sel  = insel_t'(cfg[BYP_SEL-1:SEL_LO]);
  assign sb   = cfg[BYP_SB-1:SB_LO];
  assign mode = mode_e'(cfg[BYP_MODE-1:MODE_LO]);
  assign oth  = other_t'(cfg[BYP_OTH-1:OTH_LO]);
  assign lines = line_in;

  // Which neighbour drives the serial reconfiguration (first of N, E, S, W).
  always_comb begin
    sh_en   = 1'b0;
    sh_in   = 1'b0;
    sh_side = 2'd0;
    for (int s = 3; s >= 0; s--) begin
      if (rcfg_in_en[s]) begin
        sh_en   = 1'b1;
        sh_in   = rcfg_in_dat[s];
        sh_side = 2'(s);
      end
    end
  end

  molecule_cfg u_cfg (
    .clk, .rst_n,
    .wr_en, .wr_word, .wr_data, .rd_word, .rd_data,
    .sh_en, .sh_in, .sh_out,
    .lut_we, .lut_d,
    .cfg
  );

  // LUT input selection.
  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = lines[sel.src[i]];
    if (sel.in2_carry) a[2] = carry_in;
    if (sel.in3_q)     a[3] = q;
  end

  // Mode logic.
  always_comb begin
    f1        = 1'b0;
    f2        = 1'b0;
    lut_we    = 1'b0;
    lut_d     = lut;
    route_out = 1'b0;
    is_src    = 1'b0;
    is_tgt    = 1'b0;
    unique case (mode)
      MODE_LUT4: f1 = lut[a];
      MODE_LUT3: begin
        f1 = lut[{1'b0, a[2:0]}];
        f2 = lut[{1'b1, a[2:0]}];
      end
      MODE_COMM: begin
        f1 = lut[{1'b0, lut[15], a[1:0]}];
        f2 = lut[15];
        if (a[3]) begin
          lut_we = 1'b1;
          lut_d  = {lut[14:8], lut[15], lut[7:0]};
        end
      end
      MODE_SHIFT: begin
        f1 = lut[15];
        f2 = lut[15];
        if (a[1]) begin
          lut_we = 1'b1;
          lut_d  = {lut[14:0], a[0]};
        end
      end
      MODE_INPUT: begin
        f1     = route_in;
        is_tgt = 1'b1;
      end
      MODE_OUTPUT: begin
        f1        = a[0];
        route_out = a[0];
        is_src    = 1'b1;
      end
      MODE_TRIGGER: begin
        f1     = lut[15];
        f2     = lut[15];
        lut_we = 1'b1;
        lut_d  = {lut[14:0], lut[15]};
      end
      MODE_CONFIG: f1 = a[0];
      default: ;
    endcase
  end

  assign carry_out = rst_n && (mode == MODE_LUT3) && f2;
  assign id        = lut;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= 1'b0;
    else if (wr_en) q <= oth.dff_init;
    else            q <= f1;
  end

  assign out1 = oth.use_dff ? q : f1;

  // Switch box: each outgoing line picks one of the six lines arriving on
  // the other three sides (select 0..5), out1 (6) or f2 (7).
  always_comb begin
    for (int s = 0; s < 4; s++) begin
      for (int k = 0; k < 2; k++) begin
        logic [2:0] v;
        logic [1:0] other_side;
        v = sb[(s*2+k)*3 +: 3];
        // v/2 counts the other sides in ascending order, skipping s
        other_side = (v[2:1] >= 2'(s)) ? v[2:1] + 2'd1 : v[2:1];
        if (!rst_n)         line_out[s][k] = 1'b0;
        else if (v == 3'd6) line_out[s][k] = out1;
        else if (v == 3'd7) line_out[s][k] = f2;
        else                line_out[s][k] = line_in[other_side][v[0]];
      end
    end
  end

  // Serial reconfiguration outputs: driven by a Configure-mode molecule
  // towards cfg_dir, or forwarded along a chain.
  always_comb begin
    rcfg_out_en  = '0;
    rcfg_out_dat = '0;
    if (!rst_n) begin
      // all neighbour outputs stay low during reset
    end else if (mode == MODE_CONFIG) begin
      rcfg_out_en[oth.cfg_dir]  = a[1];
      rcfg_out_dat[oth.cfg_dir] = a[0];
    end
    if (rst_n && sh_en && oth.cfg_chain) begin
      rcfg_out_en[opposite(sh_side)]  = 1'b1;
      rcfg_out_dat[opposite(sh_side)] = sh_out;
    end
  end

endmodule
