// molecule_cfg: the 76-bit configuration register of one molecule.
//
// The register is written in three ways, in this order of priority:
//   1. Parallel load from the 32-bit configuration bus: word 0 holds bits
//      31:0, word 1 bits 63:32 and word 2 bits 75:64 (low 12 bits of the
//      word). Only this path can change the five bypass bits.
//   2. Serial partial reconfiguration driven by a neighbour in Configure mode
//      (sh_en/sh_in). The 71 data bits form one shift register, LUT first;
//      every block whose bypass bit is set is skipped, so with the mode and
//      "other" blocks bypassed the chain is 54 bits long. A new bit enters at
//      the lowest non-bypassed bit; sh_out is the bit that leaves at the top
//      and can be chained into the next molecule.
//   3. Runtime update of the 16 LUT bits by the molecule itself (shift
//      memory, Comm and Trigger modes) through lut_we/lut_d.
// Reset clears every bit (4-LUT mode, all-zero LUT, nothing bypassed).
// rd_data returns the word selected by rd_word, combinationally.
//
// The block structure with a bypass bit per block and the 76/32-bit numbers
// follow the architecture; the block widths, the word split, the shift order
// and the write priority are this design's choices (see poetic_pkg).
module molecule_cfg
  import poetic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // parallel configuration bus
  input  logic                 wr_en,
  input  logic [1:0]           wr_word,
  input  logic [31:0]          wr_data,
  input  logic [1:0]           rd_word,
  output logic [31:0]          rd_data,
  // serial partial reconfiguration
  input  logic                 sh_en,
  input  logic                 sh_in,
  output logic                 sh_out,
  // runtime LUT update from the molecule's own modes
  input  logic                 lut_we,
  input  logic [LUT_BITS-1:0]  lut_d,
  // the configuration
  output logic [CFG_BITS-1:0]  cfg
);

  logic [CFG_BITS-1:0]  cfg_q;
  logic [DATA_BITS-1:0] data, data_sh, en;
  logic                 carry;

  // Data bits (bypass bits removed), LUT first, and their shift enables.
  assign data = {cfg_q[BYP_OTH-1:OTH_LO], cfg_q[BYP_MODE-1:MODE_LO],
                 cfg_q[BYP_SB-1:SB_LO], cfg_q[BYP_SEL-1:SEL_LO],
                 cfg_q[BYP_LUT-1:LUT_LO]};
  assign en   = {{OTH_BITS{!cfg_q[BYP_OTH]}}, {MODE_BITS{!cfg_q[BYP_MODE]}},
                 {SB_BITS{!cfg_q[BYP_SB]}}, {SEL_BITS{!cfg_q[BYP_SEL]}},
                 {LUT_BITS{!cfg_q[BYP_LUT]}}};

  // One shift step over the enabled bits only.
  always_comb begin
    carry = sh_in;
    for (int i = 0; i < int'(DATA_BITS); i++) begin
      if (en[i]) begin
        data_sh[i] = carry;
        carry      = data[i];
      end else begin
        data_sh[i] = data[i];
      end
    end
    sh_out = carry;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q <= '0;
    end else if (wr_en) begin
      unique case (wr_word)
        2'd0:    cfg_q[31:0]  <= wr_data;
        2'd1:    cfg_q[63:32] <= wr_data;
        default: cfg_q[75:64] <= wr_data[11:0];
      endcase
    end else if (sh_en) begin
      cfg_q[BYP_LUT-1:LUT_LO]   <= data_sh[15:0];
      cfg_q[BYP_SEL-1:SEL_LO]   <= data_sh[29:16];
      cfg_q[BYP_SB-1:SB_LO]     <= data_sh[53:30];
      cfg_q[BYP_MODE-1:MODE_LO] <= data_sh[56:54];
      cfg_q[BYP_OTH-1:OTH_LO]   <= data_sh[70:57];
    end else if (lut_we) begin
      cfg_q[BYP_LUT-1:LUT_LO]   <= lut_d;
    end
  end

  always_comb begin
    unique case (rd_word)
      2'd0:    rd_data = cfg_q[31:0];
      2'd1:    rd_data = cfg_q[63:32];
      default: rd_data = {20'd0, cfg_q[75:64]};
    endcase
  end

  assign cfg = cfg_q;

endmodule
