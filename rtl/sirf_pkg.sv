// sirf_pkg: sizes, challenge layout and shared types of the SiRF PUF.
//
// The engineered netlist is three rows of eight modules; each module has
// four shift-register LUTs, so every row carries 32 signals and the
// netlist has 32 path end points. A module takes 32 challenge bits
// (16 shift-register address bits, 8 + 8 MUX select bits) and every row
// adds one transition-direction bit, giving 3 * (8 * 32 + 1) = 771 bits.
// These numbers follow the document; the bit order inside the structs is
// this design's own choice.
package sirf_pkg;

  localparam int NROWS   = 3;
  localparam int NCOLS   = 8;
  localparam int NSRL    = 4;                // shift-register LUTs per module
  localparam int NPATHS  = NCOLS * NSRL;     // 32 launch FFs / end points

  localparam int N_DV    = 4096;             // digitized path delays per challenge
  localparam int N_DVD   = N_DV / 2;         // 2048 DV_R, 2048 DV_F, 2048 DVD
  localparam int DV_W    = 16;               // fixed-point DV width
  localparam int FRAC    = 4;                // fractional bits of every DV/DVD value

  // Gate kinds of the reconvergent-fanout gate rows (all non-inverting).
  typedef enum logic [1:0] {
    G_AND = 2'd0,   // x[k] & x[k+1]
    G_OR  = 2'd1,   // x[k] | x[k+1]
    G_AO  = 2'd2    // (x[k] & x[k+1]) | x[k+2]
  } gate_t;

  // Challenge bits of one module.
  typedef struct packed {
    logic [NSRL-1:0][3:0] src;   // SRC_x: address bits [4:1] of each SRL
    logic [NSRL-1:0][1:0] mca;   // MUX selects of the first MUX row
    logic [NSRL-1:0][1:0] mcb;   // MUX selects of the second MUX row
  } mod_chal_t;

  // Challenge bits of one row: the TDC_x bit plus one word per column.
  typedef struct packed {
    logic                        tdc;
    mod_chal_t [NCOLS-1:0]       cols;
  } row_chal_t;

  // Configuration vector of the whole netlist (771 bits).
  typedef struct packed {
    row_chal_t [NROWS-1:0]       rows;
  } net_chal_t;

  typedef enum logic {
    MODE_ENROLL = 1'b0,
    MODE_REGEN  = 1'b1
  } bg_mode_t;

  // Gate kind of position k of the second gate row of column c (see
  // sirf_module). Position 3 is always AND-OR.
  function automatic gate_t rfm_b_gate(int c, int k);
    if (k == 3) return G_AO;
    case (c % 3)
      0:       return G_AO;
      1:       return G_AND;
      default: return G_OR;
    endcase
  endfunction

  // Gate kind of position k of the first gate row (same in every column).
  function automatic gate_t rfm_a_gate(int k);
    case (k)
      0:       return G_AND;
      1:       return G_OR;
      2:       return G_AND;
      default: return G_AO;
    endcase
  endfunction

endpackage
