// Shared types, constants and arithmetic helpers of the transverse-feedback
// signal processor. All samples are signed 16-bit two's complement bunch
// positions, as delivered by the beam position front-ends. The helpers round
// a wide product to nearest (half away from -inf, i.e. add half an LSB and
// shift) and saturate to the 16-bit range, which every stage of the chain uses
// so that an overflow clips instead of wrapping round and reversing the kick.
package dspu_pkg;

  localparam int unsigned DATA_W = 16;  // bunch position word width
  localparam int unsigned BUNCH_W = 12; // bunch index width (4096 > 3564 slots)
  localparam int unsigned NCH = 8;      // diagnostic channels

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic [BUNCH_W-1:0] bunch_t;

  localparam sample_t SMAX = sample_t'(16'sh7FFF);
  localparam sample_t SMIN = sample_t'(16'sh8000);

  // Saturate a 48-bit signed value to a 16-bit sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767) return SMAX;
    else if (v < -48'sd32768) return SMIN;
    else return sample_t'(v[15:0]);
  endfunction

  // Round a 48-bit fixed-point value with FRAC fractional bits to an integer
  // and saturate it to a sample.
  function automatic sample_t round_sat(input logic signed [47:0] v, input int unsigned frac);
    logic signed [47:0] r;
    if (frac == 0) r = v;
    else r = (v + (48'sd1 <<< (frac - 1))) >>> frac;
    return sat16(r);
  endfunction

  // All programmable settings, as held by the register file.
  typedef struct packed {
    logic        notch1_on, notch2_on;    // notch filters in
    logic        hilb1_on, hilb2_on;      // Hilbert phase shifters in
    logic        pu1_on, pu2_on;          // pick-up ON/OFF switches
    logic        loop_on;                 // loop ON/OFF after the sign stage
    logic [15:0] a1, a2;                  // gain balance, unsigned 1.15
    logic [2:0][15:0] h1, h2;             // 3-turn filter taps, signed 2.14
    logic [3:0]  obs_decim;               // observation rate 40.08 MHz / 2^k
    logic        pert_on;                 // perturbation playing
    logic        pert_bank;               // bank played
    logic [3:0]  pert_rate;               // perturbation step 2^k bunch periods
    logic [11:0] pert_len;                // last address played
  } dspu_cfg_t;

endpackage
