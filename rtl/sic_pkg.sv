// sic_pkg: shared constants and types of the WCDMA uplink SIC receiver.
//
// The frame structure follows 3GPP WCDMA uplink: 38400 chips per 10 ms frame, 15 slots of 2560
// chips, one DPCCH bit per 256 chips (10 per slot). The receiver works on complex samples taken
// at four times the chip rate. A "pair" is two DPCCH bit periods (512 chips): the channel
// estimate is refreshed once per pilot pair, and bits are decided pair by pair.
// Symbols are carried as sign flags throughout: a flag of 1 means the value -1, 0 means +1.
// Sample width (16-bit I and Q, so one complex sample fills one 32-bit FIFO word) is a choice of
// this design.
package sic_pkg;
  localparam int unsigned SAMPLE_W        = 16;      // bits of I and of Q
  localparam int unsigned CHIPS_PER_FRAME = 38400;
  localparam int unsigned CHIPS_PER_SLOT  = 2560;
  localparam int unsigned CHIPS_PER_CBIT  = 256;     // DPCCH spreading factor
  localparam int unsigned CHIPS_PER_PAIR  = 512;
  localparam int unsigned OVERSAMPLE      = 4;
  localparam int unsigned TAU_W           = 9;       // path delay, quarter chips
  localparam int unsigned D_MAX           = 511;     // largest path delay, quarter chips
  localparam int unsigned ACC_W           = SAMPLE_W + 10; // despreader accumulators
  localparam int unsigned ALPHA_W         = ACC_W + 2;     // channel estimates
  localparam int unsigned W_FRAC          = 8;       // ARMA weight W in units of 1/256
  localparam int unsigned GAIN_FRAC       = 8;       // beta_d/beta_c in units of 1/256

  typedef struct packed {
    logic signed [SAMPLE_W-1:0] re;
    logic signed [SAMPLE_W-1:0] im;
  } cplx_s_t;                                        // one received sample (32 bits)

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } cplx_acc_t;                                      // despread symbol

  typedef struct packed {
    logic signed [ALPHA_W-1:0] re;
    logic signed [ALPHA_W-1:0] im;
  } cplx_alpha_t;                                    // channel estimate
endpackage
