// mfd_pkg - shared types and constants of the mains frequency deviation meter.
//
// The meter samples the mains hum at 200 Hz with a 12-bit ADC, so that one mains
// period (50 Hz) spans exactly four samples. The sample rate, the nominal mains
// frequency, the 12-bit sample width and the three attenuator ratios follow the
// source design; the fixed-point formats below are this implementation's choice.
//
//   sample_t  unsigned 12-bit ADC code, mid-scale (2048) is the signal zero
//   bval_t    mains component B_i = X_i - Y_i, signed, in units of half an ADC LSB
//             (Y_i is kept with one fractional bit so no rounding is introduced)
//   df_t      frequency deviation in millihertz, signed
package mfd_pkg;

  localparam int unsigned SAMPLE_W = 12;
  localparam int unsigned B_W      = SAMPLE_W + 2;   // 2*X_i - X_{i-1} - X_{i+1}
  localparam int unsigned DF_W     = 20;             // +-524 Hz in mHz, saturated

  typedef logic        [SAMPLE_W-1:0] sample_t;
  typedef logic signed [B_W-1:0]      bval_t;
  typedef logic signed [DF_W-1:0]     df_t;

  // Attenuator setting. Relay 1 (10:1 line) shunts the divider with 9.1 kOhm,
  // relay 2 (100:1 line) with 820 Ohm; with neither the input passes 1:1.
  typedef enum logic [1:0] {
    ATT_1_1   = 2'd0,
    ATT_10_1  = 2'd1,
    ATT_100_1 = 2'd2
  } atten_e;

  localparam real PI = 3.14159265358979323846;

  // Gain of Eq. delta_f = -K * Phi / (2*pi), expressed in mHz per unit of K.
  function automatic int unsigned df_gain_mhz(input int unsigned sample_hz);
    return int'($floor(real'(sample_hz) * 1000.0 / (2.0 * PI) + 0.5));
  endfunction

endpackage
