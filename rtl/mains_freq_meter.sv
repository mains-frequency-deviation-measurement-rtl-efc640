// mains_freq_meter - mains frequency deviation meter, digital part.
//
// Measures how far the mains frequency is from its nominal 50 Hz using only the
// hum in a signal, sampled at 200 Hz by a 12-bit SPI ADC. Every 5 ms the sample
// timer starts an SPI read of the ADC; the sample goes to the attenuator range
// control and to the measurement core, which stores it in a 64 x 12-bit RAM,
// extracts the mains component with the 'two point' filter and turns four
// consecutive mains-component samples into a deviation in millihertz.
//
// This follows the structural diagram of the source design (ADC -> SPI
// receiver -> processing with a 64x12 RAM -> display, FPGA-driven input
// attenuator). There the processing is software on a soft CPU whose program is
// not published; here it is dedicated logic doing the same computation. The
// display, buttons and analog front end are outside this module: the result
// and the attenuator relay lines are ports.
//
// Ports:
//   adc_cs_n, adc_sclk, adc_sdata  SPI to the ADC (mode 0, 16-bit frame, 12-bit result)
//   att_10, att_100                attenuator relay drives (10:1 and 100:1), high = closed
//   atten_range                    current attenuation, overload = a sample hit the rails
//   df_mhz, freq_mhz, df_valid     deviation and frequency in mHz, one-clock update strobe
//   df_skipped                     an estimate was skipped (signal near a zero crossing)
//   hum_b2, hum_valid              mains component 2*B_i of every sample
//   overrun                        sticky: a sample came while the core was busy
// One estimate per sample (200 per second) once 7 samples are in after reset
// or after a range change; df_valid rises 43 clocks after the SPI frame ends.
module mains_freq_meter
  import mfd_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 50_000_000,
  parameter int unsigned SAMPLE_HZ  = 200,
  parameter int unsigned NOMINAL_HZ = 50,
  parameter int unsigned SCLK_DIV   = 25,
  parameter int unsigned MIN_DEN    = 256,
  parameter int unsigned WINDOW     = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // ADC
  output logic                 adc_cs_n,
  output logic                 adc_sclk,
  input  logic                 adc_sdata,
  // attenuator
  output logic                 att_10,
  output logic                 att_100,
  output atten_e               atten_range,
  output logic                 overload,
  // results (to the display)
  output df_t                  df_mhz,
  output logic signed [DF_W:0] freq_mhz,
  output logic                 df_valid,
  output logic                 df_skipped,
  output bval_t                hum_b2,
  output logic                 hum_valid,
  output logic                 overrun
);
  logic    tick;
  sample_t sample;
  logic    sample_valid;
  logic    range_changed;

  sample_timer #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ)) u_timer (
    .clk, .rst_n, .tick
  );

  spi_adc_receiver #(.SCLK_DIV(SCLK_DIV), .FRAME_BITS(16), .DATA_BITS(SAMPLE_W)) u_spi (
    .clk, .rst_n,
    .start        (tick),
    .busy         (),
    .adc_cs_n, .adc_sclk, .adc_sdata,
    .sample       (sample),
    .sample_valid (sample_valid)
  );

  atten_control #(.WINDOW(WINDOW)) u_att (
    .clk, .rst_n,
    .sample, .sample_valid,
    .range_sel     (atten_range),
    .att_10, .att_100,
    .range_changed (range_changed),
    .overload
  );

  freq_dev_core #(
    .SAMPLE_HZ (SAMPLE_HZ),
    .NOMINAL_HZ(NOMINAL_HZ),
    .MIN_DEN   (MIN_DEN),
    .RAM_DEPTH (64)
  ) u_core (
    .clk, .rst_n,
    .restart      (range_changed),
    .sample, .sample_valid,
    .b2           (hum_b2),
    .b_valid      (hum_valid),
    .df_mhz, .freq_mhz, .df_valid, .df_skipped, .overrun
  );
endmodule
