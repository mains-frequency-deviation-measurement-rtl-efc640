// atten_control - range selection for the programmable input attenuator.
//
// The input attenuator of the source design is a resistive divider with three
// ratios, 1:1, 10:1 and 100:1, set by two reed relays driven from the FPGA (line
// "10:1" and line "100:1"); the ratio must keep the signal inside the dynamic
// range of the following stages. How the ratio is chosen is not described, so
// this block chooses it automatically from the ADC samples:
//  * overload: a sample at or beyond CLIP_LO / CLIP_HI (near the ADC rails) moves
//    one step up in attenuation at once (unless already at 100:1) and pulses
//    `overload` in any case;
//  * underrange: if over WINDOW consecutive samples the peak-to-peak swing stays
//    below UNDER_PP codes, the attenuation moves one step down (unless at 1:1).
//    UNDER_PP is below a tenth of full scale so a step down cannot overload.
// Each change pulses `range_changed` and restarts the observation window.
// After reset the attenuation is 100:1, the safest setting.
//
// Outputs are registered; `att_10`/`att_100` are the relay drive lines (high =
// relay closed) and change one clock after the sample that causes the change.
module atten_control
  import mfd_pkg::*;
#(
  parameter int unsigned WINDOW   = 64,
  parameter int unsigned CLIP_LO  = 16,
  parameter int unsigned CLIP_HI  = 4079,
  parameter int unsigned UNDER_PP = 340
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t sample,
  input  logic    sample_valid,
  output atten_e  range_sel,
  output logic    att_10,
  output logic    att_100,
  output logic    range_changed,
  output logic    overload
);
  localparam int unsigned WW = $clog2(WINDOW + 1);

  logic [WW-1:0] win_cnt;
  sample_t       vmin, vmax;
  sample_t       nmin, nmax;
  logic          clip;

  always_comb begin
    clip = (sample <= sample_t'(CLIP_LO)) || (sample >= sample_t'(CLIP_HI));
    nmin = (win_cnt == '0 || sample < vmin) ? sample : vmin;
    nmax = (win_cnt == '0 || sample > vmax) ? sample : vmax;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      range_sel     <= ATT_100_1;
      win_cnt       <= '0;
      vmin          <= '0;
      vmax          <= '0;
      range_changed <= 1'b0;
      overload      <= 1'b0;
    end else begin
      range_changed <= 1'b0;
      overload      <= 1'b0;
      if (sample_valid) begin
        overload <= clip;
        if (clip && range_sel != ATT_100_1) begin
          range_sel     <= (range_sel == ATT_1_1) ? ATT_10_1 : ATT_100_1;
          range_changed <= 1'b1;
          win_cnt       <= '0;
        end else if (win_cnt == WW'(WINDOW - 1)) begin
          if ((nmax - nmin) < sample_t'(UNDER_PP) && range_sel != ATT_1_1) begin
            range_sel     <= (range_sel == ATT_100_1) ? ATT_10_1 : ATT_1_1;
            range_changed <= 1'b1;
          end
          win_cnt <= '0;
        end else begin
          vmin    <= nmin;
          vmax    <= nmax;
          win_cnt <= win_cnt + 1'b1;
        end
      end
    end
  end

  assign att_10  = (range_sel == ATT_10_1);
  assign att_100 = (range_sel == ATT_100_1);

  // Only one relay may be closed at a time.
  assert property (@(posedge clk) !(att_10 && att_100));

  initial assert (WINDOW >= 2 && CLIP_LO < CLIP_HI) else $error("atten_control: bad parameters");
endmodule
