// adc_model - behavioural model of the 12-bit serial ADC (testbench only).
//
// SPI mode 0 slave: when cs_n falls it takes `value` as the conversion result
// and drives the first of the 16 frame bits (four zeros, then D11..D0, MSB
// first); each falling edge of sclk while cs_n is low moves to the next bit.
// `conversions` counts frames, `sclk_rises` counts rising sclk edges of the
// current frame.
module adc_model (
  input  logic        cs_n,
  input  logic        sclk,
  output logic        sdata,
  input  logic [11:0] value,
  output int          conversions,
  output int          sclk_rises
);
  logic [15:0] frame;
  int          idx;

  initial begin
    sdata       = 1'b0;
    conversions = 0;
    sclk_rises  = 0;
    frame       = '0;
    idx         = 0;
  end

  always @(negedge cs_n) begin
    frame = {4'b0000, value};
    idx   = 15;
    sdata = frame[15];
    sclk_rises = 0;
    conversions++;
  end

  always @(posedge sclk) if (!cs_n) sclk_rises++;

  always @(negedge sclk) begin
    if (!cs_n && idx > 0) begin
      idx--;
      sdata = frame[idx];
    end
  end
endmodule
