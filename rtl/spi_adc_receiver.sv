// spi_adc_receiver - SPI master that reads one conversion from the 12-bit ADC.
//
// In the source design the ADC result reaches the FPGA over SPI through an "SPI
// interface receiver"; the ADC part and its frame format are not given. This
// block assumes the common serial-ADC frame: chip select low starts the
// conversion, the ADC shifts out FRAME_BITS bits MSB first, of which the last
// DATA_BITS are the result (for 16/12: four leading zeros, then D11..D0).
//
// Timing (SPI mode 0): adc_sclk idles low. `start` (one clock) pulls adc_cs_n low;
// the ADC presents its first bit. Each bit then takes 2*SCLK_DIV clocks: SCLK_DIV
// low, a rising edge at which adc_sdata is sampled, SCLK_DIV high, and a falling
// edge at which the ADC moves to the next bit. After the last rising edge SCLK
// goes low, SCLK_DIV clocks later adc_cs_n returns high and `sample_valid` pulses
// for one clock with the result on `sample`. A frame lasts
// (2*FRAME_BITS+1)*SCLK_DIV clocks from the clock edge that takes `start` to the
// one that raises `sample_valid` (825 clocks, 16.5 us, at the defaults). `start` while `busy` is ignored.
module spi_adc_receiver #(
  parameter int unsigned SCLK_DIV   = 25,   // clocks per SCLK half period (1 MHz at 50 MHz)
  parameter int unsigned FRAME_BITS = 16,
  parameter int unsigned DATA_BITS  = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  // ADC pins
  output logic                 adc_cs_n,
  output logic                 adc_sclk,
  input  logic                 adc_sdata,
  // result
  output logic [DATA_BITS-1:0] sample,
  output logic                 sample_valid
);
  localparam int unsigned DW = (SCLK_DIV > 1) ? $clog2(SCLK_DIV) : 1;
  localparam int unsigned BW = $clog2(FRAME_BITS + 1);

  typedef enum logic [1:0] {S_IDLE, S_LOW, S_HIGH, S_END} state_e;

  state_e                state;
  logic [DW-1:0]         div_cnt;
  logic [BW-1:0]         bit_cnt;
  logic [DATA_BITS-1:0]  shreg;      // last DATA_BITS bits of the frame

  wire div_done = (div_cnt == DW'(SCLK_DIV - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      div_cnt      <= '0;
      bit_cnt      <= '0;
      shreg        <= '0;
      adc_cs_n     <= 1'b1;
      adc_sclk     <= 1'b0;
      sample       <= '0;
      sample_valid <= 1'b0;
    end else begin
      sample_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          div_cnt <= '0;
          bit_cnt <= '0;
          if (start) begin
            adc_cs_n <= 1'b0;
            state    <= S_LOW;
          end
        end
        S_LOW: begin                       // SCLK low half: ADC data settles
          div_cnt <= div_done ? '0 : div_cnt + 1'b1;
          if (div_done) begin
            adc_sclk <= 1'b1;              // rising edge: take the bit
            shreg    <= {shreg[DATA_BITS-2:0], adc_sdata};
            bit_cnt  <= bit_cnt + 1'b1;
            state    <= S_HIGH;
          end
        end
        S_HIGH: begin
          div_cnt <= div_done ? '0 : div_cnt + 1'b1;
          if (div_done) begin
            adc_sclk <= 1'b0;              // falling edge: ADC shifts
            state    <= (bit_cnt == BW'(FRAME_BITS)) ? S_END : S_LOW;
          end
        end
        S_END: begin                       // hold CS low for one half period
          div_cnt <= div_done ? '0 : div_cnt + 1'b1;
          if (div_done) begin
            adc_cs_n     <= 1'b1;
            sample       <= shreg;
            sample_valid <= 1'b1;
            state        <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // SCLK only toggles inside a frame.
  assert property (@(posedge clk) disable iff (!rst_n) adc_cs_n |-> !adc_sclk);

  initial assert (DATA_BITS <= FRAME_BITS && FRAME_BITS >= 2 && SCLK_DIV >= 1)
    else $error("spi_adc_receiver: bad frame parameters");
endmodule
