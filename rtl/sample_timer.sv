// sample_timer - conversion-start tick generator.
//
// Divides the system clock down to the 200 Hz sampling rate of the meter: `tick`
// is high for one clock every CLK_HZ/SAMPLE_HZ clocks, starting that many clocks
// after reset is released. The 200 Hz rate is the source design's (the lowest rate
// that puts a whole number of samples in a quarter mains period); the 50 MHz
// system clock is an assumed board clock, the document does not name one.
module sample_timer #(
  parameter int unsigned CLK_HZ    = 50_000_000,
  parameter int unsigned SAMPLE_HZ = 200
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned DIV = CLK_HZ / SAMPLE_HZ;
  localparam int unsigned CW  = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt == CW'(DIV - 1)) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

  initial assert (DIV >= 2) else $error("sample_timer: CLK_HZ must be at least twice SAMPLE_HZ");
endmodule
