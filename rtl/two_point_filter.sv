// two_point_filter - 'two point' FIR averaging and subtraction of the mains component.
//
// With four samples per mains period (200 Hz sampling of 50 Hz) the two-point
// filter of the source design averages the samples a quarter period before and
// after the current one:
//     Y_i = (X_{i-1} + X_{i+1}) / 2
// Its gain is cos(2*pi*f/200): 1 at DC, 0 at exactly 50 Hz. The difference
//     B_i = X_i - Y_i
// therefore keeps the mains component (its gain is 1 - cos) and removes the DC
// level of the ADC input. Both equations are the document's.
//
// This implementation keeps one fractional bit so nothing is rounded:
// `y2` = 2*Y_i = X_{i-1} + X_{i+1} and `b2` = 2*B_i = 2*X_i - X_{i-1} - X_{i+1}
// (B in units of half an ADC LSB). The outputs are registered: they appear, with
// `out_valid`, one clock after `in_valid`.
module two_point_filter
  import mfd_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  sample_t             x_prev,   // X_{i-1}
  input  sample_t             x_cur,    // X_i
  input  sample_t             x_next,   // X_{i+1}
  output logic                out_valid,
  output logic [SAMPLE_W:0]   y2,       // 2*Y_i
  output bval_t               b2        // 2*B_i
);
  logic [SAMPLE_W:0] sum;
  bval_t             diff;

  always_comb begin
    sum  = {1'b0, x_prev} + {1'b0, x_next};
    diff = bval_t'({2'b00, x_cur, 1'b0}) - bval_t'({1'b0, sum});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y2        <= '0;
      b2        <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y2 <= sum;
        b2 <= diff;
      end
    end
  end
endmodule
