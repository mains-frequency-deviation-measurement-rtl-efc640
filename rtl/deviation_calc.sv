// deviation_calc - mains frequency deviation from four B samples.
//
// Implements the two equations of the source design that turn the mains
// component B into a frequency deviation:
//     K(f)    = (B_i - B_{i-4}) / (2 * (B_{i-1} - B_{i-3}))
//     delta_f = -K(f) * Phi / (2*pi)
// For a sinusoid sampled at Phi = 200 Hz, K equals cos(2*pi*f/Phi) whatever the
// phase and amplitude, so near 50 Hz -K*Phi/(2*pi) is the deviation from 50 Hz.
//
// This block folds both into a single division and gives delta_f in millihertz:
//     df_mhz = -round(|num| * G / |den|) * sign(num) * sign(den),  G = round(Phi*1000/(2*pi))
// with num = B_i - B_{i-4}, den = 2*(B_{i-1} - B_{i-3}); G = 31831 at 200 Hz.
// The division is a restoring divider, one bit per clock. The result saturates
// to the df_t range.
//
// The document does not say what happens when the denominator is close to zero
// (the sine crosses zero between B_{i-3} and B_{i-1}). Here an estimate whose
// |den| is below MIN_DEN (in half-LSB units) is not computed: `done` pulses with
// `skipped` high and `df_mhz` keeps its previous value.
//
// Timing: `start` (one clock, while not busy) latches the four samples. Counted
// from the clock edge that takes `start`, `done` rises 1 clock later for a skipped
// estimate and NW+4 clocks later (35 at the defaults, NW = 31) for a computed one.
module deviation_calc
  import mfd_pkg::*;
#(
  parameter int unsigned SAMPLE_HZ = 200,
  parameter int unsigned MIN_DEN   = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  bval_t b_i,     // B_i
  input  bval_t b_i1,    // B_{i-1}
  input  bval_t b_i3,    // B_{i-3}
  input  bval_t b_i4,    // B_{i-4}
  output logic  busy,
  output logic  done,
  output logic  skipped,
  output df_t   df_mhz
);
  localparam int unsigned GAIN   = df_gain_mhz(SAMPLE_HZ);
  localparam int unsigned GAIN_W = $clog2(GAIN + 1);
  localparam int unsigned NUM_W  = B_W + 1;            // signed B_i - B_{i-4}
  localparam int unsigned DEN_W  = B_W + 2;            // signed 2*(B_{i-1} - B_{i-3})
  localparam int unsigned NW     = NUM_W + GAIN_W + 1; // dividend, with rounding headroom
  localparam int unsigned DF_MAX = (1 << (DF_W - 1)) - 1;

  typedef enum logic [1:0] {S_IDLE, S_PREP, S_DIV, S_OUT} state_e;

  state_e                   state;
  logic signed [NUM_W-1:0]  num;
  logic signed [DEN_W-1:0]  den;
  logic        [NUM_W-1:0]  num_mag;
  logic        [DEN_W-1:0]  den_mag;
  logic                     neg;          // sign of the result
  logic                     div_start, div_done;
  logic        [NW-1:0]     dividend, quotient;
  logic signed [NUM_W-1:0]  den_half;     // B_{i-1} - B_{i-3}

  always_comb begin
    num_mag  = num[NUM_W-1] ? NUM_W'(-num) : NUM_W'(num);
    den_mag  = den[DEN_W-1] ? DEN_W'(-den) : DEN_W'(den);
    den_half = NUM_W'(b_i1) - NUM_W'(b_i3);
    dividend = NW'(num_mag) * NW'(GAIN) + NW'(den_mag >> 1);
  end

  seq_divider #(.NW(NW), .DW(DEN_W)) u_div (
    .clk, .rst_n,
    .start    (div_start),
    .dividend (dividend),
    .divisor  (den_mag),
    .busy     (),
    .done     (div_done),
    .quotient (quotient),
    .remainder()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      num       <= '0;
      den       <= '0;
      neg       <= 1'b0;
      div_start <= 1'b0;
      done      <= 1'b0;
      skipped   <= 1'b0;
      df_mhz    <= '0;
    end else begin
      div_start <= 1'b0;
      done      <= 1'b0;
      skipped   <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          num   <= NUM_W'(b_i)  - NUM_W'(b_i4);
          den   <= {den_half, 1'b0};
          state <= S_PREP;
        end
        S_PREP: begin
          // delta_f = -num/den: negative when num and den have the same sign
          neg <= (num[NUM_W-1] == den[DEN_W-1]);
          if (den_mag < DEN_W'(MIN_DEN)) begin
            done    <= 1'b1;
            skipped <= 1'b1;
            state   <= S_IDLE;
          end else begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
        end
        S_DIV: if (div_done) state <= S_OUT;
        S_OUT: begin
          if (quotient > NW'(DF_MAX))
            df_mhz <= neg ? -df_t'(DF_MAX) : df_t'(DF_MAX);
          else
            df_mhz <= neg ? -df_t'(quotient) : df_t'(quotient);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  initial assert (MIN_DEN >= 1) else $error("deviation_calc: MIN_DEN must be at least 1");
endmodule
