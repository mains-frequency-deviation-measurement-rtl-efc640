// freq_dev_core - per-sample sequencer of the frequency deviation measurement.
//
// In the source design a soft CPU in the FPGA runs the measurement in software:
// every ADC sample is stored in a 64 x 12-bit RAM, the two-point filter gives the
// mains component B_i, B_i goes to a temporary buffer, and the deviation is
// computed from four buffered B values. The CPU's instruction set and program are
// not published, so this block performs the same steps with a small hardwired
// state machine around the same 64 x 12 RAM.
//
// For each `sample_valid` (one clock) the sample is written to the RAM, used as a
// circular buffer. Once three samples are present the three newest are read back
// as X_{i-1}, X_i, X_{i+1}, filtered, and 2*B_i is pushed into the B buffer (also
// shown on `b2`/`b_valid`). Once five B values are buffered, the deviation is
// computed from B_i, B_{i-1}, B_{i-3}, B_{i-4}; note that the index i here is the
// centre sample, one sample older than the newest. A computed estimate appears on
// `df_mhz`/`freq_mhz` with a one-clock `df_valid`; an estimate whose denominator
// is too small gives a one-clock `df_skipped` instead and the outputs hold.
// The first estimate therefore needs 7 samples after reset or `restart`.
//
// Timing, counted from the clock edge that takes `sample_valid`: `b_valid` after
// 4 clocks, `df_valid` after 42 clocks, `df_skipped` after 8. The next sample
// must not arrive before that (at 200 Hz and 50 MHz there are 250000 clocks
// between samples); a sample that arrives while the core is busy is dropped and
// sets the sticky `overrun` flag. `restart` (one clock, e.g. after the
// attenuator range changed) empties the sample history and the B buffer before
// the next sample is taken, so no estimate mixes the two ranges.
module freq_dev_core
  import mfd_pkg::*;
#(
  parameter int unsigned SAMPLE_HZ  = 200,
  parameter int unsigned NOMINAL_HZ = 50,
  parameter int unsigned MIN_DEN    = 256,
  parameter int unsigned RAM_DEPTH  = 64
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  restart,
  input  sample_t               sample,
  input  logic                  sample_valid,
  output bval_t                 b2,          // 2*B_i, half-LSB units
  output logic                  b_valid,
  output df_t                   df_mhz,      // deviation from NOMINAL_HZ, mHz
  output logic signed [DF_W:0]  freq_mhz,    // NOMINAL_HZ*1000 + df_mhz
  output logic                  df_valid,
  output logic                  df_skipped,
  output logic                  overrun
);
  localparam int unsigned AW = $clog2(RAM_DEPTH);

  typedef enum logic [2:0] {S_IDLE, S_RD0, S_RD1, S_RD2, S_RD3, S_PUSH, S_CHK, S_CALC} state_e;

  state_e        state;
  logic [AW-1:0] wp;            // next RAM address to write
  logic [1:0]    fill;          // samples since restart, saturating at 3
  logic          flush_pend;

  // RAM
  logic          ram_we;
  logic [AW-1:0] ram_raddr;
  sample_t       ram_rdata;

  // filter
  sample_t           x_prev, x_cur;
  logic              fir_in_valid, fir_out_valid;
  logic [SAMPLE_W:0] fir_y2;
  bval_t             fir_b2;

  // B buffer
  bval_t       b_hist [5];
  logic [2:0]  b_count;
  logic        b_full;
  logic        b_clear;

  // deviation
  logic calc_start, calc_done, calc_skipped;
  df_t  calc_df;

  wire take_sample = (state == S_IDLE) && sample_valid;
  wire do_flush    = (state == S_IDLE) && (flush_pend || restart);

  assign ram_we  = take_sample;
  assign b_clear = do_flush;

  always_comb begin
    unique case (state)
      S_RD0:   ram_raddr = wp - AW'(3);   // X_{i-1}
      S_RD1:   ram_raddr = wp - AW'(2);   // X_i
      default: ram_raddr = wp - AW'(1);   // X_{i+1}, the newest
    endcase
  end

  assign fir_in_valid = (state == S_RD3);
  assign calc_start   = (state == S_CHK) && b_full;

  sample_ram #(.DEPTH(RAM_DEPTH), .WIDTH(SAMPLE_W)) u_ram (
    .clk,
    .we    (ram_we),
    .waddr (wp),
    .wdata (sample),
    .raddr (ram_raddr),
    .rdata (ram_rdata)
  );

  two_point_filter u_fir (
    .clk, .rst_n,
    .in_valid  (fir_in_valid),
    .x_prev    (x_prev),
    .x_cur     (x_cur),
    .x_next    (ram_rdata),
    .out_valid (fir_out_valid),
    .y2        (fir_y2),
    .b2        (fir_b2)
  );

  b_buffer #(.DEPTH(5)) u_bbuf (
    .clk, .rst_n,
    .clear  (b_clear),
    .push   (fir_out_valid),
    .b_in   (fir_b2),
    .b_hist (b_hist),
    .count  (b_count),
    .full   (b_full)
  );

  deviation_calc #(.SAMPLE_HZ(SAMPLE_HZ), .MIN_DEN(MIN_DEN)) u_calc (
    .clk, .rst_n,
    .start   (calc_start),
    .b_i     (b_hist[0]),
    .b_i1    (b_hist[1]),
    .b_i3    (b_hist[3]),
    .b_i4    (b_hist[4]),
    .busy    (),
    .done    (calc_done),
    .skipped (calc_skipped),
    .df_mhz  (calc_df)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      wp         <= '0;
      fill       <= '0;
      flush_pend <= 1'b0;
      x_prev     <= '0;
      x_cur      <= '0;
      df_mhz     <= '0;
      df_valid   <= 1'b0;
      df_skipped <= 1'b0;
      overrun    <= 1'b0;
    end else begin
      df_valid   <= 1'b0;
      df_skipped <= 1'b0;
      if (restart) flush_pend <= 1'b1;
      if (sample_valid && state != S_IDLE) overrun <= 1'b1;

      unique case (state)
        S_IDLE: begin
          if (do_flush) flush_pend <= 1'b0;
          if (take_sample) begin
            wp <= wp + 1'b1;
            if (do_flush) begin
              fill <= 2'd1;
            end else begin
              if (fill != 2'd3) fill <= fill + 1'b1;
              if (fill >= 2'd2) state <= S_RD0;   // third sample or later
            end
          end else if (do_flush) begin
            fill <= '0;
          end
        end
        S_RD0: state <= S_RD1;
        S_RD1: begin x_prev <= ram_rdata; state <= S_RD2; end
        S_RD2: begin x_cur  <= ram_rdata; state <= S_RD3; end
        S_RD3: state <= S_PUSH;            // filter takes X_{i+1} from the RAM port
        S_PUSH: state <= S_CHK;            // B_i enters the buffer
        S_CHK: state <= b_full ? S_CALC : S_IDLE;
        S_CALC: if (calc_done) begin
          if (calc_skipped) begin
            df_skipped <= 1'b1;
          end else begin
            df_mhz   <= calc_df;
            df_valid <= 1'b1;
          end
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign freq_mhz = (DF_W+1)'(NOMINAL_HZ * 1000) + (DF_W+1)'(df_mhz);
  assign b2       = fir_b2;
  assign b_valid  = fir_out_valid;

  initial assert (RAM_DEPTH >= 4) else $error("freq_dev_core: RAM_DEPTH must be at least 4");
endmodule
