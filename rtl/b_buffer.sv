// b_buffer - temporary buffer of the mains-component samples B.
//
// The source design stores every B_i in a temporary buffer, from which Eq. (7)
// takes B_i, B_{i-1}, B_{i-3} and B_{i-4}. Here it is a DEPTH-word shift register:
// `push` shifts `b_in` in at position 0, so b_hist[k] is B_{i-k} after the push of
// B_i. `count` says how many words are valid (saturating at DEPTH) and `full` that
// all are. `clear` empties it (used when the signal path changes, so no estimate
// mixes samples from before and after). Pushes take effect on the next clock;
// `clear` wins over `push`.
module b_buffer
  import mfd_pkg::*;
#(
  parameter int unsigned DEPTH = 5,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          push,
  input  bval_t         b_in,
  output bval_t         b_hist [DEPTH],
  output logic [CW-1:0] count,
  output logic          full
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int k = 0; k < DEPTH; k++) b_hist[k] <= '0;
    end else if (clear) begin
      count <= '0;
    end else if (push) begin
      b_hist[0] <= b_in;
      for (int k = 1; k < DEPTH; k++) b_hist[k] <= b_hist[k-1];
      if (count != CW'(DEPTH)) count <= count + 1'b1;
    end
  end

  assign full = (count == CW'(DEPTH));
endmodule
