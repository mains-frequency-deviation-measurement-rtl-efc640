// seq_divider - unsigned restoring divider, one quotient bit per clock.
//
// `start` (while idle) loads `dividend` and `divisor`; NW clocks later `done`
// pulses for one clock with `quotient` = dividend / divisor (rounded down) and
// `remainder`. `busy` is high from the clock after `start` until `done`.
// A zero divisor gives an all-ones quotient; callers keep it away.
module seq_divider #(
  parameter int unsigned NW = 31,   // dividend / quotient width
  parameter int unsigned DW = 16    // divisor / remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] dividend,
  input  logic [DW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quotient,
  output logic [DW-1:0] remainder
);
  localparam int unsigned SW = $clog2(NW + 1);

  logic [DW-1:0] dsr;
  logic [DW-1:0] rem;            // always below the divisor
  logic [NW-1:0] quo;
  logic [SW-1:0] steps;

  logic [DW:0]   rem_sh;
  logic [DW+1:0] trial;

  always_comb begin
    rem_sh = {rem, quo[NW-1]};
    trial  = {1'b0, rem_sh} - {2'b00, dsr};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dsr   <= '0;
      rem   <= '0;
      quo   <= '0;
      steps <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          dsr   <= divisor;
          rem   <= '0;
          quo   <= dividend;
          steps <= SW'(NW);
          busy  <= 1'b1;
        end
      end else begin
        if (trial[DW+1]) begin           // negative: restore
          rem <= rem_sh[DW-1:0];          // rem_sh < divisor here
          quo <= {quo[NW-2:0], 1'b0};
        end else begin
          rem <= trial[DW-1:0];
          quo <= {quo[NW-2:0], 1'b1};
        end
        steps <= steps - 1'b1;
        if (steps == SW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient  = quo;
  assign remainder = rem;
endmodule
