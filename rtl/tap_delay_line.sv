// tap_delay_line: shift register of input samples.
//
// On every clock with 'en' high the new sample enters taps[0] and every older
// sample moves one place down, so taps[k] holds the sample that entered k
// enabled cycles before the newest one. DEPTH words of W bits, cleared on
// reset. One delay line serves both halves of the filter: the first N taps
// feed the error-computation block and a later window of N taps, delayed by
// the error-computation latency, feeds the weight-update block, so the two
// blocks need no separate copies of the input history.
module tap_delay_line #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 21
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] x,
  output logic signed [W-1:0] taps [DEPTH]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) taps[k] <= '0;
    end else if (en) begin
      taps[0] <= x;
      for (int k = 1; k < DEPTH; k++) taps[k] <= taps[k-1];
    end
  end

endmodule
