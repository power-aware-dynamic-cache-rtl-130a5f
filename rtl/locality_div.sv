// locality_div: the DIV block of the cache controller.
//
// Computes the locality metric D = LRU count / MRU count of one core for the
// sampling interval just ended. D is a ratio that is normally well below one
// (thresholds of 0.001 and 0.005 are typical), so the quotient is returned as
// an unsigned N-bit binary fraction: divq = floor(divb * 2^N / diva). A ratio
// of one or more saturates to all ones. When diva (MRU count) is zero, divq is
// all ones if divb is non-zero and zero if both are zero (no accesses, no
// demand).
//
// It is a purely combinational restoring divider of N stages, as the delay
// figures quoted for the controller grow with N. Port names follow the block
// diagram: DIVA takes the MRU count, DIVB the LRU count, DIVQ is the result.
// The fixed-point format and the saturation are this design's choices.
module locality_div #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] diva,   // MRU count (divisor)
  input  logic [N-1:0] divb,   // LRU count (dividend)
  output logic [N-1:0] divq    // D as an N-bit fraction, saturating
);

  logic [N:0] rem;
  logic [N:0] trial;

  always_comb begin
    divq = '0;
    rem  = '0;
    trial = '0;
    if (diva == '0) begin
      divq = (divb == '0) ? '0 : '1;
    end else if (divb >= diva) begin
      divq = '1;
    end else begin
      // divb < diva: each stage doubles the remainder and subtracts the
      // divisor if it fits, producing one fraction bit, MSB first.
      rem = {1'b0, divb};
      for (int i = N - 1; i >= 0; i--) begin
        rem   = {rem[N-1:0], 1'b0};
        trial = rem - {1'b0, diva};
        if (rem >= {1'b0, diva}) begin
          rem     = trial;
          divq[i] = 1'b1;
        end
      end
    end
  end

endmodule
