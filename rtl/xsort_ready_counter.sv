// Round counter and ready flag.
//
// A log2(N)-bit counter counts the samples taken into REG_IN during a round
// and wraps to 0 when the N-th is taken; at that point the one-bit flag full
// is set and further samples are refused (accept stays low) until clear.
// The N-th sample is inserted into the array one cycle after it was taken,
// so ready is full delayed by one cycle: when ready is high the array holds
// all N samples of the round in descending order. clear ends the round in
// the same cycle: counter, full and ready return to 0, and a sample offered
// together with clear is taken as the first sample of the next round.
// Only the counter's width and its purpose (a ready signal once N samples
// are read) come from the architecture; the refusal of extra samples and the
// clear timing are this design's choices. N must be a power of two >= 2.
module xsort_ready_counter #(
  parameter int unsigned N = xsort_pkg::N_DEFAULT,
  localparam int unsigned CW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  output logic          accept,  // sample taken into REG_IN this cycle
  output logic          full,    // N samples taken this round
  output logic          ready    // all N samples sorted
);

  logic [CW-1:0] count;  // samples taken, modulo N

  always_comb accept = in_valid && (!full || clear);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      full  <= 1'b0;
      ready <= 1'b0;
    end else if (clear) begin
      count <= CW'(accept);
      full  <= 1'b0;
      ready <= 1'b0;
    end else begin
      if (accept) begin
        count <= count + 1'b1;
        if (count == CW'(N - 1)) full <= 1'b1;
      end
      ready <= full;
    end
  end

endmodule
