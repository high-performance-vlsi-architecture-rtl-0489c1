// REG_IN: the input sample register.
//
// The incoming sample is registered every cycle; the registered value is
// compared against the whole array in the following cycle. When no sample is
// taken (accept low: no sample offered, or the array already holds N samples)
// the register loads 0. A zero sample makes every comparator output 0, so
// every array register keeps its value: an idle cycle needs no gating in the
// compare-decode-multiplexer path. The zero-on-idle behaviour is this design's
// choice. Asynchronous active-low reset to 0.
module xsort_in_reg #(
  parameter int unsigned W = xsort_pkg::W_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         accept,   // take in_data this cycle
  input  logic [W-1:0] in_data,
  output logic [W-1:0] q         // REG_IN
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= accept ? in_data : '0;
  end

endmodule
