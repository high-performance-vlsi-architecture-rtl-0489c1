// REG_x with its multiplexer: one W-bit position of the sorted array.
//
// Each clock edge the register takes the value its multiplexer (xsort_mux)
// selects: its own value, its left neighbour's value or the new sample in
// REG_IN. q is the sorted output r[x]. The register resets to 0, as the
// architecture requires (an empty position holds the smallest possible value,
// so any non-zero sample is placed in front of it). clear is a synchronous
// return to 0 used to start a new round; the asynchronous active-low reset and
// the separate clear input are choices of this design.
module xsort_slot
  import xsort_pkg::*;
#(
  parameter int unsigned W     = xsort_pkg::W_DEFAULT,
  parameter bit          FIRST = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         xr,         // xor[x]
  input  logic         cmp,        // cmp[x]
  input  logic [W-1:0] prev,       // REG_{x-1}
  input  logic [W-1:0] in_sample,  // REG_IN
  output logic [W-1:0] q           // REG_x = r[x]
);

  logic [W-1:0] d;
  sel_e         sel;

  xsort_mux #(.W(W), .FIRST(FIRST)) u_mux (
    .xr(xr), .cmp(cmp), .cur(q), .prev(prev), .in_sample(in_sample),
    .sel(sel), .d(d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clear) q <= '0;
    else            q <= d;
  end

endmodule
