// MUX_x: next-value multiplexer of one array register.
//
// Select rule, from the comparator bit cmp and the decoded bit xr of the same
// position:
//   cmp = 0           retain   REG_x
//   cmp = 1, xr = 0   shift    REG_{x-1}   (register lies right of the insert)
//   cmp = 1, xr = 1   load     REG_IN      (the insert position)
// The combination xr = 1, cmp = 0 cannot occur in a sorted array; it falls
// into the retain case, since a 0 comparator bit always retains.
// With FIRST = 1 the multiplexer is the two-input one in front of REG_0:
// retain when cmp is 0, load when cmp is 1; xr and prev are then ignored.
// sel reports the chosen operation. Purely combinational.
module xsort_mux
  import xsort_pkg::*;
#(
  parameter int unsigned W     = xsort_pkg::W_DEFAULT,
  parameter bit          FIRST = 1'b0
) (
  input  logic         xr,         // xor[x]
  input  logic         cmp,        // cmp[x]
  input  logic [W-1:0] cur,        // REG_x
  input  logic [W-1:0] prev,       // REG_{x-1}
  input  logic [W-1:0] in_sample,  // REG_IN
  output sel_e         sel,
  output logic [W-1:0] d
);

  always_comb begin
    if (!cmp)                 sel = SEL_RETAIN;
    else if (FIRST || xr)     sel = SEL_LOAD;
    else                      sel = SEL_SHIFT;
    unique case (sel)
      SEL_LOAD:  d = in_sample;
      SEL_SHIFT: d = prev;
      default:   d = cur;
    endcase
  end

endmodule
