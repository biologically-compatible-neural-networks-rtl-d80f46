// fp_cmp: single-precision "less than" comparison (combinational).
//
// lt = (a < b) for ordinary numbers; +0 and -0 compare equal, NaNs are not
// expected. Used by the soma to detect a spike (threshold crossing).
module fp_cmp
  import fp_pkg::*;
(
  input  fp32_t a,
  input  fp32_t b,
  output logic  lt
);
  always_comb begin
    if (a[31] != b[31])
      lt = a[31] && ((a[30:0] | b[30:0]) != 31'd0);
    else if (a[31])
      lt = a[30:0] > b[30:0];
    else
      lt = a[30:0] < b[30:0];
  end
endmodule
