// pair_encoder -- forms the inputs of the two check filters of the pair bank.
//
// The two-check variant of the scheme splits the four channels into two pairs
// and feeds one check filter per pair:
//   x5 = x1 + x2,  x6 = x3 + x4.
// Combinational; the sums are one bit wider than a sample, so they are exact.
// Index 0 is channel 1.
module pair_encoder
  import pfecc_pkg::*;
(
  input  logic signed [DATA_W-1:0]    x  [N_DATA],
  output logic signed [PCHK_IN_W-1:0] xc [N_PCHK]
);

  always_comb begin
    for (int p = 0; p < N_PCHK; p++)
      xc[p] = PCHK_IN_W'(x[2*p]) + PCHK_IN_W'(x[2*p+1]);
  end

endmodule
