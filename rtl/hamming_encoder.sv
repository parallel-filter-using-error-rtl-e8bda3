// hamming_encoder -- forms the inputs of the three check filters.
//
// The check filters of the Hamming-protected bank see sums of the data inputs,
// chosen like the parity equations of a (7,4) Hamming code with the XOR
// replaced by an addition:
//   x5 = x1 + x2 + x3,  x6 = x1 + x2 + x4,  x7 = x1 + x3 + x4.
// The sums are combinational and two bits wider than a sample, so they are
// exact. Input and output index 0 is channel 1.
module hamming_encoder
  import pfecc_pkg::*;
(
  input  logic signed [DATA_W-1:0]    x  [N_DATA],
  output logic signed [HCHK_IN_W-1:0] xc [N_HCHK]
);

  always_comb begin
    for (int i = 0; i < N_HCHK; i++) begin
      xc[i] = '0;
      for (int j = 0; j < N_DATA; j++)
        if (HMAP[i][j]) xc[i] += HCHK_IN_W'(x[j]);
    end
  end

endmodule
