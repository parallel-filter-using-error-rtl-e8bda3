// pfecc_pkg -- sizes, default FIR coefficients and syndrome codes shared by the
// ECC-protected parallel FIR filter banks.
//
// Four identical FIR filters H process four independent input streams. Extra
// "check" filters, also H, process sums of the inputs. Because H is linear, the
// output of a check filter equals the same sum of the data filters' outputs,
// so a mismatch (a nonzero syndrome) reveals a faulty filter in the same way a
// parity check reveals a flipped bit in a Hamming code.
//
// The filter length, the coefficients and all word widths are this design's
// own choices: the scheme works for any linear filter, and the default sizes
// (8-bit samples, 8-bit coefficients, 8 taps) are a small low-pass example.
// All arithmetic is two's complement and wide enough never to overflow, so the
// check sums hold exactly.
package pfecc_pkg;

  localparam int N_DATA  = 4;   // parallel data filters y1..y4
  localparam int N_HCHK  = 3;   // Hamming check filters z1..z3
  localparam int N_PCHK  = 2;   // pair check filters z1..z2 (two-check bank)

  localparam int DATA_W  = 8;   // input sample width (signed)
  localparam int COEF_W  = 8;   // coefficient width (signed)
  localparam int TAPS    = 8;   // FIR length

  // A Hamming check input is the sum of three samples: two extra bits.
  localparam int HCHK_IN_W = DATA_W + 2;
  // A pair check input is the sum of two samples: one extra bit.
  localparam int PCHK_IN_W = DATA_W + 1;
  // Every filter output uses the width needed by the widest filter input.
  localparam int Y_W = HCHK_IN_W + COEF_W + $clog2(TAPS);

  typedef logic signed [COEF_W-1:0] coef_t;

  // Symmetric low-pass example, h[0]..h[7].
  localparam coef_t DEF_COEFS [TAPS] = '{-8'sd3, 8'sd0, 8'sd19, 8'sd40,
                                         8'sd40, 8'sd19, 8'sd0, -8'sd3};

  // Which data filters contribute to each Hamming check filter:
  // bit j-1 of HMAP[i] is set when y(j) is part of z(i+1).
  //   z1 = y1 + y2 + y3,  z2 = y1 + y2 + y4,  z3 = y1 + y3 + y4
  localparam logic [N_DATA-1:0] HMAP [N_HCHK] = '{4'b0111, 4'b1011, 4'b1101};

  // Syndrome {s3,s2,s1} produced by a single faulty data filter.
  localparam logic [N_HCHK-1:0] SYN_Y1 = 3'b111;
  localparam logic [N_HCHK-1:0] SYN_Y2 = 3'b011;
  localparam logic [N_HCHK-1:0] SYN_Y3 = 3'b101;
  localparam logic [N_HCHK-1:0] SYN_Y4 = 3'b110;

  // Where the corrector located a single fault.
  typedef enum logic [2:0] {
    LOC_NONE = 3'd0,   // all checks agree
    LOC_Y1   = 3'd1,   // data filter y1 (corrected)
    LOC_Y2   = 3'd2,
    LOC_Y3   = 3'd3,
    LOC_Y4   = 3'd4,
    LOC_ZCHK = 3'd5    // one check filter alone disagrees; data outputs are good
  } fault_loc_t;

endpackage
