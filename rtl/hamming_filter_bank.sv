// hamming_filter_bank -- four parallel FIR filters protected by three check
// filters arranged like a (7,4) Hamming code, with single fault correction.
//
// Data path: x1..x4 drive the original filters H, producing y1..y4. The coder
// forms x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4, which drive three
// redundant copies of H, producing z1..z3. The corrector compares each z with
// the matching sum of y's, locates a single faulty filter from the syndrome
// and replaces its output with one rebuilt from the others.
//
// fault_y / fault_z model soft errors: each is XORed onto the output of the
// matching filter before the corrector (all zero in normal use). They are a
// test feature of this design, not part of the published scheme.
//
// Timing: one sample per channel per clock while in_valid is high; corrected
// outputs of a sample taken on edge k appear after edge k+1 (filter register,
// then corrector register), with out_valid. Synchronous active-low reset.
module hamming_filter_bank
  import pfecc_pkg::*;
#(
  parameter coef_t COEFS [TAPS] = DEF_COEFS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x        [N_DATA],
  input  logic [Y_W-1:0]           fault_y  [N_DATA],
  input  logic [Y_W-1:0]           fault_z  [N_HCHK],
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    yc       [N_DATA],
  output logic [N_HCHK-1:0]        syndrome,
  output logic                     err_detected,
  output fault_loc_t               fault_loc
);

  logic signed [HCHK_IN_W-1:0] xc    [N_HCHK];
  logic signed [Y_W-1:0]       y_raw [N_DATA];
  logic signed [Y_W-1:0]       z_raw [N_HCHK];
  logic signed [Y_W-1:0]       y     [N_DATA];
  logic signed [Y_W-1:0]       z     [N_HCHK];
  logic [N_DATA-1:0]           y_vld;
  logic [N_HCHK-1:0]           z_vld;

  hamming_encoder u_coder (.x(x), .xc(xc));

  for (genvar j = 0; j < N_DATA; j++) begin : g_data
    fir_filter #(.IN_W(DATA_W), .OUT_W(Y_W), .NTAPS(TAPS), .COEFS(COEFS)) u_h (
      .clk, .rst_n, .in_valid,
      .x(x[j]), .out_valid(y_vld[j]), .y(y_raw[j])
    );
    assign y[j] = y_raw[j] ^ fault_y[j];
  end

  for (genvar i = 0; i < N_HCHK; i++) begin : g_check
    fir_filter #(.IN_W(HCHK_IN_W), .OUT_W(Y_W), .NTAPS(TAPS), .COEFS(COEFS)) u_h (
      .clk, .rst_n, .in_valid,
      .x(xc[i]), .out_valid(z_vld[i]), .y(z_raw[i])
    );
    assign z[i] = z_raw[i] ^ fault_z[i];
  end

  hamming_corrector u_sfc (
    .clk, .rst_n,
    .in_valid(y_vld[0]),
    .y(y), .z(z),
    .out_valid, .yc, .syndrome, .err_detected, .fault_loc
  );

  // All filters share in_valid, so their valid flags move together.
  always_ff @(posedge clk)
    if (rst_n) assert (&y_vld == |y_vld && &z_vld == |z_vld && y_vld[0] == z_vld[0])
      else $error("hamming_filter_bank: filter valid flags diverged");

endmodule
