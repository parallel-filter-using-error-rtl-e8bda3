// pair_filter_bank -- four parallel FIR filters with two check filters, one
// per pair of channels.
//
// x1..x4 drive the original filters H (outputs y1..y4). The coder forms
// x5 = x1+x2 and x6 = x3+x4, which drive two redundant copies of H (z1, z2).
// The checker flags the pair whose check disagrees. With one check per pair a
// faulty filter can be narrowed down to its pair, not to the filter itself, so
// the outputs are passed on uncorrected together with the flags.
//
// fault_y / fault_z are XORed onto the filter outputs to model soft errors
// (zero in normal use); they are a test feature of this design.
//
// Timing: one sample per channel per clock while in_valid is high; a sample
// taken on edge k comes out, with out_valid, after edge k+1 (filter register,
// then checker register). Synchronous active-low reset.
module pair_filter_bank
  import pfecc_pkg::*;
#(
  parameter coef_t COEFS [TAPS] = DEF_COEFS
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x        [N_DATA],
  input  logic [Y_W-1:0]           fault_y  [N_DATA],
  input  logic [Y_W-1:0]           fault_z  [N_PCHK],
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    y_out    [N_DATA],
  output logic [N_PCHK-1:0]        pair_err,
  output logic                     err_detected
);

  logic signed [PCHK_IN_W-1:0] xc    [N_PCHK];
  logic signed [Y_W-1:0]       y_raw [N_DATA];
  logic signed [Y_W-1:0]       z_raw [N_PCHK];
  logic signed [Y_W-1:0]       y     [N_DATA];
  logic signed [Y_W-1:0]       z     [N_PCHK];
  logic [N_DATA-1:0]           y_vld;
  logic [N_PCHK-1:0]           z_vld;

  pair_encoder u_coder (.x(x), .xc(xc));

  for (genvar j = 0; j < N_DATA; j++) begin : g_data
    fir_filter #(.IN_W(DATA_W), .OUT_W(Y_W), .NTAPS(TAPS), .COEFS(COEFS)) u_h (
      .clk, .rst_n, .in_valid,
      .x(x[j]), .out_valid(y_vld[j]), .y(y_raw[j])
    );
    assign y[j] = y_raw[j] ^ fault_y[j];
  end

  for (genvar p = 0; p < N_PCHK; p++) begin : g_check
    fir_filter #(.IN_W(PCHK_IN_W), .OUT_W(Y_W), .NTAPS(TAPS), .COEFS(COEFS)) u_h (
      .clk, .rst_n, .in_valid,
      .x(xc[p]), .out_valid(z_vld[p]), .y(z_raw[p])
    );
    assign z[p] = z_raw[p] ^ fault_z[p];
  end

  pair_checker u_chk (
    .clk, .rst_n,
    .in_valid(y_vld[0]),
    .y(y), .z(z),
    .out_valid, .y_out, .pair_err, .err_detected
  );

  always_ff @(posedge clk)
    if (rst_n) assert (&y_vld == |y_vld && &z_vld == |z_vld && y_vld[0] == z_vld[0])
      else $error("pair_filter_bank: filter valid flags diverged");

endmodule
