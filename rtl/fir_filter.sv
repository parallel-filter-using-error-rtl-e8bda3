// fir_filter -- the filter H that every data and check channel uses.
//
// Direct-form FIR: y[n] = sum_{l=0}^{TAPS-1} h[l] * x[n-l]. A sample enters on
// each cycle with in_valid high; the delay line shifts, and the output register
// takes the sum over the new sample and the TAPS-1 previous ones. out_valid
// follows in_valid by one clock, so the latency is one cycle and the rate is
// one sample per clock. The delay line and output clear on reset (rst_n low,
// synchronous).
//
// The FIR equation is the standard one the scheme is built on; the direct
// form, the one-cycle registered output, the valid handshake and the widths
// are this design's choices. OUT_W must be at least IN_W + COEF_W +
// $clog2(TAPS) for the sum to be exact, which the ECC checks rely on.
module fir_filter
  import pfecc_pkg::*;
#(
  parameter int    IN_W   = DATA_W,
  parameter int    OUT_W  = Y_W,
  parameter int    NTAPS  = TAPS,
  parameter coef_t COEFS [NTAPS] = DEF_COEFS
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y
);

  // dly[0] holds x[n-1], dly[k] holds x[n-1-k]
  logic signed [IN_W-1:0]  dly [NTAPS-1];
  logic signed [OUT_W-1:0] acc;

  always_comb begin
    acc = OUT_W'(x) * OUT_W'(COEFS[0]);
    for (int l = 1; l < NTAPS; l++)
      acc += OUT_W'(dly[l-1]) * OUT_W'(COEFS[l]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < NTAPS-1; k++) dly[k] <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        dly[0] <= x;
        for (int k = 1; k < NTAPS-1; k++) dly[k] <= dly[k-1];
        y <= acc;
      end
    end
  end

  initial assert (OUT_W >= IN_W + COEF_W + $clog2(NTAPS))
    else $error("fir_filter: OUT_W too narrow for an exact sum");

endmodule
