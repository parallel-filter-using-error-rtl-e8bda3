// pair_checker -- fault detection for the two-check (pair) bank.
//
// Check filter z1 sees x1 + x2 and z2 sees x3 + x4, so by linearity z1 must
// equal y1 + y2 and z2 must equal y3 + y4. pair_err[p] is set when pair p+1
// disagrees, which flags a fault in y(2p+1), y(2p+2) or z(p+1). Both filters of
// a pair contribute to the same single check, so a fault in either gives the
// same syndrome: the checker can tell which pair is affected but not which
// filter, and it passes the data outputs on unchanged. It does not correct.
//
// The pair grouping follows the published two-check configuration; the
// registered outputs (one clock from in_valid to out_valid) and synchronous
// active-low reset are this design's choices.
module pair_checker
  import pfecc_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [Y_W-1:0] y        [N_DATA],
  input  logic signed [Y_W-1:0] z        [N_PCHK],
  output logic                  out_valid,
  output logic signed [Y_W-1:0] y_out    [N_DATA],
  output logic [N_PCHK-1:0]     pair_err,
  output logic                  err_detected
);

  logic [N_PCHK-1:0] mismatch;

  always_comb begin
    for (int p = 0; p < N_PCHK; p++)
      mismatch[p] = (y[2*p] + y[2*p+1]) != z[p];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      pair_err     <= '0;
      err_detected <= 1'b0;
      for (int j = 0; j < N_DATA; j++) y_out[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        y_out        <= y;
        pair_err     <= mismatch;
        err_detected <= |mismatch;
      end
    end
  end

endmodule
