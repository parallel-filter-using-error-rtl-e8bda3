// hamming_corrector -- single fault correction for the Hamming-protected bank.
//
// Each check filter z(i) should equal the sum of the data filters in its group
// (z1 = y1+y2+y3, z2 = y1+y2+y4, z3 = y1+y3+y4). Syndrome bit s(i) is set when
// the two differ. A fault in y1 upsets all three checks, in y2 checks 1 and 2,
// in y3 checks 1 and 3, in y4 checks 2 and 3; a syndrome with a single bit set
// means that check filter alone is wrong and the data outputs are good. The
// faulty data output is rebuilt from a check filter whose group contains it
// and the other data filters in that group:
//   y1c = z1 - y2 - y3,  y2c = z1 - y1 - y3,  y3c = z1 - y1 - y2,  y4c = z2 - y1 - y2.
// Two or more simultaneous faults are outside what the code corrects; such
// patterns are decoded as if one fault had occurred.
//
// The syndrome equations and the recovery formula follow the published scheme;
// registering the result (one clock from in_valid to out_valid) and the
// fault_loc report are this design's choices. Synchronous active-low reset.
module hamming_corrector
  import pfecc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [Y_W-1:0]    y   [N_DATA],   // data filter outputs
  input  logic signed [Y_W-1:0]    z   [N_HCHK],   // check filter outputs
  output logic                     out_valid,
  output logic signed [Y_W-1:0]    yc  [N_DATA],   // corrected outputs
  output logic [N_HCHK-1:0]        syndrome,       // bit i-1 = check z(i) failed
  output logic                     err_detected,
  output fault_loc_t               fault_loc
);

  logic signed [Y_W-1:0] sum [N_HCHK];
  logic [N_HCHK-1:0]     syn;
  logic signed [Y_W-1:0] fix [N_DATA];
  fault_loc_t            loc;

  always_comb begin
    for (int i = 0; i < N_HCHK; i++) begin
      sum[i] = '0;
      for (int j = 0; j < N_DATA; j++)
        if (HMAP[i][j]) sum[i] += y[j];
      syn[i] = (sum[i] != z[i]);
    end

    fix = y;
    unique case (syn)
      3'b000:                 loc = LOC_NONE;
      SYN_Y1: begin           loc = LOC_Y1; fix[0] = z[0] - y[1] - y[2]; end
      SYN_Y2: begin           loc = LOC_Y2; fix[1] = z[0] - y[0] - y[2]; end
      SYN_Y3: begin           loc = LOC_Y3; fix[2] = z[0] - y[0] - y[1]; end
      SYN_Y4: begin           loc = LOC_Y4; fix[3] = z[1] - y[0] - y[1]; end
      default:                loc = LOC_ZCHK;  // 001, 010, 100
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      syndrome     <= '0;
      err_detected <= 1'b0;
      fault_loc    <= LOC_NONE;
      for (int j = 0; j < N_DATA; j++) yc[j] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        yc           <= fix;
        syndrome     <= syn;
        err_detected <= |syn;
        fault_loc    <= loc;
      end
    end
  end

endmodule
