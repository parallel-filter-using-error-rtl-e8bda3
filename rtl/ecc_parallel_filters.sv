// ecc_parallel_filters -- top level: two ECC-protected banks of four parallel
// FIR filters, side by side.
//
// h_*: the Hamming-protected bank. Three check filters, fed with
//      x1+x2+x3, x1+x2+x4 and x1+x3+x4, let it locate and correct a fault in
//      any one of the seven filters (hamming_filter_bank).
// p_*: the two-check bank. Check filters fed with x1+x2 and x3+x4 detect a
//      fault and name the pair it lies in, without correcting
//      (pair_filter_bank).
//
// The banks share only the clock and reset. Each takes one sample per channel
// per clock while its in_valid is high; a sample taken on edge k comes out,
// with out_valid, after edge k+1 (two register stages).
// The fault_* inputs XOR an error pattern onto individual filter outputs to
// model soft errors; tie them to zero in normal use. Putting both
// configurations in one top, and the fault inputs, are this design's choices.
module ecc_parallel_filters
  import pfecc_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  // Hamming-protected bank
  input  logic                     h_in_valid,
  input  logic signed [DATA_W-1:0] h_x        [N_DATA],
  input  logic [Y_W-1:0]           h_fault_y  [N_DATA],
  input  logic [Y_W-1:0]           h_fault_z  [N_HCHK],
  output logic                     h_out_valid,
  output logic signed [Y_W-1:0]    h_yc       [N_DATA],
  output logic [N_HCHK-1:0]        h_syndrome,
  output logic                     h_err_detected,
  output fault_loc_t               h_fault_loc,
  // two-check (pair) bank
  input  logic                     p_in_valid,
  input  logic signed [DATA_W-1:0] p_x        [N_DATA],
  input  logic [Y_W-1:0]           p_fault_y  [N_DATA],
  input  logic [Y_W-1:0]           p_fault_z  [N_PCHK],
  output logic                     p_out_valid,
  output logic signed [Y_W-1:0]    p_y        [N_DATA],
  output logic [N_PCHK-1:0]        p_pair_err,
  output logic                     p_err_detected
);

  hamming_filter_bank u_hamming (
    .clk, .rst_n,
    .in_valid(h_in_valid), .x(h_x), .fault_y(h_fault_y), .fault_z(h_fault_z),
    .out_valid(h_out_valid), .yc(h_yc), .syndrome(h_syndrome),
    .err_detected(h_err_detected), .fault_loc(h_fault_loc)
  );

  pair_filter_bank u_pair (
    .clk, .rst_n,
    .in_valid(p_in_valid), .x(p_x), .fault_y(p_fault_y), .fault_z(p_fault_z),
    .out_valid(p_out_valid), .y_out(p_y), .pair_err(p_pair_err),
    .err_detected(p_err_detected)
  );

endmodule
