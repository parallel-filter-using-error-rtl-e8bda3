// tb_ecc_parallel_filters -- end-to-end test of the top level at its default
// sizes. Both banks run at once on independent random streams with random idle
// cycles. On valid samples a random error pattern is XORed onto one filter
// output (or none) in each bank.
//   Hamming bank: the corrected outputs must equal a 64-bit reference FIR of
//   each channel whatever single filter was corrupted; syndrome, err_detected
//   and fault_loc must name it.
//   Pair bank: outputs must equal the reference XOR the injected pattern, and
//   pair_err must flag the pair that holds the corrupted filter.
// Every mechanism -- fault-free sample, correction of each of y1..y4, a fault
// in each check filter, detection in each pair, idle cycles -- is counted and
// must occur at least once. Latency of both banks: two register stages.
module tb_ecc_parallel_filters;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic                     h_in_valid = 0, p_in_valid = 0;
  logic signed [DATA_W-1:0] h_x [N_DATA], p_x [N_DATA];
  logic [Y_W-1:0]           h_fault_y [N_DATA], p_fault_y [N_DATA];
  logic [Y_W-1:0]           h_fault_z [N_HCHK];
  logic [Y_W-1:0]           p_fault_z [N_PCHK];
  logic                     h_out_valid, p_out_valid;
  logic signed [Y_W-1:0]    h_yc [N_DATA], p_y [N_DATA];
  logic [N_HCHK-1:0]        h_syndrome;
  logic [N_PCHK-1:0]        p_pair_err;
  logic                     h_err_detected, p_err_detected;
  fault_loc_t               h_fault_loc;

  int checks = 0, failures = 0;
  int h_seen [8];     // 0 none, 1..4 y1..y4 corrected, 5..7 z1..z3 fault
  int p_seen [7];     // 0 none, 1..4 y1..y4 fault, 5..6 z1..z2 fault
  int h_idle = 0, p_idle = 0;

  ecc_parallel_filters dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what, int n);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 50) $display("k=%0d %s", n, what);
    end
  endtask

  localparam logic [2:0] HSYN [8] = '{3'b000, 3'b111, 3'b011, 3'b101, 3'b110, 3'b001, 3'b010, 3'b100};
  localparam logic [1:0] PERR [7] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b10, 2'b01, 2'b10};

  hist_t  hh [N_DATA], ph [N_DATA];
  longint h_ref [N_DATA], h_prev [N_DATA];
  longint p_ref [N_DATA], p_prev [N_DATA];

  initial begin
    bit hv, pv, hv_prev, pv_prev;
    int hw, pw;
    logic [Y_W-1:0] pe;
    logic [Y_W-1:0] pfy [N_DATA];
    fault_loc_t eloc;

    for (int j = 0; j < N_DATA; j++) begin
      hist_clear(hh[j]); hist_clear(ph[j]);
      h_x[j] = '0; p_x[j] = '0; h_fault_y[j] = '0; p_fault_y[j] = '0;
      h_ref[j] = 0; p_ref[j] = 0;
    end
    for (int i = 0; i < N_HCHK; i++) h_fault_z[i] = '0;
    for (int i = 0; i < N_PCHK; i++) p_fault_z[i] = '0;
    hv_prev = 0; pv_prev = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    for (int k = 0; k < 20000; k++) begin
      hv = (k > 19990) ? 1'b0 : ($urandom_range(0, 5) != 0);
      pv = (k > 19990) ? 1'b0 : ($urandom_range(0, 5) != 0);
      h_in_valid <= hv;
      p_in_valid <= pv;
      for (int j = 0; j < N_DATA; j++) begin
        h_x[j] <= DATA_W'(rand_range(-128, 127));
        p_x[j] <= DATA_W'(rand_range(-128, 127));
      end
      // Hamming bank fault for the sample reaching its corrector
      hw = hv_prev ? $urandom_range(0, 7) : 0;
      for (int j = 0; j < N_DATA; j++) h_fault_y[j] <= (hw == j + 1) ? Y_W'(rand_err(Y_W)) : '0;
      for (int i = 0; i < N_HCHK; i++) h_fault_z[i] <= (hw == i + 5) ? Y_W'(rand_err(Y_W)) : '0;
      // pair bank fault
      pw = pv_prev ? $urandom_range(0, 6) : 0;
      pe = Y_W'(rand_err(Y_W));
      for (int j = 0; j < N_DATA; j++) begin
        pfy[j] = (pw == j + 1) ? pe : '0;
        p_fault_y[j] <= pfy[j];
      end
      for (int i = 0; i < N_PCHK; i++) p_fault_z[i] <= (pw == i + 5) ? pe : '0;
      #1;
      @(posedge clk);
      h_prev = h_ref;
      p_prev = p_ref;
      for (int j = 0; j < N_DATA; j++) begin
        if (hv) h_ref[j] = fir_step(hh[j], longint'(h_x[j]));
        if (pv) p_ref[j] = fir_step(ph[j], longint'(p_x[j]));
      end
      #1;
      chk(h_out_valid === hv_prev, "h_out_valid timing", k);
      chk(p_out_valid === pv_prev, "p_out_valid timing", k);
      if (!hv) h_idle++;
      if (!pv) p_idle++;
      if (hv_prev) begin
        h_seen[hw]++;
        eloc = (hw == 0) ? LOC_NONE : (hw <= 4) ? fault_loc_t'(hw) : LOC_ZCHK;
        for (int j = 0; j < N_DATA; j++)
          chk(longint'(h_yc[j]) == h_prev[j],
              $sformatf("h_yc%0d=%0d expected %0d (fault at %0d)", j + 1, h_yc[j], h_prev[j], hw), k);
        chk(h_syndrome === HSYN[hw], "h_syndrome", k);
        chk(h_err_detected === (hw != 0), "h_err_detected", k);
        chk(h_fault_loc === eloc, "h_fault_loc", k);
      end
      if (pv_prev) begin
        p_seen[pw]++;
        for (int j = 0; j < N_DATA; j++)
          chk(p_y[j] == (Y_W'(p_prev[j]) ^ pfy[j]),
              $sformatf("p_y%0d=%0d expected %0d", j + 1, p_y[j], p_prev[j]), k);
        chk(p_pair_err === PERR[pw], "p_pair_err", k);
        chk(p_err_detected === (pw != 0), "p_err_detected", k);
      end
      hv_prev = hv;
      pv_prev = pv;
    end

    $display("Hamming bank: clean=%0d corrected y1=%0d y2=%0d y3=%0d y4=%0d check-filter faults z1=%0d z2=%0d z3=%0d idle=%0d",
             h_seen[0], h_seen[1], h_seen[2], h_seen[3], h_seen[4], h_seen[5], h_seen[6], h_seen[7], h_idle);
    $display("Pair bank: clean=%0d pair1 (y1=%0d y2=%0d z1=%0d) pair2 (y3=%0d y4=%0d z2=%0d) idle=%0d",
             p_seen[0], p_seen[1], p_seen[2], p_seen[5], p_seen[3], p_seen[4], p_seen[6], p_idle);
    foreach (h_seen[i]) chk(h_seen[i] > 0, $sformatf("Hamming case %0d never happened", i), -1);
    foreach (p_seen[i]) chk(p_seen[i] > 0, $sformatf("pair case %0d never happened", i), -1);
    chk(h_idle > 0 && p_idle > 0, "no idle cycles", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
