// tb_hamming_filter_bank -- streams random samples through the four channels
// with random idle cycles and, on most valid samples, a random error pattern
// on one of the seven filter outputs. Every corrected output must equal a
// 64-bit reference FIR of its channel; syndrome, err_detected and fault_loc
// must name the corrupted filter. out_valid must follow in_valid after two
// register stages. Each fault position must occur at least once.
module tb_hamming_filter_bank;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x [N_DATA];
  logic [Y_W-1:0] fault_y [N_DATA];
  logic [Y_W-1:0] fault_z [N_HCHK];
  logic out_valid;
  logic signed [Y_W-1:0] yc [N_DATA];
  logic [N_HCHK-1:0] syndrome;
  logic err_detected;
  fault_loc_t fault_loc;
  int checks = 0, failures = 0;
  int seen [8];

  hamming_filter_bank dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what, int n);
    checks++;
    if (!c) begin
      failures++;
      $display("k=%0d %s", n, what);
    end
  endtask

  hist_t h [N_DATA];
  longint ref_y  [N_DATA];     // reference of the sample taken at the last edge
  longint prev_y [N_DATA];     // reference now at the corrector input
  bit     v_prev, v_prev2;
  int     where_prev;
  logic [2:0] esyn;
  fault_loc_t eloc;
  localparam logic [2:0] SYN [8] = '{3'b000, 3'b111, 3'b011, 3'b101, 3'b110, 3'b001, 3'b010, 3'b100};

  initial begin
    int where;
    bit v;
    for (int j = 0; j < N_DATA; j++) begin
      hist_clear(h[j]);
      x[j] = '0; fault_y[j] = '0; ref_y[j] = 0; prev_y[j] = 0;
    end
    for (int i = 0; i < N_HCHK; i++) fault_z[i] = '0;
    v_prev = 0; v_prev2 = 0; where_prev = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 5000; k++) begin
      // new samples for the next edge
      v = (k > 4900) ? 1'b0 : ($urandom_range(0, 4) != 0);
      in_valid <= v;
      for (int j = 0; j < N_DATA; j++) x[j] <= DATA_W'(rand_range(-128, 127));
      // fault for the sample that the corrector takes at the next edge
      where = v_prev ? $urandom_range(0, 7) : 0;
      for (int j = 0; j < N_DATA; j++) fault_y[j] <= '0;
      for (int i = 0; i < N_HCHK; i++) fault_z[i] <= '0;
      if (where >= 1 && where <= 4) fault_y[where-1] <= Y_W'(rand_err(Y_W));
      if (where >= 5)               fault_z[where-5] <= Y_W'(rand_err(Y_W));
      #1;
      @(posedge clk);
      // model: corrector took prev_y, filters took x
      prev_y = ref_y;
      for (int j = 0; j < N_DATA; j++)
        if (v) ref_y[j] = fir_step(h[j], longint'(x[j]));
      #1;
      chk(out_valid === v_prev, "out_valid timing", k);
      if (v_prev) begin
        seen[where]++;
        eloc = (where == 0) ? LOC_NONE : (where <= 4) ? fault_loc_t'(where) : LOC_ZCHK;
        for (int j = 0; j < N_DATA; j++)
          chk(longint'(yc[j]) == prev_y[j],
              $sformatf("yc%0d=%0d expected %0d (fault at %0d)", j + 1, yc[j], prev_y[j], where), k);
        chk(syndrome === SYN[where], $sformatf("syndrome %b expected %b", syndrome, SYN[where]), k);
        chk(err_detected === (where != 0), "err_detected", k);
        chk(fault_loc === eloc, "fault_loc", k);
      end
      v_prev = v;
    end
    foreach (seen[k]) chk(seen[k] > 0, $sformatf("fault position %0d never exercised", k), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
