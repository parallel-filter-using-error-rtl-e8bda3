// tb_hamming_corrector -- drives consistent filter outputs (z equal to the
// sums of y), then corrupts none or exactly one of the seven words with a
// random error pattern. Checks, one clock later: corrected outputs equal the
// uncorrupted y, the syndrome matches the expected pattern for the corrupted
// word, err_detected and fault_loc. Also checks the one-cycle latency.
module tb_hamming_corrector;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [Y_W-1:0] y [N_DATA];
  logic signed [Y_W-1:0] z [N_HCHK];
  logic out_valid;
  logic signed [Y_W-1:0] yc [N_DATA];
  logic [N_HCHK-1:0] syndrome;
  logic err_detected;
  fault_loc_t fault_loc;
  int checks = 0, failures = 0;
  int seen [8];

  hamming_corrector dut (.*);

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
      $display("n=%0d %s", n, what);
    end
  endtask

  initial begin
    longint a [4];
    logic [2:0] esyn;
    fault_loc_t eloc;
    int where;
    for (int j = 0; j < 4; j++) y[j] = '0;
    for (int i = 0; i < 3; i++) z[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      for (int j = 0; j < 4; j++) a[j] = rand_range(-200000, 200000);
      for (int j = 0; j < 4; j++) y[j] = Y_W'(a[j]);
      z[0] = Y_W'(a[0] + a[1] + a[2]);
      z[1] = Y_W'(a[0] + a[1] + a[3]);
      z[2] = Y_W'(a[0] + a[2] + a[3]);
      where = $urandom_range(0, 7);   // 0: no fault, 1..4: y, 5..7: z
      case (where)
        1: begin y[0] ^= Y_W'(rand_err(Y_W)); esyn = 3'b111; eloc = LOC_Y1; end
        2: begin y[1] ^= Y_W'(rand_err(Y_W)); esyn = 3'b011; eloc = LOC_Y2; end
        3: begin y[2] ^= Y_W'(rand_err(Y_W)); esyn = 3'b101; eloc = LOC_Y3; end
        4: begin y[3] ^= Y_W'(rand_err(Y_W)); esyn = 3'b110; eloc = LOC_Y4; end
        5: begin z[0] ^= Y_W'(rand_err(Y_W)); esyn = 3'b001; eloc = LOC_ZCHK; end
        6: begin z[1] ^= Y_W'(rand_err(Y_W)); esyn = 3'b010; eloc = LOC_ZCHK; end
        7: begin z[2] ^= Y_W'(rand_err(Y_W)); esyn = 3'b100; eloc = LOC_ZCHK; end
        default: begin esyn = 3'b000; eloc = LOC_NONE; end
      endcase
      seen[where]++;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      chk(out_valid === 1'b1, "out_valid not one cycle after in_valid", n);
      for (int j = 0; j < 4; j++)
        chk(longint'(yc[j]) == a[j], $sformatf("yc%0d=%0d expected %0d (fault at %0d)",
            j + 1, yc[j], a[j], where), n);
      chk(syndrome === esyn, $sformatf("syndrome %b expected %b", syndrome, esyn), n);
      chk(err_detected === (where != 0), "err_detected", n);
      chk(fault_loc === eloc, $sformatf("fault_loc %s expected %s", fault_loc.name(), eloc.name()), n);
      @(posedge clk);
      #1;
      chk(out_valid === 1'b0, "out_valid high without input", n);
    end
    foreach (seen[k]) chk(seen[k] > 0, $sformatf("case %0d never exercised", k), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
