// tb_pair_checker -- drives consistent outputs (z1 = y1+y2, z2 = y3+y4), then
// corrupts none or one of the six words. Checks one clock later that the data
// words pass through unchanged (including a corrupted one), that the flag of
// the affected pair and only that one is set, and the one-cycle latency.
module tb_pair_checker;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [Y_W-1:0] y [N_DATA];
  logic signed [Y_W-1:0] z [N_PCHK];
  logic out_valid;
  logic signed [Y_W-1:0] y_out [N_DATA];
  logic [N_PCHK-1:0] pair_err;
  logic err_detected;
  int checks = 0, failures = 0;
  int seen [7];

  pair_checker dut (.*);

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
    logic [1:0] eerr;
    int where;
    logic signed [Y_W-1:0] sent [N_DATA];
    for (int j = 0; j < 4; j++) y[j] = '0;
    for (int i = 0; i < 2; i++) z[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      for (int j = 0; j < 4; j++) a[j] = rand_range(-300000, 300000);
      for (int j = 0; j < 4; j++) y[j] = Y_W'(a[j]);
      z[0] = Y_W'(a[0] + a[1]);
      z[1] = Y_W'(a[2] + a[3]);
      where = $urandom_range(0, 6);   // 0: none, 1..4: y, 5..6: z
      case (where)
        1, 2: begin y[where-1] ^= Y_W'(rand_err(Y_W)); eerr = 2'b01; end
        3, 4: begin y[where-1] ^= Y_W'(rand_err(Y_W)); eerr = 2'b10; end
        5:    begin z[0] ^= Y_W'(rand_err(Y_W)); eerr = 2'b01; end
        6:    begin z[1] ^= Y_W'(rand_err(Y_W)); eerr = 2'b10; end
        default: eerr = 2'b00;
      endcase
      seen[where]++;
      sent = y;
      in_valid <= 1;
      @(posedge clk);
      in_valid <= 0;
      #1;
      chk(out_valid === 1'b1, "out_valid not one cycle after in_valid", n);
      for (int j = 0; j < 4; j++)
        chk(y_out[j] == sent[j], $sformatf("y_out%0d=%0d expected %0d", j + 1, y_out[j], sent[j]), n);
      chk(pair_err === eerr, $sformatf("pair_err %b expected %b (fault at %0d)", pair_err, eerr, where), n);
      chk(err_detected === (where != 0), "err_detected", n);
      @(posedge clk);
      #1;
      chk(out_valid === 1'b0, "out_valid high without input", n);
    end
    foreach (seen[k]) chk(seen[k] > 0, $sformatf("case %0d never exercised", k), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
