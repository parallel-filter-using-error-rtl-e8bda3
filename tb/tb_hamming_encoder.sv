// tb_hamming_encoder -- checks x5 = x1+x2+x3, x6 = x1+x2+x4, x7 = x1+x3+x4
// over random and extreme inputs.
module tb_hamming_encoder;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic signed [DATA_W-1:0]    x  [N_DATA];
  logic signed [HCHK_IN_W-1:0] xc [N_HCHK];
  int checks = 0, failures = 0;

  hamming_encoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a [4];
    longint e [3];
    for (int n = 0; n < 3000; n++) begin
      for (int j = 0; j < 4; j++)
        a[j] = (n < 16) ? ((n >> j) & 1 ? -128 : 127) : rand_range(-128, 127);
      for (int j = 0; j < 4; j++) x[j] = DATA_W'(a[j]);
      e[0] = a[0] + a[1] + a[2];
      e[1] = a[0] + a[1] + a[3];
      e[2] = a[0] + a[2] + a[3];
      #1;
      for (int i = 0; i < 3; i++) begin
        checks++;
        if (longint'(xc[i]) != e[i]) begin
          failures++;
          $display("n=%0d x%0d=%0d expected %0d", n, i + 5, xc[i], e[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
