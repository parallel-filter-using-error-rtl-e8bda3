// tb_pair_filter_bank -- streams random samples through the four channels
// with random idle cycles and, on most valid samples, a random error pattern
// on one of the six filter outputs. Outputs must equal a 64-bit reference FIR
// of their channel XOR the injected pattern (this bank does not correct), and
// pair_err must flag exactly the pair holding the corrupted filter. out_valid
// must follow in_valid after two register stages.
module tb_pair_filter_bank;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x [N_DATA];
  logic [Y_W-1:0] fault_y [N_DATA];
  logic [Y_W-1:0] fault_z [N_PCHK];
  logic out_valid;
  logic signed [Y_W-1:0] y_out [N_DATA];
  logic [N_PCHK-1:0] pair_err;
  logic err_detected;
  int checks = 0, failures = 0;
  int seen [7];

  pair_filter_bank dut (.*);

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
  longint ref_y  [N_DATA];
  longint prev_y [N_DATA];
  bit     v_prev;
  localparam logic [1:0] PERR [7] = '{2'b00, 2'b01, 2'b01, 2'b10, 2'b10, 2'b01, 2'b10};

  initial begin
    int where;
    bit v;
    logic [Y_W-1:0] e;
    logic [Y_W-1:0] fy [N_DATA];
    for (int j = 0; j < N_DATA; j++) begin
      hist_clear(h[j]);
      x[j] = '0; fault_y[j] = '0; ref_y[j] = 0;
    end
    for (int i = 0; i < N_PCHK; i++) fault_z[i] = '0;
    v_prev = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 5000; k++) begin
      v = (k > 4900) ? 1'b0 : ($urandom_range(0, 4) != 0);
      in_valid <= v;
      for (int j = 0; j < N_DATA; j++) x[j] <= DATA_W'(rand_range(-128, 127));
      where = v_prev ? $urandom_range(0, 6) : 0;
      e = Y_W'(rand_err(Y_W));
      for (int j = 0; j < N_DATA; j++) fy[j] = (where == j + 1) ? e : '0;
      for (int j = 0; j < N_DATA; j++) fault_y[j] <= fy[j];
      for (int i = 0; i < N_PCHK; i++) fault_z[i] <= (where == i + 5) ? e : '0;
      #1;
      @(posedge clk);
      prev_y = ref_y;
      for (int j = 0; j < N_DATA; j++)
        if (v) ref_y[j] = fir_step(h[j], longint'(x[j]));
      #1;
      chk(out_valid === v_prev, "out_valid timing", k);
      if (v_prev) begin
        seen[where]++;
        for (int j = 0; j < N_DATA; j++)
          chk(y_out[j] == (Y_W'(prev_y[j]) ^ fy[j]),
              $sformatf("y%0d=%0d expected %0d ^ %h", j + 1, y_out[j], prev_y[j], fy[j]), k);
        chk(pair_err === PERR[where], $sformatf("pair_err %b expected %b", pair_err, PERR[where]), k);
        chk(err_detected === (where != 0), "err_detected", k);
      end
      v_prev = v;
    end
    foreach (seen[k]) chk(seen[k] > 0, $sformatf("fault position %0d never exercised", k), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
