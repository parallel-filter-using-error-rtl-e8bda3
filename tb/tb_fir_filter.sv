// tb_fir_filter -- self-checking test of fir_filter at its default sizes.
//
// Drives random samples (with extreme values mixed in and random idle cycles),
// compares every output with a 64-bit reference FIR, checks that out_valid
// follows in_valid by exactly one clock and that idle cycles hold the output.
module tb_fir_filter;
  import pfecc_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DATA_W-1:0] x = '0;
  logic out_valid;
  logic signed [Y_W-1:0] y;
  int checks = 0, failures = 0;

  fir_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  hist_t h;
  longint expv, last;

  initial begin
    hist_clear(h);
    last = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      logic v;
      longint xs;
      v  = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 9))
        0: xs = -128;
        1: xs = 127;
        default: xs = rand_range(-128, 127);
      endcase
      in_valid <= v;
      x        <= DATA_W'(xs);
      if (v) expv = fir_step(h, xs);
      @(posedge clk);            // sample taken here
      in_valid <= 0;
      #1;
      checks++;
      if (out_valid !== v) begin
        failures++;
        $display("n=%0d out_valid=%0b expected %0b", n, out_valid, v);
      end
      if (v) begin
        checks++;
        if (longint'(y) != expv) begin
          failures++;
          $display("n=%0d y=%0d expected %0d", n, y, expv);
        end
        last = expv;
      end else begin
        checks++;
        if (longint'(y) != last) begin
          failures++;
          $display("n=%0d idle: y=%0d changed from %0d", n, y, last);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
