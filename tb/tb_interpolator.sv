// Self-checking test of interpolator: a new random sample every second
// clock (as from the clock-domain change); the output stream must alternate
// between the midpoint floor((x[k-1]+x[k])/2), one clock after dvalid, and
// x[k] the clock after that.
module tb_interpolator;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, dvalid;
  sample_t din, dout;
  int checks = 0, failures = 0;
  int prevx, x;
  interpolator dut (.clk, .rst_n, .din, .dvalid, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; dvalid = 0; din = 0; prevx = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 2000; k++) begin
      x = (k % 50 == 0) ? 32767 : ((k % 50 == 1) ? -32768 : int'(sample_t'($urandom)));
      din = sample_t'(x); dvalid = 1;
      @(negedge clk);
      dvalid = 0; din = sample_t'($urandom);
      checks++;
      if (int'(dout) != ((prevx + x) >>> 1)) begin
        failures++;
        if (failures < 10) $display("k=%0d mid got %0d exp %0d", k, dout, (prevx + x) >>> 1);
      end
      @(negedge clk);
      checks++;
      if (int'(dout) != x) begin
        failures++;
        if (failures < 10) $display("k=%0d got %0d exp %0d", k, dout, x);
      end
      prevx = x;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
