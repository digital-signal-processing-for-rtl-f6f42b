// Self-checking test of gain_balance: random samples and factors (including
// the 0.5..1 working range and the saturation corner near 2.0), expected
// value computed here as round(x*a/2^15) clipped to 16 bits, one clock later.
module tb_gain_balance;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  sample_t din, dout;
  logic [15:0] gain;
  int checks = 0, failures = 0;
  longint exp_v;
  gain_balance dut (.clk, .din, .gain, .dout);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0; gain = 0;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      din  = sample_t'($urandom);
      gain = (n % 3 == 0) ? 16'($urandom_range(16'h4000, 16'h8000)) : 16'($urandom);
      if (n % 50 == 0) begin din = 16'sh7FFF; gain = 16'hFFFF; end
      exp_v = (longint'(din) * longint'(gain) + 16384) >>> 15;
      if (exp_v > 32767) exp_v = 32767;
      if (exp_v < -32768) exp_v = -32768;
      @(negedge clk);
      checks++;
      if (dout !== sample_t'(exp_v)) begin
        failures++;
        if (failures < 10) $display("mismatch x=%0d a=%0d got %0d exp %0d", din, gain, dout, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
