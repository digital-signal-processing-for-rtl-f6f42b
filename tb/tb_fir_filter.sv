// Self-checking test of fir_filter at its 32 taps. Checks the pass-through
// after reset, then loads random taps (small ones, then full-range ones that
// drive the output into saturation) and compares with sum c[i]*x[n-i]
// rounded from 2.14 and clipped, computed here from the bench's own input
// history; the output lags the input by two clocks.
module tb_fir_filter;
  import dspu_pkg::*;
  localparam int TAPS = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, coef_we;
  logic [4:0] coef_addr;
  logic [15:0] coef_data;
  sample_t din, dout;
  int checks = 0, failures = 0;
  int c [TAPS];
  int hist [TAPS + 2];
  fir_filter dut (.clk, .rst_n, .coef_we, .coef_addr, .coef_data, .din, .dout);

  task automatic step(input int x, input bit check);
    longint acc;
    din = sample_t'(x);
    @(negedge clk);
    for (int i = TAPS + 1; i > 0; i--) hist[i] = hist[i-1];
    hist[0] = x;
    if (check) begin
      acc = 0;
      for (int i = 0; i < TAPS; i++) acc += longint'(c[i]) * longint'(hist[1+i]);
      acc = (acc + 8192) >>> 14;
      if (acc > 32767) acc = 32767;
      if (acc < -32768) acc = -32768;
      checks++;
      if (longint'(dout) != acc) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", dout, acc);
      end
    end
  endtask

  task automatic load(input int range);
    for (int i = 0; i < TAPS; i++) begin
      c[i] = $urandom_range(0, 2 * range) - range;
      coef_we = 1; coef_addr = 5'(i); coef_data = 16'(c[i]);
      step($urandom_range(0, 65535) - 32768, 0);
    end
    coef_we = 0;
    for (int i = 0; i < TAPS + 2; i++) step($urandom_range(0, 65535) - 32768, 0);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; coef_we = 0; coef_addr = 0; coef_data = 0; din = 0;
    foreach (c[i]) c[i] = (i == 0) ? 16384 : 0;
    foreach (hist[i]) hist[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < TAPS + 2; i++) step($urandom_range(0, 65535) - 32768, 0);
    for (int i = 0; i < 500; i++) step($urandom_range(0, 65535) - 32768, 1);
    load(1500);
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 65535) - 32768, 1);
    load(32767);
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 65535) - 32768, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
