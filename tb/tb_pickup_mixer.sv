// Self-checking test of pickup_mixer: random samples and 3.13 coefficients,
// plus the case b1 = b2 = 1 (sum of both pick-ups). Expected value
// round((b1*x1 + b2*x2)/2^13) clipped to 16 bits, two clocks later.
module tb_pickup_mixer;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  sample_t x1, x2, y;
  logic [15:0] b1, b2;
  int checks = 0, failures = 0;
  longint e [$];
  longint v;
  pickup_mixer dut (.clk, .x1, .x2, .b1, .b2, .y);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x1 = 0; x2 = 0; b1 = 0; b2 = 0;
    @(negedge clk); @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      x1 = sample_t'($urandom); x2 = sample_t'($urandom);
      if (n % 4 == 0) begin b1 = 16'h2000; b2 = 16'h2000; end
      else begin b1 = 16'($urandom); b2 = 16'($urandom_range(0, 16'h3FFF)); end
      v = (longint'(x1) * longint'(signed'(b1)) + longint'(x2) * longint'(signed'(b2)) + 4096) >>> 13;
      if (v > 32767) v = 32767;
      if (v < -32768) v = -32768;
      e.push_back(v);
      @(negedge clk);
      if (e.size() == 2) begin
        v = e.pop_front();
        checks++;
        if (y !== sample_t'(v)) begin
          failures++;
          if (failures < 10) $display("n=%0d got %0d exp %0d", n, y, v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
