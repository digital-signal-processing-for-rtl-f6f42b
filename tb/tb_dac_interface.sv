// Self-checking test of dac_interface: every 16-bit input value; the DAC
// code must be clip(round(x/4), -8192, 8191) + 8192 (offset binary), one
// clock later.
module tb_dac_interface;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  sample_t din;
  logic [13:0] dac_data;
  int checks = 0, failures = 0;
  int v;
  dac_interface dut (.clk, .din, .dac_data);

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    @(negedge clk);
    for (int x = -32768; x < 32768; x++) begin
      din = sample_t'(x);
      v = (x + 2) >>> 2;
      if (v > 8191) v = 8191;
      @(negedge clk);
      checks++;
      if (int'(dac_data) != v + 8192) begin
        failures++;
        if (failures < 10) $display("x=%0d got %0d exp %0d", x, dac_data, v + 8192);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
