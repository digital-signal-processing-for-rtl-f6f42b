// Self-checking test of fine_delay_cdc. The 80 MHz clock is derived from the
// same period as the 40 MHz one but shifted by a phase that the bench steps
// through several values (as the external delay line would). For each phase
// the 40 MHz side sends a numbered sequence; the 80 MHz side must deliver
// every number exactly once and in order, i.e. one dvalid per 40 MHz sample,
// and each between 25 and 50 ns after the clk40 edge that stored it (two
// synchroniser stages plus the capturing edge, seen at the following falling
// edge; earlier would mean a register still being written was copied).
module tb_fine_delay_cdc;
  import dspu_pkg::*;
  logic clk40 = 0, clk80d = 0;
  logic rst40_n, rst80_n;
  sample_t din, dout;
  logic dvalid;
  int checks = 0, failures = 0;
  int expect_next, received;
  int shift_ps = 0;
  fine_delay_cdc dut (.clk40, .rst40_n, .din, .clk80d, .rst80_n, .dout, .dvalid);

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clocks: 40 MHz edges every 12.5 ns half period, 80 MHz edges shifted
  always #12.5 clk40 = ~clk40;
  logic clk80 = 0;
  initial begin #6.25; forever #6.25 clk80 = ~clk80; end
  always @(clk80) clk80d <= #(shift_ps * 1ps) clk80;

  // time at which each value was stored by a clk40 edge
  realtime t_store [256];
  always @(posedge clk40) t_store[int'(din) % 256] = $realtime;

  always @(negedge clk80d) begin
    if (rst80_n && dvalid) begin
      checks++;
      if ($realtime - t_store[int'(dout) % 256] > 50.0 || $realtime - t_store[int'(dout) % 256] < 25.0) begin
        failures++;
        if (failures < 10) $display("shift %0d value %0d after %0t", shift_ps, dout, $realtime - t_store[int'(dout) % 256]);
      end
      received++;
      checks++;
      if (int'(dout) != expect_next) begin
        failures++;
        if (failures < 10) $display("shift %0d got %0d exp %0d", shift_ps, dout, expect_next);
      end
      expect_next = int'(dout) + 1;
    end
  end

  initial begin
    int phases [5] = '{0, 2100, 4990, 8000, 11300};
    rst40_n = 0; rst80_n = 0; din = 0; expect_next = 1; received = 0;
    foreach (phases[p]) begin
      rst40_n = 0; rst80_n = 0;
      shift_ps = phases[p];
      repeat (4) @(negedge clk40);
      rst40_n = 1; rst80_n = 1;
      expect_next = -1;
      received = 0;
      for (int i = 1; i <= 200; i++) begin
        din = sample_t'(i);
        @(negedge clk40);
        if (expect_next == -1 && i > 10) begin
          failures++;
          $display("no data at shift %0d", shift_ps);
          break;
        end
      end
      for (int i = 201; i <= 204; i++) begin
        din = sample_t'(i);
        @(negedge clk40);
      end
      checks++;
      if (received < 198 || received > 204) begin
        failures++;
        $display("shift %0d received %0d samples", shift_ps, received);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // first sample after reset sets the sequence start
  always @(negedge clk80d) if (rst80_n && dvalid && expect_next == -1) expect_next = int'(dout);
endmodule
