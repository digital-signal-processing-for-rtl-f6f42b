// Self-checking test of notch_filter with a 10-bunch turn: each bunch has a
// fixed closed-orbit offset plus a betatron-like oscillation that changes from
// turn to turn. Expected output, kept here with its own one-turn history:
// (x[n] - x[n-T]) >>> 1 when on, x[n] when off; the filter is switched off
// and on during the run. Also checks that the constant closed orbit alone is
// removed completely. Latency two clocks.
module tb_notch_filter;
  import dspu_pkg::*;
  localparam int T = 10;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en;
  sample_t din, dout;
  bunch_t bunch;
  int checks = 0, failures = 0, orbit_checks = 0;
  longint e [$];
  longint v;
  int prev [T];
  int orbit [T];
  notch_filter #(.DEPTH(16)) dut (.clk, .en, .din, .bunch, .dout);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 1; din = 0; bunch = 0;
    for (int b = 0; b < T; b++) orbit[b] = $urandom_range(0, 20000) - 10000;
    @(negedge clk);
    for (int n = 0; n < 3000; n++) begin
      int b, turn, x;
      b = n % T; turn = n / T;
      // turns 5..9: orbit only; else orbit plus oscillation
      if (turn >= 5 && turn < 10) x = orbit[b];
      else x = orbit[b] + $urandom_range(0, 16000) - 8000;
      en = !(turn >= 20 && turn < 25);
      din = sample_t'(x); bunch = bunch_t'(b);
      if (turn == 0) v = 64'h7FFF_FFFF_FFFF_FFFF;
      else if (en) v = (longint'(x) - longint'(prev[b])) >>> 1;
      else v = x;
      if (turn >= 6 && turn < 10) orbit_checks++;
      prev[b] = x;
      e.push_back(v);
      @(negedge clk);
      if (e.size() == 2) begin
        v = e.pop_front();
        if (v != 64'h7FFF_FFFF_FFFF_FFFF) begin
          checks++;
          if (dout !== sample_t'(v)) begin
            failures++;
            if (failures < 10) $display("n=%0d got %0d exp %0d", n, dout, v);
          end
        end
      end
    end
    if (orbit_checks == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
