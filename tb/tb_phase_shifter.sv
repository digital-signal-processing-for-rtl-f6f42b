// Self-checking test of phase_shifter with a 7-bunch turn and random 2.14
// taps: expected y = round((c0*x[n] + c1*x[n-T] + c2*x[n-2T])/2^14), clipped,
// from this bench's own two-turn history; also the bypass (filter off) and the
// pick-up switch (output 0). Includes a pure-delay setting (c1 = 1.0) that
// must return the previous turn's sample exactly. Latency two clocks.
module tb_phase_shifter;
  import dspu_pkg::*;
  localparam int T = 7;
  logic clk = 0;
  always #5 clk = ~clk;
  logic hilbert_en, pu_en;
  logic [2:0][15:0] coef;
  sample_t din, dout;
  bunch_t bunch;
  int checks = 0, failures = 0;
  longint e [$];
  longint v;
  int h1 [T], h2 [T];
  phase_shifter #(.DEPTH(8)) dut (.clk, .hilbert_en, .pu_en, .coef, .din, .bunch, .dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hilbert_en = 1; pu_en = 1; din = 0; bunch = 0; coef = '0;
    @(negedge clk);
    for (int n = 0; n < 7000; n++) begin
      int b, turn, x;
      b = n % T; turn = n / T;
      if (b == 0) begin
        if (turn % 50 == 10) coef = {16'h0000, 16'h4000, 16'h0000};
        else if (turn % 10 == 0) coef = {16'($urandom), 16'($urandom), 16'($urandom)};
        hilbert_en = (turn % 17) != 3;
        pu_en = (turn % 23) != 5;
      end
      x = $urandom_range(0, 40000) - 20000;
      din = sample_t'(x); bunch = bunch_t'(b);
      if (turn < 2) v = 64'h7FFF_FFFF_FFFF_FFFF;
      else if (!pu_en) v = 0;
      else if (!hilbert_en) v = x;
      else begin
        v = (longint'(x) * longint'(signed'(coef[0])) + longint'(h1[b]) * longint'(signed'(coef[1]))
           + longint'(h2[b]) * longint'(signed'(coef[2])) + 8192) >>> 14;
        if (v > 32767) v = 32767;
        if (v < -32768) v = -32768;
      end
      h2[b] = h1[b]; h1[b] = x;
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
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
