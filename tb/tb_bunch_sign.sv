// Self-checking test of bunch_sign with a 12-bunch turn: a random sign
// pattern is written, random samples (including -32768) are sent, and each
// output must be the sample, its negation (clipped) or zero with the loop off.
// The pattern is rewritten halfway. Latency two clocks.
module tb_bunch_sign;
  import dspu_pkg::*;
  localparam int T = 12;
  logic clk = 0;
  always #5 clk = ~clk;
  logic loop_on, wr_en, wr_sign;
  bunch_t bunch, wr_addr;
  sample_t din, dout;
  int checks = 0, failures = 0, negs = 0;
  logic pat [T];
  longint e [$];
  longint v;
  bunch_sign #(.DEPTH(16)) dut (.clk, .loop_on, .din, .bunch, .wr_en, .wr_addr, .wr_sign, .dout);

  task automatic load_pattern();
    for (int b = 0; b < T; b++) begin
      pat[b] = 1'($urandom);
      wr_en = 1; wr_addr = bunch_t'(b); wr_sign = pat[b];
      @(negedge clk);
    end
    wr_en = 0;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    loop_on = 1; wr_en = 0; wr_sign = 0; wr_addr = 0; bunch = 0; din = 0;
    @(negedge clk);
    for (int r = 0; r < 2; r++) begin
      load_pattern();
      e.delete();
      for (int n = 0; n < 1200; n++) begin
        int b;
        b = n % T;
        loop_on = (n % 100) < 90;
        din = (n % 37 == 0) ? SMIN : sample_t'($urandom);
        bunch = bunch_t'(b);
        if (!loop_on) v = 0;
        else if (pat[b]) begin
          v = -longint'(din);
          if (v > 32767) v = 32767;
          negs++;
        end else v = din;
        e.push_back(v);
        @(negedge clk);
        if (e.size() == 2) begin
          v = e.pop_front();
          checks++;
          if (dout !== sample_t'(v)) begin
            failures++;
            if (failures < 10) $display("n=%0d got %0d exp %0d", n, dout, v);
          end
        end
      end
    end
    if (negs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
