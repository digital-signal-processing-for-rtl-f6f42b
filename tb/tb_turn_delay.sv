// Self-checking test of turn_delay: a counting-plus-random input stream and a
// series of delay settings including 1, a value near a full LHC-sized turn
// (3563) and the maximum 4095; after each change and a settling time the
// output must equal the input of delay+2 clocks before (the stated latency).
module tb_turn_delay;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [11:0] delay;
  sample_t din, dout;
  int checks = 0, failures = 0;
  sample_t hist [8192];
  int t;
  turn_delay dut (.clk, .rst_n, .delay, .din, .dout);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl [6] = '{1, 5, 100, 3563, 4095, 37};
    rst_n = 0; delay = 1; din = 0; t = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    foreach (dl[k]) begin
      delay = 12'(dl[k]);
      for (int i = 0; i < 4400 + dl[k]; i++) begin
        din = sample_t'($urandom);
        hist[t % 8192] = din;
        @(negedge clk);
        t++;
        // t samples applied so far; din at index t-1 was the latest
        if (i > dl[k] + 4300 - 4200 && i >= dl[k] + 2 && t > 4100 + 2) begin
          checks++;
          if (dout !== hist[(t - 1 - dl[k] - 1) % 8192]) begin
            failures++;
            if (failures < 10) $display("delay %0d t=%0d got %0d exp %0d", dl[k], t, dout, hist[(t - 2 - dl[k]) % 8192]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
