// Self-checking test of bunch_sync with a 16-slot turn. Each link word
// carries its own slot number (low byte) and turn count (high byte); the link
// clock runs at the bunch rate with an offset phase, the link marker comes
// with slot 0, and the common marker comes at an unrelated time. After the
// first turn every output word must carry the slot number given on the bunch
// output (alignment), the bunch output must count 0..15 and be 0 exactly
// two clocks after the common marker (latency), and successive words of one
// slot must come from successive turns.
module tb_bunch_sync;
  import dspu_pkg::*;
  localparam int T = 16;
  logic clk = 0, rx_clk = 0;
  always #5 clk = ~clk;
  initial begin #3; forever #5 rx_clk = ~rx_clk; end
  logic rst_n, rx_rst_n, rx_frev, frev;
  sample_t rx_data, dout;
  bunch_t bunch;
  int checks = 0, failures = 0;
  int last_turn [T];
  int frev_age;
  bunch_sync #(.DEPTH(32), .TURN(T)) dut (.rx_clk, .rx_rst_n, .rx_data, .rx_frev, .clk, .rst_n, .frev, .dout, .bunch);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // link side: slot counter from 5 so the marker phase differs
  initial begin
    int s, turn;
    rx_rst_n = 0; rx_frev = 0; rx_data = 0; s = 5; turn = 0;
    repeat (2) @(negedge rx_clk);
    rx_rst_n = 1;
    forever begin
      rx_frev = (s == 0);
      rx_data = sample_t'({turn[7:0], s[7:0]});
      @(negedge rx_clk);
      s++;
      if (s == T) begin s = 0; turn++; end
    end
  end

  // bunch-clock side
  initial begin
    int n;
    rst_n = 0; frev = 0; frev_age = 100;
    foreach (last_turn[i]) last_turn[i] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < 40 * T; n++) begin
      frev = ((n % T) == 11);
      @(negedge clk);
      frev_age = frev ? 0 : frev_age + 1;
      if (n >= 2 * T) begin
        checks++;
        if (int'(dout[7:0]) != int'(bunch)) begin
          failures++;
          if (failures < 10) $display("n=%0d word slot %0d bunch %0d", n, dout[7:0], bunch);
        end
        if (frev_age == 1) begin
          checks++;
          if (bunch != 0) begin failures++; $display("bunch %0d two clocks after marker", bunch); end
        end
        if (last_turn[bunch] >= 0) begin
          checks++;
          if (int'(dout[15:8]) != ((last_turn[bunch] + 1) % 256)) begin
            failures++;
            if (failures < 10) $display("slot %0d turn %0d after %0d", bunch, dout[15:8], last_turn[bunch]);
          end
        end
        last_turn[bunch] = int'(dout[15:8]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
