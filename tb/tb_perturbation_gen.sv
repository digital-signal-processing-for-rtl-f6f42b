// Self-checking test of perturbation_gen. Writes different records into the
// two banks, then plays bank 1 over addresses 0..9 at the full rate (each entry
// for two clocks, no interpolation) and at rate shifts 1 and 3 (linear
// interpolation between entries), restarts it with trig, plays bank 0, and
// stops it. The expected sum din + p is computed here from the record, the
// rate and the number of clocks since the record started; the record is
// expected to begin 3 clocks after a start (fetch of the first two entries)
// and the adder has one clock of latency.
module tb_perturbation_gen;
  import dspu_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, en, bank, trig, wr_en, running;
  logic [3:0] rate_shift;
  logic [11:0] length;
  logic [12:0] wr_addr;
  logic [15:0] wr_data;
  sample_t din, dout;
  int checks = 0, failures = 0, interp_seen = 0, wraps = 0;
  int rec [2][16];
  longint exp_v;
  int j, start_cnt;
  perturbation_gen dut (.clk, .rst_n, .en, .bank, .rate_shift, .length, .trig, .wr_en, .wr_addr,
                        .wr_data, .din, .dout, .running);

  function automatic longint model(input int jj);
    int step, idx, ph, a, b;
    step = 2 << rate_shift;
    idx = (jj / step) % (int'(length) + 1);
    ph = jj % step;
    a = rec[bank][idx];
    b = rec[bank][(idx + 1) % (int'(length) + 1)];
    if (rate_shift == 0) return a;
    return longint'(a) + ((longint'(b - a) * ph) >>> (rate_shift + 1));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: start_cnt counts clock edges since a start; the record is added
  // from the edge where start_cnt reaches 3
  bit check_on, en_prev;
  longint pend;
  bit pend_ok;
  always @(posedge clk) begin
    pend = longint'(din);
    if (start_cnt >= 3) begin
      j = start_cnt - 3;
      pend += model(j);
      if (rate_shift != 0 && (j % (2 << rate_shift)) != 0) interp_seen++;
      if (j > 0 && (j % ((2 << rate_shift) * (int'(length) + 1))) == 0) wraps++;
    end
    if (pend > 32767) pend = 32767;
    if (pend < -32768) pend = -32768;
    pend_ok = check_on;
    if (!en) start_cnt = 0;
    else if (trig || !en_prev) start_cnt = 0;
    else start_cnt++;
    en_prev = en;
  end
  always @(negedge clk) begin
    if (pend_ok) begin
      checks++;
      if (longint'(dout) != pend) begin
        failures++;
        if (failures < 10) $display("t=%0t got %0d exp %0d", $time, dout, pend);
      end
    end
    din = sample_t'($urandom_range(0, 20000) - 10000);
  end

  task automatic play(input bit b, input int rs, input int cycles);
    en = 0; @(negedge clk);
    bank = b; rate_shift = 4'(rs);
    en = 1; check_on = 1;
    repeat (cycles) @(negedge clk);
  endtask

  initial begin
    rst_n = 0; en = 0; bank = 0; trig = 0; wr_en = 0; rate_shift = 0; length = 9;
    wr_addr = 0; wr_data = 0; din = 0; check_on = 0; pend_ok = 0; start_cnt = 0; en_prev = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++)
      for (int i = 0; i < 16; i++) begin
        rec[b][i] = (b == 0) ? i * 100 : $urandom_range(0, 16000) - 8000;
        wr_en = 1; wr_addr = 13'(b * 4096 + i); wr_data = 16'(rec[b][i]);
        @(negedge clk);
      end
    wr_en = 0;
    play(1, 0, 100);
    play(1, 1, 200);
    play(1, 3, 400);
    // restart in the middle
    trig = 1; @(negedge clk); trig = 0;
    repeat (200) @(negedge clk);
    play(0, 2, 300);
    check_on = 0; en = 0;
    repeat (5) @(negedge clk);
    if (interp_seen == 0) begin failures++; $display("no interpolation seen"); end
    if (wraps == 0) begin failures++; $display("record never wrapped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
