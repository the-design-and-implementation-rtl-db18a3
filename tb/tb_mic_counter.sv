// Checks the microphone counter FSM.
// Microphones fire after chosen numbers of enable ticks; the deltas must
// equal the tick distance from the first microphone, whichever fires first,
// including ties, and ready must rise one tick after the last one fires.
`timescale 1ns/1ps
module tb_mic_counter;
  logic clk = 0, en = 0, counter_reset = 1;
  logic [2:0] mic = 0;
  logic [11:0] delta0, delta1, delta2;
  logic ready;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mic_counter dut (.*);

  initial begin
    #50_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one enable every 10 cycles
  int tick = 0;
  int phase = 0;
  always @(posedge clk) begin
    phase <= (phase == 9) ? 0 : phase + 1;
    en    <= (phase == 8);
    if (en) tick <= tick + 1;
  end

  task automatic run_case(input int t0, input int t1, input int t2);
    int base, mx, mn, ready_tick;
    int t[3];
    t[0] = t0; t[1] = t1; t[2] = t2;
    counter_reset = 1; mic = 0;
    repeat (25) @(posedge clk);
    @(negedge clk); counter_reset = 0;
    @(posedge en); @(negedge clk);
    base = tick + 2;     // first sampling tick of the earliest mic
    mn = t0; if (t1 < mn) mn = t1; if (t2 < mn) mn = t2;
    mx = t0; if (t1 > mx) mx = t1; if (t2 > mx) mx = t2;
    ready_tick = -1;
    while (tick < base + (mx - mn) + 4) begin
      @(negedge clk);
      // a mic set while tick == base + t - mn - 1 is sampled at tick base + t - mn
      for (int i = 0; i < 3; i++) if (tick >= base + t[i] - mn - 1) mic[i] = 1'b1;
      if (ready && ready_tick < 0) ready_tick = tick;
    end
    checks++;
    if (delta0 != 12'(t0 - mn) || delta1 != 12'(t1 - mn) || delta2 != 12'(t2 - mn)) begin
      failures++;
      $display("case %0d %0d %0d: deltas %0d %0d %0d", t0, t1, t2, delta0, delta1, delta2);
    end
    checks++;
    if (ready_tick != base + (mx - mn) + 1) begin
      failures++;
      $display("case %0d %0d %0d: ready at tick %0d, expected %0d", t0, t1, t2, ready_tick, base + mx - mn + 1);
    end
  endtask

  initial begin
    run_case(0, 5, 9);
    run_case(7, 0, 3);
    run_case(4, 4, 0);
    run_case(0, 0, 0);
    run_case(2, 0, 2);
    run_case(0, 12, 12);
    run_case(30, 1, 0);
    for (int k = 0; k < 20; k++) run_case($urandom_range(0, 60), $urandom_range(0, 60), $urandom_range(0, 60));
    // reset in the middle of a count returns to idle
    counter_reset = 1; mic = 0; repeat (25) @(posedge clk);
    @(negedge clk); counter_reset = 0; mic = 3'b001;
    repeat (60) @(posedge clk);
    @(negedge clk); counter_reset = 1; @(negedge clk); counter_reset = 0; mic = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (ready || delta1 != 0 || delta2 != 0) begin failures++; $display("reset mid-count failed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
