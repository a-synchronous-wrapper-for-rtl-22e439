`timescale 1ns/1ps
// tb_fir_async_pipeline - the six-stage asynchronous FIR pipeline on its own,
// driven by two-phase handshakes without any clock. Delays are set to 1, 2,
// 3, 4 and 5 ns so each link is told apart.
// The producer puts a sample on x_in, toggles ri and waits for ai; the
// consumer waits for ro, compares y with sum_i ((H[i]*x[t-i]) >> 12) mod 2^14
// and toggles ao after a random pause. Checked:
//   - every output value, in order, none lost;
//   - into an empty pipeline, ro toggles exactly 15 ns (the sum of the delays)
//     after ri;
//   - ai answers ri at once when stage 2 is free;
//   - with a consumer that never pauses, results come out no faster than
//     one per 5 ns, the slowest link's delay (the link must pass the token
//     before the stage behind it can free itself).
// Counted: stages stalled by a slow consumer.
module tb_fir_async_pipeline;
  import gsla_pkg::*;

  localparam int N = 200;

  logic  rst_n = 1, ri = 0, ai, ro, ao = 0;
  data_t x_in = '0, y;
  int    checks = 0, failures = 0, got = 0, stalls = 0;
  data_t xs [N];
  bit    slow_consumer = 1;
  realtime t_last_out = 0, min_period = 1e9;

  fir_async_pipeline #(.DELAY1_PS(1000), .DELAY2_PS(2000), .DELAY3_PS(3000),
                       .DELAY4_PS(4000), .DELAY5_PS(5000)) dut (
    .rst_n(rst_n), .ri(ri), .ai(ai), .x_in(x_in), .ro(ro), .ao(ao), .y(y));

  function automatic data_t ref_y(int t);
    longint acc = 0;
    for (int i = 0; i < TAPS; i++)
      if (t - i >= 0) acc += (longint'(H_DEFAULT[i]) * longint'(xs[t-i])) >> 12;
    return data_t'(acc & 16383);
  endfunction

  // consumer
  initial begin
    forever begin
      @(ro);
      checks++;
      if (y !== ref_y(got)) begin
        failures++;
        $display("FAIL: y[%0d] = %0d expected %0d", got, y, ref_y(got));
      end
      if (!slow_consumer && got > 0 && $realtime - t_last_out < min_period)
        min_period = $realtime - t_last_out;
      t_last_out = $realtime;
      got++;
      if (slow_consumer) #($urandom_range(0, 20000) / 1000.0);
      ao = ro;
    end
  end

  initial begin
    realtime t0;
    for (int i = 0; i < N; i++) xs[i] = data_t'($urandom_range(0, 16383));
    #1 rst_n = 0;
    #2 rst_n = 1;
    #2;
    // first sample into the empty pipeline: latency and immediate acknowledge
    x_in = xs[0];
    #0.5 ri = ~ri;
    t0 = $realtime;
    #0.001;
    checks++;
    if (ai != ri) begin failures++; $display("FAIL: no immediate acknowledge"); end
    wait (got == 1);
    checks++;
    if ($realtime - t0 < 14.999 || $realtime - t0 > 15.001) begin
      failures++;
      $display("FAIL: latency %0.3f ns, expected 15", $realtime - t0);
    end
    // stream with a slow consumer, then with a fast one
    for (int i = 1; i < N; i++) begin
      if (i == N/2) slow_consumer = 0;
      #($urandom_range(0, 1500) / 1000.0);
      x_in = xs[i];
      #0.2 ri = ~ri;
      #0.01;
      if (ai != ri) stalls++;
      wait (ai == ri);
    end
    wait (got == N);
    checks++;
    if (min_period < 4.999 || stalls == 0) begin
      failures++;
      $display("FAIL: min output period %0.3f, stalls %0d", min_period, stalls);
    end
    $display("results=%0d stalls=%0d min_period=%0.3f ns", got, stalls, min_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
