`timescale 1ns/1ps
// tb_sync_wrapper_fir - end-to-end test of the synchronous wrapper with the
// asynchronous FIR pipeline, at the wrapper's default parameters.
//
// A synchronous sender (clk1) offers samples with valid and advances when ai
// toggles; a synchronous receiver (clk2) takes each result when ro differs
// from ao and answers by copying ro to ao. Both insert random pauses. The
// expected outputs come from a direct evaluation of
//   y[t] = sum_i ((H[i] * x[t-i]) >> 12) mod 2^14
// with x = 0 before the first sample.
// Phases:
//   1  one clock for both sides (clk2 = clk1, 500 MHz), starting with the
//      input sequence 227, 309, 312, 413, 635, 807, 819, ... whose outputs
//      for 635, 807 and 819 must be 230, 299 and 363;
//   2  two unrelated clocks (500 MHz and about 385 MHz), random samples;
//   3  sparse traffic: each sample is sent only after the previous result
//      came out, and the latency is checked against the pipeline delays plus
//      the output synchronizer: sum(D) + 2*T2 < latency <= sum(D) + 3*T2;
//   4  full rate: sender and receiver never pause. The output port is then
//      the bottleneck: after a load edge the receiver acknowledges on the
//      next edge, the mux opens, and the next token needs three more edges,
//      so results must come exactly every 4*T2 (10.4 ns, slower than the
//      5 x 6 ns pipeline and the 3*T1 input port);
//   5  a slow receiver clock (clk2 period 9.4 ns) with random pauses: the
//      pipeline backs up until all six stages hold a token at once.
// Counted mechanisms (each must occur): sender pause at an idle port,
// sender held back by a busy port, a pipeline stage waiting for the next
// stage, the output mux holding a token while the receiver pauses,
// receiver back-pressure, single-clock and dual-clock operation, a
// completely full pipeline.
module tb_sync_wrapper_fir;
  import gsla_pkg::*;

  localparam int    N        = 150;
  localparam real   T1       = 2.0;
  localparam real   SUM_D_NS = 30.0;   // five delays of 6 ns (wrapper defaults)

  logic  clk1 = 0, clk2g = 0, clk2;
  bit    same_clk = 1'b1;
  logic  rst_n = 1;
  logic  valid;
  data_t x_in;
  logic  ai, l_in, ro, ao, l_out;
  data_t y_out;

  always #(T1/2) clk1 = ~clk1;
  realtime T2 = 2.6;
  always #(T2/2) clk2g = ~clk2g;
  assign clk2 = same_clk ? clk1 : clk2g;

  sync_wrapper_fir dut (
    .clk1(clk1), .clk2(clk2), .rst_n(rst_n),
    .valid(valid), .x_in(x_in), .ai(ai), .l_in(l_in),
    .y_out(y_out), .ro(ro), .ao(ao), .l_out(l_out)
  );

  int checks = 0, failures = 0;

  // stimulus of the current phase
  data_t samples [N];
  data_t expected [N];
  int    n_send;
  int    phase = 0;
  bit    sparse = 0;
  bit    running = 0;
  bit    full_rate = 0;
  realtime t_prev_ro = 0;
  int    n_period = 0;

  function automatic data_t ref_y(int t);
    longint acc = 0;
    for (int i = 0; i < TAPS; i++) begin
      longint xv = (t - i >= 0) ? longint'(samples[t-i]) : 0;
      acc += (longint'(H_DEFAULT[i]) * xv) / 4096;
    end
    return data_t'(acc % 16384);
  endfunction

  // ---------------- sender (clk1) ----------------
  int  sent = 0;
  logic ai_seen;
  int  rcvd = 0;
  realtime t_accept [N];
  int  last_accept_cyc = -100, cyc1 = 0;

  // mechanism counters
  int n_in_gap = 0, n_in_busy = 0, n_pipe_wait = 0, n_out_hold = 0, n_rx_bp = 0;
  int n_single = 0, n_dual = 0, n_lat = 0, n_full = 0;

  always @(posedge clk1) begin
    cyc1++;
    if (running) begin
      if (dut.in_load) begin
        checks++;
        if (cyc1 - last_accept_cyc < 3) begin
          failures++;
          $display("FAIL: accepts %0d cycles apart", cyc1 - last_accept_cyc);
        end
        last_accept_cyc = cyc1;
        t_accept[sent] = $realtime;
      end
      if (!valid && dut.u_in.u_ctrl.idle) n_in_gap++;
      if (valid && !dut.u_in.u_ctrl.idle) n_in_busy++;
      // stage k holds an unacknowledged token when its Ro differs from the
      // next stage's Ro (for stage 6: from the output port's Ro)
      if ((dut.u_fir.c_ro ^ {dut.ro, dut.u_fir.c_ro[5:1]}) == 6'b111111) n_full++;
      for (int k = 0; k < 6; k++)
        if ((dut.u_fir.c_ri[k] != dut.u_fir.c_ro[k]) && (dut.u_fir.c_ao[k] != dut.u_fir.c_ro[k]))
          n_pipe_wait++;
      if (ai != ai_seen) begin
        ai_seen <= ai;
        sent    <= sent + 1;
        valid   <= 1'b0;
        if (sent + 1 < n_send) x_in <= samples[sent+1];
      end else if (sent < n_send && (!sparse || rcvd == sent)) begin
        valid <= full_rate || ($urandom_range(0, 3) != 0);
      end else begin
        valid <= 1'b0;
      end
    end
  end

  // ---------------- receiver (clk2) ----------------
  always @(posedge clk2) begin
    if (running) begin
      if (dut.l_out && (dut.p_ro != ro)) n_out_hold++;
      if (ro != ao) begin
        if (sparse || full_rate || $urandom_range(0, 2) != 0) begin
          if (full_rate && rcvd >= 20) begin
            checks++;
            n_period++;
            if ($realtime - t_prev_ro < 4.0*T2 - 0.001 || $realtime - t_prev_ro > 4.0*T2 + 0.001) begin
              failures++;
              $display("FAIL: full-rate result period %0.3f ns, expected %0.3f", $realtime - t_prev_ro, 4.0*T2);
            end
          end
          t_prev_ro = $realtime;
          ao <= ro;
          checks++;
          if (rcvd >= n_send || y_out !== expected[rcvd]) begin
            failures++;
            $display("FAIL phase %0d: result %0d = %0d, expected %0d", phase, rcvd, y_out,
                     (rcvd < n_send) ? expected[rcvd] : 0);
          end
          if (same_clk) n_single++; else n_dual++;
          if (sparse) begin
            realtime lat;
            lat = $realtime - t_accept[rcvd] - T2;  // ro toggled one edge ago
            checks++;
            n_lat++;
            if (!(lat > SUM_D_NS + 2.0*T2 && lat <= SUM_D_NS + 3.0*T2 + 0.001)) begin
              failures++;
              $display("FAIL: latency %0.3f ns outside (%0.3f, %0.3f]", lat,
                       SUM_D_NS + 2.0*T2, SUM_D_NS + 3.0*T2);
            end
          end
          rcvd <= rcvd + 1;
        end else begin
          n_rx_bp++;
        end
      end
    end
  end

  task automatic run_phase(int ph, bit one_clk, bit sp, int n, bit fig_seq, bit fr = 0);
    phase    = ph;
    running  = 0;
    #1;
    rst_n    = 0;
    #10;
    same_clk = one_clk;
    sparse   = sp;
    full_rate = fr;
    n_send   = n;
    for (int i = 0; i < n; i++) samples[i] = data_t'($urandom_range(0, 16383));
    if (fig_seq) begin
      data_t seq [13] = '{227, 309, 312, 413, 635, 807, 819, 779, 853, 1016, 1088, 1000, 895};
      for (int i = 0; i < 13; i++) samples[i] = seq[i];
    end
    for (int i = 0; i < n; i++) expected[i] = ref_y(i);
    if (fig_seq) begin
      checks += 3;
      if (expected[4] != 230 || expected[5] != 299 || expected[6] != 363) begin
        failures++;
        $display("FAIL: reference model does not give 230/299/363");
      end
    end
    sent = 0; rcvd = 0; ai_seen = 0; valid = 0; ao = 0; x_in = samples[0];
    last_accept_cyc = -100;
    #10;
    rst_n = 1;
    @(posedge clk1);
    running = 1;
    wait (rcvd == n);
    repeat (20) @(posedge clk2);
    checks++;
    if (sent != n) begin
      failures++;
      $display("FAIL: phase %0d sent %0d of %0d", ph, sent, n);
    end
    $display("phase %0d done at %0t: %0d results", ph, $time, rcvd);
  endtask

  initial begin
    valid = 0; ao = 0; x_in = '0; ai_seen = 0;
    run_phase(1, 1'b1, 1'b0, N, 1'b1);
    run_phase(2, 1'b0, 1'b0, N, 1'b0);
    run_phase(3, 1'b0, 1'b1, 20, 1'b0);
    run_phase(4, 1'b0, 1'b0, 100, 1'b0, 1'b1);
    T2 = 9.4;
    run_phase(5, 1'b0, 1'b0, 100, 1'b0);
    $display("mechanisms: in_gap=%0d in_busy=%0d pipe_wait=%0d out_hold=%0d rx_backpressure=%0d single_clk=%0d dual_clk=%0d latency_checked=%0d full_pipeline=%0d",
             n_in_gap, n_in_busy, n_pipe_wait, n_out_hold, n_rx_bp, n_single, n_dual, n_lat, n_full);
    checks += 8;
    if (n_in_gap == 0)    begin failures++; $display("FAIL: no sender pause seen"); end
    if (n_in_busy == 0)   begin failures++; $display("FAIL: sender never held back"); end
    if (n_pipe_wait == 0) begin failures++; $display("FAIL: no pipeline stage waited"); end
    if (n_out_hold == 0)  begin failures++; $display("FAIL: output mux never held a token"); end
    if (n_rx_bp == 0)     begin failures++; $display("FAIL: no receiver back-pressure"); end
    if (n_single == 0)    begin failures++; $display("FAIL: no single-clock results"); end
    if (n_dual == 0)      begin failures++; $display("FAIL: no dual-clock results"); end
    if (n_lat == 0)       begin failures++; $display("FAIL: no latency measured"); end
    checks += 2;
    if (n_full == 0)      begin failures++; $display("FAIL: pipeline never completely full"); end
    if (n_period == 0)    begin failures++; $display("FAIL: no full-rate period measured"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
