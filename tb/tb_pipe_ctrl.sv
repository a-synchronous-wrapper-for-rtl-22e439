`timescale 1ns/1ps
// tb_pipe_ctrl - checks the two-phase stage controller against its signal
// transition graph. Ri (a new request) and Ao (the next stage's acknowledge)
// toggle at random but legally: Ri only when no request is pending (Ri == Ro),
// Ao only when a request was forwarded and not yet acknowledged (Ao != Ro).
// The reference fires when Ri != Ro and Ao == Ro, copying Ri to Ro; each
// firing must be exactly one L pulse. Counted: stalls, where a request waits
// because the next stage has not acknowledged.
module tb_pipe_ctrl;

  logic rst_n = 1, ri = 0, ao = 0, l, ro;
  int   checks = 0, failures = 0;
  int   pulses = 0, expected_pulses = 0, stalls = 0;
  logic ro_ref = 0;

  pipe_ctrl dut (.rst_n(rst_n), .ri(ri), .ao(ao), .l(l), .ro(ro));

  always @(posedge l) pulses++;

  task automatic settle_and_check();
    #1;
    if (ri != ro_ref && ao == ro_ref) begin
      ro_ref = ri;
      expected_pulses++;
    end else if (ri != ro_ref) begin
      stalls++;
    end
    checks++;
    if (ro !== ro_ref || l !== 1'b0 || pulses != expected_pulses) begin
      failures++;
      $display("FAIL t=%0t: ri=%b ao=%b ro=%b (exp %b) l=%b pulses=%0d (exp %0d)",
               $time, ri, ao, ro, ro_ref, l, pulses, expected_pulses);
    end
  endtask

  initial begin
    #1 rst_n = 0;
    #2 rst_n = 1;
    settle_and_check();
    // directed: request with free next stage, then a stalled request
    ri = 1; settle_and_check();          // fires, Ro = 1
    ri = 0; settle_and_check();          // stalled: Ao still 0
    ao = 1; settle_and_check();          // next stage takes it: fires, Ro = 0
    ao = 0; settle_and_check();
    // random legal traffic
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 1) == 0) begin
        if (ri == ro) ri = ~ri;
      end else begin
        if (ao != ro) ao = ~ao;
      end
      settle_and_check();
    end
    checks++;
    if (stalls == 0 || expected_pulses < 50) begin
      failures++;
      $display("FAIL: too little activity: %0d pulses, %0d stalls", expected_pulses, stalls);
    end
    $display("pulses=%0d stalls=%0d", expected_pulses, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
