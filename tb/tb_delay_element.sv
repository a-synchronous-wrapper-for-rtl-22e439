`timescale 1ns/1ps
// tb_delay_element - checks that every edge of the input reaches the output
// exactly DELAY_PS later (here 3 ns), for isolated edges and for edges
// spaced just over the delay apart.
module tb_delay_element;

  logic a = 0, z;
  int   checks = 0, failures = 0;

  delay_element #(.DELAY_PS(3000)) dut (.a(a), .z(z));

  task automatic expect_z(logic v, string what);
    checks++;
    if (z !== v) begin
      failures++;
      $display("FAIL t=%0t: %s: z=%b expected %b", $time, what, z, v);
    end
  endtask

  initial begin
    #5;
    expect_z(0, "initial");
    a = 1;
    #1 expect_z(0, "1 ns after");
    #1.9 expect_z(0, "before delay");
    #0.2 expect_z(1, "after delay");
    #5;
    a = 0;
    #3.5 a = 1;                    // two edges 3.5 ns apart
    #2.8 expect_z(0, "second edge not yet");
    #0.4 expect_z(1, "second edge");
    #1.0 expect_z(1, "settled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
