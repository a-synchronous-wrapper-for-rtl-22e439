`timescale 1ns/1ps
// tb_input_port - the input port with its synchronizer, between a
// synchronous sender and a model of the first pipeline stage.
// The stage answers each request toggle after a random 0.3..9 ns. Checked:
// Ai toggles once per taken word and only when Valid was high; no word is
// taken before the previous one was acknowledged; with an
// immediate acknowledge the port takes a word every third clock edge, never
// faster; L is high exactly from the accepting edge to the acknowledge.
module tb_input_port;

  logic clk = 0, rst_n = 1, valid = 0, ao = 0, ai, ro, l, load;
  int   checks = 0, failures = 0, cyc = 0, last = -100, taken = 0;
  int   min_gap = 1000, gap3 = 0;
  bit   fast = 0;
  logic ai_prev = 0;

  always #1 clk = ~clk;

  input_port dut (.clk(clk), .rst_n(rst_n), .valid(valid), .ao(ao),
                  .ai(ai), .ro(ro), .l(l), .load(load));

  // first pipeline stage model: acknowledge after a delay
  always @(ro) begin
    if (rst_n) begin
      if (fast) #0.3 ao = ro;
      else      #($urandom_range(300, 9000) / 1000.0) ao = ro;
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (load) begin
        checks++;
        if (!valid) begin failures++; $display("FAIL: load without valid"); end
        checks++;
        if (ao != ro) begin failures++; $display("FAIL t=%0t: load before acknowledge", $time); end
        if (cyc - last < 3) begin failures++; $display("FAIL: gap %0d", cyc - last); end
        if (cyc - last < min_gap) min_gap = cyc - last;
        if (cyc - last == 3) gap3++;
        last = cyc;
        taken++;
      end
      // Ai seen by the sender must have toggled exactly at the previous load
      checks++;
      if ((ai != ai_prev) != (cyc - last == 1 && cyc > 1)) begin
        failures++;
        $display("FAIL t=%0t: ai toggle mismatch", $time);
      end
      ai_prev <= ai;
      valid <= fast ? 1'b1 : ($urandom_range(0, 2) != 0);
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (l !== (ro ^ ao)) begin failures++; $display("FAIL t=%0t: L wrong", $time); end
    end
  end

  initial begin
    #0.5 rst_n = 0;
    #2   rst_n = 1;
    repeat (300) @(posedge clk);
    fast = 1;
    repeat (100) @(posedge clk);
    checks++;
    if (gap3 < 10 || taken < 60 || min_gap != 3) begin
      failures++;
      $display("FAIL: taken=%0d gap3=%0d min_gap=%0d", taken, gap3, min_gap);
    end
    $display("taken=%0d three-cycle gaps=%0d", taken, gap3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
