`timescale 1ns/1ps
// tb_output_port - the output port (hold mux, synchronizer, controller) with
// the output data register, between a model of the last pipeline stage and a
// synchronous receiver that pauses at random.
// The stage puts token number n on its data lines and toggles Ri; it sends
// the next token only after Ro has acknowledged (two-phase), some random time
// later. Checked: the receiver gets 0, 1, 2, ... with none lost or repeated,
// Ro changes only when the receiver has taken the previous word, and, once L
// has fallen (the mux opens), the token reaches Ro on the third rising clock
// edge: sample, synchronize, load. Counted: tokens held back by the mux
// while L is high.
module tb_output_port;

  logic clk = 0, rst_n = 1, ri = 0, ao = 0, l, ro, load;
  logic [15:0] d = 0, q;
  int   checks = 0, failures = 0, got = 0, holds = 0, cyc = 0, sent = 0;
  int   t_arrive_cyc = 0, lat_ok = 0;
  bit   rx_slow = 1;

  always #1 clk = ~clk;

  output_port dut (.clk(clk), .rst_n(rst_n), .ri(ri), .ao(ao), .l(l), .ro(ro), .load(load));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    q <= '0;
    else if (load) q <= d;

  // last pipeline stage
  initial begin
    #0.5 rst_n = 0;
    #2   rst_n = 1;
    forever begin
      #($urandom_range(100, 7000) / 1000.0);
      if (ri == ro) begin
        d  = 16'(sent);
        ri = ~ri;
        sent++;
      end else begin
        @(ro);
      end
    end
  end

  always @(negedge l) t_arrive_cyc = cyc;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (l && ri != ro) holds++;
      if (load) begin
        checks++;
        if (ao != ro) begin failures++; $display("FAIL t=%0t: overwrite before ack", $time); end
        if (!rx_slow && ao == ro) begin
          checks++;
          if (cyc - t_arrive_cyc != 3) begin
            failures++;
            $display("FAIL: token took %0d edges", cyc - t_arrive_cyc);
          end else lat_ok++;
        end
      end
      if (ro != ao && (!rx_slow || $urandom_range(0, 3) == 0)) begin
        checks++;
        if (q != 16'(got)) begin failures++; $display("FAIL: got %0d expected %0d", q, got); end
        got++;
        ao <= ro;
      end
    end
  end

  initial begin
    repeat (600) @(posedge clk);
    rx_slow = 0;
    repeat (600) @(posedge clk);
    checks++;
    if (got < 100 || holds == 0 || lat_ok == 0 || sent - got > 2) begin
      failures++;
      $display("FAIL: got=%0d sent=%0d holds=%0d lat_ok=%0d", got, sent, holds, lat_ok);
    end
    $display("got=%0d sent=%0d holds=%0d lat_ok=%0d", got, sent, holds, lat_ok);
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
