`timescale 1ns/1ps
// tb_output_port_controller - cycle-by-cycle comparison of the output
// controller with a reference model of its burst-mode specification.
// The testbench plays the pipeline (a new token toggles Ri some time after
// the controller acknowledged the previous one with Ro), the hold mux and
// synchronizer (Riclk follows Ri two edges late, but only while L is low),
// and the receiver (Ao copies Ro after 0..3 cycles). Checked on every edge:
// L = not (Ri != Ro and Ao == Ro), load = Riclk != Ro, Ro toggles exactly
// on load; every token is handed on once, in order.
// A second, event-driven monitor walks the controller's eight-state
// burst-mode graph:
//   0 -Ri/L-> 1 -Riclk then CLK+/L+ Ro-> 2 -Ri and Ao/L-> 3 -Riclk then CLK-> 4
//   -CLK+/L+ Ro-> 5 -Ri and Ao/L-> 6 -Riclk then CLK-> 7 -CLK+/L+ Ro-> 2
// and checks L and Ro in every state; all eight states must be visited.
module tb_output_port_controller;

  logic clk = 0, rst_n = 1, ri = 0, riclk, ao = 0, l, ro, load;
  logic held = 0, s1 = 0, s2 = 0;
  logic ro_ref = 0;
  int   checks = 0, failures = 0, tokens_in = 0, tokens_out = 0, holds = 0, cycles = 0;
  int   ack_wait = 0, tok_wait = 0;

  always #1 clk = ~clk;
  assign riclk = s2;

  output_port_controller dut (.clk(clk), .rst_n(rst_n), .ri(ri), .riclk(riclk), .ao(ao),
                              .l(l), .ro(ro), .load(load));

  // hold mux model
  always @(*) if (!l) held = ri;

  initial begin
    #0.5 rst_n = 0;
    #2   rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      checks++;
      if (load !== (riclk != ro_ref) || ro !== ro_ref) begin
        failures++;
        $display("FAIL t=%0t: load=%b ro=%b ro_ref=%b riclk=%b", $time, load, ro, ro_ref, riclk);
      end
      if (riclk != ro_ref) begin
        ro_ref <= riclk;
        tokens_out++;
      end
      if (l && ri != ro) holds++;
      s1 <= held;
      s2 <= s1;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (l !== !((ri != ro) && (ao == ro))) begin
        failures++;
        $display("FAIL t=%0t: l=%b ri=%b ro=%b ao=%b", $time, l, ri, ro, ao);
      end
      // receiver
      if (ao != ro) begin
        if (ack_wait == 0) ao <= ro;
        else ack_wait--;
      end else ack_wait = $urandom_range(0, 3);
      // pipeline: next token once the previous one was acknowledged
      if (ri == ro) begin
        if (tok_wait == 0) begin ri <= ~ri; tokens_in++; tok_wait = $urandom_range(0, 4); end
        else tok_wait--;
      end
    end
  end

  // ---- burst-mode state graph monitor ----
  int   st = 0;
  bit   visited [8];
  logic p_clk = 0, p_ri = 0, p_riclk = 0, p_ao = 0;
  bit   ri_seen = 0, ao_seen = 0, rc_seen = 0;
  logic exp_l, exp_ro;

  always @(clk or ri or riclk or ao) begin
    #0.05;
    if (rst_n) begin
      if (clk && !p_clk) begin
        case (st)
          1: if (rc_seen) begin st = 2; rc_seen = 0; end
          4: st = 5;
          7: st = 2;
          default: ;
        endcase
      end else if (!clk && p_clk) begin
        case (st)
          3: if (rc_seen) begin st = 4; rc_seen = 0; end
          6: if (rc_seen) begin st = 7; rc_seen = 0; end
          default: ;
        endcase
      end
      if (ri != p_ri) ri_seen = 1;
      if (ao != p_ao) ao_seen = 1;
      if (riclk != p_riclk) rc_seen = 1;
      case (st)
        0: if (ri_seen) begin st = 1; ri_seen = 0; end
        2: if (ri_seen && ao_seen) begin st = 3; ri_seen = 0; ao_seen = 0; end
        5: if (ri_seen && ao_seen) begin st = 6; ri_seen = 0; ao_seen = 0; end
        default: ;
      endcase
      visited[st] = 1;
      exp_l  = (st == 0 || st == 2 || st == 5);
      exp_ro = (st >= 2 && st <= 4);
      checks++;
      if (l !== exp_l || ro !== exp_ro) begin
        failures++;
        $display("FAIL t=%0t: state %0d: L=%b Ro=%b, expected L=%b Ro=%b", $time, st, l, ro, exp_l, exp_ro);
      end
    end
    p_clk = clk; p_ri = ri; p_riclk = riclk; p_ao = ao;
  end

  initial begin
    wait (cycles == 600);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!visited[i]) begin failures++; $display("FAIL: state %0d never visited", i); end
    end
    checks++;
    if (tokens_out < 50 || holds == 0 || tokens_in - tokens_out > 1 || tokens_in < tokens_out) begin
      failures++;
      $display("FAIL: in=%0d out=%0d holds=%0d", tokens_in, tokens_out, holds);
    end
    $display("tokens in=%0d out=%0d holds=%0d", tokens_in, tokens_out, holds);
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
