`timescale 1ns/1ps
// tb_input_port_controller - cycle-by-cycle comparison of the input
// controller with a reference model of its burst-mode specification.
// The testbench plays the pipeline (Ao copies Ro after 0..3 cycles, changing
// between clock edges) and the synchronizer (Aclk is Ao two edges later);
// Valid is random. Before each rising edge load must equal
// (Aclk == Ro) and Valid; after it Ro must have toggled exactly when load was
// 1, and L must always equal Ro xor Ao.
// A second, event-driven monitor walks the controller's eight-state
// burst-mode graph (states 0..7: CLK+ with Valid -> L+ and Ro toggles; Ao
// toggle -> L-; Aclk catches up, then CLK- -> idle; CLK+ without Valid and
// CLK- -> back to idle) and checks L and Ro in every state; all eight states
// must be visited.
module tb_input_port_controller;

  logic clk = 0, rst_n = 1, valid = 0, ao = 0, aclk, l, ro, load;
  logic s1 = 0, s2 = 0;
  logic ro_ref = 0;
  int   checks = 0, failures = 0, accepts = 0, busy_valid = 0, cycles = 0;
  int   ack_wait = 0;

  always #1 clk = ~clk;
  assign aclk = s2;

  input_port_controller dut (.clk(clk), .rst_n(rst_n), .valid(valid), .ao(ao),
                             .aclk(aclk), .l(l), .ro(ro), .load(load));

  initial begin
    #0.5 rst_n = 0;
    #2   rst_n = 1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      cycles++;
      checks++;
      if (load !== ((aclk == ro_ref) && valid) || ro !== ro_ref) begin
        failures++;
        $display("FAIL t=%0t: load=%b ro=%b ro_ref=%b aclk=%b valid=%b", $time, load, ro, ro_ref, aclk, valid);
      end
      if ((aclk == ro_ref) && valid) begin
        ro_ref <= ~ro_ref;
        accepts++;
      end else if (valid) begin
        busy_valid++;
      end
      s1 <= ao;
      s2 <= s1;
    end
  end

  // pipeline side and new inputs, between edges
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (l !== (ro ^ ao)) begin
        failures++;
        $display("FAIL t=%0t: l=%b ro=%b ao=%b", $time, l, ro, ao);
      end
      if (ao != ro) begin
        if (ack_wait == 0) ao <= ro;
        else ack_wait--;
      end else begin
        ack_wait = $urandom_range(0, 3);
      end
      valid <= ($urandom_range(0, 3) != 0);
    end
  end

  // ---- burst-mode state graph monitor ----
  int   st = 0;
  bit   visited [8];
  logic p_clk = 0, p_ao = 0, p_aclk = 0;
  bit   aclk_seen = 0;
  logic exp_l, exp_ro;

  always @(clk or ao or aclk) begin
    #0.05;
    if (rst_n) begin
      // clock edge first
      if (clk && !p_clk) begin
        case (st)
          0: st = valid ? 2 : 1;
          4: st = valid ? 6 : 5;
          default: ;
        endcase
      end else if (!clk && p_clk) begin
        case (st)
          1: st = 0;
          5: st = 4;
          3: if (aclk_seen) st = 4;
          7: if (aclk_seen) st = 0;
          default: ;
        endcase
      end
      if (ao != p_ao) begin
        case (st)
          2: st = 3;
          6: st = 7;
          default: begin failures++; $display("FAIL t=%0t: Ao toggled in state %0d", $time, st); end
        endcase
        aclk_seen = 0;
      end
      if (aclk != p_aclk) aclk_seen = 1;
      visited[st] = 1;
      exp_l  = (st == 2 || st == 6);
      exp_ro = (st >= 2 && st <= 5);
      checks++;
      if (l !== exp_l || ro !== exp_ro) begin
        failures++;
        $display("FAIL t=%0t: state %0d: L=%b Ro=%b, expected L=%b Ro=%b", $time, st, l, ro, exp_l, exp_ro);
      end
    end
    p_clk = clk; p_ao = ao; p_aclk = aclk;
  end

  initial begin
    wait (cycles == 500);
    for (int i = 0; i < 8; i++) begin
      checks++;
      if (!visited[i]) begin failures++; $display("FAIL: state %0d never visited", i); end
    end
    checks++;
    if (accepts < 50 || busy_valid == 0) begin
      failures++;
      $display("FAIL: accepts=%0d busy_valid=%0d", accepts, busy_valid);
    end
    $display("accepts=%0d busy_with_valid=%0d", accepts, busy_valid);
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
