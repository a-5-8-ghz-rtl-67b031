// tb_rc_osc: measures the oscillator model's frequency. Code 0 must give
// 362.37 kHz and code 255 12.16 kHz (the measured end points); code 14 must
// lie near 140 kHz and code 220 near 14 kHz (within 5 %); the frequency must
// fall monotonically with the code; ENB high must stop the clock.
module tb_rc_osc;
  timeunit 1ns;
  timeprecision 1ps;
  logic enb = 1;
  logic [7:0] code = 0;
  logic clk;
  int checks = 0, failures = 0;
  rc_osc dut (.enb, .osc_ctrl(code), .clk);
  initial begin
    #2000000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic measure(output real f_hz);
    realtime t0, t1;
    @(posedge clk); @(posedge clk);   // let a new code settle
    @(posedge clk); t0 = $realtime;
    repeat (4) @(posedge clk);
    t1 = $realtime;
    f_hz = 4.0e9 / (t1 - t0);
  endtask
  task automatic near(input real f, input real target, input real tol, input string what);
    checks++;
    if (f < target * (1.0 - tol) || f > target * (1.0 + tol)) begin
      failures++; $display("FAIL %s: %f Hz, expected %f", what, f, target);
    end
  endtask
  initial begin
    real f, prev;
    #1000; enb = 0;
    code = 8'd0;   measure(f); near(f, 362370.0, 0.002, "code 0");
    code = 8'd255; measure(f); near(f, 12160.0, 0.002, "code 255");
    code = 8'd14;  measure(f); near(f, 140000.0, 0.05, "code 14");
    code = 8'd220; measure(f); near(f, 14000.0, 0.05, "code 220");
    prev = 1.0e9;
    for (int c = 0; c < 256; c += 17) begin
      code = 8'(c); measure(f);
      checks++;
      if (!(f < prev)) begin failures++; $display("FAIL not monotonic at %0d", c); end
      prev = f;
    end
    enb = 1;
    #200000;
    begin
      int edges; edges = 0;
      fork begin repeat (1000) begin @(posedge clk); edges++; end end join_none
      #1000000;
      disable fork;
      checks++;
      if (edges != 0 || clk !== 1'b0) begin failures++; $display("FAIL clock runs with ENB high"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
