// tb_idc_afmu: wu_pe pulses with chosen spacings. A reference model counts
// consecutive periods inside [NXFN, NNFX] and predicts the cycle in which
// fm_det must rise (one clock after the pulse closing the WU_N-th valid one).
module tb_idc_afmu;
  timeunit 1ns;
  timeprecision 1ps;
  logic clk = 0, rst_n = 1, en = 0, pe = 0, det;
  initial #1 rst_n = 0;   // a real falling edge applies the asynchronous reset
  logic [7:0] nxfn = 8, nnfx = 13;
  logic [3:0] wu_n = 5;
  int checks = 0, failures = 0, detections = 0, rejections = 0;
  idc_afmu dut (.clk, .rst_n, .fm_en_i(en), .wu_pe_i(pe), .nxfn_i(nxfn), .nnfx_i(nnfx),
                .wu_n_i(wu_n), .fm_det_o(det));
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Sends pulses spaced by per[i] cycles (first pulse starts the measurement)
  // and checks fm_det in every cycle against the model.
  task automatic run(input int per[], input string name);
    int run_len, need; logic exp_det, first;
    need = (wu_n == 0) ? 1 : int'(wu_n);
    @(negedge clk); en = 0;
    @(negedge clk); en = 1;
    run_len = 0; exp_det = 0; first = 1;
    for (int i = 0; i <= per.size(); i++) begin
      int gap;
      gap = (i == 0) ? 1 : per[i-1];
      for (int g = 0; g < gap; g++) begin
        pe = (g == gap - 1);
        @(posedge clk); #1;
        // the pulse sampled at this edge closes period i-1
        if (pe && !first && !exp_det) begin
          if (gap >= nxfn && gap <= nnfx) run_len++; else run_len = 0;
          if (run_len >= need) exp_det = 1;
        end
        checks++;
        if (det !== exp_det) begin failures++; $display("FAIL %s i=%0d g=%0d det=%b", name, i, g, det); end
        @(negedge clk);
      end
      pe = 0;
      first = 0;
    end
    @(posedge clk); #1; checks++;
    if (det !== exp_det) begin failures++; $display("FAIL %s final det=%b", name, det); end
    if (det) detections++; else rejections++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run('{10, 10, 10, 10, 10, 10}, "14kHz");             // valid
    run('{5, 5, 5, 5, 5, 5, 5, 5}, "too fast");          // rejected
    run('{20, 20, 20, 20, 20, 20}, "too slow");          // rejected
    run('{10, 10, 10, 10}, "too short");                 // rejected
    run('{10, 10, 10, 4, 10, 10, 10, 10, 10}, "glitch"); // restarts count
    run('{8, 13, 8, 13, 8}, "window edges");             // inclusive limits
    run('{7, 14, 10, 10, 10}, "just outside");
    wu_n = 8;
    run('{12, 9, 11, 10, 10, 10, 9, 11, 10}, "WU_N=8");
    wu_n = 1;
    run('{12}, "WU_N=1");
    for (int r = 0; r < 20; r++) begin
      int per[];
      wu_n = 4'($urandom_range(1, 8));
      per = new[$urandom_range(1, 14)];
      foreach (per[k]) per[k] = $urandom_range(5, 16);
      run(per, "random");
    end
    checks++;
    if (detections < 5 || rejections < 5) begin failures++; $display("FAIL coverage %0d %0d", detections, rejections); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
