// fir_rcm_tb: self-checking testbench of the three-tap reconfigurable FIR.
// A reference filter (delay line and ordinary multiplications) runs beside
// the design.  The test streams random samples with gaps, changes the
// per-tap coefficient selection every 50 samples (all 27 combinations are
// visited, the first being h = 1912, 1111, 1331), clears the delay line now
// and then, and checks every output value and its 4-cycle latency.
module fir_rcm_tb;
  import rcm_pkg::*;

  localparam int unsigned WX = 16;
  localparam int unsigned TAPS = 3;
  localparam int unsigned WO = WX + COEF_GROWTH + 2;
  localparam int unsigned LAT = 4;

  logic clk = 1'b0;
  logic rst, clear, x_valid, y_valid;
  rcm_cfg_e coef_sel [TAPS];
  logic signed [WX-1:0] x;
  logic signed [WO-1:0] y;

  int checks = 0, failures = 0;

  fir_rcm #(.WX(WX), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint coef_of(rcm_cfg_e c);
    return (c == CFG_1912) ? 1912 : (c == CFG_1111) ? 1111 : 1331;
  endfunction

  longint hist [TAPS];
  longint exp_q[$];
  int     cyc_q[$];
  int     cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst || clear) begin
      for (int k = 0; k < TAPS; k++) hist[k] = 0;
    end else if (x_valid) begin
      longint acc;
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += coef_of(coef_sel[k]) * hist[k];
      exp_q.push_back(acc);
      cyc_q.push_back(cyc);
    end
    if (!rst && y_valid) begin
      longint e;
      int c0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        e = exp_q.pop_front();
        c0 = cyc_q.pop_front();
        if (longint'(y) != e || cyc - c0 != LAT) begin
          failures++;
          $display("mismatch y=%0d expected %0d latency %0d", y, e, cyc - c0);
        end
      end
    end
  end

  initial begin
    rst = 1'b1; clear = 1'b0; x_valid = 1'b0; x = '0;
    foreach (coef_sel[k]) coef_sel[k] = rcm_cfg_e'(k);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int s = 0; s < 27; s++) begin
      // wait for the pipeline to empty before changing coefficients
      x_valid <= 1'b0;
      repeat (LAT + 1) @(posedge clk);
      coef_sel[0] <= rcm_cfg_e'(s % 3);
      coef_sel[1] <= rcm_cfg_e'((s / 3 + 1) % 3);
      coef_sel[2] <= rcm_cfg_e'((s / 9 + 2) % 3);
      if (s % 4 == 3) clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      for (int i = 0; i < 50; i++) begin
        x <= WX'($urandom);
        x_valid <= ($urandom_range(0, 5) != 0);
        @(posedge clk);
      end
    end
    x_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
