// kcm_rcm_tb: self-checking testbench of the reconfigurable LUT-based
// 8x4-bit signed multiplier.  After reset the multiplier must load its
// initial coefficient (set to 5 here) by itself.  Then, for every one of
// the 16 signed coefficients, the test requests a reconfiguration, checks
// that it takes exactly 32 cycles and that samples entering meanwhile come
// out marked invalid, and streams all 256 signed inputs back to back,
// comparing each product with x*c and its 2-cycle latency.
module kcm_rcm_tb;
  localparam int unsigned BX = 8, BC = 4, BY = 12, LAT = 2, RECONF = 32;
  localparam logic signed [BC-1:0] INIT = 4'sd5;

  logic clk = 1'b0;
  logic rst, x_valid, reconf_req, reconf_busy, reconf_done, y_valid;
  logic signed [BX-1:0] x;
  logic signed [BC-1:0] coef;
  logic signed [BY-1:0] y;

  int checks = 0, failures = 0;

  kcm_rcm #(.BX(BX), .BC(BC), .INIT_COEF(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cyc = 0;
  always @(posedge clk) cyc++;

  // scoreboard: expected product or -1e9 for "must be invalid"
  int cur_c;
  int exp_q[$], cyc_q[$];
  bit inv_q[$];
  always @(posedge clk) begin
    if (!rst && x_valid) begin
      exp_q.push_back(int'(x) * cur_c);
      cyc_q.push_back(cyc);
      inv_q.push_back(reconf_busy);
    end
  end
  // outputs: every input produces either a valid result or a gap
  int outs_seen;
  always @(posedge clk) begin
    if (!rst) begin
      while (cyc_q.size() > 0 && cyc - cyc_q[0] == LAT) begin
        int e; bit inv;
        e = exp_q.pop_front();
        inv = inv_q.pop_front();
        void'(cyc_q.pop_front());
        checks++;
        if (inv) begin
          if (y_valid) begin
            failures++;
            $display("valid output during reconfiguration");
          end
        end else if (!y_valid || int'(y) != e) begin
          failures++;
          $display("c=%0d: y=%0d valid=%b expected %0d", cur_c, y, y_valid, e);
        end
      end
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic stream_all();
    for (int v = -128; v < 128; v++) begin
      x <= BX'(v);
      x_valid <= 1'b1;
      @(posedge clk);
    end
    x_valid <= 1'b0;
    repeat (LAT + 1) @(posedge clk);
  endtask

  initial begin
    int n;
    rst = 1'b1; x_valid = 1'b0; x = '0; reconf_req = 1'b0; coef = '0;
    cur_c = int'(INIT);
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1;
    n = 0;
    while (reconf_busy && n < 100) begin
      @(posedge clk);
      #1;
      n++;
    end
    check(n == RECONF, $sformatf("initial load took %0d cycles", n));
    stream_all();
    for (int c = -8; c < 8; c++) begin
      coef <= BC'(c);
      reconf_req <= 1'b1;
      @(posedge clk);
      reconf_req <= 1'b0;
      cur_c = c;
      // keep sampling during the reload: those results must be invalid
      n = 0;
      #1;
      while (reconf_busy && n < 100) begin
        x <= BX'($urandom);
        x_valid <= 1'b1;
        @(posedge clk);
        #1;
        n++;
      end
      check(n == RECONF, $sformatf("reconfiguration took %0d cycles", n));
      check(reconf_done, "done after reload");
      stream_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
