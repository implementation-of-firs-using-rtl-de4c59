// kcm_reconf_ctrl_tb: self-checking testbench of the KCM reconfiguration
// controller.  It records the bit streams the controller shifts out while
// busy, rebuilds from them the K*BLUT one-bit tables exactly as the shift
// registers of the LUT primitives would hold them, and checks every used
// entry against c * chunk (low chunk unsigned, top chunk signed) and every
// unused entry against zero.  It checks the load of INIT_COEF after reset,
// loads of all 16 coefficients, that busy lasts exactly 32 cycles and that
// done follows in the next cycle.
module kcm_reconf_ctrl_tb;
  localparam int unsigned BX = 8, BC = 4, L = 4, K = 2, BLUT = 8, AW = 5, DEPTH = 32;
  localparam logic signed [BC-1:0] INIT = -4'sd3;

  logic clk = 1'b0;
  logic rst, req, busy, done, ready;
  logic signed [BC-1:0] coef;
  logic [BLUT-1:0] cdi [K];

  int checks = 0, failures = 0;

  kcm_reconf_ctrl #(.BX(BX), .BC(BC), .L(L), .AW(AW), .INIT_COEF(INIT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model of the LUT shift registers
  logic [DEPTH-1:0] tbl [K][BLUT];
  int busy_cycles;
  always @(posedge clk) begin
    if (!rst && busy) begin
      busy_cycles++;
      for (int k = 0; k < K; k++)
        for (int b = 0; b < BLUT; b++) tbl[k][b] = {tbl[k][b][DEPTH-2:0], cdi[k][b]};
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wait_and_verify(input int c);
    int guard = 0;
    while (!done && guard < 100) begin
      @(posedge clk);
      #1;
      guard++;
    end
    check(busy_cycles == DEPTH, $sformatf("busy for %0d cycles", busy_cycles));
    check(!busy && ready, "busy low and ready with done");
    for (int e = 0; e < DEPTH; e++)
      for (int k = 0; k < K; k++) begin
        int v, expv, got;
        logic [BLUT-1:0] w;
        for (int b = 0; b < BLUT; b++) w[b] = tbl[k][b][e];
        got = int'($signed(w));
        if (e >= 2 ** L) expv = 0;
        else begin
          v = (k == K - 1) ? int'($signed(4'(e))) : e;
          expv = c * v;
        end
        check(got == expv, $sformatf("c=%0d table %0d entry %0d = %0d expected %0d", c, k, e, got, expv));
      end
  endtask

  initial begin
    rst = 1'b1; req = 1'b0; coef = '0; busy_cycles = 0;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    wait_and_verify(int'(INIT));
    for (int c = -8; c < 8; c++) begin
      @(posedge clk);
      busy_cycles = 0;
      coef <= BC'(c);
      req <= 1'b1;
      @(posedge clk);
      req <= 1'b0;
      coef <= '0;
      #1;
      check(busy && !ready, "busy and not ready right after req");
      wait_and_verify(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
