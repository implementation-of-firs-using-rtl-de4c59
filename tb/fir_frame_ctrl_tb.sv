// fir_frame_ctrl_tb: self-checking testbench of the block sequencer.  The
// filter it drives is modelled here by a plain three-tap FIR with the
// coefficients 1912, 1111, 1331 and the 4-cycle latency of fir_rcm, and it clears
// its state on fir_clear.  The test runs the reference block
// ip = {1, 10, 100} (expected op stream 1912, 20231, 203641, 124410,
// 133100) and then random blocks, and checks every op value, the number of
// results per block, the done pulse on the last one, the 6-cycle delay from
// start to the first op_en, that op holds after the block, and that a start
// while busy is ignored.
module fir_frame_ctrl_tb;
  localparam int unsigned WX = 16, WO = 29, NIN = 3, TAPS = 3, FLAT = 4;
  localparam longint H [TAPS] = '{1912, 1111, 1331};

  logic clk = 1'b0;
  logic rst, start;
  logic signed [WX-1:0] ip [NIN];
  logic fir_clear, fir_x_valid, fir_y_valid;
  logic signed [WX-1:0] fir_x;
  logic signed [WO-1:0] fir_y;
  logic signed [WO-1:0] op;
  logic op_en, busy, done;

  int checks = 0, failures = 0;

  fir_frame_ctrl #(.WX(WX), .WO(WO), .NIN(NIN), .TAPS(TAPS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Filter model: 4-cycle pipeline
  longint hist [TAPS];
  logic   vpipe [FLAT];
  longint ypipe [FLAT];
  initial foreach (vpipe[i]) vpipe[i] = 1'b0;
  always @(posedge clk) begin
    longint acc;
    for (int i = FLAT - 1; i > 0; i--) begin
      vpipe[i] <= vpipe[i-1];
      ypipe[i] <= ypipe[i-1];
    end
    if (fir_clear) foreach (hist[k]) hist[k] = 0;
    vpipe[0] <= fir_x_valid;
    if (fir_x_valid) begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = fir_x;
      acc = 0;
      for (int k = 0; k < TAPS; k++) acc += H[k] * hist[k];
      ypipe[0] <= acc;
    end
  end
  assign fir_y_valid = vpipe[FLAT-1];
  assign fir_y       = WO'(ypipe[FLAT-1]);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_block(input longint a [NIN], input bit poke_start);
    longint exp [NIN + TAPS - 1];
    int n, t0, first;
    for (int j = 0; j < NIN + TAPS - 1; j++) begin
      exp[j] = 0;
      for (int k = 0; k < TAPS; k++)
        if (j - k >= 0 && j - k < NIN) exp[j] += H[k] * a[j-k];
    end
    for (int i = 0; i < NIN; i++) ip[i] <= WX'(a[i]);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    t0 = 0; n = 0; first = -1;
    while (n < NIN + TAPS - 1 && t0 < 40) begin
      @(posedge clk);
      t0++;
      if (poke_start && t0 == 3) begin
        for (int i = 0; i < NIN; i++) ip[i] <= '0;
        start <= 1'b1;
      end else start <= 1'b0;
      #1;
      if (op_en) begin
        if (first < 0) first = t0;
        check(longint'(op) == exp[n], $sformatf("op[%0d]=%0d expected %0d", n, op, exp[n]));
        check(done == (n == NIN + TAPS - 2), "done marks the last result");
        n++;
      end
    end
    check(n == NIN + TAPS - 1, $sformatf("%0d results", n));
    check(first == 6, $sformatf("first result after %0d cycles", first));
    repeat (3) @(posedge clk);
    #1;
    check(!op_en && !busy && longint'(op) == exp[NIN + TAPS - 2], "op holds, idle");
  endtask

  initial begin
    rst = 1'b1; start = 1'b0;
    foreach (ip[i]) ip[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run_block('{1, 10, 100}, 1'b0);
    run_block('{1, 10, 100}, 1'b1);
    for (int b = 0; b < 30; b++) begin
      longint a [NIN];
      foreach (a[i]) a[i] = longint'($signed(WX'($urandom)));
      run_block(a, b % 5 == 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
