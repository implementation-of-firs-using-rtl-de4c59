// rcm_fir_top_tb: end-to-end testbench of the whole design at its default
// size.  Both datapaths run at the same time.
//
// FIR path: the reference block ip = {1, 10, 100} with h = 1912, 1111, 1331
// must give 1912, 20231, 203641, 124410, 133100; then random blocks with a
// new random coefficient selection per block (a filter reconfiguration)
// are checked against a reference convolution, and a start pulse is sent
// while a block is running (it must be ignored).
// KCM path: the multiplier is reconfigured to random coefficients while
// random samples stream in; every valid product is checked against x*c and
// samples taken during a reload must come out invalid.
// Each mechanism (filter reconfiguration, ignored start, KCM reload, KCM
// invalid output during a reload) is counted and must happen at least once.
module rcm_fir_top_tb;
  import rcm_pkg::*;

  localparam int unsigned WX = 16, NIN = 3, TAPS = 3, WO = 29, KBX = 8, KBC = 4;

  logic clk = 1'b0;
  logic rst, start, op_en, busy, done;
  logic signed [WX-1:0] ip [NIN];
  rcm_cfg_e coef_sel [TAPS];
  logic signed [WO-1:0] op;
  logic kcm_x_valid, kcm_reconf_req, kcm_reconf_busy, kcm_reconf_done, kcm_y_valid;
  logic signed [KBX-1:0] kcm_x;
  logic signed [KBC-1:0] kcm_coef;
  logic signed [KBX+KBC-1:0] kcm_y;

  int checks = 0, failures = 0;
  int n_fir_reconf = 0, n_ignored_start = 0, n_kcm_reload = 0, n_kcm_invalid = 0;
  bit fir_finished = 0;

  rcm_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic longint coef_of(rcm_cfg_e c);
    return (c == CFG_1912) ? 1912 : (c == CFG_1111) ? 1111 : 1331;
  endfunction

  // ---------------- FIR path ----------------
  task automatic run_block(input longint a [NIN], input rcm_cfg_e sel [TAPS], input bit poke);
    longint exp [NIN + TAPS - 1];
    int n, t;
    for (int j = 0; j < NIN + TAPS - 1; j++) begin
      exp[j] = 0;
      for (int k = 0; k < TAPS; k++)
        if (j - k >= 0 && j - k < NIN) exp[j] += coef_of(sel[k]) * a[j-k];
    end
    for (int k = 0; k < TAPS; k++) if (coef_sel[k] != sel[k]) begin
      n_fir_reconf++;
      break;
    end
    for (int k = 0; k < TAPS; k++) coef_sel[k] <= sel[k];
    for (int i = 0; i < NIN; i++) ip[i] <= WX'(a[i]);
    start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    n = 0; t = 0;
    while (n < NIN + TAPS - 1 && t < 50) begin
      @(posedge clk);
      t++;
      if (poke && t == 2) begin
        start <= 1'b1;
        n_ignored_start++;
      end else start <= 1'b0;
      #1;
      if (op_en) begin
        check(longint'(op) == exp[n], $sformatf("op[%0d]=%0d expected %0d", n, op, exp[n]));
        if (n == 0) check(t == 6, $sformatf("first result after %0d cycles", t));
        n++;
      end
    end
    check(n == NIN + TAPS - 1 && done, $sformatf("%0d results, done=%b", n, done));
    @(posedge clk);
    #1;
    check(!busy && !op_en, "idle after the block");
  endtask

  initial begin
    rcm_cfg_e sel [TAPS];
    longint a [NIN];
    rst = 1'b1; start = 1'b0;
    foreach (ip[i]) ip[i] = '0;
    foreach (coef_sel[k]) coef_sel[k] = rcm_cfg_e'(k);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    sel = '{CFG_1912, CFG_1111, CFG_1331};
    run_block('{1, 10, 100}, sel, 1'b0);
    for (int b = 0; b < 200; b++) begin
      foreach (sel[k]) sel[k] = rcm_cfg_e'($urandom_range(0, 2));
      foreach (a[i]) a[i] = longint'($signed(WX'($urandom)));
      run_block(a, sel, b % 7 == 3);
    end
    fir_finished = 1;
  end

  // ---------------- KCM path ----------------
  int kcm_c;

  initial begin
    bit pipe_v [2];
    int pipe_e [2];
    bit pipe_i [2];
    kcm_x_valid = 1'b0; kcm_x = '0; kcm_reconf_req = 1'b0; kcm_coef = '0;
    kcm_c = 0;   // default INIT_COEF
    pipe_v = '{0, 0};
    @(negedge rst);
    for (int i = 0; i < 8000; i++) begin
      bit req;
      int newc;
      // drive inputs for the coming edge
      req = (i % 300 == 150);
      newc = int'($signed(KBC'($urandom)));
      kcm_reconf_req <= req;
      kcm_coef <= KBC'(newc);
      kcm_x <= KBX'($urandom);
      kcm_x_valid <= ($urandom_range(0, 3) != 0);
      @(posedge clk);
      // at this edge, inputs were sampled with the current busy state
      // and the coefficient then in force
      pipe_v[1] = pipe_v[0]; pipe_e[1] = pipe_e[0]; pipe_i[1] = pipe_i[0];
      pipe_v[0] = kcm_x_valid;
      pipe_e[0] = int'(kcm_x) * kcm_c;
      pipe_i[0] = kcm_reconf_busy;
      if (req && !kcm_reconf_busy) begin
        kcm_c = newc;
        n_kcm_reload++;
      end
      #1;
      if (pipe_v[1]) begin
        if (pipe_i[1]) begin
          check(!kcm_y_valid, "KCM output marked invalid during reload");
          n_kcm_invalid++;
        end else
          check(kcm_y_valid && int'(kcm_y) == pipe_e[1],
                $sformatf("kcm y=%0d valid=%b expected %0d", kcm_y, kcm_y_valid, pipe_e[1]));
      end else check(!kcm_y_valid, "no KCM output without input");
    end
    wait (fir_finished);
    $display("filter reconfigurations %0d, ignored starts %0d, KCM reloads %0d, KCM invalid outputs %0d",
             n_fir_reconf, n_ignored_start, n_kcm_reload, n_kcm_invalid);
    check(n_fir_reconf > 0, "filter reconfiguration exercised");
    check(n_ignored_start > 0, "start while busy exercised");
    check(n_kcm_reload > 0, "KCM reload exercised");
    check(n_kcm_invalid > 0, "KCM invalid output during reload exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
