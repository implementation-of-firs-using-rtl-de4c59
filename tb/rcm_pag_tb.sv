// rcm_pag_tb: self-checking testbench of the fused adder-graph
// reconfigurable constant multiplier.  Random signed inputs with a random
// configuration on every cycle (including the unused code 3, which must act
// like 1331) are pushed back to back; every output is compared, three
// cycles later, with x times the constant computed by ordinary
// multiplication.  The fixed values 1, 100 and 1111 are applied in all
// three configurations first (expected 1912/1111/1331, 191200/111100/133100,
// 2124232/1234321/1478741), together with the input extremes.
module rcm_pag_tb;
  import rcm_pkg::*;

  localparam int unsigned WX = 16;
  localparam int unsigned WY = WX + COEF_GROWTH;
  localparam int unsigned LAT = 3;

  logic clk = 1'b0;
  logic rst;
  logic in_valid;
  rcm_cfg_e cfg;
  logic signed [WX-1:0] x;
  logic out_valid;
  logic signed [WY-1:0] y;

  int checks = 0, failures = 0;

  rcm_pag #(.WX(WX)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected-value queue, filled at input, consumed at output.
  longint exp_q[$];
  int cyc_in[$];
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (!rst && in_valid) begin
      longint c;
      c = (cfg == CFG_1912) ? 1912 : (cfg == CFG_1111) ? 1111 : 1331;
      exp_q.push_back(longint'(x) * c);
      cyc_in.push_back(cyc);
    end
    if (!rst && out_valid) begin
      longint e;
      int     c0;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output %0d", y);
      end else begin
        e = exp_q.pop_front();
        c0 = cyc_in.pop_front();
        if (longint'(y) != e || cyc - c0 != LAT) begin
          failures++;
          $display("mismatch: y=%0d expected %0d latency %0d", y, e, cyc - c0);
        end
      end
    end
  end

  task automatic drive(input logic signed [WX-1:0] v, input rcm_cfg_e c);
    x <= v;
    cfg <= c;
    in_valid <= 1'b1;
    @(posedge clk);
  endtask

  initial begin
    rst = 1'b1;
    in_valid = 1'b0;
    x = '0;
    cfg = CFG_1912;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int c = 0; c < 3; c++) begin
      drive(16'sd1, rcm_cfg_e'(c));
      drive(16'sd100, rcm_cfg_e'(c));
      drive(16'sd1111, rcm_cfg_e'(c));
      drive(16'sh7fff, rcm_cfg_e'(c));
      drive(-16'sh8000, rcm_cfg_e'(c));
      drive(-16'sd1, rcm_cfg_e'(c));
    end
    for (int i = 0; i < 2000; i++) begin
      drive(WX'($urandom), rcm_cfg_e'($urandom_range(0, 3)));
      if ($urandom_range(0, 7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (LAT + 2) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
