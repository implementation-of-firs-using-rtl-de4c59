// cfg_lut_tb: self-checking testbench of the serially loaded LUT.  It loads
// random 32-bit truth tables, most significant entry first, one bit per
// clock with ce high, then reads all 32 entries and the cascade output.  It
// also checks that the table holds while ce is low and that a partial load
// shifts the old contents up by the number of bits shifted in.
module cfg_lut_tb;
  localparam int unsigned AW = 5, DEPTH = 32;

  logic clk = 1'b0;
  logic ce, cdi, o, cdo;
  logic [AW-1:0] addr;

  int checks = 0, failures = 0;

  cfg_lut #(.AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(input logic [DEPTH-1:0] t, input int nbits);
    for (int i = nbits - 1; i >= 0; i--) begin
      ce <= 1'b1;
      cdi <= t[i];
      @(posedge clk);
    end
    ce <= 1'b0;
    cdi <= 1'b0;
    @(posedge clk);
  endtask

  task automatic verify(input logic [DEPTH-1:0] t);
    for (int a = 0; a < DEPTH; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (o !== t[a]) begin
        failures++;
        $display("entry %0d = %b expected %b", a, o, t[a]);
      end
    end
    checks++;
    if (cdo !== t[DEPTH-1]) failures++;
  endtask

  initial begin
    logic [DEPTH-1:0] t, t2;
    ce = 1'b0; cdi = 1'b0; addr = '0;
    @(posedge clk);
    for (int n = 0; n < 50; n++) begin
      t = $urandom;
      load(t, DEPTH);
      verify(t);
      // ce low: nothing changes
      cdi <= 1'b1;
      repeat (3) @(posedge clk);
      verify(t);
      // partial load of 5 bits
      t2 = $urandom;
      load(t2, 5);
      verify({t[DEPTH-6:0], t2[4:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
