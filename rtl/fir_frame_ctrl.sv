// fir_frame_ctrl: block sequencer around the FIR filter.
//
// On a start pulse it latches a block of NIN input samples (ip[0] = ip1,
// ip[1] = ip2, ...), clears the filter's delay line and then streams the
// samples into the filter, one per clock, followed by TAPS-1 zero samples.
// The filter therefore produces the complete linear convolution of the
// block with the impulse response, NIN+TAPS-1 values, which appear on op
// one per clock, each marked by op_en.  op holds the last value afterwards.
// With ip = {1, 10, 100} and h = {1912, 1111, 1331} the result stream is
// 1912, 20231, 203641, 124410, 133100.
//
// The block-in/stream-out behaviour reproduces the reference waveforms; the
// state encoding, the single-cycle op_en per result, the done pulse and
// ignoring start while busy are this design's own choices.
//
// Interface: start is sampled on the rising edge while idle.  fir_clear is
// high for one cycle, then fir_x_valid is high for NIN+TAPS-1 cycles.  Each
// filter output (fir_y_valid) is registered onto op/op_en one cycle later.
// done pulses with the last op_en.
module fir_frame_ctrl #(
  parameter int unsigned WX   = 16,
  parameter int unsigned WO   = 29,
  parameter int unsigned NIN  = 3,
  parameter int unsigned TAPS = 3
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic signed [WX-1:0] ip [NIN],
  // to / from the FIR filter
  output logic                 fir_clear,
  output logic                 fir_x_valid,
  output logic signed [WX-1:0] fir_x,
  input  logic                 fir_y_valid,
  input  logic signed [WO-1:0] fir_y,
  // result stream
  output logic signed [WO-1:0] op,
  output logic                 op_en,
  output logic                 busy,
  output logic                 done
);

  localparam int unsigned NOUT = NIN + TAPS - 1;
  localparam int unsigned CW   = $clog2(NOUT + 1);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_FEED, S_DRAIN} state_e;
  state_e state;

  logic signed [WX-1:0] blk [NIN];
  logic [CW-1:0] n_in, n_out;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      n_in  <= '0;
      n_out <= '0;
      for (int i = 0; i < NIN; i++) blk[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          for (int i = 0; i < NIN; i++) blk[i] <= ip[i];
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          n_in  <= '0;
          n_out <= '0;
          state <= S_FEED;
        end
        S_FEED: begin
          n_in <= n_in + 1'b1;
          if (n_in == CW'(NOUT - 1)) state <= S_DRAIN;
        end
        S_DRAIN: ;
        default: state <= S_IDLE;
      endcase
      if (state != S_IDLE && state != S_CLEAR && fir_y_valid) begin
        n_out <= n_out + 1'b1;
        if (n_out == CW'(NOUT - 1)) state <= S_IDLE;
      end
    end
  end

  assign fir_clear   = (state == S_CLEAR);
  assign fir_x_valid = (state == S_FEED);
  always_comb begin
    fir_x = '0;
    for (int i = 0; i < NIN; i++)
      if (n_in == CW'(i)) fir_x = blk[i];
  end
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      op    <= '0;
      op_en <= 1'b0;
      done  <= 1'b0;
    end else begin
      op_en <= 1'b0;
      done  <= 1'b0;
      if (state != S_IDLE && state != S_CLEAR && fir_y_valid) begin
        op    <= fir_y;
        op_en <= 1'b1;
        done  <= (n_out == CW'(NOUT - 1));
      end
    end
  end

  // Results only arrive while a block is running, and done marks a result.
  a_op_en_in_block: assert property (@(posedge clk) disable iff (rst)
                                     op_en |-> $past(busy));
  a_done_with_op:   assert property (@(posedge clk) disable iff (rst)
                                     done |-> op_en);

endmodule
