// am_demod: amplitude demodulation accelerator for the video decoder's
// luminance signal, working one sample at a time.
//
// Each input word carries a signed 16-bit sample in bits 15:0. The sample is
// rectified, smoothed by a first-order low-pass filter
//   y <= y + (|x| - y) / 2^SHIFT
// (an envelope detector), and scaled by a gain in 8.8 fixed point:
//   out = (y * GAIN) >> 8, an unsigned value in the low bits of the word.
// GAIN (register 0, reset 256 = 1.0) and SHIFT (register 1, reset
// SHIFT_RESET) are written over the ring through the configuration port.
// Handshake with the NI shell: a sample is taken (in_read high for one cycle)
// when in_valid is high and the one-word output register is empty or being
// emptied in the same cycle; the result is in the output register the next
// cycle. Throughput one sample per cycle, latency one cycle.
// Only the accelerator's role and its ring-programmable gain come from the
// published design; the algorithm and the register layout are this design's
// own.
module am_demod
  import ring_pkg::*;
#(
  parameter int unsigned SHIFT_RESET = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  // input stream from the shell
  input  logic       in_valid,
  input  word_t      in_data,
  output logic       in_read,
  // output stream to the shell
  output logic       out_valid,
  output word_t      out_data,
  input  logic       out_ready,
  // configuration
  input  logic       cfg_we,
  input  logic [3:0] cfg_addr,
  input  word_t      cfg_data
);

  logic [15:0] gain;
  logic [3:0]  shift;
  logic [16:0] env;      // envelope, 0 .. 32768
  logic [16:0] rect;
  logic [16:0] env_next;
  logic signed [17:0] diff;
  logic signed [15:0] x;

  always_comb begin
    x        = signed'(in_data[15:0]);
    rect     = x[15] ? 17'(-18'(x)) : 17'(x);
    diff     = signed'({1'b0, rect}) - signed'({1'b0, env});
    env_next = 17'(signed'({1'b0, env}) + (diff >>> shift));
  end

  assign in_read = in_valid && (!out_valid || out_ready);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gain      <= 16'd256;
      shift     <= 4'(SHIFT_RESET);
      env       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (cfg_we && cfg_addr == 4'd0) gain  <= cfg_data[15:0];
      if (cfg_we && cfg_addr == 4'd1) shift <= cfg_data[3:0];
      if (in_read) begin
        env       <= env_next;
        out_valid <= 1'b1;
        out_data  <= DATA_W'((33'(env_next) * 33'(gain)) >> 8);
      end else if (out_ready) begin
        out_valid <= 1'b0;
      end
    end
  end

endmodule
