// contrast_filter: contrast transformation of an RGB pixel stream.
//
// Each channel is stretched (or compressed) about mid-grey 128 by a gain in
// unsigned 4.4 fixed point (16 = x1.0, 32 = x2.0, 8 = x0.5):
//   out = clamp(((in - 128) * gain) >>> 4 + 128, 0, 255)
// where >>> is an arithmetic shift (rounds toward minus infinity). The gain is a
// user setting held constant while an image streams through.
//
// Interface: generic filter ports (Rin/Gin/Bin, Rout/Gout/Bout, rst, clk,
// data_in_ready, ready) as in the system's filter port list; the gain input, its
// format and the formula are this design's own choice, since only "contrast
// transformation" is specified.
// Timing: one pixel per clock, one clock of latency; synchronous active-high rst.
module contrast_filter
  import img_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       data_in_ready,
  input  chan_t      Rin,
  input  chan_t      Gin,
  input  chan_t      Bin,
  input  logic [7:0] gain,          // unsigned 4.4 fixed point
  output chan_t      Rout,
  output chan_t      Gout,
  output chan_t      Bout,
  output logic       ready
);

  function automatic chan_t stretch(input chan_t c, input logic [7:0] k);
    logic signed [8:0]  d;   // in - 128: -128..127
    logic signed [17:0] p;   // d * k: -32640..32385
    logic signed [15:0] s;
    d = $signed({1'b0, c}) - 9'sd128;
    p = d * $signed({1'b0, k});
    s = 16'(p >>> 4) + 16'sd128;
    return sat8(s);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      Rout  <= '0;
      Gout  <= '0;
      Bout  <= '0;
      ready <= 1'b0;
    end else begin
      ready <= data_in_ready;
      if (data_in_ready) begin
        Rout <= stretch(Rin, gain);
        Gout <= stretch(Gin, gain);
        Bout <= stretch(Bin, gain);
      end
    end
  end

endmodule
