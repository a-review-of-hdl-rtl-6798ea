// brightness_filter: brightness transformation of an RGB pixel stream.
//
// Each channel gets the same signed offset added, and the sum is clamped to
// 0..255: out = min(255, max(0, in + offset)). The offset is a user setting that is
// meant to stay constant while an image streams through.
//
// Interface: the port names and widths of the generic filter (Rin/Gin/Bin in,
// Rout/Gout/Bout out, rst, clk, data_in_ready, ready) follow the filter port list of
// the system; the offset input, its width and the arithmetic are this design's own
// choice, since only "brightness transformation" is specified.
// Timing: one pixel per clock; the result and ready appear one clock after the
// pixel is presented with data_in_ready high. rst is synchronous, active high,
// and clears the outputs and ready.
module brightness_filter
  import img_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              data_in_ready,
  input  chan_t             Rin,
  input  chan_t             Gin,
  input  chan_t             Bin,
  input  logic signed [8:0] offset,        // -256..255 added to every channel
  output chan_t             Rout,
  output chan_t             Gout,
  output chan_t             Bout,
  output logic              ready
);

  function automatic chan_t add_sat(input chan_t c, input logic signed [8:0] d);
    logic signed [15:0] s;
    s = $signed({8'd0, c}) + 16'(d);
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
        Rout <= add_sat(Rin, offset);
        Gout <= add_sat(Gin, offset);
        Bout <= add_sat(Bin, offset);
      end
    end
  end

endmodule
