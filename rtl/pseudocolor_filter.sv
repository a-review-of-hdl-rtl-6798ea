// pseudocolor_filter: pseudo-colouring of an RGB pixel stream.
//
// The pixel's intensity is taken as the luma Y = (77*R + 150*G + 29*B) >> 8
// (ITU-R BT.601 weights in 8-bit fixed point; a grey pixel keeps its value). Y
// then picks a colour from a four-segment palette running blue -> cyan -> green
// -> yellow -> red. Y[7:6] selects the segment and t = {Y[5:0], Y[5:4]} (0..255)
// is the ramp within it:
//   segment 0: (R,G,B) = (0,   t,       255)
//   segment 1: (R,G,B) = (0,   255,     255-t)
//   segment 2: (R,G,B) = (t,   255,     0)
//   segment 3: (R,G,B) = (255, 255-t,   0)
// Small differences in grey level, hard to see in an ultrasound image, so become
// differences in hue. The luma weights and the palette are this design's own
// choice; only "pseudo-coloring" is specified.
//
// Interface: generic filter ports (Rin/Gin/Bin, Rout/Gout/Bout, rst, clk,
// data_in_ready, ready) as in the system's filter port list; no setting.
// Timing: one pixel per clock, one clock of latency; synchronous active-high rst.
module pseudocolor_filter
  import img_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  data_in_ready,
  input  chan_t Rin,
  input  chan_t Gin,
  input  chan_t Bin,
  output chan_t Rout,
  output chan_t Gout,
  output chan_t Bout,
  output logic  ready
);

  chan_t       y;
  chan_t       t;
  rgb_t        col;

  always_comb begin
    y     = 8'((16'd77 * 16'(Rin) + 16'd150 * 16'(Gin) + 16'd29 * 16'(Bin)) >> 8);
    t     = {y[5:0], y[5:4]};
    unique case (y[7:6])
      2'd0:    col = '{r: 8'd0,   g: t,          b: 8'd255};
      2'd1:    col = '{r: 8'd0,   g: 8'd255,     b: 8'd255 - t};
      2'd2:    col = '{r: t,      g: 8'd255,     b: 8'd0};
      default: col = '{r: 8'd255, g: 8'd255 - t, b: 8'd0};
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      Rout  <= '0;
      Gout  <= '0;
      Bout  <= '0;
      ready <= 1'b0;
    end else begin
      ready <= data_in_ready;
      if (data_in_ready) begin
        Rout <= col.r;
        Gout <= col.g;
        Bout <= col.b;
      end
    end
  end

endmodule
