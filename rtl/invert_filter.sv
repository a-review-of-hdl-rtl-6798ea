// invert_filter: produces the negative of an RGB pixel stream.
//
// Each channel is replaced by 255 minus its value (the bitwise complement), so
// dark regions become bright and the reverse. It has no setting.
//
// Interface: generic filter ports (Rin/Gin/Bin, Rout/Gout/Bout, rst, clk,
// data_in_ready, ready) as in the system's filter port list.
// Timing: one pixel per clock, one clock of latency; synchronous active-high rst
// clears the outputs and ready (reset style is this design's choice).
module invert_filter
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

  always_ff @(posedge clk) begin
    if (rst) begin
      Rout  <= '0;
      Gout  <= '0;
      Bout  <= '0;
      ready <= 1'b0;
    end else begin
      ready <= data_in_ready;
      if (data_in_ready) begin
        Rout <= 8'd255 - Rin;
        Gout <= 8'd255 - Gin;
        Bout <= 8'd255 - Bin;
      end
    end
  end

endmodule
