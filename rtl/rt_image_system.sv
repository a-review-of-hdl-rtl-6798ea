// rt_image_system: real-time configurable image enhancement pipeline.
//
// Four pixel filters - pseudo-colour, contrast, brightness and invert - are
// built once each and chained into a four-position pipeline. An 8-bit order word
// (Filter_order) gives each filter its position, two bits per filter:
// pseudo-colour [1:0], contrast [3:2], invert [5:4], brightness [7:6]. Position 0
// sees the incoming pixel; the filter at position k (k > 0) reads the output
// vector of position k-1, and the output of position 3 is the system output.
// Changing Filter_order re-routes the filters from the next clock on, with no
// flush ("on the fly"): pixels already inside the pipeline then finish along the
// new route, so up to three pixels around the switch may see a mixture of the
// two orders. The structure, the order-word layout and the output-vector priority
// follow the system description; the filter arithmetic, the setting ports
// (brightness_offset, contrast_gain) and the reset style are this design's own.
//
// Interface: one RGB pixel (Rin, Gin, Bin) per clock, qualified by
// data_in_ready; the result comes out on Rout/Gout/Bout qualified by ready.
// Settings are meant to be held constant while an image streams through, and
// Filter_order must be a permutation (an assertion checks this while pixels
// arrive).
// Timing: throughput one pixel per clock, latency four clocks (one per filter),
// no back-pressure. rst is synchronous and active high.
module rt_image_system
  import img_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              data_in_ready,
  input  chan_t             Rin,
  input  chan_t             Gin,
  input  chan_t             Bin,
  input  logic [7:0]        Filter_order,
  input  logic signed [8:0] brightness_offset,
  input  logic [7:0]        contrast_gain,
  output chan_t             Rout,
  output chan_t             Gout,
  output chan_t             Bout,
  output logic              ready
);

  // Registered outputs of the four filters, indexed by filt_e.
  rgb_t filt_px  [N_FILT];
  logic filt_rdy [N_FILT];

  // Output vector of each pipeline position.
  rgb_t stage_px  [N_FILT];
  logic stage_rdy [N_FILT];

  // What each filter reads: the pixel input when it sits at position 0,
  // otherwise the output vector of the position before its own.
  rgb_t filt_in  [N_FILT];
  logic filt_in_rdy [N_FILT];

  always_comb begin
    for (int f = 0; f < N_FILT; f++) begin
      pos_t p;
      p = order_of(Filter_order, filt_e'(f));
      if (p == 2'd0) begin
        filt_in[f]     = '{r: Rin, g: Gin, b: Bin};
        filt_in_rdy[f] = data_in_ready;
      end else begin
        filt_in[f]     = stage_px[p - 2'd1];
        filt_in_rdy[f] = stage_rdy[p - 2'd1];
      end
    end
  end

  pseudocolor_filter u_pseudo (
    .clk, .rst,
    .data_in_ready(filt_in_rdy[F_PSEUDO]),
    .Rin(filt_in[F_PSEUDO].r), .Gin(filt_in[F_PSEUDO].g), .Bin(filt_in[F_PSEUDO].b),
    .Rout(filt_px[F_PSEUDO].r), .Gout(filt_px[F_PSEUDO].g), .Bout(filt_px[F_PSEUDO].b),
    .ready(filt_rdy[F_PSEUDO])
  );

  contrast_filter u_contrast (
    .clk, .rst,
    .data_in_ready(filt_in_rdy[F_CONTRAST]),
    .Rin(filt_in[F_CONTRAST].r), .Gin(filt_in[F_CONTRAST].g), .Bin(filt_in[F_CONTRAST].b),
    .gain(contrast_gain),
    .Rout(filt_px[F_CONTRAST].r), .Gout(filt_px[F_CONTRAST].g), .Bout(filt_px[F_CONTRAST].b),
    .ready(filt_rdy[F_CONTRAST])
  );

  invert_filter u_invert (
    .clk, .rst,
    .data_in_ready(filt_in_rdy[F_INVERT]),
    .Rin(filt_in[F_INVERT].r), .Gin(filt_in[F_INVERT].g), .Bin(filt_in[F_INVERT].b),
    .Rout(filt_px[F_INVERT].r), .Gout(filt_px[F_INVERT].g), .Bout(filt_px[F_INVERT].b),
    .ready(filt_rdy[F_INVERT])
  );

  brightness_filter u_bright (
    .clk, .rst,
    .data_in_ready(filt_in_rdy[F_BRIGHT]),
    .Rin(filt_in[F_BRIGHT].r), .Gin(filt_in[F_BRIGHT].g), .Bin(filt_in[F_BRIGHT].b),
    .offset(brightness_offset),
    .Rout(filt_px[F_BRIGHT].r), .Gout(filt_px[F_BRIGHT].g), .Bout(filt_px[F_BRIGHT].b),
    .ready(filt_rdy[F_BRIGHT])
  );

  for (genvar s = 0; s < N_FILT; s++) begin : g_stage
    stage_select #(.STAGE(s)) u_sel (
      .order    (Filter_order),
      .filt_px  (filt_px),
      .filt_rdy (filt_rdy),
      .stage_px (stage_px[s]),
      .stage_rdy(stage_rdy[s])
    );
  end

  // Usage rule: while pixels stream, every filter must own a position of its
  // own. A repeated position would make the priority chain of stage_select drop
  // a filter from the path.
  a_order_perm: assert property (@(posedge clk) disable iff (rst)
                                 data_in_ready |-> order_is_permutation(Filter_order))
    else $error("Filter_order %02h does not give each filter its own position", Filter_order);

  assign Rout  = stage_px[N_FILT-1].r;
  assign Gout  = stage_px[N_FILT-1].g;
  assign Bout  = stage_px[N_FILT-1].b;
  assign ready = stage_rdy[N_FILT-1];

endmodule
