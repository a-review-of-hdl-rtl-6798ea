// stage_select: the output vector of one position of the filter pipeline.
//
// The four filters are fixed pieces of hardware; what changes is the order in
// which a pixel visits them. Position STAGE of the pipeline carries the output of
// whichever filter the order word assigns to that position. The choice is a
// priority chain, in this order: pseudo-colour, contrast, invert, and brightness
// when none of the first three holds the position. With a proper order word (each
// position used exactly once) the priority never matters; with a repeated
// position the earlier filter in the chain wins and a position nobody claims
// shows the brightness filter. Both the chain and the field layout of the order
// word follow the system description.
//
// Interface: order is the 8-bit order word (fields as in img_pkg); filt_px and
// filt_rdy are the registered outputs and ready flags of the four filters,
// indexed by img_pkg::filt_e. Purely combinational.
module stage_select
  import img_pkg::*;
#(
  parameter int unsigned STAGE = 0          // pipeline position 0..3
) (
  input  logic [7:0] order,
  input  rgb_t       filt_px  [N_FILT],
  input  logic       filt_rdy [N_FILT],
  output rgb_t       stage_px,
  output logic       stage_rdy
);

  localparam pos_t POS = pos_t'(STAGE);

  filt_e sel;

  always_comb begin
    if      (order_of(order, F_PSEUDO)   == POS) sel = F_PSEUDO;
    else if (order_of(order, F_CONTRAST) == POS) sel = F_CONTRAST;
    else if (order_of(order, F_INVERT)   == POS) sel = F_INVERT;
    else                                         sel = F_BRIGHT;
    stage_px  = filt_px[sel];
    stage_rdy = filt_rdy[sel];
  end

endmodule
