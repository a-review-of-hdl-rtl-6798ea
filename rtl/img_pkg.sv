// img_pkg: types and helpers shared by the real-time image enhancement pipeline.
//
// A pixel is three 8-bit colour channels (R, G, B), the width of the Rin/Gin/Bin
// and Rout/Gout/Bout ports of every filter. The pipeline has four positions, so a
// filter's position is a 2-bit number. The 8-bit order word packs the position of
// each filter in 2-bit fields: pseudo-colour in [1:0], contrast in [3:2], invert in
// [5:4] and brightness in [7:6]. The enum below numbers the filters by that field.
package img_pkg;

  localparam int unsigned CH_W     = 8;   // bits per colour channel
  localparam int unsigned N_FILT   = 4;   // filters, and pipeline positions
  localparam int unsigned POS_W    = 2;   // bits of one position field

  typedef logic [CH_W-1:0]  chan_t;
  typedef logic [POS_W-1:0] pos_t;

  typedef struct packed {
    chan_t r;
    chan_t g;
    chan_t b;
  } rgb_t;

  // Filter index = which 2-bit field of the order word holds its position.
  typedef enum logic [1:0] {
    F_PSEUDO   = 2'd0,
    F_CONTRAST = 2'd1,
    F_INVERT   = 2'd2,
    F_BRIGHT   = 2'd3
  } filt_e;

  // Position of filter f in an order word.
  function automatic pos_t order_of(input logic [2*N_FILT-1:0] order, input filt_e f);
    return order[2*f +: 2];
  endfunction

  // True when the order word gives the four filters four different positions.
  function automatic logic order_is_permutation(input logic [2*N_FILT-1:0] order);
    logic [N_FILT-1:0] used;
    used = '0;
    for (int f = 0; f < N_FILT; f++) used[order[2*f +: 2]] = 1'b1;
    return &used;
  endfunction

  // Clamp a signed intermediate result to the 0..255 range of a channel.
  function automatic chan_t sat8(input logic signed [15:0] v);
    if (v < 0)        return 8'd0;
    else if (v > 255) return 8'd255;
    else              return v[7:0];
  endfunction

endpackage
