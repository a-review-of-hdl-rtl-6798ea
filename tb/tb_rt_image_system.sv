// tb_rt_image_system: end-to-end testbench of the configurable filter pipeline.
//
// Streams synthetic ultrasound-like frames (a bright fan on a dark background,
// dark round "cysts" and speckle noise) through the pipeline, one frame for each
// of the 24 orders of the four filters, with random brightness and contrast
// settings and random idle cycles. Half way through each frame the order word is
// switched to another permutation while pixels are in flight, which is the
// system's on-the-fly reconfiguration. Outputs are checked against a reference
// that applies the four filters, written here in plain integer arithmetic, in the
// order the order word gives, four clocks after the pixel went in. Pixels that
// were inside the pipeline while the configuration changed are not compared
// (they may see a mix of the two orders); all others are, together with ready.
// A mid-stream reset is applied once. Each mechanism is counted and a failure is
// counted for any that never happened.
module tb_rt_image_system;
  import img_pkg::*;

  localparam int W = 256;            // frame width in pixels
  localparam int H = 256;            // frame height in pixels
  localparam int LAT = 4;            // clocks from input pixel to output pixel

  logic              clk;
  logic              rst;
  logic              data_in_ready;
  chan_t             Rin, Gin, Bin;
  logic [7:0]        Filter_order;
  logic signed [8:0] brightness_offset;
  logic [7:0]        contrast_gain;
  chan_t             Rout, Gout, Bout;
  logic              ready;

  rt_image_system dut (.*);

  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // mechanism counters
  int n_perm_seen [24];
  int n_switch_in_flight = 0;
  int n_idle = 0;
  int n_bright_sat_hi = 0, n_bright_sat_lo = 0;
  int n_contrast_clip = 0;
  int n_pseudo_seg [4];
  int n_mixed = 0;
  int n_reset_mid = 0;
  int n_out = 0;

  // ---------------- reference model ----------------
  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  function automatic int fdiv16(input int x);
    return (x >= 0) ? x / 16 : -((-x + 15) / 16);
  endfunction

  typedef struct {
    int r, g, b;
  } px_t;

  typedef struct packed {
    logic [7:0]        order;
    logic signed [8:0] off;
    logic [7:0]        gain;
  } cfg_t;

  function automatic px_t f_pseudo(input px_t p, input bit count);
    px_t q; int y, seg, t;
    y = (77 * p.r + 150 * p.g + 29 * p.b) / 256;
    seg = y / 64; t = (y % 64) * 4 + (y % 64) / 16;
    if (count) n_pseudo_seg[seg]++;
    case (seg)
      0: q = '{0, t, 255};
      1: q = '{0, 255, 255 - t};
      2: q = '{t, 255, 0};
      default: q = '{255, 255 - t, 0};
    endcase
    return q;
  endfunction

  function automatic px_t f_contrast(input px_t p, input int gain, input bit count);
    px_t q; int vr, vg, vb;
    vr = fdiv16((p.r - 128) * gain) + 128;
    vg = fdiv16((p.g - 128) * gain) + 128;
    vb = fdiv16((p.b - 128) * gain) + 128;
    if (count && (vr != clamp(vr) || vg != clamp(vg) || vb != clamp(vb))) n_contrast_clip++;
    q = '{clamp(vr), clamp(vg), clamp(vb)};
    return q;
  endfunction

  function automatic px_t f_invert(input px_t p);
    px_t q;
    q = '{255 - p.r, 255 - p.g, 255 - p.b};
    return q;
  endfunction

  function automatic px_t f_bright(input px_t p, input int off, input bit count);
    px_t q;
    if (count && (p.r + off > 255 || p.g + off > 255 || p.b + off > 255)) n_bright_sat_hi++;
    if (count && (p.r + off < 0 || p.g + off < 0 || p.b + off < 0)) n_bright_sat_lo++;
    q = '{clamp(p.r + off), clamp(p.g + off), clamp(p.b + off)};
    return q;
  endfunction

  // Apply the filters by position: at position k, the filter whose 2-bit field
  // (pseudo [1:0], contrast [3:2], invert [5:4], brightness [7:6]) equals k.
  function automatic px_t reference(input px_t p, input cfg_t c, input bit count);
    px_t q = p;
    for (int k = 0; k < 4; k++) begin
      if      (int'(c.order[1:0]) == k) q = f_pseudo(q, count);
      else if (int'(c.order[3:2]) == k) q = f_contrast(q, int'(c.gain), count);
      else if (int'(c.order[5:4]) == k) q = f_invert(q);
      else                              q = f_bright(q, int'(c.off), count);
    end
    return q;
  endfunction

  // The 24 permutations as order words, and the index of a word.
  logic [7:0] perms [24];
  function automatic int perm_index(input logic [7:0] o);
    for (int i = 0; i < 24; i++) if (perms[i] == o) return i;
    return -1;
  endfunction

  // ---------------- synthetic image ----------------
  function automatic int image_px(input int x, input int y, input int frame);
    int dx, dy, v;
    dx = x - W / 2; dy = y;
    v = 30;
    // fan-shaped bright sector opening downward from the top centre
    if (dy > 8 && (dx < 0 ? -dx : dx) < dy) v = 60 + (200 * (H - dy)) / H;
    // dark round cysts
    for (int c = 0; c < 3; c++) begin
      int cx, cy, rr;
      cx = W / 2 + (c - 1) * W / 6 + frame % 5;
      cy = H / 2 + (c % 2) * H / 8;
      rr = W / 16;
      if ((x - cx) * (x - cx) + (y - cy) * (y - cy) < rr * rr) v = 20 + c * 10;
    end
    // speckle
    v = v + int'($urandom_range(60)) - 30;
    return clamp(v);
  endfunction

  // ---------------- history of what went in at each clock edge ----------------
  localparam int HN = 8;
  cfg_t hist_cfg [HN];
  bit   hist_vld [HN];
  px_t  hist_px  [HN];
  bit   hist_rst [HN];
  int   edge_no = 0;

  cfg_t cur_cfg;

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL @edge %0d: %s", edge_no, msg);
  endtask

  // Record the inputs at every rising edge and check the output LAT edges later.
  initial forever begin : monitor
    int slot, old;
    bit stable;
    @(posedge clk);
    slot = edge_no % HN;
    hist_cfg[slot] = cur_cfg;
    hist_vld[slot] = data_in_ready && !rst;
    hist_px[slot]  = '{int'(Rin), int'(Gin), int'(Bin)};
    hist_rst[slot] = rst;
    #1;
    if (edge_no >= LAT + 1) begin
      old = (edge_no - (LAT - 1)) % HN;      // edge at which the pixel went in
      stable = 1'b1;
      for (int k = 0; k < LAT; k++) begin
        int s;
        s = (edge_no - k) % HN;
        if (hist_cfg[s] != hist_cfg[old] || hist_rst[s]) stable = 1'b0;
      end
      if (!stable) begin
        if (hist_vld[old]) n_mixed++;
      end else if (hist_vld[old]) begin
        px_t e;
        e = reference(hist_px[old], hist_cfg[old], 1'b1);
        checks++;
        n_out++;
        if (!ready) fail("ready low four clocks after a pixel went in");
        else if (int'(Rout) != e.r || int'(Gout) != e.g || int'(Bout) != e.b)
          fail($sformatf("order %02h off %0d gain %0d in (%0d,%0d,%0d): got (%0d,%0d,%0d) expected (%0d,%0d,%0d)",
               hist_cfg[old].order, hist_cfg[old].off, hist_cfg[old].gain,
               hist_px[old].r, hist_px[old].g, hist_px[old].b,
               Rout, Gout, Bout, e.r, e.g, e.b));
        if (perm_index(hist_cfg[old].order) >= 0) n_perm_seen[perm_index(hist_cfg[old].order)]++;
      end else begin
        checks++;
        n_idle++;
        if (ready) fail("ready high four clocks after an idle clock");
      end
    end
    edge_no++;
  end

  initial begin : watchdog
    repeat (24 * W * H * 2 + 10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_cfg(input logic [7:0] o, input int off, input int gain);
    Filter_order      = o;
    brightness_offset = 9'(off);
    contrast_gain     = 8'(gain);
    cur_cfg = '{order: o, off: 9'(off), gain: 8'(gain)};
  endtask

  initial begin
    int np;
    np = 0;
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int c = 0; c < 4; c++)
          for (int d = 0; d < 4; d++)
            if (a != b && a != c && a != d && b != c && b != d && c != d) begin
              perms[np] = {2'(d), 2'(c), 2'(b), 2'(a)};
              np++;
            end
    foreach (n_perm_seen[i]) n_perm_seen[i] = 0;
    foreach (n_pseudo_seg[i]) n_pseudo_seg[i] = 0;

    rst = 1'b1; data_in_ready = 1'b0; Rin = '0; Gin = '0; Bin = '0;
    set_cfg(perms[0], 0, 16);
    repeat (4) @(posedge clk);
    @(negedge clk); rst = 1'b0;

    for (int fr = 0; fr < 24; fr++) begin
      int off, gain, off2, gain2;
      logic [7:0] o2;
      // settings: a few fixed ones that push the clamps, the rest random
      case (fr % 4)
        0: begin off = 0;    gain = 16;  end
        1: begin off = 120;  gain = 40;  end
        2: begin off = -120; gain = 8;   end
        default: begin off = int'($urandom_range(160)) - 80; gain = int'($urandom_range(48)); end
      endcase
      o2 = perms[(fr + 1 + int'($urandom_range(21))) % 24];
      off2 = int'($urandom_range(100)) - 50;
      gain2 = int'($urandom_range(40)) + 4;
      @(negedge clk);
      set_cfg(perms[fr], off, gain);
      for (int y = 0; y < H; y++) begin
        for (int x = 0; x < W; x++) begin
          // random idle clocks between pixels
          while ($urandom_range(15) == 0) begin
            data_in_ready = 1'b0;
            @(negedge clk);
          end
          if (y == H / 2 && x == 0) begin
            // on-the-fly switch, pixels still inside the pipeline
            if (data_in_ready) n_switch_in_flight++;
            set_cfg(o2, off2, gain2);
          end
          if (fr == 5 && y == H / 4 && x == 0) begin
            // one reset while pixels stream; the pipeline must empty
            rst = 1'b1;
            n_reset_mid++;
            @(negedge clk);
            rst = 1'b0;
          end
          data_in_ready = 1'b1;
          begin
            int v;
            v = image_px(x, y, fr);
            // ultrasound frames are grey; tint a few pixels to exercise colour
            Rin = chan_t'(v);
            Gin = chan_t'(v);
            Bin = chan_t'((x % 32 == 0) ? 255 - v : v);
          end
          @(negedge clk);
        end
      end
      data_in_ready = 1'b0;
    end
    repeat (LAT + 2) @(negedge clk);

    // every mechanism must have happened
    foreach (n_perm_seen[i]) begin
      checks++;
      if (n_perm_seen[i] == 0) fail($sformatf("order %02h never checked", perms[i]));
    end
    foreach (n_pseudo_seg[i]) begin
      checks++;
      if (n_pseudo_seg[i] == 0) fail($sformatf("pseudo-colour segment %0d never used", i));
    end
    checks++; if (n_switch_in_flight == 0) fail("no on-the-fly switch with pixels in flight");
    checks++; if (n_mixed == 0)            fail("no pixel was in flight across a switch");
    checks++; if (n_idle == 0)             fail("no idle clock checked");
    checks++; if (n_bright_sat_hi == 0)    fail("brightness never clipped at 255");
    checks++; if (n_bright_sat_lo == 0)    fail("brightness never clipped at 0");
    checks++; if (n_contrast_clip == 0)    fail("contrast never clipped");
    checks++; if (n_reset_mid == 0)        fail("no reset while streaming");
    $display("pixels checked %0d, idle clocks checked %0d, pixels across a switch %0d",
             n_out, n_idle, n_mixed);
    $display("on-the-fly switches %0d, brightness clips hi/lo %0d/%0d, contrast clips %0d, resets %0d",
             n_switch_in_flight, n_bright_sat_hi, n_bright_sat_lo, n_contrast_clip, n_reset_mid);
    $display("pseudo-colour segments %0d %0d %0d %0d",
             n_pseudo_seg[0], n_pseudo_seg[1], n_pseudo_seg[2], n_pseudo_seg[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
