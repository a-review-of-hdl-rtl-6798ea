// tb_stage_select: self-checking testbench for stage_select.
//
// One instance per pipeline position (0..3). Every one of the 256 order words is
// applied, permutations and words with repeated positions alike, with random
// filter outputs and ready flags. The expected selection is worked out here by
// scanning the filters in priority order pseudo-colour, contrast, invert and
// falling back to brightness, and compared with each instance's output. It also
// counts that both proper permutations and words with an unclaimed position were
// seen.
module tb_stage_select;
  import img_pkg::*;

  rgb_t       filt_px  [N_FILT];
  logic       filt_rdy [N_FILT];
  logic [7:0] order;
  rgb_t       stage_px  [N_FILT];
  logic       stage_rdy [N_FILT];

  int checks = 0;
  int failures = 0;
  int n_perm = 0;
  int n_fallback = 0;

  for (genvar s = 0; s < N_FILT; s++) begin : g_dut
    stage_select #(.STAGE(s)) dut (
      .order, .filt_px, .filt_rdy,
      .stage_px(stage_px[s]), .stage_rdy(stage_rdy[s])
    );
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Index of the filter expected at position s: first of pseudo (field 0),
  // contrast (field 1), invert (field 2) claiming it, else brightness (3).
  function automatic int expected_filter(input logic [7:0] o, input int s);
    for (int f = 0; f < 3; f++)
      if (int'(o[2*f +: 2]) == s) return f;
    return 3;
  endfunction

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int w = 0; w < 256; w++) begin
        bit seen [4];
        bit perm;
        order = 8'(w);
        for (int f = 0; f < N_FILT; f++) begin
          filt_px[f]  = rgb_t'($urandom);
          filt_rdy[f] = 1'($urandom);
        end
        seen = '{default: 1'b0};
        for (int f = 0; f < 4; f++) seen[w >> (2*f) & 3] = 1'b1;
        perm = seen[0] & seen[1] & seen[2] & seen[3];
        if (perm) n_perm++;
        #1;
        for (int s = 0; s < N_FILT; s++) begin
          int e;
          e = expected_filter(8'(w), s);
          if (!perm && e == 3 && int'(w[7:6]) != s) n_fallback++;
          checks++;
          if (stage_px[s] !== filt_px[e] || stage_rdy[s] !== filt_rdy[e]) begin
            failures++;
            if (failures < 20)
              $display("FAIL order=%02h stage %0d: got %06h/%0d expected filter %0d (%06h/%0d)",
                       w, s, stage_px[s], stage_rdy[s], e, filt_px[e], filt_rdy[e]);
          end
        end
      end
    end
    checks++;
    if (n_perm != 8 * 24) begin
      failures++;
      $display("FAIL saw %0d permutation words, expected %0d", n_perm, 8 * 24);
    end
    checks++;
    if (n_fallback == 0) begin
      failures++;
      $display("FAIL the brightness fallback for an unclaimed position never happened");
    end
    $display("permutations %0d, unclaimed-position fallbacks %0d", n_perm, n_fallback);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
