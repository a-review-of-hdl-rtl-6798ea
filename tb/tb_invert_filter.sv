// tb_invert_filter: self-checking testbench for invert_filter.
//
// Drives corner-case and random pixels, with random idle cycles (data_in_ready
// low) in between, and compares every output against a reference computed here
// with plain integer arithmetic. It also checks the one-clock latency: ready must
// follow data_in_ready one clock later, and the outputs must hold their value
// while no pixel arrives. A watchdog ends the run if it hangs.
module tb_invert_filter;
  import img_pkg::*;

  logic  clk;
  logic  rst;
  logic  data_in_ready;
  chan_t Rin, Gin, Bin;
  chan_t Rout, Gout, Bout;
  logic  ready;

  int checks = 0;
  int failures = 0;

  invert_filter dut (
    .clk, .rst, .data_in_ready, .Rin, .Gin, .Bin,
    .Rout, .Gout, .Bout, .ready
  );

  initial clk = 1'b0;
  always #5 clk = ~clk;

  // Reference model, independent of the RTL.
  task automatic ref_px(input int r, g, b, output int er, eg, eb);
    er = 255 - r; eg = 255 - g; eb = 255 - b;
  endtask

  function automatic int clamp(input int v);
    return (v < 0) ? 0 : (v > 255) ? 255 : v;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One test vector: present (r,g,b) for one clock and check the next clock.
  task automatic send(input int r, input int g, input int b);
    int er, eg, eb;
    @(negedge clk);
    data_in_ready = 1'b1;
    Rin = chan_t'(r); Gin = chan_t'(g); Bin = chan_t'(b);
    ref_px(r, g, b, er, eg, eb);
    @(posedge clk); #1;
    check("ready after pixel", int'(ready), 1);
    check("R", int'(Rout), er);
    check("G", int'(Gout), eg);
    check("B", int'(Bout), eb);
  endtask

  task automatic idle(input int n);
    chan_t hr, hg, hb;
    hr = Rout; hg = Gout; hb = Bout;
    repeat (n) begin
      @(negedge clk);
      data_in_ready = 1'b0;
      Rin = chan_t'($urandom); Gin = chan_t'($urandom); Bin = chan_t'($urandom);
      @(posedge clk); #1;
      check("ready low when idle", int'(ready), 0);
      check("R held", int'(Rout), int'(hr));
      check("G held", int'(Gout), int'(hg));
      check("B held", int'(Bout), int'(hb));
    end
  endtask

  initial begin
    rst = 1'b1; data_in_ready = 1'b0; Rin = '0; Gin = '0; Bin = '0;

    repeat (3) @(posedge clk);
    #1;
    check("ready low in reset", int'(ready), 0);
    @(negedge clk); rst = 1'b0;
    for (int s = 0; s < 8; s++) begin
      // no setting
      // corners of the channel range
      send(0, 0, 0); send(255, 255, 255); send(128, 128, 128);
      send(127, 127, 127); send(1, 254, 64); send(255, 0, 192);
      for (int i = 0; i < 400; i++) begin
        send(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(255)));
        if ($urandom_range(7) == 0) idle(int'($urandom_range(3)) + 1);
      end
      // every grey level once
      for (int v = 0; v < 256; v++) send(v, v, v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
