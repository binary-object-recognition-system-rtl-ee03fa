// vga_display_tb: self-checking test of the VGA weight display.
//
// A model of the memory's display port returns, one clock after each read,
// a word whose trits follow a fixed formula of (neuron, bit position). Over
// one full 800x600 frame the test checks the sync timing (1056 clocks per
// line with a 128-clock hsync, 628 lines per frame with a 4-line vsync,
// 800 x 600 active pixels) and the colour of every active pixel against the
// tile layout computed here: 8 tiles per row at a 64-pixel pitch, image
// rows at a 64-line pitch, each weight bit drawn as 2x2 pixels, 0 black,
// 1 white, don't-care grey, background dark blue.
module vga_display_tb;
  localparam int unsigned NEURONS = 40;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst_n, mem_re, hsync, vsync, de, frame_start;
  logic [9:0] mem_raddr;
  logic [2*NEURONS-1:0] mem_rdata;
  logic [3:0] red, green, blue;

  int checks = 0, failures = 0;

  vga_display #(.NEURONS(NEURONS)) dut (.*);

  function automatic logic [1:0] trit_of(int n, int k);
    return 2'((n * 7 + k * 3 + k / 5) % 3);
  endfunction

  always_ff @(posedge clk)
    if (mem_re) for (int n = 0; n < NEURONS; n++) mem_rdata[2*n +: 2] <= trit_of(n, int'(mem_raddr));

  task automatic check(input logic cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, clocks, frame_clocks, hs_len, hs_period, last_hs_rise, vs_len, de_lines, pix_bad;
    logic prev_hs, prev_vs, prev_de, started;
    logic [11:0] exp_rgb;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // wait for the first frame start
    while (!frame_start) @(negedge clk);
    started = 1; x = 0; y = 0; clocks = 0; hs_len = 0; last_hs_rise = -1; vs_len = 0;
    de_lines = 0; pix_bad = 0; prev_hs = 0; prev_vs = 0; prev_de = 0;
    frame_clocks = 1056 * 628;
    for (clocks = 0; clocks < frame_clocks; clocks++) begin
      // sync timing
      if (hsync) hs_len++;
      if (hsync && !prev_hs) begin
        if (last_hs_rise >= 0) check(clocks - last_hs_rise == 1056, "line period");
        last_hs_rise = clocks;
      end
      if (!hsync && prev_hs) begin
        check(hs_len == 128, $sformatf("hsync width %0d", hs_len));
        hs_len = 0;
      end
      if (vsync) vs_len++;
      if (!vsync && prev_vs) check(vs_len == 4 * 1056, $sformatf("vsync width %0d", vs_len));
      check(!(de && (hsync || vsync)), "sync during active video");
      // pixels
      if (de) begin
        int tcol, trow, n;
        tcol = x / 64; trow = y / 64; n = trow * 8 + tcol;
        if (tcol < 8 && (y % 64) < 48 && n < NEURONS) begin
          case (trit_of(n, ((y % 64) / 2) * 32 + (x % 64) / 2))
            2'd0:    exp_rgb = 12'h000;
            2'd1:    exp_rgb = 12'hFFF;
            default: exp_rgb = 12'h888;
          endcase
        end else begin
          exp_rgb = 12'h004;
        end
        checks++;
        if ({red, green, blue} != exp_rgb) begin
          failures++;
          pix_bad++;
          if (pix_bad < 10) $display("pixel (%0d,%0d): %h, expected %h", x, y, {red, green, blue}, exp_rgb);
        end
        x++;
      end else begin
        check({red, green, blue} == 12'h000, "colour outside active video");
      end
      if (!de && prev_de) begin
        check(x == 800, $sformatf("line %0d has %0d pixels", y, x));
        x = 0; y++; de_lines++;
      end
      prev_hs = hsync; prev_vs = vsync; prev_de = de;
      @(negedge clk);
      if (clocks == frame_clocks - 1) check(frame_start, "frame period");
    end
    check(de_lines == 600, $sformatf("%0d active lines", de_lines));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
