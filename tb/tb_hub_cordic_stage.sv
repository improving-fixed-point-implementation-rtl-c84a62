// tb_hub_cordic_stage: self-checking test of one HUB CORDIC iteration.
//
// One instance per shift 0 .. 14 sees the same random operands. The expected result is
// worked out in integers at a resolution of 2^-(s+1) LSB: the exact sum
// (x + 1/2) +/- (y + 1/2) / 2^s must lie within half an LSB of the HUB result
// (z + 1/2), i.e. the result is a nearest HUB number (either one on an exact tie).
// Operands are kept inside a quarter of the range so nothing overflows.
module tb_hub_cordic_stage;
  localparam int W    = 15;
  localparam int NSH  = 15;
  localparam int NVEC = 4000;

  logic signed [W-1:0] x, y;
  logic                cnt;
  logic signed [W-1:0] xo [NSH];
  logic signed [W-1:0] yo [NSH];
  int checks = 0, failures = 0;

  for (genvar s = 0; s < NSH; s++) begin : g_dut
    hub_cordic_stage #(.WIDTH(W), .SHIFT(s)) dut (.x_i(x), .y_i(y), .cnt(cnt), .x_o(xo[s]), .y_o(yo[s]));
  end

  // |(2z+1)*2^s - exact*2^(s+1)| <= 2^s  <=>  z is a nearest HUB value.
  function automatic bit nearest(longint z, longint a, longint b, int s, bit sub);
    longint exact2, got2, d;
    exact2 = (2 * a + 1) * (longint'(1) << s) + (sub ? -(2 * b + 1) : (2 * b + 1));
    got2   = (2 * z + 1) * (longint'(1) << s);
    d      = got2 - exact2;
    if (d < 0) d = -d;
    return d <= (longint'(1) << s);
  endfunction

  task automatic check_all();
    #1;
    for (int s = 0; s < NSH; s++) begin
      // cnt = 1: x + y/2^s, y - x/2^s; cnt = 0: x - y/2^s, y + x/2^s.
      checks += 2;
      if (!nearest(longint'(xo[s]), longint'(x), longint'(y), s, !cnt)) begin
        failures++;
        if (failures < 10) $display("FAIL x s=%0d cnt=%0d x=%0d y=%0d xo=%0d", s, cnt, x, y, xo[s]);
      end
      if (!nearest(longint'(yo[s]), longint'(y), longint'(x), s, cnt)) begin
        failures++;
        if (failures < 10) $display("FAIL y s=%0d cnt=%0d x=%0d y=%0d yo=%0d", s, cnt, x, y, yo[s]);
      end
    end
  endtask

  initial begin
    // Directed: smallest magnitudes, both signs, both directions.
    for (int a = -3; a <= 2; a++)
      for (int b = -3; b <= 2; b++)
        for (int c = 0; c < 2; c++) begin
          x = W'(a); y = W'(b); cnt = c[0];
          check_all();
        end
    // Shift 0 with operands that are equal: y - x is exactly zero, a HUB tie.
    x = 15'sd100; y = 15'sd100; cnt = 1'b1; check_all();
    // Random.
    for (int n = 0; n < NVEC; n++) begin
      x   = W'($signed($urandom_range(0, 1 << (W - 2))) - (1 << (W - 3)));
      y   = W'($signed($urandom_range(0, 1 << (W - 2))) - (1 << (W - 3)));
      cnt = $urandom_range(0, 1) == 1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
