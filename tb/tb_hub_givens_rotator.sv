// tb_hub_givens_rotator: self-checking test of the pipelined HUB Givens rotator.
//
// Random row pairs with values in (-1, 1) are streamed in with random gaps. For each
// pair the testbench computes in floating point the rotation that zeroes the lower pivot
// element (c = x0/r, s = y0/r, r = sqrt(x0^2 + y0^2)) and applies it to every lane. The
// rotator's outputs must lie within TOL_LSB of that result (more where a lane is longer than the pivot,
// whose angle is only known to about an LSB over its length), the pivot must come out with
// a positive x, flip_out must report a negative input pivot, and each result must
// appear exactly ITERS + 2 cycles after its input.
module tb_hub_givens_rotator;
  localparam int  W       = 15;
  localparam int  ITERS   = 15;
  localparam int  LANES   = 3;
  localparam int  FRAC    = W - 3;
  localparam int  LAT     = ITERS + 2;
  localparam int  NVEC    = 3000;
  localparam real TOL_LSB = 3.0;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, flip_out;
  logic signed [W-1:0] x_in [LANES], y_in [LANES], x_out [LANES], y_out [LANES];
  int checks = 0, failures = 0, flips = 0, cycle = 0, sent = 0, got = 0;
  real max_err = 0.0;

  typedef struct {
    real xe [LANES];
    real ye [LANES];
    real tol [LANES];
    bit  neg;
    int  t_in;
  } exp_t;
  exp_t q[$];

  hub_givens_rotator #(.WIDTH(W), .ITERS(ITERS), .LANES(LANES)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real hv(logic signed [W-1:0] v);
    return (real'(v) + 0.5) / real'(1 << FRAC);
  endfunction

  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  // Drive inputs and push the expected outputs.
  initial begin
    exp_t e;
    real xr [LANES], yr [LANES], r, c, s;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NVEC) begin
      @(negedge clk);
      if ($urandom_range(0, 3) != 0) begin
        for (int l = 0; l < LANES; l++) begin
          x_in[l] = W'($signed($urandom_range(0, (2 << FRAC) - 2)) - (1 << FRAC) + 1);
          y_in[l] = W'($signed($urandom_range(0, (2 << FRAC) - 2)) - (1 << FRAC) + 1);
          xr[l] = hv(x_in[l]);
          yr[l] = hv(y_in[l]);
        end
        // A few pivots with y = 0-ish or x tiny, and exact halves of the range.
        if (sent % 97 == 5) begin y_in[0] = '0; yr[0] = hv(y_in[0]); end
        if (sent % 89 == 0) begin x_in[0] = '1; xr[0] = hv(x_in[0]); end
        r = $sqrt(xr[0] * xr[0] + yr[0] * yr[0]);
        c = xr[0] / r;
        s = yr[0] / r;
        for (int l = 0; l < LANES; l++) begin
          e.xe[l] = c * xr[l] + s * yr[l];
          e.ye[l] = -s * xr[l] + c * yr[l];
          // The angle is only known to about one LSB over the pivot length, which
          // lanes longer than the pivot magnify.
          e.tol[l] = TOL_LSB + 4.0 * $sqrt(xr[l] * xr[l] + yr[l] * yr[l]) / r;
        end
        e.neg  = x_in[0][W-1];
        e.t_in = cycle;
        q.push_back(e);
        in_valid = 1;
        sent++;
      end else begin
        in_valid = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Check outputs.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real ex, ey;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        checks += 3;
        if (cycle - e.t_in != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - e.t_in, LAT);
        end
        if (flip_out != e.neg) begin
          failures++;
          $display("FAIL flip_out %0d expected %0d", flip_out, e.neg);
        end
        if (x_out[0][W-1]) begin
          failures++;
          $display("FAIL pivot x negative");
        end
        if (flip_out) flips++;
        for (int l = 0; l < LANES; l++) begin
          ex = absr(hv(x_out[l]) - e.xe[l]) * real'(1 << FRAC);
          ey = absr(hv(y_out[l]) - e.ye[l]) * real'(1 << FRAC);
          if (ex > max_err) max_err = ex;
          if (ey > max_err) max_err = ey;
          checks += 2;
          if (ex > e.tol[l]) begin
            failures++;
            if (failures < 40) $display("FAIL n=%0d lane %0d x error %f LSB", got, l, ex);
          end
          if (ey > e.tol[l]) begin
            failures++;
            if (failures < 40) $display("FAIL n=%0d lane %0d y error %f LSB", got, l, ey);
          end
        end
        got++;
        if (got == NVEC) begin
          checks++;
          if (flips == 0) begin
            failures++;
            $display("FAIL pre-rotation never exercised");
          end
          $display("rotations %0d, pre-rotations %0d, max error %f LSB", got, flips, max_err);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (NVEC * 4 + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
