// tb_hub_qrd_4x4: end-to-end test of the 4x4 HUB QR decomposition array at its default
// parameters (15-bit words, 15 CORDIC iterations).
//
// Random matrices with entries in (-1, 1) are streamed in, mostly back to back with
// occasional gaps. For each result the testbench rebuilds A from the outputs in floating
// point, A' = transpose(Q^T) * R, and measures |A - A'| (the check by inverse QRD); it
// also checks that Q^T is orthonormal, that the entries below the diagonal of R are
// near zero, that the first three diagonal entries of R are non-negative and that every
// result leaves exactly 6 * (ITERS + 2) cycles after its input. It counts how often each
// rotation used its 180-degree pre-rotation, how many matrices entered in consecutive
// cycles and how many gaps there were; a mechanism that never happened is a failure.
// Maximum and mean reconstruction errors are printed.
module tb_hub_qrd_4x4;
  localparam int  W        = 15;
  localparam int  ITERS    = 15;
  localparam int  FRAC     = W - 3;
  localparam int  LAT      = 6 * (ITERS + 2);
  localparam int  NMAT     = 50000;
  localparam real LSB      = 1.0 / real'(1 << FRAC);
  // Bounds in LSB.
  localparam real TOL_REC  = 24.0;
  localparam real TOL_ORTH = 24.0;
  localparam real TOL_LOW  = 8.0;

  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [W-1:0] a_in [4][4], r_out [4][4], qt_out [4][4];

  int checks = 0, failures = 0, cycle = 0, sent = 0, got = 0;
  int flips [6];
  int back_to_back = 0, gaps = 0;
  real max_err = 0.0, sum_err = 0.0, max_orth = 0.0;

  typedef struct {
    real a [4][4];
    int  t_in;
  } exp_t;
  exp_t q[$];

  hub_qrd_4x4 dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic real hv(logic signed [W-1:0] v);
    return (real'(v) + 0.5) * LSB;
  endfunction

  function automatic real absr(real v);
    return v < 0 ? -v : v;
  endfunction

  // Stimulus.
  initial begin
    exp_t e;
    bit   prev = 0;
    for (int k = 0; k < 6; k++) flips[k] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    while (sent < NMAT) begin
      @(negedge clk);
      if ($urandom_range(0, 15) != 0) begin
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            a_in[i][j] = W'($signed($urandom_range(0, (2 << FRAC) - 2)) - (1 << FRAC) + 1);
            e.a[i][j]  = hv(a_in[i][j]);
          end
        e.t_in = cycle;
        q.push_back(e);
        in_valid = 1;
        if (prev) back_to_back++;
        prev = 1;
        sent++;
      end else begin
        in_valid = 0;
        if (prev) gaps++;
        prev = 0;
      end
    end
    @(negedge clk);
    in_valid = 0;
  end

  // Pre-rotation usage, sampled where each rotation's results leave it.
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.g_rot[0].u_rot.out_valid && dut.g_rot[0].flip) flips[0]++;
      if (dut.g_rot[1].u_rot.out_valid && dut.g_rot[1].flip) flips[1]++;
      if (dut.g_rot[2].u_rot.out_valid && dut.g_rot[2].flip) flips[2]++;
      if (dut.g_rot[3].u_rot.out_valid && dut.g_rot[3].flip) flips[3]++;
      if (dut.g_rot[4].u_rot.out_valid && dut.g_rot[4].flip) flips[4]++;
      if (dut.g_rot[5].u_rot.out_valid && dut.g_rot[5].flip) flips[5]++;
    end
  end

  // Checks.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      real  rec, d, err, orth;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        checks++;
        if (cycle - e.t_in != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cycle - e.t_in, LAT);
        end
        // A = Q R with Q = transpose(Q^T).
        err = 0.0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            rec = 0.0;
            for (int k = 0; k < 4; k++) rec += hv(qt_out[k][i]) * hv(r_out[k][j]);
            d = absr(rec - e.a[i][j]);
            sum_err += d;
            if (d > err) err = d;
          end
        if (err > max_err) max_err = err;
        checks++;
        if (err > TOL_REC * LSB) begin
          failures++;
          if (failures < 20) $display("FAIL matrix %0d reconstruction error %e", got, err);
        end
        // Q^T Q^T' = I.
        orth = 0.0;
        for (int i = 0; i < 4; i++)
          for (int j = 0; j < 4; j++) begin
            rec = 0.0;
            for (int k = 0; k < 4; k++) rec += hv(qt_out[i][k]) * hv(qt_out[j][k]);
            d = absr(rec - (i == j ? 1.0 : 0.0));
            if (d > orth) orth = d;
          end
        if (orth > max_orth) max_orth = orth;
        checks++;
        if (orth > TOL_ORTH * LSB) begin
          failures++;
          if (failures < 20) $display("FAIL matrix %0d orthogonality error %e", got, orth);
        end
        // R upper triangular, first three diagonal entries non-negative.
        for (int i = 1; i < 4; i++)
          for (int j = 0; j < i; j++) begin
            checks++;
            if (absr(hv(r_out[i][j])) > TOL_LOW * LSB) begin
              failures++;
              if (failures < 20) $display("FAIL matrix %0d R[%0d][%0d] = %e", got, i, j, hv(r_out[i][j]));
            end
          end
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (r_out[i][i][W-1]) begin
            failures++;
            if (failures < 20) $display("FAIL matrix %0d R[%0d][%0d] negative", got, i, i);
          end
        end
        got++;
        if (got == NMAT) begin
          for (int k = 0; k < 6; k++) begin
            checks++;
            if (flips[k] == 0) begin
              failures++;
              $display("FAIL rotation %0d never used its pre-rotation", k);
            end
          end
          checks += 2;
          if (back_to_back == 0) begin failures++; $display("FAIL no back-to-back inputs"); end
          if (gaps == 0) begin failures++; $display("FAIL no input gaps"); end
          $display("matrices %0d, back-to-back %0d, gaps %0d", got, back_to_back, gaps);
          $display("pre-rotations per rotation: %0d %0d %0d %0d %0d %0d",
                   flips[0], flips[1], flips[2], flips[3], flips[4], flips[5]);
          $display("reconstruction error max %e mean %e, orthogonality error max %e",
                   max_err, sum_err / (16.0 * real'(got)), max_orth);
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (NMAT * 2 + LAT + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
