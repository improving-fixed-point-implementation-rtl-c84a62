// tb_hub_scale_mult: self-checking test of the CORDIC gain compensation multiplier.
//
// The testbench computes the gain K = prod sqrt(1 + 2^-2i) over ITERS iterations by its
// own loop, rounds 2^KF / K to an integer constant and predicts the HUB product exactly:
// z = floor((2x + 1) * C / 2^(KF+1)). It also checks that z is within
// 0.5 LSB (plus the constant's own quantisation) of the real product (x + 1/2) / K.
module tb_hub_scale_mult;
  localparam int W     = 15;
  localparam int ITERS = 15;
  localparam int KF    = W + 8;

  logic signed [W-1:0] x, z;
  int checks = 0, failures = 0;
  real k, kinv;
  longint c;

  hub_scale_mult #(.WIDTH(W), .ITERS(ITERS)) dut (.x_i(x), .x_o(z));

  task automatic check_one();
    longint expz;
    real    err;
    #1;
    expz = ((2 * longint'(x) + 1) * c) >>> (KF + 1);
    err  = (real'(z) + 0.5) - (real'(x) + 0.5) * kinv;
    if (err < 0) err = -err;
    checks += 2;
    if (longint'(z) != expz) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d z=%0d expected %0d", x, z, expz);
    end
    if (err > 0.5 + 1.0 / 512.0) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d z=%0d error %f LSB", x, z, err);
    end
  endtask

  initial begin
    k = 1.0;
    for (int i = 0; i < ITERS; i++) k = k * $sqrt(1.0 + 1.0 / (4.0 ** i));
    kinv = 1.0 / k;
    c    = longint'(kinv * (2.0 ** KF));
    // Every input value.
    for (int v = -(1 << (W - 1)); v < (1 << (W - 1)); v++) begin
      x = W'(v);
      check_one();
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
