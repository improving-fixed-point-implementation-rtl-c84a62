// hub_givens_rotator: pipelined CORDIC Givens rotation of two matrix rows in HUB format.
//
// The two rows enter as LANES pairs (x_in[l], y_in[l]) = (upper row, lower row) of
// column l. Lane 0 holds the pivot pair: it runs in vectoring mode, choosing at every
// iteration the direction that drives its y towards zero. The other lanes run in
// rotation mode and apply the same directions, so the whole pair of rows is turned by
// the angle that zeroes the pivot's lower element.
//
// Pipeline (one register after each step, a new pair of rows every cycle):
//   stage 0        pre-rotation by 180 degrees when the pivot x is negative, done by
//                  inverting the explicit bits of every lane (HUB negation needs no +1)
//   stages 1..N    ITERS hub_cordic_stage iterations, shifts 0 .. ITERS-1
//   stage N+1      hub_scale_mult on every coordinate to remove the CORDIC gain
// Latency LAT = ITERS + 2 cycles from in_valid to out_valid; throughput one per cycle.
//
// Following the document: the use of CORDIC in vectoring and rotation mode for the two
// halves of a Givens rotation, the HUB iteration datapath and the scale-factor
// multipliers. This design's choices: the lane layout, the pre-rotation that keeps the
// pivot in the converging half-plane, ITERS, and the valid signal with active-low
// asynchronous reset (data registers are not reset).
//
// After the rotation lane 0 holds x = +sqrt(x^2 + y^2) and y = residual near zero.
// flip_out reports whether the pre-rotation was used for the rows now at the output.
module hub_givens_rotator #(
  parameter int WIDTH = 15,
  parameter int ITERS = 15,
  parameter int LANES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] x_in  [LANES],
  input  logic signed [WIDTH-1:0] y_in  [LANES],
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] x_out [LANES],
  output logic signed [WIDTH-1:0] y_out [LANES],
  output logic                    flip_out
);

  localparam int LAT = ITERS + 2;

  // Pipeline registers: index 0 is after pre-rotation, index s+1 after iteration s.
  logic signed [WIDTH-1:0] xs [ITERS+1][LANES];
  logic signed [WIDTH-1:0] ys [ITERS+1][LANES];
  logic                    vld  [LAT];
  logic                    flip [LAT];

  // Stage 0: conditional negation of both rows.
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      xs[0][l] <= x_in[0][WIDTH-1] ? ~x_in[l] : x_in[l];
      ys[0][l] <= x_in[0][WIDTH-1] ? ~y_in[l] : y_in[l];
    end
    flip[0] <= x_in[0][WIDTH-1];
  end

  // Iterations.
  for (genvar s = 0; s < ITERS; s++) begin : g_iter
    // Vectoring decision from the pivot lane: rotate clockwise while y > 0.
    logic cnt;
    logic signed [WIDTH-1:0] xn [LANES];
    logic signed [WIDTH-1:0] yn [LANES];
    assign cnt = ~ys[s][0][WIDTH-1];
    for (genvar l = 0; l < LANES; l++) begin : g_lane
      hub_cordic_stage #(.WIDTH(WIDTH), .SHIFT(s)) u_stage (
        .x_i(xs[s][l]), .y_i(ys[s][l]), .cnt(cnt), .x_o(xn[l]), .y_o(yn[l])
      );
    end
    always_ff @(posedge clk) begin
      xs[s+1]   <= xn;
      ys[s+1]   <= yn;
      flip[s+1] <= flip[s];
    end
  end

  // Scale-factor compensation.
  logic signed [WIDTH-1:0] xk [LANES];
  logic signed [WIDTH-1:0] yk [LANES];
  for (genvar l = 0; l < LANES; l++) begin : g_scale
    hub_scale_mult #(.WIDTH(WIDTH), .ITERS(ITERS)) u_kx (.x_i(xs[ITERS][l]), .x_o(xk[l]));
    hub_scale_mult #(.WIDTH(WIDTH), .ITERS(ITERS)) u_ky (.x_i(ys[ITERS][l]), .x_o(yk[l]));
  end
  always_ff @(posedge clk) begin
    x_out         <= xk;
    y_out         <= yk;
    flip[LAT-1]   <= flip[ITERS];
  end

  // Valid pipeline.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) vld[i] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      for (int i = 1; i < LAT; i++) vld[i] <= vld[i-1];
    end
  end

  assign out_valid = vld[LAT-1];
  assign flip_out  = flip[LAT-1];

endmodule
