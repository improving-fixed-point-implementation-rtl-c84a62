// hub_qrd_4x4: fully pipelined QR decomposition of 4x4 matrices with HUB CORDIC units.
//
// A = Q R is computed by Givens rotations: the lower elements are zeroed column by
// column from the left, and in each column from the bottom row up to the one below the
// diagonal. For a 4x4 matrix that is six rotations of adjacent row pairs:
//   k : 0      1      2      3      4      5
//   rows (2,3) (1,2)  (0,1)  (2,3)  (1,2)  (2,3)
//   col   0     0      0      1      1      2
// Every row carries eight values, its four columns of A followed by a row of the 4x4
// identity, so the same rotations that turn A into R turn the identity into Q^T.
// Rotation k is one hub_givens_rotator with 8 - col lanes (the columns left of the
// pivot are already zero and are not rotated). The rows it does not touch, and the
// zeroed columns, travel through a delay line of the same latency, so the array forms a
// 2-D grid of CORDIC units (rotation x column) that accepts a new matrix every cycle.
//
// Number format: WIDTH explicit bits, HUB, FRAC = WIDTH - 3 fraction bits (sign and
// two integer bits). Inputs are expected in (-1, 1); column norms of R then stay
// below 2 and CORDIC intermediate values below 3.3, inside the range of +/-4.
// Identity entries enter as 0 (value +1/2 LSB) and 2^FRAC - 1 (value 1 - 1/2 LSB).
//
// Interface: in_valid with a_in[row][col]; LAT_TOTAL = 6 * (ITERS + 2) cycles later
// out_valid with r_out (R, the entries below the diagonal are the small residuals of the
// zeroed elements) and qt_out (Q^T, so A ~ transpose(qt_out) * r_out).
//
// Following the document: 4x4 matrices, the Givens ordering, Q from the identity, the
// pipelined CORDIC-based array and the 15-bit HUB word. This design's choices: the exact
// grid layout, the number format, ITERS and the valid/reset scheme. An assertion flags
// inputs outside (-1, 1), which could overflow the range.
module hub_qrd_4x4 #(
  parameter int WIDTH = 15,
  parameter int ITERS = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] a_in   [4][4],
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] r_out  [4][4],
  output logic signed [WIDTH-1:0] qt_out [4][4]
);

  localparam int N         = 4;
  localparam int COLS      = 2 * N;
  localparam int NROT      = 6;
  localparam int FRAC      = WIDTH - hub_pkg::INT_BITS;
  localparam int LAT       = ITERS + 2;
  localparam int LAT_TOTAL = NROT * LAT;

  // Rotation schedule: upper row of the pair and pivot column.
  localparam int ROW [NROT] = '{2, 1, 0, 2, 1, 2};
  localparam int COL [NROT] = '{0, 0, 0, 1, 1, 2};

  localparam logic signed [WIDTH-1:0] HUB_ZERO = '0;
  localparam logic signed [WIDTH-1:0] HUB_ONE  = WIDTH'((1 << FRAC) - 1);

  // m[k] is the augmented matrix [A | I] after k rotations; v[k] its valid.
  logic signed [WIDTH-1:0] m [NROT+1][N][COLS];
  logic                    v [NROT+1];

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        m[0][i][j]   = a_in[i][j];
        m[0][i][N+j] = (i == j) ? HUB_ONE : HUB_ZERO;
      end
    end
    v[0] = in_valid;
  end

  for (genvar k = 0; k < NROT; k++) begin : g_rot
    localparam int R     = ROW[k];
    localparam int C     = COL[k];
    localparam int LANES = COLS - C;

    logic signed [WIDTH-1:0] xi [LANES];
    logic signed [WIDTH-1:0] yi [LANES];
    logic signed [WIDTH-1:0] xo [LANES];
    logic signed [WIDTH-1:0] yo [LANES];
    // Pre-rotation flag of this stage; only observed by testbenches.
    logic                    flip;
    // Delay line for everything this rotation leaves alone.
    logic signed [WIDTH-1:0] dl [LAT][N][COLS];

    always_comb begin
      for (int l = 0; l < LANES; l++) begin
        xi[l] = m[k][R][C+l];
        yi[l] = m[k][R+1][C+l];
      end
    end

    hub_givens_rotator #(.WIDTH(WIDTH), .ITERS(ITERS), .LANES(LANES)) u_rot (
      .clk, .rst_n,
      .in_valid (v[k]),
      .x_in     (xi),
      .y_in     (yi),
      .out_valid(v[k+1]),
      .x_out    (xo),
      .y_out    (yo),
      .flip_out (flip)
    );

    always_ff @(posedge clk) begin
      dl[0] <= m[k];
      for (int s = 1; s < LAT; s++) dl[s] <= dl[s-1];
    end

    always_comb begin
      m[k+1] = dl[LAT-1];
      for (int l = 0; l < LANES; l++) begin
        m[k+1][R][C+l]   = xo[l];
        m[k+1][R+1][C+l] = yo[l];
      end
    end
  end

  // Inputs must lie in (-1, 1): the bits above the fraction are a sign extension.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          assert (a_in[i][j][WIDTH-1:FRAC] == '0 || a_in[i][j][WIDTH-1:FRAC] == '1)
            else $error("a_in[%0d][%0d] outside (-1, 1)", i, j);
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        r_out[i][j]  = m[NROT][i][j];
        qt_out[i][j] = m[NROT][i][N+j];
      end
    end
    out_valid = v[NROT];
  end

endmodule
