// hub_scale_mult: CORDIC scale-factor compensation for one HUB coordinate.
//
// A CORDIC run of ITERS iterations stretches every vector by the gain
// K = prod sqrt(1 + 2^-2i). This block multiplies a HUB number by the constant 1/K and
// truncates the product back to WIDTH explicit bits. The multiplicand is taken with its
// hidden one (2x + 1 in half-LSB units), so truncation of the exact product to the HUB
// grid is round-to-nearest. The constant has WIDTH + 8 fraction bits, so its own error stays below 1/1000 LSB.
//
// The document names constant multipliers as the only hardware besides the CORDIC and
// says their number is the same with and without HUB numbers; how they are built is this
// design's choice (a single full-width constant product, truncated).
//
// Interface: x_i in, x_o out (WIDTH-bit explicit HUB fields). Combinational.
module hub_scale_mult
  import hub_pkg::*;
#(
  parameter int WIDTH = 15,
  parameter int ITERS = 15
) (
  input  logic signed [WIDTH-1:0] x_i,
  output logic signed [WIDTH-1:0] x_o
);

  localparam int KF = WIDTH + 8;
  localparam logic [KF:0] KINV = (KF + 1)'(kinv_const(ITERS, KF));
  localparam int PW = WIDTH + KF + 2;

  logic signed [PW-1:0] prod;

  always_comb begin
    prod = PW'($signed({x_i, 1'b1})) * $signed({1'b0, KINV});
    // Product is in units of 2^-(KF+1) explicit LSBs; floor keeps the HUB grid.
    x_o  = prod[KF+1 +: WIDTH];
  end

endmodule
