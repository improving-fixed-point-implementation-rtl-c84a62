// hub_cordic_stage: one CORDIC micro-rotation on HUB numbers (combinational).
//
// Each coordinate is shifted right by SHIFT, conditionally inverted and added to the
// other coordinate:
//   cnt = 1 : x_o = x_i + (y_i >> SHIFT),   y_o = y_i - (x_i >> SHIFT)   (clockwise)
//   cnt = 0 : x_o = x_i - (y_i >> SHIFT),   y_o = y_i + (x_i >> SHIFT)   (counter-clockwise)
// The shift is applied to the number with its hidden one appended, so the first bit
// shifted out of the explicit field is known. That bit (inverted together with the
// explicit bits when the term is subtracted) is the adder's carry-in. Adding it to the
// hidden one of the other operand and then dropping the half-LSB position gives the
// nearest HUB result; in the first stage (SHIFT = 0) it is the hidden bit itself, i.e.
// one. Negating a HUB number needs only the bit inversion, with no +1 correction, so
// the conditional inverter has no carry of its own.
//
// Following the document: the datapath of one iteration (two shifters, two conditional
// inverters driven by cnt with opposite polarity, two adders whose carry-in is the MSB
// of the discarded bits). This design's choices: which polarity of cnt means
// clockwise, and that ties (discarded bits exactly one half) in a subtraction round
// towards minus infinity. Overflow wraps; the callers' format leaves headroom for it.
//
// Interface: x_i, y_i, cnt in; x_o, y_o out; all WIDTH-bit explicit HUB fields.
// No clock: the caller registers the outputs (one iteration per pipeline stage).
module hub_cordic_stage #(
  parameter int WIDTH = 15,
  parameter int SHIFT = 0
) (
  input  logic signed [WIDTH-1:0] x_i,
  input  logic signed [WIDTH-1:0] y_i,
  input  logic                    cnt,
  output logic signed [WIDTH-1:0] x_o,
  output logic signed [WIDTH-1:0] y_o
);

  // Operands with the hidden one appended, shifted arithmetically.
  logic signed [WIDTH:0] x_ext, y_ext, x_sh, y_sh;
  // Shifted terms after the conditional inverters: explicit bits and the MSB of the
  // discarded bits (Px, Py).
  logic [WIDTH-1:0] x_term, y_term;
  logic             px, py;

  always_comb begin
    x_ext = {x_i, 1'b1};
    y_ext = {y_i, 1'b1};
    x_sh  = x_ext >>> SHIFT;
    y_sh  = y_ext >>> SHIFT;
    // y term feeds the x adder: subtracted when cnt = 0.
    {y_term, py} = cnt ? y_sh : ~y_sh;
    // x term feeds the y adder: subtracted when cnt = 1.
    {x_term, px} = cnt ? ~x_sh : x_sh;
    x_o = x_i + y_term + WIDTH'(py);
    y_o = y_i + x_term + WIDTH'(px);
  end

endmodule
