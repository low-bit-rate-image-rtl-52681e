// 5/3 integer lifting processor (one instance filters rows, a second one
// filters columns).
//
// Each cycle it may take one even/odd sample pair (x[2n], x[2n+1]) of a line
// and four cycles later (a pair presented in cycle t is delivered in cycle
// t+4) it delivers the pair of coefficients
//   H[2n+1] = x[2n+1] - floor((x[2n] + x[2n+2]) / 2)
//   L[2n]   = x[2n]   + floor((H[2n-1] + H[2n+1] + 2) / 4)
// i.e. the lifting form of the 5/3 filter without its sqrt(2) factors.
// Pipeline (as in the document's data path): two input register stages
// holding the current and the next pair, the predict step (adder, shift,
// subtractor) into the H register, a second H register holding H[2n-1], the
// update step into a register, and a final adder that forms L.
//
// Border handling: on the last pair of a line (eol) x[2n+2] is replaced by
// x[2n] (so x[N] = x[N-2]); on the first pair (sol) H[-1] is taken as 0,
// which is what repeating x[0] into x[-1] and x[-2] gives.
//
// The pairs of one line must arrive on consecutive cycles: the predict step
// of a pair uses the pair that follows it one cycle later (not needed when
// eol is set). Lines may follow each other back to back or with gaps.
// The document's data-path figure prints a one-bit shift after the "+2"
// adder; this design follows equation (2), which divides by four.
module lifting_proc #(
  parameter int unsigned W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_even,   // x[2n]
  input  logic signed [W-1:0] in_odd,    // x[2n+1]
  input  logic                in_sol,    // pair starts a line
  input  logic                in_eol,    // pair ends a line
  output logic                out_valid,
  output logic signed [W-1:0] out_l,     // L[2n]
  output logic signed [W-1:0] out_h      // H[2n+1]
);

  // stage A: newest pair, stage B: pair being predicted
  logic signed [W-1:0] a_e, a_o, b_e, b_o;
  logic                a_v, b_v, a_sol, b_sol, b_eol, a_eol;
  // stage C: H[2n+1] and x[2n]; hd holds H[2n-1]
  logic signed [W-1:0] c_h, c_x, hd;
  logic                c_v, c_sol;
  // stage D: update term and x[2n], delayed H
  logic signed [W-1:0] d_u, d_x, d_h;
  logic                d_v;

  logic signed [W:0]   psum;
  logic signed [W-1:0] h_new;
  logic signed [W+1:0] usum;
  logic signed [W-1:0] zero;
  assign zero = '0;

  always_comb begin
    psum  = (W+1)'(b_e) + (W+1)'(b_eol ? b_e : a_e);
    h_new = W'(b_o - W'(psum >>> 1));
    usum  = (W+2)'(c_h) + (W+2)'(c_sol ? zero : hd) + (W+2)'(2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      a_v <= 1'b0; b_v <= 1'b0; c_v <= 1'b0; d_v <= 1'b0;
      hd  <= '0;
    end else begin
      a_v <= in_valid;
      b_v <= a_v;
      c_v <= b_v;
      d_v <= c_v;
      if (c_v) hd <= c_h;
    end
    a_e   <= in_even;  a_o   <= in_odd;
    a_sol <= in_sol;   a_eol <= in_eol;
    b_e   <= a_e;      b_o   <= a_o;
    b_sol <= a_sol;    b_eol <= a_eol;
    c_h   <= h_new;
    c_x   <= b_e;
    c_sol <= b_sol;
    d_u   <= W'(usum >>> 2);
    d_x   <= c_x;
    d_h   <= c_h;
  end

  assign out_valid = d_v;
  assign out_l     = d_x + d_u;
  assign out_h     = d_h;

endmodule
