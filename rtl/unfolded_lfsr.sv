// unfolded_lfsr -- J-unfolded division LFSR that computes the BCH parity.
//
// The serial LFSR divides the incoming bit stream by the generator
// polynomial g(x) of degree R.  One clock of the serial circuit does
//     fb    = y[R-1]
//     y     = {y[R-2:0], bit} ^ (fb ? g[R-1:0] : 0)
// i.e. the new stream bit enters at y[0], the bit leaving y[R-1] is fed back
// through an XOR into every register whose index is a non-zero tap of g(x).
// After the whole stream (message followed by R zeros) has entered, y holds
// the remainder, which is the parity of the systematic codeword.
//
// Unfolding by a factor J (edge U->V with w delays becomes U_i -> V_(i+w)%J
// with floor((i+w)/J) delays) turns the loop of R unit delays into J copies
// of the XOR network: copies 0..J-2 are joined by wires, and only the edges
// leaving copy J-1 keep a delay.  The register count therefore stays R, the
// registers hold the same y(14 to 0) as the serial circuit after every J-th
// bit, and J stream bits are consumed per clock.  The generate loop below
// builds exactly those J copies (stage[i] -> stage[i+1]).
//
// The default J = 3 is the factor chosen for the BCH(31,16) polynomial
// (iteration bound 10/15 of a node time; J = 3 makes J times it an integer
// and not below one node time); J = 1 gives the plain serial LFSR and J = 2
// the two-parallel version.
//
// Interface: din[J-1] is the earliest of the J bits (m(Jk)), din[0] the
// latest (m(Jk+J-1)).  `clear` (synchronous, wins over `en`) zeroes the
// register before a new codeword; `en` advances by J bits.  rem_o is the
// register itself, valid the clock after the last enabled edge.
// The port names, the clear/enable controls and the reset are this
// implementation's choices.
module unfolded_lfsr #(
  parameter int unsigned    R = bch_pkg::BCH_R,
  parameter logic [R:0]     G = bch_pkg::BCH_G,
  parameter int unsigned    J = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         en,
  input  logic [J-1:0] din,
  output logic [R-1:0] rem_o
);

  logic [R-1:0] y_q;
  // stage[0] is the register output, stage[i+1] the output of copy i.
  logic [R-1:0] stage [J+1];

  assign stage[0] = y_q;

  for (genvar i = 0; i < J; i++) begin : g_copy
    logic fb;
    assign fb = stage[i][R-1];
    // bit 0: new stream bit, plus feedback if g has a constant term
    assign stage[i+1][0] = din[J-1-i] ^ (fb & G[0]);
    for (genvar b = 1; b < R; b++) begin : g_tap
      assign stage[i+1][b] = stage[i][b-1] ^ (fb & G[b]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y_q <= '0;
    else if (clear)  y_q <= '0;
    else if (en)     y_q <= stage[J];
  end

  assign rem_o = y_q;

endmodule
