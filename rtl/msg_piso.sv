// msg_piso -- parallel-in, J-bits-per-clock serial-out register that feeds
// the message into the unfolded LFSR.
//
// `load` captures a W-bit word.  Each `shift` presents the next J bits on
// sout, most significant first (sout[J-1] is the bit that would have left a
// one-bit serial register first), and moves the word up by J, filling the
// vacated bits with zeros.  Once the word is out, the register keeps
// delivering zeros: the encoder uses these as the n-k appended zero bits
// that multiply the message by x^(n-k) before the division.  sout is taken
// straight from the register, so it is valid in the same cycle the shift is
// requested.
//
// The encoder's message register is parallel-in serial-out ahead of the
// LFSR; widening its output to J bits to match the unfolded LFSR, and using
// its zero fill for the appended zeros, are this implementation's choices.
// load and shift must not be asserted together (checked by an assertion).
module msg_piso #(
  parameter int unsigned W = 18,
  parameter int unsigned J = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [W-1:0] pdata,
  output logic [J-1:0] sout
);

  // W+J bits so that J never needs to divide W: the top J bits are the
  // output window, the rest is the word still to come.
  logic [W+J-1:0] sr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      sr_q <= '0;
    else if (load)   sr_q <= {{J{1'b0}}, pdata} << J;
    else if (shift)  sr_q <= sr_q << J;
  end

  assign sout = sr_q[W+J-1 -: J];

  a_load_shift_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(load && shift))
    else $error("msg_piso: load and shift asserted together");

endmodule
