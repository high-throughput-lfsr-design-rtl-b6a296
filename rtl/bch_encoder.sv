// bch_encoder -- systematic BCH(31,16) encoder built around a J-unfolded LFSR.
//
// A message word msg (k = 16 bits, msg[k-1] is the first bit on the line) is
// encoded into the n = 31 bit codeword {msg, parity}, where parity is the
// remainder of msg(x) * x^(n-k) divided by g(x)
// (g = x^15+x^11+x^10+x^9+x^8+x^7+x^5+x^3+x^2+x+1).
//
// Datapath: the message enters a parallel-in serial-out register (msg_piso),
// which hands J bits per clock to the unfolded LFSR (unfolded_lfsr).  After
// the message the PISO keeps delivering zeros, which supply the n-k appended
// zero bits.  The stream of n bits is preceded by PAD = ceil(n/J)*J - n zero
// bits so that it fills whole J-bit groups; leading zeros do not change the
// remainder.  The LFSR therefore runs NCYC = ceil(n/J) clocks per codeword:
// 31 for J = 1, 16 for J = 2 and 11 for the default J = 3.
//
// Handshake (this implementation's choice): a word is taken on a clock edge
// where in_valid and in_ready are both high.  in_ready is high whenever no
// encoding is running, including the cycle in which a result is presented.
// out_valid is high for one cycle, exactly NCYC clocks after the accepting
// edge; codeword stays stable from then until the next accepted word.  A new
// word may be accepted in the out_valid cycle, so back-to-back words are
// encoded one every NCYC+1 clocks (the extra clock loads the PISO and clears
// the LFSR).  Reset is asynchronous and active low.
module bch_encoder #(
  parameter int unsigned K = bch_pkg::BCH_K,
  parameter int unsigned N = bch_pkg::BCH_N,
  parameter int unsigned J = 3,
  parameter logic [N-K:0] G = bch_pkg::BCH_G
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [K-1:0] msg,
  output logic         out_valid,
  output logic [N-1:0] codeword
);

  localparam int unsigned R     = N - K;
  localparam int unsigned NCYC  = (N + J - 1) / J;
  localparam int unsigned PAD   = NCYC * J - N;
  localparam int unsigned W     = PAD + K;
  localparam int unsigned CNT_W = $clog2(NCYC + 1);

  typedef enum logic {
    S_IDLE,
    S_RUN
  } state_e;

  state_e             state_q;
  logic [CNT_W-1:0]   cnt_q;
  logic [K-1:0]       msg_q;
  logic               out_valid_q;
  logic               accept;
  logic               run;
  logic [J-1:0]       bits;
  logic [R-1:0]       parity;

  assign in_ready = (state_q == S_IDLE);
  assign accept   = in_valid && in_ready;
  assign run      = (state_q == S_RUN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      cnt_q       <= '0;
      msg_q       <= '0;
      out_valid_q <= 1'b0;
    end else begin
      out_valid_q <= 1'b0;
      unique case (state_q)
        S_IDLE: if (accept) begin
          msg_q   <= msg;
          cnt_q   <= '0;
          state_q <= S_RUN;
        end
        S_RUN: begin
          if (cnt_q == CNT_W'(NCYC - 1)) begin
            state_q     <= S_IDLE;
            out_valid_q <= 1'b1;
          end
          cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  msg_piso #(
    .W (W),
    .J (J)
  ) u_piso (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (accept),
    .shift (run),
    .pdata (W'(msg)),        // PAD leading zeros, then the message
    .sout  (bits)
  );

  unfolded_lfsr #(
    .R (R),
    .G (G),
    .J (J)
  ) u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (accept),
    .en    (run),
    .din   (bits),
    .rem_o (parity)
  );

  assign out_valid = out_valid_q;
  assign codeword  = {msg_q, parity};

  // A result is presented for one cycle only; an encoding needs NCYC >= 1
  // clocks, so two results can never be adjacent.
  a_out_valid_pulse: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid |=> !out_valid)
    else $error("bch_encoder: out_valid held for more than one cycle");

  // No word is taken while an encoding runs.
  a_no_accept_when_busy: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> !accept)
    else $error("bch_encoder: word accepted during an encoding");

endmodule
