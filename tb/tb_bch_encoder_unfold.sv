// tb_bch_encoder_unfold -- the encoder at the three unfolding factors
// J = 1 (serial LFSR), J = 2 and J = 3, side by side.
//
// The same message is given to all three at the same clock edge.  Each must
// produce the same, correct codeword; the serial encoder after 31 LFSR
// clocks, the two-parallel after 16 and the three-parallel after 11
// (ceil(31/J)).  The first message is the worked example 0000000001000001,
// whose parity is 100101000100010.  Each instance's encoding time is also
// measured and reported, showing the cycle reduction unfolding brings.
module tb_bch_encoder_unfold;

  localparam int unsigned K = 16;
  localparam int unsigned N = 31;
  localparam int unsigned R = N - K;
  localparam logic [R:0]  G = 16'h8FAF;
  localparam int unsigned NWORDS = 300;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [K-1:0] msg = '0;
  logic [2:0]   rdy, ov;
  logic [N-1:0] cw [3];

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  bch_encoder #(.J(1)) dut1 (.clk, .rst_n, .in_valid, .in_ready(rdy[0]), .msg,
                             .out_valid(ov[0]), .codeword(cw[0]));
  bch_encoder #(.J(2)) dut2 (.clk, .rst_n, .in_valid, .in_ready(rdy[1]), .msg,
                             .out_valid(ov[1]), .codeword(cw[1]));
  bch_encoder #(.J(3)) dut3 (.clk, .rst_n, .in_valid, .in_ready(rdy[2]), .msg,
                             .out_valid(ov[2]), .codeword(cw[2]));

  initial begin
    repeat (NWORDS * 40 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [R-1:0] poly_mod(logic [63:0] v);
    for (int i = 63; i >= int'(R); i--) if (v[i]) v ^= (64'(G) << (i - R));
    return v[R-1:0];
  endfunction

  localparam int unsigned EXP_CYC [3] = '{31, 16, 11};

  initial begin
    int seen [3];
    logic [N-1:0] exp_cw;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int w = 0; w < NWORDS; w++) begin
      msg = (w == 0) ? 16'b0000000001000001 : 16'($urandom);
      exp_cw = {msg, poly_mod(64'({msg, 15'b0}))};
      if (w == 0) begin
        checks++;
        if (exp_cw[R-1:0] !== 15'b100101000100010) begin
          failures++;
          $display("FAIL reference parity of the worked example");
        end
      end
      checks++;
      if (rdy !== 3'b111) begin
        failures++;
        $display("FAIL not all encoders ready");
      end
      in_valid = 1'b1;
      @(posedge clk); #1;
      in_valid = 1'b0;
      seen = '{-1, -1, -1};
      for (int c = 1; c <= 40 && (seen[0] < 0); c++) begin
        @(posedge clk);
        for (int j = 0; j < 3; j++) if (ov[j] && seen[j] < 0) seen[j] = c;
        #1;
        for (int j = 0; j < 3; j++) if (seen[j] == c) begin
          checks++;
          if (cw[j] !== exp_cw) begin
            failures++;
            $display("FAIL J=%0d msg %h: got %b expected %b", j + 1, msg, cw[j], exp_cw);
          end
        end
      end
      for (int j = 0; j < 3; j++) begin
        checks++;
        // out_valid is registered on the EXP_CYC-th edge after acceptance
        // and is seen at the next one (seen[] counts edges from acceptance)
        if (seen[j] - 1 != int'(EXP_CYC[j])) begin
          failures++;
          $display("FAIL J=%0d result after %0d clocks, expected %0d", j + 1, seen[j] - 1,
                   EXP_CYC[j]);
        end
      end
      if (w == 0)
        $display("encoding time: J=1 %0d, J=2 %0d, J=3 %0d clocks", seen[0] - 1, seen[1] - 1,
                 seen[2] - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
