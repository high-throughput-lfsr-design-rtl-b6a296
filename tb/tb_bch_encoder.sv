// tb_bch_encoder -- end-to-end testbench of the BCH(31,16) encoder at its
// default parameters (J = 3).
//
// A driver offers 16-bit messages with random idle gaps and holds each one
// until it is accepted; a monitor on the clock edge records every accepted
// word and compares every result with
//   * a reference remainder of msg(x) * x^15 by g(x), by long division here;
//   * the code property: the whole codeword must be a multiple of g(x);
//   * the worked example: message 0000000001000001 gives parity
//     100101000100010;
// and checks the timing: a result is registered exactly NCYC = ceil(31/3) =
// 11 clock edges after the edge that accepted its word, back-to-back results are
// NCYC+1 = 12 clocks apart, and the codeword holds until the next word is
// accepted.  Each handshake situation is counted and must occur: results,
// words held back while the encoder is busy (stall), words accepted in the
// cycle a result is shown (back-to-back), idle gaps, held results.
module tb_bch_encoder;

  localparam int unsigned K = 16;
  localparam int unsigned N = 31;
  localparam int unsigned R = N - K;
  localparam int unsigned NCYC = 11;
  localparam logic [R:0]  G = 16'h8FAF;
  localparam int unsigned NWORDS = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic in_ready;
  logic [K-1:0] msg = '0;
  logic out_valid;
  logic [N-1:0] codeword;

  int checks = 0;
  int failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;

  bch_encoder dut (
    .clk, .rst_n, .in_valid, .in_ready, .msg, .out_valid, .codeword
  );

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

  task automatic check(string what, logic [N-1:0] got, logic [N-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %031b expected %031b", what, got, exp);
    end
  endtask

  task automatic check_int(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------- monitor
  logic [K-1:0] acc_msg [$];
  longint       acc_cyc [$];
  bit           acc_b2b [$];
  int n_results = 0, n_stall = 0, n_b2b = 0, n_idle = 0, n_hold = 0;
  longint last_result_cycle = -1;
  bit     holding = 1'b0;
  logic [N-1:0] held_cw;
  int     n_period = 0;

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (holding && !out_valid) begin
        check("codeword held", codeword, held_cw);
        n_hold++;
      end
      if (out_valid) begin
        logic [K-1:0] m;
        longint       c;
        bit           b2b;
        n_results++;
        if (acc_msg.size() == 0) begin
          failures++; checks++;
          $display("FAIL result without accepted word");
        end else begin
          m = acc_msg.pop_front();
          c = acc_cyc.pop_front();
          b2b = acc_b2b.pop_front();
          check($sformatf("codeword of %h", m), codeword, {m, poly_mod(64'({m, 15'b0}))});
          checks++;
          if (poly_mod(64'(codeword)) != '0) begin
            failures++;
            $display("FAIL codeword %b not a multiple of g", codeword);
          end
          // registered on the NCYC-th edge after the accepting edge, so seen on
          // the (NCYC+1)-th
          check_int("latency accept->out_valid", cycle - c, longint'(NCYC) + 1);
          if (m == 16'b0000000001000001) begin
            check("worked example", codeword, {16'b0000000001000001, 15'b100101000100010});
          end
          if (b2b && last_result_cycle >= 0) begin
            check_int("back-to-back result period", cycle - last_result_cycle, longint'(NCYC) + 1);
            n_period++;
          end
        end
        last_result_cycle = cycle;
        held_cw = codeword;
        holding = 1'b1;
      end
      if (in_valid && !in_ready) n_stall++;
      if (!in_valid && in_ready) n_idle++;
      if (in_valid && in_ready) begin
        if (out_valid) n_b2b++;
        acc_b2b.push_back(out_valid);
        acc_msg.push_back(msg);
        acc_cyc.push_back(cycle);
        holding = 1'b0;
      end
    end
  end

  // ---------------- driver
  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (in_ready !== 1'b1 || out_valid !== 1'b0) begin
      failures++;
      $display("FAIL after reset: in_ready=%b out_valid=%b", in_ready, out_valid);
    end
    for (int w = 0; w < NWORDS; w++) begin
      int gap;
      gap = ($urandom_range(0, 3) == 0) ? $urandom_range(1, 15) : 0;
      repeat (gap) @(posedge clk);
      #1;
      if (w == 0)      msg = 16'b0000000001000001;
      else if (w == 1) msg = 16'h0000;
      else if (w == 2) msg = 16'hFFFF;
      else             msg = 16'($urandom);
      in_valid = 1'b1;
      do @(posedge clk); while (!in_ready);
      #1 in_valid = 1'b0;
    end
    // drain
    repeat (NCYC + 5) @(posedge clk);
    check_int("every accepted word produced a result", longint'(n_results), longint'(NWORDS));
    $display("results=%0d stalls=%0d back_to_back=%0d idle=%0d held=%0d periods=%0d",
             n_results, n_stall, n_b2b, n_idle, n_hold, n_period);
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no stall seen"); end
    checks++; if (n_b2b   == 0) begin failures++; $display("FAIL no back-to-back word seen"); end
    checks++; if (n_idle  == 0) begin failures++; $display("FAIL no idle gap seen"); end
    checks++; if (n_hold  == 0) begin failures++; $display("FAIL no held result seen"); end
    checks++; if (n_period == 0) begin failures++; $display("FAIL no back-to-back period seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
