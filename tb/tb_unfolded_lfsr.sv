// tb_unfolded_lfsr -- self-checking testbench for unfolded_lfsr.
//
// Three copies of the LFSR run side by side: J = 1 (serial), J = 2 and the
// default J = 3.  They are checked against
//   * the data-flow tables of the worked example: message 0000000001000001
//     with its leading zeros dropped, i.e. the 22-bit stream 1000001 followed
//     by fifteen zeros.  Register contents after every clock are compared
//     with the tabulated y(14 to 0); the final parity is 100101000100010,
//     reached in 22 clocks (J = 1), 11 clocks (J = 2) and, with two leading
//     zeros to fill the last group, 8 clocks (J = 3);
//   * a bit-serial reference model written here, on random streams, and an
//     integer long division for complete 31-bit codeword streams;
//   * the generator polynomial the package derives (must be 16'h8FAF);
//   * hold when en is low and priority of clear over en.
// Every J = 2 and J = 3 row equals the serial register value after the same
// number of bits (2 or 3 times the clock number).
module tb_unfolded_lfsr;

  localparam int unsigned R = 15;
  localparam logic [R:0]  G = 16'h8FAF;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear = 1'b0;
  logic en = 1'b0;
  logic [0:0] din1 = '0;
  logic [1:0] din2 = '0;
  logic [2:0] din3 = '0;
  logic [R-1:0] rem1, rem2, rem3;

  int checks = 0;
  int failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  unfolded_lfsr #(.J(1)) dut1 (.clk, .rst_n, .clear, .en, .din(din1), .rem_o(rem1));
  unfolded_lfsr #(.J(2)) dut2 (.clk, .rst_n, .clear, .en, .din(din2), .rem_o(rem2));
  unfolded_lfsr          dut3 (.clk, .rst_n, .clear, .en, .din(din3), .rem_o(rem3));

  // Watchdog.
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [R-1:0] got, logic [R-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %015b expected %015b", what, got, exp);
    end
  endtask

  // Reference: one serial division step.
  function automatic logic [R-1:0] ref_step(logic [R-1:0] y, logic b);
    logic fb;
    fb = y[R-1];
    y  = {y[R-2:0], b};
    if (fb) y ^= G[R-1:0];
    return y;
  endfunction

  // Reference: remainder of a polynomial of up to 64 bits by g(x).
  function automatic logic [R-1:0] ref_mod(logic [63:0] v);
    for (int i = 63; i >= R; i--) if (v[i]) v ^= (64'(G) << (i - R));
    return v[R-1:0];
  endfunction

  // Serial LFSR, y(14 to 0) after clocks 1..22.
  localparam logic [R-1:0] TAB1 [22] = '{
    15'b000000000000001, 15'b000000000000010, 15'b000000000000100,
    15'b000000000001000, 15'b000000000010000, 15'b000000000100000,
    15'b000000001000001, 15'b000000010000010, 15'b000000100000100,
    15'b000001000001000, 15'b000010000010000, 15'b000100000100000,
    15'b001000001000000, 15'b010000010000000, 15'b100000100000000,
    15'b000110110101111, 15'b001101101011110, 15'b011011010111100,
    15'b110110101111000, 15'b101010101011111, 15'b010010100010001,
    15'b100101000100010 };

  // J = 2, after clocks 1..11 (serial values after 2, 4, ... 22 bits).
  localparam logic [R-1:0] TAB3 [11] = '{
    15'b000000000000010, 15'b000000000001000, 15'b000000000100000,
    15'b000000010000010, 15'b000001000001000, 15'b000100000100000,
    15'b010000010000000, 15'b000110110101111, 15'b011011010111100,
    15'b101010101011111, 15'b100101000100010 };

  // J = 3, after clocks 1..7 (21 bits of the 22-bit stream).
  localparam logic [R-1:0] TAB2 [7] = '{
    15'b000000000000100, 15'b000000000100000, 15'b000000100000100,
    15'b000100000100000, 15'b100000100000000, 15'b011011010111100,
    15'b010010100010001 };

  localparam logic [R-1:0] PARITY = 15'b100101000100010;

  // The 22-bit stream, first bit in bit 21.
  localparam logic [21:0] STREAM = {7'b1000001, 15'b0};

  task automatic do_clear();
    clear = 1'b1; en = 1'b0;
    @(posedge clk); #1;
    clear = 1'b0;
  endtask

  logic [R-1:0] m1, m2, m3;
  logic [63:0]  cw;
  logic [23:0]  s24;

  initial begin
    // Generator polynomial derived in the package from GF(2^5).
    checks++;
    if (bch_pkg::BCH_G !== G) begin
      failures++;
      $display("FAIL derived g = %h", bch_pkg::BCH_G);
    end

    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset J=1", rem1, '0);
    check("reset J=3", rem3, '0);

    // ---- serial, 22 clocks
    do_clear();
    for (int c = 0; c < 22; c++) begin
      din1 = STREAM[21-c]; en = 1'b1;
      @(posedge clk); #1;
      check($sformatf("serial clock %0d", c+1), rem1, TAB1[c]);
    end
    en = 1'b0;

    // ---- J = 2, 11 clocks
    do_clear();
    for (int c = 0; c < 11; c++) begin
      din2 = STREAM[21-2*c -: 2]; en = 1'b1;
      @(posedge clk); #1;
      check($sformatf("J=2 clock %0d", c+1), rem2, TAB3[c]);
    end
    en = 1'b0;

    // ---- J = 3, first 7 clocks of the unpadded stream
    do_clear();
    for (int c = 0; c < 7; c++) begin
      din3 = STREAM[21-3*c -: 3]; en = 1'b1;
      @(posedge clk); #1;
      check($sformatf("J=3 clock %0d", c+1), rem3, TAB2[c]);
    end
    en = 1'b0;

    // ---- J = 3, 8 clocks with two leading zeros: the parity
    do_clear();
    s24 = {2'b00, STREAM};
    for (int c = 0; c < 8; c++) begin
      din3 = s24[23-3*c -: 3]; en = 1'b1;
      @(posedge clk); #1;
    end
    en = 1'b0;
    check("J=3 parity in 8 clocks", rem3, PARITY);

    // ---- hold when en is low, clear wins over en
    m3 = rem3;
    din3 = 3'b111;
    repeat (3) @(posedge clk);
    #1 check("hold", rem3, m3);
    clear = 1'b1; en = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0; en = 1'b0;
    check("clear over en", rem3, '0);

    // ---- random streams from random states against the serial reference
    m1 = rem1; m2 = rem2; m3 = rem3;
    for (int c = 0; c < 600; c++) begin
      din1 = 1'($urandom); din2 = 2'($urandom); din3 = 3'($urandom);
      en = 1'b1;
      @(posedge clk); #1;
      m1 = ref_step(m1, din1[0]);
      m2 = ref_step(ref_step(m2, din2[1]), din2[0]);
      m3 = ref_step(ref_step(ref_step(m3, din3[2]), din3[1]), din3[0]);
      check($sformatf("random J=1 clock %0d", c), rem1, m1);
      check($sformatf("random J=2 clock %0d", c), rem2, m2);
      check($sformatf("random J=3 clock %0d", c), rem3, m3);
    end
    en = 1'b0;

    // ---- whole codewords at J = 3: PAD(2) zeros, 16 message bits, 15 zeros
    for (int t = 0; t < 200; t++) begin
      logic [15:0] msg;
      logic [32:0] st;
      msg = 16'($urandom);
      st  = {2'b00, msg, 15'b0};
      do_clear();
      for (int c = 0; c < 11; c++) begin
        din3 = st[32-3*c -: 3]; en = 1'b1;
        @(posedge clk); #1;
      end
      en = 1'b0;
      cw = 64'({msg, 15'b0});
      check($sformatf("codeword parity msg %h", msg), rem3, ref_mod(cw));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
