// tb_msg_piso -- self-checking testbench for msg_piso.
//
// Two instances: the encoder's default shape (W = 18, J = 3, which J
// divides) and W = 16, J = 3 (which it does not).  Each random word is
// loaded, then shifted out group by group; every group on sout is compared
// with the slice of the word expected at that point, and the groups after
// the word must be all zeros (they become the appended zero bits of the
// encoder).  Idle cycles between shifts must leave sout unchanged.
module tb_msg_piso;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic shift = 1'b0;
  logic [17:0] pa = '0;
  logic [15:0] pb = '0;
  logic [2:0]  sa, sb;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  msg_piso                 dut_a (.clk, .rst_n, .load, .shift, .pdata(pa), .sout(sa));
  msg_piso #(.W(16), .J(3)) dut_b (.clk, .rst_n, .load, .shift, .pdata(pb), .sout(sb));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [2:0] got, logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %03b expected %03b", what, got, exp);
    end
  endtask

  initial begin
    logic [29:0] ea;   // word a followed by zeros, 10 groups
    logic [29:0] eb;   // word b followed by zeros, 10 groups
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check("reset a", sa, 3'b000);

    for (int t = 0; t < 300; t++) begin
      pa = 18'($urandom); pb = 16'($urandom);
      ea = {pa, 12'b0};
      eb = {pb, 14'b0};
      load = 1'b1;
      @(posedge clk); #1;
      load = 1'b0;
      for (int g = 0; g < 10; g++) begin
        check($sformatf("a word %h group %0d", pa, g), sa, ea[29-3*g -: 3]);
        check($sformatf("b word %h group %0d", pb, g), sb, eb[29-3*g -: 3]);
        // sometimes pause: sout must hold
        if ($urandom_range(0, 3) == 0) begin
          @(posedge clk); #1;
          check("a hold", sa, ea[29-3*g -: 3]);
        end
        shift = 1'b1;
        @(posedge clk); #1;
        shift = 1'b0;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
