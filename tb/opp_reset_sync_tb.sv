// opp_reset_sync_tb: self-checking test of the RESET_OPP generator.
//
// Checks that RESET_OPP falls one fabric clock after the reset falls even with
// CLK_LINK stopped, that it rises on the fifth CLK_LINK rising edge after the
// retimed reset goes high, and that a reset pulse shorter than four CLK_LINK
// periods gives the double low pulse the circuit is known for.
module opp_reset_sync_tb;
  logic clk = 0, clk_link = 0, rst_n = 0, reset_opp_n;
  logic link_run = 1;
  int checks = 0, failures = 0;
  int edges;

  opp_reset_sync dut (.clk(clk), .rst_fab_n(rst_n), .clk_link(clk_link), .reset_opp_n(reset_opp_n));

  always #4 clk = ~clk;
  always #10 if (link_run) clk_link = ~clk_link;

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got=%0b exp=%0b t=%0t", what, got, exp, $time); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0;
    repeat (20) @(posedge clk_link);
    expect_eq(reset_opp_n, 1'b0, "held in reset");
    // release: count CLK_LINK edges after the retimed reset rises
    @(negedge clk); rst_n = 1;
    @(posedge clk); #1;            // retimed reset now high
    edges = 0;
    while (reset_opp_n !== 1'b1 && edges < 20) begin
      @(posedge clk_link); #1; edges++;
    end
    checks++;
    if (edges != 5) begin failures++; $display("FAIL release after %0d CLK_LINK edges, expected 5", edges); end
    // assertion is asynchronous to CLK_LINK: stop CLK_LINK and assert reset
    repeat (3) @(posedge clk_link);
    #3 link_run = 0;
    @(negedge clk); rst_n = 0;
    @(posedge clk); #1;
    expect_eq(reset_opp_n, 1'b0, "asynchronous assertion with CLK_LINK stopped");
    repeat (10) @(posedge clk);
    expect_eq(reset_opp_n, 1'b0, "stays low without CLK_LINK");
    link_run = 1;
    @(negedge clk); rst_n = 1;
    repeat (12) @(posedge clk_link);
    #1 expect_eq(reset_opp_n, 1'b1, "released again");
    // short pulse (two fabric clocks, much less than four CLK_LINK periods)
    @(posedge clk_link); #2;
    begin
      int falls;
      logic prev;
      falls = 0;
      prev = reset_opp_n;
      fork
        begin
          @(negedge clk); rst_n = 0;
          @(negedge clk); @(negedge clk); rst_n = 1;
        end
        repeat (400) begin
          #1;
          if (prev === 1'b1 && reset_opp_n === 1'b0) falls++;
          prev = reset_opp_n;
        end
      join
      checks++;
      if (falls != 2) begin failures++; $display("FAIL short pulse gave %0d low pulses, expected 2", falls); end
    end
    expect_eq(reset_opp_n, 1'b1, "released after short pulse");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
