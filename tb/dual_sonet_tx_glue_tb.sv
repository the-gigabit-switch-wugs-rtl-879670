// dual_sonet_tx_glue_tb: self-checking test of the dual 155 Mb/s transmit glue.
//
// Plays OPP 16-bit cells (27 words, SOC on the first, DAV low throughout) with
// random VPI[7], with gaps between them, and checks per word: TDAT equals the
// OPP data except bit 11 of the first word, which must be 0; exactly the
// enable of the fiber chosen by the cell's VPI[7] follows DAV; TCA_FF_LINK is
// the AND of TCA1 and TCA2.
module dual_sonet_tx_glue_tb;
  logic clk = 0, rst_n = 0;
  logic [15:0] d = 0, tdat;
  logic soc = 0, dav_n = 1, tca1 = 0, tca2 = 0;
  logic tca_ff, we1_n, we2_n;
  int checks = 0, failures = 0;
  int n_f0 = 0, n_f1 = 0;

  dual_sonet_tx_glue dut (.clk(clk), .rst_n(rst_n), .d_l_opp(d), .soc_l_opp(soc),
    .dav_l_opp_n(dav_n), .tca_ff_link(tca_ff), .tdat(tdat), .twrenb1_n(we1_n),
    .twrenb2_n(we2_n), .tca1(tca1), .tca2(tca2));

  always #20 clk = ~clk;

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic fib;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20; c++) begin
      fib = 1'($urandom);
      if (fib) n_f1++; else n_f0++;
      for (int w = 0; w < 27; w++) begin
        @(negedge clk);
        d = 16'($urandom);
        if (w == 0) d[11] = fib;
        soc = (w == 0); dav_n = 0;
        tca1 = 1'($urandom); tca2 = 1'($urandom);
        #1;
        chk(tdat == (w == 0 ? (d & 16'hF7FF) : d), "data / VPI[7] cleared");
        chk(we1_n == fib && we2_n == !fib, "enable steering");
        chk(tca_ff == (tca1 & tca2), "TCA AND");
      end
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        soc = 0; dav_n = 1; d = 16'($urandom);
        #1;
        chk(we1_n && we2_n, "no enable between cells");
        chk(tdat == d, "data passes between cells");
      end
    end
    chk(n_f0 > 0 && n_f1 > 0, "both fibers used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
