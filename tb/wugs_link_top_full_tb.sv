// wugs_link_top_full_tb: the switch port at its default sizes, including the
// full 2^24-clock start-up period of the receive side.
//
// A 16-bit adapter that loops the OPP back into the IPP. After the switch
// reset the testbench counts fabric clocks until the IPP stops ignoring its
// input (expected 2^24), checks that nothing was accepted before, then sends
// five random cells through the port and checks that they come back intact
// and in order.
module wugs_link_top_full_tb;
  import link_pkg::*;

  logic clk = 0, rst_n = 0, clk_link = 0;
  logic [15:0] d_l_opp, d_h_opp, ad_d_l_link, ad_tdat;
  logic dav_l_opp_n, dav_h_opp_n, soc_l_opp, soc_h_opp, reset_opp_n;
  logic tx_valid = 0, tx_take;
  cell_t tx_cell, rx_cell;
  logic rx_valid, rx_hec_err, rx_link_up, rx_ignoring;
  logic [15:0] rx_hec_err_count, rx_cell_count, rx_overflow_count;
  link_type_e rx_link_type;
  logic ad_tca_ff_link, ad_soc_l_link, ad_tw1_n, ad_tw2_n, ad_rd1_n, ad_rd2_n;
  int checks = 0, failures = 0;

  wugs_link_top dut (
    .clk(clk), .rst_n(rst_n),
    .width_link(1'b0), .unassign_en(1'b1), .pad_zero(1'b1), .d_skew_link(1'b0), .type_link(4'h5),
    .clk_link(clk_link), .tca_ff_link(1'b1), .tca_link(1'b0),
    .d_l_opp(d_l_opp), .d_h_opp(d_h_opp), .dav_l_opp_n(dav_l_opp_n), .dav_h_opp_n(dav_h_opp_n),
    .soc_l_opp(soc_l_opp), .soc_h_opp(soc_h_opp), .reset_opp_n(reset_opp_n),
    .tx_cell_valid(tx_valid), .tx_cell(tx_cell), .tx_cell_take(tx_take),
    .strb_l_link(~clk_link), .d_l_link(d_l_opp), .soc_l_link(soc_l_opp), .up_l_link_n(1'b0),
    .strb_h_link(~clk_link), .d_h_link(16'h0), .soc_h_link(1'b0), .up_h_link_n(1'b1),
    .rx_cell_valid(rx_valid), .rx_cell(rx_cell), .rx_hec_err(rx_hec_err),
    .rx_hec_err_count(rx_hec_err_count), .rx_cell_count(rx_cell_count),
    .rx_overflow_count(rx_overflow_count), .rx_link_up(rx_link_up), .rx_ignoring(rx_ignoring),
    .rx_link_type(rx_link_type),
    .ad_clk_link(clk_link), .ad_reset_opp_n(reset_opp_n),
    .ad_d_l_opp(d_l_opp), .ad_soc_l_opp(soc_l_opp), .ad_dav_l_opp_n(dav_l_opp_n),
    .ad_tca_ff_link(ad_tca_ff_link), .ad_strb_l_link(~clk_link),
    .ad_d_l_link(ad_d_l_link), .ad_soc_l_link(ad_soc_l_link),
    .ad_tdat(ad_tdat), .ad_twrenb1_n(ad_tw1_n), .ad_twrenb2_n(ad_tw2_n),
    .ad_tca1(1'b1), .ad_tca2(1'b1),
    .ad_rdat(16'h0), .ad_rsoc(1'b0), .ad_rca1(1'b0), .ad_rca2(1'b0),
    .ad_rrdenb1_n(ad_rd1_n), .ad_rrdenb2_n(ad_rd2_n));

  always #4 clk = ~clk;
  always #20 clk_link = ~clk_link;

  function automatic cell_t rand_cell();
    cell_t c;
    c.hdr = $urandom | 32'h1;
    c.linkinfo = 8'($urandom);
    for (int i = 0; i < 12; i++) c.payload[i*32 +: 32] = $urandom;
    return c;
  endfunction

  int to_send = 0;
  cell_t exp_q[$];
  always @(posedge clk_link) begin
    if (tx_take) begin
      exp_q.push_back(tx_cell);
      to_send--;
      tx_cell <= rand_cell();
      if (to_send <= 0) tx_valid <= 1'b0;
    end
  end

  int got = 0;
  cell_t e;
  always @(posedge clk) begin
    if (rst_n && rx_valid && rx_cell.hdr != 32'h0) begin
      checks++;
      got++;
      e = exp_q.pop_front();
      if (rx_cell.hdr !== e.hdr || rx_cell.payload !== e.payload) begin
        failures++; $display("FAIL cell got %h exp %h", rx_cell.hdr, e.hdr);
      end
    end
  end

  // Power-up: until RESET_OPP has been seen low at a CLK_LINK edge the
  // port's flip-flops hold their power-up values, so its assertions are only
  // armed from then on.
  initial begin
    $assertoff(0, dut);
    do @(negedge clk_link); while (reset_opp_n !== 1'b0);
    @(negedge clk_link);
    $asserton(0, dut);
  end

  initial begin
    #300000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    tx_cell = rand_cell();
    repeat (10) @(posedge clk);
    rst_n = 1;
    n = 0;
    @(posedge clk);
    while (rx_ignoring) begin @(posedge clk); n++; end
    $display("start-up period: %0d fabric clocks", n);
    checks++;
    if (n < (1 << 24) - 4 || n > (1 << 24)) begin failures++; $display("FAIL start-up period %0d", n); end
    checks++;
    if (rx_cell_count != 0) begin failures++; $display("FAIL cells accepted during start-up"); end
    @(negedge clk_link);
    to_send = 5; tx_valid = 1;
    while (to_send > 0) @(negedge clk_link);
    repeat (3 * 27) @(negedge clk_link);
    checks++;
    if (got != 5 || exp_q.size() != 0) begin failures++; $display("FAIL %0d cells back, expected 5", got); end
    checks++;
    if (rx_hec_err_count != 0) begin failures++; $display("FAIL HEC errors on a clean link"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
