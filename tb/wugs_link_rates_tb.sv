// wugs_link_rates_tb: the switch port at the clock rates of the adapters it
// serves, looped back from the OPP into the IPP.
//
// The fabric clock runs at 120 MHz. For each adapter the link clock is set to
// the rate that adapter needs, a burst of back-to-back data cells is sent, and
// the testbench checks:
//  * that every OPP cell starts exactly one cell cycle (27 or 14 link clocks)
//    after the previous one, so the port keeps its full cell rate;
//  * that every cell arrives at the IPP intact, in order, with no HEC error and
//    no clock-crossing FIFO overflow;
//  * that the measured cell rate at the IPP matches the link clock divided by
//    the cycle length, and is at least the cell rate the adapter's line needs.
// Set-ups:
//  1 155 Mb/s SONET: 16-bit, 25 MHz, TCA_LINK flow control;
//  2 622 Mb/s SONET: 16-bit at the 80 MHz maximum;
//  3 2.488 Gb/s SONET: 32-bit at the 80 MHz maximum;
//  4 2.5 Gb/s double G-Link: 32-bit with de-skew, 62.5 MHz halves, the high
//    half 14 ns late (the limit is one period, 16 ns).
// The needed rates are SONET payload rates (149.76, 599.04 and 2396.16 Mb/s)
// and the G-Link word rate, divided by 424 bits per cell. The start-up ignore
// period is shortened to 2^6 fabric clocks.
module wugs_link_rates_tb;
  import link_pkg::*;

  localparam int IGN   = 6;
  localparam int BURST = 40;

  logic clk = 0, rst_n = 0, clk_link = 0;
  logic width_link = 0, d_skew_link = 0;
  logic tca_ff_in = 1, tca_link = 0;
  logic [15:0] d_l_opp, d_h_opp;
  logic dav_l_opp_n, dav_h_opp_n, soc_l_opp, soc_h_opp, reset_opp_n;
  logic tx_valid = 0, tx_take;
  cell_t tx_cell;
  logic strb_l, strb_h = 0;
  logic [15:0] d_h_link = 0;
  logic soc_h_link = 0;
  logic rx_valid, rx_hec_err, rx_link_up, rx_ignoring;
  cell_t rx_cell;
  logic [15:0] rx_hec_err_count, rx_cell_count, rx_overflow_count;
  link_type_e rx_link_type;
  logic ad_tca_ff_link, ad_soc_l_link, ad_tw1_n, ad_tw2_n, ad_rd1_n, ad_rd2_n;
  logic [15:0] ad_d_l_link, ad_tdat;
  int checks = 0, failures = 0;

  wugs_link_top #(.IGNORE_LOG2(IGN)) dut (
    .clk(clk), .rst_n(rst_n),
    .width_link(width_link), .unassign_en(1'b1), .pad_zero(1'b1), .d_skew_link(d_skew_link),
    .type_link(4'h3),
    .clk_link(clk_link), .tca_ff_link(tca_ff_in), .tca_link(tca_link),
    .d_l_opp(d_l_opp), .d_h_opp(d_h_opp), .dav_l_opp_n(dav_l_opp_n), .dav_h_opp_n(dav_h_opp_n),
    .soc_l_opp(soc_l_opp), .soc_h_opp(soc_h_opp), .reset_opp_n(reset_opp_n),
    .tx_cell_valid(tx_valid), .tx_cell(tx_cell), .tx_cell_take(tx_take),
    .strb_l_link(strb_l), .d_l_link(d_l_opp), .soc_l_link(soc_l_opp), .up_l_link_n(1'b0),
    .strb_h_link(strb_h), .d_h_link(d_h_link), .soc_h_link(soc_h_link), .up_h_link_n(1'b0),
    .rx_cell_valid(rx_valid), .rx_cell(rx_cell), .rx_hec_err(rx_hec_err),
    .rx_hec_err_count(rx_hec_err_count), .rx_cell_count(rx_cell_count),
    .rx_overflow_count(rx_overflow_count), .rx_link_up(rx_link_up), .rx_ignoring(rx_ignoring),
    .rx_link_type(rx_link_type),
    .ad_clk_link(clk_link), .ad_reset_opp_n(reset_opp_n),
    .ad_d_l_opp(d_l_opp), .ad_soc_l_opp(soc_l_opp), .ad_dav_l_opp_n(dav_l_opp_n),
    .ad_tca_ff_link(ad_tca_ff_link), .ad_strb_l_link(strb_l),
    .ad_d_l_link(ad_d_l_link), .ad_soc_l_link(ad_soc_l_link),
    .ad_tdat(ad_tdat), .ad_twrenb1_n(ad_tw1_n), .ad_twrenb2_n(ad_tw2_n),
    .ad_tca1(1'b1), .ad_tca2(1'b1),
    .ad_rdat(16'h0), .ad_rsoc(1'b0), .ad_rca1(1'b0), .ad_rca2(1'b0),
    .ad_rrdenb1_n(ad_rd1_n), .ad_rrdenb2_n(ad_rd2_n));

  // Clocks. The fabric runs at 120 MHz; the link clock period is set per
  // set-up. The IPP strobes are the link clock inverted, so they sample in
  // the middle of each OPP word; the high half may travel 'skew' ns late.
  realtime link_half = 20.0;
  realtime skew = 0.0;
  always #(4.1667ns) clk = ~clk;
  always #(link_half) clk_link = ~clk_link;
  assign strb_l = ~clk_link;
  always @(strb_l)    strb_h     <= #(skew) strb_l;
  always @(d_h_opp)   d_h_link   <= #(skew) d_h_opp;
  always @(soc_h_opp) soc_h_link <= #(skew) soc_h_opp;

  // Power-up: the port's assertions are armed once RESET_OPP has been low.
  initial begin
    $assertoff(0, dut);
    do @(negedge clk_link); while (reset_opp_n !== 1'b0);
    @(negedge clk_link);
    $asserton(0, dut);
  end

  function automatic cell_t rand_cell();
    cell_t c;
    c.hdr = $urandom;
    c.hdr[16] = 1'b1;                  // first word never zero: not unassigned
    c.linkinfo = 8'($urandom);
    for (int i = 0; i < 12; i++) c.payload[i*32 +: 32] = $urandom;
    return c;
  endfunction

  // ------------------------------------------------------------ cell source
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

  // ------------------------------------------------------------ OPP spacing
  // Link clocks between consecutive data-cell starts during a burst.
  int cyc = 27;
  int since = -1;               // link clocks since the last data SOC, -1: none yet
  int spacing_bad = 0, spacings = 0;
  always @(posedge clk_link) begin
    if (reset_opp_n && soc_l_opp && !dav_l_opp_n && d_l_opp != 16'h0) begin
      if (since >= 0) begin
        spacings++;
        if (since != cyc) begin
          spacing_bad++;
          $display("FAIL data cells %0d link clocks apart, expected %0d", since, cyc);
        end
      end
      since = 1;
    end else if (since >= 0) begin
      since++;
    end
  end

  // ------------------------------------------------------------ IPP checker
  int got = 0;
  realtime t_first, t_last;
  cell_t e;
  always @(posedge clk) begin
    if (rst_n && rx_valid && rx_cell.hdr != 32'h0) begin
      checks++;
      if (got == 0) t_first = $realtime;
      t_last = $realtime;
      got++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected cell %h", rx_cell.hdr);
      end else begin
        e = exp_q.pop_front();
        if (rx_cell.hdr !== e.hdr || rx_cell.payload !== e.payload) begin
          failures++; $display("FAIL cell got %h expected %h", rx_cell.hdr, e.hdr);
        end
      end
    end
  end

  initial begin
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input string name, input realtime period, input logic wide,
                     input logic dsk, input realtime sk, input logic use_tca_link,
                     input real need_cells_per_s);
    realtime per_cell, want;
    real rate, rate_nom;
    rst_n = 0;
    link_half = period / 2.0;
    width_link = wide; d_skew_link = dsk; skew = sk;
    tca_ff_in = !use_tca_link; tca_link = use_tca_link;
    cyc = wide ? 14 : 27;
    repeat (20) @(posedge clk);
    rst_n = 1;
    while (rx_ignoring || !reset_opp_n) @(posedge clk);
    // let unassigned cells align the halves before data flows
    repeat (3 * cyc) @(negedge clk_link);
    got = 0; since = -1; spacing_bad = 0; spacings = 0;
    @(negedge clk_link);
    to_send = BURST; tx_valid = 1;
    while (to_send > 0) @(negedge clk_link);
    repeat (3 * cyc) @(negedge clk_link);

    checks++;
    if (got != BURST || exp_q.size() != 0) begin
      failures++; $display("FAIL %s: %0d of %0d cells arrived", name, got, BURST);
      exp_q.delete();
    end
    checks++;
    if (spacings != BURST - 1 || spacing_bad != 0) begin
      failures++; $display("FAIL %s: %0d spacings, %0d wrong", name, spacings, spacing_bad);
    end
    checks++;
    if (rx_overflow_count != 0 || rx_hec_err_count != 0) begin
      failures++; $display("FAIL %s: %0d overflows, %0d HEC errors", name, rx_overflow_count, rx_hec_err_count);
    end
    per_cell = (t_last - t_first) / (BURST - 1);
    want = period * cyc;
    rate = 1.0e9 / (per_cell / 1ns);
    rate_nom = 1.0e9 / (want / 1ns);
    $display("%s: %0.1f ns per cell (expected %0.1f), %0.0f cells/s, line needs %0.0f",
             name, per_cell / 1ns, want / 1ns, rate, need_cells_per_s);
    checks++;
    if (per_cell > want + 1ns || per_cell < want - 1ns) begin
      failures++; $display("FAIL %s: cell spacing at the IPP", name);
    end
    // The spacing check above ties the measurement to the nominal rate, which
    // is compared with the need (the double G-Link needs exactly all of it).
    checks++;
    if (rate_nom < need_cells_per_s * 0.9999) begin
      failures++; $display("FAIL %s: cell rate below the line's need", name);
    end
  endtask

  initial begin
    tx_cell = rand_cell();
    run("155 Mb/s SONET, 16-bit, 25 MHz, TCA_LINK", 40ns,   0, 0, 0ns,  1, 149.76e6 / 424);
    run("622 Mb/s SONET, 16-bit, 80 MHz",           12.5ns, 0, 0, 0ns,  0, 599.04e6 / 424);
    run("2.488 Gb/s SONET, 32-bit, 80 MHz",         12.5ns, 1, 0, 0ns,  0, 2396.16e6 / 424);
    run("2.5 Gb/s double G-Link, de-skew, 62.5 MHz", 16ns,  1, 1, 14ns, 0, 62.5e6 / 14);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
