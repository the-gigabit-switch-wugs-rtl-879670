// wugs_link_top_tb: end-to-end test of the switch port and the dual 155 Mb/s
// adapter glue.
//
// The testbench plays the adapter card. Four set-ups, each entered through a
// switch reset because the straps may only change across reset:
//  A 16-bit, OPP looped straight back into the IPP (a G-Link-like card):
//    data cells, TCA_LINK flow control, no-cell cycles, PAD_ZERO low,
//    unassigned cells, and cells dropped while UP_L_LINK is high;
//  B 32-bit on one clock, looped back;
//  C 32-bit with de-skew: the high half travels 13 ns later than the low
//    half, on its own strobe, with unassigned cells filling idle cycles as
//    on the 2.4 Gb/s double G-Link card;
//  D the dual 155 Mb/s card: OPP -> transmit glue -> framer model, which
//    loops each fiber back -> receive glue -> IPP, plus a stray cell with
//    VPI[7] = 1 from the far end that must die on its HEC, and TCA2 low to
//    show the AND of the two TCAs stopping the OPP.
// Every data cell the OPP takes while reception is expected must come out of
// the IPP unchanged and in order (in D too: VPI[7] is cleared on the way out
// and restored from the fiber number on the way in). Each mechanism is counted and
// must have happened at least once. The start-up ignore period is shortened
// to 2^8 fabric clocks.
module wugs_link_top_tb;
  import link_pkg::*;

  localparam int IGN = 8;

  logic clk = 0, rst_n = 0, clk_link = 0;
  logic width_link = 0, unassign_en = 0, pad_zero = 1, d_skew_link = 0;
  logic [3:0] type_link = 4'h5;
  logic tca_ff_in = 1, tca_link = 0;
  logic [15:0] d_l_opp, d_h_opp;
  logic dav_l_opp_n, dav_h_opp_n, soc_l_opp, soc_h_opp, reset_opp_n;
  logic tx_valid = 0, tx_take;
  cell_t tx_cell;
  logic strb_l, strb_h;
  logic [15:0] d_l_link, d_h_link;
  logic soc_l_link, soc_h_link, up_l_n = 0, up_h_n = 0;
  logic rx_valid, rx_hec_err, rx_link_up, rx_ignoring;
  cell_t rx_cell;
  logic [15:0] rx_hec_err_count, rx_cell_count, rx_overflow_count;
  link_type_e rx_link_type;
  // adapter glue
  logic ad_tca_ff_link, ad_soc_l_link, ad_tw1_n, ad_tw2_n, ad_rd1_n, ad_rd2_n;
  logic [15:0] ad_d_l_link, ad_tdat;
  logic ad_tca2 = 1;
  logic [15:0] ad_rdat = 0;
  logic ad_rsoc = 0, ad_rca1, ad_rca2;
  logic dual;                       // set-up D: the card carries the glue

  int checks = 0, failures = 0;

  wugs_link_top #(.IGNORE_LOG2(IGN)) dut (
    .clk(clk), .rst_n(rst_n),
    .width_link(width_link), .unassign_en(unassign_en), .pad_zero(pad_zero),
    .d_skew_link(d_skew_link), .type_link(type_link),
    .clk_link(clk_link), .tca_ff_link(dual ? ad_tca_ff_link : tca_ff_in), .tca_link(tca_link),
    .d_l_opp(d_l_opp), .d_h_opp(d_h_opp), .dav_l_opp_n(dav_l_opp_n), .dav_h_opp_n(dav_h_opp_n),
    .soc_l_opp(soc_l_opp), .soc_h_opp(soc_h_opp), .reset_opp_n(reset_opp_n),
    .tx_cell_valid(tx_valid), .tx_cell(tx_cell), .tx_cell_take(tx_take),
    .strb_l_link(strb_l), .d_l_link(dual ? ad_d_l_link : d_l_link),
    .soc_l_link(dual ? ad_soc_l_link : soc_l_link), .up_l_link_n(up_l_n),
    .strb_h_link(strb_h), .d_h_link(d_h_link), .soc_h_link(soc_h_link), .up_h_link_n(up_h_n),
    .rx_cell_valid(rx_valid), .rx_cell(rx_cell), .rx_hec_err(rx_hec_err),
    .rx_hec_err_count(rx_hec_err_count), .rx_cell_count(rx_cell_count),
    .rx_overflow_count(rx_overflow_count), .rx_link_up(rx_link_up), .rx_ignoring(rx_ignoring),
    .rx_link_type(rx_link_type),
    .ad_clk_link(clk_link), .ad_reset_opp_n(reset_opp_n),
    .ad_d_l_opp(d_l_opp), .ad_soc_l_opp(soc_l_opp), .ad_dav_l_opp_n(dav_l_opp_n),
    .ad_tca_ff_link(ad_tca_ff_link), .ad_strb_l_link(strb_l),
    .ad_d_l_link(ad_d_l_link), .ad_soc_l_link(ad_soc_l_link),
    .ad_tdat(ad_tdat), .ad_twrenb1_n(ad_tw1_n), .ad_twrenb2_n(ad_tw2_n),
    .ad_tca1(1'b1), .ad_tca2(ad_tca2),
    .ad_rdat(ad_rdat), .ad_rsoc(ad_rsoc), .ad_rca1(ad_rca1), .ad_rca2(ad_rca2),
    .ad_rrdenb1_n(ad_rd1_n), .ad_rrdenb2_n(ad_rd2_n));

  always #4 clk = ~clk;
  always #20 clk_link = ~clk_link;           // 25 MHz link clock
  // The receive strobe is the link clock inverted: the IPP samples in the
  // middle of each OPP word. The high channel can be delayed by 'skew'.
  assign strb_l = ~clk_link;
  int skew = 0;
  always @(strb_l)    strb_h     <= #(skew) strb_l;
  always @(d_h_opp)   d_h_link   <= #(skew) d_h_opp;
  always @(soc_h_opp) soc_h_link <= #(skew) soc_h_opp;
  assign d_l_link   = d_l_opp;
  assign soc_l_link = soc_l_opp;

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  function automatic cell_t rand_cell();
    cell_t c;
    c.hdr = $urandom;
    if (c.hdr == 0) c.hdr = 1;
    c.linkinfo = 8'($urandom);
    for (int i = 0; i < 12; i++) c.payload[i*32 +: 32] = $urandom;
    return c;
  endfunction

  // ------------------------------------------------------------ mechanisms
  int m_cells16, m_cells32, m_deskew, m_unassigned, m_nocell, m_tca_link, m_pad_zero_low;
  int m_link_down_drop, m_ignored, m_hec_err, m_fiber0, m_fiber1, m_tca_and_block, m_reset_opp;

  // ------------------------------------------------------------ cell source
  int to_send = 0;
  logic expect_rx = 1;
  cell_t exp_q[$];
  always @(posedge clk_link) begin
    if (tx_take) begin
      if (expect_rx) exp_q.push_back(tx_cell);
      else m_link_down_drop++;
      if (!pad_zero) m_pad_zero_low++;
      if (!tca_ff_in && tca_link && !dual) m_tca_link++;
      to_send--;
      tx_cell <= rand_cell();
      if (to_send <= 0) tx_valid <= 1'b0;
    end
  end

  task automatic offer(input int n);
    @(negedge clk_link);
    to_send = n;
    tx_valid = (n > 0);
  endtask

  task automatic wait_sent();
    while (to_send > 0) @(negedge clk_link);
    repeat (2 * 27 + 40) @(negedge clk_link);
  endtask

  // OPP activity: unassigned cells and empty cell cycles.
  int soc_gap = 0;
  logic [15:0] first_word;
  always @(negedge clk_link) begin
    if (reset_opp_n) begin
      soc_gap++;
      if (soc_l_opp) begin
        soc_gap = 0;
        if (d_l_opp == 16'h0 && (!width_link || d_h_opp == 16'h0)) begin
          m_unassigned++;
          if (rx_ignoring) m_ignored++;
        end
      end
      if (soc_gap == (width_link ? 14 : 27) && tx_valid) m_nocell++;
    end
  end

  // ------------------------------------------------------------ checker
  cell_t e;
  always @(posedge clk) begin
    if (rst_n && rx_valid) begin
      if (rx_cell.hdr == 32'h0 && rx_cell.payload == '0) begin
        // unassigned cell: passes the HEC check, carries no data
      end else begin
        checks++;
        if (exp_q.size() == 0) begin
          failures++; $display("FAIL unexpected cell %h", rx_cell.hdr);
        end else begin
          e = exp_q.pop_front();
          if (rx_cell.hdr !== e.hdr || rx_cell.payload !== e.payload) begin
            failures++; $display("FAIL cell got %h exp %h (t=%0t)", rx_cell.hdr, e.hdr, $time);
          end else if (dual) begin
            // counted by the framer model
          end else if (!width_link) m_cells16++;
          else if (d_skew_link) m_deskew++;
          else m_cells32++;
        end
      end
    end
    if (rst_n && rx_hec_err) m_hec_err++;
  end

  // ------------------------------------------------------------ framer model (set-up D)
  typedef logic [26:0][15:0] cellw_t;
  cellw_t rxq0[$], rxq1[$];
  cellw_t txw;
  int txi = -1, txf = 0, rpos0 = 0, rpos1 = 0;
  assign ad_rca1 = rxq0.size() > 0;
  assign ad_rca2 = rxq1.size() > 0;

  // transmit side: collect a cell per fiber, recompute the HEC, loop it back
  always @(posedge clk_link) begin
    if (dual && reset_opp_n) begin
      if (!ad_tw1_n || !ad_tw2_n) begin
        if (soc_l_opp) begin txi = 0; txf = ad_tw2_n ? 0 : 1; end
        if (txi >= 0) begin
          txw[txi] = ad_tdat;
          txi++;
          if (txi == 27) begin
            checks++;
            if (txw[0][11] !== 1'b0) begin failures++; $display("FAIL VPI[7] not cleared toward the framer"); end
            txw[2][15:8] = ref_hec({txw[0], txw[1]});
            if (txf) begin rxq1.push_back(txw); m_fiber1++; end
            else     begin rxq0.push_back(txw); m_fiber0++; end
            txi = -1;
          end
        end
      end
    end
  end

  // receive side: present words as read
  always @(posedge strb_l) begin
    if (!ad_rd1_n && rxq0.size() > 0) begin
      ad_rdat <= rxq0[0][rpos0]; ad_rsoc <= (rpos0 == 0);
      rpos0++;
      if (rpos0 == 27) begin void'(rxq0.pop_front()); rpos0 = 0; end
    end else if (!ad_rd2_n && rxq1.size() > 0) begin
      ad_rdat <= rxq1[0][rpos1]; ad_rsoc <= (rpos1 == 0);
      rpos1++;
      if (rpos1 == 27) begin void'(rxq1.pop_front()); rpos1 = 0; end
    end else begin
      ad_rdat <= 16'($urandom); ad_rsoc <= 1'b0;
    end
  end

  // ------------------------------------------------------------ sequence
  task automatic setup(input logic wide, input logic dsk, input logic is_dual, input int sk,
                       input logic [3:0] typ);
    int t;
    rst_n = 0;
    width_link = wide; d_skew_link = dsk; dual = is_dual; skew = sk; type_link = typ;
    repeat (20) @(posedge clk);
    checks++;
    if (reset_opp_n !== 1'b0) begin failures++; $display("FAIL RESET_OPP not asserted"); end
    rst_n = 1;
    // unassigned cells flow during the start-up period and must be ignored
    unassign_en = 1;
    t = 0;
    while (!reset_opp_n && t < 100) begin @(posedge clk_link); t++; end
    if (reset_opp_n) m_reset_opp++;
    while (rx_ignoring) @(posedge clk);
    checks++;
    if (rx_cell_count != 0) begin failures++; $display("FAIL cells accepted during start-up"); end
    unassign_en = 0;
    repeat (3 * 27) @(negedge clk_link);
    checks++;
    if (rx_link_type !== link_type_e'(typ)) begin failures++; $display("FAIL link type"); end
  endtask

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
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e0;
    tx_cell = rand_cell();
    dual = 0;
    // ---------------- A: 16-bit loopback
    setup(0, 0, 0, 0, 4'h5);
    offer(8); wait_sent();
    pad_zero = 0; offer(3); wait_sent(); pad_zero = 1;
    tca_ff_in = 0; tca_link = 1; offer(3); wait_sent();
    // nobody ready: cells wait
    tca_link = 0; offer(2);
    repeat (4 * 27) @(negedge clk_link);
    tca_ff_in = 1; wait_sent();
    // unassigned cells with no data waiting
    unassign_en = 1; repeat (4 * 27) @(negedge clk_link); unassign_en = 0;
    // link down: cells are sent but dropped by the IPP
    up_l_n = 1; repeat (20) @(posedge clk);
    expect_rx = 0; offer(3); wait_sent(); expect_rx = 1;
    up_l_n = 0; repeat (20) @(posedge clk);
    offer(2); wait_sent();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL A: %0d cells lost", exp_q.size()); end
    // ---------------- B: 32-bit loopback
    setup(1, 0, 0, 0, 4'h3);
    offer(8); wait_sent();
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL B: %0d cells lost", exp_q.size()); end
    // ---------------- C: 32-bit, de-skew, high half 13 ns late
    setup(1, 1, 0, 13, 4'h6);
    unassign_en = 1;
    offer(4); wait_sent();
    repeat (5 * 14) @(negedge clk_link);
    offer(4); wait_sent();
    unassign_en = 0;
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL C: %0d cells lost", exp_q.size()); end
    // ---------------- D: dual 155 Mb/s card
    setup(0, 0, 1, 0, 4'h9);
    offer(10);
    while (to_send > 0) @(negedge clk_link);
    // TCA2 low blocks the OPP even though fiber 0 has room
    ad_tca2 = 0;
    offer(2);
    repeat (4 * 27) @(negedge clk_link);
    checks++;
    if (to_send != 2) begin failures++; $display("FAIL OPP sent while TCA2 low"); end
    else m_tca_and_block++;
    ad_tca2 = 1;
    while (to_send > 0) @(negedge clk_link);
    // a cell from the far end with VPI[7] = 1 on fiber 0: wrong HEC at the IPP
    begin
      cellw_t bad;
      logic [31:0] h;
      h = $urandom | 32'h0800_0000;
      bad[0] = h[31:16]; bad[1] = h[15:0]; bad[2] = {ref_hec(h), 8'h00};
      for (int i = 3; i < 27; i++) bad[i] = 16'($urandom);
      e0 = m_hec_err;
      rxq0.push_back(bad);
    end
    repeat (20 * 29) @(negedge clk_link);
    checks++;
    if (m_hec_err != e0 + 1) begin failures++; $display("FAIL stray VPI[7]=1 cell not caught by HEC"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL D: %0d cells lost", exp_q.size()); end
    checks++;
    if (rx_overflow_count != 0) begin failures++; $display("FAIL receive FIFO overflow"); end

    $display("mechanisms: cells16=%0d cells32=%0d deskew=%0d unassigned=%0d nocell=%0d tca_link=%0d pad_zero_low=%0d",
             m_cells16, m_cells32, m_deskew, m_unassigned, m_nocell, m_tca_link, m_pad_zero_low);
    $display("            link_down_drop=%0d ignored=%0d hec_err=%0d fiber0=%0d fiber1=%0d tca_and_block=%0d reset_opp=%0d",
             m_link_down_drop, m_ignored, m_hec_err, m_fiber0, m_fiber1, m_tca_and_block, m_reset_opp);
    begin
      int m[14];
      m = '{m_cells16, m_cells32, m_deskew, m_unassigned, m_nocell, m_tca_link, m_pad_zero_low,
                    m_link_down_drop, m_ignored, m_hec_err, m_fiber0, m_fiber1, m_tca_and_block, m_reset_opp};
      foreach (m[i]) begin
        checks++;
        if (m[i] == 0) begin failures++; $display("FAIL mechanism %0d never happened", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
