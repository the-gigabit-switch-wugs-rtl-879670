// wugs_link_top: one WUGS-20 switch port's link interface, plus the glue
// logic of the dual 155 Mb/s SONET adapter card.
//
// Switch side. The port is an OPP (transmit to the adapter) and an IPP
// (receive from the adapter):
//  * opp_reset_sync turns the fabric reset into RESET_OPP (asynchronous
//    assertion, release synchronous to CLK_LINK);
//  * opp_link_tx, reset by RESET_OPP and clocked by the adapter's CLK_LINK,
//    sends the cells offered on tx_cell_* in fly-wheel cell cycles;
//  * ipp_link_rx, on the fabric clock, receives cells on the adapter's strobes
//    and delivers those with a good HEC on rx_cell_*.
// WIDTH_LINK is the one connector signal that reaches both chips; it is
// shared here. All other connector signals are ports with their connector
// names (active-low ones end in _n).
//
// Adapter side. dual_sonet_tx_glue and dual_sonet_rx_glue sit between the
// connector and a PM5348 dual framer on the dual 155 Mb/s adapter card. They
// are brought out with ports of their own (prefix ad_): on the card their
// connector pins meet the switch-side pins of the same name, and their framer
// pins go to the framer chip, which is not part of this design. Connecting
// ad_d_l_opp to d_l_opp and so on builds that card; other adapters (G-Link,
// 622 Mb/s and 2.4 Gb/s SONET) connect their chips to the connector directly.
//
// The split into chips and the signals between them follow the
// specification; bringing the adapter glue out side by side, rather than
// fixing one adapter, is this design's choice.
module wugs_link_top
  import link_pkg::*;
#(
  parameter int unsigned IGNORE_LOG2 = 24
) (
  // fabric
  input  logic        clk,
  input  logic        rst_n,
  // straps from the adapter
  input  logic        width_link,
  input  logic        unassign_en,
  input  logic        pad_zero,
  input  logic        d_skew_link,
  input  logic [3:0]  type_link,
  // OPP connector pins
  input  logic        clk_link,
  input  logic        tca_ff_link,
  input  logic        tca_link,
  output logic [15:0] d_l_opp,
  output logic [15:0] d_h_opp,
  output logic        dav_l_opp_n,
  output logic        dav_h_opp_n,
  output logic        soc_l_opp,
  output logic        soc_h_opp,
  output logic        reset_opp_n,
  // cells to transmit (CLK_LINK domain)
  input  logic        tx_cell_valid,
  input  cell_t       tx_cell,
  output logic        tx_cell_take,
  // IPP connector pins
  input  logic        strb_l_link,
  input  logic [15:0] d_l_link,
  input  logic        soc_l_link,
  input  logic        up_l_link_n,
  input  logic        strb_h_link,
  input  logic [15:0] d_h_link,
  input  logic        soc_h_link,
  input  logic        up_h_link_n,
  // received cells (fabric clock)
  output logic        rx_cell_valid,
  output cell_t       rx_cell,
  output logic        rx_hec_err,
  output logic [15:0] rx_hec_err_count,
  output logic [15:0] rx_cell_count,
  output logic [15:0] rx_overflow_count,
  output logic        rx_link_up,
  output logic        rx_ignoring,
  output link_type_e  rx_link_type,
  // dual 155 Mb/s adapter glue: connector side
  input  logic        ad_clk_link,
  input  logic        ad_reset_opp_n,
  input  logic [15:0] ad_d_l_opp,
  input  logic        ad_soc_l_opp,
  input  logic        ad_dav_l_opp_n,
  output logic        ad_tca_ff_link,
  input  logic        ad_strb_l_link,
  output logic [15:0] ad_d_l_link,
  output logic        ad_soc_l_link,
  // dual 155 Mb/s adapter glue: framer side
  output logic [15:0] ad_tdat,
  output logic        ad_twrenb1_n,
  output logic        ad_twrenb2_n,
  input  logic        ad_tca1,
  input  logic        ad_tca2,
  input  logic [15:0] ad_rdat,
  input  logic        ad_rsoc,
  input  logic        ad_rca1,
  input  logic        ad_rca2,
  output logic        ad_rrdenb1_n,
  output logic        ad_rrdenb2_n
);

  opp_reset_sync u_rst (
    .clk        (clk),
    .rst_fab_n  (rst_n),
    .clk_link   (clk_link),
    .reset_opp_n(reset_opp_n)
  );

  opp_link_tx u_opp (
    .clk_link   (clk_link),
    .rst_n      (reset_opp_n),
    .width_link (width_link),
    .unassign_en(unassign_en),
    .pad_zero   (pad_zero),
    .tca_ff_link(tca_ff_link),
    .tca_link   (tca_link),
    .cell_valid (tx_cell_valid),
    .cell_in    (tx_cell),
    .cell_take  (tx_cell_take),
    .d_l_opp    (d_l_opp),
    .d_h_opp    (d_h_opp),
    .dav_l_opp_n(dav_l_opp_n),
    .dav_h_opp_n(dav_h_opp_n),
    .soc_l_opp  (soc_l_opp),
    .soc_h_opp  (soc_h_opp)
  );

  ipp_link_rx #(.IGNORE_LOG2(IGNORE_LOG2)) u_ipp (
    .clk           (clk),
    .rst_n         (rst_n),
    .width_link    (width_link),
    .d_skew_link   (d_skew_link),
    .type_link     (type_link),
    .strb_l_link   (strb_l_link),
    .d_l_link      (d_l_link),
    .soc_l_link    (soc_l_link),
    .up_l_link_n   (up_l_link_n),
    .strb_h_link   (strb_h_link),
    .d_h_link      (d_h_link),
    .soc_h_link    (soc_h_link),
    .up_h_link_n   (up_h_link_n),
    .cell_valid    (rx_cell_valid),
    .cell_out      (rx_cell),
    .hec_err       (rx_hec_err),
    .hec_err_count (rx_hec_err_count),
    .cell_count    (rx_cell_count),
    .overflow_count(rx_overflow_count),
    .link_up       (rx_link_up),
    .ignoring      (rx_ignoring),
    .link_type     (rx_link_type)
  );

  dual_sonet_tx_glue u_ad_tx (
    .clk        (ad_clk_link),
    .rst_n      (ad_reset_opp_n),
    .d_l_opp    (ad_d_l_opp),
    .soc_l_opp  (ad_soc_l_opp),
    .dav_l_opp_n(ad_dav_l_opp_n),
    .tca_ff_link(ad_tca_ff_link),
    .tdat       (ad_tdat),
    .twrenb1_n  (ad_twrenb1_n),
    .twrenb2_n  (ad_twrenb2_n),
    .tca1       (ad_tca1),
    .tca2       (ad_tca2)
  );

  dual_sonet_rx_glue u_ad_rx (
    .clk       (ad_strb_l_link),
    .rst_n     (ad_reset_opp_n),
    .rdat      (ad_rdat),
    .rsoc      (ad_rsoc),
    .rca1      (ad_rca1),
    .rca2      (ad_rca2),
    .rrdenb1_n (ad_rrdenb1_n),
    .rrdenb2_n (ad_rrdenb2_n),
    .d_l_link  (ad_d_l_link),
    .soc_l_link(ad_soc_l_link)
  );

endmodule
