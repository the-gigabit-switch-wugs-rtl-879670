// ipp_link_rx_tb: self-checking test of the IPP link receive engine.
//
// Fabric clock 8 ns, link strobes 20 ns. A generator sends cells as the
// adapter would: 16-bit (27 words), 32-bit on one clock (14 words), and
// 32-bit with de-skew, where STRB_H_LINK lags STRB_L_LINK by 13 ns and
// the two halves carry their own SOC. Idle words with random data sit
// between cells. Some cells carry a wrong HEC. The testbench keeps its own list of the
// cells that must come out (good HEC, link up, after the start-up period)
// and checks them in order, plus the HEC error count, that nothing is
// accepted while UP_L_LINK (or, with de-skew, UP_H_LINK) is high or during
// the start-up period, and TYPE_LINK.
module ipp_link_rx_tb;
  import link_pkg::*;

  localparam int IGN = 7;          // 128 fabric clocks of start-up ignore

  logic clk = 0, rst_n = 0;
  logic width_link = 0, d_skew_link = 0;
  logic [3:0] type_link = 4'h9;
  logic strb_l = 0, strb_h = 0;
  logic [15:0] d_l = 0, d_h = 0;
  logic soc_l = 0, soc_h = 0, up_l_n = 0, up_h_n = 0;
  logic cell_valid, hec_err, link_up, ignoring;
  cell_t cell_out;
  logic [15:0] hec_err_count, cell_count, overflow_count;
  link_type_e link_type;
  int checks = 0, failures = 0;
  int skew = 0;                    // STRB_H lag in ns (de-skew tests)

  ipp_link_rx #(.IGNORE_LOG2(IGN)) dut (
    .clk(clk), .rst_n(rst_n), .width_link(width_link), .d_skew_link(d_skew_link),
    .type_link(type_link),
    .strb_l_link(strb_l), .d_l_link(d_l), .soc_l_link(soc_l), .up_l_link_n(up_l_n),
    .strb_h_link(strb_h), .d_h_link(d_h), .soc_h_link(soc_h), .up_h_link_n(up_h_n),
    .cell_valid(cell_valid), .cell_out(cell_out), .hec_err(hec_err),
    .hec_err_count(hec_err_count), .cell_count(cell_count), .overflow_count(overflow_count),
    .link_up(link_up), .ignoring(ignoring), .link_type(link_type));

  always #4 clk = ~clk;
  always #10 strb_l = ~strb_l;
  always @(strb_l) strb_h <= #(skew) strb_l;

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  // ------------------------------------------------------------ generator
  // Words of one cell, high half in [31:16] (32-bit) or only [15:0] (16-bit).
  typedef logic [31:0] words_t[$];
  function automatic words_t make_words(input logic [31:0] hdr, input logic [383:0] pl,
                                        input logic bad, input logic wide);
    words_t w;
    byte unsigned b[$];
    logic [7:0] hec = ref_hec(hdr) ^ (bad ? 8'h01 : 8'h00);
    for (int i = 3; i >= 0; i--) b.push_back(hdr[i*8 +: 8]);
    b.push_back(hec);
    if (wide) begin b.push_back(8'($urandom)); b.push_back(8'($urandom)); end
    b.push_back(8'($urandom));              // ignored byte(s) of the HEC word
    for (int i = 47; i >= 0; i--) b.push_back(pl[i*8 +: 8]);
    if (wide) for (int i = 0; i < 14; i++) w.push_back({b[4*i], b[4*i+1], b[4*i+2], b[4*i+3]});
    else      for (int i = 0; i < 27; i++) w.push_back({16'h0, b[2*i], b[2*i+1]});
    return w;
  endfunction

  // Words are driven half a period after the strobe edge that takes the
  // previous one; each half is driven in its own strobe's timing.
  logic [31:0] lq[$], hq[$];
  logic        lsq[$], hsq[$];
  always @(negedge strb_l) begin
    if (lq.size() > 0) begin d_l <= lq[0][15:0]; soc_l <= lsq[0]; void'(lq.pop_front()); void'(lsq.pop_front()); end
    else begin d_l <= 16'($urandom); soc_l <= 1'b0; end
  end
  always @(negedge strb_h) begin
    if (hq.size() > 0) begin d_h <= hq[0][31:16]; soc_h <= hsq[0]; void'(hq.pop_front()); void'(hsq.pop_front()); end
    else begin d_h <= 16'($urandom); soc_h <= 1'b0; end
  end

  typedef struct { logic [31:0] hdr; logic [383:0] pl; } exp_t;
  exp_t exp_q[$];
  int exp_err = 0;

  // Queue one cell plus idle words behind it; 'counted' tells whether the
  // receiver must take it (link up, start-up over).
  task automatic send(input logic bad, input int idle_words, input logic counted);
    logic [31:0] hdr;
    logic [383:0] pl;
    words_t w;
    hdr = $urandom;
    for (int i = 0; i < 12; i++) pl[i*32 +: 32] = $urandom;
    w = make_words(hdr, pl, bad, width_link);
    foreach (w[i]) begin
      lq.push_back(w[i]); lsq.push_back(i == 0);
      hq.push_back(w[i]); hsq.push_back(i == 0);
    end
    repeat (idle_words) begin
      logic [31:0] r;
      r = $urandom;
      lq.push_back(r); lsq.push_back(1'b0);
      hq.push_back(r); hsq.push_back(1'b0);
    end
    if (counted) begin
      if (bad) exp_err++;
      else exp_q.push_back('{hdr, pl});
    end
  endtask

  task automatic drain();
    while (lq.size() > 0 || hq.size() > 0) @(posedge clk);
    repeat (40) @(posedge clk);
  endtask

  // ------------------------------------------------------------ checker
  int got = 0;
  exp_t e;
  always @(posedge clk) begin
    if (rst_n && cell_valid) begin
      got++;
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected cell hdr=%h", cell_out.hdr);
      end else begin
        e = exp_q.pop_front();
        if (cell_out.hdr !== e.hdr || cell_out.payload !== e.pl) begin
          failures++; $display("FAIL cell mismatch hdr=%h exp %h", cell_out.hdr, e.hdr);
        end
      end
    end
  end

  task automatic expect_done(input string what);
    checks++;
    if (exp_q.size() != 0 || hec_err_count != 16'(exp_err)) begin
      failures++;
      $display("FAIL %s: %0d cells missing, hec errors %0d exp %0d", what, exp_q.size(), hec_err_count, exp_err);
    end
  endtask

  task automatic reset_mode(input logic wide, input logic dsk, input int sk);
    rst_n = 0; width_link = wide; d_skew_link = dsk; skew = sk;
    exp_err = 0;
    repeat (10) @(posedge clk);
    rst_n = 1;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    // ---------------- 16-bit
    reset_mode(0, 0, 0);
    @(posedge clk);
    checks++;
    if (!ignoring) begin failures++; $display("FAIL not ignoring after reset"); end
    // cells during the start-up period are dropped
    send(0, 0, 0);
    t0 = 0;
    while (ignoring) begin @(posedge clk); t0++; end
    checks++;
    if (t0 < (1 << IGN) - 12 || t0 > (1 << IGN)) begin
      failures++; $display("FAIL start-up period %0d cycles", t0);
    end
    drain();
    checks++;
    if (got != 0) begin failures++; $display("FAIL cell accepted during start-up"); end
    checks++;
    if (link_type !== LT_DUAL_SONET) begin failures++; $display("FAIL link type %h", link_type); end
    for (int i = 0; i < 6; i++) send(i == 3, $urandom_range(0, 5), 1);
    drain();
    expect_done("16-bit");
    // link down: nothing accepted
    up_l_n = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (link_up) begin failures++; $display("FAIL link_up with UP_L_LINK high"); end
    send(0, 2, 0); send(1, 2, 0);
    drain();
    expect_done("16-bit link down");
    up_l_n = 0;
    repeat (10) @(posedge clk);
    send(0, 0, 1); send(0, 0, 1);
    drain();
    expect_done("16-bit link up again");

    // ---------------- 32-bit, one clock
    reset_mode(1, 0, 0);
    while (ignoring) @(posedge clk);
    for (int i = 0; i < 6; i++) send(i == 2, $urandom_range(0, 3) * 0, 1);
    drain();
    expect_done("32-bit");

    // ---------------- 32-bit de-skew, STRB_H lags by 13 ns
    reset_mode(1, 1, 13);
    while (ignoring) @(posedge clk);
    for (int i = 0; i < 6; i++) send(i == 4, 14 * $urandom_range(0, 1), 1);
    drain();
    expect_done("32-bit de-skew");
    // UP_H_LINK counts in de-skew mode
    up_h_n = 1;
    repeat (10) @(posedge clk);
    checks++;
    if (link_up) begin failures++; $display("FAIL link_up with UP_H_LINK high in de-skew mode"); end
    send(0, 0, 0);
    drain();
    expect_done("32-bit de-skew, high channel down");
    up_h_n = 0;
    checks++;
    if (overflow_count != 0) begin failures++; $display("FAIL overflow %0d", overflow_count); end
    $display("cells received %0d", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
