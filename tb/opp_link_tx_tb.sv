// opp_link_tx_tb: self-checking test of the OPP link transmit engine.
//
// A cell source offers numbered cells with random headers, payloads and
// LINKINFO bytes. A monitor collects every cell on the link outputs (SOC, then
// DAV low for the whole cell). Each received cell is compared with a wire
// image the testbench builds itself (its own HEC by long division), and the
// distance between starts of back-to-back cells must be 27 or 14 clocks.
//
// Phases, each checked for the number of cells, unassigned cells and cycles:
//  1 16-bit, TCA_FF_LINK high, PAD_ZERO high: back-to-back data cells
//  2 16-bit, PAD_ZERO low: LINKINFO passes through
//  3 16-bit, TCA_FF_LINK low, TCA_LINK high: cells still flow (TCA_LINK path)
//  4 16-bit, both low, UNASSIGN_EN high: nothing is sent
//  5 16-bit, no cell waiting, UNASSIGN_EN high / low: unassigned / nothing
//  6 16-bit, TCA_FF_LINK high only in period 26: cells flow;
//    high in every period except 26: nothing
//  7 32-bit, TCA_LINK high only: nothing (TCA_LINK masked in 32-bit mode)
//  8 32-bit, TCA_FF_LINK high: 14-word cells, D_H and copies of DAV/SOC
//  9 32-bit, unassigned cells
module opp_link_tx_tb;
  import link_pkg::*;

  logic clk = 0, rst_n = 0;
  logic width_link = 0, unassign_en = 0, pad_zero = 1, tca_ff_link = 0, tca_link = 0;
  logic cell_valid = 0, cell_take;
  cell_t cur;
  logic [15:0] d_l, d_h;
  logic dav_l_n, dav_h_n, soc_l, soc_h;
  int checks = 0, failures = 0;

  opp_link_tx dut (
    .clk_link(clk), .rst_n(rst_n), .width_link(width_link), .unassign_en(unassign_en),
    .pad_zero(pad_zero), .tca_ff_link(tca_ff_link), .tca_link(tca_link),
    .cell_valid(cell_valid), .cell_in(cur), .cell_take(cell_take),
    .d_l_opp(d_l), .d_h_opp(d_h), .dav_l_opp_n(dav_l_n), .dav_h_opp_n(dav_h_n),
    .soc_l_opp(soc_l), .soc_h_opp(soc_h));

  always #5 clk = ~clk;

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
    c.linkinfo = 8'($urandom);
    for (int i = 0; i < 12; i++) c.payload[i*32 +: 32] = $urandom;
    return c;
  endfunction

  // Wire image as a list of bytes, built from the cell format tables.
  typedef byte unsigned bytes_t[$];
  function automatic bytes_t image(input cell_t c, input logic wide, input logic pz, input logic unas);
    bytes_t b;
    logic [31:0] h = unas ? 32'h0 : c.hdr;
    logic [7:0]  li = (unas || pz) ? 8'h00 : c.linkinfo;
    for (int i = 3; i >= 0; i--) b.push_back(h[i*8 +: 8]);
    b.push_back(ref_hec(h));
    if (wide) begin b.push_back(8'h00); b.push_back(8'h00); end
    b.push_back(li);
    for (int i = 47; i >= 0; i--) b.push_back(unas ? 8'h00 : c.payload[i*8 +: 8]);
    return b;
  endfunction

  // ------------------------------------------------------------ source
  cell_t sent_q[$];
  always @(posedge clk) begin
    if (cell_take) begin
      sent_q.push_back(cur);
      cur <= rand_cell();
    end
  end

  // ------------------------------------------------------------ monitor
  int n_data = 0, n_unas = 0, n_bad = 0;
  int cycle = 0, last_soc = -1, spacing_err = 0;
  int per_tb = 0;                 // testbench's own view of the period after a SOC
  bytes_t rx;
  int words_left = 0;
  logic pz_at_soc;               // PAD_ZERO when the cell started
  logic pz_q;                    // PAD_ZERO as seen at the last rising edge
  int   p26_mode = 0;            // 1: TCA_FF_LINK high only in period 26, 2: low only then
  always @(posedge clk) pz_q <= pad_zero;

  task automatic finish_cell();
    bytes_t e;
    logic unas;
    unas = (rx[0] == 0 && rx[1] == 0 && rx[2] == 0 && rx[3] == 0);
    if (unas) begin
      e = image('0, width_link, pz_at_soc, 1'b1);
      n_unas++;
    end else begin
      cell_t c;
      if (sent_q.size() == 0) begin
        failures++; $display("FAIL cell received that was never taken"); return;
      end
      c = sent_q.pop_front();
      e = image(c, width_link, pz_at_soc, 1'b0);
      n_data++;
    end
    checks++;
    if (e != rx) begin
      failures++; n_bad++;
      $display("FAIL cell contents (wide=%0b pz=%0b unas=%0b) got %p exp %p", width_link, pad_zero, unas, rx, e);
    end
  endtask

  always @(negedge clk) begin
    cycle++;
    per_tb++;
    if (per_tb > (width_link ? 14 : 27)) per_tb = 1;   // fly-wheel like the OPP
    if (rst_n) begin
      if (soc_l) begin
        per_tb = 1;
        if (words_left != 0) begin failures++; $display("FAIL SOC inside a cell"); end
        if (last_soc >= 0 && (cycle - last_soc) % (width_link ? 14 : 27) != 0) spacing_err++;
        last_soc = cycle;
        rx.delete();
        pz_at_soc = pz_q;
        words_left = width_link ? 14 : 27;
      end
      if (p26_mode != 0) tca_ff_link = (per_tb == 26) ? (p26_mode == 1) : (p26_mode == 2);
      if (width_link) begin
        checks++;
        if (soc_h !== soc_l || dav_h_n !== dav_l_n) begin
          failures++; $display("FAIL high copies differ from low in 32-bit mode");
        end
      end
      if (words_left > 0) begin
        if (dav_l_n) begin failures++; $display("FAIL DAV high inside a cell"); end
        if (width_link) begin
          rx.push_back(d_h[15:8]); rx.push_back(d_h[7:0]);
        end
        rx.push_back(d_l[15:8]); rx.push_back(d_l[7:0]);
        words_left--;
        if (words_left == 0) finish_cell();
      end else if (!dav_l_n) begin
        failures++; $display("FAIL DAV low outside a cell");
      end
    end
  end

  // ------------------------------------------------------------ phases
  task automatic phase(input string name, input int cycles, input int exp_data, input int exp_unas);
    int d0 = n_data, u0 = n_unas;
    spacing_err = 0;
    repeat (cycles) @(negedge clk);
    checks++;
    if (n_data - d0 != exp_data || n_unas - u0 != exp_unas || spacing_err != 0) begin
      failures++;
      $display("FAIL phase %s: data %0d (exp %0d) unassigned %0d (exp %0d) spacing errors %0d",
               name, n_data - d0, exp_data, n_unas - u0, exp_unas, spacing_err);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cur = rand_cell();
    repeat (5) @(negedge clk);
    checks++;
    if (soc_l || !dav_l_n) begin failures++; $display("FAIL activity during reset"); end
    rst_n = 1;
    // 1: 16-bit, back-to-back. The first cycle after reset is not ready
    // (TCA_FF_LINK is latched in period 26), so the first cell starts at the
    // end of the second cycle: 10 cycles of 27 -> 9 cells.
    cell_valid = 1; tca_ff_link = 1; pad_zero = 1;
    @(negedge clk);
    phase("16-bit back-to-back", 27*10 - 1, 9, 0);
    pad_zero = 0;
    phase("16-bit PAD_ZERO low", 27*4, 4, 0);
    pad_zero = 1;
    // 3: TCA_LINK path. TCA_FF_LINK drops; the last latched value still
    // counts once, then TCA_LINK alone keeps cells flowing.
    tca_ff_link = 0; tca_link = 1;
    phase("16-bit TCA_LINK", 27*4, 4, 0);
    // 4: nobody ready
    tca_link = 0; unassign_en = 1;
    repeat (27) @(negedge clk);
    phase("16-bit not ready", 27*4, 0, 0);
    // 5: ready, no cell waiting
    cell_valid = 0; tca_ff_link = 1;
    repeat (27) @(negedge clk);
    phase("16-bit unassigned", 27*4, 0, 4);
    unassign_en = 0;
    repeat (27) @(negedge clk);
    phase("16-bit idle", 27*4, 0, 0);
    // 6: latch point of TCA_FF_LINK
    cell_valid = 1;
    repeat (60) @(negedge clk);
    p26_mode = 1;
    phase("16-bit TCA_FF_LINK only in period 26", 27*4, 4, 0);
    p26_mode = 2;
    repeat (54) @(negedge clk);
    phase("16-bit TCA_FF_LINK low in period 26", 27*3, 0, 0);
    p26_mode = 0;
    tca_ff_link = 0;
    repeat (27) @(negedge clk);
    // 7/8/9: 32-bit mode (strap changes only across reset)
    rst_n = 0; width_link = 1;
    repeat (3) @(negedge clk);
    rst_n = 1; last_soc = -1;
    tca_link = 1; tca_ff_link = 0; cell_valid = 1;
    phase("32-bit TCA_LINK masked", 14*5, 0, 0);
    tca_link = 0; tca_ff_link = 1;
    repeat (14) @(negedge clk);
    phase("32-bit back-to-back", 14*8, 8, 0);
    pad_zero = 0;
    phase("32-bit PAD_ZERO low", 14*3, 3, 0);
    cell_valid = 0; unassign_en = 1;
    repeat (14) @(negedge clk);
    phase("32-bit unassigned", 14*3, 0, 3);
    repeat (40) @(negedge clk);
    checks++;
    if (n_bad != 0) failures++;
    $display("cells: data %0d unassigned %0d", n_data, n_unas);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
