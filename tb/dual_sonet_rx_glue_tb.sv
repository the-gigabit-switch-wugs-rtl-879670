// dual_sonet_rx_glue_tb: self-checking test of the dual 155 Mb/s receive glue.
//
// A small model of the framer's two receive channels holds queued cells
// (27 words, correct HEC, random VPI[7]). While RRDENBx is low at a rising
// edge it presents the next word of channel x after that edge, with RSOC on
// the first word, and raises RCAx while it holds a whole cell. The checker
// collects the cells handed to the IPP and compares them with the framer's
// cells: VPI[7] replaced by the fiber number, HEC bits 7,5,4 flipped for
// fiber 1, everything else unchanged. It also checks the resulting HEC is
// correct exactly when the cell arrived with VPI[7] = 0 (the four-row table),
// that cells of each fiber come out in order, and that when both fibers have
// cells the reads alternate.
module dual_sonet_rx_glue_tb;
  logic clk = 0, rst_n = 0;
  logic [15:0] rdat = 0, d_l_link;
  logic rsoc = 0, rca1, rca2, rd1_n, rd2_n, soc_l_link;
  int checks = 0, failures = 0;

  dual_sonet_rx_glue dut (.clk(clk), .rst_n(rst_n), .rdat(rdat), .rsoc(rsoc), .rca1(rca1),
    .rca2(rca2), .rrdenb1_n(rd1_n), .rrdenb2_n(rd2_n), .d_l_link(d_l_link), .soc_l_link(soc_l_link));

  always #20 clk = ~clk;

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  typedef logic [26:0][15:0] cellw_t;
  cellw_t q0[$], q1[$];          // framer channel queues
  int pos0 = 0, pos1 = 0;        // next word of the head cell
  int table_hits[4];             // {fiber, VPI[7] in} combinations seen

  function automatic cellw_t make_cell();
    cellw_t c;
    logic [31:0] h;
    h = $urandom;
    c[0] = h[31:16]; c[1] = h[15:0];
    c[2] = {ref_hec(h), 8'h00};
    for (int i = 3; i < 27; i++) c[i] = 16'($urandom);
    return c;
  endfunction

  assign rca1 = q0.size() > 0;
  assign rca2 = q1.size() > 0;

  // framer read model
  cellw_t out0[$], out1[$];      // copies for the checker, per fiber
  always @(posedge clk) begin
    if (!rd1_n && q0.size() > 0) begin
      rdat <= q0[0][pos0]; rsoc <= (pos0 == 0);
      if (pos0 == 0) out0.push_back(q0[0]);
      pos0++;
      if (pos0 == 27) begin void'(q0.pop_front()); pos0 = 0; end
    end else if (!rd2_n && q1.size() > 0) begin
      rdat <= q1[0][pos1]; rsoc <= (pos1 == 0);
      if (pos1 == 0) out1.push_back(q1[0]);
      pos1++;
      if (pos1 == 27) begin void'(q1.pop_front()); pos1 = 0; end
    end else begin
      rdat <= 16'($urandom); rsoc <= 1'b0;
    end
  end

  // checker on the IPP side
  logic [15:0] got[27];
  int wi = -1, n_cells = 0, last_fiber = -1, alternations = 0, both_busy_pairs = 0;
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (!(rd1_n || rd2_n)) begin failures++; $display("FAIL both read enables low"); end
      if (soc_l_link) wi = 0;
      if (wi >= 0) begin
        got[wi] = d_l_link;
        wi++;
        if (wi == 27) begin
          cellw_t e;
          logic fib, v7;
          logic [31:0] h;
          fib = got[0][11];
          if (fib) begin
            if (out1.size() == 0) begin failures++; $display("FAIL fiber 1 cell never read"); end
            else e = out1.pop_front();
          end else begin
            if (out0.size() == 0) begin failures++; $display("FAIL fiber 0 cell never read"); end
            else e = out0.pop_front();
          end
          v7 = e[0][11];
          e[0][11] = fib;
          if (fib) e[2] = e[2] ^ 16'hB000;
          checks++;
          for (int i = 0; i < 27; i++)
            if (i != 2 && got[i] !== e[i]) begin failures++; $display("FAIL word %0d got %h exp %h", i, got[i], e[i]); break; end
          checks++;
          if (got[2][15:8] !== e[2][15:8]) begin failures++; $display("FAIL HEC word got %h exp %h", got[2], e[2]); end
          h = {got[0], got[1]};
          checks++;
          if ((ref_hec(h) == got[2][15:8]) != (v7 == 1'b0)) begin
            failures++; $display("FAIL HEC correctness fiber %0b VPI7 %0b", fib, v7);
          end
          table_hits[{fib, v7}]++;
          if (last_fiber >= 0 && int'(fib) != last_fiber) alternations++;
          last_fiber = fib;
          n_cells++;
          wi = -1;
        end
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // both fibers busy: reads must alternate
    for (int i = 0; i < 6; i++) begin
      cellw_t c0, c1;
      c0 = make_cell(); c1 = make_cell();
      q0.push_back(c0); q1.push_back(c1);
    end
    repeat (12 * 29 + 20) @(negedge clk);
    checks++;
    if (n_cells != 12 || alternations != 11) begin
      failures++; $display("FAIL alternating reads: %0d cells, %0d alternations", n_cells, alternations);
    end
    // random arrivals
    repeat (30) begin
      cellw_t c;
      c = make_cell();
      if ($urandom_range(0, 1)) q1.push_back(c); else q0.push_back(c);
      repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (40 * 29) @(negedge clk);
    checks++;
    if (n_cells != 42 || q0.size() != 0 || q1.size() != 0) begin
      failures++; $display("FAIL %0d cells delivered, expected 42", n_cells);
    end
    checks++;
    if (table_hits[0] == 0 || table_hits[1] == 0 || table_hits[2] == 0 || table_hits[3] == 0) begin
      failures++; $display("FAIL table rows seen %0d %0d %0d %0d", table_hits[0], table_hits[1], table_hits[2], table_hits[3]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
