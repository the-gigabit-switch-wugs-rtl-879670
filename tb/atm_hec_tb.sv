// atm_hec_tb: self-checking test of the HEC generator.
//
// The reference divides the 40-bit value {header, 8'h00} by the generator
// 1_0000_0111 (x^8 + x^2 + x + 1) with plain long division and adds 55h. It
// checks the all-zero header (HEC 55h), that flipping VPI[7] (header bit 27)
// flips HEC bits 7, 5 and 4, and 2000 random headers.
module atm_hec_tb;
  logic [31:0] hdr;
  logic [7:0]  hec;
  int checks = 0, failures = 0;

  atm_hec dut (.hdr(hdr), .hec(hec));

  function automatic logic [7:0] ref_hec(input logic [31:0] h);
    logic [39:0] r;
    r = {h, 8'h00};
    for (int i = 39; i >= 8; i--)
      if (r[i]) r[i -: 9] = r[i -: 9] ^ 9'h107;
    return r[7:0] ^ 8'h55;
  endfunction

  task automatic check(input logic [31:0] h);
    logic [7:0] a, b;
    hdr = h; #1; a = hec;
    checks++;
    if (a !== ref_hec(h)) begin
      failures++;
      $display("FAIL hdr=%h hec=%h exp=%h", h, a, ref_hec(h));
    end
    hdr = h ^ 32'h0800_0000; #1; b = hec;
    checks++;
    if ((a ^ b) !== 8'hB0) begin
      failures++;
      $display("FAIL VPI[7] toggle hdr=%h diff=%h", h, a ^ b);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hdr = '0; #1;
    checks++;
    if (hec !== 8'h55) begin failures++; $display("FAIL zero header hec=%h", hec); end
    check(32'h0);
    check(32'hFFFF_FFFF);
    for (int i = 0; i < 2000; i++) check($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
