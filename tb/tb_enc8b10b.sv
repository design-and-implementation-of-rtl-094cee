// tb_enc8b10b: self-checking test of the 8b/10b encoder.
//
// Checks a set of code words from the published code table, then for every data
// byte at both running disparities: the symbol's weight (5 or 6 ones at RD -1,
// 4 or 5 at RD +1), the running disparity it leaves, and that no two bytes share
// a symbol. A long random stream of data and control characters is then checked
// for the code's line properties: no run longer than five equal bits and a
// running digital sum that stays within bounds. K requests for bytes that are not
// control characters must raise k_err.
module tb_enc8b10b;
  logic [7:0] din;
  logic       k, rd_in, rd_out, k_err;
  logic [9:0] dout;
  int checks = 0, failures = 0;

  enc8b10b dut (.din, .k, .rd_in, .dout, .rd_out, .k_err);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic vec(input logic [7:0] d, input logic kk, input logic r, input logic [9:0] exp);
    din = d; k = kk; rd_in = r; #1;
    chk(dout == exp, $sformatf("code of %02h k=%0d rd=%0d: got %010b want %010b", d, kk, r, dout, exp));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [9:0] seen [bit [9:0]];
    int run, sum, maxrun, maxsum, minsum;
    logic prev, r;
    // Published code words.
    vec(8'h00, 0, 0, 10'b100111_0100);   // D0.0-
    vec(8'h00, 0, 1, 10'b011000_1011);   // D0.0+
    vec(8'hB5, 0, 0, 10'b101010_1010);   // D21.5
    vec(8'hB5, 0, 1, 10'b101010_1010);
    vec(8'hBC, 1, 0, 10'b001111_1010);   // K28.5-
    vec(8'hBC, 1, 1, 10'b110000_0101);   // K28.5+
    vec(8'hF1, 0, 0, 10'b100011_0111);   // D17.7- uses A7
    vec(8'hF1, 0, 1, 10'b100011_0001);   // D17.7+ uses P7
    vec(8'hEB, 0, 1, 10'b110100_1000);   // D11.7+ uses A7
    vec(8'h07, 0, 1, 10'b000111_0100);   // D7.0+
    vec(8'h17, 0, 0, 10'b111010_0100);   // D23.0-
    vec(8'h63, 0, 0, 10'b110001_1100);   // D3.3-
    vec(8'hFB, 1, 0, 10'b110110_1000);   // K27.7-
    vec(8'h3C, 1, 1, 10'b110000_0110);   // K28.1+
    // Weights, disparity and uniqueness of all data symbols.
    for (int rr = 0; rr < 2; rr++) begin
      seen.delete();
      for (int b = 0; b < 256; b++) begin
        din = b[7:0]; k = 0; rd_in = rr[0]; #1;
        if (rr == 0) chk($countones(dout) == 5 || $countones(dout) == 6, $sformatf("weight %02h-", b));
        else         chk($countones(dout) == 4 || $countones(dout) == 5, $sformatf("weight %02h+", b));
        chk(rd_out == (rd_in ^ ($countones(dout) != 5)), $sformatf("rd_out %02h", b));
        chk(!seen.exists(dout), $sformatf("duplicate symbol for %02h", b));
        seen[dout] = 1;
        chk(!k_err, "k_err on data");
      end
    end
    // Invalid control character.
    din = 8'h00; k = 1; rd_in = 0; #1;
    chk(k_err, "k_err for K0.0");
    // Random stream: run length and running digital sum.
    r = 0; run = 0; sum = 0; maxrun = 0; maxsum = 0; minsum = 0; prev = 0;
    for (int i = 0; i < 20000; i++) begin
      if ($urandom_range(0, 9) == 0) begin
        k = 1; din = ($urandom_range(0, 1) == 0) ? 8'hBC : 8'h1C;
      end else begin
        k = 0; din = 8'($urandom);
      end
      rd_in = r; #1;
      for (int j = 9; j >= 0; j--) begin
        if (i == 0 && j == 9) run = 1;
        else if (dout[j] == prev) run++;
        else run = 1;
        prev = dout[j];
        if (run > maxrun) maxrun = run;
        sum += dout[j] ? 1 : -1;
        if (sum > maxsum) maxsum = sum;
        if (sum < minsum) minsum = sum;
      end
      r = rd_out;
    end
    chk(maxrun <= 5, $sformatf("run length %0d", maxrun));
    chk(maxsum - minsum <= 6, $sformatf("digital sum span %0d", maxsum - minsum));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
