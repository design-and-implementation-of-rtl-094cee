// tb_dec8b10b: self-checking test of the 8b/10b decoder.
//
// Decodes published code words, then every data byte and every control character
// in both running-disparity forms as produced by enc8b10b, checking the byte, the
// K flag, the running disparity and that no error is flagged. Symbols outside the
// code and symbols received at the wrong running disparity must raise code_err
// and disp_err.
module tb_dec8b10b;
  logic [7:0] edin, dout;
  logic       ek, erd_in, erd_out, ek_err;
  logic [9:0] sym;
  logic       rd_in, k, rd_out, code_err, disp_err;
  int checks = 0, failures = 0;
  logic [7:0] kchars [12] = '{8'h1C, 8'h3C, 8'h5C, 8'h7C, 8'h9C, 8'hBC, 8'hDC, 8'hFC,
                              8'hF7, 8'hFB, 8'hFD, 8'hFE};

  enc8b10b enc (.din(edin), .k(ek), .rd_in(erd_in), .dout(sym), .rd_out(erd_out), .k_err(ek_err));
  logic [9:0] dsym;
  dec8b10b dut (.din(dsym), .rd_in, .dout, .k, .rd_out, .code_err, .disp_err);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic known(input logic [9:0] s, input logic r, input logic [7:0] b, input logic kk);
    dsym = s; rd_in = r; #1;
    chk(dout == b && k == kk && !code_err && !disp_err,
        $sformatf("decode %010b: got %02h k=%0d ce=%0d de=%0d", s, dout, k, code_err, disp_err));
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    known(10'b100111_0100, 0, 8'h00, 0);
    known(10'b011000_1011, 1, 8'h00, 0);
    known(10'b001111_1010, 0, 8'hBC, 1);
    known(10'b110000_0101, 1, 8'hBC, 1);
    known(10'b100011_0111, 0, 8'hF1, 0);
    known(10'b110110_1000, 0, 8'hFB, 1);
    known(10'b101010_1010, 1, 8'hB5, 0);
    for (int rr = 0; rr < 2; rr++) begin
      for (int b = 0; b < 268; b++) begin
        if (b < 256) begin edin = b[7:0]; ek = 0; end
        else begin edin = kchars[b-256]; ek = 1; end
        erd_in = rr[0]; #1;
        dsym = sym; rd_in = rr[0]; #1;
        chk(dout == edin && k == ek, $sformatf("round trip %02h k=%0d rd=%0d -> %02h k=%0d", edin, ek, rr, dout, k));
        chk(!code_err && !disp_err, $sformatf("false error for %02h k=%0d rd=%0d", edin, ek, rr));
        chk(rd_out == erd_out, $sformatf("rd after %02h", edin));
        // A symbol whose two forms differ is illegal at the other disparity.
        begin
          logic [9:0] other;
          erd_in = !rr[0]; #1;
          other = sym;
          if (other != dsym) begin
            rd_in = !rr[0]; #1;
            chk(disp_err, $sformatf("no disparity error for %02h k=%0d sent at rd=%0d", edin, ek, rr));
          end
        end
      end
    end
    dsym = 10'b0000000000; rd_in = 0; #1; chk(code_err, "all-zero symbol");
    dsym = 10'b1111111111; rd_in = 1; #1; chk(code_err, "all-one symbol");
    dsym = 10'b111100_1010; rd_in = 0; #1; chk(code_err, "bad 6b sub-block");
    dsym = 10'b100111_0100; rd_in = 1; #1; chk(disp_err, "D0.0- received at RD+");
    dsym = 10'b011000_1011; rd_in = 0; #1; chk(disp_err, "D0.0+ received at RD-");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
