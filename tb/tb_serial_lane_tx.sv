// tb_serial_lane_tx: self-checking test of the lane transmitter.
//
// Words are offered with random gaps. Every symbol on the lane is decoded by the
// testbench (dec8b10b with its own running disparity) and must be either the
// K28.5 idle or a data character without code or disparity error. Data bytes are
// reassembled lowest byte first and compared with the words sent; a word must go
// out in 16 consecutive symbols with no idle inside it.
module tb_serial_lane_tx;
  import carrier_pkg::*;
  localparam int NB = DATA_W / 8;
  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic s_valid = 0, s_ready;
  logic [9:0] sym;
  logic [7:0] db;
  logic dk, drd = 0, drd_nx, ce, de;
  int checks = 0, failures = 0, nbyte = 0, idles = 0;
  logic [DATA_W-1:0] sent[$], acc;

  serial_lane_tx dut (.*);
  dec8b10b chkdec (.din(sym), .rd_in(drd), .dout(db), .k(dk), .rd_out(drd_nx), .code_err(ce), .disp_err(de));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    drd <= drd_nx;
    chk(!ce && !de, "symbol error on the lane");
    if (dk) begin
      chk(db == K28_5, "idle is K28.5");
      chk(nbyte == 0, "idle inside a word");
      idles++;
    end else begin
      acc[nbyte*8 +: 8] = db;
      nbyte++;
      if (nbyte == NB) begin
        chk(sent.size() > 0, "word nobody sent");
        if (sent.size() > 0) chk(acc == sent.pop_front(), "word contents");
        nbyte = 0;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      s_data = {$urandom, $urandom, $urandom, $urandom};
      if (i == 5) s_data = '0;
      if (i == 6) s_data = '1;
      s_valid = 1;
      sent.push_back(s_data);
      @(posedge clk);
      while (!s_ready) @(posedge clk);
      @(negedge clk);
      s_valid = 0;
    end
    repeat (5) @(posedge clk);
    chk(sent.size() == 0, $sformatf("%0d words not seen on the lane", sent.size()));
    chk(idles > 10, "idles sent between words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
