// tb_serial_lane_rx: self-checking test of the lane receiver.
//
// The testbench encodes a lane stream itself (enc8b10b with its own running
// disparity): random words of 16 data characters separated by random numbers of
// K28.5 idles. Every word must come out intact, lowest byte first, one cycle after
// its last symbol. Corrupted symbols are then injected inside some words: each
// must be counted, the damaged word dropped, and the following words received
// correctly again after the next idle.
module tb_serial_lane_rx;
  import carrier_pkg::*;
  localparam int NB = DATA_W / 8;
  logic clk = 0, rst_n = 0;
  logic [9:0] sym;
  logic [DATA_W-1:0] m_data;
  logic m_valid;
  logic [15:0] err_cnt;
  logic [7:0] eb;
  logic ek, erd = 0, erd_nx, kerr;
  logic [9:0] esym;
  int checks = 0, failures = 0, got = 0;
  logic [DATA_W-1:0] exp_q[$];

  serial_lane_rx dut (.*);
  enc8b10b genc (.din(eb), .k(ek), .rd_in(erd), .dout(esym), .rd_out(erd_nx), .k_err(kerr));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic send(input logic [7:0] b, input logic k, input bit corrupt = 0);
    @(negedge clk);
    eb = b; ek = k; #1;
    sym = corrupt ? 10'b0000011111 : esym;   // not a valid symbol
    erd = erd_nx;
  endtask

  always @(posedge clk) if (rst_n && m_valid) begin
    chk(exp_q.size() > 0, "unexpected word");
    if (exp_q.size() > 0) chk(m_data == exp_q.pop_front(), "word contents");
    got++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bad = 0;
    sym = 10'b001111_1010;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 150; i++) begin
      logic [DATA_W-1:0] w;
      int cpos;
      w = {$urandom, $urandom, $urandom, $urandom};
      cpos = (i >= 100 && i % 10 == 0) ? $urandom_range(0, NB - 1) : -1;
      repeat ($urandom_range(1, 4)) send(K28_5, 1);
      if (cpos < 0) exp_q.push_back(w);
      else bad++;
      for (int b = 0; b < NB; b++) send(w[b*8 +: 8], 0, b == cpos);
    end
    repeat (3) send(K28_5, 1);
    repeat (3) @(posedge clk);
    chk(exp_q.size() == 0, $sformatf("%0d words lost", exp_q.size()));
    // a corrupted symbol can also upset the running disparity of the symbols after
    // it, so each one may count more than once
    chk(err_cnt >= 16'(bad) && err_cnt <= 16'(bad * 4), $sformatf("error count %0d for %0d corruptions", err_cnt, bad));
    $display("lane rx: %0d words, %0d corrupted", got, bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
