// tb_stream_flow_ctrl: self-checking test of the uplink speed balancing.
//
// A small cache (64 words, mark at 48) is filled by a front end that writes at
// random while its request is high and, like a real source, keeps writing for a
// few cycles after the request drops; the host side reads at random. A reference
// fill count and request state are kept in the testbench and compared every cycle.
// The test requires the request to be dropped at the mark and raised again after
// the cache is read empty several times. A last phase writes past the capacity
// to check the sticky overflow flag.
module tb_stream_flow_ctrl;
  localparam int unsigned CW = 64, HM = 48, LAG = 4;
  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0;
  logic fe_req, overflow;
  logic [$clog2(CW+1)-1:0] level;
  logic [31:0] stops;
  int checks = 0, failures = 0;
  int m_level = 0, n_drop = 0, n_rise = 0;
  bit m_req = 1;
  logic [LAG-1:0] req_pipe;

  stream_flow_ctrl #(.CACHE_WORDS(CW), .HIGH_MARK(HM)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit wok, rok;
    int nx;
    bit force_wr = 0;
    req_pipe = '1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      @(negedge clk);
      if (cyc == 5000) force_wr = 1;
      req_pipe = {req_pipe[LAG-2:0], fe_req};
      wr_en = force_wr ? 1'b1 : (req_pipe[LAG-1] && ($urandom_range(0, 3) != 0));
      rd_en = force_wr ? 1'b0 : ($urandom_range(0, 2) == 0);
      wok = wr_en && (m_level != CW || rd_en);
      rok = rd_en && (m_level != 0);
      nx = m_level + (wok ? 1 : 0) - (rok ? 1 : 0);
      if (m_req && nx >= HM) begin m_req = 0; n_drop++; end
      else if (!m_req && nx == 0) begin m_req = 1; n_rise++; end
      m_level = nx;
      @(posedge clk); #1;
      chk(level == m_level, $sformatf("level %0d want %0d", level, m_level));
      chk(fe_req == m_req, $sformatf("fe_req %0d want %0d", fe_req, m_req));
      if (!force_wr) chk(!overflow, "overflow while the request was honoured");
    end
    chk(stops == n_drop, "stop count");
    chk(n_drop >= 3 && n_rise >= 3, $sformatf("request cycled only %0d/%0d times", n_drop, n_rise));
    chk(overflow, "overflow not flagged when writing past capacity");
    chk(level == CW, "level saturates at capacity");
    $display("flow: %0d drops, %0d resumes", n_drop, n_rise);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
