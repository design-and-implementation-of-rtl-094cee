// tb_receive_unit: self-checking test of host packet unpacking.
//
// A source sends host packets with random gaps; the control-unit side and the
// DMA side accept with random stalls. Directed packets cover an ordinary write,
// an ordinary read, a DMA transfer whose data is split over two host packets, an
// unknown packet type, a header packet longer than one word, an ordinary request
// followed by the wrong packet and an empty DMA request. A random mix of ordinary
// writes and DMA transfers follows. Every register access and every DMA word is
// compared in order with the expected list; dma_last must mark the end of each
// transfer, and the dropped-packet count must match.
module tb_receive_unit;
  import carrier_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] s_data = '0;
  logic s_valid = 0, s_last = 0, s_ready;
  logic reg_wr, reg_rd, reg_ready = 0;
  logic [15:0] reg_addr;
  logic [31:0] reg_wdata;
  logic [DATA_W-1:0] dma_data;
  logic dma_valid, dma_last, dma_ready = 0;
  logic [15:0] bad_pkts;
  int checks = 0, failures = 0;

  typedef struct { logic [DATA_W-1:0] d; logic l; } word_t;
  word_t src_q[$];
  logic [48:0] reg_exp[$];       // {wr, addr, data}
  logic [DATA_W:0] dma_exp[$];   // {last, data}
  int exp_bad = 0;

  receive_unit dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  function automatic void push(logic [DATA_W-1:0] d, logic l);
    src_q.push_back('{d, l});
  endfunction

  function automatic void ord(logic w, logic [15:0] a, logic [31:0] d);
    push(mk_hdr(PKT_ORD_REQ, {63'h0, w}), 1);
    push(mk_hdr(PKT_ORD_DATA, {16'h0, a, d}), 1);
    reg_exp.push_back({w, a, w ? d : 32'h0});
  endfunction

  function automatic void dma(int n, int split);
    push(mk_hdr(PKT_DMA_REQ, 64'(n)), 1);
    for (int i = 0; i < n; i++) begin
      logic [DATA_W-1:0] w;
      w = {$urandom, $urandom, $urandom, $urandom};
      push(w, (i == n - 1) || (i == split - 1));
      dma_exp.push_back({(i == n - 1) ? 1'b1 : 1'b0, w});
    end
  endfunction

  // source
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (!s_valid && src_q.size() > 0 && $urandom_range(0, 3) != 0) begin
        word_t w;
        w = src_q.pop_front();
        s_data = w.d; s_last = w.l; s_valid = 1;
      end
      @(posedge clk);
      if (s_valid && s_ready) begin
        #1 s_valid = 0;
      end
    end
  end

  // sinks
  always @(negedge clk) begin
    reg_ready <= ($urandom_range(0, 2) != 0);
    dma_ready <= ($urandom_range(0, 2) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (reg_wr || reg_rd) begin
      logic [48:0] e;
      chk(reg_ready, "access without ready");
      chk(reg_exp.size() > 0, "unexpected register access");
      if (reg_exp.size() > 0) begin
        e = reg_exp.pop_front();
        chk(reg_wr == e[48] && reg_rd == !e[48] && reg_addr == e[47:32] && (!reg_wr || reg_wdata == e[31:0]),
            $sformatf("register access wr=%0d %04h %08h", reg_wr, reg_addr, reg_wdata));
      end
    end
    if (dma_valid && dma_ready) begin
      logic [DATA_W:0] e;
      chk(dma_exp.size() > 0, "unexpected DMA word");
      if (dma_exp.size() > 0) begin
        e = dma_exp.pop_front();
        chk(dma_data == e[DATA_W-1:0] && dma_last == e[DATA_W], "DMA word or last flag");
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    ord(1, REG_ORD_CTRL, 32'h1122_3344);
    ord(0, REG_DMA_CSR, 32'h0);
    dma(5, 3);
    push(mk_hdr(pkt_type_e'(4'h7), 64'h0), 1);                   exp_bad++;
    push(mk_hdr(PKT_ORD_REQ, 64'h1), 0); push('0, 1);             exp_bad++;
    push(mk_hdr(PKT_ORD_REQ, 64'h1), 1);
    push(mk_hdr(PKT_DMA_ADDR, 64'h0), 1);                         exp_bad++;
    push(mk_hdr(PKT_DMA_REQ, 64'h0), 1);
    ord(1, REG_DMA_NUM, 32'd77);
    for (int i = 0; i < 60; i++) begin
      if ($urandom_range(0, 1) == 0) ord($urandom_range(0, 1), 16'($urandom_range(0, 7) * 4), $urandom);
      else dma($urandom_range(1, 20), $urandom_range(1, 20));
    end
    wait (src_q.size() == 0 && !s_valid);
    repeat (20) @(posedge clk);
    chk(reg_exp.size() == 0, $sformatf("%0d register accesses missing", reg_exp.size()));
    chk(dma_exp.size() == 0, $sformatf("%0d DMA words missing", dma_exp.size()));
    chk(bad_pkts == 16'(exp_bad), $sformatf("bad packets %0d want %0d", bad_pkts, exp_bad));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
