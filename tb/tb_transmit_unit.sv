// tb_transmit_unit: self-checking test of host packet building.
//
// Phase 1 runs a DMA transfer of 4 packets of 8 words with the link up, the host
// always ready and data always available, and checks the exact word sequence
// (request, destination address, data, per packet) and the rate: the 40 words
// must leave in 40 consecutive cycles. Phase 2 repeats a transfer of 6 packets of
// 5 words with the link going down at random, random host stalls, gaps in the
// data and register replies arriving at random times; a parser checks that every
// packet is well formed, that replies go out only between DMA packets, that
// addresses advance by the packet size and that nothing is sent while the link is
// down. Phase 3 abandons a transfer with dma_rst.
module tb_transmit_unit;
  import carrier_pkg::*;
  logic clk = 0, rst_n = 0, link_up = 1;
  logic ord_valid = 0, ord_ready;
  logic [15:0] ord_addr = 0;
  logic [31:0] ord_data = 0;
  logic dma_rst = 0, dma_start = 0;
  logic [15:0] dma_size = 0;
  logic [31:0] dma_num = 0;
  logic [63:0] dma_addr = 0;
  logic dma_busy, dma_done;
  logic [31:0] dma_pkts;
  logic [DATA_W-1:0] s_data;
  logic s_valid = 0, s_ready;
  logic [DATA_W-1:0] m_data;
  logic m_valid, m_last, m_ready = 1;
  int checks = 0, failures = 0;
  int src_cnt = 0;
  bit rnd = 0;

  transmit_unit dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // data source: word i carries i
  assign s_data = DATA_W'(src_cnt) | (DATA_W'(32'h5A5A) << 64);
  always @(posedge clk) if (s_valid && s_ready) src_cnt <= src_cnt + 1;
  always @(negedge clk) begin
    if (rnd) begin
      if (!s_valid || s_ready) s_valid <= ($urandom_range(0, 3) != 0);
      m_ready <= ($urandom_range(0, 3) != 0);
      link_up <= ($urandom_range(0, 15) != 0) ? (link_up | ($urandom_range(0, 3) == 0)) : 1'b0;
    end
  end

  // output parser
  typedef enum {P_HDR, P_ORD, P_ADDR, P_DATA} pst_e;
  pst_e pst = P_HDR;
  int exp_seq = 0, exp_word = 0, wcnt = 0, cur_size = 0;
  logic [63:0] exp_addr;
  logic [47:0] ord_exp[$];
  int n_words = 0, n_ord = 0, n_pkts = 0, first_cyc = -1, last_cyc = -1, cyc = 0;
  logic [DATA_W-1:0] held;
  bit was_stalled = 0;

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      chk(!m_valid || link_up, "word presented with the link down");
      if (was_stalled && link_up) chk(m_valid && m_data == held, "stalled word changed");
      was_stalled = m_valid && !m_ready;
      held = m_data;
    end
    if (m_valid && m_ready) begin
      n_words++;
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      unique case (pst)
        P_HDR: begin
          chk(m_last, "header is one word");
          if (hdr_type(m_data) == PKT_ORD_REQ) pst = P_ORD;
          else begin
            chk(hdr_type(m_data) == PKT_DMA_REQ, "header type");
            chk(m_data[63:32] == 32'(exp_seq) && m_data[15:0] == 16'(cur_size), "DMA request fields");
            pst = P_ADDR;
          end
        end
        P_ORD: begin
          logic [47:0] e;
          chk(hdr_type(m_data) == PKT_ORD_DATA && m_last, "ordinary data packet");
          chk(ord_exp.size() > 0, "unexpected reply");
          if (ord_exp.size() > 0) begin
            e = ord_exp.pop_front();
            chk(m_data[47:0] == e, "reply contents");
          end
          n_ord++;
          pst = P_HDR;
        end
        P_ADDR: begin
          chk(hdr_type(m_data) == PKT_DMA_ADDR && m_last, "address packet");
          chk(m_data[63:0] == exp_addr, $sformatf("address %h want %h", m_data[63:0], exp_addr));
          exp_addr += 64'(cur_size) * (DATA_W / 8);
          wcnt = 0;
          pst = P_DATA;
        end
        P_DATA: begin
          chk(m_data[31:0] == 32'(exp_word), "data word order");
          exp_word++;
          wcnt++;
          chk(m_last == (wcnt == cur_size), "last flag");
          if (m_last) begin
            exp_seq++;
            n_pkts++;
            pst = P_HDR;
          end
        end
      endcase
    end
  end

  task automatic start(input int size, input int num, input logic [63:0] a);
    @(negedge clk);
    dma_size = 16'(size); dma_num = num; dma_addr = a;
    cur_size = size; exp_seq = 0; exp_addr = a; exp_word = src_cnt;
    dma_start = 1;
    @(negedge clk);
    dma_start = 0;
    chk(dma_busy, "busy after start");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // phase 1: full rate
    s_valid = 1;
    start(8, 4, 64'h1000);
    wait (dma_done);
    @(negedge clk);
    chk(!dma_busy && dma_pkts == 4, "done after 4 packets");
    chk(n_words == 40, $sformatf("%0d words", n_words));
    chk(last_cyc - first_cyc + 1 == 40, $sformatf("40 words took %0d cycles", last_cyc - first_cyc + 1));
    // phase 2: random stalls, link drops, register replies
    rnd = 1;
    start(5, 6, 64'hFFFF_F000);
    fork
      for (int i = 0; i < 4; i++) begin
        repeat ($urandom_range(3, 25)) @(negedge clk);
        ord_addr = 16'(i * 4); ord_data = $urandom; ord_valid = 1;
        ord_exp.push_back({ord_addr, ord_data});
        @(posedge clk);
        while (!ord_ready) @(posedge clk);
        @(negedge clk);
        ord_valid = 0;
      end
      wait (dma_done);
    join
    repeat (50) @(negedge clk);
    chk(n_pkts == 10 && n_ord == 4 && ord_exp.size() == 0, $sformatf("%0d packets, %0d replies", n_pkts, n_ord));
    chk(pst == P_HDR, "ends between packets");
    // phase 3: abandon
    rnd = 0; link_up = 1; m_ready = 1; s_valid = 1;
    start(16, 100, 64'h0);
    repeat (30) @(negedge clk);
    dma_rst = 1;
    @(negedge clk);
    dma_rst = 0;
    @(negedge clk);
    chk(!dma_busy && !dma_done && dma_pkts == 0, "reset abandons the transfer");
    chk(!m_valid, "link idle after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
