// carrier_env: host, DDR3 caches and digital front end around pcie_carrier_top.
//
// Connects to every port of the carrier logic and plays the parts outside it:
//   host     - sends request packets (register writes and reads, downlink DMA),
//              parses every packet the card returns and checks uplink DMA data,
//              destination addresses and register replies. Its readiness drops
//              to one word in 40 during a "slow disk" window (SLOW_DISK) and the
//              PCI-E link goes down twice during the uplink transfer.
//   caches   - the two DDR3 caches as unbounded queues; the uplink one checks it
//              never holds more than CACHE_WORDS words.
//   front end- on the selected FMC site, sends numbered 128-bit words over the
//              8b/10b lane while it sees the transfer request (seen through an
//              8-cycle delay, so words keep coming after the request drops),
//              corrupts one idle symbol once, and decodes the downlink lane,
//              checking the words the host sent. Every other site receives idles
//              and must send only idles.
// The scenario: register write and read, an unknown packet, a DMA start without
// the reset (must be refused), two downlink DMA transfers, then an uplink DMA
// transfer of UP_PKTS packets of 8 words with status polls while it runs; then a
// switch to FMC site 1, a downlink transfer and a 4-packet uplink transfer there.
// Each mechanism is counted; one that never happened counts as a failure.
module carrier_env
  import carrier_pkg::*;
#(
  parameter int unsigned CACHE_WORDS = 33554432,
  parameter int          UP_PKTS     = 24,
  parameter bit          SLOW_DISK   = 1'b1,
  parameter int          SITES       = 2
) (
  input  logic              clk,
  output logic              rst_n,
  output logic [DATA_W-1:0] rx_data,
  output logic              rx_valid,
  output logic              rx_last,
  input  logic              rx_ready,
  input  logic [DATA_W-1:0] tx_data,
  input  logic              tx_valid,
  input  logic              tx_last,
  output logic              tx_ready,
  output logic              link_up,
  input  logic [DATA_W-1:0] dlc_wdata,
  input  logic              dlc_wvalid,
  input  logic              dlc_wlast,
  output logic              dlc_wready,
  output logic [DATA_W-1:0] dlc_rdata,
  output logic              dlc_rvalid,
  input  logic              dlc_rready,
  input  logic [DATA_W-1:0] ulc_wdata,
  input  logic              ulc_wvalid,
  output logic [DATA_W-1:0] ulc_rdata,
  output logic              ulc_rvalid,
  input  logic              ulc_rready,
  output logic [SITES-1:0][9:0] fmc_rx_sym,
  input  logic [SITES-1:0][9:0] fmc_tx_sym,
  input  logic [SITES-1:0]      fe_req,
  input  logic [31:0]       fe_cfg,
  output logic              done,
  output int                checks,
  output int                failures
);
  localparam int NB = DATA_W / 8;
  localparam logic [63:0] UP_ADDR = 64'h0000_0002_4000_0000;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int n_reg_wr = 0, n_reg_rd = 0, n_bad = 0, n_reject = 0, n_down_words = 0, n_down_last = 0;
  int n_up_pkts = 0, n_ord_mid = 0, n_link_pause = 0, n_stop = 0, n_resume = 0, n_lane_err = 0;
  int n_switch = 0;

  // ---------------- host: packets to the card ----------------
  typedef struct { logic [DATA_W-1:0] d; logic l; } word_t;
  word_t hq[$];
  logic [DATA_W-1:0] down_exp[$];

  always @(posedge clk) begin
    if (rx_valid && rx_ready) begin
      rx_valid <= 1'b0;
    end
  end
  always @(negedge clk) begin
    if (!rx_valid && hq.size() > 0 && $urandom_range(0, 3) != 0) begin
      word_t w;
      w = hq.pop_front();
      rx_data  <= w.d;
      rx_last  <= w.l;
      rx_valid <= 1'b1;
    end
  end

  function automatic void host_push(logic [DATA_W-1:0] d, logic l);
    hq.push_back('{d, l});
  endfunction

  // ---------------- host: packets from the card ----------------
  typedef enum {P_HDR, P_ORD, P_ADDR, P_DATA} pst_e;
  pst_e pst = P_HDR;
  logic [47:0] replies[$];
  int up_word = 0, wcnt = 0, up_seq = 0, cur_size = 8;
  logic [63:0] exp_addr = UP_ADDR;
  bit up_running = 0, slow = 0;

  always @(negedge clk) tx_ready <= slow ? ($urandom_range(0, 39) == 0) : ($urandom_range(0, 3) != 0);

  always @(posedge clk) if (rst_n) begin
    chk(!tx_valid || link_up, "card sends with the link down");
    if (!link_up && up_running) n_link_pause++;
    if (tx_valid && tx_ready) begin
      unique case (pst)
        P_HDR: begin
          chk(tx_last, "header packet is one word");
          if (hdr_type(tx_data) == PKT_ORD_REQ) begin
            pst = P_ORD;
            if (up_running && up_seq > 0) n_ord_mid++;
          end else begin
            chk(hdr_type(tx_data) == PKT_DMA_REQ, "unknown packet from the card");
            chk(tx_data[63:32] == 32'(up_seq) && tx_data[15:0] == 16'(cur_size), "DMA request fields");
            pst = P_ADDR;
          end
        end
        P_ORD: begin
          chk(hdr_type(tx_data) == PKT_ORD_DATA && tx_last, "reply packet");
          replies.push_back(tx_data[47:0]);
          pst = P_HDR;
        end
        P_ADDR: begin
          chk(hdr_type(tx_data) == PKT_DMA_ADDR && tx_last, "address packet");
          chk(tx_data[63:0] == exp_addr, $sformatf("address %h want %h", tx_data[63:0], exp_addr));
          exp_addr += 64'(cur_size) * NB;
          wcnt = 0;
          pst = P_DATA;
        end
        P_DATA: begin
          chk(tx_data == {32'hF0E0_0000 ^ 32'(up_word), 32'(up_word), 32'hC0DE_0000, 32'(up_word)},
              $sformatf("uplink word %0d", up_word));
          up_word++;
          wcnt++;
          chk(tx_last == (wcnt == cur_size), "uplink last flag");
          if (tx_last) begin
            up_seq++;
            n_up_pkts++;
            pst = P_HDR;
          end
        end
      endcase
    end
  end

  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    host_push(mk_hdr(PKT_ORD_REQ, 64'h1), 1);
    host_push(mk_hdr(PKT_ORD_DATA, {16'h0, a, d}), 1);
    wait (hq.size() == 0 && !rx_valid);
    repeat (4) @(posedge clk);
    n_reg_wr++;
  endtask

  task automatic reg_read(input logic [15:0] a, output logic [31:0] d);
    logic [47:0] r;
    host_push(mk_hdr(PKT_ORD_REQ, 64'h0), 1);
    host_push(mk_hdr(PKT_ORD_DATA, {16'h0, a, 32'h0}), 1);
    wait (replies.size() > 0);
    r = replies.pop_front();
    chk(r[47:32] == a, "reply offset");
    d = r[31:0];
    n_reg_rd++;
  endtask

  task automatic dma_down(input int n);
    host_push(mk_hdr(PKT_DMA_REQ, 64'(n)), 1);
    for (int i = 0; i < n; i++) begin
      logic [DATA_W-1:0] w;
      w = {$urandom, $urandom, $urandom, $urandom};
      host_push(w, i == n - 1);
      down_exp.push_back(w);
    end
  endtask

  // ---------------- DDR3 caches ----------------
  logic [DATA_W-1:0] ulq[$], dlq[$];
  int dl_pending_last = 0;
  always @(posedge clk) if (rst_n) begin
    if (ulc_rvalid && ulc_rready) void'(ulq.pop_front());
    if (ulc_wvalid) begin
      ulq.push_back(ulc_wdata);
      chk(ulq.size() <= CACHE_WORDS, "uplink cache overflow");
    end
    if (dlc_rvalid && dlc_rready) void'(dlq.pop_front());
    if (dlc_wvalid && dlc_wready) begin
      dlq.push_back(dlc_wdata);
      if (dlc_wlast) n_down_last++;
    end
  end
  always @(negedge clk) begin
    ulc_rvalid <= ulq.size() > 0;
    ulc_rdata  <= (ulq.size() > 0) ? ulq[0] : '0;
    dlc_rvalid <= dlq.size() > 0;
    dlc_rdata  <= (dlq.size() > 0) ? dlq[0] : '0;
    dlc_wready <= $urandom_range(0, 2) != 0;
  end

  // ---------------- front end: uplink lane ----------------
  logic [7:0] fe_byte;
  logic       fe_k, fe_rd = 1'b0, fe_rd_nx, fe_kerr;
  logic [9:0] fe_sym;
  logic [7:0] req_dly;
  int fe_seq = 0, fe_b = -1;
  logic [DATA_W-1:0] fe_word;
  bit up_enable = 0, corrupt_once = 0, last_was_word = 0;
  enc8b10b fe_enc (.din(fe_byte), .k(fe_k), .rd_in(fe_rd), .dout(fe_sym), .rd_out(fe_rd_nx), .k_err(fe_kerr));

  int fe_site = 0, new_site = 0;
  bit switch_req = 0, switching = 0;
  logic [SITES-1:0] idle_rd = '0;
  logic req_sel, req_sel_q = 1'b1;
  assign req_sel = fe_req[fe_site];
  always @(posedge clk) req_dly <= {req_dly[6:0], req_sel};
  always @(posedge clk) if (rst_n) begin
    if (req_sel_q && !req_sel && !switching) n_stop++;
    if (!req_sel_q && req_sel && !switching) n_resume++;
    req_sel_q <= req_sel;
    if (!switching)
      for (int s = 0; s < SITES; s++) if (s != fe_site) chk(!fe_req[s], "request on an unselected site");
  end

  initial begin
    // every lane receiver leaves reset expecting RD -1
    fmc_rx_sym = {SITES{10'b001111_1010}};
    fe_rd = 1'b0;
    #1;
    wait (rst_n === 1'b1);
    forever begin
      @(negedge clk);
      if (switch_req && fe_b < 0) begin
        idle_rd[fe_site] = fe_rd;
        fe_rd = idle_rd[new_site];
        fe_site = new_site;
        switch_req = 0;
      end
      for (int s = 0; s < SITES; s++) if (s != fe_site) begin
        fmc_rx_sym[s] = idle_rd[s] ? 10'b110000_0101 : 10'b001111_1010;
        idle_rd[s] = !idle_rd[s];
      end
      if (fe_b < 0 && up_enable && !switch_req && req_dly[7] && !last_was_word && $urandom_range(0, 3) != 0) begin
        fe_word = {32'hF0E0_0000 ^ 32'(fe_seq), 32'(fe_seq), 32'hC0DE_0000, 32'(fe_seq)};
        fe_seq++;
        fe_b = 0;
      end
      if (fe_b >= 0) begin
        fe_byte = fe_word[fe_b*8 +: 8]; fe_k = 0;
        fe_b = (fe_b == NB - 1) ? -1 : fe_b + 1;
        last_was_word = (fe_b < 0);
      end else begin
        fe_byte = K28_5; fe_k = 1;
        last_was_word = 0;
      end
      #1;
      if (fe_k && corrupt_once) begin
        // not a code word, but leaves the same running disparity as K28.5
        fmc_rx_sym[fe_site] = fe_rd ? 10'b000011_0101 : 10'b111100_0101;
        corrupt_once = 0;
        last_was_word = 1;   // keep the next symbol an idle
        n_lane_err++;
      end else begin
        fmc_rx_sym[fe_site] = fe_sym;
      end
      fe_rd = fe_rd_nx;
    end
  end

  // ---------------- front end: downlink lanes ----------------
  for (genvar g = 0; g < SITES; g++) begin : g_dn
    logic [7:0] dn_byte;
    logic dn_k, dn_rd = 1'b0, dn_rd_nx, dn_ce, dn_de;
    int dn_b = 0;
    logic [DATA_W-1:0] dn_acc;
    dec8b10b fe_dec (.din(fmc_tx_sym[g]), .rd_in(dn_rd), .dout(dn_byte), .k(dn_k), .rd_out(dn_rd_nx),
                     .code_err(dn_ce), .disp_err(dn_de));
    always @(posedge clk) if (rst_n) begin
      dn_rd <= dn_rd_nx;
      chk(!dn_ce && !dn_de, "downlink lane symbol error");
      if (dn_k) chk(dn_b == 0 && dn_byte == K28_5, "idle inside a downlink word");
      else begin
        chk(g == fe_site, "data on an unselected site");
        dn_acc[dn_b*8 +: 8] = dn_byte;
        dn_b++;
        if (dn_b == NB) begin
          dn_b = 0;
          chk(down_exp.size() > 0, "unexpected downlink word");
          if (down_exp.size() > 0) chk(dn_acc == down_exp.pop_front(), "downlink word");
          n_down_words++;
        end
      end
    end
  end

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] d;
    done = 0; checks = 0; failures = 0;
    rst_n = 0; rx_valid = 0; rx_data = '0; rx_last = 0; link_up = 1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(posedge clk);
    // register transfers
    reg_write(REG_ORD_CTRL, 32'hFEC0_0001);
    chk(fe_cfg == 32'hFEC0_0001, "front-end parameters");
    reg_read(REG_DMA_SIZE, d);
    chk(d == 32'd8, "default packet size: 8 words = 128 bytes");
    // unknown packet
    host_push(mk_hdr(pkt_type_e'(4'h9), 64'h0), 1);
    n_bad++;
    reg_read(REG_ORD_STAT, d);
    chk(d[15:0] == 16'd1, $sformatf("bad packet count %0d", d[15:0]));
    chk(d[31] == 1'b1 && d[29] == 1'b1, "status shows request and link up");
    // a start without the reset is refused
    reg_write(REG_DMA_NUM, 32'(UP_PKTS));
    reg_write(REG_DMA_CSR, 32'h1);
    reg_read(REG_DMA_CSR, d);
    chk(d[3] && !d[0], "start without reset refused");
    if (d[3]) n_reject++;
    // downlink DMA
    dma_down(6);
    dma_down(11);
    wait (down_exp.size() == 0);
    repeat (20) @(posedge clk);
    chk(n_down_words == 17 && n_down_last == 2, $sformatf("downlink: %0d words, %0d ends", n_down_words, n_down_last));
    // uplink DMA
    reg_write(REG_RESET, 32'h1);
    reg_write(REG_DMA_SIZE, 32'd8);
    reg_write(REG_DMA_NUM, 32'(UP_PKTS));
    reg_write(REG_DMA_ADRL, UP_ADDR[31:0]);
    reg_write(REG_DMA_ADRH, UP_ADDR[63:32]);
    up_running = 1;
    up_enable = 1;
    reg_write(REG_DMA_CSR, 32'h1);
    fork
      begin
        slow = SLOW_DISK;
        repeat (2500) @(posedge clk);
        slow = 0;
      end
      begin
        repeat (300) @(posedge clk);
        corrupt_once = 1;
        repeat (400) @(posedge clk);
        link_up = 0;
        repeat (40) @(posedge clk);
        link_up = 1;
        repeat (1000) @(posedge clk);
        link_up = 0;
        repeat (25) @(posedge clk);
        link_up = 1;
      end
      begin
        d = 0;
        while (!d[1]) begin
          repeat (150) @(posedge clk);
          reg_read(REG_DMA_CSR, d);
        end
      end
    join
    up_running = 0;
    chk(d[15:0] == 16'h0002 && d[31:16] == 16'(UP_PKTS), $sformatf("final DMA status %08h", d));
    chk(n_up_pkts == UP_PKTS && up_word == UP_PKTS * 8, $sformatf("uplink: %0d packets, %0d words", n_up_pkts, up_word));
    reg_read(REG_ORD_STAT, d);
    chk(d[23:16] == 8'd1, $sformatf("lane error count %0d", d[23:16]));
    chk(d[30] == 1'b0, "no cache overflow");
    // switch the stream to FMC site 1
    if (SITES > 1) begin
      up_enable = 0;
      repeat (40) @(posedge clk);
      wait (fe_b < 0);
      switching = 1;
      reg_write(REG_FMC_SEL, 32'h1);
      new_site = 1;
      switch_req = 1;
      wait (!switch_req);
      @(posedge clk);
      switching = 0;
      n_switch++;
      reg_read(REG_FMC_SEL, d);
      chk(d == 32'h1, "site register");
      reg_read(REG_ORD_STAT, d);
      chk(d[23:16] == 8'd0, "new site's lane is clean");
      dma_down(5);
      wait (down_exp.size() == 0);
      reg_write(REG_RESET, 32'h1);
      reg_write(REG_DMA_NUM, 32'd4);
      up_seq = 0;
      exp_addr = UP_ADDR;
      up_running = 1;
      up_enable = 1;
      reg_write(REG_DMA_CSR, 32'h1);
      d = 0;
      while (!d[1]) begin
        repeat (150) @(posedge clk);
        reg_read(REG_DMA_CSR, d);
      end
      up_running = 0;
      chk(n_up_pkts == UP_PKTS + 4, $sformatf("uplink on site 1: %0d packets in all", n_up_pkts));
      chk(n_down_words == 22, "downlink on site 1");
    end
    // mechanisms
    $display("mechanisms: reg_wr=%0d reg_rd=%0d bad_pkt=%0d start_refused=%0d down_words=%0d up_pkts=%0d",
             n_reg_wr, n_reg_rd, n_bad, n_reject, n_down_words, n_up_pkts);
    $display("            reply_during_dma=%0d link_pause_cycles=%0d flow_stop=%0d flow_resume=%0d lane_err=%0d site_switch=%0d",
             n_ord_mid, n_link_pause, n_stop, n_resume, n_lane_err, n_switch);
    if (SITES > 1) chk(n_switch > 0, "FMC site never switched");
    chk(n_reg_wr > 0 && n_reg_rd > 0 && n_bad > 0 && n_reject > 0 && n_down_words > 0 && n_up_pkts > 0,
        "a basic mechanism never happened");
    chk(n_ord_mid > 0, "no register reply between DMA packets");
    chk(n_link_pause > 0, "link never went down during DMA");
    chk(n_lane_err > 0, "no lane error injected");
    if (SLOW_DISK) chk(n_stop > 0 && n_resume > 0, "flow control never stopped and resumed the front end");
    else           chk(n_stop == 0, "request dropped though the cache never filled");
    done = 1;
  end
endmodule
