// tb_transfer_sweep: uplink DMA transfers of growing size through the whole card.
//
// Runs the transfer sizes of the fibre-card speed measurement: 1, 40, 1600,
// 64000 and 2560000 bytes, in 128-byte packets (a transfer of at most 128 bytes
// uses one packet of just enough 16-byte words; larger ones are rounded up to
// whole packets). The front end streams numbered words over the 8b/10b lane back
// to back with one idle between words, the host is always ready, and the cache
// holds every word. For each size the testbench checks every word and address,
// and measures the cycles from the start command to the last word. On this path
// the lane is the bottleneck (17 symbols per 16-byte word), so a transfer must take
// no more than 17 cycles per word plus a fixed start-up allowance. The rate is
// printed in MB/s for a 212.5 MHz symbol clock (2.125 Gbps line rate).
module tb_transfer_sweep;
  import carrier_pkg::*;
  localparam int NB = DATA_W / 8;
  localparam real SYM_MHZ = 212.5;
  logic clk = 0, rst_n = 0;
  logic [DATA_W-1:0] rx_data = '0, tx_data, dlc_wdata, dlc_rdata = '0, ulc_wdata, ulc_rdata;
  logic rx_valid = 0, rx_last = 0, rx_ready, tx_valid, tx_last, tx_ready = 1, link_up = 1;
  logic dlc_wvalid, dlc_wlast, dlc_wready = 1, dlc_rvalid = 0, dlc_rready;
  logic ulc_wvalid, ulc_rvalid, ulc_rready;
  logic [1:0] fe_req;
  logic [1:0][9:0] fmc_rx_sym, fmc_tx_sym;
  logic [31:0] fe_cfg;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;

  pcie_carrier_top dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // uplink cache: a queue
  logic [DATA_W-1:0] ulq[$];
  always @(posedge clk) if (rst_n) begin
    if (ulc_rvalid && ulc_rready) void'(ulq.pop_front());
    if (ulc_wvalid) ulq.push_back(ulc_wdata);
  end
  assign ulc_rvalid = ulq.size() > 0;
  assign ulc_rdata  = (ulq.size() > 0) ? ulq[0] : '0;

  // front end: numbered words, one idle between words, only while requested
  logic [7:0] fb;
  logic fk, frd = 1'b0, frd_nx, fkerr;
  logic [9:0] fsym;
  int fseq = 0, fbi = -1, fe_budget = 0;
  logic [DATA_W-1:0] fw;
  enc8b10b fenc (.din(fb), .k(fk), .rd_in(frd), .dout(fsym), .rd_out(frd_nx), .k_err(fkerr));
  initial begin
    fmc_rx_sym = {2{10'b001111_1010}};
    frd = 1'b0;
    #1;
    wait (rst_n === 1'b1);
    forever begin
      @(negedge clk);
      if (fbi < 0) begin
        fb = K28_5; fk = 1;
        if (fe_req[0] && fe_budget > 0) begin
          fw = {96'h5EED_0000_0000_0000_0000_0000, 32'(fseq)};
          fseq++;
          fe_budget--;
          fbi = 0;
        end
      end else begin
        fb = fw[fbi*8 +: 8]; fk = 0;
        fbi = (fbi == NB - 1) ? -1 : fbi + 1;
      end
      #1;
      fmc_rx_sym[0] = fsym;
      fmc_rx_sym[1] = fmc_rx_sym[1] == 10'b001111_1010 ? 10'b110000_0101 : 10'b001111_1010;
      frd = frd_nx;
    end
  end

  // host side
  typedef struct { logic [DATA_W-1:0] d; logic l; } word_t;
  word_t hq[$];
  logic [47:0] replies[$];
  always @(posedge clk) if (rx_valid && rx_ready) rx_valid <= 1'b0;
  always @(negedge clk) if (!rx_valid && hq.size() > 0) begin
    word_t w;
    w = hq.pop_front();
    rx_data <= w.d; rx_last <= w.l; rx_valid <= 1'b1;
  end

  int pst = 0, up_word = 0, wcnt = 0, cur_size = 8, words_seen = 0;
  longint last_data_cyc = 0, cyc = 0;
  logic [63:0] exp_addr;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_valid && tx_ready) begin
      unique case (pst)
        0: pst = (hdr_type(tx_data) == PKT_ORD_REQ) ? 1 : 2;
        1: begin replies.push_back(tx_data[47:0]); pst = 0; end
        2: begin
          chk(tx_data[63:0] == exp_addr, $sformatf("destination address %h want %h", tx_data[63:0], exp_addr));
          exp_addr += 64'(cur_size) * NB;
          wcnt = 0;
          pst = 3;
        end
        default: begin
          chk(tx_data[31:0] == 32'(up_word) && tx_data[127:112] == 16'h5EED, "uplink word");
          up_word++; wcnt++; words_seen++;
          last_data_cyc = cyc;
          if (tx_last) pst = 0;
        end
      endcase
    end
  end

  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    hq.push_back('{mk_hdr(PKT_ORD_REQ, 64'h1), 1'b1});
    hq.push_back('{mk_hdr(PKT_ORD_DATA, {16'h0, a, d}), 1'b1});
    wait (hq.size() == 0 && !rx_valid);
    repeat (3) @(posedge clk);
  endtask

  task automatic reg_read(input logic [15:0] a, output logic [31:0] d);
    logic [47:0] r;
    hq.push_back('{mk_hdr(PKT_ORD_REQ, 64'h0), 1'b1});
    hq.push_back('{mk_hdr(PKT_ORD_DATA, {16'h0, a, 32'h0}), 1'b1});
    wait (replies.size() > 0);
    r = replies.pop_front();
    d = r[31:0];
  endtask

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint sizes[5] = '{1, 40, 1600, 64000, 2560000};
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    foreach (sizes[i]) begin
      longint words, pkts, t0, cycles, bound;
      int size;
      logic [31:0] d;
      words = (sizes[i] + NB - 1) / NB;
      if (words <= 8) begin size = int'(words); pkts = 1; end
      else begin size = 8; pkts = (words + 7) / 8; end
      words = pkts * size;
      reg_write(REG_RESET, 32'h1);
      reg_write(REG_DMA_SIZE, 32'(size));
      reg_write(REG_DMA_NUM, 32'(pkts));
      reg_write(REG_DMA_ADRL, 32'h1000_0000);
      reg_write(REG_DMA_ADRH, 32'h0);
      exp_addr = 64'h1000_0000;
      cur_size = size;
      words_seen = 0;
      // start; the front end is then allowed exactly this transfer's words
      hq.push_back('{mk_hdr(PKT_ORD_REQ, 64'h1), 1'b1});
      hq.push_back('{mk_hdr(PKT_ORD_DATA, {16'h0, REG_DMA_CSR, 32'h1}), 1'b1});
      wait (hq.size() == 0 && !rx_valid);
      t0 = cyc;
      fe_budget = int'(words);
      wait (words_seen == int'(words));
      repeat (5) @(posedge clk);
      cycles = last_data_cyc - t0 + 1;
      bound = words * 17 + 64;
      reg_read(REG_DMA_CSR, d);
      chk(d[1] && !d[0] && d[31:16] == 16'(pkts), $sformatf("status after %0d bytes: %08h", sizes[i], d));
      chk(cycles <= bound, $sformatf("%0d bytes took %0d cycles, bound %0d", sizes[i], cycles, bound));
      $display("transfer %0d bytes: %0d packets of %0d words, %0d cycles, %0.1f MB/s at %0.1f MHz",
               sizes[i], pkts, size, cycles, real'(words * NB) * SYM_MHZ / real'(cycles), SYM_MHZ);
    end
    chk(fe_req[0], "request never dropped with an always-ready host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
