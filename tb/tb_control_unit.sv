// tb_control_unit: self-checking test of the control and status registers.
//
// Writes and reads every register through the access port and checks the read
// replies, including one held for several cycles while the transmit side is busy.
// Checks the DMA start rule: a start before a reset, with a zero packet number or
// while busy sets the error bit and gives no start pulse; after a reset and full
// configuration it gives exactly one pulse with the configured job. Also checks
// that the packet size resets to 8 words (128 bytes) and that the ordinary
// control register drives the front-end parameters.
module tb_control_unit;
  import carrier_pkg::*;
  logic clk = 0, rst_n = 0;
  logic reg_wr = 0, reg_rd = 0, reg_ready;
  logic [15:0] reg_addr = 0;
  logic [31:0] reg_wdata = 0;
  logic rd_valid, rd_ready = 0;
  logic [15:0] rd_addr;
  logic [31:0] rd_data;
  logic dma_rst, dma_start;
  logic [15:0] dma_size;
  logic [31:0] dma_num;
  logic [63:0] dma_addr;
  logic dma_busy = 0, dma_done = 0;
  logic [31:0] dma_pkts = 0;
  logic [31:0] fe_cfg, ord_stat = 32'hA5A5_0001;
  logic [3:0] fmc_sel;
  int checks = 0, failures = 0, starts = 0, resets = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (dma_start) starts++;
    if (dma_rst) resets++;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    while (!reg_ready) @(negedge clk);
    reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk);
    reg_wr = 0;
    @(negedge clk);   // let a resulting pulse be counted
  endtask

  task automatic rd(input logic [15:0] a, output logic [31:0] d, input int hold = 0);
    @(negedge clk);
    while (!reg_ready) @(negedge clk);
    reg_rd = 1; reg_addr = a;
    @(negedge clk);
    reg_rd = 0;
    chk(rd_valid && !reg_ready, "read reply pending");
    repeat (hold) begin
      @(negedge clk);
      chk(rd_valid && !reg_ready, "reply held");
    end
    chk(rd_addr == a, "reply address");
    d = rd_data;
    rd_ready = 1;
    @(negedge clk);
    rd_ready = 0;
    chk(!rd_valid && reg_ready, "reply taken");
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    repeat (2) @(posedge clk);
    rst_n = 1;
    rd(REG_DMA_SIZE, d); chk(d == 32'd8, $sformatf("reset packet size %0d", d));
    rd(REG_ORD_STAT, d, 3); chk(d == 32'hA5A5_0001, "ordinary status");
    rd(16'h0100, d); chk(d == 32'hDEAD_BEEF, "unknown offset");
    // configure without the reset: start must fail
    wr(REG_DMA_SIZE, 32'd16);
    wr(REG_DMA_NUM, 32'd5);
    wr(REG_DMA_ADRL, 32'h1234_5000);
    wr(REG_DMA_ADRH, 32'h0000_0009);
    wr(REG_DMA_CSR, 32'h1);
    rd(REG_DMA_CSR, d); chk(d[3] && !d[2], "start without reset flagged");
    chk(starts == 0, "no start before reset");
    // proper sequence
    wr(REG_RESET, 32'h1);
    chk(resets == 1, "reset pulse");
    rd(REG_DMA_CSR, d); chk(d[2] && !d[3], "armed, error cleared");
    wr(REG_DMA_CSR, 32'h1);
    chk(starts == 1, "start pulse");
    chk(dma_size == 16 && dma_num == 5 && dma_addr == 64'h9_1234_5000, "DMA job");
    rd(REG_DMA_ADRH, d); chk(d == 32'h9, "address high");
    rd(REG_DMA_NUM, d); chk(d == 32'd5, "packet number");
    // second start without reset fails
    wr(REG_DMA_CSR, 32'h1);
    chk(starts == 1, "start needs a new reset");
    // busy blocks a start
    wr(REG_RESET, 32'h1);
    dma_busy = 1; dma_pkts = 32'h0000_0003;
    wr(REG_DMA_CSR, 32'h1);
    chk(starts == 1, "no start while busy");
    rd(REG_DMA_CSR, d); chk(d == {16'h3, 12'h0, 1'b1, 1'b1, 1'b0, 1'b1}, $sformatf("status %08h", d));
    dma_busy = 0; dma_done = 1;
    wr(REG_RESET, 32'h1);
    wr(REG_DMA_NUM, 32'd0);
    wr(REG_DMA_CSR, 32'h1);
    chk(starts == 1, "no start with zero packets");
    // front-end parameters
    wr(REG_ORD_CTRL, 32'hCAFE_0042);
    chk(fe_cfg == 32'hCAFE_0042, "fe_cfg");
    rd(REG_ORD_CTRL, d); chk(d == 32'hCAFE_0042, "read back ordinary control");
    // FMC site
    chk(fmc_sel == 4'd0, "site 0 after reset");
    wr(REG_FMC_SEL, 32'h0000_0013);
    chk(fmc_sel == 4'd3, "site register");
    rd(REG_FMC_SEL, d); chk(d == 32'h3, "read back site");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
