// tb_pcie_carrier_top: end-to-end test of the carrier logic with a small cache.
//
// The uplink cache is cut to 64 words with the stop mark at 48, so that a
// slow host (one word in 40 accepted) fills it within the test: the front end's
// request must drop, the cache drain to empty and the request rise again, with no
// word lost or repeated. carrier_env plays the host, the caches and the front end
// and checks everything else (see there).
module tb_pcie_carrier_top;
  import carrier_pkg::*;
  logic clk = 0;
  logic rst_n;
  logic [DATA_W-1:0] rx_data, tx_data, dlc_wdata, dlc_rdata, ulc_wdata, ulc_rdata;
  logic rx_valid, rx_last, rx_ready, tx_valid, tx_last, tx_ready, link_up;
  logic dlc_wvalid, dlc_wlast, dlc_wready, dlc_rvalid, dlc_rready;
  logic ulc_wvalid, ulc_rvalid, ulc_rready, done;
  logic [1:0] fe_req;
  logic [1:0][9:0] fmc_rx_sym, fmc_tx_sym;
  logic [31:0] fe_cfg;
  int checks, failures;

  always #2 clk = ~clk;

  pcie_carrier_top #(.CACHE_WORDS(64), .HIGH_MARK(48)) dut (.*);
  carrier_env #(.CACHE_WORDS(64), .UP_PKTS(24), .SLOW_DISK(1'b1)) env (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;   // let carrier_env clear done
    wait (done === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
