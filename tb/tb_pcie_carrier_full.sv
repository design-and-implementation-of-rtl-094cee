// tb_pcie_carrier_full: the carrier logic at its full default size.
//
// pcie_carrier_top with every parameter at its default (a 2^25-word uplink
// cache) runs the complete scenario of carrier_env: register transfers, two
// downlink DMA transfers and an uplink DMA transfer of 16 packets of 128 bytes,
// with link drops and a lane error. The host is never slow here, so the cache
// stays far below its stop mark and the front end's request must never drop.
module tb_pcie_carrier_full;
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

  pcie_carrier_top dut (.*);
  carrier_env #(.UP_PKTS(16), .SLOW_DISK(1'b0)) env (.*);

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
