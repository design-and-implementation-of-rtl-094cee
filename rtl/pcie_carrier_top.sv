// pcie_carrier_top: FPGA logic of the modular PCI-E carrier card.
//
// The card links a digital front end (on an FMC mezzanine card) to a host
// computer over PCI-E. FPGA-I holds the PCI-E user logic: the receive unit
// unpacks host packets, sending register accesses to the control unit and
// downlink DMA data to the DDR3 cache; the transmit unit returns register
// replies and streams uplink data from the DDR3 cache to the host in DMA packets;
// the stream flow controller gates the front end's transfer request so that the
// uplink cache never overflows. FPGA-II holds the high-speed serial module: one
// 8b/10b lane in each direction to each of FMC_SITES mezzanine sites. The site
// register (REG_FMC_SEL) picks the site that carries the stream: its received
// words go to the uplink cache, downlink words go to its lane, and only it sees
// the transfer request; the other sites' lanes send idles. The chip bus between
// the two FPGAs is a direct connection here.
//
//   host -> rx_* -> receive_unit -> control_unit (registers, fe_cfg)
//                              \-> dlc_w* (downlink DDR3 cache write)
//   dlc_r* (downlink cache read) -> serial_lane_tx[sel] -> fmc_tx_sym[sel]
//   fmc_rx_sym[sel] -> serial_lane_rx[sel] -> ulc_w* (uplink DDR3 cache write)
//   ulc_r* (uplink cache read) -> transmit_unit -> tx_* -> host
//   ulc write/read strobes -> stream_flow_ctrl -> fe_req[sel]
//
// The PCI-E core, the GTX transceivers and the DDR3 memories with their
// controllers are outside: their signals are ports. All logic runs on one clock.
// The ordinary status register (REG_ORD_STAT) reads
//   {request, overflow, link_up, 5'b0, selected lane's error count[7:0],
//    bad host packets[15:0]}.
// Switch sites only while no word is on the lanes; a word cut by a switch is lost.
// Interface timing: every stream is valid/ready (ulc_w* is a strobe: the cache
// must take every word; the flow controller keeps it from filling).
// dlc_wdata is the host's data word itself: the receive unit strips only the
// request packets around it.
// The block structure follows the carrier card design; the widths, the packet
// formats, the lane framing and the single clock and the site register are this design's own.
module pcie_carrier_top
  import carrier_pkg::*;
#(
  parameter int unsigned CACHE_WORDS  = 33554432,
  parameter int unsigned HIGH_MARK    = CACHE_WORDS - 16384,
  parameter logic [15:0] PKT_SIZE_RST = 16'd8,
  parameter int unsigned FMC_SITES    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  // PCI-E core transaction layer, host to card
  input  logic [DATA_W-1:0] rx_data,
  input  logic              rx_valid,
  input  logic              rx_last,
  output logic              rx_ready,
  // PCI-E core transaction layer, card to host
  output logic [DATA_W-1:0] tx_data,
  output logic              tx_valid,
  output logic              tx_last,
  input  logic              tx_ready,
  // PCI-E physical layer status
  input  logic              link_up,
  // downlink DDR3 cache
  output logic [DATA_W-1:0] dlc_wdata,
  output logic              dlc_wvalid,
  output logic              dlc_wlast,
  input  logic              dlc_wready,
  input  logic [DATA_W-1:0] dlc_rdata,
  input  logic              dlc_rvalid,
  output logic              dlc_rready,
  // uplink DDR3 cache
  output logic [DATA_W-1:0] ulc_wdata,
  output logic              ulc_wvalid,
  input  logic [DATA_W-1:0] ulc_rdata,
  input  logic              ulc_rvalid,
  output logic              ulc_rready,
  // FMC lanes (GTX parallel side), one per site
  input  logic [FMC_SITES-1:0][9:0] fmc_rx_sym,
  output logic [FMC_SITES-1:0][9:0] fmc_tx_sym,
  // digital front end control
  output logic [FMC_SITES-1:0]      fe_req,
  output logic [31:0]               fe_cfg
);

  localparam int unsigned LW = $clog2(CACHE_WORDS + 1);

  logic        reg_wr, reg_rd, reg_ready;
  logic [15:0] reg_addr;
  logic [31:0] reg_wdata;
  logic        rd_valid, rd_ready;
  logic [15:0] rd_addr;
  logic [31:0] rd_data;
  logic        dma_rst, dma_start, dma_busy, dma_done;
  logic [15:0] dma_size;
  logic [31:0] dma_num, dma_pkts;
  logic [63:0] dma_addr;
  logic [15:0] bad_pkts, lane_err;
  logic [31:0] ord_stat, stops;
  logic [LW-1:0] ul_level;
  logic        overflow, req;
  logic [3:0]  fmc_sel;
  logic [FMC_SITES-1:0][DATA_W-1:0] lane_data;
  logic [FMC_SITES-1:0]             lane_valid, lane_ready;
  logic [FMC_SITES-1:0][15:0]       lane_errs;

  assign ord_stat = {req, overflow, link_up, 5'b0, lane_err[7:0], bad_pkts};

  receive_unit u_rx (
    .clk, .rst_n,
    .s_data(rx_data), .s_valid(rx_valid), .s_last(rx_last), .s_ready(rx_ready),
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_ready,
    .dma_data(dlc_wdata), .dma_valid(dlc_wvalid), .dma_last(dlc_wlast), .dma_ready(dlc_wready),
    .bad_pkts
  );

  control_unit #(.PKT_SIZE_RST(PKT_SIZE_RST)) u_ctrl (
    .clk, .rst_n,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_ready,
    .rd_valid, .rd_addr, .rd_data, .rd_ready,
    .dma_rst, .dma_start, .dma_size, .dma_num, .dma_addr,
    .dma_busy, .dma_done, .dma_pkts,
    .fe_cfg, .ord_stat, .fmc_sel
  );

  transmit_unit u_tx (
    .clk, .rst_n, .link_up,
    .ord_valid(rd_valid), .ord_addr(rd_addr), .ord_data(rd_data), .ord_ready(rd_ready),
    .dma_rst, .dma_start, .dma_size, .dma_num, .dma_addr,
    .dma_busy, .dma_done, .dma_pkts,
    .s_data(ulc_rdata), .s_valid(ulc_rvalid), .s_ready(ulc_rready),
    .m_data(tx_data), .m_valid(tx_valid), .m_last(tx_last), .m_ready(tx_ready)
  );

  stream_flow_ctrl #(.CACHE_WORDS(CACHE_WORDS), .HIGH_MARK(HIGH_MARK)) u_flow (
    .clk, .rst_n,
    .wr_en(ulc_wvalid), .rd_en(ulc_rvalid && ulc_rready),
    .fe_req(req), .level(ul_level), .overflow, .stops
  );

  for (genvar i = 0; i < FMC_SITES; i++) begin : g_site
    logic on;
    assign on = (fmc_sel == 4'(i));

    serial_lane_rx u_lane_rx (
      .clk, .rst_n, .sym(fmc_rx_sym[i]),
      .m_data(lane_data[i]), .m_valid(lane_valid[i]), .err_cnt(lane_errs[i])
    );

    serial_lane_tx u_lane_tx (
      .clk, .rst_n,
      .s_data(dlc_rdata), .s_valid(dlc_rvalid && on), .s_ready(lane_ready[i]),
      .sym(fmc_tx_sym[i])
    );

    assign fe_req[i] = req && on;
  end

  // stream multiplexer: the selected site only
  always_comb begin
    ulc_wdata  = '0;
    ulc_wvalid = 1'b0;
    dlc_rready = 1'b0;
    lane_err   = '0;
    for (int i = 0; i < FMC_SITES; i++) begin
      if (fmc_sel == 4'(i)) begin
        ulc_wdata  = lane_data[i];
        ulc_wvalid = lane_valid[i];
        dlc_rready = lane_ready[i];
        lane_err   = lane_errs[i];
      end
    end
  end

  initial assert (FMC_SITES >= 1 && FMC_SITES <= 16)
    else $error("pcie_carrier_top: FMC_SITES must lie in 1..16");

endmodule
