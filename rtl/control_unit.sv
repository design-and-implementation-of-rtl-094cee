// control_unit: control and status registers of the PCI-E user logic.
//
// The host configures the card by writing registers through ordinary (non-DMA)
// transfers; each register sits at its own offset (see carrier_pkg):
//   REG_RESET    write bit 0 = 1: reset the DMA engine and arm it for one start
//   REG_DMA_CSR  write bit 0 = 1: start a DMA transfer;
//                read: [0] busy, [1] done, [2] armed, [3] start error,
//                      [31:16] packets sent (low 16 bits)
//   REG_DMA_SIZE DMA packet size in words (reset value PKT_SIZE_RST)
//   REG_DMA_NUM  DMA packet number
//   REG_DMA_ADRL / REG_DMA_ADRH  DMA destination address
//   REG_ORD_CTRL ordinary control register, drives the front-end parameters fe_cfg
//   REG_ORD_STAT ordinary status register, read only, returns ord_stat
//   REG_FMC_SEL  [3:0] FMC site whose mezzanine card carries the stream (reset 0)
// The start sequence is the one the carrier card prescribes: reset the engine,
// set packet size, packet number and destination address, then write the DMA
// control register. A start is accepted only when the engine is armed by a reset,
// idle, and size and number are non-zero; otherwise the start-error bit is set.
// Reading an unknown offset returns 0xDEADBEEF; writing one is ignored.
//
// Interface: reg_wr / reg_rd are one-cycle requests from the receive unit, taken
// when reg_ready is high. A read loads a reply (rd_addr, rd_data, rd_valid) that
// the transmit unit sends back; reg_ready stays low until it takes it (rd_ready).
// dma_start and dma_rst are one-cycle pulses the cycle after the write.
// The set of registers follows the carrier card design; the offsets, bit
// positions and the error reply are this design's own.
module control_unit
  import carrier_pkg::*;
#(
  parameter logic [15:0] PKT_SIZE_RST = 16'd8   // 128-byte bursts of 16-byte words
) (
  input  logic        clk,
  input  logic        rst_n,
  // register access from the receive unit
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [15:0] reg_addr,
  input  logic [31:0] reg_wdata,
  output logic        reg_ready,
  // read reply to the transmit unit
  output logic        rd_valid,
  output logic [15:0] rd_addr,
  output logic [31:0] rd_data,
  input  logic        rd_ready,
  // DMA job to the transmit unit
  output logic        dma_rst,
  output logic        dma_start,
  output logic [15:0] dma_size,
  output logic [31:0] dma_num,
  output logic [63:0] dma_addr,
  input  logic        dma_busy,
  input  logic        dma_done,
  input  logic [31:0] dma_pkts,
  // ordinary control / status
  output logic [31:0] fe_cfg,
  input  logic [31:0] ord_stat,
  output logic [3:0]  fmc_sel
);

  logic armed, start_err;
  logic [31:0] rdata;

  assign reg_ready = !rd_valid;

  always_comb begin
    unique case (reg_addr)
      REG_RESET:    rdata = 32'h0;
      REG_DMA_CSR:  rdata = {dma_pkts[15:0], 12'h0, start_err, armed, dma_done, dma_busy};
      REG_DMA_SIZE: rdata = {16'h0, dma_size};
      REG_DMA_NUM:  rdata = dma_num;
      REG_DMA_ADRL: rdata = dma_addr[31:0];
      REG_DMA_ADRH: rdata = dma_addr[63:32];
      REG_ORD_CTRL: rdata = fe_cfg;
      REG_ORD_STAT: rdata = ord_stat;
      REG_FMC_SEL:  rdata = {28'h0, fmc_sel};
      default:      rdata = 32'hDEAD_BEEF;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed     <= 1'b0;
      start_err <= 1'b0;
      dma_rst   <= 1'b0;
      dma_start <= 1'b0;
      dma_size  <= PKT_SIZE_RST;
      dma_num   <= '0;
      dma_addr  <= '0;
      fe_cfg    <= '0;
      fmc_sel   <= '0;
      rd_valid  <= 1'b0;
      rd_addr   <= '0;
      rd_data   <= '0;
    end else begin
      dma_rst   <= 1'b0;
      dma_start <= 1'b0;
      if (rd_valid && rd_ready) rd_valid <= 1'b0;
      if (reg_wr && reg_ready) begin
        unique case (reg_addr)
          REG_RESET: if (reg_wdata[0]) begin
            dma_rst   <= 1'b1;
            armed     <= 1'b1;
            start_err <= 1'b0;
          end
          REG_DMA_CSR: if (reg_wdata[0]) begin
            if (armed && !dma_busy && dma_size != '0 && dma_num != '0) begin
              dma_start <= 1'b1;
              armed     <= 1'b0;
            end else begin
              start_err <= 1'b1;
            end
          end
          REG_DMA_SIZE: dma_size         <= reg_wdata[15:0];
          REG_DMA_NUM:  dma_num          <= reg_wdata;
          REG_DMA_ADRL: dma_addr[31:0]   <= reg_wdata;
          REG_DMA_ADRH: dma_addr[63:32]  <= reg_wdata;
          REG_ORD_CTRL: fe_cfg           <= reg_wdata;
          REG_FMC_SEL:  fmc_sel          <= reg_wdata[3:0];
          default: ;
        endcase
      end else if (reg_rd && reg_ready) begin
        rd_valid <= 1'b1;
        rd_addr  <= reg_addr;
        rd_data  <= rdata;
      end
    end
  end

  // A request is never issued while the previous read reply is pending.
  assert property (@(posedge clk) disable iff (!rst_n) (reg_wr || reg_rd) |-> reg_ready);
  assert property (@(posedge clk) disable iff (!rst_n) !(reg_wr && reg_rd));

endmodule
