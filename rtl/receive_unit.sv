// receive_unit: unpacks the packets the host sends to the card.
//
// Every host transfer opens with a request packet; its type field (the data flag)
// says whether an ordinary or a DMA transfer follows:
//   ORD_REQ (payload bit 0 = write) then one ORD_DATA word with offset and
//     contents -> a register write or read in the control unit;
//   DMA_REQ (payload [31:0] = N) then N raw data words -> repacked as pure data
//     on the DMA port, the last of the N words flagged dma_last.
// Header words must be one-word packets (s_last set). A header of any other type,
// a multi-word header packet or a missing ORD_DATA word is dropped up to the end
// of its packet and counted in bad_pkts. DMA data words are counted, not framed:
// the N words may arrive split over several host packets.
//
// Interface: s_* is the host packet stream (valid/ready/last). reg_* is the
// control unit's access port; reg_ready holds the ORD_DATA word until the control
// unit can take it. dma_* is a valid/ready stream towards the downlink cache.
// Timing: no storage; a word passes in the cycle it is accepted.
// dma_data, reg_addr and reg_wdata are fields of s_data, wired straight through;
// only the handshakes and the framing are decided here.
// The request-first sequence and the split into DMA and ordinary paths follow the
// carrier card design; the word formats are this design's own (carrier_pkg).
module receive_unit
  import carrier_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_valid,
  input  logic              s_last,
  output logic              s_ready,
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [15:0]       reg_addr,
  output logic [31:0]       reg_wdata,
  input  logic              reg_ready,
  output logic [DATA_W-1:0] dma_data,
  output logic              dma_valid,
  output logic              dma_last,
  input  logic              dma_ready,
  output logic [15:0]       bad_pkts
);

  typedef enum logic [1:0] {R_REQ, R_ORD, R_DMA, R_DROP} rstate_e;
  rstate_e   state;
  logic        wr_flag;
  logic [31:0] remain;
  logic        take;
  pkt_type_e   t;

  assign t    = hdr_type(s_data);
  assign take = s_valid && s_ready;

  always_comb begin
    s_ready   = 1'b1;
    reg_wr    = 1'b0;
    reg_rd    = 1'b0;
    reg_addr  = s_data[47:32];
    reg_wdata = s_data[31:0];
    dma_data  = s_data;
    dma_valid = 1'b0;
    dma_last  = 1'b0;
    unique case (state)
      R_ORD: begin
        if (t == PKT_ORD_DATA) begin
          s_ready = reg_ready;
          reg_wr  = s_valid && reg_ready && wr_flag;
          reg_rd  = s_valid && reg_ready && !wr_flag;
        end
      end
      R_DMA: begin
        s_ready   = dma_ready;
        dma_valid = s_valid;
        dma_last  = (remain == 32'd1);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= R_REQ;
      wr_flag  <= 1'b0;
      remain   <= '0;
      bad_pkts <= '0;
    end else if (take) begin
      unique case (state)
        R_REQ: begin
          if (!s_last) begin
            state    <= R_DROP;
            bad_pkts <= bad_pkts + 1'b1;
          end else if (t == PKT_ORD_REQ) begin
            state   <= R_ORD;
            wr_flag <= s_data[0];
          end else if (t == PKT_DMA_REQ && s_data[31:0] != '0) begin
            state  <= R_DMA;
            remain <= s_data[31:0];
          end else if (t != PKT_DMA_REQ) begin
            bad_pkts <= bad_pkts + 1'b1;
          end
        end
        R_ORD: begin
          if (t == PKT_ORD_DATA && s_last) state <= R_REQ;
          else begin
            state    <= s_last ? R_REQ : R_DROP;
            bad_pkts <= bad_pkts + 1'b1;
          end
        end
        R_DMA: begin
          remain <= remain - 1'b1;
          if (remain == 32'd1) state <= R_REQ;
        end
        R_DROP: if (s_last) state <= R_REQ;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) dma_valid && !dma_ready |=> dma_valid && $stable(dma_data));

endmodule
