// transmit_unit: builds the packets the card sends to the host.
//
// Two kinds of traffic share the host link:
//   ordinary - a register read reply: an ORD_REQ request packet, then an ORD_DATA
//     packet holding the register offset and contents;
//   DMA - a transfer of dma_num packets of dma_size stream words each. Every data
//     packet is announced by a DMA_REQ request packet (word count and packet
//     sequence number) and a DMA_ADDR packet with its destination address, then the
//     words follow from the DMA port, the last one flagged m_last. The destination
//     address starts at dma_addr and advances by the packet's bytes.
// An ordinary reply waiting at a packet boundary goes first, so register reads are
// answered during long DMA transfers. While link_up is low nothing is presented on
// the link (m_valid low, s_ready low): transmission pauses and resumes where it
// stopped.
//
// Interface: m_* valid/ready/last stream to the PCI-E core; s_* valid/ready stream
// from the uplink cache; ord_* reply from the control unit, taken (ord_ready) with
// the ORD_DATA word. dma_start (pulse) latches size, number and address; dma_rst
// (pulse) abandons a transfer and clears done and the packet count. dma_busy is
// high from the cycle after dma_start until the last word of the last packet;
// dma_done is then set. Each DMA packet costs two header cycles plus one cycle per
// word, so the link carries data dma_size / (dma_size + 2) of the time.
// The packet sequences follow the carrier card design; header layouts are this
// design's own (carrier_pkg).
module transmit_unit
  import carrier_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_up,
  // ordinary reply
  input  logic              ord_valid,
  input  logic [15:0]       ord_addr,
  input  logic [31:0]       ord_data,
  output logic              ord_ready,
  // DMA job
  input  logic              dma_rst,
  input  logic              dma_start,
  input  logic [15:0]       dma_size,
  input  logic [31:0]       dma_num,
  input  logic [63:0]       dma_addr,
  output logic              dma_busy,
  output logic              dma_done,
  output logic [31:0]       dma_pkts,
  // DMA port: stream words from the uplink cache
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_valid,
  output logic              s_ready,
  // packets to the host
  output logic [DATA_W-1:0] m_data,
  output logic              m_valid,
  output logic              m_last,
  input  logic              m_ready
);

  localparam int unsigned WORD_BYTES = DATA_W / 8;

  typedef enum logic [2:0] {T_IDLE, T_ORD_REQ, T_ORD_DATA, T_DMA_REQ, T_DMA_ADDR, T_DMA_DATA} tstate_e;
  tstate_e     state;
  logic [15:0] size;
  logic [31:0] num;
  logic [63:0] addr;
  logic [15:0] wcnt;
  logic        fire;

  assign fire = m_valid && m_ready;

  always_comb begin
    m_data    = '0;
    m_valid   = 1'b0;
    m_last    = 1'b1;
    s_ready   = 1'b0;
    ord_ready = 1'b0;
    unique case (state)
      T_ORD_REQ: begin
        m_data  = mk_hdr(PKT_ORD_REQ, 64'h0);
        m_valid = link_up;
      end
      T_ORD_DATA: begin
        m_data    = mk_hdr(PKT_ORD_DATA, {16'h0, ord_addr, ord_data});
        m_valid   = link_up;
        ord_ready = link_up && m_ready;
      end
      T_DMA_REQ: begin
        m_data  = mk_hdr(PKT_DMA_REQ, {dma_pkts, 16'h0, size});
        m_valid = link_up;
      end
      T_DMA_ADDR: begin
        m_data  = mk_hdr(PKT_DMA_ADDR, addr);
        m_valid = link_up;
      end
      T_DMA_DATA: begin
        m_data  = s_data;
        m_valid = link_up && s_valid;
        m_last  = (wcnt == size - 1'b1);
        s_ready = link_up && m_ready;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      size     <= '0;
      num      <= '0;
      addr     <= '0;
      wcnt     <= '0;
      dma_busy <= 1'b0;
      dma_done <= 1'b0;
      dma_pkts <= '0;
    end else if (dma_rst) begin
      // abandon a DMA transfer; an ordinary reply in flight is finished first
      dma_busy <= 1'b0;
      dma_done <= 1'b0;
      dma_pkts <= '0;
      if (state inside {T_DMA_REQ, T_DMA_ADDR, T_DMA_DATA}) state <= T_IDLE;
    end else begin
      if (dma_start && !dma_busy) begin
        size     <= dma_size;
        num      <= dma_num;
        addr     <= dma_addr;
        dma_busy <= 1'b1;
        dma_done <= 1'b0;
        dma_pkts <= '0;
      end
      unique case (state)
        T_IDLE: begin
          if (ord_valid)     state <= T_ORD_REQ;
          else if (dma_busy) state <= T_DMA_REQ;
        end
        T_ORD_REQ:  if (fire) state <= T_ORD_DATA;
        T_ORD_DATA: if (fire) state <= dma_busy ? T_DMA_REQ : T_IDLE;
        T_DMA_REQ:  if (fire) state <= T_DMA_ADDR;
        T_DMA_ADDR: if (fire) begin
          state <= T_DMA_DATA;
          wcnt  <= '0;
        end
        T_DMA_DATA: if (fire) begin
          wcnt <= wcnt + 1'b1;
          if (m_last) begin
            if (ord_valid)                  state <= T_ORD_REQ;
            else if (dma_pkts + 1'b1 != num) state <= T_DMA_REQ;
            else                            state <= T_IDLE;
            addr     <= addr + 64'(size) * WORD_BYTES;
            dma_pkts <= dma_pkts + 1'b1;
            if (dma_pkts + 1'b1 == num) begin
              dma_busy <= 1'b0;
              dma_done <= 1'b1;
            end
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  // The link rules: a presented word is held until it is taken.
  assert property (@(posedge clk) disable iff (!rst_n || dma_rst)
                   m_valid && !m_ready && link_up |=> m_valid || !link_up);
  assert property (@(posedge clk) disable iff (!rst_n) m_valid |-> link_up);

endmodule
