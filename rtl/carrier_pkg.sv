// carrier_pkg: types and constants shared by the carrier card logic.
//
// The host link carries packets as a stream of DATA_W-bit words; a packet ends on
// the word flagged `last`. Header words (request and address packets) hold a 4-bit
// type in their top bits; this is the "data flag" by which the receive unit sorts
// host packets. DMA data packets are raw stream words with no header of their own:
// a DMA request packet and a destination address packet announce each of them.
// The word layouts and the register offsets below are this design's own choice;
// the packet sequences they serve follow the carrier card's specification.
package carrier_pkg;

  localparam int unsigned DATA_W = 128;   // host-link word width (user clock of a x8 Gen2 link)

  typedef enum logic [3:0] {
    PKT_NONE     = 4'h0,
    PKT_ORD_REQ  = 4'h1,   // ordinary transfer request: bit 0 of the payload = write
    PKT_ORD_DATA = 4'h2,   // ordinary transfer: register offset and contents
    PKT_DMA_REQ  = 4'h3,   // DMA request: number of data words that follow
    PKT_DMA_ADDR = 4'h4    // DMA destination address of the next data packet
  } pkt_type_e;

  // Header word fields, counted from the top of a DATA_W-bit word.
  //   [DATA_W-1 -: 4]  type
  //   [63:0]           payload: ORD_REQ  -> bit 0 write flag
  //                             ORD_DATA -> [47:32] offset, [31:0] contents
  //                             DMA_REQ  -> [31:0] data words, [63:32] packet sequence number
  //                             DMA_ADDR -> [63:0] byte address
  function automatic logic [DATA_W-1:0] mk_hdr(pkt_type_e t, logic [63:0] payload);
    logic [DATA_W-1:0] w;
    w = '0;
    w[DATA_W-1 -: 4] = t;
    w[63:0] = payload;
    return w;
  endfunction

  function automatic pkt_type_e hdr_type(logic [DATA_W-1:0] w);
    return pkt_type_e'(w[DATA_W-1 -: 4]);
  endfunction

  // Register offsets (bytes) of the control unit.
  localparam logic [15:0] REG_RESET    = 16'h0000;  // write 1 to bit 0: reset the DMA engine
  localparam logic [15:0] REG_DMA_CSR  = 16'h0004;  // write bit 0: start; read: status
  localparam logic [15:0] REG_DMA_SIZE = 16'h0008;  // DMA packet size in words
  localparam logic [15:0] REG_DMA_NUM  = 16'h000C;  // DMA packet number
  localparam logic [15:0] REG_DMA_ADRL = 16'h0010;  // DMA destination address [31:0]
  localparam logic [15:0] REG_DMA_ADRH = 16'h0014;  // DMA destination address [63:32]
  localparam logic [15:0] REG_ORD_CTRL = 16'h0018;  // ordinary control: front-end parameters
  localparam logic [15:0] REG_ORD_STAT = 16'h001C;  // ordinary status (read only)
  localparam logic [15:0] REG_FMC_SEL  = 16'h0020;  // FMC site that carries the stream

  // 8b/10b control characters used on the FMC lane.
  localparam logic [7:0] K28_5 = 8'hBC;   // idle / comma

endpackage
