// serial_lane_tx: transmit side of the high-speed serial module on FPGA-II.
//
// Sends stream words to the front end over one 8b/10b lane of the FMC
// connector. Each DATA_W-bit word goes out as DATA_W/8 data characters, lowest
// byte first, one symbol per clock; when no word is waiting the lane sends the
// K28.5 idle character, which also carries the comma the receiver aligns on. The
// running disparity is kept across all symbols.
//
// Interface: s_* valid/ready stream; a word is taken (s_ready) in the cycle its
// last byte is encoded. sym is registered: the 10-bit symbol for the GTX
// transmitter, bit 9 first on the line.
// Timing: one symbol per cycle; a word occupies DATA_W/8 cycles, so the lane
// carries 8 payload bits per symbol.
// 8b/10b coding of the lane follows the carrier card design; the framing (idle
// character, byte order) is this design's own.
module serial_lane_tx
  import carrier_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] s_data,
  input  logic              s_valid,
  output logic              s_ready,
  output logic [9:0]        sym
);

  localparam int unsigned NB = DATA_W / 8;

  logic [$clog2(NB)-1:0] bidx;
  logic [7:0] byte_in;
  logic       kin, rd, rd_nx, k_err;
  logic [9:0] code;

  assign byte_in = s_valid ? s_data[bidx*8 +: 8] : K28_5;
  assign kin     = !s_valid;
  assign s_ready = s_valid && (bidx == $clog2(NB)'(NB - 1));

  enc8b10b u_enc (.din(byte_in), .k(kin), .rd_in(rd), .dout(code), .rd_out(rd_nx), .k_err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      // the line starts with K28.5 sent at RD -1, which leaves RD +1
      rd   <= 1'b1;
      bidx <= '0;
      sym  <= 10'b001111_1010;
    end else begin
      rd  <= rd_nx;
      sym <= code;
      if (s_valid) bidx <= bidx + 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !k_err);

endmodule
