// serial_lane_rx: receive side of the high-speed serial module on FPGA-II.
//
// Takes the aligned 10-bit symbols of one FMC 8b/10b lane, decodes them and packs
// the data characters into DATA_W-bit words, the first byte into the lowest bits.
// Control characters (the K28.5 idle) carry no data and are skipped; since the
// sender sends idles only between words, each one also restarts packing at a word
// boundary. A symbol with a code or disparity error is counted in err_cnt and
// discards the word being packed; data is then ignored until the next control
// character restores word alignment. After reset the lane likewise waits for its
// first idle.
//
// Interface: sym from the GTX receiver, already comma aligned; m_data/m_valid is
// a one-cycle word strobe with no back-pressure (the uplink cache is paced by the
// front end's transfer request instead).
// Timing: a word is presented the cycle after its last byte's symbol arrives.
// 8b/10b decoding follows the carrier card design; the framing is this design's
// own and matches serial_lane_tx.
module serial_lane_rx
  import carrier_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic [9:0]        sym,
  output logic [DATA_W-1:0] m_data,
  output logic              m_valid,
  output logic [15:0]       err_cnt
);

  localparam int unsigned NB = DATA_W / 8;

  logic [$clog2(NB)-1:0] bidx;
  logic [7:0]  dbyte;
  logic        k, rd, rd_nx, code_err, disp_err;
  logic        sync;
  logic [DATA_W-1:0] acc;

  dec8b10b u_dec (.din(sym), .rd_in(rd), .dout(dbyte), .k, .rd_out(rd_nx), .code_err, .disp_err);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd      <= 1'b0;
      bidx    <= '0;
      acc     <= '0;
      m_data  <= '0;
      m_valid <= 1'b0;
      err_cnt <= '0;
      sync    <= 1'b0;
    end else begin
      rd      <= rd_nx;
      m_valid <= 1'b0;
      if (code_err || disp_err) begin
        err_cnt <= err_cnt + 1'b1;
        bidx    <= '0;
        sync    <= 1'b0;
      end else if (k) begin
        bidx <= '0;
        sync <= 1'b1;
      end else if (sync) begin
        acc[bidx*8 +: 8] <= dbyte;
        bidx <= bidx + 1'b1;
        if (bidx == $clog2(NB)'(NB - 1)) begin
          m_data  <= {dbyte, acc[DATA_W-9:0]};
          m_valid <= 1'b1;
        end
      end
    end
  end

endmodule
