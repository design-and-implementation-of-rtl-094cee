// stream_flow_ctrl: stream data speed balancing for the uplink cache.
//
// The front end pushes uplink data into the DDR3 cache faster than the host can
// drain it once the host spills to disk. This block keeps the cache from
// overflowing by gating the transfer request sent to the front end: it counts the
// words in the cache (one up per write, one down per read), drops fe_req when the
// fill reaches HIGH_MARK, and raises it again only after the cache has been read
// empty. The request therefore runs in long bursts rather than chattering around
// the mark. HIGH_MARK sits below CACHE_WORDS so that data already in flight when
// the request drops still fits.
//
// The mechanism (stop at an overflow threshold, resume when read empty) follows
// the carrier card design; the cache size and the margin are this design's own.
//
// Interface: wr_en / rd_en are single-cycle word strobes of the cache write and
// read ports. level is the fill after the current cycle's strobes are counted
// (registered). overflow is sticky: a write arrived with the cache full (the word
// is lost by the cache). stops counts how often the request was dropped.
// Timing: fe_req changes the cycle after the strobe that crosses a mark.
module stream_flow_ctrl #(
  parameter int unsigned CACHE_WORDS = 33554432,          // 512 MiB of 128-bit words
  parameter int unsigned HIGH_MARK   = CACHE_WORDS - 16384,
  localparam int unsigned LW         = $clog2(CACHE_WORDS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic          rd_en,
  output logic          fe_req,
  output logic [LW-1:0] level,
  output logic          overflow,
  output logic [31:0]   stops
);

  logic          wr_ok, rd_ok;
  logic [LW-1:0] level_nx;

  // A write into a full cache is lost; a read of an empty cache returns nothing.
  assign wr_ok = wr_en && (level != LW'(CACHE_WORDS) || rd_en);
  assign rd_ok = rd_en && (level != '0);

  always_comb begin
    level_nx = level;
    if (wr_ok && !rd_ok) level_nx = level + 1'b1;
    if (!wr_ok && rd_ok) level_nx = level - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      level    <= '0;
      fe_req   <= 1'b1;
      overflow <= 1'b0;
      stops    <= '0;
    end else begin
      level <= level_nx;
      if (wr_en && !wr_ok) overflow <= 1'b1;
      if (fe_req && level_nx >= LW'(HIGH_MARK)) begin
        fe_req <= 1'b0;
        stops  <= stops + 1'b1;
      end else if (!fe_req && level_nx == '0) begin
        fe_req <= 1'b1;
      end
    end
  end

  initial assert (HIGH_MARK > 0 && HIGH_MARK <= CACHE_WORDS)
    else $error("stream_flow_ctrl: HIGH_MARK must lie in 1..CACHE_WORDS");

endmodule
