// enc8b10b: combinational 8b/10b encoder (Widmer-Franaszek code).
//
// The FMC serial lanes carry bytes as 8b/10b symbols, which keeps the line DC
// balanced and gives the receiver enough transitions to recover the clock. The
// byte HGF_EDCBA is coded as two sub-blocks: EDCBA -> abcdei (5b/6b) and
// HGF -> fghj (3b/4b). Each sub-block has one code for running disparity (RD) -1
// and, where that code is unbalanced (or for D.07 / D.x.3), its complement for
// RD +1. D.x.7 takes the alternate code A7 where P7 would make a run of five equal
// bits across the sub-block boundary. Control characters K28.0-7, K23.7, K27.7,
// K29.7 and K30.7 are looked up as whole symbols; at RD +1 they are complemented.
//
// Interface: din/k with the current running disparity rd_in (0 = -1, 1 = +1) give
// dout = {a,b,c,d,e,i,f,g,h,j} with a (the first bit on the line) in bit 9, and the
// new running disparity rd_out. k_err flags a K request for a byte that is not a
// valid control character (dout then holds the data code of the byte).
// Timing: purely combinational; the caller keeps the RD register.
// The use of 8b/10b coding on the lanes follows the carrier card design; the code
// tables are the standard code.
module enc8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] dout,
  output logic       rd_out,
  output logic       k_err
);

  logic [4:0] x;
  logic [2:0] y;
  logic [5:0] c6_m, c6;
  logic [3:0] c4_m, c4;
  logic [9:0] kcode;
  logic       kvalid;
  logic       rd6;
  logic       use_a7;

  assign x = din[4:0];
  assign y = din[7:5];

  // 5b/6b codes for RD -1.
  always_comb begin
    unique case (x)
      5'd0:  c6_m = 6'b100111;  5'd1:  c6_m = 6'b011101;
      5'd2:  c6_m = 6'b101101;  5'd3:  c6_m = 6'b110001;
      5'd4:  c6_m = 6'b110101;  5'd5:  c6_m = 6'b101001;
      5'd6:  c6_m = 6'b011001;  5'd7:  c6_m = 6'b111000;
      5'd8:  c6_m = 6'b111001;  5'd9:  c6_m = 6'b100101;
      5'd10: c6_m = 6'b010101;  5'd11: c6_m = 6'b110100;
      5'd12: c6_m = 6'b001101;  5'd13: c6_m = 6'b101100;
      5'd14: c6_m = 6'b011100;  5'd15: c6_m = 6'b010111;
      5'd16: c6_m = 6'b011011;  5'd17: c6_m = 6'b100011;
      5'd18: c6_m = 6'b010011;  5'd19: c6_m = 6'b110010;
      5'd20: c6_m = 6'b001011;  5'd21: c6_m = 6'b101010;
      5'd22: c6_m = 6'b011010;  5'd23: c6_m = 6'b111010;
      5'd24: c6_m = 6'b110011;  5'd25: c6_m = 6'b100110;
      5'd26: c6_m = 6'b010110;  5'd27: c6_m = 6'b110110;
      5'd28: c6_m = 6'b001110;  5'd29: c6_m = 6'b101110;
      5'd30: c6_m = 6'b011110;  default: c6_m = 6'b101011;
    endcase
  end

  // 3b/4b codes for RD -1 (P7 for y = 7; A7 is 0111).
  always_comb begin
    unique case (y)
      3'd0: c4_m = 4'b1011;  3'd1: c4_m = 4'b1001;
      3'd2: c4_m = 4'b0101;  3'd3: c4_m = 4'b1100;
      3'd4: c4_m = 4'b1101;  3'd5: c4_m = 4'b1010;
      3'd6: c4_m = 4'b0110;  default: c4_m = 4'b1110;
    endcase
  end

  // Control characters, RD -1 form.
  always_comb begin
    kvalid = 1'b1;
    unique case (din)
      8'h1C: kcode = 10'b001111_0100;  // K28.0
      8'h3C: kcode = 10'b001111_1001;  // K28.1
      8'h5C: kcode = 10'b001111_0101;  // K28.2
      8'h7C: kcode = 10'b001111_0011;  // K28.3
      8'h9C: kcode = 10'b001111_0010;  // K28.4
      8'hBC: kcode = 10'b001111_1010;  // K28.5
      8'hDC: kcode = 10'b001111_0110;  // K28.6
      8'hFC: kcode = 10'b001111_1000;  // K28.7
      8'hF7: kcode = 10'b111010_1000;  // K23.7
      8'hFB: kcode = 10'b110110_1000;  // K27.7
      8'hFD: kcode = 10'b101110_1000;  // K29.7
      8'hFE: kcode = 10'b011110_1000;  // K30.7
      default: begin
        kcode  = '0;
        kvalid = 1'b0;
      end
    endcase
  end

  always_comb begin
    // 6b sub-block
    if (rd_in && (($countones(c6_m) != 3) || (x == 5'd7))) c6 = ~c6_m;
    else                                                   c6 = c6_m;
    rd6 = rd_in ^ ($countones(c6_m) != 3);
    // 4b sub-block
    use_a7 = (y == 3'd7) &&
             ((!rd6 && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
              ( rd6 && (x == 5'd11 || x == 5'd13 || x == 5'd14)));
    c4 = use_a7 ? 4'b0111 : c4_m;
    if (rd6 && (($countones(c4) != 2) || (y == 3'd3))) c4 = ~c4;

    k_err = k && !kvalid;
    if (k && kvalid) begin
      dout   = rd_in ? ~kcode : kcode;
      rd_out = rd_in ^ ($countones(kcode) != 5);
    end else begin
      dout   = {c6, c4};
      rd_out = rd6 ^ ($countones(c4) != 2);
    end
  end

endmodule
