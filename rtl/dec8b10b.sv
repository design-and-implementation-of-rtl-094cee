// dec8b10b: combinational 8b/10b decoder (Widmer-Franaszek code).
//
// Inverse of enc8b10b. The abcdei sub-block is looked up to EDCBA and the fghj
// sub-block to HGF, accepting both running-disparity forms of each code. K28.y is
// recognised from its 6b part (001111 / 110000), whose 4b part follows the
// control-character table; K23.7, K27.7, K29.7 and K30.7 from an A7-form 4b part
// after the matching unbalanced 6b part.
//
// Error flags: code_err for a sub-block that is not in the code tables;
// disp_err for a sub-block whose form does not match the running disparity it
// arrives with (an unbalanced code with more ones, 111000 or 1100 is only
// legal at RD -1; their complements only at RD +1). Run-length rules across
// sub-blocks are not checked. rd_out is the running disparity after the symbol,
// taken from the received code so that one error does not spread.
//
// Interface: din = {a,b,c,d,e,i,f,g,h,j}, a in bit 9; rd_in/rd_out 0 = -1, 1 = +1.
// Timing: purely combinational; the caller keeps the RD register.
module dec8b10b (
  input  logic [9:0] din,
  input  logic       rd_in,
  output logic [7:0] dout,
  output logic       k,
  output logic       rd_out,
  output logic       code_err,
  output logic       disp_err
);

  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       bad6, bad4;
  logic       k28, kx7;
  logic       rd6;
  logic       need_m6, need_p6, need_m4, need_p4;

  assign c6 = din[9:4];
  assign c4 = din[3:0];

  always_comb begin
    bad6 = 1'b0;
    k28  = 1'b0;
    unique case (c6)
      6'b100111, 6'b011000: x = 5'd0;
      6'b011101, 6'b100010: x = 5'd1;
      6'b101101, 6'b010010: x = 5'd2;
      6'b110001:            x = 5'd3;
      6'b110101, 6'b001010: x = 5'd4;
      6'b101001:            x = 5'd5;
      6'b011001:            x = 5'd6;
      6'b111000, 6'b000111: x = 5'd7;
      6'b111001, 6'b000110: x = 5'd8;
      6'b100101:            x = 5'd9;
      6'b010101:            x = 5'd10;
      6'b110100:            x = 5'd11;
      6'b001101:            x = 5'd12;
      6'b101100:            x = 5'd13;
      6'b011100:            x = 5'd14;
      6'b010111, 6'b101000: x = 5'd15;
      6'b011011, 6'b100100: x = 5'd16;
      6'b100011:            x = 5'd17;
      6'b010011:            x = 5'd18;
      6'b110010:            x = 5'd19;
      6'b001011:            x = 5'd20;
      6'b101010:            x = 5'd21;
      6'b011010:            x = 5'd22;
      6'b111010, 6'b000101: x = 5'd23;
      6'b110011, 6'b001100: x = 5'd24;
      6'b100110:            x = 5'd25;
      6'b010110:            x = 5'd26;
      6'b110110, 6'b001001: x = 5'd27;
      6'b001110:            x = 5'd28;
      6'b101110, 6'b010001: x = 5'd29;
      6'b011110, 6'b100001: x = 5'd30;
      6'b101011, 6'b010100: x = 5'd31;
      6'b001111, 6'b110000: begin x = 5'd28; k28 = 1'b1; end
      default:              begin x = 5'd0;  bad6 = 1'b1; end
    endcase
  end

  always_comb begin
    bad4 = 1'b0;
    kx7  = 1'b0;
    y    = 3'd0;
    if (k28) begin
      // Control-character 4b codes; the form depends on the 6b part.
      unique case (c6[5] ? ~c4 : c4)
        4'b0100: y = 3'd0;
        4'b1001: y = 3'd1;
        4'b0101: y = 3'd2;
        4'b0011: y = 3'd3;
        4'b0010: y = 3'd4;
        4'b1010: y = 3'd5;
        4'b0110: y = 3'd6;
        4'b1000: y = 3'd7;
        default: bad4 = 1'b1;
      endcase
    end else begin
      unique case (c4)
        4'b1011, 4'b0100: y = 3'd0;
        4'b1001:          y = 3'd1;
        4'b0101:          y = 3'd2;
        4'b1100, 4'b0011: y = 3'd3;
        4'b1101, 4'b0010: y = 3'd4;
        4'b1010:          y = 3'd5;
        4'b0110:          y = 3'd6;
        4'b1110, 4'b0001: y = 3'd7;
        4'b0111, 4'b1000: begin
          y = 3'd7;
          // A7 after the unbalanced 6b code of x = 23, 27, 29, 30 marks Kx.7
          kx7 = (c6 == 6'b111010 || c6 == 6'b110110 || c6 == 6'b101110 || c6 == 6'b011110) && c4 == 4'b1000 ||
                (c6 == 6'b000101 || c6 == 6'b001001 || c6 == 6'b010001 || c6 == 6'b100001) && c4 == 4'b0111;
        end
        default: bad4 = 1'b1;
      endcase
    end
  end

  always_comb begin
    need_m6 = ($countones(c6) == 4) || (c6 == 6'b111000);
    need_p6 = ($countones(c6) == 2) || (c6 == 6'b000111);
    if ($countones(c6) == 4)      rd6 = 1'b1;
    else if ($countones(c6) == 2) rd6 = 1'b0;
    else                          rd6 = rd_in;
    need_m4 = ($countones(c4) == 3) || (c4 == 4'b1100);
    need_p4 = ($countones(c4) == 1) || (c4 == 4'b0011);
    if ($countones(c4) == 3)      rd_out = 1'b1;
    else if ($countones(c4) == 1) rd_out = 1'b0;
    else                          rd_out = rd6;
    disp_err = (need_m6 && rd_in) || (need_p6 && !rd_in) ||
               (need_m4 && rd6)   || (need_p4 && !rd6);
    code_err = bad6 || bad4;
    k        = k28 || kx7;
    dout     = {y, x};
  end

endmodule
