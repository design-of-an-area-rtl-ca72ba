// mq_prob_rom: the probability-estimation tables of the MQ encoder.
//
// Four read-only tables indexed by the probability-state index I of the
// current context: ROM_Qe (16-bit LPS probability estimate Qe), ROM_MPS
// (next index after an MPS renormalisation, NMPS), ROM_LPS (next index
// after an LPS, NLPS) and ROM_SW (1 where an LPS flips the context's MPS).
// The contents are the 47-row probability-estimation table of the JPEG2000
// standard (Part 1, Table C.2); the four tables share one index and are
// written as one case statement. Purely combinational: the outputs follow
// idx in the same cycle. Indices 47..63 do not occur and return row 46.
module mq_prob_rom
  import mq_pkg::*;
(
  input  idx_t        idx,
  output prob_entry_t entry
);

  always_comb begin
    unique case (idx)
      6'd0 : entry = '{16'h5601,  6'd1,  6'd1, 1'b1};
      6'd1 : entry = '{16'h3401,  6'd2,  6'd6, 1'b0};
      6'd2 : entry = '{16'h1801,  6'd3,  6'd9, 1'b0};
      6'd3 : entry = '{16'h0AC1,  6'd4, 6'd12, 1'b0};
      6'd4 : entry = '{16'h0521,  6'd5, 6'd29, 1'b0};
      6'd5 : entry = '{16'h0221, 6'd38, 6'd33, 1'b0};
      6'd6 : entry = '{16'h5601,  6'd7,  6'd6, 1'b1};
      6'd7 : entry = '{16'h5401,  6'd8, 6'd14, 1'b0};
      6'd8 : entry = '{16'h4801,  6'd9, 6'd14, 1'b0};
      6'd9 : entry = '{16'h3801, 6'd10, 6'd14, 1'b0};
      6'd10: entry = '{16'h3001, 6'd11, 6'd17, 1'b0};
      6'd11: entry = '{16'h2401, 6'd12, 6'd18, 1'b0};
      6'd12: entry = '{16'h1C01, 6'd13, 6'd20, 1'b0};
      6'd13: entry = '{16'h1601, 6'd29, 6'd21, 1'b0};
      6'd14: entry = '{16'h5601, 6'd15, 6'd14, 1'b1};
      6'd15: entry = '{16'h5401, 6'd16, 6'd14, 1'b0};
      6'd16: entry = '{16'h5101, 6'd17, 6'd15, 1'b0};
      6'd17: entry = '{16'h4801, 6'd18, 6'd16, 1'b0};
      6'd18: entry = '{16'h3801, 6'd19, 6'd17, 1'b0};
      6'd19: entry = '{16'h3401, 6'd20, 6'd18, 1'b0};
      6'd20: entry = '{16'h3001, 6'd21, 6'd19, 1'b0};
      6'd21: entry = '{16'h2801, 6'd22, 6'd19, 1'b0};
      6'd22: entry = '{16'h2401, 6'd23, 6'd20, 1'b0};
      6'd23: entry = '{16'h2201, 6'd24, 6'd21, 1'b0};
      6'd24: entry = '{16'h1C01, 6'd25, 6'd22, 1'b0};
      6'd25: entry = '{16'h1801, 6'd26, 6'd23, 1'b0};
      6'd26: entry = '{16'h1601, 6'd27, 6'd24, 1'b0};
      6'd27: entry = '{16'h1401, 6'd28, 6'd25, 1'b0};
      6'd28: entry = '{16'h1201, 6'd29, 6'd26, 1'b0};
      6'd29: entry = '{16'h1101, 6'd30, 6'd27, 1'b0};
      6'd30: entry = '{16'h0AC1, 6'd31, 6'd28, 1'b0};
      6'd31: entry = '{16'h09C1, 6'd32, 6'd29, 1'b0};
      6'd32: entry = '{16'h08A1, 6'd33, 6'd30, 1'b0};
      6'd33: entry = '{16'h0521, 6'd34, 6'd31, 1'b0};
      6'd34: entry = '{16'h0441, 6'd35, 6'd32, 1'b0};
      6'd35: entry = '{16'h02A1, 6'd36, 6'd33, 1'b0};
      6'd36: entry = '{16'h0221, 6'd37, 6'd34, 1'b0};
      6'd37: entry = '{16'h0141, 6'd38, 6'd35, 1'b0};
      6'd38: entry = '{16'h0111, 6'd39, 6'd36, 1'b0};
      6'd39: entry = '{16'h0085, 6'd40, 6'd37, 1'b0};
      6'd40: entry = '{16'h0049, 6'd41, 6'd38, 1'b0};
      6'd41: entry = '{16'h0025, 6'd42, 6'd39, 1'b0};
      6'd42: entry = '{16'h0015, 6'd43, 6'd40, 1'b0};
      6'd43: entry = '{16'h0009, 6'd44, 6'd41, 1'b0};
      6'd44: entry = '{16'h0005, 6'd45, 6'd42, 1'b0};
      6'd45: entry = '{16'h0001, 6'd45, 6'd43, 1'b0};
      6'd46: entry = '{16'h5601, 6'd46, 6'd46, 1'b0};
      default: entry = '{16'h5601, 6'd46, 6'd46, 1'b0};
    endcase
  end

endmodule
